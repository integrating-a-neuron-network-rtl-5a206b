// tb_nnip_out_memory: checks the output memory at its full 64 KB size.
//
// The testbench keeps its own model of the memory and
//   * clears a region through the bus port (port B) and reads it back;
//   * writes application results through port A for both voltage kinds and
//     checks that axon words land at word adr and dendrite words at word
//     100 + adr, and that words of other types are dropped;
//   * checks byte strobes on port B;
//   * writes the same word from both ports in one clock: port A must win;
//   * checks the one-clock read latency and the top word of the array.
module tb_nnip_out_memory;
  import nnip_pkg::*;
  logic clk = 0;
  logic a_new = 0;
  logic [1:0] a_type = 0;
  logic [7:0] a_adr = 0;
  logic [31:0] a_data = 0;
  logic [13:0] b_addr = 0;
  logic b_re = 0, b_we = 0;
  logic [3:0] b_wstrb = 0;
  logic [31:0] b_wdata = 0, b_rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nnip_out_memory dut (.clk, .a_new, .a_type, .a_adr, .a_data, .b_addr, .b_re, .b_we,
                       .b_wstrb, .b_wdata, .b_rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bwrite(input int unsigned a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk); b_addr = 14'(a); b_wdata = d; b_wstrb = s; b_we = 1;
    @(negedge clk); b_we = 0;
    if (!model.exists(a)) model[a] = 0;
    for (int i = 0; i < 4; i++) if (s[i]) model[a][8*i +: 8] = d[8*i +: 8];
  endtask

  task automatic bread_check(input int unsigned a);
    @(negedge clk); b_addr = 14'(a); b_re = 1;
    @(negedge clk); b_re = 0; b_addr = 14'(a + 1);
    check(b_rdata == model[a], $sformatf("word %0d = %h exp %h", a, b_rdata, model[a]));
  endtask

  task automatic awrite(input logic [1:0] t, input int unsigned adr, input logic [31:0] d);
    @(negedge clk); a_new = 1; a_type = t; a_adr = 8'(adr); a_data = d;
    @(negedge clk); a_new = 0;
    if (t == OUT_AXON) model[adr] = d;
    else if (t == OUT_DENDRITE) model[100 + adr] = d;
  endtask

  initial begin
    for (int a = 0; a < 160; a++) bwrite(a, 32'h0);
    bwrite(16383, 32'hFACE_0001);
    for (int c = 0; c < 25; c++) begin
      awrite(OUT_DENDRITE, c, 32'hC270_0000 + 32'(c));
      awrite(OUT_AXON, c, 32'hC27B_0000 + 32'(c));
      awrite(2'b10, c, 32'hBAD0_0000 + 32'(c));
      awrite(2'b11, c, 32'hBAD1_0000 + 32'(c));
    end
    for (int a = 0; a < 160; a++) bread_check(a);
    check(model[3] == 32'hC27B_0003 && model[103] == 32'hC270_0003, "model layout");
    bread_check(16383);
    // byte strobes
    bwrite(140, 32'h1122_3344, 4'b1010);
    bread_check(140);
    // same-word write from both ports: application wins
    @(negedge clk);
    a_new = 1; a_type = OUT_AXON; a_adr = 8'd7; a_data = 32'h0A0A_0A0A;
    b_addr = 14'd7; b_wdata = 32'h0B0B_0B0B; b_wstrb = 4'hF; b_we = 1;
    @(negedge clk); a_new = 0; b_we = 0;
    model[7] = 32'h0A0A_0A0A;
    bread_check(7);
    // read data holds while b_re is low
    @(negedge clk); b_addr = 14'd103; b_re = 1;
    @(negedge clk); b_re = 0; b_addr = 14'd0;
    repeat (3) @(negedge clk);
    check(b_rdata == model[103], "read data held while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
