// tb_nnip_edge_counter: checks the rising-edge counter against a count kept
// by the testbench. The input is driven with random levels (changed between
// clock edges); the testbench counts 0-to-1 changes between successive
// clock samples and expects the counter to show that number one clock
// later. A reset in the middle must clear the count. WIDTH is reduced to 4
// to also check the wrap-around.
module tb_nnip_edge_counter;
  logic clk = 0, rst_n = 0, sig = 0;
  logic [3:0] count;
  int checks = 0, failures = 0;
  int unsigned edges = 0, cycles = 0;
  logic prev = 0;

  always #5 clk = ~clk;

  nnip_edge_counter #(.WIDTH(4)) dut (.clk(clk), .rst_n(rst_n), .sig(sig), .count(count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0, "count zero after reset");
    for (int i = 0; i < 400; i++) begin
      sig = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (sig && !prev) edges++;
      prev = sig;
      @(negedge clk);
      check(count == 4'(edges), $sformatf("cycle %0d count %0d exp %0d", i, count, edges));
      if (i == 200) begin
        rst_n = 0; @(negedge clk); rst_n = 1;
        edges = 0; prev = 0; sig = 0; @(negedge clk); prev = 0;
        check(count == 0, "count cleared by reset");
      end
    end
    check(edges > 16, "counter wrapped at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
