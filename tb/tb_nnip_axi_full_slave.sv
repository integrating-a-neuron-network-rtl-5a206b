// tb_nnip_axi_full_slave: checks the AXI4-Full slave with its memory and
// start generator (period reduced to 40 clocks).
//
// The testbench is an AXI4 master with random gaps on WVALID and RREADY and
// keeps a byte-accurate model of the memory. It checks
//   * clearing the first 5 KB with 256-beat bursts, then 150 random bursts
//     (INCR 1..64 beats, FIXED 1..8, WRAP 2/4/8/16; every third one with
//     1- or 2-byte beats on their own byte lanes) with random strobes, read back with random burst types, against the model;
//   * BID/RID echo, OKAY responses, RLAST only on the last beat, and the
//     two-clock read beat when RREADY is always high;
//   * application results written through the out_new port landing at word
//     adr (axon) and 100 + adr (dendrite);
//   * the init lock: an acknowledged type 3 vector does not arm the start
//     generator, an acknowledged type 4 vector does; after that s_start
//     follows cluster_rdy and repeats every 40 clocks.
module tb_nnip_axi_full_slave;
  import nnip_pkg::*;
  localparam int unsigned P = 40;
  logic clk = 0, aresetn = 0;
  logic [1:0] awid = 0, arid = 0, bid, rid;
  logic [15:0] awaddr = 0, araddr = 0;
  logic [7:0] awlen = 0, arlen = 0;
  logic [2:0] awsize = 2, arsize = 2;
  logic [1:0] awburst = 1, arburst = 1;
  logic awvalid = 0, wvalid = 0, wlast = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0, rdata;
  logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid, rlast;
  logic [1:0] bresp, rresp;
  logic rdy = 1, s_start, init_ack = 0, out_new = 0, locked;
  logic [2:0] init_type = 0;
  logic [1:0] out_type = 0;
  logic [7:0] out_adr = 0;
  logic [31:0] out_data = 0;
  logic [7:0] mem_model [int];
  int checks = 0, failures = 0;
  int unsigned cyc = 0, n_start = 0, n_fixed = 0, n_wrap = 0, n_incr = 0, n_narrow = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (s_start && aresetn) n_start <= n_start + 1;
  end

  nnip_axi_full_slave #(.ID_W(2), .PERIOD_CYCLES(P)) dut (
    .aclk(clk), .aresetn,
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .nna_cluster_rdy(rdy), .nna_s_start(s_start), .nna_init_type(init_type),
    .nna_init_ack(init_ack), .nna_out_new(out_new), .nna_out_type(out_type),
    .nna_out_adr(out_adr), .nna_out_data(out_data), .init_locked(locked));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // Byte address of beat i; bursts start aligned to the beat size.
  function automatic logic [15:0] beat_addr(logic [15:0] a, int unsigned i, int unsigned beats,
                                            logic [1:0] burst, logic [2:0] size);
    logic [15:0] wrap_bytes, base;
    int unsigned nb;
    nb = 1 << size;
    case (burst)
      BURST_FIXED: return a;
      BURST_WRAP: begin
        wrap_bytes = 16'(beats * nb);
        base = a & ~(wrap_bytes - 16'd1);
        return base + 16'(((a - base) + 16'(i * nb)) % wrap_bytes);
      end
      default: return a + 16'(i * nb);
    endcase
  endfunction

  function automatic logic [31:0] model_word(logic [15:0] a);
    logic [31:0] w;
    for (int b = 0; b < 4; b++)
      w[8*b +: 8] = mem_model.exists(int'({a[15:2], 2'(b)})) ? mem_model[int'({a[15:2], 2'(b)})] : 8'h00;
    return w;
  endfunction

  task automatic axi_write(input logic [15:0] a, input int unsigned beats, input logic [1:0] burst,
                           input logic [2:0] size, input bit gaps, input bit zero = 0);
    logic [1:0] id;
    id = 2'($urandom);
    @(negedge clk);
    awaddr = a; awlen = 8'(beats - 1); awburst = burst; awsize = size; awid = id; awvalid = 1;
    #1; while (!awready) begin @(negedge clk); #1; end
    @(negedge clk); awvalid = 0;
    for (int i = 0; i < beats; i++) begin
      logic [31:0] d; logic [3:0] s, lanes; logic [15:0] ba;
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
      ba = beat_addr(a, i, beats, burst, size);
      // a narrow beat may only strobe the lanes its address selects
      lanes = 4'(((1 << (1 << size)) - 1) << ba[1:0]);
      d = zero ? 32'h0 : $urandom; s = zero ? 4'hF : 4'($urandom_range(1, 15)) & lanes;
      if (s == 4'h0) s = lanes;
      wdata = d; wstrb = s; wlast = (i == beats - 1); wvalid = 1;
      #1; while (!wready) begin @(negedge clk); #1; end
      for (int b = 0; b < 4; b++) if (s[b]) mem_model[int'({ba[15:2], 2'(b)})] = d[8*b +: 8];
      @(negedge clk); wvalid = 0; wlast = 0;
    end
    bready = 1;
    #1; while (!bvalid) begin @(negedge clk); #1; end
    check(bid == id && bresp == RESP_OKAY, "BID echoed, BRESP OKAY");
    @(negedge clk); bready = 0;
  endtask

  task automatic axi_read_check(input logic [15:0] a, input int unsigned beats, input logic [1:0] burst,
                                input logic [2:0] size, input bit gaps);
    logic [1:0] id;
    int unsigned t_prev;
    id = 2'($urandom);
    @(negedge clk);
    araddr = a; arlen = 8'(beats - 1); arburst = burst; arsize = size; arid = id; arvalid = 1;
    #1; while (!arready) begin @(negedge clk); #1; end
    @(negedge clk); arvalid = 0;
    t_prev = cyc;
    for (int i = 0; i < beats; i++) begin
      logic [15:0] ba;
      rready = 0;
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
      rready = 1;
      #1; while (!rvalid) begin @(negedge clk); #1; end
      ba = beat_addr(a, i, beats, burst, size);
      check(rdata == model_word(ba), $sformatf("read %h beat %0d = %h exp %h", ba, i, rdata, model_word(ba)));
      check(rlast == (i == beats - 1) && rid == id && rresp == RESP_OKAY, "RLAST/RID/RRESP");
      if (!gaps && i > 0) check(cyc - t_prev == 2, "two clocks per read beat");
      t_prev = cyc;
      @(negedge clk);
    end
    rready = 0;
  endtask

  task automatic nna_write(input logic [1:0] t, input int unsigned adr, input logic [31:0] d);
    int unsigned w;
    @(negedge clk); out_new = 1; out_type = t; out_adr = 8'(adr); out_data = d;
    @(negedge clk); out_new = 0;
    w = (t == OUT_AXON) ? adr : 100 + adr;
    for (int b = 0; b < 4; b++) mem_model[int'(w * 4 + b)] = d[8*b +: 8];
  endtask

  initial begin
    repeat (3) @(negedge clk);
    aresetn = 1;
    // clear the region under test (the array has no reset)
    for (int k = 0; k < 5; k++) axi_write(16'(k * 1024), 256, BURST_INCR, 3'd2, 0, 1);
    // random bursts
    for (int n = 0; n < 150; n++) begin
      logic [1:0] bt; int unsigned beats; logic [15:0] a; logic [2:0] sz;
      bt = 2'($urandom_range(0, 2));
      // every third burst uses 1- or 2-byte beats
      sz = (n % 3 == 2) ? 3'($urandom_range(0, 1)) : 3'd2;
      if (sz != 3'd2) n_narrow++;
      case (bt)
        BURST_FIXED: begin beats = $urandom_range(1, 8); n_fixed++; end
        BURST_WRAP:  begin beats = 2 << $urandom_range(0, 3); n_wrap++; end
        default:     begin beats = $urandom_range(1, 64); n_incr++; end
      endcase
      a = 16'($urandom_range(0, 4095)) & ~16'((1 << sz) - 1);
      if (bt == BURST_WRAP) a = 16'($urandom_range(0, 1023)) & ~16'((1 << sz) - 1);
      axi_write(a, beats, bt, sz, n % 2 == 1);
      axi_read_check(a, beats, bt, sz, n % 3 == 1);
      axi_read_check(a & 16'hFFC0, 16, BURST_INCR, 3'd2, 0);
    end
    check(n_fixed > 0 && n_wrap > 0 && n_incr > 0 && n_narrow > 0, "all burst types and narrow beats used");
    // application result port
    for (int c = 0; c < 25; c++) begin
      nna_write(OUT_DENDRITE, c, 32'hC270_4200 + 32'(c));
      nna_write(OUT_AXON, c, 32'hC27B_9600 + 32'(c));
    end
    axi_read_check(16'd0, 25, BURST_INCR, 3'd2, 0);
    axi_read_check(16'd400, 25, BURST_INCR, 3'd2, 1);
    check(model_word(16'd400) == 32'hC270_4200 && model_word(16'd0) == 32'hC27B_9600, "result layout");
    // init lock and start generator
    repeat (2 * P) @(negedge clk);
    check(n_start == 0 && !locked, $sformatf("no start before lock (%0d %0d)", n_start, locked));
    init_type = INIT_CONN; @(negedge clk); init_ack = 1; repeat (3) @(negedge clk);
    check(!locked && n_start == 0, "type 3 acknowledgement does not lock");
    init_type = INIT_DONE; @(negedge clk); init_ack = 0; @(negedge clk); @(negedge clk);
    check(locked, "type 4 acknowledgement locks");
    @(negedge clk);
    check(n_start == 1, "first start right after lock");
    rdy = 0;
    repeat (P + 10) @(negedge clk);
    check(n_start == 1, "no start while not ready");
    rdy = 1;
    @(negedge clk); @(negedge clk);
    check(n_start == 2, "start after ready returns");
    repeat (3 * P) @(negedge clk);
    check(n_start == 5, $sformatf("one start per period while ready (%0d)", n_start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
