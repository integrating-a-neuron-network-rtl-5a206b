// tb_nnip_top: end-to-end test of the NNIP with a behavioural neuron network.
//
// The testbench plays the host processor: it drives the AXI4-Lite port and
// the AXI4-Full port of nnip_top at its default parameters (50 us period =
// 5000 clocks, 64 KB memory) and connects the brought-out application ports
// to nna_model. It runs the host flow of the source design:
//   1. memory access over AXI4-Full: INCR, FIXED and WRAP bursts, byte
//      strobes, and a read and write arriving together;
//   2. initialisation through the registers with the toggle handshake: type 0
//      (cluster number), type 1 (25 dendrite voltages), type 2 (25 x 19 cell
//      parameters), type 3 (connectivity), type 4 (init done, locks);
//   3. four computation steps paced by the start generator, with an injected
//      dendrite override between steps 1 and 2 and a step that runs longer
//      than the 50 us period, so that the next start waits for cluster_rdy;
//   4. after steps 1 and 2, the 25 axon and 25 dendrite words are read back
//      from the output memory and compared with the values the model was
//      initialised with, and the three edge counters are read and compared
//      with counts kept by the testbench.
// Every mechanism (each init type, lock, immediate start, on-time start,
// late start, injected signal, each burst type, read/write arbitration,
// memory write from the application) is counted and must occur.
module tb_nnip_top;
  import nnip_pkg::*;

  localparam int unsigned PERIOD = 5000;
  localparam int unsigned NSIMC  = 25;
  localparam int unsigned NPAR   = 19;
  localparam int unsigned AXONP  = 15;

  logic clk = 1'b0;
  logic aresetn = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---- DUT signals -----------------------------------------------------------------
  logic [15:0] l_awaddr = '0, l_araddr = '0;
  logic        l_awvalid = 0, l_wvalid = 0, l_bready = 0, l_arvalid = 0, l_rready = 0;
  logic [31:0] l_wdata = '0;
  logic [3:0]  l_wstrb = '0;
  logic        l_awready, l_wready, l_bvalid, l_arready, l_rvalid;
  logic [1:0]  l_bresp, l_rresp;
  logic [31:0] l_rdata;

  logic [0:0]  f_awid = '0, f_arid = '0, f_bid, f_rid;
  logic [15:0] f_awaddr = '0, f_araddr = '0;
  logic [7:0]  f_awlen = '0, f_arlen = '0;
  logic [2:0]  f_awsize = 3'd2, f_arsize = 3'd2;
  logic [1:0]  f_awburst = BURST_INCR, f_arburst = BURST_INCR;
  logic        f_awvalid = 0, f_wvalid = 0, f_wlast = 0, f_bready = 0, f_arvalid = 0, f_rready = 0;
  logic [31:0] f_wdata = '0;
  logic [3:0]  f_wstrb = '0;
  logic        f_awready, f_wready, f_bvalid, f_arready, f_rvalid, f_rlast;
  logic [1:0]  f_bresp, f_rresp;
  logic [31:0] f_rdata;

  logic                   nna_reset, s_start, cluster_rdy, init_str, init_ack, in_str, in_ack;
  logic [INIT_TYPE_W-1:0] init_type;
  logic [CLUS_W-1:0]      init_clus;
  logic [ADR_W-1:0]       init_adr, in_adr, out_adr;
  logic [ADR2_W-1:0]      init_adr2;
  logic [DATA_W-1:0]      init_data, in_data, out_data;
  logic [IN_TYPE_W-1:0]   in_type;
  logic [OUT_TYPE_W-1:0]  out_type;
  logic                   out_new, init_locked;
  int unsigned            calc_cycles = 100;

  nnip_top dut (
    .aclk(clk), .aresetn(aresetn),
    .s00_axi_lite_awaddr(l_awaddr), .s00_axi_lite_awvalid(l_awvalid), .s00_axi_lite_awready(l_awready),
    .s00_axi_lite_wdata(l_wdata), .s00_axi_lite_wstrb(l_wstrb), .s00_axi_lite_wvalid(l_wvalid),
    .s00_axi_lite_wready(l_wready), .s00_axi_lite_bresp(l_bresp), .s00_axi_lite_bvalid(l_bvalid),
    .s00_axi_lite_bready(l_bready), .s00_axi_lite_araddr(l_araddr), .s00_axi_lite_arvalid(l_arvalid),
    .s00_axi_lite_arready(l_arready), .s00_axi_lite_rdata(l_rdata), .s00_axi_lite_rresp(l_rresp),
    .s00_axi_lite_rvalid(l_rvalid), .s00_axi_lite_rready(l_rready),
    .s01_axi_full_awid(f_awid), .s01_axi_full_awaddr(f_awaddr), .s01_axi_full_awlen(f_awlen),
    .s01_axi_full_awsize(f_awsize), .s01_axi_full_awburst(f_awburst), .s01_axi_full_awvalid(f_awvalid),
    .s01_axi_full_awready(f_awready), .s01_axi_full_wdata(f_wdata), .s01_axi_full_wstrb(f_wstrb),
    .s01_axi_full_wlast(f_wlast), .s01_axi_full_wvalid(f_wvalid), .s01_axi_full_wready(f_wready),
    .s01_axi_full_bid(f_bid), .s01_axi_full_bresp(f_bresp), .s01_axi_full_bvalid(f_bvalid),
    .s01_axi_full_bready(f_bready), .s01_axi_full_arid(f_arid), .s01_axi_full_araddr(f_araddr),
    .s01_axi_full_arlen(f_arlen), .s01_axi_full_arsize(f_arsize), .s01_axi_full_arburst(f_arburst),
    .s01_axi_full_arvalid(f_arvalid), .s01_axi_full_arready(f_arready), .s01_axi_full_rid(f_rid),
    .s01_axi_full_rdata(f_rdata), .s01_axi_full_rresp(f_rresp), .s01_axi_full_rlast(f_rlast),
    .s01_axi_full_rvalid(f_rvalid), .s01_axi_full_rready(f_rready),
    .nna_reset(nna_reset), .nna_s_start(s_start), .nna_cluster_rdy(cluster_rdy),
    .nna_cluster_init_type(init_type), .nna_cluster_init_clus(init_clus),
    .nna_cluster_init_adr(init_adr), .nna_cluster_init_adr2(init_adr2),
    .nna_cluster_init_data(init_data), .nna_cluster_init_str(init_str),
    .nna_cluster_init_ack(init_ack), .nna_cluster_in_adr(in_adr), .nna_cluster_in_type(in_type),
    .nna_cluster_in_data(in_data), .nna_cluster_in_str(in_str), .nna_cluster_in_ack(in_ack),
    .nna_cluster_out_adr(out_adr), .nna_cluster_out_type(out_type),
    .nna_cluster_out_data(out_data), .nna_cluster_out_new(out_new),
    .init_locked(init_locked)
  );

  nna_model #(.N_SIMC(NSIMC), .N_PARAM(NPAR), .AXON_PARAM(AXONP)) u_nna (
    .calc_cycles(calc_cycles), .clk(clk), .reset(nna_reset), .s_start(s_start), .cluster_rdy(cluster_rdy),
    .cluster_init_type(init_type), .cluster_init_clus(init_clus), .cluster_init_adr(init_adr),
    .cluster_init_adr2(init_adr2), .cluster_init_data(init_data), .cluster_init_str(init_str),
    .cluster_init_ack(init_ack), .cluster_in_adr(in_adr), .cluster_in_type(in_type),
    .cluster_in_data(in_data), .cluster_in_str(in_str), .cluster_in_ack(in_ack),
    .cluster_out_adr(out_adr), .cluster_out_type(out_type), .cluster_out_data(out_data),
    .cluster_out_new(out_new)
  );

  // ---- monitors ----------------------------------------------------------------------
  longint unsigned start_cyc [$];
  longint unsigned rdy_rise_cyc = 0;
  int unsigned     n_start = 0, n_rdy_rise = 0, n_out_new = 0, n_start_unlocked = 0;
  int unsigned     n_imm = 0, n_ontime = 0, n_late = 0, n_mem_wr = 0;
  logic            rdy_q = 1'b0, new_q = 1'b0, lock_q = 1'b0;
  longint unsigned lock_cyc = 0;
  always_ff @(posedge clk) if (aresetn) begin
    rdy_q <= cluster_rdy;
    new_q <= out_new;
    lock_q <= init_locked;
    if (init_locked && !lock_q) lock_cyc <= cyc;
    if (cluster_rdy && !rdy_q) begin n_rdy_rise <= n_rdy_rise + 1; rdy_rise_cyc <= cyc; end
    if (out_new && !new_q) n_out_new <= n_out_new + 1;
    if (out_new && (out_type == OUT_AXON || out_type == OUT_DENDRITE)) n_mem_wr <= n_mem_wr + 1;
    if (s_start) begin
      n_start <= n_start + 1;
      start_cyc.push_back(cyc);
      if (!init_locked) n_start_unlocked <= n_start_unlocked + 1;
    end
  end

  // ---- AXI4-Lite host tasks (drive and sample between clock edges) --------------------
  task automatic lite_write(input int unsigned idx, input logic [31:0] data, input logic [3:0] strb = 4'hF);
    @(negedge clk);
    l_awaddr = 16'(idx * 4); l_wdata = data; l_wstrb = strb;
    l_awvalid = 1; l_wvalid = 1; l_bready = 1;
    do @(negedge clk); while (!(l_awready && l_wready));
    @(negedge clk);
    l_awvalid = 0; l_wvalid = 0;
    while (!l_bvalid) @(negedge clk);
    check(l_bresp == RESP_OKAY, "lite BRESP OKAY");
    @(negedge clk);
    l_bready = 0;
  endtask

  task automatic lite_read(input int unsigned idx, output logic [31:0] data);
    @(negedge clk);
    l_araddr = 16'(idx * 4); l_arvalid = 1; l_rready = 1;
    do @(negedge clk); while (!l_arready);
    @(negedge clk);
    l_arvalid = 0;
    while (!l_rvalid) @(negedge clk);
    data = l_rdata;
    @(negedge clk);
    l_rready = 0;
  endtask

  // ---- AXI4-Full host tasks ---------------------------------------------------------------
  logic [31:0] wbuf [256];
  logic [31:0] rbuf [256];

  task automatic full_write(input logic [15:0] addr, input int unsigned beats,
                            input logic [1:0] burst, input logic [3:0] strb = 4'hF);
    @(negedge clk);
    f_awaddr = addr; f_awlen = 8'(beats - 1); f_awburst = burst; f_awsize = 3'd2;
    f_awid = 1'b1; f_awvalid = 1;
    #1;
    while (!f_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    f_awvalid = 0;
    for (int i = 0; i < beats; i++) begin
      f_wdata = wbuf[i]; f_wstrb = strb; f_wlast = (i == beats - 1); f_wvalid = 1;
      #1;
      while (!f_wready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    f_wvalid = 0; f_wlast = 0; f_bready = 1;
    #1;
    while (!f_bvalid) begin @(negedge clk); #1; end
    check(f_bresp == RESP_OKAY && f_bid == 1'b1, "full BRESP OKAY and BID echoed");
    @(negedge clk);
    f_bready = 0;
  endtask

  task automatic full_read(input logic [15:0] addr, input int unsigned beats, input logic [1:0] burst);
    @(negedge clk);
    f_araddr = addr; f_arlen = 8'(beats - 1); f_arburst = burst; f_arsize = 3'd2;
    f_arid = 1'b0; f_arvalid = 1;
    #1;
    while (!f_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    f_arvalid = 0; f_rready = 1;
    for (int i = 0; i < beats; i++) begin
      #1;
      while (!f_rvalid) begin @(negedge clk); #1; end
      rbuf[i] = f_rdata;
      check(f_rlast == (i == beats - 1), $sformatf("RLAST on beat %0d of %0d", i, beats));
      check(f_rresp == RESP_OKAY && f_rid == 1'b0, "full RRESP OKAY and RID echoed");
      @(negedge clk);
    end
    f_rready = 0;
  endtask

  // ---- initialisation over the register port ----------------------------------------------
  logic       str_bit = 1'b0;
  int unsigned n_init_hs [5] = '{0, 0, 0, 0, 0};

  task automatic send_init(input init_type_e t, input int unsigned adr, input int unsigned adr2,
                           input logic [31:0] data);
    logic [31:0] ack;
    lite_write(REG_INIT_TYPE, 32'(t));
    lite_write(REG_INIT_CLUS, 32'd0);
    lite_write(REG_INIT_ADR, adr);
    lite_write(REG_INIT_ADR2, adr2);
    lite_write(REG_INIT_DATA, data);
    str_bit = ~str_bit;
    lite_write(REG_INIT_STR, 32'(str_bit));
    do lite_read(REG_INIT_ACK, ack); while (ack[0] != str_bit);
    n_init_hs[t]++;
  endtask

  function automatic logic [31:0] dend_v(int unsigned c);
    return 32'hC270_4200 + 32'(c);
  endfunction
  function automatic logic [31:0] par_v(int unsigned c, int unsigned p);
    return 32'h3F00_0000 + 32'(c << 8) + 32'(p);
  endfunction

  task automatic wait_out_new(input int unsigned target);
    logic [31:0] v;
    do begin
      repeat (50) @(negedge clk);
      lite_read(REG_NUM_OUTNEW, v);
    end while (v < target);
    check(v == target, $sformatf("out_new counter %0d == %0d", v, target));
  endtask

  task automatic check_results(input int unsigned step, input int unsigned inj_cell,
                               input logic [31:0] inj_val, input bit inj_on);
    full_read(16'd0, NSIMC, BURST_INCR);
    for (int c = 0; c < NSIMC; c++)
      check(rbuf[c] == par_v(c, AXONP) + step,
            $sformatf("step %0d axon[%0d] %h exp %h", step, c, rbuf[c], par_v(c, AXONP) + step));
    full_read(16'd400, NSIMC, BURST_INCR);
    for (int c = 0; c < NSIMC; c++) begin
      logic [31:0] e;
      e = (inj_on && c == inj_cell) ? inj_val : dend_v(c);
      check(rbuf[c] == e, $sformatf("step %0d dend[%0d] %h exp %h", step, c, rbuf[c], e));
    end
  endtask

  // ---- the test -----------------------------------------------------------------------
  int unsigned n_incr = 0, n_fixed = 0, n_wrap = 0, n_arb = 0, n_inject = 0, n_strb = 0;

  initial begin
    logic [31:0] v, v1, v2, v3;
    repeat (5) @(negedge clk);
    aresetn = 1'b1;
    repeat (5) @(negedge clk);

    lite_read(REG_CLUSTER_RDY, v);
    check(v == 1, "cluster_rdy high after reset (ready for init)");

    // 1. memory access over AXI4-Full
    for (int i = 0; i < 128; i++) wbuf[i] = 32'hA500_0000 + 32'(i);
    full_write(16'd0, 128, BURST_INCR);
    full_read(16'd0, 128, BURST_INCR);
    for (int i = 0; i < 128; i++) check(rbuf[i] == 32'hA500_0000 + 32'(i), "INCR write/read");
    n_incr++;
    for (int i = 0; i < 4; i++) wbuf[i] = 32'h0F0F_0000 + 32'(i);
    full_write(16'h0800, 4, BURST_FIXED);
    full_read(16'h0800, 2, BURST_FIXED);
    check(rbuf[0] == 32'h0F0F_0003 && rbuf[1] == 32'h0F0F_0003, "FIXED burst keeps one address");
    n_fixed++;
    full_read(16'd8, 4, BURST_WRAP);
    check(rbuf[0] == 32'hA500_0002 && rbuf[1] == 32'hA500_0003 &&
          rbuf[2] == 32'hA500_0000 && rbuf[3] == 32'hA500_0001, "WRAP burst wraps at 16 bytes");
    n_wrap++;
    wbuf[0] = 32'h1122_3344;
    full_write(16'd12, 1, BURST_INCR, 4'b0101);
    full_read(16'd12, 1, BURST_INCR);
    check(rbuf[0] == 32'hA522_0044, $sformatf("byte strobes %h", rbuf[0]));
    n_strb++;
    // read and write addresses presented together: both must complete
    wbuf[0] = 32'hDEAD_BEEF;
    fork
      full_write(16'h0100, 1, BURST_INCR);
      begin #2; full_read(16'h0104, 1, BURST_INCR); end
    join
    check(rbuf[0] == 32'hA500_0041, "read alongside write returns old word");
    full_read(16'h0100, 1, BURST_INCR);
    check(rbuf[0] == 32'hDEAD_BEEF, "write alongside read stored");
    n_arb++;

    // 2. initialisation
    send_init(INIT_CLUSTER_NR, 0, 0, 32'd0);
    lite_read(REG_CLUSTER_RDY, v);
    check(v == 0, "cluster_rdy low during initialisation");
    for (int c = 0; c < NSIMC; c++) send_init(INIT_DEND_V, c, 0, dend_v(c));
    for (int c = 0; c < NSIMC; c++)
      for (int p = 0; p < NPAR; p++) send_init(INIT_CELL_PARAM, c, p, par_v(c, p));
    for (int c = 0; c < NSIMC; c++) begin
      send_init(INIT_CONN, c, 0, (c + 1) % NSIMC);
      send_init(INIT_CONN, c, 1, 25);
    end
    check(n_start == 0, "no start before init done");
    send_init(INIT_DONE, 0, 0, 32'd0);
    check(init_locked, "init locked after type 4");

    // 3./4. step 1: immediate start after lock
    wait_out_new(2 * NSIMC);
    check(start_cyc.size() == 1, "one start in step 1");
    check_results(0, 0, 0, 0);
    lite_read(REG_NUM_START, v1);
    lite_read(REG_NUM_RDY, v2);
    check(v1 == n_start, $sformatf("s_start counter %0d vs %0d", v1, n_start));
    check(v2 == n_rdy_rise, $sformatf("cluster_rdy counter %0d vs %0d", v2, n_rdy_rise));

    // injected signal: override dendrite of cell 3
    lite_write(REG_IN_TYPE, 0);
    lite_write(REG_IN_ADR, 3);
    lite_write(REG_IN_DATA, 32'hC27B_96FA);
    lite_write(REG_IN_STR, 1);
    do lite_read(REG_IN_ACK, v); while (v != 1);
    n_inject++;

    // step 2: on-time start, exactly one period after the first
    wait_out_new(4 * NSIMC);
    check(start_cyc.size() == 2, "two starts after step 2");
    check(start_cyc[1] - start_cyc[0] == 64'(PERIOD),
          $sformatf("start period %0d clocks", start_cyc[1] - start_cyc[0]));
    check_results(1, 3, 32'hC27B_96FA, 1);

    // step 3 runs longer than the period; step 4's start waits for ready
    calc_cycles = PERIOD + 1500;
    wait (start_cyc.size() == 3);
    @(negedge clk);
    calc_cycles = 100;
    wait (start_cyc.size() == 4);
    check(start_cyc[3] - start_cyc[2] > 64'(PERIOD), "late start after a long step");
    check(start_cyc[3] == rdy_rise_cyc + 1, "late start follows cluster_rdy at once");
    wait_out_new(8 * NSIMC);
    lite_read(REG_NUM_START, v1);
    lite_read(REG_NUM_RDY, v2);
    lite_read(REG_NUM_OUTNEW, v3);
    check(v1 == n_start && v2 == n_rdy_rise && v3 == n_out_new, "edge counters match monitors");
    check(n_start_unlocked == 0, "no start while not locked");
    check(u_nna.ignored_starts == 0, "no start while application busy");

    // classify starts
    if (start_cyc[0] - lock_cyc <= 3) n_imm++;
    for (int i = 1; i < 4; i++) begin
      if (start_cyc[i] - start_cyc[i-1] == 64'(PERIOD)) n_ontime++;
      else if (start_cyc[i] - start_cyc[i-1] > 64'(PERIOD)) n_late++;
    end

    $display("mechanisms: init0=%0d init1=%0d init2=%0d init3=%0d init4=%0d imm_start=%0d ontime=%0d late=%0d",
             n_init_hs[0], n_init_hs[1], n_init_hs[2], n_init_hs[3], n_init_hs[4], n_imm, n_ontime, n_late);
    $display("mechanisms: incr=%0d fixed=%0d wrap=%0d strb=%0d arb=%0d inject=%0d mem_writes=%0d",
             n_incr, n_fixed, n_wrap, n_strb, n_arb, n_inject, n_mem_wr);
    for (int t = 0; t < 5; t++) check(n_init_hs[t] > 0, $sformatf("init type %0d used", t));
    check(n_imm > 0, "start right after lock happened");
    check(n_ontime > 0, "on-time start happened");
    check(n_late > 0, "late start happened");
    check(n_mem_wr == 8 * NSIMC, "application memory writes");
    check(n_incr > 0 && n_fixed > 0 && n_wrap > 0 && n_strb > 0 && n_arb > 0 && n_inject > 0,
          "bus mechanisms happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
