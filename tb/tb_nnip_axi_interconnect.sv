// tb_nnip_axi_interconnect: checks the address routing and burst splitting
// of nnip_axi_interconnect against two behavioural slaves.
//
// The testbench is an AXI4 master (12-bit IDs) on the slave port. Behind the
// interconnect sit
//   * a register-slave model on the AXI4-Lite side: 64 words, AWREADY,
//     WREADY and ARREADY raised at random times and independently, B and R
//     after random delays; words 32..63 answer SLVERR and are not written;
//   * a memory-slave model on the AXI4-Full side that records every
//     forwarded address (ID, address, length, size, burst) and W beat, and
//     answers reads with a beat tag {address[15:0], beat, 8'hA5}.
// 300 random transactions go to the register window (INCR/FIXED/WRAP bursts
// of 1..8 beats, random strobes), the memory window (1..16 beats, random
// size and burst type) or an unmapped address. The master checks
//   * register bursts: the model's registers equal a reference after every
//     write, each read beat returns the reference word, a write burst's B
//     carries the worst response of its beats (directed bursts mix SLVERR
//     and OKAY beats in both orders), a read beat its own response;
//   * memory bursts: the forwarded fields and W beats are unchanged, B and R
//     are passed back with their IDs, RLAST only on the last beat;
//   * unmapped addresses: DECERR on B and on every R beat, zero data, and no
//     access reaches either slave;
//   * BID/RID always echo the request's ID.
// Some transactions run a write and a read at the same time.
module tb_nnip_axi_interconnect;
  import nnip_pkg::*;

  localparam logic [31:0] LITE = 32'h43C0_0000;
  localparam logic [31:0] FULL = 32'h7AA0_0000;
  localparam logic [1:0]  RESP_SLVERR = 2'b10;
  localparam logic [1:0]  RESP_DECERR = 2'b11;

  logic clk = 1'b0, aresetn = 1'b0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // ---- master side -------------------------------------------------------------------------
  logic [11:0] s_awid = '0, s_arid = '0, s_bid, s_rid;
  logic [31:0] s_awaddr = '0, s_araddr = '0;
  logic [7:0]  s_awlen = '0, s_arlen = '0;
  logic [2:0]  s_awsize = 3'd2, s_arsize = 3'd2;
  logic [1:0]  s_awburst = BURST_INCR, s_arburst = BURST_INCR;
  logic        s_awvalid = 0, s_wvalid = 0, s_wlast = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0, s_rdata;
  logic [3:0]  s_wstrb = '0;
  logic        s_awready, s_wready, s_bvalid, s_arready, s_rvalid, s_rlast;
  logic [1:0]  s_bresp, s_rresp;

  // ---- register side -------------------------------------------------------------------------
  logic [15:0] l_awaddr, l_araddr;
  logic        l_awvalid, l_wvalid, l_bready, l_arvalid, l_rready;
  logic        l_awready = 0, l_wready = 0, l_bvalid = 0, l_arready = 0, l_rvalid = 0;
  logic [31:0] l_wdata, l_rdata = '0;
  logic [3:0]  l_wstrb;
  logic [1:0]  l_bresp = '0, l_rresp = '0;

  // ---- memory side ---------------------------------------------------------------------------
  logic [11:0] f_awid, f_arid, f_bid = '0, f_rid = '0;
  logic [15:0] f_awaddr, f_araddr;
  logic [7:0]  f_awlen, f_arlen;
  logic [2:0]  f_awsize, f_arsize;
  logic [1:0]  f_awburst, f_arburst;
  logic        f_awvalid, f_wlast, f_wvalid, f_bready, f_arvalid, f_rready;
  logic        f_awready = 0, f_wready = 0, f_bvalid = 0, f_arready = 0, f_rvalid = 0, f_rlast = 0;
  logic [31:0] f_wdata, f_rdata = '0;
  logic [3:0]  f_wstrb;
  logic [1:0]  f_bresp = '0, f_rresp = '0;

  nnip_axi_interconnect #(.ID_W(12), .LITE_BASE(LITE), .FULL_BASE(FULL)) dut (
    .aclk(clk), .aresetn(aresetn),
    .s_awid(s_awid), .s_awaddr(s_awaddr), .s_awlen(s_awlen), .s_awsize(s_awsize),
    .s_awburst(s_awburst), .s_awvalid(s_awvalid), .s_awready(s_awready),
    .s_wdata(s_wdata), .s_wstrb(s_wstrb), .s_wlast(s_wlast), .s_wvalid(s_wvalid), .s_wready(s_wready),
    .s_bid(s_bid), .s_bresp(s_bresp), .s_bvalid(s_bvalid), .s_bready(s_bready),
    .s_arid(s_arid), .s_araddr(s_araddr), .s_arlen(s_arlen), .s_arsize(s_arsize),
    .s_arburst(s_arburst), .s_arvalid(s_arvalid), .s_arready(s_arready),
    .s_rid(s_rid), .s_rdata(s_rdata), .s_rresp(s_rresp), .s_rlast(s_rlast), .s_rvalid(s_rvalid),
    .s_rready(s_rready),
    .m0_awaddr(l_awaddr), .m0_awvalid(l_awvalid), .m0_awready(l_awready),
    .m0_wdata(l_wdata), .m0_wstrb(l_wstrb), .m0_wvalid(l_wvalid), .m0_wready(l_wready),
    .m0_bresp(l_bresp), .m0_bvalid(l_bvalid), .m0_bready(l_bready),
    .m0_araddr(l_araddr), .m0_arvalid(l_arvalid), .m0_arready(l_arready),
    .m0_rdata(l_rdata), .m0_rresp(l_rresp), .m0_rvalid(l_rvalid), .m0_rready(l_rready),
    .m1_awid(f_awid), .m1_awaddr(f_awaddr), .m1_awlen(f_awlen), .m1_awsize(f_awsize),
    .m1_awburst(f_awburst), .m1_awvalid(f_awvalid), .m1_awready(f_awready),
    .m1_wdata(f_wdata), .m1_wstrb(f_wstrb), .m1_wlast(f_wlast), .m1_wvalid(f_wvalid),
    .m1_wready(f_wready), .m1_bid(f_bid), .m1_bresp(f_bresp), .m1_bvalid(f_bvalid),
    .m1_bready(f_bready), .m1_arid(f_arid), .m1_araddr(f_araddr), .m1_arlen(f_arlen),
    .m1_arsize(f_arsize), .m1_arburst(f_arburst), .m1_arvalid(f_arvalid), .m1_arready(f_arready),
    .m1_rid(f_rid), .m1_rdata(f_rdata), .m1_rresp(f_rresp), .m1_rlast(f_rlast),
    .m1_rvalid(f_rvalid), .m1_rready(f_rready)
  );

  // All models drive just after the falling edge and sample 1 time unit
  // later; a valid/ready pair seen then completes at the next rising edge.

  // ---- register-slave model ----------------------------------------------------------------
  logic [31:0] lregs [64];
  int unsigned n_lite_w = 0, n_lite_r = 0, n_full_aw = 0, n_full_ar = 0;

  initial begin : lite_write_model
    logic aw_got, w_got; logic [15:0] a; logic [31:0] d; logic [3:0] st;
    forever begin
      aw_got = 0; w_got = 0;
      while (!(aw_got && w_got)) begin
        @(negedge clk);
        l_awready = !aw_got && ($urandom_range(0, 2) == 0);
        l_wready  = !w_got  && ($urandom_range(0, 2) == 0);
        #1;
        if (aresetn && l_awvalid && l_awready) begin aw_got = 1; a = l_awaddr; end
        if (aresetn && l_wvalid && l_wready)   begin w_got = 1; d = l_wdata; st = l_wstrb; end
      end
      @(negedge clk); l_awready = 0; l_wready = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      if (a[7] == 1'b0) begin
        for (int b = 0; b < 4; b++) if (st[b]) lregs[a[7:2]][8*b +: 8] = d[8*b +: 8];
        l_bresp = RESP_OKAY;
      end else l_bresp = RESP_SLVERR;
      n_lite_w++;
      l_bvalid = 1;
      #1; while (!l_bready) begin @(negedge clk); #1; end
      @(negedge clk); l_bvalid = 0;
    end
  end

  initial begin : lite_read_model
    logic [15:0] a;
    forever begin
      @(negedge clk);
      l_arready = ($urandom_range(0, 2) == 0);
      #1;
      if (aresetn && l_arvalid && l_arready) begin
        a = l_araddr;
        @(negedge clk); l_arready = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        l_rdata = lregs[a[7:2]];
        l_rresp = a[7] ? RESP_SLVERR : RESP_OKAY;
        n_lite_r++;
        l_rvalid = 1;
        #1; while (!l_rready) begin @(negedge clk); #1; end
        @(negedge clk); l_rvalid = 0;
      end
    end
  end

  // ---- memory-slave model -----------------------------------------------------------------
  typedef struct { logic [11:0] id; logic [15:0] addr; logic [7:0] len; logic [2:0] size; logic [1:0] burst; } ax_t;
  ax_t         f_aw_log [$];
  ax_t         f_ar_log [$];
  logic [31:0] f_w_data [$];
  logic [3:0]  f_w_strb [$];
  logic        f_w_last [$];

  initial begin : full_write_model
    ax_t t;
    forever begin
      @(negedge clk);
      f_awready = ($urandom_range(0, 1) == 0);
      #1;
      if (aresetn && f_awvalid && f_awready) begin
        t = '{f_awid, f_awaddr, f_awlen, f_awsize, f_awburst};
        f_aw_log.push_back(t);
        n_full_aw++;
        @(negedge clk); f_awready = 0;
        for (int i = 0; i <= int'(t.len); i++) begin
          do begin
            @(negedge clk); f_wready = ($urandom_range(0, 2) != 0); #1;
          end while (!(f_wvalid && f_wready));
          f_w_data.push_back(f_wdata); f_w_strb.push_back(f_wstrb); f_w_last.push_back(f_wlast);
        end
        @(negedge clk); f_wready = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
        f_bid = t.id; f_bresp = RESP_OKAY; f_bvalid = 1;
        #1; while (!f_bready) begin @(negedge clk); #1; end
        @(negedge clk); f_bvalid = 0;
      end
    end
  end

  initial begin : full_read_model
    ax_t t;
    forever begin
      @(negedge clk);
      f_arready = ($urandom_range(0, 1) == 0);
      #1;
      if (aresetn && f_arvalid && f_arready) begin
        t = '{f_arid, f_araddr, f_arlen, f_arsize, f_arburst};
        f_ar_log.push_back(t);
        n_full_ar++;
        @(negedge clk); f_arready = 0;
        for (int i = 0; i <= int'(t.len); i++) begin
          repeat ($urandom_range(0, 1)) @(negedge clk);
          f_rid = t.id; f_rdata = {t.addr, 8'(i), 8'hA5}; f_rresp = RESP_OKAY;
          f_rlast = (i == int'(t.len)); f_rvalid = 1;
          #1; while (!f_rready) begin @(negedge clk); #1; end
          @(negedge clk); f_rvalid = 0; f_rlast = 0;
        end
      end
    end
  end

  // ---- master tasks --------------------------------------------------------------------------
  logic [31:0] ref_regs [64];
  logic [31:0] wbuf [256];
  logic [3:0]  sbuf [256];
  logic [31:0] rbuf [256];
  logic [1:0]  rrsp [256];
  logic        rlst [256];
  int unsigned n_lite_wr = 0, n_lite_rd = 0, n_full_wr = 0, n_full_rd = 0, n_hole = 0;
  int unsigned n_slverr = 0, n_both = 0, n_bt [3] = '{0, 0, 0};

  function automatic logic [15:0] beat_addr(logic [15:0] a, int unsigned i, int unsigned beats,
                                            logic [1:0] burst);
    logic [15:0] wb, base;
    case (burst)
      BURST_FIXED: return a;
      BURST_WRAP: begin
        wb = 16'(beats * 4);
        base = a & ~(wb - 16'd1);
        return base + 16'(((a - base) + 16'(i * 4)) % wb);
      end
      default: return a + 16'(i * 4);
    endcase
  endfunction

  task automatic m_write(input logic [31:0] addr, input int unsigned beats, input logic [1:0] burst,
                         input logic [2:0] size, output logic [1:0] resp);
    logic [11:0] id;
    id = 12'($urandom);
    @(negedge clk);
    s_awaddr = addr; s_awlen = 8'(beats - 1); s_awburst = burst; s_awsize = size;
    s_awid = id; s_awvalid = 1;
    #1; while (!s_awready) begin @(negedge clk); #1; end
    @(negedge clk); s_awvalid = 0;
    for (int i = 0; i < beats; i++) begin
      repeat ($urandom_range(0, 1)) @(negedge clk);
      s_wdata = wbuf[i]; s_wstrb = sbuf[i]; s_wlast = (i == beats - 1); s_wvalid = 1;
      #1; while (!s_wready) begin @(negedge clk); #1; end
      @(negedge clk); s_wvalid = 0; s_wlast = 0;
    end
    repeat ($urandom_range(0, 2)) @(negedge clk);
    s_bready = 1;
    #1; while (!s_bvalid) begin @(negedge clk); #1; end
    resp = s_bresp;
    check(s_bid == id, $sformatf("BID %h echoes AWID %h", s_bid, id));
    @(negedge clk); s_bready = 0;
  endtask

  task automatic m_read(input logic [31:0] addr, input int unsigned beats, input logic [1:0] burst,
                        input logic [2:0] size);
    logic [11:0] id;
    id = 12'($urandom);
    @(negedge clk);
    s_araddr = addr; s_arlen = 8'(beats - 1); s_arburst = burst; s_arsize = size;
    s_arid = id; s_arvalid = 1;
    #1; while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk); s_arvalid = 0;
    for (int i = 0; i < beats; i++) begin
      s_rready = ($urandom_range(0, 2) != 0);
      #1; while (!(s_rvalid && s_rready)) begin
        @(negedge clk); s_rready = ($urandom_range(0, 2) != 0); #1;
      end
      rbuf[i] = s_rdata; rrsp[i] = s_rresp; rlst[i] = s_rlast;
      check(s_rid == id, $sformatf("RID %h echoes ARID %h", s_rid, id));
      @(negedge clk); s_rready = 0;
    end
  endtask

  // ---- checked transactions -------------------------------------------------------------------
  task automatic lite_write_check(input logic [15:0] a, input int unsigned beats, input logic [1:0] burst);
    logic [1:0] resp, exp_resp;
    exp_resp = RESP_OKAY;
    for (int i = 0; i < beats; i++) begin
      logic [15:0] ba;
      wbuf[i] = $urandom; sbuf[i] = 4'($urandom_range(1, 15));
      ba = beat_addr(a, i, beats, burst);
      if (ba[7] == 1'b0) begin
        for (int b = 0; b < 4; b++) if (sbuf[i][b]) ref_regs[ba[7:2]][8*b +: 8] = wbuf[i][8*b +: 8];
      end else exp_resp = RESP_SLVERR;
    end
    m_write(LITE + 32'(a), beats, burst, 3'd2, resp);
    check(resp == exp_resp, $sformatf("register write burst response %0d exp %0d", resp, exp_resp));
    if (exp_resp == RESP_SLVERR) n_slverr++;
    for (int r = 0; r < 64; r++) check(lregs[r] == ref_regs[r], $sformatf("register %0d after write", r));
    n_lite_wr++;
  endtask

  task automatic lite_read_check(input logic [15:0] a, input int unsigned beats, input logic [1:0] burst);
    m_read(LITE + 32'(a), beats, burst, 3'd2);
    for (int i = 0; i < beats; i++) begin
      logic [15:0] ba;
      ba = beat_addr(a, i, beats, burst);
      check(rbuf[i] == ref_regs[ba[7:2]], $sformatf("register read beat %0d at %h", i, ba));
      check(rrsp[i] == (ba[7] ? RESP_SLVERR : RESP_OKAY), "register read beat response");
      check(rlst[i] == (i == beats - 1), "RLAST on register read");
    end
    n_lite_rd++;
  endtask

  task automatic full_write_check(input logic [15:0] a, input int unsigned beats, input logic [1:0] burst,
                                  input logic [2:0] size);
    logic [1:0] resp;
    ax_t t;
    for (int i = 0; i < beats; i++) begin wbuf[i] = $urandom; sbuf[i] = 4'($urandom); end
    f_w_data.delete(); f_w_strb.delete(); f_w_last.delete();
    m_write(FULL + 32'(a), beats, burst, size, resp);
    check(resp == RESP_OKAY, "memory write response passed back");
    check(f_aw_log.size() == 1, "one address forwarded to the memory");
    if (f_aw_log.size() == 1) begin
      t = f_aw_log.pop_front();
      check(t.addr == a && t.len == 8'(beats - 1) && t.size == size && t.burst == burst,
            "forwarded write address fields");
    end
    check(f_w_data.size() == beats, "all W beats forwarded");
    if (f_w_data.size() == beats)
      for (int i = 0; i < beats; i++)
        check(f_w_data[i] == wbuf[i] && f_w_strb[i] == sbuf[i] && f_w_last[i] == (i == beats - 1),
              $sformatf("forwarded W beat %0d", i));
    n_full_wr++;
  endtask

  task automatic full_read_check(input logic [15:0] a, input int unsigned beats, input logic [1:0] burst,
                                 input logic [2:0] size);
    ax_t t;
    m_read(FULL + 32'(a), beats, burst, size);
    check(f_ar_log.size() == 1, "one read address forwarded to the memory");
    if (f_ar_log.size() == 1) begin
      t = f_ar_log.pop_front();
      check(t.addr == a && t.len == 8'(beats - 1) && t.size == size && t.burst == burst,
            "forwarded read address fields");
    end
    for (int i = 0; i < beats; i++) begin
      check(rbuf[i] == {a, 8'(i), 8'hA5} && rrsp[i] == RESP_OKAY, $sformatf("memory read beat %0d", i));
      check(rlst[i] == (i == beats - 1), "RLAST on memory read");
    end
    n_full_rd++;
  endtask

  task automatic hole_check(input logic [31:0] a, input int unsigned beats);
    logic [1:0] resp;
    int unsigned lw, lr, fw, fr;
    lw = n_lite_w; lr = n_lite_r; fw = n_full_aw; fr = n_full_ar;
    for (int i = 0; i < beats; i++) begin wbuf[i] = $urandom; sbuf[i] = 4'hF; end
    m_write(a, beats, BURST_INCR, 3'd2, resp);
    check(resp == RESP_DECERR, "unmapped write answers DECERR");
    m_read(a, beats, BURST_INCR, 3'd2);
    for (int i = 0; i < beats; i++)
      check(rrsp[i] == RESP_DECERR && rbuf[i] == '0 && rlst[i] == (i == beats - 1),
            "unmapped read beat DECERR, zero, RLAST");
    check(n_lite_w == lw && n_lite_r == lr && n_full_aw == fw && n_full_ar == fr,
          "unmapped access reaches no slave");
    n_hole++;
  endtask

  // ---- stimulus -------------------------------------------------------------------------------
  initial begin
    for (int r = 0; r < 64; r++) begin lregs[r] = '0; ref_regs[r] = '0; end
    repeat (4) @(negedge clk);
    aresetn = 1;
    repeat (2) @(negedge clk);
    // bursts whose beats get different responses: SLVERR before OKAY
    // (INCR from word 62 wraps the 8-bit register index to 0), and OKAY
    // before SLVERR; the single B must carry SLVERR either way
    lite_write_check(16'd248, 4, BURST_INCR);
    lite_write_check(16'd120, 4, BURST_INCR);
    lite_read_check(16'd248, 4, BURST_INCR);
    for (int n = 0; n < 300; n++) begin
      int unsigned kind, beats;
      logic [1:0] bt; logic [2:0] sz; logic [15:0] a;
      kind = $urandom_range(0, 9);
      bt = 2'($urandom_range(0, 2));
      n_bt[bt]++;
      if (kind < 5) begin
        beats = (bt == BURST_WRAP) ? (2 << $urandom_range(0, 2)) : $urandom_range(1, 8);
        a = 16'($urandom_range(0, 63) * 4);
        if (kind < 3) lite_write_check(a, beats, bt);
        else          lite_read_check(a, beats, bt);
      end else if (kind < 9) begin
        beats = (bt == BURST_WRAP) ? (2 << $urandom_range(0, 3)) : $urandom_range(1, 16);
        sz = 3'($urandom_range(0, 2));
        a = 16'($urandom) & ~16'((1 << sz) - 1);
        if (kind < 7) full_write_check(a, beats, bt, sz);
        else          full_read_check(a, beats, bt, sz);
      end else begin
        hole_check((n % 2 == 0) ? 32'h43C1_0000 + 32'($urandom_range(0, 255) * 4)
                                : 32'h0000_1000, $urandom_range(1, 4));
      end
    end
    // a write to the memory and a read from the registers at the same time
    for (int k = 0; k < 5; k++) begin
      fork
        full_write_check(16'(k * 64), 4, BURST_INCR, 3'd2);
        lite_read_check(16'(k * 4), 2, BURST_INCR);
      join
      n_both++;
    end
    check(n_lite_wr > 0 && n_lite_rd > 0 && n_full_wr > 0 && n_full_rd > 0 && n_hole > 0 &&
          n_slverr > 0 && n_both > 0 && n_bt[0] > 0 && n_bt[1] > 0 && n_bt[2] > 0,
          "all transaction kinds happened");
    $display("kinds: lite_wr=%0d lite_rd=%0d full_wr=%0d full_rd=%0d unmapped=%0d slverr_bursts=%0d together=%0d",
             n_lite_wr, n_lite_rd, n_full_wr, n_full_rd, n_hole, n_slverr, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
