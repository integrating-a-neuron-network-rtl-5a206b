// tb_nnip_axi_lite_slave: checks the AXI4-Lite register file.
//
// The testbench acts as an AXI4-Lite master and keeps a model of the ten
// read/write registers. It checks
//   * reset values (all zero) and read-back of random writes, with random
//     byte strobes, to every read/write register;
//   * that each register drives its field of nna_ctrl;
//   * write address arriving before write data and the other way round;
//   * read-only registers: they return the sampled status fields and the
//     three counter inputs, and writes to them are ignored;
//   * unused indices read as zero;
//   * the one-clock write and read response latency after the handshake;
//   * a master that holds BREADY/RREADY low for a while.
module tb_nnip_axi_lite_slave;
  import nnip_pkg::*;
  logic clk = 0, aresetn = 0;
  logic [15:0] awaddr = 0, araddr = 0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0;
  logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [1:0] bresp, rresp;
  logic [31:0] rdata;
  nna_ctrl_t ctrl;
  nna_status_t status = '0;
  logic [31:0] c0 = 0, c1 = 0, c2 = 0;
  logic [31:0] model [NUM_RW_REGS];
  int checks = 0, failures = 0;
  int unsigned cyc = 0, n_aw_first = 0, n_w_first = 0, n_slow_ready = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nnip_axi_lite_slave dut (
    .aclk(clk), .aresetn, .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .nna_ctrl(ctrl), .nna_status(status),
    .num_cluster_rdy(c0), .num_s_start(c1), .num_out_new(c2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // mode 0: together, 1: address first, 2: data first; slow: hold bready low
  task automatic write(input int unsigned idx, input logic [31:0] d, input logic [3:0] s,
                       input int mode = 0, input bit slow = 0);
    int unsigned t_hs;
    @(negedge clk);
    awaddr = 16'(idx * 4); wdata = d; wstrb = s;
    if (mode != 2) awvalid = 1;
    if (mode != 1) wvalid = 1;
    if (mode != 0) begin
      repeat (3) begin
        @(negedge clk);
        check(!awready && !wready, "no handshake with one channel only");
      end
      awvalid = 1; wvalid = 1;
      if (mode == 1) n_aw_first++; else n_w_first++;
    end
    bready = !slow;
    do @(negedge clk); while (!(awready && wready));
    t_hs = cyc;
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    check(bvalid && cyc == t_hs + 1, "BVALID one clock after the handshake");
    if (slow) begin
      repeat (4) begin @(negedge clk); check(bvalid, "BVALID held until BREADY"); end
      bready = 1; n_slow_ready++;
    end
    while (!bvalid) @(negedge clk);
    check(bresp == RESP_OKAY, "BRESP OKAY");
    @(negedge clk);
    bready = 0;
    check(!bvalid, "BVALID drops after BREADY");
    if (idx < NUM_RW_REGS)
      for (int b = 0; b < 4; b++) if (s[b]) model[idx][8*b +: 8] = d[8*b +: 8];
  endtask

  task automatic read(input int unsigned idx, output logic [31:0] d, input bit slow = 0);
    logic [31:0] first;
    @(negedge clk);
    araddr = 16'(idx * 4); arvalid = 1; rready = !slow;
    do @(negedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    check(rvalid, "RVALID one clock after the address handshake");
    first = rdata;
    if (slow) begin
      repeat (4) begin
        @(negedge clk);
        check(rvalid && rdata == first, "RVALID and RDATA held until RREADY");
      end
      rready = 1; n_slow_ready++;
    end
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == RESP_OKAY, "RRESP OKAY");
    @(negedge clk);
    rready = 0;
  endtask

  function automatic logic [31:0] ctrl_field(int unsigned idx);
    case (idx)
      REG_INIT_TYPE: return 32'(ctrl.init_type);
      REG_INIT_CLUS: return 32'(ctrl.init_clus);
      REG_INIT_ADR:  return 32'(ctrl.init_adr);
      REG_INIT_ADR2: return 32'(ctrl.init_adr2);
      REG_INIT_DATA: return ctrl.init_data;
      REG_INIT_STR:  return 32'(ctrl.init_str);
      REG_IN_TYPE:   return 32'(ctrl.in_type);
      REG_IN_ADR:    return 32'(ctrl.in_adr);
      REG_IN_DATA:   return ctrl.in_data;
      default:       return 32'(ctrl.in_str);
    endcase
  endfunction

  function automatic logic [31:0] field_mask(int unsigned idx);
    case (idx)
      REG_INIT_TYPE: return 32'h7;
      REG_INIT_STR, REG_IN_STR: return 32'h1;
      REG_IN_TYPE: return 32'h3;
      REG_INIT_DATA, REG_IN_DATA: return 32'hFFFF_FFFF;
      default: return 32'hFF;
    endcase
  endfunction

  initial begin
    logic [31:0] v;
    for (int i = 0; i < NUM_RW_REGS; i++) model[i] = 0;
    repeat (3) @(negedge clk);
    aresetn = 1;
    for (int i = 0; i < NUM_RW_REGS; i++) begin
      read(i, v);
      check(v == 0, $sformatf("reg %0d reset value", i));
    end
    for (int n = 0; n < 200; n++) begin
      int unsigned idx;
      logic [3:0] s;
      idx = $urandom_range(0, NUM_RW_REGS - 1);
      s = (n % 3 == 0) ? 4'hF : 4'($urandom_range(1, 15));
      write(idx, $urandom, s, n % 3, (n % 17) == 5);
      read(idx, v, (n % 19) == 7);
      check(v == model[idx], $sformatf("reg %0d = %h exp %h", idx, v, model[idx]));
      check(ctrl_field(idx) == (model[idx] & field_mask(idx)), $sformatf("nna_ctrl field of reg %0d", idx));
    end
    // read-only registers
    status = '{init_ack: 1'b1, in_ack: 1'b0, out_type: 2'b01, out_adr: 8'h18,
               out_new: 1'b1, cluster_rdy: 1'b1, s_start: 1'b0};
    c0 = 32'd2; c1 = 32'd2; c2 = 32'h32;
    read(REG_INIT_ACK, v);    check(v == 1, "init_ack register");
    read(REG_IN_ACK, v);      check(v == 0, "in_ack register");
    read(REG_OUT_TYPE, v);    check(v == 1, "out_type register");
    read(REG_OUT_ADR, v);     check(v == 32'h18, "out_adr register");
    read(REG_OUT_NEW, v);     check(v == 1, "out_new register");
    read(REG_CLUSTER_RDY, v); check(v == 1, "cluster_rdy register");
    read(REG_S_START, v);     check(v == 0, "s_start register");
    read(REG_NUM_RDY, v);     check(v == 2, "cluster_rdy counter register");
    read(REG_NUM_START, v);   check(v == 2, "s_start counter register");
    read(REG_NUM_OUTNEW, v);  check(v == 32'h32, "out_new counter register");
    write(REG_OUT_ADR, 32'hFFFF_FFFF, 4'hF);
    read(REG_OUT_ADR, v);     check(v == 32'h18, "read-only register ignores writes");
    write(40, 32'h1234_5678, 4'hF);
    read(40, v);              check(v == 0, "unused index reads zero");
    check(n_aw_first > 0 && n_w_first > 0 && n_slow_ready > 0, "all channel orders exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
