// nnip_system: the programmable-logic side of the reference system: the
// NNIP behind the AXI interconnect that connects it to the processor.
//
// The host processor has one general-purpose AXI master port with 32-bit
// addresses. nnip_axi_interconnect routes it by address to the NNIP's two
// slave ports, so that the host sees
//   * the register file at 0x43C0_0000 .. 0x43C0_FFFF (AXI4-Lite), and
//   * the output memory at 0x7AA0_0000 .. 0x7AA0_FFFF (AXI4-Full);
// any other address in the port's range answers DECERR. The neuron network
// application connects to the nna_* ports exactly as on nnip_top.
//
// Interface: s_axi_* is the processor side (AXI4, 32-bit address and data,
// ID_W-bit IDs, bursts up to 256 beats); nna_* and init_locked are as on
// nnip_top. Timing: one clock aclk and one active-low synchronous reset
// aresetn for everything; the interconnect adds one clock to each
// address, plus one clock per beat on register bursts.
//
// The two windows and their base addresses, the single clock and reset, and
// the master-interconnect-slave arrangement follow the reference block
// design. The interconnect is this design's own minimal one (see its file);
// the processor system and its reset block are outside this module. The
// 12-bit default ID width is that of the Zynq-7000 general-purpose ports
// and is an assumption here.
module nnip_system
  import nnip_pkg::*;
#(
  parameter int unsigned ID_W          = 12,
  parameter int unsigned PERIOD_CYCLES = 5000  // 50 us at 100 MHz
) (
  input  logic                   aclk,
  input  logic                   aresetn,
  // ---- processor AXI master port ----
  input  logic [ID_W-1:0]        s_axi_awid,
  input  logic [31:0]            s_axi_awaddr,
  input  logic [7:0]             s_axi_awlen,
  input  logic [2:0]             s_axi_awsize,
  input  logic [1:0]             s_axi_awburst,
  input  logic                   s_axi_awvalid,
  output logic                   s_axi_awready,
  input  logic [31:0]            s_axi_wdata,
  input  logic [3:0]             s_axi_wstrb,
  input  logic                   s_axi_wlast,
  input  logic                   s_axi_wvalid,
  output logic                   s_axi_wready,
  output logic [ID_W-1:0]        s_axi_bid,
  output logic [1:0]             s_axi_bresp,
  output logic                   s_axi_bvalid,
  input  logic                   s_axi_bready,
  input  logic [ID_W-1:0]        s_axi_arid,
  input  logic [31:0]            s_axi_araddr,
  input  logic [7:0]             s_axi_arlen,
  input  logic [2:0]             s_axi_arsize,
  input  logic [1:0]             s_axi_arburst,
  input  logic                   s_axi_arvalid,
  output logic                   s_axi_arready,
  output logic [ID_W-1:0]        s_axi_rid,
  output logic [31:0]            s_axi_rdata,
  output logic [1:0]             s_axi_rresp,
  output logic                   s_axi_rlast,
  output logic                   s_axi_rvalid,
  input  logic                   s_axi_rready,
  // ---- neuron network application ports ----
  output logic                   nna_reset,
  output logic                   nna_s_start,
  input  logic                   nna_cluster_rdy,
  output logic [INIT_TYPE_W-1:0] nna_cluster_init_type,
  output logic [CLUS_W-1:0]      nna_cluster_init_clus,
  output logic [ADR_W-1:0]       nna_cluster_init_adr,
  output logic [ADR2_W-1:0]      nna_cluster_init_adr2,
  output logic [DATA_W-1:0]      nna_cluster_init_data,
  output logic                   nna_cluster_init_str,
  input  logic                   nna_cluster_init_ack,
  output logic [ADR_W-1:0]       nna_cluster_in_adr,
  output logic [IN_TYPE_W-1:0]   nna_cluster_in_type,
  output logic [DATA_W-1:0]      nna_cluster_in_data,
  output logic                   nna_cluster_in_str,
  input  logic                   nna_cluster_in_ack,
  input  logic [ADR_W-1:0]       nna_cluster_out_adr,
  input  logic [OUT_TYPE_W-1:0]  nna_cluster_out_type,
  input  logic [DATA_W-1:0]      nna_cluster_out_data,
  input  logic                   nna_cluster_out_new,
  // ---- status ----
  output logic                   init_locked
);

  // register port wires (interconnect master 0 -> NNIP AXI4-Lite slave)
  logic [15:0] l_awaddr, l_araddr;
  logic        l_awvalid, l_awready, l_wvalid, l_wready, l_bvalid, l_bready;
  logic        l_arvalid, l_arready, l_rvalid, l_rready;
  logic [31:0] l_wdata, l_rdata;
  logic [3:0]  l_wstrb;
  logic [1:0]  l_bresp, l_rresp;
  // memory port wires (interconnect master 1 -> NNIP AXI4-Full slave)
  logic [ID_W-1:0] f_awid, f_bid, f_arid, f_rid;
  logic [15:0]     f_awaddr, f_araddr;
  logic [7:0]      f_awlen, f_arlen;
  logic [2:0]      f_awsize, f_arsize;
  logic [1:0]      f_awburst, f_arburst, f_bresp, f_rresp;
  logic            f_awvalid, f_awready, f_wlast, f_wvalid, f_wready, f_bvalid, f_bready;
  logic            f_arvalid, f_arready, f_rlast, f_rvalid, f_rready;
  logic [31:0]     f_wdata, f_rdata;
  logic [3:0]      f_wstrb;

  nnip_axi_interconnect #(
    .ID_W      (ID_W),
    .LITE_BASE (32'h43C0_0000),
    .FULL_BASE (32'h7AA0_0000)
  ) u_ic (
    .aclk(aclk), .aresetn(aresetn),
    .s_awid(s_axi_awid), .s_awaddr(s_axi_awaddr), .s_awlen(s_axi_awlen), .s_awsize(s_axi_awsize),
    .s_awburst(s_axi_awburst), .s_awvalid(s_axi_awvalid), .s_awready(s_axi_awready),
    .s_wdata(s_axi_wdata), .s_wstrb(s_axi_wstrb), .s_wlast(s_axi_wlast), .s_wvalid(s_axi_wvalid),
    .s_wready(s_axi_wready), .s_bid(s_axi_bid), .s_bresp(s_axi_bresp), .s_bvalid(s_axi_bvalid),
    .s_bready(s_axi_bready), .s_arid(s_axi_arid), .s_araddr(s_axi_araddr), .s_arlen(s_axi_arlen),
    .s_arsize(s_axi_arsize), .s_arburst(s_axi_arburst), .s_arvalid(s_axi_arvalid),
    .s_arready(s_axi_arready), .s_rid(s_axi_rid), .s_rdata(s_axi_rdata), .s_rresp(s_axi_rresp),
    .s_rlast(s_axi_rlast), .s_rvalid(s_axi_rvalid), .s_rready(s_axi_rready),
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

  nnip_top #(
    .ID_W          (ID_W),
    .PERIOD_CYCLES (PERIOD_CYCLES)
  ) u_nnip (
    .aclk(aclk), .aresetn(aresetn),
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
    .nna_reset(nna_reset), .nna_s_start(nna_s_start), .nna_cluster_rdy(nna_cluster_rdy),
    .nna_cluster_init_type(nna_cluster_init_type), .nna_cluster_init_clus(nna_cluster_init_clus),
    .nna_cluster_init_adr(nna_cluster_init_adr), .nna_cluster_init_adr2(nna_cluster_init_adr2),
    .nna_cluster_init_data(nna_cluster_init_data), .nna_cluster_init_str(nna_cluster_init_str),
    .nna_cluster_init_ack(nna_cluster_init_ack), .nna_cluster_in_adr(nna_cluster_in_adr),
    .nna_cluster_in_type(nna_cluster_in_type), .nna_cluster_in_data(nna_cluster_in_data),
    .nna_cluster_in_str(nna_cluster_in_str), .nna_cluster_in_ack(nna_cluster_in_ack),
    .nna_cluster_out_adr(nna_cluster_out_adr), .nna_cluster_out_type(nna_cluster_out_type),
    .nna_cluster_out_data(nna_cluster_out_data), .nna_cluster_out_new(nna_cluster_out_new),
    .init_locked(init_locked)
  );

endmodule
