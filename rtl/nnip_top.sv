// nnip_top: the Neuron Network IP-core (NNIP), an AXI wrapper around a
// hardware inferior-olive neuron network simulator.
//
// The neuron network application (NNA) computes, every 50 us, the next
// state of 25 simulated neurons and streams out their axon and dendrite
// voltages. The NNIP lets an ARM host drive it over two AXI slave ports:
//   * s00_axi_lite (64 KB window, 0x43C0_0000 in the reference system):
//     nnip_axi_lite_slave. Its read/write registers drive every NNA input
//     except clock, reset and s_start; its read-only registers return the
//     NNA control outputs and three rising-edge counters (nnip_edge_counter
//     on cluster_rdy, s_start and cluster_out_new).
//   * s01_axi_full (64 KB window, 0x7AA0_0000): nnip_axi_full_slave, which
//     holds the output memory the NNA writes its voltages into, the 50 us
//     start generator that drives s_start, and the init-lock flag.
// The NNA itself is outside this module: its ports (nna_*) are brought out
// and connect one to one to the application's ports of the same name.
//
// Host flow: after reset, write the init registers and toggle init_str;
// wait until init_ack equals init_str; repeat for init types 0..3 and end
// with type 4. The start generator then issues s_start whenever cluster_rdy
// is high and 50 us have passed since the last start, and each step leaves
// 25 axon voltages at byte offsets 0..96 and 25 dendrite voltages at
// 400..496 of the AXI-Full window.
//
// Both AXI ports and the NNA run on the one clock aclk and the one
// active-low reset aresetn; the NNA gets the active-high nna_reset. This
// follows the reference block design, which feeds both ports from the same
// fabric clock and reset. Register numbering and field widths are in
// nnip_pkg.
module nnip_top
  import nnip_pkg::*;
#(
  parameter int unsigned ID_W          = 1,
  parameter int unsigned PERIOD_CYCLES = 5000  // 50 us at 100 MHz
) (
  input  logic                   aclk,
  input  logic                   aresetn,
  // ---- AXI4-Lite slave (registers) ----
  input  logic [15:0]            s00_axi_lite_awaddr,
  input  logic                   s00_axi_lite_awvalid,
  output logic                   s00_axi_lite_awready,
  input  logic [31:0]            s00_axi_lite_wdata,
  input  logic [3:0]             s00_axi_lite_wstrb,
  input  logic                   s00_axi_lite_wvalid,
  output logic                   s00_axi_lite_wready,
  output logic [1:0]             s00_axi_lite_bresp,
  output logic                   s00_axi_lite_bvalid,
  input  logic                   s00_axi_lite_bready,
  input  logic [15:0]            s00_axi_lite_araddr,
  input  logic                   s00_axi_lite_arvalid,
  output logic                   s00_axi_lite_arready,
  output logic [31:0]            s00_axi_lite_rdata,
  output logic [1:0]             s00_axi_lite_rresp,
  output logic                   s00_axi_lite_rvalid,
  input  logic                   s00_axi_lite_rready,
  // ---- AXI4-Full slave (output memory) ----
  input  logic [ID_W-1:0]        s01_axi_full_awid,
  input  logic [15:0]            s01_axi_full_awaddr,
  input  logic [7:0]             s01_axi_full_awlen,
  input  logic [2:0]             s01_axi_full_awsize,
  input  logic [1:0]             s01_axi_full_awburst,
  input  logic                   s01_axi_full_awvalid,
  output logic                   s01_axi_full_awready,
  input  logic [31:0]            s01_axi_full_wdata,
  input  logic [3:0]             s01_axi_full_wstrb,
  input  logic                   s01_axi_full_wlast,
  input  logic                   s01_axi_full_wvalid,
  output logic                   s01_axi_full_wready,
  output logic [ID_W-1:0]        s01_axi_full_bid,
  output logic [1:0]             s01_axi_full_bresp,
  output logic                   s01_axi_full_bvalid,
  input  logic                   s01_axi_full_bready,
  input  logic [ID_W-1:0]        s01_axi_full_arid,
  input  logic [15:0]            s01_axi_full_araddr,
  input  logic [7:0]             s01_axi_full_arlen,
  input  logic [2:0]             s01_axi_full_arsize,
  input  logic [1:0]             s01_axi_full_arburst,
  input  logic                   s01_axi_full_arvalid,
  output logic                   s01_axi_full_arready,
  output logic [ID_W-1:0]        s01_axi_full_rid,
  output logic [31:0]            s01_axi_full_rdata,
  output logic [1:0]             s01_axi_full_rresp,
  output logic                   s01_axi_full_rlast,
  output logic                   s01_axi_full_rvalid,
  input  logic                   s01_axi_full_rready,
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

  nna_ctrl_t   ctrl;
  nna_status_t status;
  logic [31:0] num_rdy, num_start, num_out_new;

  assign nna_reset = !aresetn;

  // ---- NNA input wiring -------------------------------------------------------------------
  assign nna_cluster_init_type = ctrl.init_type;
  assign nna_cluster_init_clus = ctrl.init_clus;
  assign nna_cluster_init_adr  = ctrl.init_adr;
  assign nna_cluster_init_adr2 = ctrl.init_adr2;
  assign nna_cluster_init_data = ctrl.init_data;
  assign nna_cluster_init_str  = ctrl.init_str;
  assign nna_cluster_in_adr    = ctrl.in_adr;
  assign nna_cluster_in_type   = ctrl.in_type;
  assign nna_cluster_in_data   = ctrl.in_data;
  assign nna_cluster_in_str    = ctrl.in_str;

  always_comb begin
    status.init_ack    = nna_cluster_init_ack;
    status.in_ack      = nna_cluster_in_ack;
    status.out_type    = nna_cluster_out_type;
    status.out_adr     = nna_cluster_out_adr;
    status.out_new     = nna_cluster_out_new;
    status.cluster_rdy = nna_cluster_rdy;
    status.s_start     = nna_s_start;
  end

  // ---- AXI-Lite register slave --------------------------------------------------------------
  nnip_axi_lite_slave #(
    .ADDR_W    (16),
    .REG_IDX_W (6)
  ) u_lite (
    .aclk            (aclk),
    .aresetn         (aresetn),
    .s_axi_awaddr    (s00_axi_lite_awaddr),
    .s_axi_awvalid   (s00_axi_lite_awvalid),
    .s_axi_awready   (s00_axi_lite_awready),
    .s_axi_wdata     (s00_axi_lite_wdata),
    .s_axi_wstrb     (s00_axi_lite_wstrb),
    .s_axi_wvalid    (s00_axi_lite_wvalid),
    .s_axi_wready    (s00_axi_lite_wready),
    .s_axi_bresp     (s00_axi_lite_bresp),
    .s_axi_bvalid    (s00_axi_lite_bvalid),
    .s_axi_bready    (s00_axi_lite_bready),
    .s_axi_araddr    (s00_axi_lite_araddr),
    .s_axi_arvalid   (s00_axi_lite_arvalid),
    .s_axi_arready   (s00_axi_lite_arready),
    .s_axi_rdata     (s00_axi_lite_rdata),
    .s_axi_rresp     (s00_axi_lite_rresp),
    .s_axi_rvalid    (s00_axi_lite_rvalid),
    .s_axi_rready    (s00_axi_lite_rready),
    .nna_ctrl        (ctrl),
    .nna_status      (status),
    .num_cluster_rdy (num_rdy),
    .num_s_start     (num_start),
    .num_out_new     (num_out_new)
  );

  // ---- activity counters ----------------------------------------------------------------------
  nnip_edge_counter #(.WIDTH(32)) u_cnt_rdy (
    .clk(aclk), .rst_n(aresetn), .sig(nna_cluster_rdy), .count(num_rdy));
  nnip_edge_counter #(.WIDTH(32)) u_cnt_start (
    .clk(aclk), .rst_n(aresetn), .sig(nna_s_start), .count(num_start));
  nnip_edge_counter #(.WIDTH(32)) u_cnt_new (
    .clk(aclk), .rst_n(aresetn), .sig(nna_cluster_out_new), .count(num_out_new));

  // ---- AXI-Full slave: output memory and start generator ----------------------------------
  nnip_axi_full_slave #(
    .ID_W          (ID_W),
    .ADDR_W        (16),
    .PERIOD_CYCLES (PERIOD_CYCLES),
    .AXON_BASE     (0),
    .DEND_BASE     (100)
  ) u_full (
    .aclk            (aclk),
    .aresetn         (aresetn),
    .s_axi_awid      (s01_axi_full_awid),
    .s_axi_awaddr    (s01_axi_full_awaddr),
    .s_axi_awlen     (s01_axi_full_awlen),
    .s_axi_awsize    (s01_axi_full_awsize),
    .s_axi_awburst   (s01_axi_full_awburst),
    .s_axi_awvalid   (s01_axi_full_awvalid),
    .s_axi_awready   (s01_axi_full_awready),
    .s_axi_wdata     (s01_axi_full_wdata),
    .s_axi_wstrb     (s01_axi_full_wstrb),
    .s_axi_wlast     (s01_axi_full_wlast),
    .s_axi_wvalid    (s01_axi_full_wvalid),
    .s_axi_wready    (s01_axi_full_wready),
    .s_axi_bid       (s01_axi_full_bid),
    .s_axi_bresp     (s01_axi_full_bresp),
    .s_axi_bvalid    (s01_axi_full_bvalid),
    .s_axi_bready    (s01_axi_full_bready),
    .s_axi_arid      (s01_axi_full_arid),
    .s_axi_araddr    (s01_axi_full_araddr),
    .s_axi_arlen     (s01_axi_full_arlen),
    .s_axi_arsize    (s01_axi_full_arsize),
    .s_axi_arburst   (s01_axi_full_arburst),
    .s_axi_arvalid   (s01_axi_full_arvalid),
    .s_axi_arready   (s01_axi_full_arready),
    .s_axi_rid       (s01_axi_full_rid),
    .s_axi_rdata     (s01_axi_full_rdata),
    .s_axi_rresp     (s01_axi_full_rresp),
    .s_axi_rlast     (s01_axi_full_rlast),
    .s_axi_rvalid    (s01_axi_full_rvalid),
    .s_axi_rready    (s01_axi_full_rready),
    .nna_cluster_rdy (nna_cluster_rdy),
    .nna_s_start     (nna_s_start),
    .nna_init_type   (nna_cluster_init_type),
    .nna_init_ack    (nna_cluster_init_ack),
    .nna_out_new     (nna_cluster_out_new),
    .nna_out_type    (nna_cluster_out_type),
    .nna_out_adr     (nna_cluster_out_adr),
    .nna_out_data    (nna_cluster_out_data),
    .init_locked     (init_locked)
  );

endmodule
