// nnip_axi_lite_slave: AXI4-Lite register file of the NNIP.
//
// The host controls the neuron network application (NNA) entirely through
// these 32-bit registers. Registers 0..9 are read/write and drive the NNA
// init and injected-signal inputs (type, cluster, addresses, data and the
// two strobe bits of the toggle handshake). Registers 16..22 are read-only
// copies of the NNA control outputs (init_ack, in_ack, out_type, out_adr,
// out_new, cluster_rdy, s_start), sampled every clock, and 24..26 hold the
// three rising-edge counters. The map is in nnip_pkg. Reads of unused
// indices return 0; writes to them and to read-only indices are ignored.
//
// Write channel: once AWVALID and WVALID are both high and no write response
// is pending, AWREADY and WREADY go high together for one clock; on that
// handshake clock the byte lanes selected by WSTRB are stored, and BVALID
// rises on the next clock and stays until BREADY. Read channel: ARREADY goes
// high for one clock after ARVALID is seen with no read data pending; on the
// handshake the register is selected, and RDATA/RVALID follow one clock
// later and are held until RREADY. Every
// response is OKAY. All registers clear on ARESETN low (synchronous).
//
// As in the source design: 32-bit registers, byte strobes, synchronous
// active-low reset, write enable = awready & awvalid & wready & wvalid, read
// enable = arready & arvalid & !rvalid, a 6-bit word index (64 registers)
// above two byte-offset bits, and a 64 KB address window. The register
// numbering and the sampling of the outputs are this design's choices.
module nnip_axi_lite_slave
  import nnip_pkg::*;
#(
  parameter int unsigned ADDR_W     = 16,  // 64 KB window
  parameter int unsigned REG_IDX_W  = 6    // 64 registers
) (
  input  logic               aclk,
  input  logic               aresetn,
  // write address
  input  logic [ADDR_W-1:0]  s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  // write data
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  // write response
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  // read address
  input  logic [ADDR_W-1:0]  s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  // read data
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  // NNA side
  output nna_ctrl_t          nna_ctrl,
  input  nna_status_t        nna_status,
  input  logic [31:0]        num_cluster_rdy,
  input  logic [31:0]        num_s_start,
  input  logic [31:0]        num_out_new
);

  localparam int unsigned RW_IDX_W = $clog2(NUM_RW_REGS);

  logic [31:0]            rw_reg [NUM_RW_REGS];
  nna_status_t            status_q;
  logic                   wr_en, rd_en;
  logic [REG_IDX_W-1:0]   wr_idx, rd_idx;
  logic [31:0]            rd_mux;

  // ---- write path ------------------------------------------------------------
  // AWREADY/WREADY rise together one clock after both valids are seen; the
  // store happens on the handshake clock.
  assign wr_en  = s_axi_awready && s_axi_awvalid && s_axi_wready && s_axi_wvalid;
  assign wr_idx = s_axi_awaddr[REG_IDX_W+1:2];

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      s_axi_awready <= 1'b0;
      s_axi_wready  <= 1'b0;
      s_axi_bvalid  <= 1'b0;
      for (int i = 0; i < NUM_RW_REGS; i++) rw_reg[i] <= '0;
    end else begin
      s_axi_awready <= s_axi_awvalid && s_axi_wvalid && !s_axi_awready && !s_axi_bvalid;
      s_axi_wready  <= s_axi_awvalid && s_axi_wvalid && !s_axi_wready && !s_axi_bvalid;
      if (wr_en && 32'(wr_idx) < NUM_RW_REGS) begin
        for (int b = 0; b < 4; b++)
          if (s_axi_wstrb[b]) rw_reg[wr_idx[RW_IDX_W-1:0]][8*b +: 8] <= s_axi_wdata[8*b +: 8];
      end
      if (wr_en)             s_axi_bvalid <= 1'b1;
      else if (s_axi_bready) s_axi_bvalid <= 1'b0;
    end
  end
  assign s_axi_bresp = RESP_OKAY;

  // ---- read path --------------------------------------------------------------
  assign rd_en  = s_axi_arready && s_axi_arvalid && !s_axi_rvalid;
  assign rd_idx = s_axi_araddr[REG_IDX_W+1:2];

  always_comb begin
    rd_mux = '0;
    if (32'(rd_idx) < NUM_RW_REGS) rd_mux = rw_reg[rd_idx[RW_IDX_W-1:0]];
    else begin
      case (32'(rd_idx))
        REG_INIT_ACK:    rd_mux = 32'(status_q.init_ack);
        REG_IN_ACK:      rd_mux = 32'(status_q.in_ack);
        REG_OUT_TYPE:    rd_mux = 32'(status_q.out_type);
        REG_OUT_ADR:     rd_mux = 32'(status_q.out_adr);
        REG_OUT_NEW:     rd_mux = 32'(status_q.out_new);
        REG_CLUSTER_RDY: rd_mux = 32'(status_q.cluster_rdy);
        REG_S_START:     rd_mux = 32'(status_q.s_start);
        REG_NUM_RDY:     rd_mux = num_cluster_rdy;
        REG_NUM_START:   rd_mux = num_s_start;
        REG_NUM_OUTNEW:  rd_mux = num_out_new;
        default:         rd_mux = '0;
      endcase
    end
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      s_axi_arready <= 1'b0;
      s_axi_rvalid  <= 1'b0;
      s_axi_rdata   <= '0;
      status_q      <= '0;
    end else begin
      status_q      <= nna_status;
      s_axi_arready <= s_axi_arvalid && !s_axi_arready && !s_axi_rvalid;
      if (rd_en) begin
        s_axi_rdata  <= rd_mux;
        s_axi_rvalid <= 1'b1;
      end else if (s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end
  assign s_axi_rresp = RESP_OKAY;

  // ---- NNA inputs ---------------------------------------------------------------
  always_comb begin
    nna_ctrl.init_type = rw_reg[REG_INIT_TYPE][INIT_TYPE_W-1:0];
    nna_ctrl.init_clus = rw_reg[REG_INIT_CLUS][CLUS_W-1:0];
    nna_ctrl.init_adr  = rw_reg[REG_INIT_ADR][ADR_W-1:0];
    nna_ctrl.init_adr2 = rw_reg[REG_INIT_ADR2][ADR2_W-1:0];
    nna_ctrl.init_data = rw_reg[REG_INIT_DATA];
    nna_ctrl.init_str  = rw_reg[REG_INIT_STR][0];
    nna_ctrl.in_type   = rw_reg[REG_IN_TYPE][IN_TYPE_W-1:0];
    nna_ctrl.in_adr    = rw_reg[REG_IN_ADR][ADR_W-1:0];
    nna_ctrl.in_data   = rw_reg[REG_IN_DATA];
    nna_ctrl.in_str    = rw_reg[REG_IN_STR][0];
  end

  // ---- protocol rules -------------------------------------------------------------
  a_bvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
