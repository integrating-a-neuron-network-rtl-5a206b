// nnip_axi_full_slave: AXI4-Full slave of the NNIP, with the output memory
// and the 50 us start generator.
//
// This is the half of the IP that sits next to the neuron network
// application (NNA). It holds
//   * nnip_out_memory, which the NNA fills with its axon and dendrite
//     voltages (cluster_out_new / _type / _adr / _data), and which the host
//     reads, and may write, over AXI4 bursts;
//   * nnip_start_gen, which issues s_start to the NNA once per 50 us period
//     when the NNA is ready;
//   * the "init locked" flag that arms the start generator. It is set when
//     the NNA acknowledges an init vector of type 4 (init done), i.e. when
//     cluster_init_ack changes while cluster_init_type is 4, and cleared by
//     reset.
//
// AXI behaviour: one transaction at a time. FIXED, INCR and WRAP bursts of
// 1..256 beats are served; the address advances by 2**AxSIZE bytes per beat.
// A write takes the address (AWREADY high in idle), then one beat per clock
// with WREADY high until WLAST, then BVALID with BRESP OKAY and the AWID.
// A read takes the address (ARREADY high in idle), then for each beat spends
// one clock reading the memory and presents RDATA/RVALID until RREADY, with
// RLAST on the final beat, RRESP OKAY and the ARID; a read burst of N beats
// therefore takes 2N clocks when the master is always ready. When a read and
// a write address arrive together, the kind not served last goes first.
//
// From the source design: an AXI4-Full slave with the five channels in front
// of a 64 KB memory at a 64 KB window, written by the NNA on out_new, and the
// 50 us start generator driven by cluster_rdy. The single-transaction
// engine, the two-clock read beat, the bus write access to the memory and
// the arming flag are this design's choices.
module nnip_axi_full_slave
  import nnip_pkg::*;
#(
  parameter int unsigned ID_W          = 1,
  parameter int unsigned ADDR_W        = 16,   // 64 KB window
  parameter int unsigned PERIOD_CYCLES = 5000, // 50 us at 100 MHz
  parameter int unsigned AXON_BASE     = 0,
  parameter int unsigned DEND_BASE     = 100
) (
  input  logic                   aclk,
  input  logic                   aresetn,
  // write address
  input  logic [ID_W-1:0]        s_axi_awid,
  input  logic [ADDR_W-1:0]      s_axi_awaddr,
  input  logic [7:0]             s_axi_awlen,
  input  logic [2:0]             s_axi_awsize,
  input  logic [1:0]             s_axi_awburst,
  input  logic                   s_axi_awvalid,
  output logic                   s_axi_awready,
  // write data
  input  logic [31:0]            s_axi_wdata,
  input  logic [3:0]             s_axi_wstrb,
  input  logic                   s_axi_wlast,
  input  logic                   s_axi_wvalid,
  output logic                   s_axi_wready,
  // write response
  output logic [ID_W-1:0]        s_axi_bid,
  output logic [1:0]             s_axi_bresp,
  output logic                   s_axi_bvalid,
  input  logic                   s_axi_bready,
  // read address
  input  logic [ID_W-1:0]        s_axi_arid,
  input  logic [ADDR_W-1:0]      s_axi_araddr,
  input  logic [7:0]             s_axi_arlen,
  input  logic [2:0]             s_axi_arsize,
  input  logic [1:0]             s_axi_arburst,
  input  logic                   s_axi_arvalid,
  output logic                   s_axi_arready,
  // read data
  output logic [ID_W-1:0]        s_axi_rid,
  output logic [31:0]            s_axi_rdata,
  output logic [1:0]             s_axi_rresp,
  output logic                   s_axi_rlast,
  output logic                   s_axi_rvalid,
  input  logic                   s_axi_rready,
  // neuron network application
  input  logic                   nna_cluster_rdy,
  output logic                   nna_s_start,
  input  logic [INIT_TYPE_W-1:0] nna_init_type,
  input  logic                   nna_init_ack,
  input  logic                   nna_out_new,
  input  logic [OUT_TYPE_W-1:0]  nna_out_type,
  input  logic [ADR_W-1:0]       nna_out_adr,
  input  logic [DATA_W-1:0]      nna_out_data,
  // status
  output logic                   init_locked
);

  localparam int unsigned WADDR_W = ADDR_W - 2;

  typedef enum logic [2:0] {S_IDLE, S_WDATA, S_WRESP, S_RFETCH, S_RDATA} state_e;

  state_e            state;
  logic [ID_W-1:0]   id_q;
  logic [ADDR_W-1:0] addr_q;
  logic [7:0]        len_q, beat_q;
  logic [2:0]        size_q;
  logic [1:0]        burst_q;
  logic              last_was_wr;
  logic              take_wr, take_rd;
  logic [ADDR_W-1:0] addr_next;

  // ---- burst address arithmetic ------------------------------------------------
  always_comb begin
    logic [ADDR_W-1:0] step, wrap_mask;
    step      = ADDR_W'(1) << size_q;
    wrap_mask = ADDR_W'((32'(len_q) + 1) << size_q) - 1'b1;
    case (burst_q)
      BURST_FIXED: addr_next = addr_q;
      BURST_WRAP:  addr_next = (addr_q & ~wrap_mask) | ((addr_q + step) & wrap_mask);
      default:     addr_next = addr_q + step;
    endcase
  end

  // ---- transaction engine -----------------------------------------------------------
  assign take_wr = (state == S_IDLE) && s_axi_awvalid && (!s_axi_arvalid || !last_was_wr);
  assign take_rd = (state == S_IDLE) && s_axi_arvalid && !take_wr;

  assign s_axi_awready = take_wr;
  assign s_axi_arready = take_rd;
  assign s_axi_wready  = (state == S_WDATA);
  assign s_axi_bvalid  = (state == S_WRESP);
  assign s_axi_bid     = id_q;
  assign s_axi_bresp   = RESP_OKAY;
  assign s_axi_rvalid  = (state == S_RDATA);
  assign s_axi_rid     = id_q;
  assign s_axi_rresp   = RESP_OKAY;
  assign s_axi_rlast   = (state == S_RDATA) && (beat_q == len_q);

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      state       <= S_IDLE;
      id_q        <= '0;
      addr_q      <= '0;
      len_q       <= '0;
      beat_q      <= '0;
      size_q      <= 3'd2;
      burst_q     <= BURST_INCR;
      last_was_wr <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          beat_q <= '0;
          if (take_wr) begin
            state       <= S_WDATA;
            id_q        <= s_axi_awid;
            addr_q      <= s_axi_awaddr;
            len_q       <= s_axi_awlen;
            size_q      <= s_axi_awsize;
            burst_q     <= s_axi_awburst;
            last_was_wr <= 1'b1;
          end else if (take_rd) begin
            state       <= S_RFETCH;
            id_q        <= s_axi_arid;
            addr_q      <= s_axi_araddr;
            len_q       <= s_axi_arlen;
            size_q      <= s_axi_arsize;
            burst_q     <= s_axi_arburst;
            last_was_wr <= 1'b0;
          end
        end
        S_WDATA: if (s_axi_wvalid) begin
          addr_q <= addr_next;
          beat_q <= beat_q + 1'b1;
          if (s_axi_wlast || beat_q == len_q) state <= S_WRESP;
        end
        S_WRESP:  if (s_axi_bready) state <= S_IDLE;
        S_RFETCH: state <= S_RDATA;
        S_RDATA: if (s_axi_rready) begin
          if (beat_q == len_q) state <= S_IDLE;
          else begin
            addr_q <= addr_next;
            beat_q <= beat_q + 1'b1;
            state  <= S_RFETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- output memory --------------------------------------------------------------------
  nnip_out_memory #(
    .BYTES     (1 << ADDR_W),
    .AXON_BASE (AXON_BASE),
    .DEND_BASE (DEND_BASE)
  ) u_mem (
    .clk     (aclk),
    .a_new   (nna_out_new),
    .a_type  (nna_out_type),
    .a_adr   (nna_out_adr),
    .a_data  (nna_out_data),
    .b_addr  (addr_q[ADDR_W-1:2]),
    .b_re    (state == S_RFETCH),
    .b_we    ((state == S_WDATA) && s_axi_wvalid),
    .b_wstrb (s_axi_wstrb),
    .b_wdata (s_axi_wdata),
    .b_rdata (s_axi_rdata)
  );

  // ---- init lock and start generator ------------------------------------------------------
  logic init_ack_q;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      init_ack_q  <= 1'b0;
      init_locked <= 1'b0;
    end else begin
      init_ack_q <= nna_init_ack;
      if (nna_init_ack != init_ack_q && nna_init_type == INIT_DONE) init_locked <= 1'b1;
    end
  end

  nnip_start_gen #(
    .PERIOD_CYCLES (PERIOD_CYCLES)
  ) u_start (
    .clk         (aclk),
    .rst_n       (aresetn),
    .arm         (init_locked),
    .cluster_rdy (nna_cluster_rdy),
    .s_start     (nna_s_start)
  );

  // ---- protocol rules ---------------------------------------------------------------------
  a_wlast_matches_len: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_wvalid && s_axi_wready |-> (s_axi_wlast == (beat_q == len_q)));
  a_rvalid_hold: assert property (@(posedge aclk) disable iff (!aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

  // WADDR_W documents the memory word address width taken from addr_q.
  if (WADDR_W < 2) begin : g_addr_check
    $error("ADDR_W must be at least 4");
  end

endmodule
