// nnip_axi_interconnect: routes the processor's AXI4 master port to the two
// slave ports of the NNIP by address.
//
// The host processor reaches the IP through one general-purpose AXI master
// port with 32-bit addresses. This block decodes each transaction's start
// address:
//   * LITE_BASE .. LITE_BASE + 64 KB - 1 goes to the AXI4-Lite register port;
//   * FULL_BASE .. FULL_BASE + 64 KB - 1 goes to the AXI4-Full memory port;
//   * anything else is answered here with DECERR (data beats are accepted
//     and dropped on a write, zero data is returned on a read).
// Only the low 16 address bits are passed on. A burst must stay inside its
// window, which AXI guarantees for bursts that do not cross 4 KB.
//
// Writes and reads are handled by two independent engines, each serving one
// transaction at a time, so a write and a read may be in flight together.
// The address is accepted (AWREADY/ARREADY) in the clock it is seen while
// the engine is idle, and forwarded one clock later.
//   * Memory port: the address is forwarded once with its ID, length, size
//     and burst type; W beats, the B response and R beats pass straight
//     through with their handshakes.
//   * Register port: AXI4-Lite carries one beat per transaction, so a burst
//     is split. For every beat the engine issues the beat's address
//     (FIXED, INCR or WRAP arithmetic) and, for writes, passes the W beat
//     through; it waits for that beat's B or R before issuing the next one.
//     A write burst gets a single B with the worst response of its beats;
//     a read burst returns each beat as it arrives, with RLAST on the last,
//     and the ID of the request.
//
// The address map (0x43C0_0000 for the registers, 0x7AA0_0000 for the
// memory, 64 KB each) and the role of the block, one master connected to
// the two slaves by address, follow the reference system. The vendor part
// used there is configurable and far more general; this block is this
// design's own minimal version: no outstanding-transaction pipelining, no
// width or clock conversion, and a default decode error slave.
//
// The W data, strobe and last lines of both master ports are wired straight
// from the slave port, so they follow the processor's W channel even while
// idle; only the valid lines, which this block gates, mark a beat.
module nnip_axi_interconnect
  import nnip_pkg::*;
#(
  parameter int unsigned ID_W      = 12,
  parameter logic [31:0] LITE_BASE = 32'h43C0_0000,
  parameter logic [31:0] FULL_BASE = 32'h7AA0_0000
) (
  input  logic              aclk,
  input  logic              aresetn,
  // ---- slave port: from the processor's AXI master ----
  input  logic [ID_W-1:0]   s_awid,
  input  logic [31:0]       s_awaddr,
  input  logic [7:0]        s_awlen,
  input  logic [2:0]        s_awsize,
  input  logic [1:0]        s_awburst,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wlast,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [ID_W-1:0]   s_bid,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ID_W-1:0]   s_arid,
  input  logic [31:0]       s_araddr,
  input  logic [7:0]        s_arlen,
  input  logic [2:0]        s_arsize,
  input  logic [1:0]        s_arburst,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [ID_W-1:0]   s_rid,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rlast,
  output logic              s_rvalid,
  input  logic              s_rready,
  // ---- master port 0: AXI4-Lite registers ----
  output logic [15:0]       m0_awaddr,
  output logic              m0_awvalid,
  input  logic              m0_awready,
  output logic [31:0]       m0_wdata,
  output logic [3:0]        m0_wstrb,
  output logic              m0_wvalid,
  input  logic              m0_wready,
  input  logic [1:0]        m0_bresp,
  input  logic              m0_bvalid,
  output logic              m0_bready,
  output logic [15:0]       m0_araddr,
  output logic              m0_arvalid,
  input  logic              m0_arready,
  input  logic [31:0]       m0_rdata,
  input  logic [1:0]        m0_rresp,
  input  logic              m0_rvalid,
  output logic              m0_rready,
  // ---- master port 1: AXI4-Full memory ----
  output logic [ID_W-1:0]   m1_awid,
  output logic [15:0]       m1_awaddr,
  output logic [7:0]        m1_awlen,
  output logic [2:0]        m1_awsize,
  output logic [1:0]        m1_awburst,
  output logic              m1_awvalid,
  input  logic              m1_awready,
  output logic [31:0]       m1_wdata,
  output logic [3:0]        m1_wstrb,
  output logic              m1_wlast,
  output logic              m1_wvalid,
  input  logic              m1_wready,
  input  logic [ID_W-1:0]   m1_bid,
  input  logic [1:0]        m1_bresp,
  input  logic              m1_bvalid,
  output logic              m1_bready,
  output logic [ID_W-1:0]   m1_arid,
  output logic [15:0]       m1_araddr,
  output logic [7:0]        m1_arlen,
  output logic [2:0]        m1_arsize,
  output logic [1:0]        m1_arburst,
  output logic              m1_arvalid,
  input  logic              m1_arready,
  input  logic [ID_W-1:0]   m1_rid,
  input  logic [31:0]       m1_rdata,
  input  logic [1:0]        m1_rresp,
  input  logic              m1_rlast,
  input  logic              m1_rvalid,
  output logic              m1_rready
);

  localparam logic [1:0] RESP_DECERR = 2'b11;

  typedef enum logic [1:0] {T_LITE, T_FULL, T_NONE} target_e;

  // Window selected by the upper 16 address bits.
  function automatic target_e decode(logic [15:0] hi);
    if (hi == LITE_BASE[31:16])      return T_LITE;
    else if (hi == FULL_BASE[31:16]) return T_FULL;
    else                                   return T_NONE;
  endfunction

  // Address of the beat after the one at a (AXI burst rules, 16-bit window).
  function automatic logic [15:0] next_addr(logic [15:0] a, logic [7:0] len,
                                            logic [2:0] size, logic [1:0] burst);
    logic [15:0] step, wrap_mask;
    step      = 16'(1) << size;
    wrap_mask = 16'((32'(len) + 1) << size) - 16'd1;
    case (burst)
      BURST_FIXED: return a;
      BURST_WRAP:  return (a & ~wrap_mask) | ((a + step) & wrap_mask);
      default:     return a + step;
    endcase
  endfunction

  // Keep the worse of two responses (OKAY < EXOKAY < SLVERR < DECERR).
  function automatic logic [1:0] worse(logic [1:0] a, logic [1:0] b);
    return (b > a) ? b : a;
  endfunction

  // =========================================================================
  // Write engine
  // =========================================================================
  typedef enum logic [2:0] {
    W_IDLE, W_FULL_AW, W_FULL_DATA, W_FULL_RESP, W_LITE_BEAT, W_LITE_RESP, W_ERR_DATA, W_RESP
  } wstate_e;

  wstate_e          wstate;
  logic [ID_W-1:0]  w_id;
  logic [15:0]      w_addr;
  logic [7:0]       w_len, w_beat;
  logic [2:0]       w_size;
  logic [1:0]       w_burst, w_resp;
  logic             w_aw_done, w_w_done;

  assign s_awready = (wstate == W_IDLE);

  // memory port: forwarded address, W and B pass-through
  assign m1_awid    = w_id;
  assign m1_awaddr  = w_addr;
  assign m1_awlen   = w_len;
  assign m1_awsize  = w_size;
  assign m1_awburst = w_burst;
  assign m1_awvalid = (wstate == W_FULL_AW);
  assign m1_wdata   = s_wdata;
  assign m1_wstrb   = s_wstrb;
  assign m1_wlast   = s_wlast;
  assign m1_wvalid  = (wstate == W_FULL_DATA) && s_wvalid;
  assign m1_bready  = (wstate == W_FULL_RESP) && s_bready;

  // register port: one beat at a time
  assign m0_awaddr  = w_addr;
  assign m0_awvalid = (wstate == W_LITE_BEAT) && !w_aw_done;
  assign m0_wdata   = s_wdata;
  assign m0_wstrb   = s_wstrb;
  assign m0_wvalid  = (wstate == W_LITE_BEAT) && !w_w_done && s_wvalid;
  assign m0_bready  = (wstate == W_LITE_RESP);

  always_comb begin
    case (wstate)
      W_FULL_DATA: s_wready = m1_wready;
      W_LITE_BEAT: s_wready = m0_wready && !w_w_done;
      W_ERR_DATA:  s_wready = 1'b1;
      default:     s_wready = 1'b0;
    endcase
    if (wstate == W_FULL_RESP) begin
      s_bvalid = m1_bvalid;
      s_bid    = m1_bid;
      s_bresp  = m1_bresp;
    end else begin
      s_bvalid = (wstate == W_RESP);
      s_bid    = w_id;
      s_bresp  = w_resp;
    end
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      wstate    <= W_IDLE;
      w_id      <= '0;
      w_addr    <= '0;
      w_len     <= '0;
      w_beat    <= '0;
      w_size    <= 3'd2;
      w_burst   <= BURST_INCR;
      w_resp    <= RESP_OKAY;
      w_aw_done <= 1'b0;
      w_w_done  <= 1'b0;
    end else begin
      case (wstate)
        W_IDLE: if (s_awvalid) begin
          w_id      <= s_awid;
          w_addr    <= s_awaddr[15:0];
          w_len     <= s_awlen;
          w_size    <= s_awsize;
          w_burst   <= s_awburst;
          w_beat    <= '0;
          w_resp    <= RESP_OKAY;
          w_aw_done <= 1'b0;
          w_w_done  <= 1'b0;
          case (decode(s_awaddr[31:16]))
            T_LITE:  wstate <= W_LITE_BEAT;
            T_FULL:  wstate <= W_FULL_AW;
            default: begin wstate <= W_ERR_DATA; w_resp <= RESP_DECERR; end
          endcase
        end
        W_FULL_AW:   if (m1_awready) wstate <= W_FULL_DATA;
        W_FULL_DATA: if (s_wvalid && m1_wready && s_wlast) wstate <= W_FULL_RESP;
        W_FULL_RESP: if (m1_bvalid && s_bready) wstate <= W_IDLE;
        W_LITE_BEAT: begin
          if (m0_awvalid && m0_awready) w_aw_done <= 1'b1;
          if (m0_wvalid && m0_wready)   w_w_done  <= 1'b1;
          if ((w_aw_done || m0_awready) && (w_w_done || (m0_wvalid && m0_wready)))
            wstate <= W_LITE_RESP;
        end
        W_LITE_RESP: if (m0_bvalid) begin
          w_resp    <= worse(w_resp, m0_bresp);
          w_aw_done <= 1'b0;
          w_w_done  <= 1'b0;
          if (w_beat == w_len) wstate <= W_RESP;
          else begin
            w_beat <= w_beat + 1'b1;
            w_addr <= next_addr(w_addr, w_len, w_size, w_burst);
            wstate <= W_LITE_BEAT;
          end
        end
        W_ERR_DATA: if (s_wvalid && s_wlast) wstate <= W_RESP;
        W_RESP:     if (s_bready) wstate <= W_IDLE;
        default:    wstate <= W_IDLE;
      endcase
    end
  end

  // =========================================================================
  // Read engine
  // =========================================================================
  typedef enum logic [2:0] {
    R_IDLE, R_FULL_AR, R_FULL_DATA, R_LITE_AR, R_LITE_DATA, R_ERR_DATA
  } rstate_e;

  rstate_e          rstate;
  logic [ID_W-1:0]  r_id;
  logic [15:0]      r_addr;
  logic [7:0]       r_len, r_beat;
  logic [2:0]       r_size;
  logic [1:0]       r_burst;

  assign s_arready = (rstate == R_IDLE);

  assign m1_arid    = r_id;
  assign m1_araddr  = r_addr;
  assign m1_arlen   = r_len;
  assign m1_arsize  = r_size;
  assign m1_arburst = r_burst;
  assign m1_arvalid = (rstate == R_FULL_AR);
  assign m1_rready  = (rstate == R_FULL_DATA) && s_rready;

  assign m0_araddr  = r_addr;
  assign m0_arvalid = (rstate == R_LITE_AR);
  assign m0_rready  = (rstate == R_LITE_DATA) && s_rready;

  always_comb begin
    case (rstate)
      R_FULL_DATA: begin
        s_rvalid = m1_rvalid; s_rid = m1_rid; s_rdata = m1_rdata;
        s_rresp  = m1_rresp;  s_rlast = m1_rlast;
      end
      R_LITE_DATA: begin
        s_rvalid = m0_rvalid; s_rid = r_id; s_rdata = m0_rdata;
        s_rresp  = m0_rresp;  s_rlast = (r_beat == r_len);
      end
      R_ERR_DATA: begin
        s_rvalid = 1'b1; s_rid = r_id; s_rdata = '0;
        s_rresp  = RESP_DECERR; s_rlast = (r_beat == r_len);
      end
      default: begin
        s_rvalid = 1'b0; s_rid = r_id; s_rdata = '0;
        s_rresp  = RESP_OKAY; s_rlast = 1'b0;
      end
    endcase
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      rstate  <= R_IDLE;
      r_id    <= '0;
      r_addr  <= '0;
      r_len   <= '0;
      r_beat  <= '0;
      r_size  <= 3'd2;
      r_burst <= BURST_INCR;
    end else begin
      case (rstate)
        R_IDLE: if (s_arvalid) begin
          r_id    <= s_arid;
          r_addr  <= s_araddr[15:0];
          r_len   <= s_arlen;
          r_size  <= s_arsize;
          r_burst <= s_arburst;
          r_beat  <= '0;
          case (decode(s_araddr[31:16]))
            T_LITE:  rstate <= R_LITE_AR;
            T_FULL:  rstate <= R_FULL_AR;
            default: rstate <= R_ERR_DATA;
          endcase
        end
        R_FULL_AR:   if (m1_arready) rstate <= R_FULL_DATA;
        R_FULL_DATA: if (m1_rvalid && s_rready && m1_rlast) rstate <= R_IDLE;
        R_LITE_AR:   if (m0_arready) rstate <= R_LITE_DATA;
        R_LITE_DATA: if (m0_rvalid && s_rready) begin
          if (r_beat == r_len) rstate <= R_IDLE;
          else begin
            r_beat <= r_beat + 1'b1;
            r_addr <= next_addr(r_addr, r_len, r_size, r_burst);
            rstate <= R_LITE_AR;
          end
        end
        R_ERR_DATA: if (s_rready) begin
          if (r_beat == r_len) rstate <= R_IDLE;
          else r_beat <= r_beat + 1'b1;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

endmodule
