// nna_model: behavioural stand-in for the neuron network application (NNA)
// that the NNIP wraps. Testbench use only.
//
// The real application computes an extended Hodgkin-Huxley model of 25
// inferior-olive cells; this model keeps only its port protocol so that
// the NNIP can be exercised end to end:
//   * Reset raises cluster_rdy (ready for initialisation).
//   * Init vectors use a toggle handshake: a new vector is pending while
//     cluster_init_str differs from cluster_init_ack; ACK_DELAY clocks later
//     the model stores it and sets ack = str. The first vector drops
//     cluster_rdy. Type 1 stores a dendrite voltage per cell (init_adr),
//     type 2 a parameter per cell (init_adr, index init_adr2), type 0 the
//     cluster number, type 3 is counted, and type 4 locks the model and
//     raises cluster_rdy. Vectors after the lock are acknowledged but ignored.
//   * Injected signals use the same toggle handshake on cluster_in_str /
//     cluster_in_ack; type 0 overrides the dendrite voltage reported for
//     cell in_adr from then on.
//   * s_start while locked and ready drops cluster_rdy,
//     waits calc_cycles clocks (an input, so a test can
//     make one step slow), then streams for each cell c = 0..NUM_SIMC-1 a dendrite word (type 0,
//     the stored or injected voltage) and an axon word (type 1, parameter
//     AXON_PARAM of cell c plus the step number), each with a one-clock
//     cluster_out_new, OUT_GAP idle clocks apart, and raises cluster_rdy.
// Starts that arrive while not ready are ignored and counted in
// ignored_starts.
module nna_model
  import nnip_pkg::*;
#(
  parameter int unsigned N_SIMC      = 25,
  parameter int unsigned N_PARAM     = 19,
  parameter int unsigned AXON_PARAM  = 15,
  parameter int unsigned ACK_DELAY   = 3,
  parameter int unsigned OUT_GAP     = 2
) (
  input  int unsigned            calc_cycles,
  input  logic                   clk,
  input  logic                   reset,
  input  logic                   s_start,
  output logic                   cluster_rdy,
  input  logic [INIT_TYPE_W-1:0] cluster_init_type,
  input  logic [CLUS_W-1:0]      cluster_init_clus,
  input  logic [ADR_W-1:0]       cluster_init_adr,
  input  logic [ADR2_W-1:0]      cluster_init_adr2,
  input  logic [DATA_W-1:0]      cluster_init_data,
  input  logic                   cluster_init_str,
  output logic                   cluster_init_ack,
  input  logic [ADR_W-1:0]       cluster_in_adr,
  input  logic [IN_TYPE_W-1:0]   cluster_in_type,
  input  logic [DATA_W-1:0]      cluster_in_data,
  input  logic                   cluster_in_str,
  output logic                   cluster_in_ack,
  output logic [ADR_W-1:0]       cluster_out_adr,
  output logic [OUT_TYPE_W-1:0]  cluster_out_type,
  output logic [DATA_W-1:0]      cluster_out_data,
  output logic                   cluster_out_new
);

  localparam int unsigned CW = $clog2(N_SIMC);   // cell index width
  localparam int unsigned PW = $clog2(N_PARAM);  // parameter index width

  logic [DATA_W-1:0] dend   [N_SIMC];
  logic [DATA_W-1:0] inj    [N_SIMC];
  logic              inj_v  [N_SIMC];
  logic [DATA_W-1:0] param  [N_SIMC][N_PARAM];
  logic              locked, busy;
  int unsigned       init_wait, in_wait, calc_wait, gap_wait, out_idx, step;
  int unsigned       n_init [8];
  int unsigned       ignored_starts;
  logic [CLUS_W-1:0] cluster_nr;

  always_ff @(posedge clk) begin
    if (reset) begin
      cluster_rdy      <= 1'b1;
      cluster_init_ack <= 1'b0;
      cluster_in_ack   <= 1'b0;
      cluster_out_new  <= 1'b0;
      cluster_out_adr  <= '0;
      cluster_out_type <= '0;
      cluster_out_data <= '0;
      locked <= 1'b0; busy <= 1'b0;
      init_wait <= 0; in_wait <= 0; calc_wait <= 0; gap_wait <= 0;
      out_idx <= 0; step <= 0; ignored_starts <= 0; cluster_nr <= '0;
      for (int i = 0; i < 8; i++) n_init[i] <= 0;
      for (int c = 0; c < N_SIMC; c++) begin
        dend[c] <= '0; inj[c] <= '0; inj_v[c] <= 1'b0;
        for (int p = 0; p < N_PARAM; p++) param[c][p] <= '0;
      end
    end else begin
      cluster_out_new <= 1'b0;
      // ---- initialisation handshake ----
      if (cluster_init_str != cluster_init_ack) begin
        if (init_wait < ACK_DELAY) init_wait <= init_wait + 1;
        else begin
          init_wait        <= 0;
          cluster_init_ack <= cluster_init_str;
          if (!locked) begin
            n_init[cluster_init_type] <= n_init[cluster_init_type] + 1;
            cluster_rdy <= 1'b0;
            case (cluster_init_type)
              INIT_CLUSTER_NR: cluster_nr <= CLUS_W'(cluster_init_data);
              INIT_DEND_V:     if (32'(cluster_init_adr) < N_SIMC)
                                 dend[CW'(cluster_init_adr)] <= cluster_init_data;
              INIT_CELL_PARAM: if (32'(cluster_init_adr) < N_SIMC && 32'(cluster_init_adr2) < N_PARAM)
                                 param[CW'(cluster_init_adr)][PW'(cluster_init_adr2)] <= cluster_init_data;
              INIT_DONE: begin
                locked      <= 1'b1;
                cluster_rdy <= 1'b1;
              end
              default: ;
            endcase
          end
        end
      end
      // ---- injected-signal handshake ----
      if (cluster_in_str != cluster_in_ack) begin
        if (in_wait < ACK_DELAY) in_wait <= in_wait + 1;
        else begin
          in_wait        <= 0;
          cluster_in_ack <= cluster_in_str;
          if (cluster_in_type == '0 && 32'(cluster_in_adr) < N_SIMC) begin
            inj[CW'(cluster_in_adr)]   <= cluster_in_data;
            inj_v[CW'(cluster_in_adr)] <= 1'b1;
          end
        end
      end
      // ---- computation step ----
      if (s_start) begin
        if (locked && cluster_rdy && !busy) begin
          cluster_rdy <= 1'b0;
          busy        <= 1'b1;
          calc_wait   <= calc_cycles;
          out_idx     <= 0;
          gap_wait    <= 0;
        end else ignored_starts <= ignored_starts + 1;
      end else if (busy) begin
        if (calc_wait != 0) calc_wait <= calc_wait - 1;
        else if (gap_wait != 0) gap_wait <= gap_wait - 1;
        else if (out_idx < 2 * N_SIMC) begin
          automatic int unsigned c = out_idx / 2;
          cluster_out_new <= 1'b1;
          cluster_out_adr <= ADR_W'(c);
          if (out_idx % 2 == 0) begin
            cluster_out_type <= OUT_DENDRITE;
            cluster_out_data <= inj_v[c] ? inj[c] : dend[c];
          end else begin
            cluster_out_type <= OUT_AXON;
            cluster_out_data <= param[c][AXON_PARAM] + step;
          end
          out_idx  <= out_idx + 1;
          gap_wait <= OUT_GAP;
        end else begin
          busy        <= 1'b0;
          cluster_rdy <= 1'b1;
          step        <= step + 1;
        end
      end
    end
  end

endmodule
