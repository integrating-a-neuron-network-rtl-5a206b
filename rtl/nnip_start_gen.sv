// nnip_start_gen: the 50 us "clock generator" that paces the neuron network.
//
// The neuron network application computes one step of all its simulated
// cells per 50 us of biological real time. This block issues the one-cycle
// s_start pulse that begins each step. A period counter restarts at every
// s_start and counts PERIOD_CYCLES clocks; a new s_start is issued on the
// first clock on which the period has run out, the block is armed and the
// application reports cluster_rdy. After reset the period counts as run
// out, so the first start follows the first ready at once; later starts are
// exactly PERIOD_CYCLES apart when the application finishes in time, and
// wait for cluster_rdy when it does not.
//
// The source design gives the 50 us period, the cluster_rdy input and the
// s_start output. The default PERIOD_CYCLES = 5000 assumes the 100 MHz
// fabric clock of the reference block design. The arm input (high once the
// initialisation has been locked) is this design's choice: it keeps starts
// out of the initialisation phase, during which the application also
// raises cluster_rdy.
module nnip_start_gen #(
  parameter int unsigned PERIOD_CYCLES = 5000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic arm,
  input  logic cluster_rdy,
  output logic s_start
);

  localparam int unsigned CNT_W = $clog2(PERIOD_CYCLES + 1);

  logic [CNT_W-1:0] cnt;
  logic             elapsed;

  assign elapsed = (cnt == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      s_start <= 1'b0;
    end else begin
      s_start <= 1'b0;
      if (elapsed && arm && cluster_rdy && !s_start) begin
        s_start <= 1'b1;
        cnt     <= CNT_W'(PERIOD_CYCLES - 1);
      end else if (!elapsed) begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
