// nnip_edge_counter: counts the rising edges of one control signal.
//
// The host follows a run of the neuron network application through three
// such counters: rising edges of cluster_rdy, of s_start and of
// cluster_out_new. One run (start pulse, 25 axon and 25 dendrite outputs)
// advances the out_new counter by 50. The counter registers the input
// once, compares it with its previous value and adds one on a 0-to-1
// change; the count is visible one clock after the edge. It wraps at
// 2**WIDTH and clears on the active-low synchronous reset.
//
// The three counted signals follow the source design; the edge detector,
// the 32-bit width and the reset are this design's choices.
module nnip_edge_counter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sig,
  output logic [WIDTH-1:0] count
);

  logic sig_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sig_q <= 1'b0;
      count <= '0;
    end else begin
      sig_q <= sig;
      if (sig && !sig_q) count <= count + 1'b1;
    end
  end

endmodule
