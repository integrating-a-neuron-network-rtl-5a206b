// nnip_out_memory: the output memory block of the NNIP.
//
// The neuron network application streams its results as words on
// cluster_out_data, each tagged with a cell address (cluster_out_adr), a
// type (cluster_out_type, "00" dendrite voltage, "01" axon voltage) and a
// one-cycle cluster_out_new strobe. This memory stores every such word at
// word address BASE(type) + adr, so that after one 50 us step the host
// finds the 25 axon voltages at words 0..24 and the 25 dendrite voltages at
// words 100..124 (byte offsets 0..96 and 400..496). Words of other types
// are dropped.
//
// Port A is that write-only result port. Port B is the bus port: a read
// (b_re) returns the word on b_rdata one clock later, and a write (b_we)
// stores the byte lanes selected by b_wstrb. If both ports write the same
// word in one clock, port A wins. The array has no reset; the host clears
// it through port B if it needs to.
//
// The 64 KB size, the 32-bit words, the write on out_new and the +100 word
// offset between the two voltage kinds follow the source design. The source
// is not consistent about which kind sits at the offset: its listing places
// dendrite ("00") words at the base and all others at +100, while its
// result printout shows axon words at the base and dendrite words at +100.
// The printout is followed here; the two bases are parameters. The bus write
// port is this design's choice.
module nnip_out_memory
  import nnip_pkg::*;
#(
  parameter int unsigned BYTES     = 65536,
  parameter int unsigned AXON_BASE = 0,    // word address of axon voltages
  parameter int unsigned DEND_BASE = 100,  // word address of dendrite voltages
  localparam int unsigned WORDS    = BYTES / 4,
  localparam int unsigned WADDR_W  = $clog2(WORDS)
) (
  input  logic                  clk,
  // port A: results of the neuron network application
  input  logic                  a_new,
  input  logic [OUT_TYPE_W-1:0] a_type,
  input  logic [ADR_W-1:0]      a_adr,
  input  logic [DATA_W-1:0]     a_data,
  // port B: bus access
  input  logic [WADDR_W-1:0]    b_addr,
  input  logic                  b_re,
  input  logic                  b_we,
  input  logic [3:0]            b_wstrb,
  input  logic [31:0]           b_wdata,
  output logic [31:0]           b_rdata
);

  logic [31:0]        mem [WORDS];
  logic [WADDR_W-1:0] a_waddr;
  logic               a_we;

  always_comb begin
    a_we    = 1'b0;
    a_waddr = '0;
    if (a_new) begin
      if (a_type == OUT_AXON) begin
        a_we    = 1'b1;
        a_waddr = WADDR_W'(AXON_BASE + 32'(a_adr));
      end else if (a_type == OUT_DENDRITE) begin
        a_we    = 1'b1;
        a_waddr = WADDR_W'(DEND_BASE + 32'(a_adr));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (b_we) begin
      for (int b = 0; b < 4; b++)
        if (b_wstrb[b]) mem[b_addr][8*b +: 8] <= b_wdata[8*b +: 8];
    end
    if (a_we) mem[a_waddr] <= a_data;
  end

  always_ff @(posedge clk) begin
    if (b_re) b_rdata <= mem[b_addr];
  end

endmodule
