// nnip_pkg: types and constants shared by the Neuron Network IP-core (NNIP).
//
// The NNIP wraps a neuron network application (NNA) that simulates an
// inferior-olive network and connects it to an ARM host over two AXI slave
// ports. This package holds the NNA port widths, the init-type and
// output-type encodings, the AXI response codes and the AXI-Lite register
// map.
//
// From the source design: the init types 0..4 (cluster number, dendrite
// voltage, cell parameters, connectivity matrix, init done), output type
// "00" = dendrite voltage and "01" = axon voltage, 32-bit data words, and
// the 1x1x25x1 configuration (25 simulated cells). The bit widths of the
// NNA address and type fields and the register numbering are this design's
// own choices.
package nnip_pkg;

  // ---- NNA port widths --------------------------------------------------
  localparam int unsigned DATA_W      = 32;  // init/in/out data words
  localparam int unsigned INIT_TYPE_W = 3;   // types 0..7, 5..7 unused
  localparam int unsigned CLUS_W      = 8;   // cluster (PCC) number
  localparam int unsigned ADR_W       = 8;   // SimC address
  localparam int unsigned ADR2_W      = 8;   // parameter index / ordinal
  localparam int unsigned IN_TYPE_W   = 2;
  localparam int unsigned OUT_TYPE_W  = 2;

  // Number of simulated cells in the 1x1x25x1 configuration.
  localparam int unsigned NUM_SIMC = 25;

  typedef enum logic [INIT_TYPE_W-1:0] {
    INIT_CLUSTER_NR = 3'd0,
    INIT_DEND_V     = 3'd1,
    INIT_CELL_PARAM = 3'd2,
    INIT_CONN       = 3'd3,
    INIT_DONE       = 3'd4
  } init_type_e;

  typedef enum logic [OUT_TYPE_W-1:0] {
    OUT_DENDRITE = 2'b00,
    OUT_AXON     = 2'b01
  } out_type_e;

  // ---- AXI -----------------------------------------------------------------
  localparam logic [1:0] RESP_OKAY   = 2'b00;

  localparam logic [1:0] BURST_FIXED = 2'b00;
  localparam logic [1:0] BURST_INCR  = 2'b01;
  localparam logic [1:0] BURST_WRAP  = 2'b10;

  // ---- AXI-Lite register map (word index; byte offset = 4 * index) ------
  // Read/write registers that drive NNA inputs.
  localparam int unsigned REG_INIT_TYPE  = 0;
  localparam int unsigned REG_INIT_CLUS  = 1;
  localparam int unsigned REG_INIT_ADR   = 2;
  localparam int unsigned REG_INIT_ADR2  = 3;
  localparam int unsigned REG_INIT_DATA  = 4;
  localparam int unsigned REG_INIT_STR   = 5;
  localparam int unsigned REG_IN_TYPE    = 6;
  localparam int unsigned REG_IN_ADR     = 7;
  localparam int unsigned REG_IN_DATA    = 8;
  localparam int unsigned REG_IN_STR     = 9;
  localparam int unsigned NUM_RW_REGS    = 10;
  // Read-only registers that hold NNA outputs and the activity counters.
  localparam int unsigned REG_INIT_ACK   = 16;
  localparam int unsigned REG_IN_ACK     = 17;
  localparam int unsigned REG_OUT_TYPE   = 18;
  localparam int unsigned REG_OUT_ADR    = 19;
  localparam int unsigned REG_OUT_NEW    = 20;
  localparam int unsigned REG_CLUSTER_RDY= 21;
  localparam int unsigned REG_S_START    = 22;
  localparam int unsigned REG_NUM_RDY    = 24;
  localparam int unsigned REG_NUM_START  = 25;
  localparam int unsigned REG_NUM_OUTNEW = 26;

  // NNA outputs that the AXI-Lite slave samples (everything but out_data).
  typedef struct packed {
    logic                  init_ack;
    logic                  in_ack;
    logic [OUT_TYPE_W-1:0] out_type;
    logic [ADR_W-1:0]      out_adr;
    logic                  out_new;
    logic                  cluster_rdy;
    logic                  s_start;
  } nna_status_t;

  // NNA inputs that the AXI-Lite registers drive.
  typedef struct packed {
    logic [INIT_TYPE_W-1:0] init_type;
    logic [CLUS_W-1:0]      init_clus;
    logic [ADR_W-1:0]       init_adr;
    logic [ADR2_W-1:0]      init_adr2;
    logic [DATA_W-1:0]      init_data;
    logic                   init_str;
    logic [IN_TYPE_W-1:0]   in_type;
    logic [ADR_W-1:0]       in_adr;
    logic [DATA_W-1:0]      in_data;
    logic                   in_str;
  } nna_ctrl_t;

endpackage
