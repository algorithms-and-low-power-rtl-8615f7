// kws_pkg: types and constants shared by the keyword-spotting CNN accelerator.
//
// The accelerator computes convolutional (CONV) and fully-connected (FC) layers
// on an 8x8 array of processing elements (PEs) with a weight-stationary dataflow
// in which every PE keeps C-direction weights of up to three output channels.
// Array size (64 PEs), weight register file (12 entries = 3 channels x 4 inputs),
// 16-bit activations, 8-bit weights and the memory sizes follow the document.
// The layer descriptor layout, the PE configuration record and the ID widths
// are this design's own encoding.
package kws_pkg;

  // ---------------------------------------------------------------- array
  localparam int unsigned N_PE     = 64;  // PE0 .. PE63
  localparam int unsigned N_ROW    = 8;
  localparam int unsigned N_COL    = 8;
  localparam int unsigned MAX_CP   = 4;   // input-channel elements per PE
  localparam int unsigned MAX_NM   = 3;   // output channels per PE
  localparam int unsigned WRF_N    = MAX_CP * MAX_NM; // 12 weight registers
  localparam int unsigned ID_W     = 6;   // IA / bias / OA multicast IDs

  // ---------------------------------------------------------------- data
  localparam int unsigned AW_D     = 16;  // activation / partial sum width
  localparam int unsigned WW_D     = 8;   // weight width
  localparam int unsigned W_FRAC   = 7;   // weights are Q1.7 sign-magnitude

  typedef logic [AW_D-1:0] act_t;   // sign-magnitude or 2's complement, by context
  typedef logic [WW_D-1:0] wgt_t;   // sign-magnitude {sign, 7-bit magnitude}

  // ---------------------------------------------------------------- PE setup
  typedef enum logic [1:0] {
    INIT_ZERO = 2'd0,   // accumulator starts at 0
    INIT_BIAS = 2'd1,   // accumulator starts at the bias held in the bias RF
    INIT_PSUM = 2'd2    // accumulator starts at a partial sum read from memory
  } init_e;

  typedef struct packed {
    logic            en;          // PE used in this pass (else held idle)
    logic [2:0]      n_c;         // input-channel elements held, 1..4
    logic [1:0]      n_m;         // output channels held, 1..3
    init_e           init;        // accumulator initialisation
    logic            use_spatial; // add the previous PE's result (not chain head)
    logic            is_tail;     // last PE of a chain: result goes to the OA NoC
    logic [ID_W-1:0] ia_id;       // multicast ID for input activations
    logic [ID_W-1:0] bias_id;     // multicast ID for bias / partial sums
    logic [ID_W-1:0] oa_id;       // ID under which the output is collected
  } pe_cfg_t;

  // ---------------------------------------------------------------- layers
  localparam int unsigned MAX_LAYERS  = 12;
  localparam int unsigned CFG_WORDS   = 8;    // 16-bit words per layer descriptor

  typedef enum logic [1:0] {
    SRC_BANK0 = 2'd0, SRC_BANK1 = 2'd1, SRC_BANK2 = 2'd2, SRC_FEAT = 2'd3
  } src_e;

  typedef enum logic [1:0] {
    SCALE_X1 = 2'd0, SCALE_X2 = 2'd1, SCALE_HALF = 2'd2
  } scale_e;

  // 128-bit layer descriptor, stored as 8 words in the configuration buffer,
  // word 0 holding bits [15:0].
  typedef struct packed {
    logic [27:0] rsvd;
    logic [16:0] bbase;    // byte address of the 16-bit biases in weight memory
    logic [16:0] wbase;    // byte address of W[m][r][s][c] in weight memory
    logic        has_bias;
    logic [3:0]  v;        // horizontal stride
    logic [3:0]  u;        // vertical stride
    logic [7:0]  s;        // filter width
    logic [7:0]  r;        // filter height
    logic [7:0]  w;        // input width
    logic [7:0]  h;        // input height
    logic [8:0]  m;        // output channels, 1..511
    logic [8:0]  c;        // input channels, 1..256
    scale_e      scale;    // activation scale applied with the ReLU
    logic        relu;
    logic [1:0]  dst;      // destination activation bank 0..2
    src_e        src;      // source: activation bank or feature buffer
  } layer_cfg_t;

  // ---------------------------------------------------------------- memories
  localparam int unsigned WMEM_BYTES = 80 * 1024;   // weight memory
  localparam int unsigned AMEM_WORDS = 8 * 1024;    // 16 kB per activation bank
  localparam int unsigned FBUF_WORDS = 1024;        // 2 kB feature buffer
  localparam int unsigned CBUF_WORDS = 512;         // 1 kB configuration buffer

  // ---------------------------------------------------------------- arithmetic
  // Saturate a 17-bit 2's complement sum to 16 bits.
  function automatic act_t sat17(input logic [AW_D:0] x);
    if (x[AW_D] != x[AW_D-1]) return x[AW_D] ? act_t'(16'h8000) : act_t'(16'h7fff);
    return x[AW_D-1:0];
  endfunction

endpackage
