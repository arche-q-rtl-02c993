// archeq_pkg: constants and types shared by the ArchE-Q accelerator.
//
// The network works on 2-bit unsigned activations (0..3) and 2-bit two's
// complement weights (-2..+1; the first layer uses only the ternary values
// -1/0/+1). Batch normalisation is folded into NTH = 3 thresholds per output
// channel, so a 2-bit activation is the count of thresholds its accumulator
// reaches. Threshold and accumulator widths (16 bit) are this design's choice.
//
// Weights and thresholds live in per-layer RAMs that are written over one
// shared configuration bus (cfg_t). A write targets the layer whose LAYER_ID
// matches cfg.layer; cfg.is_th selects the threshold RAM (addr = group*PE+pe,
// data[47:0] = {T2,T1,T0}) or the weight RAM (addr = fold step, data = the
// PE*SIMD packed 2-bit weights, PE-major, lane-minor).
package archeq_pkg;

  localparam int unsigned ABITS  = 2;   // activation bits
  localparam int unsigned WBITS  = 2;   // weight bits
  localparam int unsigned NTH    = 3;   // thresholds per channel (2^ABITS - 1)
  localparam int unsigned TBITS  = 16;  // threshold bits (signed)
  localparam int unsigned ACC_W  = 16;  // accumulator bits (signed)

  localparam int unsigned CFG_AW = 16;
  localparam int unsigned CFG_DW = 64;

  // Layer identifiers on the configuration bus.
  localparam logic [2:0] LID_XVAU1 = 3'd0;
  localparam logic [2:0] LID_XVAU2 = 3'd1;
  localparam logic [2:0] LID_XVAU3 = 3'd2;
  localparam logic [2:0] LID_FC1   = 3'd3;
  localparam logic [2:0] LID_FC2   = 3'd4;

  typedef struct packed {
    logic              we;
    logic [2:0]        layer;
    logic              is_th;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_t;

  typedef logic signed [ACC_W-1:0] acc_t;
  typedef logic signed [TBITS-1:0] th_t;

endpackage
