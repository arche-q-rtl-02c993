// archeq_top: ArchE-Q, a multiplier-free streaming accelerator that predicts
// the best of 64 mm-wave beams from a 20 x 20 binarized LiDAR occupancy grid.
//
// Layer pipeline (each layer works on its own frame, FIFOs between layers):
//
//   in_bit -> XVAU-1 (3x3 conv 1->C1, SAC PEs, thresholds, 2x2 max-pool)
//          -> FIFO -> XVAU-2 (3x3 conv C1->C2, CAA PEs, thresholds, pool)
//          -> FIFO -> XVAU-3 (3x3 conv C2->C3, CAA PEs, thresholds, pool)
//          -> FIFO -> FC-1 (flatten buffer, FC1_IN->FC1_OUT, thresholds)
//          -> FIFO -> FC-2 (flatten buffer, FC1_OUT->NBEAMS, raw scores)
//          -> beam_select (index of the largest score)
//
// Interfaces: the grid enters one cell per beat (in_valid/in_ready/in_bit,
// raster order, row 0 first). The result leaves as beam_idx/beam_score with
// beam_valid/beam_ready. All weights and thresholds are written over cfg
// before inference (see archeq_pkg for the addressing). rst_n is synchronous,
// active low. Grid size, beam count and the PE counts (8, 8, 2, 32, 16) are
// the design's; channel counts, kernel and pool sizes, SIMD widths and FIFO
// depths are this implementation's choices.
module archeq_top
  import archeq_pkg::*;
#(
  parameter int unsigned H0         = 20,
  parameter int unsigned W0         = 20,
  parameter int unsigned K          = 3,
  parameter int unsigned P          = 2,
  parameter int unsigned C1         = 16,
  parameter int unsigned C2         = 16,
  parameter int unsigned C3         = 32,
  parameter int unsigned PE1        = 8,
  parameter int unsigned PE2        = 8,
  parameter int unsigned PE3        = 2,
  parameter int unsigned SIMD2      = 4,
  parameter int unsigned SIMD3      = 8,
  parameter int unsigned FC1_OUT    = 64,
  parameter int unsigned PE_FC1     = 32,
  parameter int unsigned NBEAMS     = 64,
  parameter int unsigned PE_FC2     = 16,
  parameter int unsigned FIFO_DEPTH = 2,
  localparam int unsigned IW = $clog2(NBEAMS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cfg_t          cfg,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_bit,
  output logic          beam_valid,
  input  logic          beam_ready,
  output logic [IW-1:0] beam_idx,
  output acc_t          beam_score
);

  localparam int unsigned H1 = H0/P, W1 = W0/P;
  localparam int unsigned H2 = H1/P, W2 = W1/P;
  localparam int unsigned H3 = H2/P, W3 = W2/P;
  localparam int unsigned FC1_IN = H3*W3*C3;

  // ---------------- XVAU-1 ----------------
  logic                 x1_v, x1_r;
  logic [C1*ABITS-1:0]  x1_d;
  logic                 f1_v, f1_r;
  logic [C1*ABITS-1:0]  f1_d;

  xvau #(.LAYER_ID(LID_XVAU1), .H(H0), .W(W0), .CIN(1), .COUT(C1), .PE(PE1),
         .SIMD(1), .IBITS(1), .K(K), .P(P)) u_xvau1 (
    .clk, .rst_n, .cfg,
    .in_valid, .in_ready, .in_data(in_bit),
    .out_valid(x1_v), .out_ready(x1_r), .out_data(x1_d)
  );

  stream_fifo #(.WIDTH(C1*ABITS), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n,
    .in_valid(x1_v), .in_ready(x1_r), .in_data(x1_d),
    .out_valid(f1_v), .out_ready(f1_r), .out_data(f1_d)
  );

  // ---------------- XVAU-2 ----------------
  logic                 x2_v, x2_r;
  logic [C2*ABITS-1:0]  x2_d;
  logic                 f2_v, f2_r;
  logic [C2*ABITS-1:0]  f2_d;

  xvau #(.LAYER_ID(LID_XVAU2), .H(H1), .W(W1), .CIN(C1), .COUT(C2), .PE(PE2),
         .SIMD(SIMD2), .IBITS(ABITS), .K(K), .P(P)) u_xvau2 (
    .clk, .rst_n, .cfg,
    .in_valid(f1_v), .in_ready(f1_r), .in_data(f1_d),
    .out_valid(x2_v), .out_ready(x2_r), .out_data(x2_d)
  );

  stream_fifo #(.WIDTH(C2*ABITS), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n,
    .in_valid(x2_v), .in_ready(x2_r), .in_data(x2_d),
    .out_valid(f2_v), .out_ready(f2_r), .out_data(f2_d)
  );

  // ---------------- XVAU-3 ----------------
  logic                 x3_v, x3_r;
  logic [C3*ABITS-1:0]  x3_d;
  logic                 f3_v, f3_r;
  logic [C3*ABITS-1:0]  f3_d;

  xvau #(.LAYER_ID(LID_XVAU3), .H(H2), .W(W2), .CIN(C2), .COUT(C3), .PE(PE3),
         .SIMD(SIMD3), .IBITS(ABITS), .K(K), .P(P)) u_xvau3 (
    .clk, .rst_n, .cfg,
    .in_valid(f2_v), .in_ready(f2_r), .in_data(f2_d),
    .out_valid(x3_v), .out_ready(x3_r), .out_data(x3_d)
  );

  stream_fifo #(.WIDTH(C3*ABITS), .DEPTH(FIFO_DEPTH)) u_fifo3 (
    .clk, .rst_n,
    .in_valid(x3_v), .in_ready(x3_r), .in_data(x3_d),
    .out_valid(f3_v), .out_ready(f3_r), .out_data(f3_d)
  );

  // ---------------- FC-1 ----------------
  logic                    y1_v, y1_r;
  logic [PE_FC1*ABITS-1:0] y1_d;
  logic                    f4_v, f4_r;
  logic [PE_FC1*ABITS-1:0] f4_d;

  fc_layer #(.LAYER_ID(LID_FC1), .IN_N(FC1_IN), .IN_PAR(C3), .OUT_N(FC1_OUT),
             .PE(PE_FC1), .SIMD(1), .HAS_ACT(1'b1)) u_fc1 (
    .clk, .rst_n, .cfg,
    .in_valid(f3_v), .in_ready(f3_r), .in_data(f3_d),
    .out_valid(y1_v), .out_ready(y1_r), .out_data(y1_d)
  );

  stream_fifo #(.WIDTH(PE_FC1*ABITS), .DEPTH(FIFO_DEPTH)) u_fifo4 (
    .clk, .rst_n,
    .in_valid(y1_v), .in_ready(y1_r), .in_data(y1_d),
    .out_valid(f4_v), .out_ready(f4_r), .out_data(f4_d)
  );

  // ---------------- FC-2 ----------------
  logic                    y2_v, y2_r;
  logic [PE_FC2*ACC_W-1:0] y2_d;

  fc_layer #(.LAYER_ID(LID_FC2), .IN_N(FC1_OUT), .IN_PAR(PE_FC1), .OUT_N(NBEAMS),
             .PE(PE_FC2), .SIMD(1), .HAS_ACT(1'b0)) u_fc2 (
    .clk, .rst_n, .cfg,
    .in_valid(f4_v), .in_ready(f4_r), .in_data(f4_d),
    .out_valid(y2_v), .out_ready(y2_r), .out_data(y2_d)
  );

  // ---------------- beam index ----------------
  beam_select #(.N(NBEAMS), .PAR(PE_FC2)) u_sel (
    .clk, .rst_n,
    .in_valid(y2_v), .in_ready(y2_r), .in_data(y2_d),
    .out_valid(beam_valid), .out_ready(beam_ready),
    .out_idx(beam_idx), .out_score(beam_score)
  );

endmodule
