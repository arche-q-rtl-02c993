// xvau: eXtended Vector Activation Unit, one fused convolutional layer.
//
// Convolution, threshold activation (batch normalisation folded into the
// thresholds) and max-pooling run in one streaming module: the conv core
// streams each finished output pixel directly into the max-pool frame buffer,
// and the max-pool controller reads pooling windows from there. No FIFO and
// no separate pooling layer sit between the two.
//
// Input: one pixel per beat (CIN channels of IBITS, raster order, H x W).
// Output: one pooled pixel per beat (COUT 2-bit activations, raster order,
// (H/P) x (W/P)). Both sides use valid/ready. Weights and thresholds are
// written over cfg when cfg.layer == LAYER_ID (see archeq_pkg). The fusion
// and the direct conv-to-pool path are the design's; sizes are parameters.
module xvau
  import archeq_pkg::*;
#(
  parameter logic [2:0]  LAYER_ID = 3'd0,
  parameter int unsigned H        = 20,
  parameter int unsigned W        = 20,
  parameter int unsigned CIN      = 1,
  parameter int unsigned COUT     = 16,
  parameter int unsigned PE       = 8,
  parameter int unsigned SIMD     = 1,
  parameter int unsigned IBITS    = 1,
  parameter int unsigned K        = 3,
  parameter int unsigned P        = 2,
  localparam int unsigned PIXW = CIN*IBITS,
  localparam int unsigned OUTW = COUT*ABITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [PIXW-1:0] in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [OUTW-1:0] out_data
);

  logic            c_valid, c_ready;
  logic [OUTW-1:0] c_data;

  conv_core #(.LAYER_ID(LAYER_ID), .H(H), .W(W), .CIN(CIN), .COUT(COUT),
              .PE(PE), .SIMD(SIMD), .IBITS(IBITS), .K(K)) u_conv (
    .clk, .rst_n, .cfg,
    .in_valid, .in_ready, .in_data,
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data)
  );

  maxpool #(.H(H), .W(W), .C(COUT), .P(P)) u_pool (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid, .out_ready, .out_data
  );

endmodule
