// conv_core: the convolution core of an XVAU (frame buffer, window address
// generation, folding controller and VATU).
//
// Input pixels arrive one per beat in raster order, each carrying all CIN
// channels (IBITS per channel, channel 0 in the low bits), and are written
// into a frame buffer. Instead of building an im2col matrix, the controller
// reads the K x K window of each output pixel straight out of that buffer,
// substituting zeros outside the frame ("same" padding, stride 1). An output
// pixel is started as soon as the input rows its window covers have arrived,
// so computation overlaps with loading.
//
// Folding: the COUT output channels are computed PE at a time (NG = COUT/PE
// groups) and the CIN input channels SIMD at a time (SG = CIN/SIMD steps).
// Per output pixel the controller issues NG*K*K*SG steps, one per cycle, in
// the order group, kernel row, kernel column, input-channel step. The pixel
// is presented on out_* (all COUT 2-bit activations, channel 0 in the low
// bits) and held until out_ready; the next pixel is started after that.
// Cycles per pixel are NG*K*K*SG plus 4 for pipeline drain and handshake.
// A new frame is accepted once the last output pixel of the current one has
// been handed on. Buffer organisation, fold order and the frame hand-over
// rule are this design's choices; the conv core with IM2COL and a VATU is
// the design's structure.
module conv_core
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

  localparam int unsigned PAD    = K/2;
  localparam int unsigned NG     = COUT/PE;
  localparam int unsigned SG     = CIN/SIMD;
  localparam int unsigned KK     = K*K;
  localparam int unsigned WDEPTH = NG*KK*SG;
  localparam int unsigned NPIX   = H*W;
  localparam int unsigned PAW    = $clog2(NPIX);
  localparam int unsigned CW     = $clog2(NPIX+1);
  localparam int unsigned WAW    = (WDEPTH > 1) ? $clog2(WDEPTH) : 1;
  localparam int unsigned GAW    = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned SGW    = (SG > 1) ? $clog2(SG) : 1;
  localparam int unsigned XW     = SIMD*IBITS;

  if (COUT % PE != 0 || CIN % SIMD != 0) begin : g_fold_check
    $error("conv_core: PE must divide COUT and SIMD must divide CIN");
  end

  typedef enum logic [0:0] {S_ISSUE, S_DRAIN} state_t;

  // ---------------- frame buffer (input side) ----------------
  logic [PIXW-1:0] ibuf [NPIX];
  logic [CW-1:0]   wr_cnt;
  logic            frame_done;

  assign in_ready = (wr_cnt < CW'(NPIX));

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) ibuf[PAW'(wr_cnt)] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                 wr_cnt <= '0;
    else if (frame_done)        wr_cnt <= '0;
    else if (in_valid && in_ready) wr_cnt <= wr_cnt + 1'b1;
  end

  // ---------------- folding controller ----------------
  state_t              state;
  int unsigned         oy, ox, ky, kx;
  logic [GAW-1:0]      g;
  logic [SGW-1:0]      sg;
  logic                rows_ok, issue, pad;
  logic [PAW-1:0]      raddr;
  logic [WAW-1:0]      waddr;
  logic                last_step;

  always_comb begin
    int unsigned need_row;
    int iy, ix;
    need_row = (oy + PAD > H-1) ? H-1 : oy + PAD;
    rows_ok  = (32'(wr_cnt) >= (need_row + 1) * W);
    issue    = (state == S_ISSUE) && rows_ok;
    iy       = int'(oy + ky) - int'(PAD);
    ix       = int'(ox + kx) - int'(PAD);
    pad      = (iy < 0) || (iy >= int'(H)) || (ix < 0) || (ix >= int'(W));
    raddr    = pad ? '0 : PAW'(iy * int'(W) + ix);
    waddr    = WAW'((32'(g) * KK + ky * K + kx) * SG + 32'(sg));
    last_step = (ky == K-1) && (kx == K-1) && (32'(sg) == SG-1);
  end

  // synchronous buffer read, aligned with the VATU's weight read
  logic [PIXW-1:0] rd_word;
  logic            pad_q;
  logic [SGW-1:0]  sg_q;
  logic [XW-1:0]   x;

  always_ff @(posedge clk) begin
    rd_word <= ibuf[raddr];
    pad_q   <= pad;
    sg_q    <= sg;
  end

  assign x = pad_q ? '0 : rd_word[32'(sg_q)*XW +: XW];

  logic            res_valid;
  logic [PE*ABITS-1:0] res;

  vatu #(.LAYER_ID(LAYER_ID), .PE(PE), .SIMD(SIMD), .IBITS(IBITS),
         .WDEPTH(WDEPTH), .NGRP(NG), .HAS_ACT(1'b1)) u_vatu (
    .clk, .rst_n, .cfg,
    .in_valid(issue), .in_waddr(waddr), .in_grp(g),
    .in_first((ky == 0) && (kx == 0) && (sg == '0)), .in_last(last_step),
    .in_x(x), .res_valid, .res
  );

  logic [GAW-1:0] rc;   // channel groups of the current pixel received
  logic           px_last;

  assign px_last    = (ox == W-1) && (oy == H-1);
  assign frame_done = (state == S_DRAIN) && out_valid && out_ready && px_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_ISSUE;
      oy <= 0; ox <= 0; ky <= 0; kx <= 0;
      g  <= '0; sg <= '0; rc <= '0;
      out_valid <= 1'b0;
    end else begin
      // step counters
      if (issue) begin
        if (32'(sg) == SG-1) begin
          sg <= '0;
          if (kx == K-1) begin
            kx <= 0;
            if (ky == K-1) begin
              ky <= 0;
              if (32'(g) == NG-1) begin
                g     <= '0;
                state <= S_DRAIN;
              end else g <= g + 1'b1;
            end else ky <= ky + 1;
          end else kx <= kx + 1;
        end else sg <= sg + 1'b1;
      end
      // collect group results into the output pixel
      if (res_valid) begin
        out_data[32'(rc)*PE*ABITS +: PE*ABITS] <= res;
        if (32'(rc) == NG-1) begin
          rc        <= '0;
          out_valid <= 1'b1;
        end else rc <= rc + 1'b1;
      end
      // hand the pixel on, move to the next one
      if (state == S_DRAIN && out_valid && out_ready) begin
        out_valid <= 1'b0;
        state     <= S_ISSUE;
        if (ox == W-1) begin
          ox <= 0;
          oy <= (oy == H-1) ? 0 : oy + 1;
        end else ox <= ox + 1;
      end
    end
  end

  // an offered result stays unchanged until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
