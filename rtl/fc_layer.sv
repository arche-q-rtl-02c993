// fc_layer: fully-connected layer with a flatten buffer and a VATU.
//
// The incoming beats (IN_PAR 2-bit activations each, element 0 in the low
// bits) are stored one after another in a buffer, which flattens them into
// an IN_N-element vector (element index = beat * IN_PAR + lane). Once the
// vector is complete it is read back once for every group of PE output
// neurons, so the stored vector is reused for all OUT_N/PE groups instead of
// being streamed again from the layer before.
//
// Per group the controller issues IN_N/SIMD steps, one per cycle (SIMD
// elements each), then presents the group's PE results as one output beat
// (2-bit activations with HAS_ACT = 1, signed ACC_W accumulators with
// HAS_ACT = 0; neuron g*PE+p sits in lane p) and holds it until out_ready.
// Cycles per group are IN_N/SIMD plus 4. After the last group the buffer is
// released for the next vector. The buffer-and-reuse scheme is the design's;
// the beat format and group order are this design's choices.
module fc_layer
  import archeq_pkg::*;
#(
  parameter logic [2:0]  LAYER_ID = 3'd3,
  parameter int unsigned IN_N     = 128,
  parameter int unsigned IN_PAR   = 32,
  parameter int unsigned OUT_N    = 64,
  parameter int unsigned PE       = 32,
  parameter int unsigned SIMD     = 1,
  parameter bit          HAS_ACT  = 1'b1,
  localparam int unsigned OBITS = HAS_ACT ? ABITS : ACC_W,
  localparam int unsigned INW   = IN_PAR*ABITS,
  localparam int unsigned OUTW  = PE*OBITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [INW-1:0]  in_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [OUTW-1:0] out_data
);

  localparam int unsigned NB     = IN_N/IN_PAR;
  localparam int unsigned SF     = IN_N/SIMD;
  localparam int unsigned NG     = OUT_N/PE;
  localparam int unsigned WDEPTH = NG*SF;
  localparam int unsigned BAW    = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned BCW    = $clog2(NB+1);
  localparam int unsigned WAW    = (WDEPTH > 1) ? $clog2(WDEPTH) : 1;
  localparam int unsigned GAW    = (NG > 1) ? $clog2(NG) : 1;
  localparam int unsigned XW     = SIMD*ABITS;

  if (IN_N % IN_PAR != 0 || IN_PAR % SIMD != 0 || OUT_N % PE != 0) begin : g_fold_check
    $error("fc_layer: IN_PAR must divide IN_N, SIMD must divide IN_PAR, PE must divide OUT_N");
  end

  typedef enum logic [0:0] {S_ISSUE, S_WAIT} state_t;

  // ---------------- flatten buffer ----------------
  logic [INW-1:0] fbuf [NB];
  logic [BCW-1:0] wr_cnt;
  logic           release_buf;

  assign in_ready = (wr_cnt < BCW'(NB));

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) fbuf[BAW'(wr_cnt)] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    wr_cnt <= '0;
    else if (release_buf)          wr_cnt <= '0;
    else if (in_valid && in_ready) wr_cnt <= wr_cnt + 1'b1;
  end

  // ---------------- controller ----------------
  state_t         state;
  logic [GAW-1:0] g;
  int unsigned    i;
  logic           issue;
  logic [BAW-1:0] raddr;
  int unsigned    lane;

  always_comb begin
    issue = (state == S_ISSUE) && (wr_cnt == BCW'(NB));
    raddr = BAW'((i*SIMD) / IN_PAR);
    lane  = (i*SIMD) % IN_PAR;
  end

  logic [INW-1:0] rd_word;
  int unsigned    lane_q;
  logic [XW-1:0]  x;

  always_ff @(posedge clk) begin
    rd_word <= fbuf[raddr];
    lane_q  <= lane;
  end

  assign x = rd_word[lane_q*ABITS +: XW];

  logic            res_valid;
  logic [OUTW-1:0] res;

  vatu #(.LAYER_ID(LAYER_ID), .PE(PE), .SIMD(SIMD), .IBITS(ABITS),
         .WDEPTH(WDEPTH), .NGRP(NG), .HAS_ACT(HAS_ACT)) u_vatu (
    .clk, .rst_n, .cfg,
    .in_valid(issue), .in_waddr(WAW'(32'(g)*SF + i)), .in_grp(g),
    .in_first(i == 0), .in_last(i == SF-1),
    .in_x(x), .res_valid, .res
  );

  assign release_buf = (state == S_WAIT) && out_valid && out_ready && (32'(g) == NG-1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_ISSUE;
      g         <= '0;
      i         <= 0;
      out_valid <= 1'b0;
    end else begin
      if (issue) begin
        if (i == SF-1) begin
          i     <= 0;
          state <= S_WAIT;
        end else i <= i + 1;
      end
      if (res_valid) begin
        out_data  <= res;
        out_valid <= 1'b1;
      end
      if (state == S_WAIT && out_valid && out_ready) begin
        out_valid <= 1'b0;
        state     <= S_ISSUE;
        g         <= (32'(g) == NG-1) ? '0 : g + 1'b1;
      end
    end
  end

  // an offered result stays unchanged until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
