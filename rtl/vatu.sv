// vatu: vector arithmetic and threshold unit.
//
// One VATU holds a layer's weight/threshold memories, its array of DSP-free
// processing elements and the threshold activation stage. IBITS = 1 selects
// select-accumulate PEs (binarized first-layer input), IBITS = 2 selects
// conditional-add-accumulate PEs (2-bit activations). HAS_ACT = 0 skips the
// thresholds and returns the raw accumulators (used by the final layer); it
// also leaves out the threshold RAM, whose read port th_q is then unused.
//
// Operation: the controller issues one fold step per cycle with in_valid,
// the weight address, the channel group (threshold row) and first/last flags
// of the accumulation. The operand vector in_x must be presented ONE cycle
// after its step is issued, which is where a synchronous-read activation
// buffer delivers it. Timing: step issued at cycle t -> weights and in_x used
// at t+1 -> accumulator updated at t+2 -> on a last step, res (PE values,
// OBITS each, PE 0 in the low bits) is registered and res_valid pulses for one
// cycle at t+3. Consecutive accumulations may be issued back to back.
// The grouping of PEs with their weight and threshold memories is the
// design's; the pipeline depth and the issue protocol are our own choices.
module vatu
  import archeq_pkg::*;
#(
  parameter logic [2:0]  LAYER_ID = 3'd0,
  parameter int unsigned PE       = 8,
  parameter int unsigned SIMD     = 1,
  parameter int unsigned IBITS    = 1,
  parameter int unsigned WDEPTH   = 18,
  parameter int unsigned NGRP     = 2,
  parameter bit          HAS_ACT  = 1'b1,
  localparam int unsigned OBITS = HAS_ACT ? ABITS : ACC_W,
  localparam int unsigned WAW   = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned GAW   = (NGRP > 1) ? $clog2(NGRP) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  cfg_t                   cfg,
  input  logic                   in_valid,
  input  logic [WAW-1:0]         in_waddr,
  input  logic [GAW-1:0]         in_grp,
  input  logic                   in_first,
  input  logic                   in_last,
  input  logic [SIMD*IBITS-1:0]  in_x,       // one cycle after in_valid
  output logic                   res_valid,
  output logic [PE*OBITS-1:0]    res
);

  logic [PE*SIMD*WBITS-1:0]     w_q;
  logic [PE-1:0][NTH*TBITS-1:0] th_q;
  logic                         v1, f1, l1, v2;
  acc_t [PE-1:0]                acc;

  wth_mem #(.LAYER_ID(LAYER_ID), .PE(PE), .SIMD(SIMD), .WDEPTH(WDEPTH), .NGRP(NGRP),
            .HAS_TH(HAS_ACT)) u_mem (
    .clk, .cfg,
    .w_raddr(in_waddr), .w_rdata(w_q),
    .t_raddr(in_grp),   .t_rdata(th_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      f1 <= 1'b0;
      l1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      f1 <= in_first;
      l1 <= in_last;
      v2 <= v1 && l1;
    end
  end

  if (IBITS == 1) begin : g_sac
    sac_array #(.PE(PE), .SIMD(SIMD)) u_pe (
      .clk, .en(v1), .first(f1), .x(in_x), .w(w_q), .acc(acc));
  end else begin : g_caa
    caa_array #(.PE(PE), .SIMD(SIMD)) u_pe (
      .clk, .en(v1), .first(f1), .x(in_x), .w(w_q), .acc(acc));
  end

  logic [PE*OBITS-1:0] res_d;

  if (HAS_ACT) begin : g_act
    // thresholds held for the cycle in which the final sum is in acc
    logic [PE-1:0][NTH*TBITS-1:0] th_q2;
    logic [PE-1:0][ABITS-1:0]     act;
    always_ff @(posedge clk) th_q2 <= th_q;
    act_th #(.PE(PE)) u_act (.acc(acc), .th(th_q2), .act(act));
    assign res_d = act;
  end else begin : g_raw
    assign res_d = acc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) res_valid <= 1'b0;
    else        res_valid <= v2;
    if (v2) res <= res_d;
  end

endmodule
