// wth_mem: the weight and threshold memories ("w & Th BRAM") of one VATU.
//
// Weight RAM: WDEPTH words, one per fold step, each holding the PE*SIMD 2-bit
// weights used together in one cycle (PE-major, lane-minor). Threshold RAM:
// NGRP rows, one per output-channel group, each holding NTH thresholds for
// every PE. Both are read synchronously (data one cycle after the address),
// as block RAM is. Both are written over the shared configuration bus when
// cfg.layer equals LAYER_ID; a threshold write fills one PE entry of a row
// (addr = group*PE + pe). With HAS_TH = 0 (a layer without thresholds) the
// threshold RAM is left out, t_raddr is unused and t_rdata reads zero.
// Contents are not reset:
// they must be loaded before inference. The loading scheme is this design's
// choice.
module wth_mem
  import archeq_pkg::*;
#(
  parameter logic [2:0]  LAYER_ID = 3'd0,
  parameter int unsigned PE       = 8,
  parameter int unsigned SIMD     = 1,
  parameter int unsigned WDEPTH   = 18,
  parameter int unsigned NGRP     = 2,
  parameter bit          HAS_TH   = 1'b1,
  localparam int unsigned WW  = PE*SIMD*WBITS,
  localparam int unsigned WAW = (WDEPTH > 1) ? $clog2(WDEPTH) : 1,
  localparam int unsigned GAW = (NGRP > 1) ? $clog2(NGRP) : 1
) (
  input  logic                          clk,
  input  cfg_t                          cfg,
  input  logic [WAW-1:0]                w_raddr,
  output logic [WW-1:0]                 w_rdata,
  input  logic [GAW-1:0]                t_raddr,
  output logic [PE-1:0][NTH*TBITS-1:0]  t_rdata
);

  if (WW > CFG_DW) begin : g_width_check
    $error("wth_mem: weight word wider than the configuration bus");
  end

  logic [WW-1:0] wmem [WDEPTH];

  logic hit;
  assign hit = cfg.we && (cfg.layer == LAYER_ID);

  always_ff @(posedge clk) begin
    if (hit && !cfg.is_th && (32'(cfg.addr) < WDEPTH))
      wmem[WAW'(cfg.addr)] <= cfg.data[WW-1:0];
    w_rdata <= wmem[w_raddr];
  end

  if (HAS_TH) begin : g_th
    logic [PE-1:0][NTH*TBITS-1:0] tmem [NGRP];
    always_ff @(posedge clk) begin
      if (hit && cfg.is_th && (32'(cfg.addr) < NGRP*PE))
        tmem[GAW'(32'(cfg.addr) / PE)][32'(cfg.addr) % PE] <= cfg.data[NTH*TBITS-1:0];
      t_rdata <= tmem[t_raddr];
    end
  end else begin : g_no_th
    assign t_rdata = '0;
  end

endmodule
