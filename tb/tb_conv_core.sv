// tb_conv_core: self-checking test of the convolution core (CAA variant).
// A small non-square frame (H=6, W=5, 4 -> 4 channels, PE=2, SIMD=2) is
// convolved for three frames with random weights and thresholds loaded over
// the configuration bus. Frame 0 runs without back-pressure and its output
// pixel spacing is checked against the fold count (NG*K*K*SG + 4 cycles);
// later frames use random input gaps and random out_ready. Every output
// pixel is compared with the reference convolution.
module tb_conv_core;
  import archeq_pkg::*;
  `include "tb_ref.svh"
  localparam int H = 6, W = 5, CIN = 4, COUT = 4, PE = 2, SIMD = 2, K = 3;
  localparam int NG = COUT/PE, SG = CIN/SIMD, STEPS = NG*K*K*SG;
  localparam int NFR = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  cfg_t cfg;
  logic [CIN*2-1:0] in_data;
  logic [COUT*2-1:0] out_data;
  int checks = 0, failures = 0, cyc = 0;
  arr_t w, th, fm [NFR], ref_o [NFR];
  int nout = 0, last_out = -1, gap_bad = 0, gaps = 0;

  conv_core #(.LAYER_ID(3'd1), .H(H), .W(W), .CIN(CIN), .COUT(COUT), .PE(PE),
              .SIMD(SIMD), .IBITS(2), .K(K)) dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && out_ready) begin
      int f, px;
      f = nout / (H*W); px = nout % (H*W);
      if (f == 0 && px > W && last_out >= 0) begin
        gaps++;
        if (cyc - last_out != STEPS + 4) begin gap_bad++; if (gap_bad < 3) $display("gap %0d", cyc - last_out); end
      end
      last_out = cyc;
      for (int c = 0; c < COUT; c++) begin
        checks++;
        if (int'(out_data[c*2 +: 2]) != ref_o[f][px*COUT+c]) begin
          failures++;
          if (failures < 10) $display("frame %0d pixel %0d ch %0d: got %0d exp %0d", f, px, c, out_data[c*2 +: 2], ref_o[f][px*COUT+c]);
        end
      end
      nout++;
    end
  end

  task automatic wr(input logic is_th, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.layer = 3'd1; cfg.is_th = is_th; cfg.addr = CFG_AW'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    rst_n = 0; cfg = '0; in_valid = 0; in_data = '0; out_ready = 1;
    w  = rand_w(COUT*CIN*K*K, 0);
    th = rand_th(COUT, 0, 6);
    for (int f = 0; f < NFR; f++) begin
      fm[f] = new [H*W*CIN];
      foreach (fm[f][i]) fm[f][i] = $urandom_range(0, 3);
      ref_o[f] = conv(fm[f], H, W, CIN, COUT, K, w, th);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < STEPS; a++) wr(0, a, conv_word(w, CIN, PE, SIMD, K, a));
    for (int c = 0; c < COUT; c++) wr(1, c, th_word(th, c));
    fork
      for (int f = 0; f < NFR; f++)
        for (int px = 0; px < H*W; px++) begin
          @(negedge clk);
          if (f > 0) while ($urandom_range(0, 2) == 0) @(negedge clk);
          in_valid = 1;
          for (int c = 0; c < CIN; c++) in_data[c*2 +: 2] = 2'(fm[f][px*CIN+c]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1 in_valid = 0;
        end
      forever begin
        @(negedge clk);
        out_ready = (nout < H*W) ? 1'b1 : ($urandom_range(0, 2) != 0);
      end
    join_any
    wait (nout == NFR*H*W);
    repeat (5) @(negedge clk);
    checks++;
    if (gaps == 0 || gap_bad != 0) begin
      failures++; $display("pixel rate: %0d of %0d gaps not %0d cycles", gap_bad, gaps, STEPS+4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
