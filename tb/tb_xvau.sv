// tb_xvau: self-checking test of a fused XVAU layer in its first-layer form
// (binary input, SAC PEs). A 6x8 binary frame, 1 -> 4 channels with PE = 2,
// is convolved, thresholded and 2x2 max-pooled; three frames are streamed
// with random input gaps and random out_ready, and every pooled output is
// compared with the reference conv + pool.
module tb_xvau;
  import archeq_pkg::*;
  `include "tb_ref.svh"
  localparam int H = 6, W = 8, CIN = 1, COUT = 4, PE = 2, K = 3, P = 2, NFR = 3;
  localparam int NO = (H/P)*(W/P), STEPS = (COUT/PE)*K*K;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  cfg_t cfg;
  logic [0:0] in_data;
  logic [COUT*2-1:0] out_data;
  int checks = 0, failures = 0, nout = 0;
  arr_t w, th, fm [NFR], ref_o [NFR];

  xvau #(.LAYER_ID(3'd0), .H(H), .W(W), .CIN(CIN), .COUT(COUT), .PE(PE), .SIMD(1),
         .IBITS(1), .K(K), .P(P)) dut (.*);

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int f, px;
      f = nout / NO; px = nout % NO;
      for (int c = 0; c < COUT; c++) begin
        checks++;
        if (int'(out_data[c*2 +: 2]) != ref_o[f][px*COUT+c]) begin
          failures++;
          if (failures < 10) $display("frame %0d px %0d ch %0d: got %0d exp %0d", f, px, c, out_data[c*2 +: 2], ref_o[f][px*COUT+c]);
        end
      end
      nout++;
    end
  end

  task automatic wr(input logic is_th, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.layer = 3'd0; cfg.is_th = is_th; cfg.addr = CFG_AW'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    arr_t cv;
    rst_n = 0; cfg = '0; in_valid = 0; in_data = '0; out_ready = 1;
    w  = rand_w(COUT*CIN*K*K, 1);
    th = rand_th(COUT, 0, 2);
    for (int f = 0; f < NFR; f++) begin
      fm[f] = new [H*W];
      foreach (fm[f][i]) fm[f][i] = $urandom_range(0, 1);
      cv = conv(fm[f], H, W, CIN, COUT, K, w, th);
      ref_o[f] = pool(cv, H, W, COUT, P);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < STEPS; a++) wr(0, a, conv_word(w, CIN, PE, 1, K, a));
    for (int c = 0; c < COUT; c++) wr(1, c, th_word(th, c));
    fork
      for (int f = 0; f < NFR; f++)
        for (int px = 0; px < H*W; px++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid = 1;
          in_data  = 1'(fm[f][px]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1 in_valid = 0;
        end
      forever begin
        @(negedge clk);
        out_ready = ($urandom_range(0, 2) != 0);
      end
    join_any
    wait (nout == NFR*NO);
    repeat (50) @(negedge clk);
    checks++;
    if (nout != NFR*NO) begin failures++; $display("extra outputs: %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
