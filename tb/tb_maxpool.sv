// tb_maxpool: self-checking test of the im2col-less max-pool stage.
// Odd-sized frames (H=5, W=7, 3 channels, P=2) exercise the dropped edge
// row/column; three frames are streamed with random input gaps and random
// out_ready. Every pooled pixel is compared with the reference pooling, the
// output count per frame is checked, and the pooled pixel rate without
// back-pressure (P*P+2 cycles) is checked on frame 0 once its input is in.
module tb_maxpool;
  import archeq_pkg::*;
  `include "tb_ref.svh"
  localparam int H = 5, W = 7, C = 3, P = 2, NFR = 3;
  localparam int NO = (H/P)*(W/P);
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [C*2-1:0] in_data, out_data;
  int checks = 0, failures = 0, cyc = 0, nout = 0, last_out = -1, gaps = 0, gap_bad = 0;
  arr_t fm [NFR], ref_o [NFR];

  maxpool #(.H(H), .W(W), .C(C), .P(P)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid && out_ready) begin
      int f, px;
      f = nout / NO; px = nout % NO;
      if (f == 0 && px >= NO - (W/P) + 1) begin
        gaps++;
        if (cyc - last_out != P*P + 2) begin gap_bad++; $display("gap %0d", cyc - last_out); end
      end
      last_out = cyc;
      for (int c = 0; c < C; c++) begin
        checks++;
        if (int'(out_data[c*2 +: 2]) != ref_o[f][px*C+c]) begin
          failures++;
          if (failures < 10) $display("frame %0d px %0d ch %0d: got %0d exp %0d", f, px, c, out_data[c*2 +: 2], ref_o[f][px*C+c]);
        end
      end
      nout++;
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; in_data = '0; out_ready = 1;
    for (int f = 0; f < NFR; f++) begin
      fm[f] = new [H*W*C];
      foreach (fm[f][i]) fm[f][i] = $urandom_range(0, 3);
      ref_o[f] = pool(fm[f], H, W, C, P);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      for (int f = 0; f < NFR; f++)
        for (int px = 0; px < H*W; px++) begin
          @(negedge clk);
          if (f > 0) while ($urandom_range(0, 2) == 0) @(negedge clk);
          in_valid = 1;
          for (int c = 0; c < C; c++) in_data[c*2 +: 2] = 2'(fm[f][px*C+c]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1 in_valid = 0;
        end
      forever begin
        @(negedge clk);
        out_ready = (nout < NO) ? 1'b1 : ($urandom_range(0, 2) != 0);
      end
    join_any
    wait (nout == NFR*NO);
    repeat (20) @(negedge clk);
    checks++;
    if (nout != NFR*NO || gaps == 0 || gap_bad != 0) begin
      failures++; $display("count %0d, rate gaps %0d bad %0d", nout, gaps, gap_bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
