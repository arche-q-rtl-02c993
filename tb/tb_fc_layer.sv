// tb_fc_layer: self-checking test of the buffered fully-connected layer.
// Two instances: one with thresholds (16 -> 8, 4-element input beats,
// PE = 4, SIMD = 2) and one without (raw sums, PE = 2, SIMD = 1), both fed
// the same three input vectors with random gaps and random out_ready. Every
// output neuron is compared with the reference, and the group rate without
// back-pressure (IN_N/SIMD + 4 cycles per output beat) is checked.
module tb_fc_layer;
  import archeq_pkg::*;
  `include "tb_ref.svh"
  localparam int IN_N = 16, IN_PAR = 4, OUT_N = 8, NV = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, a_in_ready, b_in_ready;
  cfg_t cfg;
  logic [IN_PAR*2-1:0] in_data;
  logic a_valid, b_valid, a_ready, b_ready;
  logic [4*2-1:0] a_data;
  logic [2*ACC_W-1:0] b_data;
  int checks = 0, failures = 0, cyc = 0, na = 0, nb = 0, a_last = -1, gap_bad = 0, gaps = 0;
  arr_t wa, wb, th, v [NV], ra [NV], rb [NV];

  fc_layer #(.LAYER_ID(3'd3), .IN_N(IN_N), .IN_PAR(IN_PAR), .OUT_N(OUT_N), .PE(4), .SIMD(2), .HAS_ACT(1'b1)) u_a (
    .clk, .rst_n, .cfg, .in_valid(in_valid && b_in_ready), .in_ready(a_in_ready), .in_data,
    .out_valid(a_valid), .out_ready(a_ready), .out_data(a_data));
  fc_layer #(.LAYER_ID(3'd4), .IN_N(IN_N), .IN_PAR(IN_PAR), .OUT_N(OUT_N), .PE(2), .SIMD(1), .HAS_ACT(1'b0)) u_b (
    .clk, .rst_n, .cfg, .in_valid(in_valid && a_in_ready), .in_ready(b_in_ready), .in_data,
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d/%0d outputs", na, nb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && a_valid && a_ready) begin
      int f, g;
      f = na / (OUT_N/4); g = na % (OUT_N/4);
      if (f == 0 && g > 0) begin
        gaps++;
        if (cyc - a_last != IN_N/2 + 4) begin gap_bad++; $display("gap %0d", cyc - a_last); end
      end
      a_last = cyc;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (int'(a_data[p*2 +: 2]) != ra[f][g*4+p]) begin
          failures++; $display("A vec %0d neuron %0d: got %0d exp %0d", f, g*4+p, a_data[p*2 +: 2], ra[f][g*4+p]);
        end
      end
      na++;
    end
    if (rst_n && b_valid && b_ready) begin
      int f, g;
      f = nb / (OUT_N/2); g = nb % (OUT_N/2);
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (int'($signed(b_data[p*ACC_W +: ACC_W])) != rb[f][g*2+p]) begin
          failures++; $display("B vec %0d neuron %0d: got %0d exp %0d", f, g*2+p, $signed(b_data[p*ACC_W +: ACC_W]), rb[f][g*2+p]);
        end
      end
      nb++;
    end
  end

  task automatic wr(input logic [2:0] layer, input logic is_th, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.layer = layer; cfg.is_th = is_th; cfg.addr = CFG_AW'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    rst_n = 0; cfg = '0; in_valid = 0; in_data = '0; a_ready = 1; b_ready = 1;
    wa = rand_w(OUT_N*IN_N, 0);
    wb = rand_w(OUT_N*IN_N, 0);
    th = rand_th(OUT_N, 0, 5);
    for (int f = 0; f < NV; f++) begin
      v[f] = new [IN_N];
      foreach (v[f][i]) v[f][i] = $urandom_range(0, 3);
      ra[f] = fc(v[f], IN_N, OUT_N, wa, th, 1);
      rb[f] = fc(v[f], IN_N, OUT_N, wb, th, 0);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < (OUT_N/4)*(IN_N/2); a++) wr(3'd3, 0, a, fc_word(wa, IN_N, 4, 2, a));
    for (int a = 0; a < (OUT_N/2)*IN_N; a++)     wr(3'd4, 0, a, fc_word(wb, IN_N, 2, 1, a));
    for (int c = 0; c < OUT_N; c++) wr(3'd3, 1, c, th_word(th, c));
    fork
      for (int f = 0; f < NV; f++)
        for (int b = 0; b < IN_N/IN_PAR; b++) begin
          @(negedge clk);
          if (f > 0) while ($urandom_range(0, 2) == 0) @(negedge clk);
          in_valid = 1;
          for (int l = 0; l < IN_PAR; l++) in_data[l*2 +: 2] = 2'(v[f][b*IN_PAR+l]);
          @(posedge clk);
          while (!(a_in_ready && b_in_ready)) @(posedge clk);
          #1 in_valid = 0;
        end
      forever begin
        @(negedge clk);
        a_ready = (na < OUT_N/4) ? 1'b1 : ($urandom_range(0, 2) != 0);
        b_ready = ($urandom_range(0, 2) != 0);
      end
    join_any
    wait (na == NV*OUT_N/4 && nb == NV*OUT_N/2);
    repeat (20) @(negedge clk);
    checks++;
    if (gaps == 0 || gap_bad != 0) begin failures++; $display("rate: %0d of %0d gaps wrong", gap_bad, gaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
