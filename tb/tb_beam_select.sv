// tb_beam_select: self-checking test of the beam index selection. Random
// score vectors (including deliberate ties and all-negative vectors) are fed
// in PAR-wide beats with random gaps; index and score of the maximum (lowest
// index on ties) are compared with values computed here, and the result must
// appear exactly once per vector with out_ready back-pressure applied.
module tb_beam_select;
  import archeq_pkg::*;
  localparam int N = 64, PAR = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [PAR*ACC_W-1:0] in_data;
  logic [5:0] out_idx;
  acc_t out_score;
  int checks = 0, failures = 0;
  int sc [N];

  beam_select #(.N(N), .PAR(PAR)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 200; v++) begin
      int best, bi;
      for (int i = 0; i < N; i++) begin
        if (v % 3 == 0) sc[i] = $urandom_range(0, 6) - 3;            // many ties
        else if (v % 3 == 1) sc[i] = -int'($urandom_range(1, 30000)); // all negative
        else sc[i] = int'($urandom_range(0, 60000)) - 30000;
      end
      best = sc[0]; bi = 0;
      for (int i = 1; i < N; i++) if (sc[i] > best) begin best = sc[i]; bi = i; end
      for (int b = 0; b < N/PAR; b++) begin
        for (int l = 0; l < PAR; l++) in_data[l*ACC_W +: ACC_W] = ACC_W'(sc[b*PAR+l]);
        in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      out_ready = 1;
      @(posedge clk);
      while (!out_valid) @(posedge clk);
      checks++;
      if (int'(out_idx) != bi || int'(out_score) != best) begin
        failures++;
        if (failures < 10) $display("vector %0d: got %0d/%0d exp %0d/%0d", v, out_idx, out_score, bi, best);
      end
      @(negedge clk);
      out_ready = 0;
      checks++;
      if (out_valid) begin failures++; $display("result repeated"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
