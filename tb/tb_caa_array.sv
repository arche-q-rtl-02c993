// tb_caa_array: self-checking test of the conditional-add-accumulate PE array.
// Random 2-bit activations and all four 2-bit weight values are applied in random-length
// accumulation runs (first flag restarts the sum), with idle cycles mixed in;
// every cycle's accumulators are compared with sums computed here.
module tb_caa_array;
  import archeq_pkg::*;
  localparam int PE = 4, SIMD = 4;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en, first;
  logic [SIMD*ABITS-1:0] x;
  logic [PE*SIMD*WBITS-1:0] w;
  acc_t [PE-1:0] acc;
  int checks = 0, failures = 0;
  int ref_acc [PE];

  caa_array #(.PE(PE), .SIMD(SIMD)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; first = 0; x = '0; w = '0;
    @(negedge clk);
    for (int step = 0; step < 600; step++) begin
      en    = ($urandom_range(0, 4) != 0);
      first = (step == 0) || ($urandom_range(0, 6) == 0);
      x     = (SIMD*ABITS)'($urandom);
      for (int j = 0; j < PE*SIMD; j++) begin
        int v;
        v = $urandom_range(0, 3) - 2;          // -2..+1
        w[j*WBITS +: WBITS] = WBITS'(v);
      end
      if (en) begin
        for (int p = 0; p < PE; p++) begin
          int s;
          s = 0;
          for (int l = 0; l < SIMD; l++)
            s += int'(x[l*ABITS +: ABITS]) * int'($signed(w[(p*SIMD+l)*WBITS +: WBITS]));
          ref_acc[p] = (first ? 0 : ref_acc[p]) + s;
        end
      end
      @(negedge clk);
      if (en || step > 0) begin
        for (int p = 0; p < PE; p++) begin
          checks++;
          if (int'(acc[p]) != ref_acc[p]) begin
            failures++;
            if (failures < 10) $display("step %0d pe %0d: got %0d exp %0d", step, p, acc[p], ref_acc[p]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
