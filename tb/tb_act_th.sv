// tb_act_th: self-checking test of the multi-threshold activation unit.
// Random accumulators against random ascending thresholds, plus values placed
// exactly on a threshold; the expected activation is counted here.
module tb_act_th;
  import archeq_pkg::*;
  localparam int PE = 4;
  acc_t [PE-1:0] acc;
  logic [PE-1:0][NTH*TBITS-1:0] th;
  logic [PE-1:0][ABITS-1:0] act;
  int checks = 0, failures = 0;
  int t[NTH];

  act_th #(.PE(PE)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int p = 0; p < PE; p++) begin
        t[0] = $urandom_range(0, 200) - 100;
        t[1] = t[0] + $urandom_range(0, 60);
        t[2] = t[1] + $urandom_range(0, 60);
        for (int k = 0; k < NTH; k++) th[p][k*TBITS +: TBITS] = TBITS'(t[k]);
        case ($urandom_range(0, 3))
          0:       acc[p] = acc_t'(t[$urandom_range(0, 2)]);          // on a threshold
          1:       acc[p] = acc_t'(t[$urandom_range(0, 2)] - 1);      // just below
          default: acc[p] = acc_t'($urandom_range(0, 400) - 200);
        endcase
      end
      #1;
      for (int p = 0; p < PE; p++) begin
        int e, a;
        a = int'(acc[p]);
        e = 0;
        for (int k = 0; k < NTH; k++) if (a >= int'($signed(th[p][k*TBITS +: TBITS]))) e++;
        checks++;
        if (int'(act[p]) != e) begin
          failures++;
          if (failures < 10) $display("acc %0d: got %0d exp %0d", a, act[p], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
