// act_th: multi-threshold activation ("Act & Th") of a VATU.
//
// Batch normalisation and the 2-bit quantised activation are folded into
// three thresholds per channel. The output of PE p is the number of its
// thresholds that the accumulator reaches (acc >= T), 0..3. Thresholds are
// expected in ascending order; the count is correct for any order anyway.
// Purely combinational. Folding batch normalisation into thresholds is the
// design's method; the >= rule and the 16-bit widths are our own choices.
//
// th[p] packs {T2, T1, T0}, each a signed TBITS value, T0 in the low bits.
module act_th
  import archeq_pkg::*;
#(
  parameter int unsigned PE = 8
) (
  input  acc_t [PE-1:0]                 acc,
  input  logic [PE-1:0][NTH*TBITS-1:0]  th,
  output logic [PE-1:0][ABITS-1:0]      act
);

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      act[p] = '0;
      for (int t = 0; t < NTH; t++) begin
        th_t tv;
        tv = th[p][t*TBITS +: TBITS];
        if (acc[p] >= acc_t'(tv)) act[p] = act[p] + 1'b1;
      end
    end
  end

endmodule
