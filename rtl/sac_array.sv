// sac_array: select-accumulate (SAC) processing elements for 1-bit inputs.
//
// The first convolution sees a binarized occupancy grid, so a product of an
// input bit and a ternary weight is just "the weight or zero". Each of the PE
// units adds, per cycle, the SIMD selected weights of its lanes to its
// accumulator; no multiplier is involved. This follows the SAC idea of the
// design; lane count, widths and the first-flag protocol are our own choices.
//
// Interface: when en is high, every PE p computes
//   acc[p] <= (first ? 0 : acc[p]) + sum_l (x[l] ? w[p][l] : 0)
// where w[p][l] is the 2-bit two's-complement field at bit (p*SIMD+l)*WBITS.
// acc is registered: the new sum is visible the cycle after en.
module sac_array
  import archeq_pkg::*;
#(
  parameter int unsigned PE   = 8,
  parameter int unsigned SIMD = 1
) (
  input  logic                      clk,
  input  logic                      en,
  input  logic                      first,
  input  logic [SIMD-1:0]           x,
  input  logic [PE*SIMD*WBITS-1:0]  w,
  output acc_t [PE-1:0]             acc
);

  acc_t [PE-1:0] psum;

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      psum[p] = '0;
      for (int l = 0; l < SIMD; l++) begin
        logic signed [WBITS-1:0] wl;
        wl = w[(p*SIMD+l)*WBITS +: WBITS];
        // select: the weight when the input bit is set, zero otherwise
        if (x[l]) psum[p] = psum[p] + acc_t'(wl);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      for (int p = 0; p < PE; p++)
        acc[p] <= (first ? acc_t'(0) : acc[p]) + psum[p];
    end
  end

endmodule
