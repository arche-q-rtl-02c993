// caa_array: conditional-add-accumulate (CAA) processing elements for 2-bit
// activations and 2-bit weights.
//
// A 2-bit two's-complement weight w = {w1,w0} has the value -2*w1 + w0, so
// a*w is the sum of two conditional terms: a (if w0) and -(2a) (if w1). The
// negation is an XOR of the shifted activation with w1 plus w1 as carry-in,
// so a product costs XOR gates and an adder instead of a multiplier. This is
// the CAA principle of the design; the exact decomposition is our own.
//
// Interface: when en is high, every PE p computes
//   acc[p] <= (first ? 0 : acc[p]) + sum_l a[l] * w[p][l]
// with a[l] = x[l*ABITS +: ABITS] unsigned and w[p][l] at bit (p*SIMD+l)*WBITS.
// acc is registered: the new sum is visible the cycle after en.
module caa_array
  import archeq_pkg::*;
#(
  parameter int unsigned PE   = 8,
  parameter int unsigned SIMD = 4
) (
  input  logic                      clk,
  input  logic                      en,
  input  logic                      first,
  input  logic [SIMD*ABITS-1:0]     x,
  input  logic [PE*SIMD*WBITS-1:0]  w,
  output acc_t [PE-1:0]             acc
);

  localparam int unsigned TW = ABITS + 3;  // holds -(2*3) .. +3

  acc_t [PE-1:0] psum;

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      psum[p] = '0;
      for (int l = 0; l < SIMD; l++) begin
        logic [ABITS-1:0]     a;
        logic [WBITS-1:0]     wl;
        logic signed [TW-1:0] t0, t1;
        a  = x[l*ABITS +: ABITS];
        wl = w[(p*SIMD+l)*WBITS +: WBITS];
        // term for w0: add a
        t0 = wl[0] ? TW'(a) : '0;
        // term for w1: add -(2a) = ((2a AND w1) XOR w1) + w1, i.e. the
        // one's complement of 2a plus a carry-in when w1 is set, else 0
        t1 = ((TW'({a, 1'b0}) & {TW{wl[1]}}) ^ {TW{wl[1]}}) + TW'(wl[1]);
        psum[p] = psum[p] + acc_t'(t0) + acc_t'(t1);
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
