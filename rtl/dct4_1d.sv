// dct4_1d: one 4-point 1-D DCT unit, forward or inverse, combinational.
//
// The 4x4 2-D DCT of the codec is two passes of this unit.  The transform
// matrix is the orthonormal 4-point DCT
//     T = [ h  h  h  h ; c1 c3 -c3 -c1 ; h -h -h  h ; c3 -c1 c1 -c3 ]
// with h = 1/2, c1 = cos(pi/8)/sqrt(2), c3 = sin(pi/8)/sqrt(2), held as 8-bit
// fractions (h = 128/256, c1 = 167/256, c3 = 69/256).  A butterfly splits the
// inputs into sums and differences, so the unit needs four constant
// multipliers and shifts; no multiplier takes two variable operands.
//   INVERSE = 0:  y = T x          (compressor)
//   INVERSE = 1:  y = transpose(T) x  (decompressor, same butterfly reversed)
// Each output is the exact product scaled by 2^-SHIFT and rounded half up, so
// SHIFT = 8 - (output fraction bits) + (input fraction bits).
//
// Interface: x[0..3] in, y[0..3] out, both signed; no clock, no latency.
// The document fixes a one-constant-operand 4-point DCT of low multiplier
// count and its use in both directions; the coefficient word length and
// rounding are this design's choices.
module dct4_1d #(
  parameter int unsigned IN_W    = 9,
  parameter int unsigned OUT_W   = 13,
  parameter int unsigned SHIFT   = 6,
  parameter bit          INVERSE = 1'b0
) (
  input  logic signed [IN_W-1:0]  x [4],
  output logic signed [OUT_W-1:0] y [4]
);

  localparam int unsigned ACC_W = IN_W + 12;
  localparam logic signed [ACC_W-1:0] H  = ACC_W'(128);
  localparam logic signed [ACC_W-1:0] C1 = ACC_W'(167);
  localparam logic signed [ACC_W-1:0] C3 = ACC_W'(69);
  localparam logic signed [ACC_W-1:0] RND = ACC_W'(1) <<< (SHIFT - 1);

  logic signed [ACC_W-1:0] a0, a1, a2, a3;   // sign-extended inputs
  logic signed [ACC_W-1:0] p0, p1, p2, p3;   // products before scaling

  always_comb begin
    a0 = ACC_W'(x[0]);
    a1 = ACC_W'(x[1]);
    a2 = ACC_W'(x[2]);
    a3 = ACC_W'(x[3]);
    if (!INVERSE) begin
      // even part on sums, odd part on differences
      p0 = H * ((a0 + a3) + (a1 + a2));
      p2 = H * ((a0 + a3) - (a1 + a2));
      p1 = C1 * (a0 - a3) + C3 * (a1 - a2);
      p3 = C3 * (a0 - a3) - C1 * (a1 - a2);
    end else begin
      // x holds coefficients X0..X3; rebuild samples from even/odd halves
      p0 = H * (a0 + a2) + (C1 * a1 + C3 * a3);
      p3 = H * (a0 + a2) - (C1 * a1 + C3 * a3);
      p1 = H * (a0 - a2) + (C3 * a1 - C1 * a3);
      p2 = H * (a0 - a2) - (C3 * a1 - C1 * a3);
    end
    y[0] = OUT_W'((p0 + RND) >>> SHIFT);
    y[1] = OUT_W'((p1 + RND) >>> SHIFT);
    y[2] = OUT_W'((p2 + RND) >>> SHIFT);
    y[3] = OUT_W'((p3 + RND) >>> SHIFT);
  end

endmodule
