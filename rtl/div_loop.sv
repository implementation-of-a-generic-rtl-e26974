// div_loop: one step of non-restoring remainder computation.
//
// The divisor stays unshifted; instead the partial remainder is shifted
// left and the next dividend bit is brought in at the bottom, most
// significant dividend bit first. Then, as in non-restoring division, the
// divisor is subtracted when the partial remainder is not negative and
// added back when it is negative:
//   rem_nxt = 2*rem + bit - n   if rem >= 0
//   rem_nxt = 2*rem + bit + n   if rem <  0
// The controller (div_mod) supplies the two's complement of the divisor once,
// so the step never negates it itself. With -n <= rem < n the result stays in
// the same range, so the remainder needs W+1 bits plus a sign: W+2 in all.
//
// Interface: rem (signed, W+2 bits), bit_in, div_pos = n, div_neg = -n (both
// W+2 bits); rem_nxt out. Purely combinational.
module div_loop #(
  parameter int unsigned W = 256
) (
  input  logic signed [W+1:0] rem,
  input  logic                bit_in,
  input  logic signed [W+1:0] div_pos,
  input  logic signed [W+1:0] div_neg,
  output logic signed [W+1:0] rem_nxt
);

  logic signed [W+1:0] shifted;

  assign shifted = {rem[W:0], bit_in};
  assign rem_nxt = shifted + (rem[W+1] ? div_pos : div_neg);

endmodule
