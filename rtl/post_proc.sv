// Output stage applied to each finished sum before it is written back:
//   t = acc + bias                      (per-output-channel offset)
//   u = round(t * mant / 2^shift)       (scale factor mant * 2^-shift, round half up)
//   v = relu ? max(u, 0) : u            (activation)
//   y = saturate v to signed 8 bits, sign-extended to 32 bits
// With raw set, y = acc unchanged (32-bit partial sums for further
// accumulation or for checking). Purely combinational.
// The document names floating-point scaling, offset biasing and activation
// functions; representing the scale as a 16-bit mantissa with a binary
// exponent, the order of the steps and ReLU as the activation are this
// design's own.
module post_proc
  import rs_pkg::*;
(
  input  psum_t       acc,
  input  psum_t       bias,
  input  logic [15:0] scale_mant,
  input  logic [5:0]  scale_shift,
  input  logic        relu,
  input  logic        raw,
  output logic [31:0] y
);

  logic signed [63:0] t, u, half;

  always_comb begin
    t    = 64'(acc) + 64'(bias);
    u    = t * $signed({48'd0, scale_mant});
    half = (scale_shift == 0) ? 64'sd0 : (64'sd1 <<< (scale_shift - 6'd1));
    u    = (u + half) >>> scale_shift;
    if (relu && u < 0) u = 0;
    if (u > 64'sd127)       u = 64'sd127;
    else if (u < -64'sd128) u = -64'sd128;
    y = raw ? 32'(acc) : {{24{u[7]}}, u[7:0]};
  end

endmodule
