// cordic: pipelined CORDIC processor for sine and cosine.
//
// The processor rotates the vector (Xin, Yin) by angle. It is the fully
// unrolled CORDIC: a quadrant fold brings the angle into -90..+90 degrees,
// then ITER micro-rotation stages follow, each with wired shifts, three
// add/subtract units, a hardwired arctangent constant and a pipeline
// register. Every stage turns the vector by +/-atan(2**-i) so that the
// residual angle z is driven toward zero. The outputs are
//     Xout = K * (Xin*cos(angle) - Yin*sin(angle))
//     Yout = K * (Xin*sin(angle) + Yin*cos(angle))
// to within the residual-angle and truncation error, where K is the CORDIC
// gain (1.646744 for ITER = 8). No gain-correction multiplier is built:
// for sine and cosine the caller pre-scales the start vector, e.g.
// Xin = round(A / K), Yin = 0 gives Xout = A*cos(angle), Yout = A*sin(angle).
//
// Timing: one input per clock; the result for the input sampled at clock
// edge n is on Xout/Yout after edge n + ITER - 1 (ITER = 8 register
// stages, i.e. it is visible 8 clocks after it was presented, the last
// stage's register driving the outputs).
// Formats: angle is a binary angle (2**32 = 360 degrees); Xin/Yin are
// signed 16-bit; Xout/Yout signed 17-bit. Keep sqrt(Xin**2 + Yin**2) at or
// below 2**15 so that K times it fits the 17-bit outputs.
//
// Follows the document: port names and widths, rotation-mode operation,
// pipelined unrolled stages with hardwired constants, eight-clock latency,
// no scaling module. Own choices: binary-angle encoding, quadrant folding,
// 17-bit internal coordinates, truncating shifts, no reset.
module cordic
  import cordic_pkg::*;
#(
  parameter int unsigned IN_W    = 16,
  parameter int unsigned ANGLE_W = 32,
  parameter int unsigned ITER    = 8
) (
  input  logic                    clock,
  input  logic        [ANGLE_W-1:0] angle,
  input  logic signed [IN_W-1:0]  Xin,
  input  logic signed [IN_W-1:0]  Yin,
  output logic signed [IN_W:0]    Xout,
  output logic signed [IN_W:0]    Yout
);

  localparam int unsigned XY_W = IN_W + 1;

  // Stage boundaries: index 0 is the folded input, index ITER the output.
  logic signed [XY_W-1:0]    x_s [ITER+1];
  logic signed [XY_W-1:0]    y_s [ITER+1];
  logic signed [ANGLE_W-1:0] z_s [ITER+1];

  cordic_prerotate #(
    .IN_W (IN_W),
    .Z_W  (ANGLE_W)
  ) u_fold (
    .x_i     (Xin),
    .y_i     (Yin),
    .angle_i (angle),
    .x_o     (x_s[0]),
    .y_o     (y_s[0]),
    .z_o     (z_s[0])
  );

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    cordic_stage #(
      .XY_W  (XY_W),
      .Z_W   (ANGLE_W),
      .SHIFT (i)
    ) u_stage (
      .clk       (clock),
      .vectoring (1'b0),  // rotation mode: direction from sign(z)
      .x_i       (x_s[i]),
      .y_i       (y_s[i]),
      .z_i       (z_s[i]),
      .x_o       (x_s[i+1]),
      .y_o       (y_s[i+1]),
      .z_o       (z_s[i+1])
    );
  end

  assign Xout = x_s[ITER];
  assign Yout = y_s[ITER];

endmodule
