// cordic_stage: one micro-rotation of the unrolled CORDIC pipeline.
//
// The stage holds three add/subtract units. x and y are each combined with
// the other coordinate shifted right by SHIFT bits; the shift is pure
// wiring because SHIFT is fixed per stage. z is combined with the hardwired
// elementary angle ATAN = atan(2**-SHIFT). The direction sigma of all
// three units comes from a two-way selector: the sign of z in rotation
// mode (drive z toward 0), the sign of y in vectoring mode (drive y toward
// 0). With sigma = +1:
//     x' = x - (y >>> SHIFT),  y' = y + (x >>> SHIFT),  z' = z - ATAN
// and with sigma = -1 every operation is reversed. The three results are
// registered, so the stage adds one clock of latency and takes a new
// sample every clock.
//
// The structure (wired shifts, add/subtract units, a sign(y)/sign(z)
// selector, hardwired constants, one register row per stage) is that of the
// pipelined unrolled CORDIC this processor is built on. Arithmetic shifts that truncate toward minus infinity,
// two's-complement coordinates, binary-angle z and the absence of a reset
// are choices of this design.
//
// Interface: x_i/y_i/z_i are sampled on the rising edge of clk; x_o/y_o/z_o
// hold the result from the next edge on. vectoring selects the mode.
module cordic_stage
  import cordic_pkg::*;
#(
  parameter int unsigned XY_W  = 17,
  parameter int unsigned Z_W   = ANGLE_BITS,
  parameter int unsigned SHIFT = 0,
  parameter logic [Z_W-1:0] ATAN = Z_W'(atan_angle(SHIFT) >> (ANGLE_BITS - Z_W))
) (
  input  logic                   clk,
  input  logic                   vectoring,
  input  logic signed [XY_W-1:0] x_i,
  input  logic signed [XY_W-1:0] y_i,
  input  logic signed [Z_W-1:0]  z_i,
  output logic signed [XY_W-1:0] x_o,
  output logic signed [XY_W-1:0] y_o,
  output logic signed [Z_W-1:0]  z_o
);

  rot_dir_e              dir;
  logic signed [XY_W-1:0] x_sh, y_sh;
  logic signed [XY_W-1:0] x_nx, y_nx;
  logic signed [Z_W-1:0]  z_nx;

  // Sign selector: rotation mode follows sign(z), vectoring mode sign(y).
  always_comb begin
    if (vectoring) dir = y_i[XY_W-1] ? ROT_POS : ROT_NEG;
    else           dir = z_i[Z_W-1]  ? ROT_NEG : ROT_POS;
  end

  // Wired shifts.
  assign x_sh = x_i >>> SHIFT;
  assign y_sh = y_i >>> SHIFT;

  // Add/subtract units.
  always_comb begin
    if (dir == ROT_POS) begin
      x_nx = x_i - y_sh;
      y_nx = y_i + x_sh;
      z_nx = z_i - $signed(ATAN);
    end else begin
      x_nx = x_i + y_sh;
      y_nx = y_i - x_sh;
      z_nx = z_i + $signed(ATAN);
    end
  end

  // Pipeline register.
  always_ff @(posedge clk) begin
    x_o <= x_nx;
    y_o <= y_nx;
    z_o <= z_nx;
  end

endmodule
