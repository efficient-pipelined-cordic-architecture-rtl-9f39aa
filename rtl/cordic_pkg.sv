// cordic_pkg: constants shared by the pipelined CORDIC processor.
//
// Angles are binary angles: a full turn is 2**32, so bit 31 weighs 180
// degrees and a 32-bit value read as signed spans -180 to +180 degrees.
// atan_angle(i) is the elementary rotation angle of micro-rotation i,
//     atan_angle(i) = round(atan(2**-i) * 2**32 / (2*pi)),
// hardwired into stage i of the unrolled pipeline instead of being read
// from a ROM. The table is given for i = 0..31; later entries round to 0.
// Binary-angle scaling is a choice of this design (the angle port is 32
// bits wide, its encoding is otherwise open).
package cordic_pkg;

  localparam int unsigned ANGLE_BITS = 32;

  // Rotation direction of one micro-rotation.
  typedef enum logic {
    ROT_POS = 1'b0,  // sigma = +1: rotate counter-clockwise
    ROT_NEG = 1'b1   // sigma = -1: rotate clockwise
  } rot_dir_e;

  function automatic logic [ANGLE_BITS-1:0] atan_angle(input int unsigned i);
    case (i)
       0: atan_angle = 32'd536870912;
       1: atan_angle = 32'd316933406;
       2: atan_angle = 32'd167458907;
       3: atan_angle = 32'd85004756;
       4: atan_angle = 32'd42667331;
       5: atan_angle = 32'd21354465;
       6: atan_angle = 32'd10679838;
       7: atan_angle = 32'd5340245;
       8: atan_angle = 32'd2670163;
       9: atan_angle = 32'd1335087;
      10: atan_angle = 32'd667544;
      11: atan_angle = 32'd333772;
      12: atan_angle = 32'd166886;
      13: atan_angle = 32'd83443;
      14: atan_angle = 32'd41722;
      15: atan_angle = 32'd20861;
      16: atan_angle = 32'd10430;
      17: atan_angle = 32'd5215;
      18: atan_angle = 32'd2608;
      19: atan_angle = 32'd1304;
      20: atan_angle = 32'd652;
      21: atan_angle = 32'd326;
      22: atan_angle = 32'd163;
      23: atan_angle = 32'd81;
      24: atan_angle = 32'd41;
      25: atan_angle = 32'd20;
      26: atan_angle = 32'd10;
      27: atan_angle = 32'd5;
      28: atan_angle = 32'd3;
      29: atan_angle = 32'd1;
      30: atan_angle = 32'd1;
      31: atan_angle = 32'd0;
      default: atan_angle = '0;
    endcase
  endfunction

endpackage
