// cordic_prerotate: quadrant folding ahead of the CORDIC pipeline.
//
// A chain of micro-rotations i = 0, 1, ... only converges for angles within
// about +/-99.7 degrees. This purely combinational block brings any binary
// angle (2**Z_W = one full turn, read as signed) into -90..+90 degrees by an
// exact rotation of the input vector by +/-90 degrees, which needs only a
// swap and a negation:
//     angle in [ 90, 180): x' = -y, y' =  x, z' = angle - 90
//     angle in [-180,-90): x' =  y, y' = -x, z' = angle + 90
//     otherwise           : x' =  x, y' =  y, z' = angle
// The quadrant is read from the two top bits of the angle. The coordinates
// are widened by one bit first so that negating the most negative input
// cannot overflow. This folding is a choice of this design; the pipeline
// it feeds is the document-described unrolled CORDIC.
//
// Interface: no clock; outputs follow the inputs combinationally.
module cordic_prerotate #(
  parameter int unsigned IN_W = 16,
  parameter int unsigned Z_W  = 32
) (
  input  logic signed [IN_W-1:0] x_i,
  input  logic signed [IN_W-1:0] y_i,
  input  logic        [Z_W-1:0]  angle_i,
  output logic signed [IN_W:0]   x_o,
  output logic signed [IN_W:0]   y_o,
  output logic signed [Z_W-1:0]  z_o
);

  localparam logic [Z_W-1:0] QUARTER = Z_W'(1) << (Z_W - 2);

  logic signed [IN_W:0] x_w, y_w;

  assign x_w = {x_i[IN_W-1], x_i};
  assign y_w = {y_i[IN_W-1], y_i};

  always_comb begin
    unique case (angle_i[Z_W-1 -: 2])
      2'b01: begin  // 90 .. 180 degrees
        x_o = -y_w;
        y_o = x_w;
        z_o = $signed(angle_i - QUARTER);
      end
      2'b10: begin  // -180 .. -90 degrees
        x_o = y_w;
        y_o = -x_w;
        z_o = $signed(angle_i + QUARTER);
      end
      default: begin
        x_o = x_w;
        y_o = y_w;
        z_o = $signed(angle_i);
      end
    endcase
  end

endmodule
