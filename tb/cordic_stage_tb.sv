// cordic_stage_tb: self-checking test of single CORDIC micro-rotations.
//
// Three stages with shifts 0, 3 and 7 are driven with random coordinates
// and angles in both modes. Each result is compared, one clock after the
// inputs were applied, with a reference computed here: floor division by
// 2**shift for the wired shift and an arctangent constant computed from
// $atan, so neither depends on the RTL's shifts or constant table.
module cordic_stage_tb;

  localparam int XY_W = 17;
  localparam int Z_W  = 32;
  localparam int NS   = 3;
  localparam int SH [NS] = '{0, 3, 7};
  localparam int N    = 3000;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                   vectoring;
  logic signed [XY_W-1:0] x_i, y_i;
  logic signed [Z_W-1:0]  z_i;
  logic signed [XY_W-1:0] x_o [NS];
  logic signed [XY_W-1:0] y_o [NS];
  logic signed [Z_W-1:0]  z_o [NS];

  int checks = 0;
  int failures = 0;
  int n_pos = 0, n_neg = 0, n_vec = 0, n_rot = 0;

  for (genvar k = 0; k < NS; k++) begin : g_dut
    cordic_stage #(.XY_W(XY_W), .Z_W(Z_W), .SHIFT(SH[k])) u_dut (
      .clk(clk), .vectoring(vectoring), .x_i(x_i), .y_i(y_i), .z_i(z_i),
      .x_o(x_o[k]), .y_o(y_o[k]), .z_o(z_o[k]));
  end

  function automatic longint floor_shift(longint v, int s);
    longint d = longint'(1) << s;
    longint q = v / d;
    if (v < 0 && q * d != v) q = q - 1;
    return q;
  endfunction

  function automatic longint wrap(longint v, int w);
    longint m = longint'(1) << w;
    longint r = v % m;
    if (r < 0) r += m;
    if (r >= m / 2) r -= m;
    return r;
  endfunction

  function automatic longint atan_ref(int s);
    return longint'($rtoi($atan(2.0 ** (-s)) / (2.0 * PI) * 4294967296.0 + 0.5));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xe, ye, ze, xs, ys;
    longint xv, yv, zv;
    bit vec, pos;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      vec = (n % 2 == 1);
      vectoring = vec;
      x_i = XY_W'($urandom_range(0, 40000) - 20000);
      y_i = XY_W'($urandom_range(0, 40000) - 20000);
      z_i = Z_W'($urandom);
      if (n % 7 == 0) z_i = 0;          // sign boundary of z
      if (n % 11 == 0) y_i = 0;         // sign boundary of y
      xv = longint'(x_i); yv = longint'(y_i); zv = longint'(z_i);
      @(negedge clk);
      if (vec) begin pos = (yv < 0); n_vec++; end
      else     begin pos = (zv >= 0); n_rot++; end
      if (pos) n_pos++; else n_neg++;
      for (int k = 0; k < NS; k++) begin
        xs = floor_shift(xv, SH[k]);
        ys = floor_shift(yv, SH[k]);
        xe = wrap(pos ? xv - ys : xv + ys, XY_W);
        ye = wrap(pos ? yv + xs : yv - xs, XY_W);
        ze = wrap(pos ? zv - atan_ref(SH[k]) : zv + atan_ref(SH[k]), Z_W);
        checks++;
        if (longint'(x_o[k]) != xe || longint'(y_o[k]) != ye || longint'(z_o[k]) != ze) begin
          failures++;
          if (failures < 10)
            $display("mismatch shift=%0d vec=%0d in=(%0d,%0d,%0d) got=(%0d,%0d,%0d) exp=(%0d,%0d,%0d)",
                     SH[k], vec, xv, yv, zv, x_o[k], y_o[k], z_o[k], xe, ye, ze);
        end
      end
    end
    // Both directions and both modes must have been exercised.
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_vec == 0 || n_rot == 0) begin
      failures++;
      $display("coverage hole: pos=%0d neg=%0d vec=%0d rot=%0d", n_pos, n_neg, n_vec, n_rot);
    end
    $display("directions: +%0d -%0d, modes: rotation %0d vectoring %0d", n_pos, n_neg, n_rot, n_vec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
