// cordic_tb: end-to-end test of the pipelined CORDIC at its default size.
//
// A new input is applied every clock (no gaps), so the test also checks
// the one-sample-per-clock throughput. The result for the input applied
// before clock edge n must appear after edge n+7, i.e. eight clocks later.
// Two phases:
//   1. sine/cosine sweep: Xin = round(32767/K), Yin = 0, angle stepping
//      through all four quadrants; Xout/Yout are compared with 32767*cos
//      and 32767*sin within the bound set by the last micro-rotation angle.
//   2. random vectors (length <= 2**15) and random angles.
// Every output is compared bit for bit with a behavioural model of the
// CORDIC recurrence written here (constants from $atan, floor shifts), and
// with the ideal rotation K*R(angle)*(Xin,Yin) within the error bound.
// Each quadrant of the input fold and both rotation directions in every
// stage are counted; one that never occurs counts as a failure.
module cordic_tb;

  localparam int IN_W  = 16;
  localparam int XY_W  = IN_W + 1;
  localparam int ITER  = 8;        // default of the design
  localparam int LAT   = ITER;     // clocks from input to output
  localparam int NSWEEP = 2048;
  localparam int NRAND  = 20000;
  localparam int NTOT   = NSWEEP + NRAND;
  localparam real PI    = 3.14159265358979323846;

  logic clock = 1'b0;
  always #5 clock = ~clock;

  logic        [31:0]     angle;
  logic signed [IN_W-1:0] Xin, Yin;
  logic signed [IN_W:0]   Xout, Yout;

  cordic dut (.clock(clock), .angle(angle), .Xin(Xin), .Yin(Yin), .Xout(Xout), .Yout(Yout));

  int checks = 0;
  int failures = 0;
  int quad_cnt [4];
  int dir_pos [ITER];
  int dir_neg [ITER];
  real max_err = 0.0;

  // Inputs applied, by sample index.
  logic [31:0] a_hist [NTOT];
  int          x_hist [NTOT];
  int          y_hist [NTOT];

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

  function automatic real gain(int n);
    real k = 1.0;
    for (int i = 0; i < n; i++) k = k * $sqrt(1.0 + 2.0 ** (-2.0 * i));
    return k;
  endfunction

  // Behavioural model: fold by +/-90 degrees, then ITER micro-rotations.
  task automatic model(input logic [31:0] a, input int xin, input int yin,
                       output longint xo, output longint yo, input bit count);
    longint x, y, z, xs, ys, at;
    longint za = wrap(longint'(a), 32);
    int q = int'(a[31:30]);
    if (count) quad_cnt[q]++;
    if (za >= 0 && za >= 64'sd1073741824) begin
      x = -longint'(yin); y = longint'(xin); z = za - 64'sd1073741824;
    end else if (za < -64'sd1073741824) begin
      x = longint'(yin); y = -longint'(xin); z = za + 64'sd1073741824;
    end else begin
      x = longint'(xin); y = longint'(yin); z = za;
    end
    for (int i = 0; i < ITER; i++) begin
      at = longint'($rtoi($atan(2.0 ** (-i)) / (2.0 * PI) * 4294967296.0 + 0.5));
      xs = floor_shift(x, i);
      ys = floor_shift(y, i);
      if (z >= 0) begin
        if (count) dir_pos[i]++;
        x = wrap(x - ys, XY_W); y = wrap(y + xs, XY_W); z = wrap(z - at, 32);
      end else begin
        if (count) dir_neg[i]++;
        x = wrap(x + ys, XY_W); y = wrap(y - xs, XY_W); z = wrap(z + at, 32);
      end
    end
    xo = x; yo = y;
  endtask

  initial begin
    repeat (NTOT + 1000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k, th, xr, yr, tol, ex, ey, mag;
    longint xm, ym;
    int xi, yi, m;
    k = gain(ITER);
    for (int c = 0; c < NTOT + LAT; c++) begin
      @(negedge clock);
      // Check the output belonging to the input applied LAT clocks ago.
      if (c >= LAT) begin
        m = c - LAT;
        model(a_hist[m], x_hist[m], y_hist[m], xm, ym, 1'b1);
        checks++;
        if (longint'(Xout) != xm || longint'(Yout) != ym) begin
          failures++;
          if (failures < 10)
            $display("model mismatch #%0d angle=%h in=(%0d,%0d) got=(%0d,%0d) exp=(%0d,%0d)",
                     m, a_hist[m], x_hist[m], y_hist[m], Xout, Yout, xm, ym);
        end
        th  = real'(a_hist[m]) / 4294967296.0 * 2.0 * PI;
        xr  = k * (x_hist[m] * $cos(th) - y_hist[m] * $sin(th));
        yr  = k * (x_hist[m] * $sin(th) + y_hist[m] * $cos(th));
        mag = k * $sqrt(real'(x_hist[m]) ** 2 + real'(y_hist[m]) ** 2);
        tol = mag * $atan(2.0 ** (-(ITER - 1))) + 2.0 * ITER + 2.0;
        ex  = real'(Xout) - xr;
        ey  = real'(Yout) - yr;
        if (ex < 0) ex = -ex;
        if (ey < 0) ey = -ey;
        if (ex > max_err) max_err = ex;
        if (ey > max_err) max_err = ey;
        checks++;
        if (ex > tol || ey > tol) begin
          failures++;
          if (failures < 10)
            $display("accuracy #%0d angle=%h got=(%0d,%0d) ideal=(%f,%f) tol=%f",
                     m, a_hist[m], Xout, Yout, xr, yr, tol);
        end
      end
      // Apply the next input.
      if (c < NSWEEP) begin
        a_hist[c] = 32'(longint'(c) * (64'd1 << 32) / NSWEEP);
        xi = $rtoi(32767.0 / k + 0.5);
        yi = 0;
      end else if (c < NTOT) begin
        a_hist[c] = $urandom;
        // Random vector with length at most 2**15.
        do begin
          xi = int'($urandom_range(0, 65535)) - 32768;
          yi = int'($urandom_range(0, 65535)) - 32768;
        end while (real'(xi) ** 2 + real'(yi) ** 2 > 1073741824.0);
      end
      if (c < NTOT) begin
        x_hist[c] = xi;
        y_hist[c] = yi;
        angle = a_hist[c];
        Xin   = IN_W'(xi);
        Yin   = IN_W'(yi);
      end
    end
    // Mechanism coverage: every quadrant of the fold, both directions per stage.
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad_cnt[q] == 0) begin failures++; $display("quadrant %0d never folded", q); end
    end
    for (int i = 0; i < ITER; i++) begin
      checks++;
      if (dir_pos[i] == 0 || dir_neg[i] == 0) begin
        failures++;
        $display("stage %0d: direction never varied (+%0d -%0d)", i, dir_pos[i], dir_neg[i]);
      end
    end
    $display("samples %0d, latency %0d clocks, max error vs ideal %f LSB", NTOT, LAT, max_err);
    $display("quadrants: %0d %0d %0d %0d", quad_cnt[0], quad_cnt[1], quad_cnt[2], quad_cnt[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
