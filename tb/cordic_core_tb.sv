// cordic_core_tb: self-checking test of the iterative CORDIC unit.
// Random operands in all six mode combinations are compared with results
// computed here in double precision (sin/cos/atan2/sqrt/sinh/cosh/atanh).
// The start -> done latency is checked against the iteration counts.
module cordic_core_tb;
  import eig_pkg::*;

  localparam int W = 32, FRAC = 20, LIN_EXT = 4;
  localparam real DS = 1048576.0;          // 2^20
  localparam real AS = 536870912.0;        // 2^29

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, vectoring = 1'b0;
  cordic_mode_e mode = M_CIRCULAR;
  logic signed [W-1:0] x_in = '0, y_in = '0, x_out, y_out;
  logic signed [31:0]  z_in = '0, z_out;
  logic busy, done;
  int checks = 0, failures = 0;

  cordic_core dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom_range(0, 1000000)) / 1000000.0);
  endfunction

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  // run one operation, return latency in clocks
  task automatic run(input cordic_mode_e m, input logic v, input real xr,
                     input real yr, input real zr, input logic z_is_angle,
                     output int lat);
    @(negedge clk);
    mode = m; vectoring = v;
    x_in = W'($rtoi(xr * DS));
    y_in = W'($rtoi(yr * DS));
    z_in = z_is_angle ? 32'($rtoi(zr * AS)) : 32'($rtoi(zr * DS));
    start = 1'b1;
    @(posedge clk);
    lat = 0;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(posedge clk);
      lat++;
      @(negedge clk);
    end
  endtask

  real xr, yr, zr, ex, ey, ez;
  int lat;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int n = 0; n < 40; n++) begin
      // circular rotation, full circle
      xr = rnd(-8, 8); yr = rnd(-8, 8); zr = rnd(-3.14, 3.14);
      run(M_CIRCULAR, 1'b0, xr, yr, zr, 1'b1, lat);
      ex = xr * $cos(zr) + yr * $sin(zr);
      ey = yr * $cos(zr) - xr * $sin(zr);
      check("circ rot x", real'(x_out) / DS, ex, 1e-4);
      check("circ rot y", real'(y_out) / DS, ey, 1e-4);
      checks++; if (lat != 32) begin failures++; $display("FAIL circular latency %0d", lat); end

      // circular vectoring, all quadrants
      xr = rnd(-8, 8); yr = rnd(-8, 8); zr = rnd(-0.5, 0.5);
      run(M_CIRCULAR, 1'b1, xr, yr, zr, 1'b1, lat);
      ex = $sqrt(xr * xr + yr * yr);
      ez = zr - $atan2(yr, xr);
      check("circ vec x", real'(x_out) / DS, ex, 1e-4);
      check("circ vec z", real'(z_out) / AS, ez, 1e-5);

      // linear rotation: y - x*z (multiply)
      xr = rnd(-8, 8); yr = rnd(-8, 8); zr = rnd(-20, 20);
      run(M_LINEAR, 1'b0, xr, yr, zr, 1'b0, lat);
      check("lin rot y", real'(y_out) / DS, yr - xr * zr, 2e-4);
      checks++; if (lat != FRAC + LIN_EXT + 2) begin failures++; $display("FAIL linear latency %0d", lat); end

      // linear vectoring: z - y/x (divide)
      xr = rnd(0.5, 8); if ($urandom_range(0, 1) == 1) xr = -xr;
      yr = rnd(-8, 8); zr = rnd(-1, 1);
      run(M_LINEAR, 1'b1, xr, yr, zr, 1'b0, lat);
      check("lin vec z", real'(z_out) / DS, zr - yr / xr, 2e-4);

      // hyperbolic rotation
      xr = rnd(-4, 4); yr = rnd(-4, 4); zr = rnd(-1.0, 1.0);
      run(M_HYPERBOLIC, 1'b0, xr, yr, zr, 1'b1, lat);
      ex = xr * $cosh(zr) - yr * $sinh(zr);
      ey = yr * $cosh(zr) - xr * $sinh(zr);
      check("hyp rot x", real'(x_out) / DS, ex, 2e-4);
      check("hyp rot y", real'(y_out) / DS, ey, 2e-4);
      checks++; if (lat != 33) begin failures++; $display("FAIL hyperbolic latency %0d", lat); end

      // hyperbolic vectoring
      xr = rnd(2, 8); yr = xr * rnd(-0.7, 0.7); zr = 0.0;
      run(M_HYPERBOLIC, 1'b1, xr, yr, zr, 1'b1, lat);
      check("hyp vec x", real'(x_out) / DS, $sqrt(xr * xr - yr * yr), 2e-4);
      check("hyp vec z", real'(z_out) / AS, -$atanh(yr / xr), 1e-5);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
