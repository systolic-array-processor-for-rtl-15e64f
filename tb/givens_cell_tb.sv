// givens_cell_tb: a cell in array column 1 is given two random rows of
// length 5 in generate mode (element 0 passes, element 1 fixes the angle,
// elements 2..4 are rotated), then two more rows in apply mode (all rotated
// by the stored angle).  Results are compared with a Givens rotation
// computed here in double precision.
module givens_cell_tb;
  import eig_pkg::*;

  localparam int N = 5, COL = 1, TICK = 40;
  localparam real DS = 1048576.0;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, gen = 1'b0;
  elem_t x_in = '0, y_in = '0, x_out, y_out;
  logic signed [31:0] theta;
  logic busy;
  int checks = 0, failures = 0;
  int n_vec = 0, n_rot = 0, n_pass = 0;

  givens_cell #(.COL(COL)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, real got, real exp, real tol);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  function automatic real rnd(real lo, real hi);
    return lo + (hi - lo) * (real'($urandom_range(0, 1000000)) / 1000000.0);
  endfunction

  real a[N], b[N], c, s, r, th;

  // present one pair, pulse tick, wait for the result
  task automatic step(input int j, input real xa, input real yb,
                      output real xo, output real yo);
    @(negedge clk);
    x_in = '{valid: 1'b1, col: 8'(j), data: 32'($rtoi(xa * DS))};
    y_in = '{valid: 1'b1, col: 8'(j), data: 32'($rtoi(yb * DS))};
    tick = 1'b1;
    @(negedge clk);
    tick = 1'b0;
    x_in = '0; y_in = '0;
    repeat (TICK - 1) @(negedge clk);
    checks++;
    if (!x_out.valid || !y_out.valid || int'(x_out.col) != j) begin
      failures++;
      $display("FAIL: output not valid / wrong tag for column %0d", j);
    end
    xo = real'(signed'(x_out.data)) / DS;
    yo = real'(signed'(y_out.data)) / DS;
  endtask

  real xo, yo;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      // generate pass
      gen = 1'b1;
      for (int j = 0; j < N; j++) begin
        a[j] = rnd(-5, 5);
        b[j] = rnd(-5, 5);
      end
      a[0] = 0.0; b[0] = 0.0;      // already annihilated by column 0
      if (rep == 1) a[COL] = -a[COL] - 0.5;   // left half plane too
      th = $atan2(b[COL], a[COL]);
      c = $cos(th); s = $sin(th);
      for (int j = 0; j < N; j++) begin
        step(j, a[j], b[j], xo, yo);
        if (j < COL) begin
          n_pass++;
          check("pass x", xo, a[j], 1e-9);
          check("pass y", yo, b[j], 1e-9);
        end else if (j == COL) begin
          n_vec++;
          r = $sqrt(a[j] * a[j] + b[j] * b[j]);
          check("vec x", xo, r, 2e-4);
          check("vec y zero", yo, 0.0, 1e-12);
          check("theta", real'(theta) / 536870912.0, th, 1e-5);
        end else begin
          n_rot++;
          check("rot x", xo, a[j] * c + b[j] * s, 2e-4);
          check("rot y", yo, -a[j] * s + b[j] * c, 2e-4);
        end
      end
      // apply pass with the stored angle
      gen = 1'b0;
      for (int j = 0; j < N; j++) begin
        a[j] = rnd(-5, 5);
        b[j] = rnd(-5, 5);
        step(j, a[j], b[j], xo, yo);
        n_rot++;
        check("apply x", xo, a[j] * c + b[j] * s, 2e-4);
        check("apply y", yo, -a[j] * s + b[j] * c, 2e-4);
      end
    end
    checks++;
    if (n_vec == 0 || n_rot == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL: mechanism not exercised vec=%0d rot=%0d pass=%0d", n_vec, n_rot, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
