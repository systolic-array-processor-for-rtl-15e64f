// eigvec_unit_tb: random upper-triangular matrices with well separated
// diagonals and random P matrices; B and X = P B are compared with back
// substitution done here in double precision, and each column of B is
// checked to be an eigenvector of A (A b = lambda b).
module eigvec_unit_tb;
  import eig_pkg::*;

  localparam int N = 5, W = 32, FRAC = 20;
  localparam real DS = 1048576.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  logic signed [W-1:0] a_mat [N][N];
  logic signed [W-1:0] p_mat [N][N];
  logic signed [W-1:0] b_mat [N][N];
  logic signed [W-1:0] x_mat [N][N];
  int checks = 0, failures = 0;

  eigvec_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  real a [N][N], p [N][N], b [N][N], x [N][N], lam [N];

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a_mat[i][j] = '0;
        p_mat[i][j] = '0;
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      lam = '{6.0, -4.0, 2.5, 1.0, -0.5};
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = (j > i) ? rnd(-1.5, 1.5) : ((i == j) ? lam[i] + rnd(-0.2, 0.2) : 0.0);
          p[i][j] = rnd(-1, 1);
          a_mat[i][j] = W'($rtoi(a[i][j] * DS));
          p_mat[i][j] = W'($rtoi(p[i][j] * DS));
        end
      // reference back substitution
      for (int j = 0; j < N; j++)
        for (int i = N - 1; i >= 0; i--) begin
          real s;
          if (i > j) b[i][j] = 0.0;
          else if (i == j) b[i][j] = 1.0;
          else begin
            s = 0.0;
            for (int k = i + 1; k <= j; k++) s += a[i][k] * b[k][j];
            b[i][j] = -s / (a[i][i] - a[j][j]);
          end
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          x[i][j] = 0.0;
          for (int k = 0; k < N; k++) x[i][j] += p[i][k] * b[k][j];
        end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          check($sformatf("B[%0d][%0d]", i, j), real'(b_mat[i][j]) / DS, b[i][j], 1e-3);
          check($sformatf("X[%0d][%0d]", i, j), real'(x_mat[i][j]) / DS, x[i][j], 2e-3);
        end
      // A b_j = lambda_j b_j
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          real s;
          s = 0.0;
          for (int k = 0; k < N; k++) s += a[i][k] * real'(b_mat[k][j]) / DS;
          check("A b = lambda b", s, a[j][j] * real'(b_mat[i][j]) / DS, 2e-3);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
