// eigen_top_n4_tb: the eigen system at a size other than the default, a
// 4 x 4 array (N = 4, 6 Givens cells) with 24 QR iterations.  Random
// general matrices A = V D V^-1 with eigenvalues 6, -3, 1.5, 0.5 are
// loaded; the diagonal of the final A must hold the eigenvalues in order of
// decreasing magnitude, every column x of X must satisfy A x = lambda x to
// within a small residual, and qr_done must come exactly
// QR_ITERS * 3 * (3N-2) * TICK_CLKS clocks after start.  The PE pins are
// held idle (reset, test low).
module eigen_top_n4_tb;
  localparam int N = 4, W = 32, QR_ITERS = 24, TICK_CLKS = 36, IXW = 2;
  localparam real DS = 1048576.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_we = 1'b0, start = 1'b0, busy, qr_done, done;
  logic [IXW-1:0] a_row = '0, a_col = '0, rd_row = '0, rd_col = '0;
  logic [2:0] rd_sel = '0;
  logic signed [W-1:0] a_data = '0, rd_data;
  logic [15:0] pe_pio_o;
  logic        pe_pio_oe;
  logic [11:0] pe_sio_o, pe_sio_oe;
  int checks = 0, failures = 0, n_runs = 0;

  eigen_top #(.N(N), .QR_ITERS(QR_ITERS), .TICK_CLKS(TICK_CLKS)) dut (
    .clk(clk), .rst_n(rst_n), .a_we(a_we), .a_row(a_row), .a_col(a_col),
    .a_data(a_data), .start(start), .busy(busy), .qr_done(qr_done), .done(done),
    .rd_sel(rd_sel), .rd_row(rd_row), .rd_col(rd_col), .rd_data(rd_data),
    .pe_reset(1'b1), .pe_sck(clk), .pe_clock(clk), .pe_test(1'b0),
    .pe_address(3'b0), .pe_control(10'b0), .pe_pio_i(16'b0),
    .pe_pio_o(pe_pio_o), .pe_pio_oe(pe_pio_oe), .pe_sio_i(12'b0),
    .pe_sio_o(pe_sio_o), .pe_sio_oe(pe_sio_oe)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  real am [N][N], v [N][N], vi [N][N], lam [N], xm [N][N], diag [N];

  // vi = inverse of v (Gauss-Jordan, V is diagonally dominant here)
  task automatic invert();
    real m [N][2*N];
    real f;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < 2 * N; j++)
        m[i][j] = (j < N) ? v[i][j] : ((j - N == i) ? 1.0 : 0.0);
    for (int c = 0; c < N; c++) begin
      f = m[c][c];
      for (int j = 0; j < 2 * N; j++) m[c][j] /= f;
      for (int r = 0; r < N; r++)
        if (r != c) begin
          f = m[r][c];
          for (int j = 0; j < 2 * N; j++) m[r][j] -= f * m[c][j];
        end
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) vi[i][j] = m[i][j + N];
  endtask

  task automatic rd(input int sel, input int r, input int c, output real val);
    rd_sel = 3'(sel); rd_row = IXW'(r); rd_col = IXW'(c);
    #1;
    val = real'(rd_data) / DS;
  endtask

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      lam = '{6.0, -3.0, 1.5, 0.5};
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) v[i][j] = ((i == j) ? 1.0 : 0.0) + rnd(-0.3, 0.3);
      invert();
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          am[i][j] = 0.0;
          for (int k = 0; k < N; k++) am[i][j] += v[i][k] * lam[k] * vi[k][j];
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          @(negedge clk);
          a_we = 1'b1; a_row = IXW'(i); a_col = IXW'(j);
          a_data = W'($rtoi(am[i][j] * DS));
        end
      @(negedge clk);
      a_we = 1'b0;
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      cyc = 0;
      while (!qr_done) begin
        @(posedge clk);
        #1 cyc++;
      end
      checks++;
      if (cyc != QR_ITERS * 3 * (3 * N - 2) * TICK_CLKS) begin
        failures++;
        $display("FAIL QR phase took %0d clocks", cyc);
      end
      while (!done) @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        rd(0, i, i, diag[i]);
        check($sformatf("lambda %0d", i), diag[i], lam[i], 2e-3);
      end
      for (int j = 0; j < N; j++) begin
        real nx, nr;
        for (int i = 0; i < N; i++) rd(4, i, j, xm[i][j]);
        nx = 0.0; nr = 0.0;
        for (int i = 0; i < N; i++) begin
          real s;
          s = 0.0;
          for (int k = 0; k < N; k++) s += am[i][k] * xm[k][j];
          s -= diag[j] * xm[i][j];
          nr += s * s;
          nx += xm[i][j] * xm[i][j];
        end
        checks++;
        if (nx < 0.01 || $sqrt(nr) > 0.035 * $sqrt(nx)) begin
          failures++;
          $display("FAIL eigenvector %0d: |x| = %f, |Ax - lx| = %f", j, $sqrt(nx), $sqrt(nr));
        end
      end
      n_runs++;
    end
    checks++;
    if (n_runs != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
