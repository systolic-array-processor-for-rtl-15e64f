// eigen_top_tb: end-to-end test of the top level at its default size
// (N = 5, 20 QR iterations).
//  * Two 5 x 5 matrices are built here as A = V D V^-1 with known
//    eigenvalues D (one general, one symmetric), loaded through the write
//    port and run.  Checked: the diagonal of the final A equals the known
//    eigenvalues (in descending magnitude, the order the basic QR algorithm
//    converges to); every column x of X satisfies |A x - lambda x| small
//    relative to |x|; B is unit upper triangular; qr_done comes exactly
//    QR_ITERS * 3 * (3N-2) * TICK_CLKS clocks after start.
//  * The PE chip next to it: the datapath add through the test port, and
//    one pass of the microprogram (two words in from the west, result out
//    of the east).
// Each mechanism (generate passes, apply passes, eigenvector unit, PE test
// mode, PE microprogram) is counted and must have happened.
module eigen_top_tb;
  import eig_pkg::*;

  localparam int N = 5, W = 32, QR_ITERS = 20, TICK_CLKS = 36;
  localparam real DS = 1048576.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic a_we = 1'b0, start = 1'b0, busy, qr_done, done;
  logic [2:0] a_row = '0, a_col = '0, rd_row = '0, rd_col = '0, rd_sel = '0;
  logic signed [W-1:0] a_data = '0, rd_data;
  logic pe_reset = 1'b1, pe_test = 1'b0;
  logic [2:0]  pe_address = '0;
  logic [9:0]  pe_control = '0;
  logic [15:0] pe_pio_i = '0, pe_pio_o;
  logic        pe_pio_oe;
  logic [11:0] pe_sio_i = '0, pe_sio_o, pe_sio_oe;
  int checks = 0, failures = 0;
  int n_gen_ticks = 0, n_apply_ticks = 0, n_eig = 0, n_pe_test = 0, n_pe_prog = 0;

  eigen_top dut (
    .clk(clk), .rst_n(rst_n), .a_we(a_we), .a_row(a_row), .a_col(a_col),
    .a_data(a_data), .start(start), .busy(busy), .qr_done(qr_done), .done(done),
    .rd_sel(rd_sel), .rd_row(rd_row), .rd_col(rd_col), .rd_data(rd_data),
    .pe_reset(pe_reset), .pe_sck(clk), .pe_clock(clk), .pe_test(pe_test),
    .pe_address(pe_address), .pe_control(pe_control), .pe_pio_i(pe_pio_i),
    .pe_pio_o(pe_pio_o), .pe_pio_oe(pe_pio_oe), .pe_sio_i(pe_sio_i),
    .pe_sio_o(pe_sio_o), .pe_sio_oe(pe_sio_oe)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters from the array's tick and mode
  always @(posedge clk)
    if (dut.tick) begin
      if (dut.gen) n_gen_ticks++;
      else         n_apply_ticks++;
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

  // vi = inverse of v (Gauss-Jordan with partial pivoting)
  task automatic invert();
    real m [N][2*N];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < 2 * N; j++)
        m[i][j] = (j < N) ? v[i][j] : ((j - N == i) ? 1.0 : 0.0);
    for (int c = 0; c < N; c++) begin
      int piv;
      real f;
      piv = c;
      for (int r = c + 1; r < N; r++)
        if ((m[r][c] < 0 ? -m[r][c] : m[r][c]) > (m[piv][c] < 0 ? -m[piv][c] : m[piv][c])) piv = r;
      for (int j = 0; j < 2 * N; j++) begin
        f = m[c][j]; m[c][j] = m[piv][j]; m[piv][j] = f;
      end
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
    rd_sel = 3'(sel); rd_row = 3'(r); rd_col = 3'(c);
    #1;
    val = real'(rd_data) / DS;
  endtask

  task automatic run_matrix(input bit symmetric);
    int cyc;
    real sorted_exp [N], sorted_got [N], t;
    lam = '{7.0, -3.5, 2.0, 1.0, 0.4};
    if (symmetric) begin
      // orthogonal V from Gram-Schmidt on a random matrix
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) v[i][j] = rnd(-1, 1) + ((i == j) ? 2.0 : 0.0);
      for (int j = 0; j < N; j++) begin
        real nrm;
        for (int k = 0; k < j; k++) begin
          real d;
          d = 0.0;
          for (int i = 0; i < N; i++) d += v[i][j] * v[i][k];
          for (int i = 0; i < N; i++) v[i][j] -= d * v[i][k];
        end
        nrm = 0.0;
        for (int i = 0; i < N; i++) nrm += v[i][j] * v[i][j];
        nrm = $sqrt(nrm);
        for (int i = 0; i < N; i++) v[i][j] /= nrm;
      end
    end else begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) v[i][j] = ((i == j) ? 1.0 : 0.0) + rnd(-0.4, 0.4);
    end
    invert();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        am[i][j] = 0.0;
        for (int k = 0; k < N; k++) am[i][j] += v[i][k] * lam[k] * vi[k][j];
      end
    // load
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        a_we = 1'b1; a_row = 3'(i); a_col = 3'(j);
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
    n_eig++;
    @(negedge clk);
    // eigenvalues
    for (int i = 0; i < N; i++) begin
      rd(0, i, i, diag[i]);
      sorted_got[i] = diag[i];
      sorted_exp[i] = lam[i];
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        if ((sorted_got[j] < 0 ? -sorted_got[j] : sorted_got[j]) >
            (sorted_got[i] < 0 ? -sorted_got[i] : sorted_got[i])) begin
          t = sorted_got[i]; sorted_got[i] = sorted_got[j]; sorted_got[j] = t;
        end
      end
    for (int i = 0; i < N; i++)
      check($sformatf("lambda %0d", i), sorted_got[i], sorted_exp[i], 2e-3);
    for (int i = 0; i < N; i++)
      check($sformatf("diag order %0d", i), diag[i], lam[i], 2e-3);
    // B unit upper triangular
    for (int i = 0; i < N; i++)
      for (int j = 0; j <= i; j++)
      begin
        real bv;
        rd(3, i, j, bv);
        check("B lower", bv, (i == j) ? 1.0 : 0.0, 1e-6);
      end
    // A x = lambda x for every column of X
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
      if (nx < 0.01 || $sqrt(nr) > 5e-3 * $sqrt(nx) * 7.0) begin
        failures++;
        $display("FAIL eigenvector %0d: |x| = %f, |Ax - lx| = %f", j, $sqrt(nx), $sqrt(nr));
      end
    end
  endtask

  // ---------------- PE helpers (test port and serial neighbours)
  task automatic pio_wr(input int a, input logic [15:0] val);
    @(negedge clk);
    pe_address = 3'(a); pe_pio_i = val; pe_control = 10'b1;
    @(negedge clk);
    pe_control = '0;
  endtask

  task automatic pio_cmd(input logic [9:0] c);
    @(negedge clk);
    pe_control = c;
    @(negedge clk);
    pe_control = '0;
  endtask

  task automatic send_west(input logic [31:0] w);
    while (!(pe_sio_oe[5] && pe_sio_o[5])) @(negedge clk);
    for (int b = 31; b >= 0; b--) begin
      pe_sio_i[3] = w[b]; pe_sio_i[4] = 1'b0;
      @(negedge clk);
      pe_sio_i[4] = 1'b1;
      @(negedge clk);
    end
    pe_sio_i[4] = 1'b0;
  endtask

  task automatic recv_east(output logic [31:0] w);
    int nb;
    logic ck_q;
    nb = 0; ck_q = 1'b0; w = '0;
    pe_sio_i[11] = 1'b1;
    while (nb < 32) begin
      @(posedge clk);
      #1;
      if (pe_sio_oe[10] && pe_sio_o[10] && !ck_q) begin
        w = {w[30:0], pe_sio_o[9]};
        nb++;
      end
      ck_q = pe_sio_oe[10] && pe_sio_o[10];
    end
    pe_sio_i[11] = 1'b0;
  endtask

  logic [31:0] got;
  logic [15:0] pv;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_matrix(1'b0);
    run_matrix(1'b1);

    // PE, test mode: 0xF + 1 in the datapath through the test port
    pe_test = 1'b1;
    repeat (2) @(negedge clk);
    pe_reset = 1'b0;
    pio_wr(2, 16'h000F); pio_wr(4, 16'h4000); pio_cmd(10'b10_0100);
    pio_wr(2, 16'h0001); pio_wr(4, 16'h8000); pio_cmd(10'b10_0100);
    pio_wr(4, 16'h1044); pio_wr(5, 16'h4000); pio_cmd(10'b10_1000);
    @(negedge clk);
    pe_address = 3'd2; pe_control = 10'b10;
    #1 pv = pe_pio_o;
    @(negedge clk);
    pe_control = '0;
    check("PE test-mode add", real'(pv), 16.0, 0.0);
    n_pe_test++;
    // PE, microprogram
    pe_reset = 1'b1; pe_test = 1'b0;
    repeat (2) @(negedge clk);
    pe_reset = 1'b0;
    fork
      begin send_west(32'h0300_0100); send_west(32'h0100_0104); end
      recv_east(got);
    join
    checks++;
    if (got !== 32'h0400_0081) begin
      failures++;
      $display("FAIL PE program result %h", got);
    end
    n_pe_prog++;

    checks++;
    if (n_gen_ticks == 0 || n_apply_ticks == 0 || n_eig == 0 || n_pe_test == 0 || n_pe_prog == 0) begin
      failures++;
      $display("FAIL: mechanism not exercised gen=%0d apply=%0d eig=%0d pe_test=%0d pe_prog=%0d",
               n_gen_ticks, n_apply_ticks, n_eig, n_pe_test, n_pe_prog);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
