// qr_array_tb: triangularizes a random 5 x 5 matrix on the array (generate
// mode) and checks R against Givens QR computed here in double precision,
// then feeds a second random matrix in apply mode and checks Q^T M.  Each
// pass must complete in 3N-2 processing cycles (ticks).
module qr_array_tb;
  import eig_pkg::*;

  localparam int N = 5, TICK = 36;
  localparam real DS = 1048576.0;

  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, gen = 1'b0;
  elem_t row_in [N];
  elem_t row_out [N];
  logic signed [31:0] theta [N][N];
  logic busy;
  int checks = 0, failures = 0;

  qr_array dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  real m [N][N];      // matrix fed in
  real got [N][N];    // matrix collected
  real ref_m [N][N];
  real th [N][N];
  int  n_out, ticks_used;

  // feed m row-wise with the array's skew and collect the output rows
  task automatic pass_matrix();
    int last;
    n_out = 0;
    last = -1;
    for (int t = 0; t < 3 * N + 2; t++) begin
      @(negedge clk);
      for (int q = 0; q < N; q++) begin
        int j;
        j = t - ((q == 0) ? 1 : q);
        if (j >= 0 && j < N)
          row_in[q] = '{valid: 1'b1, col: 8'(j), data: 32'($rtoi(m[q][j] * DS))};
        else
          row_in[q] = '0;
      end
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      repeat (TICK - 1) @(negedge clk);
      for (int p = 0; p < N; p++)
        if (row_out[p].valid) begin
          got[p][row_out[p].col] = real'(signed'(row_out[p].data)) / DS;
          n_out++;
          last = t;
        end
    end
    ticks_used = last + 1;
  endtask

  task automatic rotate_ref(input bit generate_angles);
    for (int p = 0; p < N - 1; p++)
      for (int q = p + 1; q < N; q++) begin
        real c, s, a, b;
        if (generate_angles) th[q][p] = $atan2(ref_m[q][p], ref_m[p][p]);
        c = $cos(th[q][p]); s = $sin(th[q][p]);
        for (int j = 0; j < N; j++) begin
          a = ref_m[p][j]; b = ref_m[q][j];
          ref_m[p][j] =  a * c + b * s;
          ref_m[q][j] = -a * s + b * c;
        end
        if (generate_angles) ref_m[q][p] = 0.0;
      end
  endtask

  initial begin
    for (int q = 0; q < N; q++) row_in[q] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      // ---- generate: R = Q^T A
      gen = 1'b1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          m[i][j] = rnd(-4, 4);
          ref_m[i][j] = m[i][j];
        end
      rotate_ref(1'b1);
      pass_matrix();
      checks++;
      if (n_out != N * N || ticks_used != 3 * N - 2) begin
        failures++;
        $display("FAIL gen pass: %0d outputs in %0d ticks", n_out, ticks_used);
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          check($sformatf("R[%0d][%0d]", i, j), got[i][j], ref_m[i][j], 1e-3);
      for (int q = 1; q < N; q++)
        for (int p = 0; p < q; p++)
          check("theta", real'(theta[q][p]) / 536870912.0, th[q][p], 1e-4);
      // ---- apply: Q^T M with the stored angles
      gen = 1'b0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          m[i][j] = rnd(-4, 4);
          ref_m[i][j] = m[i][j];
        end
      rotate_ref(1'b0);
      pass_matrix();
      checks++;
      if (n_out != N * N || ticks_used != 3 * N - 2) begin
        failures++;
        $display("FAIL apply pass: %0d outputs in %0d ticks", n_out, ticks_used);
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          check($sformatf("QtM[%0d][%0d]", i, j), got[i][j], ref_m[i][j], 1e-3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
