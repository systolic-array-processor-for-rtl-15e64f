// eigen_top: eigenvalue / eigenvector processor for a symmetric or general
// real N x N matrix with real, well separated eigenvalues, plus one PE chip.
//
// Eigen system (left part): the triangular Givens array (qr_array) runs the
// basic QR algorithm  A_k = Q_k R_k,  A_{k+1} = R_k Q_k,  P_k = P_{k-1} Q_k,
// P_0 = I, for QR_ITERS iterations, then eigvec_unit forms the eigenvectors
// of the final quasi-triangular A_N and multiplies them by P_N.  Each
// iteration is three passes through the array, in this order:
//   1. generate: the rows of A_k enter, the rows of R_k leave, the array
//      keeps the rotation angles of Q_k;
//   2. apply: the columns of P_{k-1} enter (as rows), the columns of P_k
//      leave;
//   3. apply: the columns of R_k enter, the columns of A_{k+1} leave.
// Each pass is 3N-2 processing cycles (ticks) of TICK_CLKS clocks, so an
// iteration takes 3 (3N-2) TICK_CLKS clocks; qr_done pulses exactly
// QR_ITERS * 3 * (3N-2) * TICK_CLKS clocks after start.  eigvec_unit then
// runs (done pulses when it finishes).  The matrices A, R, P live in
// registers here and are overwritten in place (a result element is written
// at the end of a tick, after the element it replaces has been read).
//
// Interface: while idle, a_we writes a_data into A(a_row, a_col) (Q11.20
// fixed point, i.e. FRAC = 20 fraction bits).  start begins the computation;
// busy is high until done.  rd_sel/rd_row/rd_col read any element
// combinationally: 0 = A (eigenvalues on the diagonal when done), 1 = R,
// 2 = P, 3 = B (eigenvectors of A_N), 4 = X = P B (eigenvectors of the
// input matrix, one per column, in the order of the diagonal of A).
//
// PE chip (right part): a cordic_pe instance with all its pins brought out
// under a pe_ prefix; it is independent of the eigen system (the thesis
// describes the chip and the array separately; no complete wiring between
// them is given).
//
// Following the thesis: QR iteration and P accumulation by feeding rows,
// then columns, through one triangular array; eigenvectors by back
// substitution in the triangular A_N and X = P B.  This design's choices:
// fixed-point instead of floating-point data, a fixed iteration count
// instead of a convergence test, the pass order, and the tick length.
module eigen_top
  import eig_pkg::*;
#(
  parameter int N         = 5,
  parameter int W         = 32,
  parameter int FRAC      = 20,
  parameter int QR_ITERS  = 20,
  parameter int TICK_CLKS = 36,
  localparam int IXW      = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // eigen system
  input  logic                a_we,
  input  logic [IXW-1:0]      a_row,
  input  logic [IXW-1:0]      a_col,
  input  logic signed [W-1:0] a_data,
  input  logic                start,
  output logic                busy,
  output logic                qr_done,
  output logic                done,
  input  logic [2:0]          rd_sel,
  input  logic [IXW-1:0]      rd_row,
  input  logic [IXW-1:0]      rd_col,
  output logic signed [W-1:0] rd_data,
  // PE chip pins
  input  logic                pe_reset,
  input  logic                pe_sck,
  input  logic                pe_clock,
  input  logic                pe_test,
  input  logic [2:0]          pe_address,
  input  logic [9:0]          pe_control,
  input  logic [15:0]         pe_pio_i,
  output logic [15:0]         pe_pio_o,
  output logic                pe_pio_oe,
  input  logic [11:0]         pe_sio_i,
  output logic [11:0]         pe_sio_o,
  output logic [11:0]         pe_sio_oe
);

  localparam int NT  = 3 * N - 2;                 // ticks per pass
  localparam int TW  = $clog2(NT + 1);
  localparam int CW  = $clog2(TICK_CLKS + 1);
  localparam int ITW = $clog2(QR_ITERS + 1);
  localparam logic signed [W-1:0] ONE = W'(1) <<< FRAC;

  typedef enum logic [1:0] {S_IDLE, S_PASS, S_EIG} state_e;
  typedef enum logic [1:0] {K_R, K_P, K_A} pass_e;

  state_e state;
  pass_e  kind;
  logic [TW-1:0]  tcnt;
  logic [CW-1:0]  ccnt;
  logic [ITW-1:0] iter;

  logic signed [W-1:0] a_m [N][N];
  logic signed [W-1:0] r_m [N][N];
  logic signed [W-1:0] p_m [N][N];
  logic signed [W-1:0] b_m [N][N];
  logic signed [W-1:0] x_m [N][N];

  // ---------------- array
  logic  tick, gen, arr_busy;
  elem_t row_in  [N];
  elem_t row_out [N];
  logic signed [31:0] theta [N][N];

  assign tick = (state == S_PASS) && (ccnt == '0);
  assign gen  = (kind == K_R);

  qr_array #(.N(N), .W(W), .FRAC(FRAC)) u_array (
    .clk(clk), .rst_n(rst_n), .tick(tick), .gen(gen), .row_in(row_in),
    .row_out(row_out), .theta(theta), .busy(arr_busy)
  );

  // skewed feed: element j of input row q at tick max(q,1) + j
  always_comb begin
    for (int q = 0; q < N; q++) begin
      int j;
      j = int'(tcnt) - ((q == 0) ? 1 : q);
      row_in[q] = '0;
      if (state == S_PASS && j >= 0 && j < N) begin
        row_in[q].valid = 1'b1;
        row_in[q].col   = 8'(j);
        unique case (kind)
          K_R:     row_in[q].data = a_m[q][j];
          K_P:     row_in[q].data = p_m[j][q];
          default: row_in[q].data = r_m[j][q];
        endcase
      end
    end
  end

  // ---------------- eigenvectors
  logic ev_start, ev_busy, ev_done;
  eigvec_unit #(.N(N), .W(W), .FRAC(FRAC)) u_eigvec (
    .clk(clk), .rst_n(rst_n), .start(ev_start), .a_mat(a_m), .p_mat(p_m),
    .busy(ev_busy), .done(ev_done), .b_mat(b_m), .x_mat(x_m)
  );

  // ---------------- sequencer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      kind     <= K_R;
      tcnt     <= '0;
      ccnt     <= '0;
      iter     <= '0;
      ev_start <= 1'b0;
      qr_done  <= 1'b0;
      done     <= 1'b0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          a_m[r][c] <= '0;
          r_m[r][c] <= '0;
          p_m[r][c] <= '0;
        end
    end else begin
      ev_start <= 1'b0;
      qr_done  <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (a_we) a_m[a_row][a_col] <= a_data;
          if (start) begin
            for (int r = 0; r < N; r++)
              for (int c = 0; c < N; c++)
                p_m[r][c] <= (r == c) ? ONE : '0;
            kind  <= K_R;
            tcnt  <= '0;
            ccnt  <= '0;
            iter  <= '0;
            state <= S_PASS;
          end
        end
        S_PASS: begin
          if (ccnt == CW'(TICK_CLKS - 1)) begin
            ccnt <= '0;
            // collect the outputs of this tick
            for (int p = 0; p < N; p++)
              if (row_out[p].valid) begin
                unique case (kind)
                  K_R:     r_m[p][row_out[p].col[IXW-1:0]] <= row_out[p].data;
                  K_P:     p_m[row_out[p].col[IXW-1:0]][p] <= row_out[p].data;
                  default: a_m[row_out[p].col[IXW-1:0]][p] <= row_out[p].data;
                endcase
              end
            if (tcnt == TW'(NT - 1)) begin
              tcnt <= '0;
              unique case (kind)
                K_R: kind <= K_P;
                K_P: kind <= K_A;
                default: begin
                  kind <= K_R;
                  if (iter == ITW'(QR_ITERS - 1)) begin
                    qr_done  <= 1'b1;
                    ev_start <= 1'b1;
                    state    <= S_EIG;
                  end else begin
                    iter <= iter + 1'b1;
                  end
                end
              endcase
            end else begin
              tcnt <= tcnt + 1'b1;
            end
          end else begin
            ccnt <= ccnt + 1'b1;
          end
        end
        S_EIG: if (ev_done) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // every cell must have finished its CORDIC operation before the next tick
  a_tick_len: assert property (@(posedge clk) disable iff (!rst_n) tick |-> !arr_busy)
    else $error("eigen_top: TICK_CLKS too short for the array");

  // ---------------- read port
  always_comb begin
    unique case (rd_sel)
      3'd0:    rd_data = a_m[rd_row][rd_col];
      3'd1:    rd_data = r_m[rd_row][rd_col];
      3'd2:    rd_data = p_m[rd_row][rd_col];
      3'd3:    rd_data = b_m[rd_row][rd_col];
      3'd4:    rd_data = x_m[rd_row][rd_col];
      default: rd_data = '0;
    endcase
  end

  // the rotation angles stay inside the array; ev_busy is covered by state
  logic unused;
  always_comb begin
    unused = ev_busy;
    for (int q = 0; q < N; q++)
      for (int p = 0; p < N; p++) unused ^= ^theta[q][p];
  end

  // ---------------- PE chip
  cordic_pe u_pe (
    .reset(pe_reset), .sck(pe_sck), .clock(pe_clock), .test(pe_test),
    .address(pe_address), .control(pe_control),
    .pio_i(pe_pio_i), .pio_o(pe_pio_o), .pio_oe(pe_pio_oe),
    .sio_i(pe_sio_i), .sio_o(pe_sio_o), .sio_oe(pe_sio_oe)
  );

endmodule
