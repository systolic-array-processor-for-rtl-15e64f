// qr_array: triangular systolic array of Givens cells for an N x N matrix.
//
// The array has N(N-1)/2 cells.  Cell (q,p), 0 <= p < q < N, annihilates
// element (q,p): it rotates pivot row p (arriving on its x input) against
// row q (on its y input).  This is the projection of the QR flow graph along
// the row-loop direction: one processor per eliminated element, arranged in
// N-1 columns, column p holding cells (p+1,p) .. (N-1,p).  Links:
//   * x of (q,p): from x_out of (q-1,p); for q = p+1 it is row p leaving
//     column p-1 (y_out of (p,p-1), held for one tick in a register), or
//     row_in[0] for p = 0;
//   * y of (q,p): y_out of (q,p-1), or row_in[q] for p = 0;
//   * row_out[p] = x_out of (N-1,p) for p < N-1, row_out[N-1] = y_out of
//     (N-1,N-2) held for one tick.
// So rows enter at the left and the finished rows leave from the last row of
// cells, which matches the "rows in from the side, result out of the top"
// arrangement of the thesis drawn for a 5 x 5 matrix.  The rotation order
// per column, G(N-1,p)...G(p+1,p), is the order of the thesis' Q^T product.
//
// Timing (lock step, one processing cycle per tick): element j of row q must
// be presented at tick t0 + max(q,1) + j, i.e. consecutive elements one tick
// apart and each row one tick behind the row above it (rows 0 and 1 enter
// together, they meet in cell (1,0)).  Element j of output row p is valid
// after tick t0 + p + N - 1 + j, until the next tick; a full pass therefore
// takes 3N-2 ticks.  The thesis' space-time chart delays rows by two
// processing cycles; here rows are one tick apart and the pivot row that
// moves on to the next column is held back one tick instead.
//
// gen = 1: the array triangularizes (R = Q^T A) and stores the angles of Q.
// gen = 0: the array multiplies the rows fed in by the stored Q^T; feeding
// the columns of X yields the columns of X Q on the outputs.
module qr_array
  import eig_pkg::*;
#(
  parameter int N    = 5,
  parameter int W    = 32,
  parameter int FRAC = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic               gen,
  input  elem_t              row_in  [N],
  output elem_t              row_out [N],
  output logic signed [31:0] theta   [N][N],
  output logic               busy
);

  elem_t xo [N][N];
  elem_t yo [N][N];
  logic [N-1:0] cbusy [N];

  // One-tick delay on each pivot-row hand-over (row p leaving column p-1
  // enters column p one processing cycle later than the other rows need)
  // and on the last output row, so every output row has the same timing.
  elem_t piv_dly [N];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) piv_dly[p] <= '0;
    end else if (tick) begin
      piv_dly[0] <= '0;
      for (int p = 1; p < N; p++) piv_dly[p] <= yo[p][p-1];
    end
  end

  for (genvar q = 0; q < N; q++) begin : g_row
    for (genvar p = 0; p < N; p++) begin : g_col
      if (p < q) begin : g_cell
        elem_t xi, yi;
        if (q == p + 1) begin : g_xpiv
          if (p == 0) begin : g_in
            assign xi = row_in[0];
          end else begin : g_prev
            assign xi = piv_dly[p];
          end
        end else begin : g_xdown
          assign xi = xo[q-1][p];
        end
        if (p == 0) begin : g_yin
          assign yi = row_in[q];
        end else begin : g_yleft
          assign yi = yo[q][p-1];
        end
        givens_cell #(.COL(p), .W(W), .FRAC(FRAC)) u_cell (
          .clk  (clk),
          .rst_n(rst_n),
          .tick (tick),
          .gen  (gen),
          .x_in (xi),
          .y_in (yi),
          .x_out(xo[q][p]),
          .y_out(yo[q][p]),
          .theta(theta[q][p]),
          .busy (cbusy[q][p])
        );
      end else begin : g_empty
        assign xo[q][p]    = '0;
        assign yo[q][p]    = '0;
        assign theta[q][p] = '0;
        assign cbusy[q][p] = 1'b0;
      end
    end
  end

  for (genvar p = 0; p < N - 1; p++) begin : g_out
    assign row_out[p] = xo[N-1][p];
  end
  assign row_out[N-1] = piv_dly[N-1];

  always_comb begin
    busy = 1'b0;
    for (int q = 0; q < N; q++) busy |= |cbusy[q];
  end

endmodule
