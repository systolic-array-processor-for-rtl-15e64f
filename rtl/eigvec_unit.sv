// eigvec_unit: eigenvectors from the converged QR iterate.
//
// After the QR iterations A_N is (nearly) upper triangular with the
// eigenvalues lambda_i = A_N(i,i) on its diagonal.  Its eigenvector matrix B
// is unit upper triangular and is found by back substitution,
//   b_jj = 1,  b_ij = 0 (i > j),
//   b_ij = -1/(lambda_i - lambda_j) * sum_{k=i+1..j} a_ik b_kj   (i < j),
// computed column by column, i from j-1 down to 0.  The eigenvectors of the
// original matrix are then the columns of X = P B, P being the accumulated
// product of the QR transformations.
//
// All arithmetic runs on one CORDIC unit in linear mode (m = 0): rotation
// mode gives y - x z, used as a multiply-accumulate step, and vectoring mode
// gives z - y/x, used for the division.  The unit is sequential: each
// multiply or divide is one CORDIC operation of FRAC+LIN_EXT+2 clocks.
// Using the linear CORDIC for these products and quotients follows the
// thesis' use of CORDIC for multiplication and division; the sequential
// schedule (rather than a signal-flow-graph mapping onto the array) is this
// design's choice.  Quotients and the b_ij must stay below 2^(LIN_EXT+1) in
// magnitude, i.e. the eigenvalues must be well separated relative to the
// off-diagonal entries.
//
// Interface: a_mat and p_mat must be stable from start until done.  done
// pulses for one clock; b_mat and x_mat then hold the result until the next
// start.  The CORDIC x output is not needed (x passes unchanged in linear
// mode) and is left unconnected inside.
module eigvec_unit
  import eig_pkg::*;
#(
  parameter int N       = 5,
  parameter int W       = 32,
  parameter int FRAC    = 20,
  parameter int LIN_EXT = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] a_mat [N][N],
  input  logic signed [W-1:0] p_mat [N][N],
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] b_mat [N][N],
  output logic signed [W-1:0] x_mat [N][N]
);

  localparam logic signed [W-1:0] ONE = W'(1) <<< FRAC;
  localparam int IXW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_MAC, S_MAC_WAIT, S_DIV, S_DIV_WAIT, S_XMAC, S_XMAC_WAIT
  } state_e;
  state_e state;

  logic [IXW-1:0]        i, j, k;
  logic signed [W-1:0]   acc;

  // CORDIC interface
  logic                cstart, cvec, cbusy, cdone;
  logic signed [W-1:0] cx, cy, cx_o, cy_o;
  logic signed [31:0]  cz, cz_o;

  cordic_core #(.W(W), .FRAC(FRAC), .LIN_EXT(LIN_EXT)) u_cordic (
    .clk(clk), .rst_n(rst_n), .start(cstart), .mode(M_LINEAR),
    .vectoring(cvec), .x_in(cx), .y_in(cy), .z_in(cz),
    .busy(cbusy), .done(cdone), .x_out(cx_o), .y_out(cy_o), .z_out(cz_o)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      cstart <= 1'b0;
      cvec   <= 1'b0;
      cx     <= '0;
      cy     <= '0;
      cz     <= '0;
      acc    <= '0;
      i      <= '0;
      j      <= '0;
      k      <= '0;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          b_mat[r][c] <= '0;
          x_mat[r][c] <= '0;
        end
    end else begin
      done   <= 1'b0;
      cstart <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          for (int r = 0; r < N; r++)
            for (int c = 0; c < N; c++)
              b_mat[r][c] <= (r == c) ? ONE : '0;
          if (N > 1) begin
            j     <= IXW'(1);
            i     <= '0;
            k     <= IXW'(1);
            acc   <= '0;
            state <= S_MAC;
          end else begin
            i     <= '0;
            j     <= '0;
            k     <= '0;
            acc   <= '0;
            state <= S_XMAC;
          end
        end
        // acc <- acc - a_ik * b_kj, k = i+1 .. j
        S_MAC: begin
          cx     <= a_mat[i][k];
          cy     <= acc;
          cz     <= 32'(b_mat[k][j]);
          cvec   <= 1'b0;
          cstart <= 1'b1;
          state  <= S_MAC_WAIT;
        end
        S_MAC_WAIT: if (cdone) begin
          acc <= cy_o;
          if (k == j) state <= S_DIV;
          else begin
            k     <= k + 1'b1;
            state <= S_MAC;
          end
        end
        // b_ij = -acc / (lambda_j - lambda_i)
        S_DIV: begin
          cx     <= a_mat[j][j] - a_mat[i][i];
          cy     <= acc;
          cz     <= '0;
          cvec   <= 1'b1;
          cstart <= 1'b1;
          state  <= S_DIV_WAIT;
        end
        S_DIV_WAIT: if (cdone) begin
          b_mat[i][j] <= W'(cz_o);
          acc <= '0;
          if (i != 0) begin
            i     <= i - 1'b1;
            k     <= i;              // next row starts at k = (i-1)+1
            state <= S_MAC;
          end else if (j != IXW'(N - 1)) begin
            j     <= j + 1'b1;
            i     <= j;              // new column j+1 starts at i = j
            k     <= j + 1'b1;
            state <= S_MAC;
          end else begin
            i     <= '0;
            j     <= '0;
            k     <= '0;
            state <= S_XMAC;
          end
        end
        // x_ij = sum_k p_ik b_kj  (acc <- acc - p_ik * (-b_kj)), k = 0 .. j
        S_XMAC: begin
          cx     <= p_mat[i][k];
          cy     <= acc;
          cz     <= -32'(b_mat[k][j]);
          cvec   <= 1'b0;
          cstart <= 1'b1;
          state  <= S_XMAC_WAIT;
        end
        S_XMAC_WAIT: if (cdone) begin
          if (k == j) begin
            x_mat[i][j] <= cy_o;
            acc <= '0;
            k   <= '0;
            if (j != IXW'(N - 1)) begin
              j     <= j + 1'b1;
              state <= S_XMAC;
            end else if (i != IXW'(N - 1)) begin
              j     <= '0;
              i     <= i + 1'b1;
              state <= S_XMAC;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else begin
            acc   <= cy_o;
            k     <= k + 1'b1;
            state <= S_XMAC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) || cbusy;

  // x passes through unchanged in linear mode
  logic unused_x;
  assign unused_x = ^cx_o;

endmodule
