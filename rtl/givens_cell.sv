// givens_cell: one processor of the triangular QR systolic array.
//
// The cell sits in array column COL and handles two matrix rows: the pivot
// row p = COL (on x) and one lower row q (on y).  Elements of the two rows
// arrive in pairs, one pair per processing cycle, tagged with their column
// index j.  In generate mode the pair with j == COL fixes the Givens angle:
// the cell runs the CORDIC unit in circular vectoring mode, which returns
// sqrt(a_pj^2 + a_qj^2) and theta = atan2(a_qj, a_pj), stores theta and puts
// out the annihilated element as an exact 0.  Pairs with j > COL are then
// rotated by the stored angle (circular rotation mode):
//   a'_pj =  a_pj cos(theta) + a_qj sin(theta)
//   a'_qj = -a_pj sin(theta) + a_qj cos(theta)
// Pairs with j < COL are already zero in both rows and pass unchanged.  In
// apply mode (gen = 0) every pair is rotated by the stored angle, which is
// how the array multiplies a matrix fed into it by the stored rotation
// without changing that rotation.
//
// Timing: the array runs in lock step.  On each tick the cell takes the
// pair presented on x_in / y_in and clears its outputs; the result appears
// on x_out / y_out (valid set) one CORDIC operation later (32 clocks with
// the default width) and stays until the next tick.  tick must therefore be
// at least 33 clocks apart.  The lock-step processing cycle, the tags and
// the exact zero are choices of this design; the rotation equations and the
// generate-then-apply behaviour are the thesis' Givens processor.
module givens_cell
  import eig_pkg::*;
#(
  parameter int COL  = 0,
  parameter int W    = 32,
  parameter int FRAC = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic               gen,
  input  elem_t              x_in,
  input  elem_t              y_in,
  output elem_t              x_out,
  output elem_t              y_out,
  output logic signed [31:0] theta,
  output logic               busy
);

  typedef enum logic [1:0] {OP_NONE, OP_VEC, OP_ROT} op_e;

  op_e                 op;
  logic [7:0]          col_q;
  logic                cstart, cbusy, cdone;
  logic signed [W-1:0] cx, cy;
  logic signed [31:0]  cz;
  logic signed [W-1:0] xi, yi;


  cordic_core #(.W(W), .FRAC(FRAC)) u_cordic (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (cstart),
    .mode     (M_CIRCULAR),
    .vectoring(op == OP_VEC),
    .x_in     (xi),
    .y_in     (yi),
    .z_in     (op == OP_VEC ? 32'sd0 : theta),
    .busy     (cbusy),
    .done     (cdone),
    .x_out    (cx),
    .y_out    (cy),
    .z_out    (cz)
  );

  // decide what to do with the pair presented at this tick
  op_e op_next;
  always_comb begin
    op_next = OP_NONE;
    if (x_in.valid && y_in.valid) begin
      if (!gen)                          op_next = OP_ROT;
      else if (int'(x_in.col) == COL)    op_next = OP_VEC;
      else if (int'(x_in.col) > COL)     op_next = OP_ROT;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      op     <= OP_NONE;
      cstart <= 1'b0;
      col_q  <= '0;
      xi     <= '0;
      yi     <= '0;
      theta  <= '0;
      x_out  <= '0;
      y_out  <= '0;
    end else begin
      cstart <= 1'b0;
      if (tick) begin
        op     <= op_next;
        col_q  <= x_in.col;
        xi     <= W'(signed'(x_in.data));
        yi     <= W'(signed'(y_in.data));
        if (op_next == OP_NONE) begin
          // pass through (j < COL in generate mode, or an empty slot)
          x_out <= x_in;
          y_out <= y_in;
        end else begin
          x_out  <= '0;
          y_out  <= '0;
          cstart <= 1'b1;
        end
      end else if (cdone) begin
        x_out <= '{valid: 1'b1, col: col_q, data: 32'(cx)};
        if (op == OP_VEC) begin
          y_out <= '{valid: 1'b1, col: col_q, data: 32'd0};
          theta <= -cz;
        end else begin
          y_out <= '{valid: 1'b1, col: col_q, data: 32'(cy)};
        end
      end
    end
  end

  assign busy = cbusy | cstart;

  // the two rows must travel together
  a_pair : assert property (@(posedge clk) disable iff (!rst_n)
                            tick |-> (x_in.valid == y_in.valid))
    else $error("givens_cell: unpaired element");
  a_rate : assert property (@(posedge clk) disable iff (!rst_n)
                            tick |-> !busy)
    else $error("givens_cell: tick while busy");

endmodule
