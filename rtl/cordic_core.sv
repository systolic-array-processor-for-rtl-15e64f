// cordic_core: iterative CORDIC unit (Volder/Walther unified iteration).
//
// One micro-rotation per clock:
//   x(i+1) = x(i) + m * d(i) * y(i) * 2^-i
//   y(i+1) = y(i) -     d(i) * x(i) * 2^-i
//   z(i+1) = z(i) -     d(i) * alpha(i)
// with m = +1 (circular, alpha = atan 2^-i), 0 (linear, alpha = 2^-i) or
// -1 (hyperbolic, alpha = atanh 2^-i).  In rotation mode d(i) = sign(z(i))
// and the vector is turned clockwise by z:
//   circular:   x' = x cos z + y sin z,  y' = y cos z - x sin z,  z' = 0
//   linear:     x' = x,                  y' = y - x z,             z' = 0
//   hyperbolic: x' = x cosh z - y sinh z, y' = y cosh z - x sinh z, z' = 0
// In vectoring mode d(i) drives y to zero:
//   circular:   x' = sqrt(x^2 + y^2),   z' = z - atan2(y, x)
//   linear:     x' = x,                 z' = z - y / x
//   hyperbolic: x' = sqrt(x^2 - y^2),   z' = z - atanh(y / x)
// These are the equations and the function boxes of the thesis.  The
// circular and hyperbolic results are multiplied by 1/K once at the end
// (one constant multiply), so the outputs are true rotations.
//
// Choices of this design: fixed point (data W bits with FRAC fraction bits,
// angles Q2.29 as in eig_pkg); W-1 circular iterations (the thesis: n
// iterations for an n+1 bit word); the arctangent table has 11 entries and
// 2^-i is used beyond it; the circular unit first turns the vector by pi when
// it lies in the left half plane (vectoring) or |z| > pi/2 (rotation) so
// the whole circle is covered; hyperbolic iterations run i = 1..W-2 with
// i = 4 and 13 repeated; linear iterations run i = -LIN_EXT .. FRAC so that
// products and quotients up to 2^(LIN_EXT+1) in magnitude are reachable.
//
// Interface: pulse start for one clock with the operands; busy is high while
// working; done pulses for one clock with x_out/y_out/z_out valid (they hold
// until the next start).  Latency start -> done: S + 1 clocks, S = number of
// micro-rotations (31 circular, 32 hyperbolic, FRAC+LIN_EXT+1 linear).
// For the linear mode z is in the data format; otherwise it is an angle.
module cordic_core
  import eig_pkg::*;
#(
  parameter int W       = 32,
  parameter int FRAC    = 20,
  parameter int LIN_EXT = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  cordic_mode_e        mode,
  input  logic                vectoring,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [31:0]  z_in,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic signed [31:0]  z_out
);

  localparam int IW = W + LIN_EXT + 3;   // internal width with guard bits
  localparam int ZW = 34;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_SCALE} state_e;
  state_e state;

  logic signed [IW-1:0] x, y;
  logic signed [ZW-1:0] z;
  logic signed [7:0]    it;        // current shift amount i
  logic                 rep_done;  // hyperbolic repeat already taken at it
  cordic_mode_e         mode_q;
  logic                 vec_q;

  // ---------------- pre-step (quadrant extension, circular only) --------
  logic signed [IW-1:0] x0, y0, xin_e, yin_e;
  logic signed [ZW-1:0] z0, zin_e;
  always_comb begin
    xin_e = IW'(x_in);
    yin_e = IW'(y_in);
    zin_e = ZW'(z_in);
    x0 = xin_e;
    y0 = yin_e;
    z0 = zin_e;
    if (mode == M_CIRCULAR) begin
      if (vectoring) begin
        if (x_in < 0) begin
          x0 = -xin_e;
          y0 = -yin_e;
          z0 = (y_in >= 0) ? zin_e - ZW'(ANG_PI) : zin_e + ZW'(ANG_PI);
        end
      end else begin
        if (zin_e > ZW'(ANG_HALF_PI)) begin
          x0 = -xin_e; y0 = -yin_e; z0 = zin_e - ZW'(ANG_PI);
        end else if (zin_e < -ZW'(ANG_HALF_PI)) begin
          x0 = -xin_e; y0 = -yin_e; z0 = zin_e + ZW'(ANG_PI);
        end
      end
    end
  end

  // ---------------- one micro-rotation ----------------------------------
  logic signed [IW-1:0] xs, ys, xn, yn;
  logic signed [ZW-1:0] alpha, zn;
  logic                 d_neg;     // d = -1
  int                   sh;
  always_comb begin
    sh = int'(it);
    if (sh < 0) begin
      xs = x <<< (-sh);
      ys = y <<< (-sh);
    end else begin
      xs = x >>> sh;
      ys = y >>> sh;
    end
    // step angle
    alpha = '0;
    unique case (mode_q)
      M_CIRCULAR:
        if (sh < ATAN_ENTRIES) alpha = ZW'(ATAN_TABLE[sh]);
        else if (sh <= ANG_FRAC) alpha = ZW'(1) <<< (ANG_FRAC - sh);
      M_HYPERBOLIC:
        if (sh < ATAN_ENTRIES) alpha = ZW'(ATANH_TABLE[sh]);
        else if (sh <= ANG_FRAC) alpha = ZW'(1) <<< (ANG_FRAC - sh);
      default:
        if (sh <= FRAC) alpha = ZW'(1) <<< (FRAC - sh);
    endcase
    // direction
    if (vec_q) begin
      if (mode_q == M_LINEAR) d_neg = y[IW-1] ^ x[IW-1];
      else                    d_neg = y[IW-1];
    end else begin
      d_neg = z[ZW-1];
    end
    // update
    unique case (mode_q)
      M_CIRCULAR:   xn = d_neg ? x - ys : x + ys;
      M_HYPERBOLIC: xn = d_neg ? x + ys : x - ys;
      default:      xn = x;
    endcase
    yn = d_neg ? y + xs : y - xs;
    zn = d_neg ? z + alpha : z - alpha;
  end

  // last micro-rotation of the current mode?
  logic last_step;
  always_comb begin
    unique case (mode_q)
      M_LINEAR:     last_step = (int'(it) >= FRAC);
      M_HYPERBOLIC: last_step = (int'(it) >= W - 2) &&
                                !((it == 8'sd4 || it == 8'sd13) && !rep_done);
      default:      last_step = (int'(it) >= W - 2);
    endcase
  end

  // ---------------- gain correction --------------------------------------
  logic signed [IW+31:0] xp, yp;
  always_comb begin
    if (mode_q == M_HYPERBOLIC) begin
      xp = (IW+32)'(x) * (IW+32)'(KHINV_Q30);
      yp = (IW+32)'(y) * (IW+32)'(KHINV_Q30);
    end else begin
      xp = (IW+32)'(x) * (IW+32)'(KINV_Q30);
      yp = (IW+32)'(y) * (IW+32)'(KINV_Q30);
    end
  end

  // ---------------- sequencing -------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      x        <= '0;
      y        <= '0;
      z        <= '0;
      it       <= '0;
      rep_done <= 1'b0;
      mode_q   <= M_CIRCULAR;
      vec_q    <= 1'b0;
      done     <= 1'b0;
      x_out    <= '0;
      y_out    <= '0;
      z_out    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x        <= x0;
          y        <= y0;
          z        <= z0;
          mode_q   <= mode;
          vec_q    <= vectoring;
          rep_done <= 1'b0;
          unique case (mode)
            M_LINEAR:     it <= -8'(LIN_EXT);
            M_HYPERBOLIC: it <= 8'sd1;
            default:      it <= 8'sd0;
          endcase
          state <= S_RUN;
        end
        S_RUN: begin
          x <= xn;
          y <= yn;
          z <= zn;
          if (mode_q == M_HYPERBOLIC && (it == 8'sd4 || it == 8'sd13) && !rep_done) begin
            rep_done <= 1'b1;          // take the same shift once more
          end else begin
            rep_done <= 1'b0;
            it       <= it + 8'sd1;
          end
          if (last_step) state <= S_SCALE;
        end
        S_SCALE: begin
          if (mode_q == M_LINEAR) begin
            x_out <= W'(x);
            y_out <= W'(y);
          end else begin
            x_out <= W'(xp >>> 30);
            y_out <= W'(yp >>> 30);
          end
          z_out <= 32'(z);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
