// shifter1: one-bit up/down shifter at the mantissa add/sub output.
//
// en = 0: no shift (en overrides up).  en = 1, up = 1: shift up one place
// (x2, zero in at the bottom).  en = 1, up = 0: shift down one place (/2);
// the top bit is copied so two's complement values keep their sign, which
// is this design's choice.  Combinational.
module shifter1 #(
  parameter int W = 24
) (
  input  logic [W-1:0] d,
  input  logic         up,
  input  logic         en,
  output logic [W-1:0] q
);

  always_comb begin
    if (!en)     q = d;
    else if (up) q = {d[W-2:0], 1'b0};
    else         q = {d[W-1], d[W-1:1]};
  end

endmodule
