// addsub: W-bit add/subtract unit of the PE datapath.
//
// sub = 0: s = a + b + cin.  sub = 1: s = a - b - cin (cin acts as a
// borrow), done as a + ~b + !cin.  cout is the carry out of the top bit and
// ovf the two's complement overflow.  Purely combinational.  The thesis
// gives the a/b/CIN inputs and the add/sub control (low = add); the borrow
// meaning of CIN in subtraction is this design's choice.
module addsub #(
  parameter int W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         cout,
  output logic         ovf
);

  logic [W-1:0] bx;
  logic [W:0]   sum;

  always_comb begin
    bx   = sub ? ~b : b;
    sum  = {1'b0, a} + {1'b0, bx} + {{W{1'b0}}, cin ^ sub};
    s    = sum[W-1:0];
    cout = sum[W];
    ovf  = (a[W-1] == bx[W-1]) && (s[W-1] != a[W-1]);
  end

endmodule
