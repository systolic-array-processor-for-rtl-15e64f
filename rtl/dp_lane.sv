// dp_lane: one lane of the PE datapath (mantissa or exponent part).
//
// Four scratchpad registers latch either the data bus or the lane's own
// result (load enables ll[3:0], source wb) on the rising clock edge.  Two
// operand multiplexers pick registers for the a and b inputs of the add/sub
// unit by one-hot selects; an all-zero select inhibits the multiplexer and
// gives a zero operand.  A zero detector watches the add/sub output; the
// mantissa lane (HAS_SHIFT = 1) follows it with the one-bit up/down shifter,
// the exponent lane has none.  The path from registers to result is
// combinational, so an add or subtract plus a one-bit shift takes one clock
// and the result can be written back on the next edge.
//
// Structure, register count, inhibit, zero detect and shifter placement
// follow the thesis.  If more than one select bit is set the chosen
// registers are ORed (this design's choice; the microcode never does it).
module dp_lane #(
  parameter int W         = 24,
  parameter bit HAS_SHIFT = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic [3:0]   ll,
  input  logic         wb,
  input  logic [3:0]   asel,    // asel[r] puts register r on a
  input  logic [3:0]   bsel,    // bsel[r] puts register r on b
  input  logic         cin,
  input  logic         sub,
  input  logic         sh_up,
  input  logic         sh_en,
  output logic [W-1:0] result,
  output logic         zero,
  output logic         carry,
  output logic         ovf,
  output logic [W-1:0] regs [4]
);

  logic [W-1:0] a, b, s;

  always_comb begin
    a = '0;
    b = '0;
    for (int r = 0; r < 4; r++) begin
      if (asel[r]) a |= regs[r];
      if (bsel[r]) b |= regs[r];
    end
  end

  addsub #(.W(W)) u_addsub (
    .a(a), .b(b), .cin(cin), .sub(sub), .s(s), .cout(carry), .ovf(ovf)
  );

  assign zero = (s == '0);

  if (HAS_SHIFT) begin : g_shift
    shifter1 #(.W(W)) u_shift (.d(s), .up(sh_up), .en(sh_en), .q(result));
  end else begin : g_noshift
    assign result = s;
    logic unused_sh;
    assign unused_sh = sh_up ^ sh_en;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) regs[r] <= '0;
    end else begin
      for (int r = 0; r < 4; r++)
        if (ll[r]) regs[r] <= wb ? result : din;
    end
  end

endmodule
