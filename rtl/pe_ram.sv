// pe_ram: the PE's program/data RAM, 2^AW words of 32 bits.
//
// Holds the operation sequence, data and CORDIC coefficients.  Write on the
// rising clock edge when we is high; read is asynchronous (the word at addr
// is on rdata in the same cycle), so a RAM-to-register transfer over the
// data bus takes one clock.  Size and read timing are this design's choice;
// the thesis names the block and its contents only.
module pe_ram #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);

  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
