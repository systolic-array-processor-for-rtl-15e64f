// ucode_rom: the PE's microprogram store.
//
// 2^UA_W words of the 114-bit microinstruction pe_pkg::uinstr_t.  The read
// is synchronous: the word addressed on one rising edge appears on data
// after it, so the output register doubles as the microinstruction pipeline
// register that the sequencer works from.  Reset clears the output to an
// all-zero word, which is a "jump to zero" with no bus activity, so the
// first word fetched after reset is word 0.  The contents are loaded from
// INIT_FILE (hex, one word per line); the thesis gives no microcode, and the
// default file holds this design's demonstration program.
module ucode_rom
  import pe_pkg::*;
#(
  parameter string INIT_FILE = "rtl/pe_ucode.hex"
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  logic [UA_W-1:0] addr,
  output uinstr_t         data
);

  logic [$bits(uinstr_t)-1:0] rom [2**UA_W];

  initial begin
    for (int i = 0; i < 2**UA_W; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  data <= '0;
    else if (en) data <= uinstr_t'(rom[addr]);
  end

endmodule
