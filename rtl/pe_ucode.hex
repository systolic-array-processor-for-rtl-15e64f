// PE demo microprogram, one 114-bit microinstruction per line
// (pe_pkg::uinstr_t).  Receives two words on the west port, adds
// them, halves the mantissa twice, stores the word in RAM 5, sends it
// east, reloads it from RAM into register 3 and repeats.
380000000d0010000002200000000
0f301000000000000000000000000
38000000040000000001440000000
0f303000000000000000000000000
38000000044000000001440000000
30001000000000000000012593040
24006000000000000000000012401
380000000c00500000002c1400404
380000000c0000000000800000000
0fe09000000000000000000000000
0c00100000c050000000140000000
