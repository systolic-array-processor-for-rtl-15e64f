// pio: parallel test port of the PE.
//
// Eight 16-bit buffer registers sit between the 16-bit PIO pins and the
// PE's internal buses: registers 0-1 hold the 32-bit internal address bus
// word (low half in the even register), 2-3 the data bus word and 4-7 the
// 64-bit control bus word.  address[2:0] selects one register; a 32-bit
// value is therefore loaded as its even half in one clock and its odd half
// in the next.  In test mode the tester loads a complete bus set this way
// and then applies it for one clock with the apply bit: the address and
// control words go onto the internal buses (in place of the controller) and,
// if requested, the data word drives the data bus.  The PE's response is
// captured back into the registers from the data bus and the flag bus and
// read out through the pins.
//
// control[9:0] (this design's encoding; the thesis gives the width only):
//   [0] wr        pins -> register[address]
//   [1] rd        register[address] -> pins (pio_oe)
//   [2] drive     data registers -> internal data bus (with apply)
//   [3] cap_data  internal data bus -> registers 2-3
//   [4] cap_flags flag bus -> register 7
//   [5] apply     put registers 0-1 and 4-7 on the address/control buses
//   [9:6] unused
// The port only acts while test is high; otherwise it drives nothing.
// Registers load on the rising edge of clk (the PE clock, which is the
// test clock pin in test mode).
module pio (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test,
  input  logic [2:0]  address,
  input  logic [9:0]  control,
  input  logic [15:0] pio_i,
  output logic [15:0] pio_o,
  output logic        pio_oe,
  // internal bus side
  input  logic [31:0] dbus_i,
  input  logic [15:0] flags_i,
  output logic [31:0] abus_o,
  output logic [63:0] cbus_o,
  output logic [31:0] dbus_o,
  output logic        drive_buses,
  output logic        drive_data
);

  logic [15:0] r [8];
  logic wr, rd, drive, cap_data, cap_flags, apply;

  assign wr        = test && control[0];
  assign rd        = test && control[1];
  assign drive     = test && control[2];
  assign cap_data  = test && control[3];
  assign cap_flags = test && control[4];
  assign apply     = test && control[5];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) r[i] <= '0;
    end else begin
      if (wr) r[address] <= pio_i;
      if (cap_data) begin
        r[2] <= dbus_i[15:0];
        r[3] <= dbus_i[31:16];
      end
      if (cap_flags) r[7] <= flags_i;
    end
  end

  assign pio_o       = r[address];
  assign pio_oe      = rd;
  assign abus_o      = {r[1], r[0]};
  assign dbus_o      = {r[3], r[2]};
  assign cbus_o      = {r[7], r[6], r[5], r[4]};
  assign drive_buses = apply;
  assign drive_data  = apply && drive;

  logic unused_ctl;
  assign unused_ctl = ^control[9:6];

endmodule
