// cordic_pe: one processing element chip of the systolic array.
//
// Blocks: clock generator, microprogram control (ucode_rom + useq, an
// Am2910-class sequencer), 1K x 32 program/data RAM, the 32-bit floating-
// point datapath (24-bit mantissa and 8-bit exponent lanes), four serial
// ports (north, west, south, east) and the parallel test port (PIO).  They
// share three internal buses: the 32-bit address bus (pe_pkg::pe_addr_t),
// the 64-bit control bus (pe_pkg::pe_ctrl_t, with the datapath's 30-bit
// control bus in its low bits) and the 32-bit data bus, plus a 16-bit flag
// bus (pe_pkg::pe_flags_t) read by the sequencer's condition test.
//
// Normal mode (test = 0): the clock is sck, the address and control buses
// come from the microinstruction register and the sequencer steps.  Test
// mode (test = 1): the clock is the clock pin, the sequencer holds and the
// buses are driven from the PIO registers when PIO control bit 5 is set, so
// a tester can load and run the datapath, RAM and ports directly.
// The data bus is a multiplexer of its drivers (RAM, datapath, serial ports,
// PIO, immediate from the address bus) with an assertion that at most one
// drives at a time; on chip it would be a tri-state bus.
//
// Pins (thesis pin list): reset (active high, synchronous to the selected
// clock), sck, clock, test, address[2:0], control[9:0], pio[15:0] (here
// pio_i / pio_o / pio_oe), sio[11:0] (sio_i / sio_o / sio_oe): port k uses
// sio[3k] = SD, sio[3k+1] = CK, sio[3k+2] = PS, k = 0 north, 1 west,
// 2 south, 3 east.  The block list, bus widths, pin grouping and test mode are
// from the thesis; the microinstruction format, bus field assignments, the
// immediate path (control bit 37) and the microprogram in rtl/pe_ucode.hex
// are this design's.
module cordic_pe
  import pe_pkg::*;
#(
  parameter string UCODE = "rtl/pe_ucode.hex",
  parameter int    RAM_AW = 10
) (
  input  logic        reset,
  input  logic        sck,
  input  logic        clock,
  input  logic        test,
  input  logic [2:0]  address,
  input  logic [9:0]  control,
  input  logic [15:0] pio_i,
  output logic [15:0] pio_o,
  output logic        pio_oe,
  input  logic [11:0] sio_i,
  output logic [11:0] sio_o,
  output logic [11:0] sio_oe
);

  logic phi, rst_n;
  clkgen u_clk (.sck(sck), .test_clk(clock), .test(test), .phi(phi));
  assign rst_n = !reset;

  // ---------------- buses
  pe_addr_t  abus;
  pe_ctrl_t  cbus;
  pe_flags_t fbus;
  logic [31:0] dbus;

  // ---------------- control block
  uinstr_t         uir;
  logic [UA_W-1:0] next_addr, upc;
  ucode_rom #(.INIT_FILE(UCODE)) u_rom (
    .clk(phi), .rst_n(rst_n), .en(!test), .addr(next_addr), .data(uir)
  );
  useq u_seq (
    .clk(phi), .rst_n(rst_n), .en(!test), .uir(uir), .flags(fbus),
    .map(dbus[UA_W-1:0]), .next_addr(next_addr), .upc(upc)
  );

  // ---------------- test port
  logic [31:0] pio_abus, pio_dbus;
  logic [63:0] pio_cbus;
  logic        pio_drive_buses, pio_drive_data;
  pio u_pio (
    .clk(phi), .rst_n(rst_n), .test(test), .address(address), .control(control),
    .pio_i(pio_i), .pio_o(pio_o), .pio_oe(pio_oe),
    .dbus_i(dbus), .flags_i(fbus), .abus_o(pio_abus), .cbus_o(pio_cbus),
    .dbus_o(pio_dbus), .drive_buses(pio_drive_buses), .drive_data(pio_drive_data)
  );

  always_comb begin
    if (test) begin
      abus = pe_addr_t'(pio_abus);
      cbus = pio_drive_buses ? pe_ctrl_t'(pio_cbus) : '0;
    end else begin
      abus = pe_addr_t'(uir.abus);
      cbus = pe_ctrl_t'(uir.cbus);
    end
  end

  // ---------------- RAM
  logic [31:0] ram_q;
  pe_ram #(.AW(RAM_AW)) u_ram (
    .clk(phi), .we(cbus.ram_we), .addr(abus.ram_a[RAM_AW-1:0]),
    .wdata(dbus), .rdata(ram_q)
  );

  // ---------------- datapath
  logic [31:0] dp_q;
  logic        dp_oe;
  dp_flags_t   dp_flags;
  datapath u_dp (
    .clk(phi), .rst_n(rst_n), .ctrl(cbus.dp), .addr(abus.dp_reg), .dps(cbus.dps),
    .d_in(dbus), .d_out(dp_q), .d_oe(dp_oe), .flags(dp_flags)
  );

  // ---------------- serial ports
  logic [31:0] sio_q [4];
  logic [3:0]  sio_doe, rx_full, tx_busy, tx_ok, tx_err;
  for (genvar k = 0; k < 4; k++) begin : g_sio
    logic sel;
    assign sel = (abus.sio_port == 2'(k));
    sio u_sio (
      .clk(phi), .rst_n(rst_n),
      .sd_i(sio_i[3*k]),   .sd_o(sio_o[3*k]),   .sd_oe(sio_oe[3*k]),
      .ck_i(sio_i[3*k+1]), .ck_o(sio_o[3*k+1]), .ck_oe(sio_oe[3*k+1]),
      .ps_i(sio_i[3*k+2]), .ps_o(sio_o[3*k+2]), .ps_oe(sio_oe[3*k+2]),
      .sel(sel), .reg_a(abus.sio_reg), .wr(cbus.sio_wr), .rd(cbus.sio_rd),
      .go(cbus.sio_go), .ack(cbus.sio_ack), .d_in(dbus),
      .d_out(sio_q[k]), .d_oe(sio_doe[k]), .rx_full(rx_full[k]),
      .tx_busy(tx_busy[k]), .tx_ok(tx_ok[k]), .tx_err(tx_err[k])
    );
  end

  assign fbus = '{tx_busy: tx_busy, rx_full: rx_full, dp: dp_flags};

  // ---------------- data bus
  always_comb begin
    dbus = '0;
    if (cbus.ram_oe)    dbus = ram_q;
    if (dp_oe)          dbus = dp_q;
    if (cbus.lit_oe)    dbus = abus;
    if (pio_drive_data) dbus = pio_dbus;
    for (int k = 0; k < 4; k++)
      if (sio_doe[k]) dbus = sio_q[k];
  end

  logic [7:0] drivers;
  assign drivers = {cbus.ram_oe, dp_oe, cbus.lit_oe, pio_drive_data, sio_doe};

  a_one_driver: assert property (@(posedge phi) disable iff (!rst_n) $onehot0(drivers))
    else $error("cordic_pe: data bus driven by more than one source (%b)", drivers);

  // status bits not used by the demo microprogram are still visible on the
  // serial ports' status registers
  logic unused;
  assign unused = ^{tx_ok, tx_err, upc, cbus.spare};

endmodule
