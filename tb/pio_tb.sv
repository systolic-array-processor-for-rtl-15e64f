// pio_tb: the parallel test port.  All eight registers written and read
// back through the pins; the address, data and control bus words formed
// from them; capture of the data and flag buses; apply/drive outputs; and
// that nothing happens with test low (no writes, no pin drive, no apply).
module pio_tb;
  logic clk = 1'b0, rst_n = 1'b0, test = 1'b0;
  logic [2:0] address = '0;
  logic [9:0] control = '0;
  logic [15:0] pio_i = '0, pio_o, flags_i = '0;
  logic pio_oe, drive_buses, drive_data;
  logic [31:0] dbus_i = '0, abus_o, dbus_o;
  logic [63:0] cbus_o;
  logic [15:0] val [8];
  int checks = 0, failures = 0;

  pio dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cyc(input int a, input logic [9:0] c, input logic [15:0] d);
    @(negedge clk);
    address = 3'(a); control = c; pio_i = d;
    @(negedge clk);
    control = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    test = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int a = 0; a < 8; a++) begin
        val[a] = 16'($urandom);
        cyc(a, 10'b1, val[a]);
      end
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        address = 3'(a); control = 10'b10;
        #1;
        check("read oe", 64'(pio_oe), 1);
        check($sformatf("read reg %0d", a), 64'(pio_o), 64'(val[a]));
      end
      control = '0;
      check("abus", 64'(abus_o), {32'b0, val[1], val[0]});
      check("dbus", 64'(dbus_o), {32'b0, val[3], val[2]});
      check("cbus", cbus_o, {val[7], val[6], val[5], val[4]});
      // apply with and without drive
      @(negedge clk);
      control = 10'b10_0100;
      #1;
      check("apply+drive", {drive_buses, drive_data}, 2'b11);
      control = 10'b10_0000;
      #1;
      check("apply only", {drive_buses, drive_data}, 2'b10);
      // capture data and flags
      dbus_i = $urandom; flags_i = 16'($urandom);
      control = 10'b01_1000;
      @(negedge clk);
      control = '0;
      #1;
      check("captured data", 64'(dbus_o), 64'(dbus_i));
      check("captured flags", 64'(cbus_o[63:48]), 64'(flags_i));
    end
    // test low: port inert
    test = 1'b0;
    cyc(0, 10'b1, 16'hBEEF);
    @(negedge clk);
    address = 3'd0; control = 10'b10_0110;
    #1;
    check("inert: no pin drive / apply", {pio_oe, drive_buses, drive_data}, 3'b000);
    check("inert: no write", 64'(pio_o), 64'(val[0]));
    control = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
