// pe_ram_tb: random writes and reads against a model; reads are checked in
// the same cycle the address is applied (asynchronous read) and a write is
// visible right after the clock edge.
module pe_ram_tb;
  localparam int AW = 10;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;

  pe_ram dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1'b1; addr = AW'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      addr = AW'($urandom);
      we = ($urandom_range(0, 2) == 0);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL read %0d: %h vs %h", addr, rdata, model[addr]);
      end
      if (we) model[addr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[addr]) begin
        failures++;
        $display("FAIL after write %0d", addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
