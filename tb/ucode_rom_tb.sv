// ucode_rom_tb: reads the whole microprogram memory.  The first eleven
// words must equal the demo program (values written out here), the rest
// zero; the output is registered (word appears after the clock edge), is
// zero in reset and holds while en is low.
module ucode_rom_tb;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [UA_W-1:0] addr = '0;
  uinstr_t data;
  int checks = 0, failures = 0;

  localparam logic [113:0] PROG [11] = '{
    114'h380000000d0010000002200000000, 114'h0f301000000000000000000000000,
    114'h38000000040000000001440000000, 114'h0f303000000000000000000000000,
    114'h38000000044000000001440000000, 114'h30001000000000000000012593040,
    114'h24006000000000000000000012401, 114'h380000000c00500000002c1400404,
    114'h380000000c0000000000800000000, 114'h0fe09000000000000000000000000,
    114'h0c00100000c050000000140000000};

  ucode_rom dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [113:0] got, logic [113:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    addr = 8'd3; en = 1'b1;
    repeat (2) @(negedge clk);
    check("reset output", data, '0);
    rst_n = 1'b1;
    for (int a = 0; a < 2**UA_W; a++) begin
      @(negedge clk);
      addr = UA_W'(a);
      @(negedge clk);
      check($sformatf("word %0d", a), data, (a < 11) ? PROG[a] : '0);
    end
    // hold
    addr = 8'd1;
    @(negedge clk);
    check("word 1", data, PROG[1]);
    en = 1'b0; addr = 8'd2;
    repeat (3) @(negedge clk);
    check("hold while disabled", data, PROG[1]);
    en = 1'b1;
    @(negedge clk);
    check("word 2 after enable", data, PROG[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
