// clkgen_tb: two free-running clocks of different periods; phi must follow
// sck with test low and the test clock with test high, checked at many
// random instants, and must toggle in both settings.
module clkgen_tb;
  timeunit 1ns;
  timeprecision 1ps;
  logic sck = 1'b0, test_clk = 1'b0, test = 1'b0, phi;
  int checks = 0, failures = 0, n_edges_norm = 0, n_edges_test = 0;

  clkgen dut (.*);

  always #5 sck = ~sck;
  always #7 test_clk = ~test_clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge phi) if (test) n_edges_test++; else n_edges_norm++;

  initial begin
    #0.5;   // sample half-way between the integer-time clock edges
    for (int i = 0; i < 400; i++) begin
      #($urandom_range(1, 9));
      if (i == 200) begin
        test = 1'b1;
        #1;
      end
      checks++;
      if (phi !== (test ? test_clk : sck)) begin
        failures++;
        $display("FAIL phi=%b test=%b sck=%b test_clk=%b", phi, test, sck, test_clk);
      end
    end
    checks++;
    if (n_edges_norm == 0 || n_edges_test == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
