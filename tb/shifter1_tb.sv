// shifter1_tb: random words through the one-bit shifter in all three
// control settings, compared with shifts computed here.
module shifter1_tb;
  int checks = 0, failures = 0;
  logic [23:0] d, q, e;
  logic up, en;

  shifter1 dut (.d(d), .up(up), .en(en), .q(q));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      d = 24'($urandom); up = 1'($urandom); en = 1'($urandom);
      #1;
      if (!en)     e = d;
      else if (up) e = d << 1;
      else         e = 24'(signed'(d) >>> 1);
      checks++;
      if (q !== e) begin
        failures++;
        $display("FAIL d=%h up=%b en=%b q=%h exp %h", d, up, en, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
