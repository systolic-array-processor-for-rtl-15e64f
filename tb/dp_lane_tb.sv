// dp_lane_tb: random sequences of register loads (from the bus or from the
// result), operand selections (including inhibit), add/subtract and shifts on
// a 24-bit lane with shifter, checked against a register model kept here.
module dp_lane_tb;
  localparam int W = 24;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] din = '0, result;
  logic [3:0] ll = '0, asel = '0, bsel = '0;
  logic wb = 1'b0, cin = 1'b0, sub = 1'b0, sh_up = 1'b0, sh_en = 1'b0;
  logic zero, carry, ovf;
  logic [W-1:0] regs [4];
  int n_wb = 0, n_inh = 0, n_shift = 0, n_zero = 0;

  dp_lane dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] m [4];
  logic [W-1:0] a, b, s, r;

  initial begin
    for (int i = 0; i < 4; i++) m[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      din = W'($urandom);
      ll = 4'($urandom);
      wb = 1'($urandom);
      // one-hot or empty selects
      asel = ($urandom_range(0, 4) == 4) ? 4'b0 : 4'(1 << $urandom_range(0, 3));
      bsel = ($urandom_range(0, 4) == 4) ? 4'b0 : 4'(1 << $urandom_range(0, 3));
      if (n % 97 == 0) bsel = asel;            // force a zero result sometimes
      cin = 1'($urandom); sub = 1'($urandom);
      if (n % 97 == 0) begin sub = 1'b1; cin = 1'b0; end
      sh_up = 1'($urandom); sh_en = 1'($urandom);
      #1;
      a = '0; b = '0;
      for (int i = 0; i < 4; i++) begin
        if (asel[i]) a = m[i];
        if (bsel[i]) b = m[i];
      end
      s = sub ? a - b - W'(cin) : a + b + W'(cin);
      r = !sh_en ? s : (sh_up ? s << 1 : W'(signed'(s) >>> 1));
      checks++;
      if (result !== r || zero !== (s == '0)) begin
        failures++;
        $display("FAIL n=%0d result %h exp %h", n, result, r);
      end
      if (asel == 0 || bsel == 0) n_inh++;
      if (sh_en) n_shift++;
      if (s == '0) n_zero++;
      if (wb && ll != 0) n_wb++;
      @(posedge clk);
      for (int i = 0; i < 4; i++) if (ll[i]) m[i] = wb ? r : din;
    end
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (regs[i] !== m[i]) begin failures++; $display("FAIL reg %0d", i); end
    end
    checks++;
    if (n_inh == 0 || n_shift == 0 || n_zero == 0 || n_wb == 0) begin
      failures++;
      $display("FAIL coverage inh=%0d shift=%0d zero=%0d wb=%0d", n_inh, n_shift, n_zero, n_wb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
