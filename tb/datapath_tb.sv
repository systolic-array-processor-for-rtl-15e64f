// datapath_tb: first replays the thesis' datapath test vectors (load 0x00000F
// with control 0x04000, load 0x000001 with 0x08000, add with 0x01044; the
// printed response is output 0x000010 and flags 000, with the zero flag set
// while only loading), then the subtract code 0x0104C, then random traffic
// on both lanes through the full 30-bit control word and the address-bus
// load path, checked against a model of the eight registers.
module datapath_tb;
  import pe_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  dp_ctrl_t ctrl = '0;
  logic [1:0] addr = '0;
  logic dps = 1'b0, d_oe;
  logic [31:0] d_in = '0, d_out;
  dp_flags_t flags;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [23:0] mm [4];
  logic [7:0]  em [4];
  logic [23:0] ma, mb, ms, mr;
  logic [7:0]  ea, eb, es;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // ---- the test program of the thesis (mantissa control only)
    @(negedge clk); ctrl = '0; ctrl.man = 18'h04000; d_in = 32'h00000F; #1;
    expect_eq("flag during load", 32'(flags[2:0]), 32'b100);
    @(negedge clk); ctrl.man = 18'h08000; d_in = 32'h000001; #1;
    @(negedge clk); ctrl.man = 18'h01044; d_in = 32'h000001; dps = 1'b1; #1;
    expect_eq("add output", {8'h0, d_out[23:0]}, 32'h000010);
    expect_eq("add flags", 32'(flags[2:0]), 32'b000);
    expect_eq("add drives bus", 32'(d_oe), 32'd1);
    @(negedge clk); ctrl.man = 18'h0104C; #1;
    expect_eq("sub output", {8'h0, d_out[23:0]}, 32'h00000E);
    // ---- address-bus loads (dps, output disabled) into every register
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      ctrl = '0; dps = 1'b1; addr = 2'(r);
      d_in = $urandom;
      mm[r] = d_in[23:0]; em[r] = d_in[31:24];
    end
    @(negedge clk); dps = 1'b0; ctrl = '0;
    // ---- random operations on both lanes
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ctrl = dp_ctrl_t'(30'($urandom));
      ctrl.man.asel = 4'(1 << $urandom_range(0, 3));
      ctrl.man.bsel = ($urandom_range(0, 3) == 0) ? 4'b0 : 4'(1 << $urandom_range(0, 3));
      dps = 1'b1; addr = 2'($urandom);
      d_in = $urandom;
      #1;
      ma = '0; mb = '0; ea = '0; eb = '0;
      for (int r = 0; r < 4; r++) begin
        if (ctrl.man.asel[3-r]) ma = mm[r];
        if (ctrl.man.bsel[3-r]) mb = mm[r];
      end
      if (ctrl.exp.aen) ea = em[ctrl.exp.asel];
      if (ctrl.exp.ben) eb = em[ctrl.exp.bsel];
      ms = ctrl.man.sub ? ma - mb - 24'(ctrl.man.cin) : ma + mb + 24'(ctrl.man.cin);
      mr = !ctrl.man.sh_en ? ms : (ctrl.man.sh_up ? ms << 1 : 24'(signed'(ms) >>> 1));
      es = ctrl.exp.sub ? ea - eb : ea + eb;
      expect_eq("result", d_out, {es, mr});
      expect_eq("oe", 32'(d_oe), 32'(ctrl.man.oe));
      expect_eq("zero flags", {30'd0, flags.m_zero, flags.e_zero}, {30'd0, ms == 0, es == 0});
      @(posedge clk);
      for (int r = 0; r < 4; r++) begin
        if (ctrl.man.ll[r] || (!ctrl.man.oe && addr == 2'(r)))
          mm[r] = ctrl.man.wb ? mr : d_in[23:0];
        if (ctrl.exp.ll[r] || (!ctrl.man.oe && addr == 2'(r)))
          em[r] = ctrl.exp.wb ? es : d_in[31:24];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
