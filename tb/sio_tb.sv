// sio_tb: two serial ports linked back to back (A sends, B receives),
// driven through their controller interfaces.  Checked: random words
// arrive intact; a word takes exactly 2 clocks per bit (A busy for
// 2*32 + 3 clocks when B is ready); B's PS line drops when its register is
// full and A then waits (no overrun) until B is acknowledged; tx_ok after a
// successful transfer; tx_err when the receiver never signals (PS stuck
// high); status register read-back.
module sio_tb;
  localparam int WORD = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  // port A (sender) controller side
  logic a_sel = 1'b1, a_wr = 1'b0, a_rd = 1'b0, a_go = 1'b0, a_ack = 1'b0;
  logic [1:0] a_reg = '0;
  logic [31:0] a_din = '0, a_dout;
  logic a_doe, a_rx_full, a_tx_busy, a_tx_ok, a_tx_err;
  // port B (receiver)
  logic b_sel = 1'b1, b_wr = 1'b0, b_rd = 1'b0, b_go = 1'b0, b_ack = 1'b0;
  logic [1:0] b_reg = '0;
  logic [31:0] b_din = '0, b_dout;
  logic b_doe, b_rx_full, b_tx_busy, b_tx_ok, b_tx_err;
  // lines
  logic a_sd, a_sd_oe, a_ck, a_ck_oe, a_ps, a_ps_oe;
  logic b_sd, b_sd_oe, b_ck, b_ck_oe, b_ps, b_ps_oe;
  logic ps_force = 1'b0;       // cut the PS line and hold it high
  int checks = 0, failures = 0;

  sio dut_a (.clk(clk), .rst_n(rst_n),
    .sd_i(b_sd_oe & b_sd), .sd_o(a_sd), .sd_oe(a_sd_oe),
    .ck_i(b_ck_oe & b_ck), .ck_o(a_ck), .ck_oe(a_ck_oe),
    .ps_i(ps_force | (b_ps_oe & b_ps)), .ps_o(a_ps), .ps_oe(a_ps_oe),
    .sel(a_sel), .reg_a(a_reg), .wr(a_wr), .rd(a_rd), .go(a_go), .ack(a_ack),
    .d_in(a_din), .d_out(a_dout), .d_oe(a_doe), .rx_full(a_rx_full),
    .tx_busy(a_tx_busy), .tx_ok(a_tx_ok), .tx_err(a_tx_err));
  sio dut_b (.clk(clk), .rst_n(rst_n),
    .sd_i(a_sd_oe & a_sd), .sd_o(b_sd), .sd_oe(b_sd_oe),
    .ck_i(a_ck_oe & a_ck), .ck_o(b_ck), .ck_oe(b_ck_oe),
    .ps_i(a_ps_oe & a_ps), .ps_o(b_ps), .ps_oe(b_ps_oe),
    .sel(b_sel), .reg_a(b_reg), .wr(b_wr), .rd(b_rd), .go(b_go), .ack(b_ack),
    .d_in(b_din), .d_out(b_dout), .d_oe(b_doe), .rx_full(b_rx_full),
    .tx_busy(b_tx_busy), .tx_ok(b_tx_ok), .tx_err(b_tx_err));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // load A's data register and start it; returns clocks until not busy
  task automatic send(input logic [31:0] w, output int clocks);
    @(negedge clk);
    a_reg = 2'd0; a_din = w; a_wr = 1'b1;
    @(negedge clk);
    a_wr = 1'b0; a_go = 1'b1;
    @(negedge clk);
    a_go = 1'b0;
    clocks = 1;
    while (a_tx_busy) begin
      @(negedge clk);
      clocks++;
    end
  endtask

  task automatic take(output logic [31:0] w);
    @(negedge clk);
    b_reg = 2'd0; b_rd = 1'b1;
    #1 w = b_dout;
    b_rd = 1'b0; b_ack = 1'b1;
    @(negedge clk);
    b_ack = 1'b0;
  endtask

  logic [31:0] w, got;
  int clocks;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // A -> transmit
    @(negedge clk);
    a_reg = 2'd1; a_din = 32'd1; a_wr = 1'b1;
    @(negedge clk);
    a_wr = 1'b0; a_rd = 1'b1;
    #1 check("A SCR", a_dout & 32'h1, 32'h1);
    a_rd = 1'b0;
    for (int n = 0; n < 20; n++) begin
      w = $urandom;
      send(w, clocks);
      check("transfer clocks", 32'(clocks), 32'(2 * WORD + 3));
      check("tx_ok", {31'b0, a_tx_ok}, 1);
      check("rx_full", {31'b0, b_rx_full}, 1);
      check("PS low while full", {31'b0, b_ps}, 0);
      take(got);
      check("word", got, w);
      check("PS high after ack", {31'b0, b_ps}, 1);
    end
    // no overrun: second word waits until B is acknowledged
    w = 32'hA5A5_0001;
    send(w, clocks);
    fork
      send(32'h5A5A_0002, clocks);
      begin
        repeat (30) @(negedge clk);
        check("sender waits for ready", {31'b0, a_tx_busy}, 1);
        check("first word kept", b_dout, 32'hA5A5_0001);
        take(got);
      end
    join
    take(got);
    check("second word", got, 32'h5A5A_0002);
    // PS stuck high: transfer reported as failed
    ps_force = 1'b1;
    send(32'h1234_5678, clocks);
    check("tx_err", {30'b0, a_tx_err, a_tx_ok}, 32'b10);
    @(negedge clk);
    a_reg = 2'd1; a_rd = 1'b1;
    #1 check("A SCR error bit", (a_dout >> 4) & 32'h1, 1);
    a_rd = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
