// cordic_pe_tb: the PE chip on its pins.
//  1. Test mode: the thesis' datapath test through the parallel port - load
//     0xF and 1 into mantissa registers 0 and 1, add, capture the result and
//     flags and read them back through the PIO (result 0x10, zero flag low
//     after the add); also writes and reads a RAM word through the PIO.
//  2. Normal mode: the demo microprogram runs from reset.  The testbench is
//     the west neighbour (sends two words) and the east neighbour (receives
//     the answer): {e1 + e2, (m1 + m2) / 4}.  Each received bit must take
//     exactly two clocks (32 CK rising edges over 63 clocks).
//  3. Two PEs in a row: the east port of the first is wired to the west
//     port of a second PE running the same program.  Four words go into the
//     first; the second must deliver f(f(w1, w2), f(w3, w4)), f being the
//     program's function above.
module cordic_pe_tb;
  logic clk = 1'b0;
  logic reset = 1'b1, test = 1'b0;
  logic [2:0]  address = '0;
  logic [9:0]  control = '0;
  logic [15:0] pio_i = '0, pio_o;
  logic        pio_oe;
  logic [11:0] tb_sio = '0, sio_i, sio_o, sio_oe;
  logic        chain = 1'b0, ps1_tb = 1'b0;
  logic [11:0] sio1_i, sio1_o, sio1_oe;
  logic [15:0] pio1_o;
  logic        pio1_oe;
  int checks = 0, failures = 0;
  int n_test = 0, n_words = 0, n_chain = 0;

  cordic_pe dut (.reset(reset), .sck(clk), .clock(clk), .test(test),
                 .address(address), .control(control), .pio_i(pio_i),
                 .pio_o(pio_o), .pio_oe(pio_oe), .sio_i(sio_i), .sio_o(sio_o),
                 .sio_oe(sio_oe));

  // second PE: west port fed from the first PE's east port while chained
  cordic_pe pe1 (.reset(reset), .sck(clk), .clock(clk), .test(1'b0),
                 .address(3'b0), .control(10'b0), .pio_i(16'b0),
                 .pio_o(pio1_o), .pio_oe(pio1_oe), .sio_i(sio1_i), .sio_o(sio1_o),
                 .sio_oe(sio1_oe));

  always_comb begin
    sio_i  = tb_sio;
    sio1_i = '0;
    sio1_i[11] = ps1_tb;
    if (chain) begin
      sio_i[11] = sio1_oe[5] & sio1_o[5];
      sio1_i[3] = sio_oe[9]  & sio_o[9];
      sio1_i[4] = sio_oe[10] & sio_o[10];
    end
  end

  function automatic logic [31:0] f(input logic [31:0] a, input logic [31:0] b);
    logic [23:0] ms;
    ms = a[23:0] + b[23:0];
    return {a[31:24] + b[31:24], 24'($signed(ms) >>> 2)};
  endfunction

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // PIO register write, one clock
  task automatic pio_wr(input int a, input logic [15:0] v);
    @(negedge clk);
    address = 3'(a); pio_i = v; control = 10'b1;
    @(negedge clk);
    control = '0;
  endtask

  task automatic pio_rd(input int a, output logic [15:0] v);
    @(negedge clk);
    address = 3'(a); control = 10'b10;
    #1;
    v = pio_oe ? pio_o : 16'hxxxx;
    @(negedge clk);
    control = '0;
  endtask

  // apply the PIO address/control registers for one clock; extra control bits
  task automatic pio_apply(input logic [9:0] extra);
    @(negedge clk);
    control = 10'b10_0000 | extra;
    @(negedge clk);
    control = '0;
  endtask

  // put a 64-bit control word and a 32-bit address word in the PIO registers
  task automatic set_buses(input logic [63:0] c, input logic [31:0] a);
    pio_wr(0, a[15:0]);  pio_wr(1, a[31:16]);
    pio_wr(4, c[15:0]);  pio_wr(5, c[31:16]);
    pio_wr(6, c[47:32]); pio_wr(7, c[63:48]);
  endtask

  task automatic set_data(input logic [31:0] d);
    pio_wr(2, d[15:0]); pio_wr(3, d[31:16]);
  endtask

  // west neighbour: send one word; the port must report busy (PS low) once
  // the word is in, until the microprogram has taken it
  task automatic send_west(input logic [31:0] w);
    logic seen_busy;
    while (!(sio_oe[5] && sio_o[5])) @(negedge clk);
    for (int b = 31; b >= 0; b--) begin
      tb_sio[3] = w[b]; tb_sio[4] = 1'b0;
      @(negedge clk);
      tb_sio[4] = 1'b1;
      @(negedge clk);
    end
    tb_sio[4] = 1'b0;
    checks++;
    seen_busy = 1'b0;
    for (int i = 0; i < 4; i++) begin
      #1 if (!sio_o[5]) seen_busy = 1'b1;
      @(negedge clk);
    end
    if (!seen_busy) begin
      failures++;
      $display("FAIL west port did not signal busy after a word");
    end
  endtask

  // east neighbour: receive one word, measure the bit rate
  task automatic recv_east(output logic [31:0] w);
    int nb, t, t_first, t_last;
    logic ck_q;
    nb = 0; t = 0; ck_q = 1'b0; t_first = 0; t_last = 0; w = '0;
    tb_sio[11] = 1'b1;
    while (nb < 32) begin
      @(posedge clk);
      #1;
      t++;
      if (sio_oe[10] && sio_o[10] && !ck_q) begin
        w = {w[30:0], sio_o[9]};
        if (nb == 0) t_first = t;
        t_last = t;
        nb++;
      end
      ck_q = sio_oe[10] && sio_o[10];
    end
    tb_sio[11] = 1'b0;
    checks++;
    if (t_last - t_first != 62) begin
      failures++;
      $display("FAIL east bit timing: 32 bits over %0d clocks", t_last - t_first + 1);
    end
  endtask

  logic [15:0] v;
  // east neighbour of the second PE
  task automatic recv_east1(output logic [31:0] w);
    int nb;
    logic ck_q;
    nb = 0; ck_q = 1'b0; w = '0;
    ps1_tb = 1'b1;
    while (nb < 32) begin
      @(posedge clk);
      #1;
      if (sio1_oe[10] && sio1_o[10] && !ck_q) begin
        w = {w[30:0], sio1_o[9]};
        nb++;
      end
      ck_q = sio1_oe[10] && sio1_o[10];
    end
    ps1_tb = 1'b0;
  endtask

  logic [31:0] w1, w2, w3, w4, got, expw;

  initial begin
    // -------- test mode
    test = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    // load 0xF into mantissa register 0 (control 0x04000) and 1 into register 1
    set_data(32'h0000_000F);
    set_buses(64'h0000_0000_0000_4000, 32'h0);
    pio_apply(10'b100);
    set_data(32'h0000_0001);
    set_buses(64'h0000_0000_0000_8000, 32'h0);
    pio_apply(10'b100);
    // add (control 0x01044) with the datapath selected; capture result and flags
    set_buses(64'h0000_0000_4000_1044, 32'h0);
    pio_apply(10'b1_1000);
    pio_rd(2, v); check("test-mode add result", 32'(v), 32'h10);
    pio_rd(7, v); check("test-mode flags (zero, carry, ovf low)", 32'(v[2:0]), 32'h0);
    // same through subtract (0x0104C): 0xF - 1
    set_buses(64'h0000_0000_4000_104C, 32'h0);
    pio_apply(10'b1_1000);
    pio_rd(2, v); check("test-mode sub result", 32'(v), 32'hE);
    n_test++;
    // RAM word 17 via the PIO: write 0x1234_5678 then read it back
    set_data(32'h1234_5678);
    set_buses(64'h0000_0000_8000_0000, 32'd17);      // ram_we
    pio_apply(10'b100);
    set_data(32'h0);
    set_buses(64'h0000_0001_0000_0000, 32'd17);      // ram_oe
    pio_apply(10'b1000);
    pio_rd(2, v); check("RAM via PIO low", 32'(v), 32'h5678);
    pio_rd(3, v); check("RAM via PIO high", 32'(v), 32'h1234);
    n_test++;

    // -------- normal mode: demo microprogram
    @(negedge clk);
    reset = 1'b1; test = 1'b0;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    for (int rep = 0; rep < 4; rep++) begin
      w1 = $urandom; w2 = $urandom;
      if (rep == 0) begin w1 = 32'h0100_0010; w2 = 32'h0200_0004; end
      fork
        begin send_west(w1); send_west(w2); end
        recv_east(got);
      join
      expw = f(w1, w2);
      check($sformatf("PE result %0d", rep), got, expw);
      n_words++;
    end

    // -------- two PEs in a row (connect once the serial lines are idle)
    repeat (8) @(negedge clk);
    chain = 1'b1;
    for (int rep = 0; rep < 2; rep++) begin
      w1 = $urandom; w2 = $urandom; w3 = $urandom; w4 = $urandom;
      fork
        begin send_west(w1); send_west(w2); send_west(w3); send_west(w4); end
        recv_east1(got);
      join
      check($sformatf("two-PE result %0d", rep), got, f(f(w1, w2), f(w3, w4)));
      n_chain++;
    end

    checks++;
    if (n_test == 0 || n_words == 0 || n_chain == 0) begin
      failures++;
      $display("FAIL: a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
