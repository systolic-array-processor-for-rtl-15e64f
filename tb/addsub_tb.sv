// addsub_tb: random operands for the 24-bit and 8-bit add/sub units,
// compared with sum, carry and overflow computed here in wider arithmetic.
module addsub_tb;
  int checks = 0, failures = 0;

  logic [23:0] a24, b24, s24;
  logic [7:0]  a8, b8, s8;
  logic        cin, sub, c24, o24, c8, o8;
  logic [23:0] nb24;

  addsub u24 (.a(a24), .b(b24), .cin(cin), .sub(sub), .s(s24), .cout(c24), .ovf(o24));
  addsub #(.W(8))  u8  (.a(a8),  .b(b8),  .cin(cin), .sub(sub), .s(s8),  .cout(c8),  .ovf(o8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ea, eb, es, ec;
    for (int n = 0; n < 2000; n++) begin
      a24 = 24'($urandom); b24 = 24'($urandom);
      a8 = 8'($urandom); b8 = 8'($urandom);
      cin = 1'($urandom); sub = 1'($urandom);
      if (n < 4) begin a24 = 24'h00000F; b24 = 24'h000001; cin = 1'b0; sub = 1'(n); end
      #1;
      // 24-bit: unsigned sum with carry
      ea = longint'(a24);
      nb24 = ~b24;
      eb = sub ? longint'(nb24) : longint'(b24);
      es = ea + eb + longint'(cin ^ sub);
      checks++;
      if (s24 !== 24'(es) || c24 !== es[24]) begin
        failures++;
        $display("FAIL 24b a=%h b=%h cin=%b sub=%b s=%h c=%b exp %h", a24, b24, cin, sub, s24, c24, 24'(es));
      end
      // signed overflow: the signed result does not fit
      ea = longint'(signed'(a24));
      eb = longint'(signed'(b24));
      ec = sub ? ea - eb - longint'(cin) : ea + eb + longint'(cin);
      checks++;
      if (o24 !== (ec > 8388607 || ec < -8388608)) begin
        failures++;
        $display("FAIL 24b overflow a=%h b=%h", a24, b24);
      end
      // 8-bit
      ea = longint'(signed'(a8));
      eb = longint'(signed'(b8));
      ec = sub ? ea - eb - longint'(cin) : ea + eb + longint'(cin);
      checks++;
      if (s8 !== 8'(ec) || o8 !== (ec > 127 || ec < -128)) begin
        failures++;
        $display("FAIL 8b a=%h b=%h", a8, b8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
