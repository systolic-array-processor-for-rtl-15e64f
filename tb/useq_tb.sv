// useq_tb: the microprogram sequencer against a reference model of the
// Am2910 next-address rules written here (5-deep stack, counter R, condition
// test with polarity).  Random microinstructions, flags and map values are
// applied for 4000 clocks; next_addr and upc are compared every clock, with
// occasional en-low clocks that must hold all state.  Every one of the 16
// instructions must be exercised, both with a passing and a failing test.
module useq_tb;
  import pe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  uinstr_t uir;
  logic [15:0] flags = '0;
  logic [UA_W-1:0] map = '0, next_addr, upc;
  int checks = 0, failures = 0;
  int seen_pass [16], seen_fail [16];

  useq dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic [7:0] m_pc, m_r;
  logic [7:0] m_st [$];

  function automatic logic [7:0] m_tos();
    return (m_st.size() == 0) ? 8'd0 : m_st[$];
  endfunction

  task automatic m_push(input logic [7:0] v);
    if (m_st.size() == 5) m_st[4] = v;
    else m_st.push_back(v);
  endtask

  task automatic m_pop();
    if (m_st.size() != 0) void'(m_st.pop_back());
  endtask

  // next address and state update of the model
  task automatic m_step(input uinstr_t u, input logic [15:0] f, input logic [7:0] mp,
                        output logic [7:0] nxt);
    logic p;
    logic [7:0] c;
    p = !u.cc_en || (f[u.cc_sel] ^ u.cc_pol);
    c = m_pc + 8'd1;
    nxt = c;
    case (u.op)
      U_JZ:   begin nxt = 8'd0; m_st.delete(); end
      U_CJS:  if (p) begin nxt = u.ba; m_push(c); end
      U_JMAP: nxt = mp;
      U_CJP:  if (p) nxt = u.ba;
      U_PUSH: begin m_push(c); if (p) m_r = u.ba; end
      U_JSRP: begin nxt = p ? u.ba : m_r; m_push(c); end
      U_CJV:  if (p) nxt = mp;
      U_JRP:  nxt = p ? u.ba : m_r;
      U_RFCT: if (m_r != 0) begin nxt = m_tos(); m_r--; end else m_pop();
      U_RPCT: if (m_r != 0) begin nxt = u.ba; m_r--; end
      U_CRTN: if (p) begin nxt = m_tos(); m_pop(); end
      U_CJPP: if (p) begin nxt = u.ba; m_pop(); end
      U_LDCT: m_r = u.ba;
      U_LOOP: if (p) m_pop(); else nxt = m_tos();
      U_CONT: ;
      U_TWB:  if (p) m_pop();
              else if (m_r != 0) begin nxt = m_tos(); m_r--; end
              else begin nxt = u.ba; m_pop(); end
      default: ;
    endcase
    if (p) seen_pass[u.op]++; else seen_fail[u.op]++;
  endtask

  logic [7:0] exp_next;

  initial begin
    uir = '0;
    m_pc = '0; m_r = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      uir = '0;
      uir.op     = useq_op_e'($urandom_range(0, 15));
      if (uir.op == U_JZ && $urandom_range(0, 3) != 0) uir.op = U_CONT;
      uir.cc_en  = ($urandom_range(0, 3) != 0);
      uir.cc_sel = 4'($urandom);
      uir.cc_pol = 1'($urandom);
      uir.ba     = (uir.op == U_LDCT || uir.op == U_PUSH) ? 8'($urandom_range(0, 4)) : 8'($urandom);
      flags = 16'($urandom);
      map   = 8'($urandom);
      en    = ($urandom_range(0, 9) != 0);
      #1;
      checks++;
      if (upc !== m_pc) begin
        failures++;
        $display("FAIL upc %0d vs model %0d", upc, m_pc);
        m_pc = upc;
      end
      if (en) begin
        m_step(uir, flags, map, exp_next);
        checks++;
        if (next_addr !== exp_next) begin
          failures++;
          $display("FAIL op %s: next %0d vs model %0d", uir.op.name(), next_addr, exp_next);
        end
        m_pc = exp_next;
      end
    end
    for (int op = 0; op < 16; op++) begin
      checks++;
      if (seen_pass[op] == 0 || (op != U_JZ && op != U_JMAP && op != U_LDCT &&
          op != U_CONT && op != U_RPCT && op != U_RFCT && seen_fail[op] == 0)) begin
        failures++;
        $display("FAIL op %0d not exercised (pass %0d fail %0d)", op, seen_pass[op], seen_fail[op]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
