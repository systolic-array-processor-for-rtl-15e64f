// useq: microprogram sequencer of the PE control block.
//
// The PE's controller is microcoded around an Am2910-class sequencer; this
// module implements that sequencer's 16 next-address instructions (see
// pe_pkg::useq_op_e) with a 5-deep subroutine/loop stack and a
// register/counter R.  It works on the microinstruction currently in the
// pipeline register (the ucode_rom output): from its op, branch address ba
// and condition test it computes next_addr, which the ROM reads on the next
// rising edge.  The condition passes when cc_en is low, otherwise when
// flags[cc_sel] ^ cc_pol is 1.  "Continue" means upc + 1, upc being the
// address of the microinstruction being executed.  JMAP and CJV jump to
// the map input (low bits of the data bus, i.e. a dispatch on a RAM word).
// With en low (test mode) the sequencer holds.  Reset: upc = 0, empty stack.
//
// The thesis names the Am2910A and the block's buses only; the instruction
// set follows that part's published behaviour, with a simplified stack
// (pushes beyond 5 overwrite the top, pops of an empty stack leave it empty).
module useq
  import pe_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,
  input  uinstr_t         uir,
  input  logic [15:0]     flags,
  input  logic [UA_W-1:0] map,
  output logic [UA_W-1:0] next_addr,
  output logic [UA_W-1:0] upc
);

  localparam int DEPTH = 5;

  logic [UA_W-1:0] stack [DEPTH];
  logic [2:0]      sp;           // number of entries
  logic [UA_W-1:0] r_cnt;
  logic            pass;
  logic [UA_W-1:0] cont, tos;
  logic            push, pop, clear, load_r, dec_r;
  logic            r_zero;

  assign pass   = !uir.cc_en || (flags[uir.cc_sel] ^ uir.cc_pol);
  assign cont   = upc + 1'b1;
  assign tos    = (sp == 0) ? '0 : stack[sp - 1'b1];
  assign r_zero = (r_cnt == '0);

  always_comb begin
    next_addr = cont;
    push = 1'b0; pop = 1'b0; clear = 1'b0; load_r = 1'b0; dec_r = 1'b0;
    unique case (uir.op)
      U_JZ:   begin next_addr = '0; clear = 1'b1; end
      U_CJS:  if (pass) begin next_addr = uir.ba; push = 1'b1; end
      U_JMAP: next_addr = map;
      U_CJP:  if (pass) next_addr = uir.ba;
      U_PUSH: begin push = 1'b1; load_r = pass; end
      U_JSRP: begin push = 1'b1; next_addr = pass ? uir.ba : r_cnt; end
      U_CJV:  if (pass) next_addr = map;
      U_JRP:  next_addr = pass ? uir.ba : r_cnt;
      U_RFCT: if (!r_zero) begin next_addr = tos; dec_r = 1'b1; end
              else pop = 1'b1;
      U_RPCT: if (!r_zero) begin next_addr = uir.ba; dec_r = 1'b1; end
      U_CRTN: if (pass) begin next_addr = tos; pop = 1'b1; end
      U_CJPP: if (pass) begin next_addr = uir.ba; pop = 1'b1; end
      U_LDCT: load_r = 1'b1;
      U_LOOP: if (pass) pop = 1'b1;
              else next_addr = tos;
      U_CONT: ;
      U_TWB:  if (pass) pop = 1'b1;
              else if (!r_zero) begin next_addr = tos; dec_r = 1'b1; end
              else begin next_addr = uir.ba; pop = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      upc   <= '0;
      sp    <= '0;
      r_cnt <= '0;
      for (int i = 0; i < DEPTH; i++) stack[i] <= '0;
    end else if (en) begin
      upc <= next_addr;
      if (load_r)     r_cnt <= uir.ba;
      else if (dec_r) r_cnt <= r_cnt - 1'b1;
      if (clear) sp <= '0;
      else if (push) begin
        if (sp == 3'(DEPTH)) stack[DEPTH-1] <= cont;
        else begin
          stack[sp] <= cont;
          sp        <= sp + 1'b1;
        end
      end else if (pop && sp != 0) begin
        sp <= sp - 1'b1;
      end
    end
  end

  // the bus fields of the microinstruction go to the rest of the PE
  logic unused_fields;
  assign unused_fields = ^{uir.abus, uir.cbus};

endmodule
