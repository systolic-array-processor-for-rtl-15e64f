// datapath: the PE's 32-bit datapath, a 24-bit mantissa lane and an 8-bit
// exponent lane side by side (two dp_lane instances).
//
// Data word: {exp[7:0], man[23:0]}.  A register of each lane is loaded from
// the data bus when its LL bit in the control bus is set, or when the
// datapath is selected (dps) for a bus transfer into it (output enable low)
// and the address bus names that register: the address-bus load is how the
// controller moves a RAM word into the datapath.  The result word
// {exponent result, shifted mantissa result} is driven on the data bus when
// dps and the mantissa output enable are both high (a tri-state driver in
// the thesis; an output plus enable here).  Flag[7:0] (pe_pkg::dp_flags_t)
// carries the zero, carry and overflow flags of both lanes and the two
// result sign bits.  All paths to the result are combinational; registers
// load on the rising clock edge.
//
// Lane sizes, the register/mux/add-sub/zero-detect/shifter structure, the
// 30-bit control bus, the 8-bit flag bus and the mantissa control positions
// of the thesis' test program are from the thesis; the exponent control
// layout and the exponent lane's carry-in tied to 0 are this design's.
module datapath
  import pe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dp_ctrl_t   ctrl,
  input  logic [1:0] addr,
  input  logic       dps,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic       d_oe,
  output dp_flags_t  flags
);

  logic [3:0] m_ll, e_ll, m_asel, m_bsel, e_asel, e_bsel;
  logic       bus_load;
  logic [MAN_W-1:0] m_res;
  logic [EXP_W-1:0] e_res;
  logic        m_zero, m_carry, m_ovf, e_zero, e_carry, e_ovf;
  logic [MAN_W-1:0] m_regs [4];  // visible for debug only
  logic [EXP_W-1:0] e_regs [4];

  assign bus_load = dps && !ctrl.man.oe;

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      m_ll[r]   = ctrl.man.ll[r] | (bus_load && (addr == 2'(r)));
      e_ll[r]   = ctrl.exp.ll[r] | (bus_load && (addr == 2'(r)));
      m_asel[r] = ctrl.man.asel[3-r];
      m_bsel[r] = ctrl.man.bsel[3-r];
      e_asel[r] = ctrl.exp.aen && (ctrl.exp.asel == 2'(r));
      e_bsel[r] = ctrl.exp.ben && (ctrl.exp.bsel == 2'(r));
    end
  end

  dp_lane #(.W(MAN_W), .HAS_SHIFT(1'b1)) u_man (
    .clk(clk), .rst_n(rst_n), .din(d_in[23:0]), .ll(m_ll), .wb(ctrl.man.wb),
    .asel(m_asel), .bsel(m_bsel), .cin(ctrl.man.cin), .sub(ctrl.man.sub),
    .sh_up(ctrl.man.sh_up), .sh_en(ctrl.man.sh_en),
    .result(m_res), .zero(m_zero), .carry(m_carry), .ovf(m_ovf), .regs(m_regs)
  );

  dp_lane #(.W(EXP_W), .HAS_SHIFT(1'b0)) u_exp (
    .clk(clk), .rst_n(rst_n), .din(d_in[31:24]), .ll(e_ll), .wb(ctrl.exp.wb),
    .asel(e_asel), .bsel(e_bsel), .cin(1'b0), .sub(ctrl.exp.sub),
    .sh_up(1'b0), .sh_en(1'b0),
    .result(e_res), .zero(e_zero), .carry(e_carry), .ovf(e_ovf), .regs(e_regs)
  );

  // the lane register contents are only observed by debug/test benches
  logic unused_regs;
  always_comb begin
    unused_regs = 1'b0;
    for (int r = 0; r < 4; r++) unused_regs ^= ^{m_regs[r], e_regs[r]};
  end

  assign d_out = {e_res, m_res};
  assign d_oe  = dps && ctrl.man.oe;
  assign flags = '{m_sign: m_res[MAN_W-1], e_sign: e_res[EXP_W-1], e_zero: e_zero,
                   e_ovf: e_ovf, e_carry: e_carry, m_zero: m_zero,
                   m_ovf: m_ovf, m_carry: m_carry};

endmodule
