// pe_pkg: bus formats of the programmable CORDIC processing element (PE).
//
// Data words are 32 bits: an 8-bit exponent over a 24-bit mantissa,
// {exp[7:0], man[23:0]}, the split of the PE's floating-point datapath.
//
// Datapath control bus (30 bits).  The 18-bit mantissa part uses the bit
// positions of the thesis' datapath test program: LL[3:0] at bits 17:14
// (0x04000 loads register 0, 0x08000 register 1, 0x10000 register 2),
// add/sub at bit 3 (0x01044 adds, 0x0104C subtracts register 1 from
// register 0 and drives the result out).  What bits 12, 6 and 2 do in that
// program is not stated; here bit 12 selects register 0 onto the a input,
// bit 6 register 1 onto the b input and bit 2 enables the output, which
// reproduces the printed test result.  The remaining positions and the
// 12-bit exponent part are this design's choice.
// Not every importing module uses every constant (MAN_W, for example, only
// sizes the datapath), so lint of a single module may call some unused.
package pe_pkg;

  localparam int MAN_W = 24;
  localparam int EXP_W = 8;

  // mantissa lane control, bit 17 first
  typedef struct packed {
    logic [3:0] ll;     // 17:14 load scratchpad register r when ll[r]
    logic       wb;     // 13    load source: 1 = lane result, 0 = data bus
    logic [3:0] asel;   // 12:9  a operand: asel[3-r] selects register r; none = 0
    logic       cin;    // 8     carry (add) / borrow (subtract) in
    logic [3:0] bsel;   // 7:4   b operand: bsel[3-r] selects register r; none = 0
    logic       sub;    // 3     0 = a + b, 1 = a - b
    logic       oe;     // 2     drive the result onto the data bus
    logic       sh_up;  // 1     shifter direction: 1 = up (x2), 0 = down (/2)
    logic       sh_en;  // 0     shifter enable (0 = no shift, overrides sh_up)
  } man_ctrl_t;

  // exponent lane control (no shifter), bit 11 first
  typedef struct packed {
    logic [3:0] ll;     // 11:8
    logic       wb;     // 7
    logic [1:0] asel;   // 6:5 register on a
    logic       aen;    // 4   0 = inhibit (a = 0)
    logic [1:0] bsel;   // 3:2 register on b
    logic       ben;    // 1   0 = inhibit (b = 0)
    logic       sub;    // 0
  } exp_ctrl_t;

  typedef struct packed {
    exp_ctrl_t exp;     // 29:18
    man_ctrl_t man;     // 17:0
  } dp_ctrl_t;

  // datapath flags, Flag[7:0]
  typedef struct packed {
    logic m_sign;   // 7
    logic e_sign;   // 6
    logic e_zero;   // 5
    logic e_ovf;    // 4
    logic e_carry;  // 3
    logic m_zero;   // 2  (the test program's FLAG[2])
    logic m_ovf;    // 1
    logic m_carry;  // 0
  } dp_flags_t;

  // internal address bus (32 bits, PIO registers 0 and 1)
  typedef struct packed {
    logic [15:0] spare;
    logic [1:0]  sio_port;  // 15:14 serial port: 0 north, 1 west, 2 south, 3 east
    logic [1:0]  sio_reg;   // 13:12 register in that port: 0 data, 1 status/control
    logic [1:0]  dp_reg;    // 11:10 datapath scratchpad register
    logic [9:0]  ram_a;     // 9:0   program/data RAM word address
  } pe_addr_t;

  // internal control bus (64 bits, PIO registers 4..7)
  typedef struct packed {
    logic [25:0] spare;     // 63:38 (63:48 doubles as the flag capture register)
    logic        lit_oe;    // 37 address-bus word -> data bus (immediate constant)
    logic        sio_ack;   // 36 release the received word of the addressed port
    logic        sio_go;    // 35 start sending the data register of the addressed port
    logic        sio_rd;    // 34 addressed port register -> data bus
    logic        sio_wr;    // 33 data bus -> addressed port register
    logic        ram_oe;    // 32 RAM -> data bus
    logic        ram_we;    // 31 data bus -> RAM
    logic        dps;       // 30 datapath select
    dp_ctrl_t    dp;        // 29:0
  } pe_ctrl_t;

  // PE flag bus (16 bits)
  typedef struct packed {
    logic [3:0] tx_busy;    // 15:12 per port
    logic [3:0] rx_full;    // 11:8  per port
    dp_flags_t  dp;         // 7:0
  } pe_flags_t;

  // microprogram sequencer instructions (the 16 of the Am2910 family)
  typedef enum logic [3:0] {
    U_JZ   = 4'd0,  U_CJS  = 4'd1,  U_JMAP = 4'd2,  U_CJP  = 4'd3,
    U_PUSH = 4'd4,  U_JSRP = 4'd5,  U_CJV  = 4'd6,  U_JRP  = 4'd7,
    U_RFCT = 4'd8,  U_RPCT = 4'd9,  U_CRTN = 4'd10, U_CJPP = 4'd11,
    U_LDCT = 4'd12, U_LOOP = 4'd13, U_CONT = 4'd14, U_TWB  = 4'd15
  } useq_op_e;

  localparam int UA_W = 8;   // microprogram address width

  // microinstruction (114 bits)
  typedef struct packed {
    useq_op_e    op;        // 113:110
    logic        cc_en;     // 109 0 = condition always passes
    logic [3:0]  cc_sel;    // 108:105 flag-bus bit tested
    logic        cc_pol;    // 104 1 = test the inverted flag
    logic [UA_W-1:0] ba;    // 103:96 branch address / counter value
    pe_addr_t    abus;      // 95:64
    pe_ctrl_t    cbus;      // 63:0
  } uinstr_t;

endpackage
