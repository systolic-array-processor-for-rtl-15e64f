// sio: one serial neighbour port of the PE (north, west, south or east).
//
// A half-duplex, bit-serial link with three lines: serial data SD, gated
// clock CK and port status PS.  SD and CK go from sender to receiver, PS the
// other way.  The direction is set by bit 0 of the status/control register
// (SCR): 1 = send, 0 = receive.
//   * Receiver: drives PS high while its data register is free ("ready")
//     and low while it holds a word that the PE has not yet taken ("busy").
//     It shifts SD in, most significant bit first, on each rising edge of
//     CK; after WORD bits the word is in the data register, rx_full is set
//     and PS drops.  An ack from the controller frees the register.
//   * Sender: on go it waits for PS high, then sends the data register MSB
//     first, each bit taking two clocks (CK low with the bit on SD, then CK
//     high).  CK stays low when idle.  After the last bit it checks PS again:
//     if the receiver has dropped it within TIMEOUT clocks the transfer is
//     marked successful (tx_ok), otherwise failed (tx_err).
// CK and PS are sampled with the PE clock; neighbours share that clock.
//
// Controller side: sel addresses this port, reg_a picks register 0 (data)
// or 1 (SCR); wr loads it from d_in, rd drives it on d_out (d_oe).  SCR
// read value: {26'b0, ps_i, tx_err, tx_ok, tx_busy, rx_full, dir}.
// The three lines, their directions, the MSB-first bit order, the readiness
// check before and the success check after a transfer are from the thesis;
// word length 32, the two-clock bit timing, the sampling edge, TIMEOUT and
// the register layout are this design's choices.
module sio #(
  parameter int WORD    = 32,
  parameter int TIMEOUT = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // neighbour side
  input  logic            sd_i,
  output logic            sd_o,
  output logic            sd_oe,
  input  logic            ck_i,
  output logic            ck_o,
  output logic            ck_oe,
  input  logic            ps_i,
  output logic            ps_o,
  output logic            ps_oe,
  // controller side
  input  logic            sel,
  input  logic [1:0]      reg_a,
  input  logic            wr,
  input  logic            rd,
  input  logic            go,
  input  logic            ack,
  input  logic [WORD-1:0] d_in,
  output logic [WORD-1:0] d_out,
  output logic            d_oe,
  output logic            rx_full,
  output logic            tx_busy,
  output logic            tx_ok,
  output logic            tx_err
);

  typedef enum logic [2:0] {T_IDLE, T_WAIT, T_LO, T_HI, T_CHECK} tx_state_e;
  tx_state_e tx_state;

  logic            dir;
  logic [WORD-1:0] data;
  logic [WORD-2:0] rx_sh;
  logic [$clog2(WORD+1)-1:0] bit_cnt;
  logic [$clog2(TIMEOUT+1)-1:0] tmo;
  logic            ck_q;
  logic            ck_rise;

  assign ck_rise = ck_i && !ck_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_state <= T_IDLE;
      dir      <= 1'b0;
      data     <= '0;
      rx_sh    <= '0;
      bit_cnt  <= '0;
      tmo      <= '0;
      ck_q     <= 1'b0;
      rx_full  <= 1'b0;
      tx_ok    <= 1'b0;
      tx_err   <= 1'b0;
      ck_o     <= 1'b0;
      sd_o     <= 1'b0;
    end else begin
      ck_q <= ck_i;
      // register writes and acknowledge
      if (sel && wr && reg_a == 2'd0) data <= d_in;
      if (sel && wr && reg_a == 2'd1) dir  <= d_in[0];
      if (sel && ack) rx_full <= 1'b0;

      // receiver
      if (!dir && !rx_full && ck_rise) begin
        if (bit_cnt == $bits(bit_cnt)'(WORD - 1)) begin
          data    <= {rx_sh, sd_i};
          rx_full <= 1'b1;
          bit_cnt <= '0;
        end else begin
          rx_sh   <= {rx_sh[WORD-3:0], sd_i};
          bit_cnt <= bit_cnt + 1'b1;
        end
      end

      // sender
      unique case (tx_state)
        T_IDLE: if (dir && sel && go) begin
          tx_ok    <= 1'b0;
          tx_err   <= 1'b0;
          bit_cnt  <= '0;
          tx_state <= T_WAIT;
        end
        T_WAIT: if (ps_i) begin
          sd_o     <= data[WORD-1];
          ck_o     <= 1'b0;
          tx_state <= T_LO;
        end
        T_LO: begin
          ck_o     <= 1'b1;
          tx_state <= T_HI;
        end
        T_HI: begin
          ck_o <= 1'b0;
          if (bit_cnt == $bits(bit_cnt)'(WORD - 1)) begin
            bit_cnt  <= '0;
            tmo      <= '0;
            tx_state <= T_CHECK;
          end else begin
            bit_cnt  <= bit_cnt + 1'b1;
            sd_o     <= data[WORD-2-int'(bit_cnt)];
            tx_state <= T_LO;
          end
        end
        T_CHECK: begin
          if (!ps_i) begin
            tx_ok    <= 1'b1;
            tx_state <= T_IDLE;
          end else if (tmo == $bits(tmo)'(TIMEOUT)) begin
            tx_err   <= 1'b1;
            tx_state <= T_IDLE;
          end else begin
            tmo <= tmo + 1'b1;
          end
        end
        default: tx_state <= T_IDLE;
      endcase
    end
  end

  assign tx_busy = (tx_state != T_IDLE);

  // pins: sender drives SD and CK, receiver drives PS
  assign sd_oe = dir;
  assign ck_oe = dir;
  assign ps_oe = !dir;
  assign ps_o  = !rx_full;

  // register read
  assign d_oe  = sel && rd;
  assign d_out = (reg_a == 2'd1) ?
                 WORD'({ps_i, tx_err, tx_ok, tx_busy, rx_full, dir}) : data;

endmodule
