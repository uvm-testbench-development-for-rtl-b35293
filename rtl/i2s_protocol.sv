// Protocol engine of the I2S master: a six-state FSM that frames audio words
// on the serial line.
//
// States: IDLE, STARTUP, TX_CH0, TX_CH1, RX_CH0, RX_CH1. Every state except
// IDLE lasts one slot of WORD_LEN bit clocks; one bit is moved per cycle of
// clk (the line clock SCK is clk inverted, see i2s_pads).
//
//   IDLE     held after reset and whenever cfg_i2s_en is low; WS, SD, the SD
//            output enable and the SCK enable are all low.
//   STARTUP  entered when cfg_i2s_en rises. SCK starts, WS goes high and one
//            word of zeros is shifted out (the SD driver is only turned on
//            for it in transmit mode), so the far end sees a complete frame
//            edge before real data.
//   TX_CHx   the head word of the channel-x FIFO is shifted out MSB first.
//            Channel 0 always comes first after STARTUP, then the channels
//            alternate.
//   RX_CHx   the SD line is shifted in MSB first and the word is written to
//            the channel-x FIFO.
// Dropping cfg_i2s_en returns the FSM to IDLE at the next clock edge from any
// state; a partly sent or partly received word is abandoned.
//
// Framing (Philips I2S): WS is low for channel 0 and high for channel 1.
// WS changes at the start of a slot and the MSB of the slot's word follows
// one bit clock later, so the LSB of a word is on SD during the first cycle
// of the next slot. All outputs are registers updated on the rising edge of
// clk, which is the falling edge of SCK; a receiver samples them on the
// rising edge of SCK. In receive mode SD is sampled on the rising edge of clk,
// taking the bit that the remote transmitter launched one cycle earlier; a
// received word is therefore complete, and written to its FIFO, at the
// second clock edge of the following slot.
//
// FIFO interface: chX_tx_pop is a one-cycle strobe, combinational, high in
// the cycle before a TX slot of channel X starts; the word on chX_tx_data is
// loaded at that edge (an empty FIFO supplies 0, so an underrun sends a zero
// word). chX_rx_push strobes for one cycle with the received word on rx_data.
//
// The direction (cfg_tx_nrx) is sampled at every slot boundary, so a mode
// change takes effect at the next slot. The state names, the STARTUP zero
// word, channel 0 first and the immediate stop on enable low follow the
// reference design; slot timing details, the mode sampling point and the SD
// enable during STARTUP are choices of this implementation.
module i2s_protocol
  import i2s_master_pkg::*;
#(
  parameter int unsigned WORD_LEN_LOG2 = i2s_master_pkg::WORD_LEN_LOG2_DEF,
  localparam int unsigned WORD_LEN     = 1 << WORD_LEN_LOG2
) (
  input  logic                clk,
  input  logic                rst_b,
  input  logic                cfg_i2s_en,
  input  logic                cfg_tx_nrx,   // 1: transmit, 0: receive

  // FIFO side, transmit
  input  logic [WORD_LEN-1:0] ch0_tx_data,
  input  logic [WORD_LEN-1:0] ch1_tx_data,
  output logic                ch0_tx_pop,
  output logic                ch1_tx_pop,

  // FIFO side, receive
  output logic [WORD_LEN-1:0] rx_data,
  output logic                ch0_rx_push,
  output logic                ch1_rx_push,

  // pad side
  output logic                sck_en,
  output logic                ws_out,
  output logic                sd_out,
  output logic                sd_oe,
  input  logic                sd_in
);

  i2s_state_e          i2s_curr_st, i2s_next_st;
  logic [WORD_LEN_LOG2-1:0] cnt;
  logic [WORD_LEN-1:0] tx_sh, load_word;
  logic [WORD_LEN-2:0] rx_sh;       // first WORD_LEN-1 bits of the word being received
  logic                slot_end;
  logic                rx_pend;     // the slot that just ended was a receive slot
  i2s_ch_e             rx_pend_ch;  // and carried this channel
  logic                rx_done;

  function automatic logic is_tx(i2s_state_e s);
    return (s == ST_TX_CH0) || (s == ST_TX_CH1);
  endfunction

  function automatic logic is_rx(i2s_state_e s);
    return (s == ST_RX_CH0) || (s == ST_RX_CH1);
  endfunction

  assign slot_end = (cnt == '1);

  // Next state.
  always_comb begin
    i2s_next_st = i2s_curr_st;
    if (!cfg_i2s_en) begin
      i2s_next_st = ST_IDLE;
    end else begin
      unique case (i2s_curr_st)
        ST_IDLE:    i2s_next_st = ST_STARTUP;
        ST_STARTUP,
        ST_TX_CH1,
        ST_RX_CH1:  if (slot_end) i2s_next_st = cfg_tx_nrx ? ST_TX_CH0 : ST_RX_CH0;
        ST_TX_CH0,
        ST_RX_CH0:  if (slot_end) i2s_next_st = cfg_tx_nrx ? ST_TX_CH1 : ST_RX_CH1;
        default:    i2s_next_st = ST_IDLE;
      endcase
    end
  end

  // Word fetch at the start of a transmit slot.
  assign ch0_tx_pop = cfg_i2s_en && (i2s_curr_st != ST_IDLE) && slot_end &&
                      (i2s_next_st == ST_TX_CH0);
  assign ch1_tx_pop = cfg_i2s_en && (i2s_curr_st != ST_IDLE) && slot_end &&
                      (i2s_next_st == ST_TX_CH1);
  assign load_word  = ch0_tx_pop ? ch0_tx_data :
                      ch1_tx_pop ? ch1_tx_data : '0;

  // Word delivery at the second edge of the slot after a receive slot.
  assign rx_done     = cfg_i2s_en && (i2s_curr_st != ST_IDLE) && rx_pend && (cnt == '0);
  assign rx_data     = {rx_sh, sd_in};
  assign ch0_rx_push = rx_done && (rx_pend_ch == CH0);
  assign ch1_rx_push = rx_done && (rx_pend_ch == CH1);

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      i2s_curr_st <= ST_IDLE;
      cnt         <= '0;
      tx_sh       <= '0;
      rx_sh       <= '0;
      rx_pend     <= 1'b0;
      rx_pend_ch  <= CH0;
      ws_out      <= 1'b0;
      sd_out      <= 1'b0;
      sd_oe       <= 1'b0;
      sck_en      <= 1'b0;
    end else if (i2s_next_st == ST_IDLE) begin
      i2s_curr_st <= ST_IDLE;
      cnt         <= '0;
      tx_sh       <= '0;
      rx_sh       <= '0;
      rx_pend     <= 1'b0;
      rx_pend_ch  <= CH0;
      ws_out      <= 1'b0;
      sd_out      <= 1'b0;
      sd_oe       <= 1'b0;
      sck_en      <= 1'b0;
    end else if (i2s_curr_st == ST_IDLE) begin
      // Enable just rose: start the clock and the all-zero STARTUP word.
      i2s_curr_st <= ST_STARTUP;
      cnt         <= '0;
      tx_sh       <= '0;
      rx_sh       <= '0;
      rx_pend     <= 1'b0;
      ws_out      <= 1'b1;
      sd_out      <= 1'b0;
      sd_oe       <= cfg_tx_nrx;
      sck_en      <= 1'b1;
    end else begin
      i2s_curr_st <= i2s_next_st;
      cnt         <= cnt + 1'b1;
      sd_out      <= tx_sh[WORD_LEN-1];
      rx_sh       <= {rx_sh[WORD_LEN-3:0], sd_in};
      if (slot_end) begin
        tx_sh      <= load_word;
        ws_out     <= (i2s_next_st == ST_TX_CH1) || (i2s_next_st == ST_RX_CH1);
        rx_pend    <= is_rx(i2s_curr_st);
        rx_pend_ch <= ((i2s_curr_st == ST_RX_CH1) ? CH1 : CH0);
        // Keep driving for the LSB of a word that ends in this cycle.
        sd_oe      <= is_tx(i2s_curr_st) || ((i2s_curr_st == ST_STARTUP) && sd_oe);
      end else begin
        tx_sh      <= {tx_sh[WORD_LEN-2:0], 1'b0};
        // After the LSB cycle the driver follows the new slot's direction.
        if (cnt == '0 && i2s_curr_st != ST_STARTUP) sd_oe <= is_tx(i2s_curr_st);
      end
    end
  end

  // WS stays at one level for a whole slot before it falls (checked in the
  // clock domain of the FSM; a fall caused by disabling is exempt).
  a_ws_slot : assert property (@(posedge clk) disable iff (!rst_b)
    ($fell(ws_out) && i2s_curr_st != ST_IDLE) |-> $past(ws_out, WORD_LEN));

  // Only one FIFO is accessed per cycle.
  a_one_access : assert property (@(posedge clk) disable iff (!rst_b)
    $onehot0({ch0_tx_pop, ch1_tx_pop, ch0_rx_push, ch1_rx_push}));

endmodule : i2s_protocol
