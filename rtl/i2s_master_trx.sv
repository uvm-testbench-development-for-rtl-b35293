// I2S master transceiver: two channel FIFOs, the protocol FSM and the pads.
//
// The block is the clock master of an I2S link (it drives SCK and WS) and
// moves stereo audio in either direction, chosen by cfg_tx_nrx:
//   transmit (cfg_tx_nrx = 1): the host pushes words into the channel-0 and
//     channel-1 FIFOs (chX_data_tx with chX_data_tx_put_en); the protocol
//     engine pops them alternately, channel 0 first, and shifts them out on
//     SD MSB first.
//   receive (cfg_tx_nrx = 0): the protocol engine shifts SD in, assembles
//     words and writes each to the FIFO of the channel that WS selected; the
//     host reads them (chX_data_rx shows the oldest word, chX_data_rx_get_en
//     removes it).
// cfg_i2s_en starts the link (a STARTUP slot with a zero word, then data
// slots) and stops it at once when it falls. Each FIFO reports full as
// chX_fifo_overrun (further host writes are lost) and empty as
// chX_fifo_underrun (reads return 0; in transmit mode the line then carries
// zero words).
//
// Timing: everything runs on clk; one serial bit per clk cycle, WORD_LEN
// cycles per channel slot, 2*WORD_LEN cycles per stereo frame. SCK is clk
// inverted and gated, so SD and WS change on falling SCK edges. rst_b is an
// asynchronous active-low reset; after it all outputs are low and SD is
// released.
//
// The port list, the parameter names and defaults and the split into FIFO,
// protocol and pad blocks follow the reference design. The dual-sided FIFOs
// take their direction from cfg_tx_nrx, which is this design's own way of
// letting one FIFO serve both directions.
module i2s_master_trx #(
  parameter int unsigned WORD_LEN_LOG2      = i2s_master_pkg::WORD_LEN_LOG2_DEF,
  parameter int unsigned FIFO_ADDR_LEN_LOG2 = i2s_master_pkg::FIFO_ADDR_LEN_LOG2_DEF,
  localparam int unsigned WORD_LEN          = 1 << WORD_LEN_LOG2
) (
  input  logic                clk,
  input  logic                rst_b,

  input  logic                cfg_tx_nrx,
  input  logic                cfg_i2s_en,

  // channel 0 FIFO port
  input  logic [WORD_LEN-1:0] ch0_data_tx,
  input  logic                ch0_data_tx_put_en,
  output logic                ch0_fifo_underrun,
  output logic                ch0_fifo_overrun,
  output logic [WORD_LEN-1:0] ch0_data_rx,
  input  logic                ch0_data_rx_get_en,

  // channel 1 FIFO port
  input  logic [WORD_LEN-1:0] ch1_data_tx,
  input  logic                ch1_data_tx_put_en,
  output logic                ch1_fifo_underrun,
  output logic                ch1_fifo_overrun,
  output logic [WORD_LEN-1:0] ch1_data_rx,
  input  logic                ch1_data_rx_get_en,

  // I2S line
  output logic                SCK,
  output logic                WS,
  inout  wire                 SD
);

  logic [WORD_LEN-1:0] ch0_tx_word, ch1_tx_word, rx_word;
  logic                ch0_tx_pop, ch1_tx_pop, ch0_rx_push, ch1_rx_push;
  logic                sck_en, ws_out, sd_out, sd_oe, sd_in;

  i2s_dp_fifo #(
    .WORD_LEN_LOG2     (WORD_LEN_LOG2),
    .FIFO_ADDR_LEN_LOG2(FIFO_ADDR_LEN_LOG2)
  ) FIFO_TRX_I0 (
    .clk          (clk),
    .rst_b        (rst_b),
    .tx_nrx       (cfg_tx_nrx),
    .ext_wr_en    (ch0_data_tx_put_en),
    .ext_wr_data  (ch0_data_tx),
    .ext_rd_en    (ch0_data_rx_get_en),
    .ext_rd_data  (ch0_data_rx),
    .pr_wr_en     (ch0_rx_push),
    .pr_wr_data   (rx_word),
    .pr_rd_en     (ch0_tx_pop),
    .pr_rd_data   (ch0_tx_word),
    .fifo_overrun (ch0_fifo_overrun),
    .fifo_underrun(ch0_fifo_underrun)
  );

  i2s_dp_fifo #(
    .WORD_LEN_LOG2     (WORD_LEN_LOG2),
    .FIFO_ADDR_LEN_LOG2(FIFO_ADDR_LEN_LOG2)
  ) FIFO_TRX_I1 (
    .clk          (clk),
    .rst_b        (rst_b),
    .tx_nrx       (cfg_tx_nrx),
    .ext_wr_en    (ch1_data_tx_put_en),
    .ext_wr_data  (ch1_data_tx),
    .ext_rd_en    (ch1_data_rx_get_en),
    .ext_rd_data  (ch1_data_rx),
    .pr_wr_en     (ch1_rx_push),
    .pr_wr_data   (rx_word),
    .pr_rd_en     (ch1_tx_pop),
    .pr_rd_data   (ch1_tx_word),
    .fifo_overrun (ch1_fifo_overrun),
    .fifo_underrun(ch1_fifo_underrun)
  );

  i2s_protocol #(
    .WORD_LEN_LOG2(WORD_LEN_LOG2)
  ) PROTOCOL_I1 (
    .clk        (clk),
    .rst_b      (rst_b),
    .cfg_i2s_en (cfg_i2s_en),
    .cfg_tx_nrx (cfg_tx_nrx),
    .ch0_tx_data(ch0_tx_word),
    .ch1_tx_data(ch1_tx_word),
    .ch0_tx_pop (ch0_tx_pop),
    .ch1_tx_pop (ch1_tx_pop),
    .rx_data    (rx_word),
    .ch0_rx_push(ch0_rx_push),
    .ch1_rx_push(ch1_rx_push),
    .sck_en     (sck_en),
    .ws_out     (ws_out),
    .sd_out     (sd_out),
    .sd_oe      (sd_oe),
    .sd_in      (sd_in)
  );

  i2s_pads PADS_I1 (
    .clk   (clk),
    .SCK_en(sck_en),
    .WS_out(ws_out),
    .SD_out(sd_out),
    .SD_oe (sd_oe),
    .SD_in (sd_in),
    .SCK   (SCK),
    .WS    (WS),
    .SD    (SD)
  );

endmodule : i2s_master_trx
