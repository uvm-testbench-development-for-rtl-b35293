// Shared constants and types of the I2S master transceiver.
//
// The word length and the FIFO depth are given as base-2 logarithms:
// WORD_LEN_LOG2 = 4 gives 16-bit audio words and FIFO_ADDR_LEN_LOG2 = 3
// gives eight words per channel FIFO. These defaults are the reference
// configuration of the design; every module takes them as parameters so
// that other sizes can be built.
//
// The protocol state encoding (i2s_state_e) is this design's own choice:
// the six state names are those of the reference FSM, the numeric codes are
// not specified by it.
package i2s_master_pkg;

  localparam int unsigned WORD_LEN_LOG2_DEF      = 4;
  localparam int unsigned FIFO_ADDR_LEN_LOG2_DEF = 3;

  localparam int unsigned WORD_LEN_DEF      = 1 << WORD_LEN_LOG2_DEF;
  localparam int unsigned FIFO_MEM_SIZE_DEF = 1 << FIFO_ADDR_LEN_LOG2_DEF;

  // Protocol FSM states.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_STARTUP = 3'd1,
    ST_TX_CH0  = 3'd2,
    ST_TX_CH1  = 3'd3,
    ST_RX_CH0  = 3'd4,
    ST_RX_CH1  = 3'd5
  } i2s_state_e;

  // Channel index carried by WS: channel 0 while WS is low, channel 1 while
  // WS is high.
  typedef enum logic {
    CH0 = 1'b0,
    CH1 = 1'b1
  } i2s_ch_e;

endpackage : i2s_master_pkg
