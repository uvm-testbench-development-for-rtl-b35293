// Channel FIFO of the I2S master: a circular buffer reachable from two sides.
//
// One side faces the host (the peripheral interface), the other faces the
// protocol engine. Which side writes and which reads follows the transfer
// direction: with tx_nrx = 1 (transmit) the host writes words and the
// protocol reads them for serialisation; with tx_nrx = 0 (receive) the
// protocol writes received words and the host reads them. The enables of the
// side that is not selected for an operation are ignored.
//
// Storage is a 2**FIFO_ADDR_LEN_LOG2-entry array addressed by a read and a
// write pointer that advance after each accepted operation. The pointers
// carry one extra wrap bit so that full and empty are told apart without a
// separate counter.
//
//   fifo_overrun  - high while the FIFO holds FIFO_MEM_SIZE words; a write in
//                   this state is dropped and the word is lost.
//   fifo_underrun - high while the FIFO is empty; a read in this state does
//                   not move the pointer and the read data is 0.
//
// Read data is available combinationally (first-word fall-through): the
// word at the head is presented on *_rd_data while the FIFO is not empty and
// is removed at the clock edge where the read enable is high. A write and a
// read in the same cycle are both accepted when the flags allow them (a full
// FIFO still refuses the write even if it is read in that cycle).
//
// Clock and reset: all state changes on the rising edge of clk; rst_b is an
// asynchronous, active-low reset that empties the FIFO. The memory array
// itself is not reset; the empty flag masks its content. Without a reset the
// pointers start anywhere, and the flags are only meaningful once the FIFO
// has been read until fifo_underrun rises.
//
// Circular buffer, two flags, dropped write on full and zero on empty read
// follow the reference design; the level (not pulse) meaning of the two
// flags, the fall-through read and the reset style are choices of this
// implementation.
module i2s_dp_fifo #(
  parameter int unsigned WORD_LEN_LOG2      = i2s_master_pkg::WORD_LEN_LOG2_DEF,
  parameter int unsigned FIFO_ADDR_LEN_LOG2 = i2s_master_pkg::FIFO_ADDR_LEN_LOG2_DEF,
  localparam int unsigned WORD_LEN          = 1 << WORD_LEN_LOG2,
  localparam int unsigned FIFO_MEM_SIZE     = 1 << FIFO_ADDR_LEN_LOG2
) (
  input  logic                clk,
  input  logic                rst_b,
  input  logic                tx_nrx,       // 1: host writes, protocol reads

  // host (peripheral) side
  input  logic                ext_wr_en,
  input  logic [WORD_LEN-1:0] ext_wr_data,
  input  logic                ext_rd_en,
  output logic [WORD_LEN-1:0] ext_rd_data,

  // protocol side
  input  logic                pr_wr_en,
  input  logic [WORD_LEN-1:0] pr_wr_data,
  input  logic                pr_rd_en,
  output logic [WORD_LEN-1:0] pr_rd_data,

  // status
  output logic                fifo_overrun, // full
  output logic                fifo_underrun // empty
);

  logic [WORD_LEN-1:0]         mem [FIFO_MEM_SIZE];
  logic [FIFO_ADDR_LEN_LOG2:0] wr_ptr, rd_ptr;

  logic                        full, empty;
  logic                        wr_req, rd_req, wr_ok, rd_ok;
  logic [WORD_LEN-1:0]         wr_data, head;

  assign empty = (wr_ptr == rd_ptr);
  assign full  = (wr_ptr[FIFO_ADDR_LEN_LOG2] != rd_ptr[FIFO_ADDR_LEN_LOG2]) &&
                 (wr_ptr[FIFO_ADDR_LEN_LOG2-1:0] == rd_ptr[FIFO_ADDR_LEN_LOG2-1:0]);

  // Direction select between the two sides.
  always_comb begin
    if (tx_nrx) begin
      wr_req  = ext_wr_en;
      wr_data = ext_wr_data;
      rd_req  = pr_rd_en;
    end else begin
      wr_req  = pr_wr_en;
      wr_data = pr_wr_data;
      rd_req  = ext_rd_en;
    end
  end

  assign wr_ok = wr_req && !full;
  assign rd_ok = rd_req && !empty;

  assign head        = empty ? '0 : mem[rd_ptr[FIFO_ADDR_LEN_LOG2-1:0]];
  assign pr_rd_data  = tx_nrx  ? head : '0;
  assign ext_rd_data = !tx_nrx ? head : '0;

  assign fifo_overrun  = full;
  assign fifo_underrun = empty;

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (wr_ok) wr_ptr <= wr_ptr + 1'b1;
      if (rd_ok) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_ok) mem[wr_ptr[FIFO_ADDR_LEN_LOG2-1:0]] <= wr_data;
  end

endmodule : i2s_dp_fifo
