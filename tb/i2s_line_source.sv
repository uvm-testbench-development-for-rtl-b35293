// Reference I2S transmitter (slave transmitter) for the testbenches.
//
// Follows the master's WS and SCK like an external codec: WS is sampled on
// the rising edge of sck; when it changes, the next word for the channel it
// selects (0 = low, 1 = high) is taken from q0/q1 (0 when the queue is
// empty) and driven on sd MSB first, one bit per falling edge of sck,
// starting at the first falling edge after the change. The first slot
// after `clear` is the master's STARTUP slot: a zero word is sent for it and
// no queue word is used. Each word whose LSB has been driven is appended to
// sent0/sent1, so the testbench can compare them with what the master
// stored. `clear` is asynchronous and active high.
module i2s_line_source #(
  parameter int unsigned WORD_LEN = 16
) (
  input  logic sck,
  input  logic clear,
  input  logic ws,
  output logic sd
);
  logic [WORD_LEN-1:0] q0[$], q1[$], sent0[$], sent1[$];
  logic [WORD_LEN-1:0] cur;
  logic                cur_ch, cur_real, ws_prev, first;
  int                  idx;

  initial begin
    sd = 0; cur = '0; cur_ch = 0; cur_real = 0; ws_prev = 0; first = 1; idx = 0;
  end

  always @(posedge sck or posedge clear) begin
    if (clear) begin
      ws_prev = 0;
      first   = 1;
      idx     = 0;
    end else if (ws != ws_prev) begin
      ws_prev = ws;
      cur_ch  = ws;
      if (first) begin
        cur      = '0;
        cur_real = 0;
        first    = 0;
      end else begin
        cur_real = 1;
        if (ws) cur = (q1.size() > 0) ? q1.pop_front() : '0;
        else    cur = (q0.size() > 0) ? q0.pop_front() : '0;
      end
      idx = WORD_LEN;
    end
  end

  always @(negedge sck) begin
    if (idx > 0) begin
      idx = idx - 1;
      sd <= cur[idx];
      if (idx == 0 && cur_real) begin
        if (cur_ch) sent1.push_back(cur); else sent0.push_back(cur);
      end
    end
  end
endmodule
