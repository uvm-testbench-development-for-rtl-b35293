// Reference I2S receiver for the testbenches: decodes WS/SD into words.
//
// Works as a Philips-format receiver that knows nothing of the master's
// internals: on every rising edge of sck it samples WS and SD. A change of
// WS marks the start of a slot for the channel WS now selects (0 = low,
// 1 = high); the next WORD_LEN samples of SD, MSB first, form that slot's
// word, which is appended to q0 or q1. A word cut short by `clear` is
// dropped. `clear` (asynchronous, active high) forgets the line state and
// sets the remembered WS to 0, the level of an idle master, so that the
// STARTUP slot that follows is decoded as a channel-1 word.
// The testbench reads q0/q1 hierarchically. slot_len_err counts slots whose
// WS level lasted other than WORD_LEN sampled cycles while the link was not
// cleared.
module i2s_line_monitor #(
  parameter int unsigned WORD_LEN = 16
) (
  input  logic sck,
  input  logic clear,
  input  logic ws,
  input  logic sd
);
  logic [WORD_LEN-1:0] q0[$], q1[$];
  logic [WORD_LEN-1:0] sh;
  int unsigned         nbits;
  logic                busy, ch, ws_prev, seen_edge;
  int unsigned         run_len;
  int unsigned         slot_len_err;

  initial begin
    busy = 0; nbits = 0; ws_prev = 0; ch = 0; sh = '0;
    seen_edge = 0; run_len = 0; slot_len_err = 0;
  end

  always @(posedge sck or posedge clear) begin
    if (clear) begin
      busy      <= 0;
      nbits     <= 0;
      ws_prev   <= 0;
      seen_edge <= 0;
      run_len   <= 0;
    end else begin
      logic [WORD_LEN-1:0] nsh;
      int unsigned         nn;
      logic                nbusy;
      nsh   = sh;
      nn    = nbits;
      nbusy = busy;
      if (busy) begin
        nsh = {sh[WORD_LEN-2:0], sd};
        nn  = nbits + 1;
        if (nn == WORD_LEN) begin
          if (ch) q1.push_back(nsh); else q0.push_back(nsh);
          nbusy = 0;
        end
      end
      if (ws != ws_prev) begin
        // A completed slot (not the first one after a clear) must have
        // lasted exactly one word.
        if (seen_edge && run_len != WORD_LEN) slot_len_err <= slot_len_err + 1;
        seen_edge <= 1;
        run_len   <= 1;
        nbusy = 1;
        nn    = 0;
        ch   <= ws;
      end else begin
        run_len <= run_len + 1;
      end
      sh      <= nsh;
      nbits   <= nn;
      busy    <= nbusy;
      ws_prev <= ws;
    end
  end
endmodule
