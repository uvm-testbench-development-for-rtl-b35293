// End-to-end testbench of the I2S master transceiver (i2s_master_trx) at its
// default parameters (16-bit words, 8-word FIFOs).
//
// The host side is driven like a bus master: a write puts a word and a
// one-cycle put enable; a read takes chX_data_rx and pulses the get enable
// for one cycle. The line side is an open bus with a weak pull (so a
// released SD is visible) shared by the master's pad, the reference
// receiver (i2s_line_monitor, on rising SCK) and the reference transmitter
// (i2s_line_source) which drives SD only in receive sessions.
//
// Sessions, in the order of the verification plan of the design:
//   reset         all outputs low, SD released, SCK not toggling
//   simple TX     FIFO_MEM_SIZE-5 words per channel, then zero words
//   TX overwrite  3*FIFO_MEM_SIZE words per channel written at once: the
//                 first FIFO_MEM_SIZE are sent, the rest are lost
//   simple RX     FIFO_MEM_SIZE-5 words per channel received and read back
//   RX overflow and underread: more words received than the FIFO holds,
//                 then 3*FIFO_MEM_SIZE reads: the stored words, then zeros
//   enable drop   in the middle of a transmitted word
// Every mechanism (STARTUP, TX underrun, host overrun, RX overflow,
// underread, enable interrupt, mode change) is counted and must occur.
// Rates: one SD bit per clk cycle, WORD_LEN SCK cycles per WS level.
module tb_i2s_master_trx;
  import i2s_master_pkg::*;

  localparam int unsigned WL    = WORD_LEN_DEF;
  localparam int unsigned DEPTH = FIFO_MEM_SIZE_DEF;

  logic clk = 0, rst_b = 0, cfg_tx_nrx = 1, cfg_i2s_en = 0;
  logic [WL-1:0] ch0_data_tx = '0, ch1_data_tx = '0, ch0_data_rx, ch1_data_rx;
  logic ch0_data_tx_put_en = 0, ch1_data_tx_put_en = 0;
  logic ch0_data_rx_get_en = 0, ch1_data_rx_get_en = 0;
  logic ch0_fifo_underrun, ch0_fifo_overrun, ch1_fifo_underrun, ch1_fifo_overrun;
  logic SCK, WS;
  wire  SD;

  logic pull = 1, src_sd, src_drive = 0, clear;

  int checks = 0, failures = 0;
  int unsigned sck_edges = 0;
  // mechanism counters
  int unsigned n_startup = 0, n_tx_zero = 0, n_overrun = 0, n_rx_full = 0;
  int unsigned n_underread = 0, n_interrupt = 0, n_mode_change = 0;

  i2s_master_trx dut (.*);

  assign (weak0, weak1) SD = pull;
  assign SD    = src_drive ? src_sd : 1'bz;
  assign clear = ~cfg_i2s_en;

  i2s_line_monitor #(.WORD_LEN(WL)) mon (.sck(SCK), .clear, .ws(WS), .sd(SD));
  i2s_line_source  #(.WORD_LEN(WL)) src (.sck(SCK), .clear, .ws(WS), .sd(src_sd));

  always #5 clk = ~clk;
  always @(posedge SCK) sck_edges <= sck_edges + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic host_write(input bit ch, input logic [WL-1:0] d);
    @(negedge clk);
    if ((ch ? ch1_fifo_overrun : ch0_fifo_overrun)) n_overrun++;
    if (ch) begin ch1_data_tx = d; ch1_data_tx_put_en = 1; end
    else    begin ch0_data_tx = d; ch0_data_tx_put_en = 1; end
    @(negedge clk);
    ch0_data_tx_put_en = 0; ch1_data_tx_put_en = 0;
    ch0_data_tx = '0; ch1_data_tx = '0;
  endtask

  task automatic host_read(input bit ch, output logic [WL-1:0] d);
    @(negedge clk);
    if ((ch ? ch1_fifo_underrun : ch0_fifo_underrun)) n_underread++;
    d = ch ? ch1_data_rx : ch0_data_rx;
    if (ch) ch1_data_rx_get_en = 1; else ch0_data_rx_get_en = 1;
    @(negedge clk);
    ch0_data_rx_get_en = 0; ch1_data_rx_get_en = 0;
  endtask

  task automatic compare_q(ref logic [WL-1:0] got[$], ref logic [WL-1:0] exp[$], input string name);
    check(got.size() == exp.size(),
          $sformatf("%s: %0d words, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < got.size() && i < exp.size(); i++)
      check(got[i] == exp[i], $sformatf("%s[%0d] = %h, expected %h", name, i, got[i], exp[i]));
  endtask

  task automatic line_idle(input string when);
    logic sd0, sd1;
    pull = 0; #1 sd0 = SD;
    pull = 1; #1 sd1 = SD;
    check(!WS && !SCK && !sd0 && sd1, $sformatf("line not idle %s (WS=%b SCK=%b SD released=%b)",
          when, WS, SCK, !sd0 && sd1));
  endtask

  // Start a session of `frames` stereo frames after STARTUP, then stop.
  // Mirrors the host: configure mode, raise enable, wait, drop enable.
  logic last_mode = 1;
  task automatic session(input bit tx, input int frames);
    int unsigned e0;
    if (tx != last_mode) n_mode_change++;
    last_mode = tx;
    mon.q0.delete(); mon.q1.delete();
    @(negedge clk) begin cfg_tx_nrx = tx; src_drive = !tx; cfg_i2s_en = 1; end
    e0 = sck_edges;
    // 1 edge to leave IDLE, one STARTUP word, the frames, 2 edges so that
    // the last word's LSB is sent and stored.
    cycles(1 + WL + frames * 2 * WL + 2);
    @(negedge clk) cfg_i2s_en = 0;
    check(sck_edges - e0 == WL + frames * 2 * WL + 2,
          $sformatf("one SCK cycle per clk cycle: %0d edges", sck_edges - e0));
    @(posedge clk) #1;
    src_drive = 0;
    line_idle("after disable");
    check(mon.slot_len_err == 0, "WS holds each level for WORD_LEN SCK cycles");
  endtask

  initial begin
    logic [WL-1:0] w, exp0[$], exp1[$], got0[$], got1[$];
    int unsigned e;

    // ---------------- reset: all low, SD released, no clock on the line
    cycles(2);
    e = sck_edges;
    line_idle("in reset");
    cycles(3);
    check(sck_edges == e, "SCK still while in reset");
    @(negedge clk) rst_b = 1;
    cycles(3);
    line_idle("after reset");
    check(ch0_fifo_underrun && ch1_fifo_underrun && !ch0_fifo_overrun && !ch1_fifo_overrun,
          "FIFOs empty after reset");

    // ---------------- simple TX: DEPTH-5 words per channel
    for (int i = 0; i < DEPTH - 5; i++) begin
      w = WL'($urandom); host_write(0, w); exp0.push_back(w);
      w = WL'($urandom); host_write(1, w); exp1.push_back(w);
    end
    session(1, DEPTH - 5 + 2);
    check(mon.q1.size() > 0 && mon.q1[0] == '0, "STARTUP word of zeros with WS high");
    if (mon.q1.size() > 0 && mon.q1[0] == '0) begin n_startup++; void'(mon.q1.pop_front()); end
    for (int i = 0; i < 2; i++) begin exp0.push_back('0); exp1.push_back('0); end
    n_tx_zero += 2;
    compare_q(mon.q0, exp0, "simple TX ch0");
    compare_q(mon.q1, exp1, "simple TX ch1");
    check(ch0_fifo_underrun && ch1_fifo_underrun, "FIFOs drained by the transmission");

    // ---------------- TX with overwrite: 3*DEPTH words per channel
    exp0.delete(); exp1.delete();
    for (int i = 0; i < 3 * DEPTH; i++) begin
      w = WL'($urandom); host_write(0, w); if (i < DEPTH) exp0.push_back(w);
      w = WL'($urandom); host_write(1, w); if (i < DEPTH) exp1.push_back(w);
      if (i == DEPTH - 1)
        check(ch0_fifo_overrun && ch1_fifo_overrun, "overrun flag once the FIFO holds FIFO_MEM_SIZE words");
    end
    session(1, DEPTH + 1);
    if (mon.q1.size() > 0 && mon.q1[0] == '0) begin n_startup++; void'(mon.q1.pop_front()); end
    exp0.push_back('0); exp1.push_back('0); n_tx_zero++;
    compare_q(mon.q0, exp0, "TX overwrite ch0");
    compare_q(mon.q1, exp1, "TX overwrite ch1");

    // ---------------- simple RX: DEPTH-5 words per channel
    src.sent0.delete(); src.sent1.delete();
    for (int i = 0; i < DEPTH - 5; i++) begin
      src.q0.push_back(WL'($urandom)); src.q1.push_back(WL'($urandom));
    end
    session(0, DEPTH - 5);
    n_startup++;
    check(!ch0_fifo_underrun && !ch1_fifo_underrun, "received words in both FIFOs");
    got0.delete(); got1.delete();
    for (int i = 0; i < DEPTH - 5; i++) begin
      host_read(0, w); got0.push_back(w);
      host_read(1, w); got1.push_back(w);
    end
    compare_q(got0, src.sent0, "simple RX ch0");
    compare_q(got1, src.sent1, "simple RX ch1");
    check(ch0_fifo_underrun && ch1_fifo_underrun, "FIFOs empty after reading all words");

    // ---------------- RX overflow, then underread with 3*DEPTH reads
    src.sent0.delete(); src.sent1.delete(); src.q0.delete(); src.q1.delete();
    for (int i = 0; i < DEPTH + 4; i++) begin
      src.q0.push_back(WL'($urandom)); src.q1.push_back(WL'($urandom));
    end
    session(0, DEPTH + 4);
    n_startup++;
    check(ch0_fifo_overrun && ch1_fifo_overrun, "receive FIFOs full after more words than they hold");
    if (ch0_fifo_overrun) n_rx_full++;
    exp0.delete(); exp1.delete();
    for (int i = 0; i < 3 * DEPTH; i++) begin
      exp0.push_back(i < DEPTH ? src.sent0[i] : '0);
      exp1.push_back(i < DEPTH ? src.sent1[i] : '0);
    end
    got0.delete(); got1.delete();
    for (int i = 0; i < 3 * DEPTH; i++) begin
      host_read(0, w); got0.push_back(w);
      host_read(1, w); got1.push_back(w);
    end
    compare_q(got0, exp0, "RX underread ch0");
    compare_q(got1, exp1, "RX underread ch1");

    // ---------------- enable dropped in the middle of a transmitted word
    // (the host side writes the FIFOs only in transmit mode)
    exp0.delete(); exp1.delete();
    @(negedge clk) cfg_tx_nrx = 1;
    for (int i = 0; i < 3; i++) begin
      w = WL'($urandom); host_write(0, w); exp0.push_back(w);
      w = WL'($urandom); host_write(1, w); exp1.push_back(w);
    end
    n_mode_change++;
    last_mode = 1;
    mon.q0.delete(); mon.q1.delete();
    @(negedge clk) begin cfg_tx_nrx = 1; cfg_i2s_en = 1; end
    cycles(1 + WL + 2 * WL + WL / 2);         // middle of the second ch0 word
    @(negedge clk) cfg_i2s_en = 0;
    @(posedge clk) #1;
    line_idle("right after a mid-word disable");
    e = sck_edges;
    cycles(WL);
    check(sck_edges == e, "SCK stops when the link is disabled");
    check(mon.q0.size() == 1 && mon.q0[0] == exp0[0], "only the complete ch0 word was sent");
    n_interrupt++;
    // The remaining words go out after a restart: the aborted word was
    // already taken from the FIFO.
    void'(exp0.pop_front()); void'(exp0.pop_front()); void'(exp1.pop_front());
    session(1, 2);
    if (mon.q1.size() > 0 && mon.q1[0] == '0) begin n_startup++; void'(mon.q1.pop_front()); end
    exp0.push_back('0);
    compare_q(mon.q0, exp0, "restart ch0");
    compare_q(mon.q1, exp1, "restart ch1");

    // ---------------- every mechanism must have happened
    check(n_startup >= 4, $sformatf("STARTUP slots: %0d", n_startup));
    check(n_tx_zero > 0, $sformatf("TX underrun zero words: %0d", n_tx_zero));
    check(n_overrun > 0, $sformatf("host writes into a full FIFO: %0d", n_overrun));
    check(n_rx_full > 0, $sformatf("receive FIFO overflow: %0d", n_rx_full));
    check(n_underread > 0, $sformatf("host reads of an empty FIFO: %0d", n_underread));
    check(n_interrupt > 0, $sformatf("enable interrupts: %0d", n_interrupt));
    check(n_mode_change > 0, $sformatf("mode changes: %0d", n_mode_change));
    $display("mechanisms: startup=%0d tx_zero=%0d overrun=%0d rx_full=%0d underread=%0d interrupt=%0d mode_change=%0d",
             n_startup, n_tx_zero, n_overrun, n_rx_full, n_underread, n_interrupt, n_mode_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
