// Self-checking testbench of the protocol FSM (i2s_protocol) on its own.
//
// The FIFOs are modelled by queues in the testbench (an empty queue
// supplies 0, like the real FIFO). The serial side is checked against the
// independent reference receiver (i2s_line_monitor) and fed by the reference
// transmitter (i2s_line_source), both clocked by sck = ~clk & sck_en as the
// pad block would produce it.
// Scenarios: reset values; transmit with the STARTUP zero word, channel 0
// first, the slot length and the exact cycle of the first FIFO read;
// transmit underrun (zero words); receive with words routed by WS;
// enable dropped in the middle of a word (all outputs low at the next edge,
// clean restart); a mode change on the fly in both directions.
module tb_i2s_protocol;
  import i2s_master_pkg::*;

  localparam int unsigned WL = WORD_LEN_DEF;

  logic clk = 0, rst_b = 0, en = 0, tx_nrx = 1;
  logic [WL-1:0] ch0_tx_data, ch1_tx_data, rx_data;
  logic ch0_tx_pop, ch1_tx_pop, ch0_rx_push, ch1_rx_push;
  logic sck_en, ws_out, sd_out, sd_oe, sd_in, sck, clear;

  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  logic [WL-1:0] txq0[$], txq1[$], rxq0[$], rxq1[$];
  logic [WL-1:0] exp0[$], exp1[$];
  int unsigned pops0 = 0, pops1 = 0, oe_in_rx = 0, oe_off_in_tx = 0;

  i2s_protocol dut (
    .clk, .rst_b, .cfg_i2s_en(en), .cfg_tx_nrx(tx_nrx),
    .ch0_tx_data, .ch1_tx_data, .ch0_tx_pop, .ch1_tx_pop,
    .rx_data, .ch0_rx_push, .ch1_rx_push,
    .sck_en, .ws_out, .sd_out, .sd_oe, .sd_in
  );

  assign sck   = ~clk & sck_en;
  assign clear = ~en;

  i2s_line_monitor #(.WORD_LEN(WL)) mon (.sck, .clear, .ws(ws_out), .sd(sd_out));
  i2s_line_source  #(.WORD_LEN(WL)) src (.sck, .clear, .ws(ws_out), .sd(sd_in));

  always #5 clk = ~clk;

  // FIFO models
  assign ch0_tx_data = (txq0.size() > 0) ? txq0[0] : '0;
  assign ch1_tx_data = (txq1.size() > 0) ? txq1[0] : '0;
  // The queue head is removed just after the edge so that the FSM loads
  // the word that was presented before it.
  always @(posedge clk) begin
    logic p0, p1;
    p0 = ch0_tx_pop;
    p1 = ch1_tx_pop;
    cyc <= cyc + 1;
    if (ch0_rx_push) rxq0.push_back(rx_data);
    if (ch1_rx_push) rxq1.push_back(rx_data);
    #1;
    if (p0) begin pops0 = pops0 + 1; if (txq0.size() > 0) void'(txq0.pop_front()); end
    if (p1) begin pops1 = pops1 + 1; if (txq1.size() > 0) void'(txq1.pop_front()); end
  end

  // Line driver direction, sampled mid-cycle. The stimulus marks the
  // stretches where the master must drive SD (want_drive) or must leave it
  // to the remote transmitter (want_release).
  logic want_drive = 0, want_release = 0;
  always @(posedge sck) begin
    if (want_release && sd_oe) oe_in_rx <= oe_in_rx + 1;
    if (want_drive && !sd_oe)  oe_off_in_tx <= oe_off_in_tx + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  task automatic compare_q(ref logic [WL-1:0] got[$], ref logic [WL-1:0] exp[$], input string name);
    check(got.size() == exp.size(),
          $sformatf("%s: %0d words, expected %0d", name, got.size(), exp.size()));
    for (int i = 0; i < got.size() && i < exp.size(); i++)
      check(got[i] == exp[i], $sformatf("%s[%0d] = %h, expected %h", name, i, got[i], exp[i]));
  endtask

  function automatic bit is_subseq(ref logic [WL-1:0] sub[$], ref logic [WL-1:0] full[$]);
    int j = 0;
    foreach (sub[i]) begin
      while (j < full.size() && full[j] != sub[i]) j++;
      if (j == full.size()) return 0;
      j++;
    end
    return 1;
  endfunction

  task automatic idle_outputs(input string when);
    check(!ws_out && !sd_out && !sd_oe && !sck_en,
          $sformatf("outputs not idle %s (ws=%b sd=%b oe=%b sck_en=%b)", when, ws_out, sd_out, sd_oe, sck_en));
  endtask

  task automatic clear_all();
    txq0.delete(); txq1.delete(); rxq0.delete(); rxq1.delete();
    exp0.delete(); exp1.delete();
    mon.q0.delete(); mon.q1.delete();
    src.q0.delete(); src.q1.delete(); src.sent0.delete(); src.sent1.delete();
  endtask

  initial begin
    logic [WL-1:0] w;
    int unsigned p0;

    cycles(3);
    @(negedge clk) rst_b = 1;
    cycles(2);
    idle_outputs("after reset");

    // ---------------- transmit, 5 words per channel then underrun
    for (int i = 0; i < 5; i++) begin
      w = WL'($urandom); txq0.push_back(w); exp0.push_back(w);
      w = WL'($urandom); txq1.push_back(w); exp1.push_back(w);
    end
    exp1.push_front('0);                      // STARTUP word, WS high
    @(negedge clk) begin tx_nrx = 1; en = 1; end
    @(posedge clk); #1;
    check(ws_out && sck_en && sd_oe && !sd_out, "STARTUP entered one edge after enable");
    want_drive = 1;
    p0 = pops0;
    repeat (WL - 1) @(posedge clk);
    #1 check(pops0 == p0 && ws_out, "still in STARTUP for one word");
    @(posedge clk); #2;
    check(pops0 == p0 + 1 && pops1 == 0 && !ws_out,
          "first FIFO read is channel 0, WORD_LEN cycles after STARTUP");
    // 5 frames of data + 2 frames of underrun + time for the last LSB
    cycles(7 * 2 * WL + 2);
    @(negedge clk) begin en = 0; want_drive = 0; end
    @(posedge clk); #1 idle_outputs("after enable drop");
    for (int i = 0; i < 2; i++) begin exp0.push_back('0); exp1.push_back('0); end
    compare_q(mon.q0, exp0, "tx ch0");
    compare_q(mon.q1, exp1, "tx ch1");
    check(mon.slot_len_err == 0, "every slot lasts WORD_LEN bit clocks");
    check(oe_off_in_tx == 0, "SD driven during transmit slots");

    // ---------------- receive
    clear_all();
    for (int i = 0; i < 6; i++) begin
      src.q0.push_back(WL'($urandom));
      src.q1.push_back(WL'($urandom));
    end
    cycles(3);
    @(negedge clk) begin tx_nrx = 0; en = 1; want_release = 1; end
    cycles(1 + WL + 6 * 2 * WL + 2);
    @(negedge clk) begin en = 0; want_release = 0; end
    @(posedge clk); #1 idle_outputs("after receive");
    compare_q(rxq0, src.sent0, "rx ch0");
    compare_q(rxq1, src.sent1, "rx ch1");
    check(rxq0.size() == 6 && rxq1.size() == 6, "six words received per channel");
    check(oe_in_rx == 0, "SD released during receive slots");

    // ---------------- enable dropped mid-word, then restart
    clear_all();
    for (int i = 0; i < 4; i++) begin
      w = WL'($urandom); txq0.push_back(w);
      w = WL'($urandom); txq1.push_back(w);
    end
    cycles(2);
    @(negedge clk) begin tx_nrx = 1; en = 1; end
    cycles(1 + WL + WL / 2);                  // half-way through the first ch0 word
    @(negedge clk) en = 0;
    @(posedge clk); #1 idle_outputs("right after a mid-word disable");
    check(mon.q0.size() == 0, "partial word not completed on the line");
    mon.q1.delete();
    exp0.delete(); exp1.delete();
    foreach (txq0[i]) exp0.push_back(txq0[i]);
    foreach (txq1[i]) exp1.push_back(txq1[i]);
    exp1.push_front('0);
    exp0.push_back('0);                       // fourth frame: channel 0 underrun
    cycles(3);
    @(negedge clk) en = 1;
    cycles(1 + WL + 4 * 2 * WL + 2);
    @(negedge clk) en = 0;
    @(posedge clk);
    compare_q(mon.q0, exp0, "restart ch0");
    compare_q(mon.q1, exp1, "restart ch1");

    // ---------------- mode change on the fly: TX -> RX -> TX
    clear_all();
    for (int i = 0; i < 8; i++) begin
      txq0.push_back(WL'($urandom)); txq1.push_back(WL'($urandom));
      src.q0.push_back(WL'($urandom)); src.q1.push_back(WL'($urandom));
    end
    cycles(2);
    @(negedge clk) begin tx_nrx = 1; en = 1; end
    cycles(1 + WL + 2 * WL + 3);              // inside the second ch0 TX slot
    @(negedge clk) tx_nrx = 0;
    // next boundary: WS rises, the ch0 LSB is still driven, then SD is released
    @(posedge ws_out);
    #1 check(sd_oe, "LSB of the last transmitted word still driven");
    @(posedge clk); #1;
    check(!sd_oe && ws_out, "mode switch to receive at the slot boundary");
    want_release = 1;
    cycles(3 * WL + 3);
    @(negedge clk) tx_nrx = 1;
    @(ws_out);
    #1 check(!sd_oe, "LSB of the last received word not driven over");
    want_release = 0;
    @(posedge clk); #1;
    check(sd_oe, "SD driven again after switching back to transmit");
    cycles(2 * WL);
    @(negedge clk) en = 0;
    @(posedge clk);
    check(rxq0.size() + rxq1.size() >= 3, "words received between the two mode switches");
    // The reference transmitter sends in every slot; the master stores only
    // the words of its receive slots, which must appear in order.
    check(is_subseq(rxq0, src.sent0) && is_subseq(rxq1, src.sent1),
          "words stored between the switches are the ones sent, in order");
    check(oe_in_rx == 0, "no drive in receive slots after a switch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
