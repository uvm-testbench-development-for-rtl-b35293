// Start-up without a reset pulse (rst_b held high from time zero).
//
// The simulator gives every register a random start value, as real flip-flops
// would have at power-up. The test checks that one clock edge with
// cfg_i2s_en low is enough to bring the line to its idle state (WS and SCK
// low, SD released), that the FIFO flags are never both high, and that a
// following transmit session frames correctly: STARTUP zero word, slots of
// WORD_LEN bit clocks, and the host's words sent in order once the FIFO
// contents left from power-up have been flushed by reading them out in
// receive mode.
module tb_i2s_not_rst;
  import i2s_master_pkg::*;

  localparam int unsigned WL    = WORD_LEN_DEF;
  localparam int unsigned DEPTH = FIFO_MEM_SIZE_DEF;

  logic clk = 0, rst_b = 1, cfg_tx_nrx = 1, cfg_i2s_en = 0;
  logic [WL-1:0] ch0_data_tx = '0, ch1_data_tx = '0, ch0_data_rx, ch1_data_rx;
  logic ch0_data_tx_put_en = 0, ch1_data_tx_put_en = 0;
  logic ch0_data_rx_get_en = 0, ch1_data_rx_get_en = 0;
  logic ch0_fifo_underrun, ch0_fifo_overrun, ch1_fifo_underrun, ch1_fifo_overrun;
  logic SCK, WS, pull = 1, clear;
  wire  SD;
  logic [WL-1:0] exp0[$], exp1[$], w;
  int checks = 0, failures = 0;

  i2s_master_trx dut (.*);
  assign (weak0, weak1) SD = pull;
  assign clear = ~cfg_i2s_en;
  i2s_line_monitor #(.WORD_LEN(WL)) mon (.sck(SCK), .clear, .ws(WS), .sd(SD));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic sd0, sd1;
    @(posedge clk); #1;
    pull = 0; #1 sd0 = SD; pull = 1; #1 sd1 = SD;
    check(!WS && !SCK && !sd0 && sd1, "idle line after one edge with enable low, no reset");
    check(!(ch0_fifo_overrun && ch0_fifo_underrun) && !(ch1_fifo_overrun && ch1_fifo_underrun),
          "FIFO flags consistent from any start value");
    // flush whatever the FIFOs hold after power-up
    @(negedge clk) cfg_tx_nrx = 0;
    for (int i = 0; i < 2 * DEPTH; i++) begin
      @(negedge clk) begin ch0_data_rx_get_en = 1; ch1_data_rx_get_en = 1; end
    end
    @(negedge clk) begin ch0_data_rx_get_en = 0; ch1_data_rx_get_en = 0; cfg_tx_nrx = 1; end
    check(ch0_fifo_underrun && ch1_fifo_underrun, "FIFOs empty after reading them out");
    for (int i = 0; i < 3; i++) begin
      w = WL'($urandom);
      @(negedge clk) begin ch0_data_tx = w; ch0_data_tx_put_en = 1; end
      exp0.push_back(w);
      w = WL'($urandom);
      @(negedge clk) begin ch0_data_tx_put_en = 0; ch1_data_tx = w; ch1_data_tx_put_en = 1; end
      exp1.push_back(w);
      @(negedge clk) ch1_data_tx_put_en = 0;
    end
    exp1.push_front('0);
    @(negedge clk) cfg_i2s_en = 1;
    repeat (1 + WL + 3 * 2 * WL + 2) @(posedge clk);
    @(negedge clk) cfg_i2s_en = 0;
    check(mon.q0.size() == exp0.size() && mon.q1.size() == exp1.size(), "word counts");
    foreach (exp0[i]) if (i < mon.q0.size()) check(mon.q0[i] == exp0[i], $sformatf("ch0 word %0d", i));
    foreach (exp1[i]) if (i < mon.q1.size()) check(mon.q1[i] == exp1[i], $sformatf("ch1 word %0d", i));
    check(mon.slot_len_err == 0, "slot length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
