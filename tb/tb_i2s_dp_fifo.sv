// Self-checking testbench of the channel FIFO (i2s_dp_fifo).
//
// A queue model is kept in step with the FIFO. Directed phases fill the
// FIFO past its depth (overrun: full flag, extra words dropped) and read it
// past empty (underrun: empty flag, zero data), in both directions: host
// writes / protocol reads (tx_nrx = 1) and protocol writes / host reads
// (tx_nrx = 0). A random phase then mixes reads and writes on both sides,
// including enables of the side that is not selected, which must be ignored.
module tb_i2s_dp_fifo;
  import i2s_master_pkg::*;

  localparam int unsigned WL    = WORD_LEN_DEF;
  localparam int unsigned DEPTH = FIFO_MEM_SIZE_DEF;

  logic clk = 0, rst_b = 0, tx_nrx = 1;
  logic ext_wr_en = 0, ext_rd_en = 0, pr_wr_en = 0, pr_rd_en = 0;
  logic [WL-1:0] ext_wr_data = '0, pr_wr_data = '0, ext_rd_data, pr_rd_data;
  logic fifo_overrun, fifo_underrun;

  int checks = 0, failures = 0;
  logic [WL-1:0] model[$];
  int unsigned n_over = 0, n_under = 0;

  i2s_dp_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Check outputs against the model, then apply one cycle of operations.
  task automatic step(input bit wr, input bit rd, input bit stray_wr, input bit stray_rd);
    logic [WL-1:0] d, head;
    bit full, empty;
    d     = WL'($urandom);
    full  = (model.size() == DEPTH);
    empty = (model.size() == 0);
    head  = empty ? '0 : model[0];
    check(fifo_overrun == full, $sformatf("overrun flag %b, model holds %0d", fifo_overrun, model.size()));
    check(fifo_underrun == empty, $sformatf("underrun flag %b, model holds %0d", fifo_underrun, model.size()));
    if (tx_nrx) begin
      check(pr_rd_data == head, $sformatf("protocol-side head %h, expected %h", pr_rd_data, head));
      check(ext_rd_data == '0, "host read data is 0 while transmitting");
    end else begin
      check(ext_rd_data == head, $sformatf("host-side head %h, expected %h", ext_rd_data, head));
      check(pr_rd_data == '0, "protocol read data is 0 while receiving");
    end
    if (wr && full) n_over++;
    if (rd && empty) n_under++;
    @(negedge clk);
    if (tx_nrx) begin
      ext_wr_en = wr; ext_wr_data = d; pr_rd_en = rd;
      pr_wr_en = stray_wr; pr_wr_data = ~d; ext_rd_en = stray_rd;
    end else begin
      pr_wr_en = wr; pr_wr_data = d; ext_rd_en = rd;
      ext_wr_en = stray_wr; ext_wr_data = ~d; pr_rd_en = stray_rd;
    end
    @(posedge clk);
    if (rd && !empty) void'(model.pop_front());
    if (wr && !full) model.push_back(d);
    @(negedge clk);
    ext_wr_en = 0; ext_rd_en = 0; pr_wr_en = 0; pr_rd_en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_b = 1;
    for (int dir = 1; dir >= 0; dir--) begin
      tx_nrx = dir[0];
      #1;
      // overrun: three times the depth written
      for (int i = 0; i < 3 * DEPTH; i++) step(1, 0, 0, 0);
      check(model.size() == DEPTH, "model full after overrun phase");
      // underrun: read past empty
      for (int i = 0; i < DEPTH + 3; i++) step(0, 1, 0, 0);
      // simultaneous read and write at the boundaries
      step(1, 1, 0, 0);
      for (int i = 0; i < DEPTH; i++) step(1, 0, 0, 0);
      step(1, 1, 0, 0);
      while (model.size() > 0) step(0, 1, 0, 0);
    end
    // random mix with stray enables
    for (int i = 0; i < 2000; i++) begin
      if (i % 250 == 0) begin
        // direction changes only on an empty FIFO in normal use
        while (model.size() > 0) step(0, 1, 0, 0);
        tx_nrx = 1'($urandom_range(0, 1));
        #1;
      end
      step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 45,
           $urandom_range(0, 1), $urandom_range(0, 1));
    end
    // asynchronous reset empties the FIFO
    step(1, 0, 0, 0); step(1, 0, 0, 0);
    #2 rst_b = 0; model.delete();
    #1 check(fifo_underrun && !fifo_overrun, "reset empties the FIFO");
    @(negedge clk) rst_b = 1;
    step(0, 0, 0, 0);
    check(n_over > 0 && n_under > 0, $sformatf("overrun seen %0d times, underrun %0d times", n_over, n_under));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
