// Self-checking testbench of the pad block (i2s_pads).
//
// Checks, for random combinations and both clock phases, that SCK equals the
// inverted clock gated by SCK_en, that WS follows WS_out, that SD carries
// SD_out while SD_oe is high and is released otherwise (a weak external
// driver then sets the level, which must come back on SD_in).
module tb_i2s_pads;
  logic clk = 0, SCK_en = 0, WS_out = 0, SD_out = 0, SD_oe = 0;
  logic SD_in, SCK, WS;
  logic ext_val = 0;
  wire  SD;
  int checks = 0, failures = 0;

  i2s_pads dut (.*);

  // Remote device: weak driver, overridden by the pad when it drives.
  assign (weak0, weak1) SD = ext_val;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      {clk, SCK_en, WS_out, SD_out, SD_oe, ext_val} = 6'($urandom);
      #1;
      check(SCK == (~clk & SCK_en), $sformatf("SCK=%b for clk=%b en=%b", SCK, clk, SCK_en));
      check(WS == WS_out, "WS follows WS_out");
      if (SD_oe) check(SD == SD_out && SD_in == SD_out, "SD driven by the pad");
      else       check(SD == ext_val && SD_in == ext_val, "SD released, input sees the line");
    end
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
