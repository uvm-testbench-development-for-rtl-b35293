// Pad cell group of the I2S master: the three line signals SCK, WS and SD.
//
//   SD  - bidirectional. A tri-state output buffer drives SD_out onto the pad
//         while SD_oe is high and releases it (high impedance) otherwise; an
//         input buffer returns the pad level on SD_in at all times, so the
//         master can receive whenever it is not driving.
//   SCK - the system clock inverted (clk_n) and ANDed with SCK_en. SCK_en is
//         a register of the rising clk edge, so it only changes while clk_n
//         is low and the gated clock has no glitches. The line clock thus has
//         the frequency of clk, and its falling edges are the rising edges
//         of clk.
//   WS  - output buffer driven by WS_out.
//
// The structure (tri-state SD with output enable and an always-on input,
// SCK = clk_n AND SCK_en, buffered WS) is that of the reference pad block;
// the buffers are written as ideal, zero-delay logic.
module i2s_pads (
  input  logic clk,
  input  logic SCK_en,
  input  logic WS_out,
  input  logic SD_out,
  input  logic SD_oe,
  output logic SD_in,
  output logic SCK,
  output logic WS,
  inout  wire  SD
);

  logic clk_n;

  assign clk_n = ~clk;
  assign SCK   = clk_n & SCK_en;
  assign WS    = WS_out;
  assign SD    = SD_oe ? SD_out : 1'bz;
  assign SD_in = SD;

endmodule : i2s_pads
