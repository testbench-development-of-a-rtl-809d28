// sipo_readback: shows the data read back from one chip SIPO group on LEDs.
//
// Eight Data Out lines come back from the chip: FECK, DFT, ADC0..ADC3, BG and
// FE. Three switches (sel_i, coded as in shreg_pkg::dout_sel_e) pick one; its
// Data Out, together with the serial clock and latch that the FPGA sends to
// that group, goes to a dout_capture unit. The captured 10-bit word is held in
// word_o, and five LEDs show either its five most significant bits
// (weight_i = 1) or its five least significant bits (weight_i = 0).
//
// The selection is a plain multiplexer, so a switch change during a transfer
// garbles at most the word being captured; the next transfer is correct.
// Timing is that of dout_capture: word_o changes one clock after the tenth
// sample of a transfer. rst is synchronous and active high.
//
// The switch codes, the 5-LED display and its MSB/LSB switch follow the
// document.
module sipo_readback
  import shreg_pkg::*;
#(
  parameter int unsigned CAPTURE = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  dout_sel_e       sel_i,
  input  logic            weight_i,
  input  logic [7:0]      sclk_i,    // indexed by dout_sel_e
  input  logic [7:0]      latch_i,
  input  logic [7:0]      dout_i,
  output logic [9:0]      word_o,
  output logic            valid_o,
  output logic [4:0]      leds_o
);

  logic sclk_s, latch_s, dout_s;

  always_comb begin
    sclk_s  = sclk_i[sel_i];
    latch_s = latch_i[sel_i];
    dout_s  = dout_i[sel_i];
  end

  dout_capture #(.NBITS(SIPO_BITS), .CAPTURE(CAPTURE)) u_cap (
    .clk, .rst,
    .sclk_i(sclk_s), .latch_i(latch_s), .sdata_i(dout_s),
    .word_o, .valid_o
  );

  assign leds_o = weight_i ? word_o[9:5] : word_o[4:0];

endmodule
