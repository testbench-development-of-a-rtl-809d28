// shreg_tester_top: FPGA design that exercises the shift registers of a
// sigma-delta ADC / accelerometer chip from outside the chip.
//
// The chip is configured through fifteen 10-bit SIPO registers (groups BG, DFT,
// FE, FECK, ADC) and returns its ADC data through one 10-bit PISO register.
// None of them has built-in test logic, so this design tests them from the
// FPGA:
//   * piso_data_gen produces one or three sets of 150 test bits (mode_i);
//   * piso_top serialises them into the five SIPO groups, each with its own
//     serial clock, data and latch lines; manual_tx_i resends everything;
//   * sipo_readback takes the Data Out line of the group chosen by sel_i back
//     in, captures the ten most significant bits of the word written in the
//     previous transfer and shows five of them on leds_o;
//   * sipo_rx reads the chip's PISO in a loop while rx_enable_i is high and
//     presents the word on adc_word_o;
//   * chip_piso_data_gen produces the chip PISO's parallel inputs for a
//     chip-level simulation (chip_piso_data_o); on the real chip those inputs
//     are internal.
//
// Parameters: DIV divides the system clock down to every serial clock (2:
// 250 MHz to 125 MHz); RX_DELAY delays the PISO read-back samples and CAPTURE
// places the SIPO read-back samples, both in system clocks, to absorb the
// chip/board delay; GEN_WAIT and CHIP_GEN_WAIT are the two generators' hold
// times; RX_IDLE spaces PISO reads. rst is synchronous and active high.
//
// The block split and the wiring follow the document's system diagram. Wiring
// the SIPO read-back to the transmitters' own clock and latch, and bringing
// the chip-PISO stimulus out as a port, are this design's choices.
module shreg_tester_top
  import shreg_pkg::*;
#(
  parameter int unsigned DIV           = 2,
  parameter int unsigned RX_DELAY      = 0,
  parameter int unsigned RX_IDLE       = 4,
  parameter int unsigned CAPTURE       = 1,
  parameter int unsigned GEN_WAIT      = 52,
  parameter int unsigned CHIP_GEN_WAIT = 28
) (
  input  logic                  clk,
  input  logic                  rst,

  // test control
  input  logic                  mode_i,        // 0: one data set, 1: three sets
  input  logic                  manual_tx_i,   // rising edge resends all groups
  input  logic                  rx_enable_i,   // read the chip PISO in a loop
  input  dout_sel_e             sel_i,         // SW2..SW0
  input  logic                  weight_i,      // 1: LEDs show the 5 MSBs

  // to the chip SIPO groups
  output logic                  sipo_clk_bg_o,
  output logic                  sipo_din_bg_o,
  output logic                  sipo_latch_bg_o,
  output logic                  sipo_clk_dft_o,
  output logic                  sipo_din_dft_o,
  output logic                  sipo_latch_dft_o,
  output logic                  sipo_clk_fe_o,
  output logic                  sipo_din_fe_o,
  output logic                  sipo_latch_fe_o,
  output logic                  sipo_clk_feck_o,
  output logic                  sipo_din_feck_o,
  output logic                  sipo_latch_feck_o,
  output logic                  sipo_clk_adc_o,
  output logic [ADC_LANES-1:0]  sipo_din_adc_o,
  output logic                  sipo_latch_adc_o,

  // from the chip SIPO groups
  input  logic                  sipo_dout_bg_i,
  input  logic                  sipo_dout_dft_i,
  input  logic                  sipo_dout_fe_i,
  input  logic                  sipo_dout_feck_i,
  input  logic [ADC_LANES-1:0]  sipo_dout_adc_i,

  // chip PISO
  output logic                  piso_clk_adc_o,
  output logic                  piso_latch_adc_o,
  input  logic                  piso_dout_adc_i,
  output logic [PISO_BITS-1:0]  chip_piso_data_o,
  output logic [1:0]            chip_piso_index_o,

  // results
  output logic [PISO_BITS-1:0]  adc_word_o,
  output logic                  adc_valid_o,
  output logic                  adc_busy_o,
  output logic [SIPO_BITS-1:0]  readback_word_o,
  output logic                  readback_valid_o,
  output logic [4:0]            leds_o,
  output logic [1:0]            data_set_o,
  output logic [4:0]            tx_busy_o,     // {adc, feck, fe, dft, bg}
  output logic [4:0]            tx_done_o
);

  piso_data_t  tx_data;
  logic [7:0]  rb_sclk, rb_latch, rb_dout;

  piso_data_gen #(.WAIT(GEN_WAIT)) u_gen (
    .clk, .rst,
    .mode_i,
    .latch_fe_i(sipo_latch_fe_o),
    .data_o(tx_data),
    .set_o(data_set_o)
  );

  piso_top #(.DIV(DIV)) u_tx (
    .clk, .rst,
    .data_i(tx_data),
    .manual_tx_i,
    .sipo_clk_bg_o, .sipo_din_bg_o, .sipo_latch_bg_o,
    .sipo_clk_dft_o, .sipo_din_dft_o, .sipo_latch_dft_o,
    .sipo_clk_fe_o, .sipo_din_fe_o, .sipo_latch_fe_o,
    .sipo_clk_feck_o, .sipo_din_feck_o, .sipo_latch_feck_o,
    .sipo_clk_adc_o, .sipo_din_adc_o, .sipo_latch_adc_o,
    .busy_o(tx_busy_o),
    .done_o(tx_done_o)
  );

  // Read-back sources in switch-code order (see dout_sel_e).
  assign rb_sclk  = {sipo_clk_fe_o, sipo_clk_bg_o, {4{sipo_clk_adc_o}},
                     sipo_clk_dft_o, sipo_clk_feck_o};
  assign rb_latch = {sipo_latch_fe_o, sipo_latch_bg_o, {4{sipo_latch_adc_o}},
                     sipo_latch_dft_o, sipo_latch_feck_o};
  assign rb_dout  = {sipo_dout_fe_i, sipo_dout_bg_i, sipo_dout_adc_i[3],
                     sipo_dout_adc_i[2], sipo_dout_adc_i[1], sipo_dout_adc_i[0],
                     sipo_dout_dft_i, sipo_dout_feck_i};

  sipo_readback #(.CAPTURE(CAPTURE)) u_rb (
    .clk, .rst,
    .sel_i, .weight_i,
    .sclk_i(rb_sclk), .latch_i(rb_latch), .dout_i(rb_dout),
    .word_o(readback_word_o), .valid_o(readback_valid_o),
    .leds_o
  );

  sipo_rx #(.NBITS(PISO_BITS), .DIV(DIV), .DELAY(RX_DELAY), .IDLE(RX_IDLE)) u_rx (
    .clk, .rst,
    .enable_i(rx_enable_i),
    .sdata_i(piso_dout_adc_i),
    .sclk_o(piso_clk_adc_o),
    .load_o(piso_latch_adc_o),
    .data_o(adc_word_o),
    .valid_o(adc_valid_o),
    .busy_o(adc_busy_o)
  );

  chip_piso_data_gen #(.WAIT(CHIP_GEN_WAIT)) u_chip_gen (
    .clk, .rst,
    .data_o(chip_piso_data_o),
    .index_o(chip_piso_index_o)
  );

endmodule
