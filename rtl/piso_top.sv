// piso_top: the five transmitters that write the chip's SIPO groups.
//
// One piso_tx per SIPO group: BG (one lane of 30 bits, three SIPOs in series),
// DFT (10 bits), FE (one lane of 60 bits, six SIPOs in series), FECK (10 bits)
// and ADC (four lanes of 10 bits that share clock and latch). Every group has
// its own serial clock, data and latch lines, so the groups run independently:
// a data change in one group restarts only that group's transfer.
//
// All groups use the same serial clock divider DIV (system clocks per serial
// clock period; 2 gives 125 MHz from a 250 MHz system clock). manual_tx_i is a
// level input: each rising edge starts (or restarts) a transfer in all five
// groups at once, whatever the data, however long the input stays high. rst is
// synchronous and active high.
//
// Timing: a group's transfer takes (bits + 1) * DIV system clocks from the
// clock after the data change or the manual edge; BG 31*DIV, DFT and FECK and
// ADC 11*DIV, FE 61*DIV.
//
// Grouping, shared divider, manual edge trigger and independent change
// detection follow the document. Bit order within a group: bit [N-1] of the
// group's field is sent first and ends in the far end of the chain; for DFT that
// is the chip's DFT<1>, for BG the far SIPO of the chain.
module piso_top
  import shreg_pkg::*;
#(
  parameter int unsigned DIV = 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  piso_data_t            data_i,
  input  logic                  manual_tx_i,

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

  output logic [4:0]            busy_o,   // {adc, feck, fe, dft, bg}
  output logic [4:0]            done_o    // one-clock pulse per finished word
);

  logic manual_q;
  logic start;

  always_ff @(posedge clk) begin
    if (rst) manual_q <= 1'b1;   // no start from a level already high at reset
    else     manual_q <= manual_tx_i;
  end
  assign start = manual_tx_i && !manual_q;

  piso_tx #(.NBITS(BG_BITS), .NLANES(1), .DIV(DIV)) u_bg (
    .clk, .rst, .data_i(data_i.bg), .start_i(start),
    .sclk_o(sipo_clk_bg_o), .sdata_o(sipo_din_bg_o), .latch_o(sipo_latch_bg_o),
    .busy_o(busy_o[0]), .done_o(done_o[0])
  );

  piso_tx #(.NBITS(DFT_BITS), .NLANES(1), .DIV(DIV)) u_dft (
    .clk, .rst, .data_i(data_i.dft), .start_i(start),
    .sclk_o(sipo_clk_dft_o), .sdata_o(sipo_din_dft_o), .latch_o(sipo_latch_dft_o),
    .busy_o(busy_o[1]), .done_o(done_o[1])
  );

  piso_tx #(.NBITS(FE_BITS), .NLANES(1), .DIV(DIV)) u_fe (
    .clk, .rst, .data_i(data_i.fe), .start_i(start),
    .sclk_o(sipo_clk_fe_o), .sdata_o(sipo_din_fe_o), .latch_o(sipo_latch_fe_o),
    .busy_o(busy_o[2]), .done_o(done_o[2])
  );

  piso_tx #(.NBITS(FECK_BITS), .NLANES(1), .DIV(DIV)) u_feck (
    .clk, .rst, .data_i(data_i.feck), .start_i(start),
    .sclk_o(sipo_clk_feck_o), .sdata_o(sipo_din_feck_o), .latch_o(sipo_latch_feck_o),
    .busy_o(busy_o[3]), .done_o(done_o[3])
  );

  piso_tx #(.NBITS(ADC_BITS), .NLANES(ADC_LANES), .DIV(DIV)) u_adc (
    .clk, .rst, .data_i(data_i.adc), .start_i(start),
    .sclk_o(sipo_clk_adc_o), .sdata_o(sipo_din_adc_o), .latch_o(sipo_latch_adc_o),
    .busy_o(busy_o[4]), .done_o(done_o[4])
  );

endmodule
