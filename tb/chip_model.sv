// chip_model: behavioural model of the chip's shift registers as seen from
// the FPGA (testbench only).
//
// Holds the fifteen SIPOs in their five groups (BG: 3 in series, DFT: 1,
// FE: 6 in series, FECK: 1, ADC: 4 separate on one clock and latch) and the
// 10-bit PISO. Every Data Out line back to the FPGA passes SIPO_PATH system
// clocks of delay, the PISO output PISO_PATH clocks, to stand for the chip,
// board and level-shifter delays.
module chip_model #(
  parameter int unsigned SIPO_PATH = 0,
  parameter int unsigned PISO_PATH = 0
) (
  input  logic        clk,
  input  logic        clk_bg, din_bg, lat_bg,
  input  logic        clk_dft, din_dft, lat_dft,
  input  logic        clk_fe, din_fe, lat_fe,
  input  logic        clk_feck, din_feck, lat_feck,
  input  logic        clk_adc, lat_adc,
  input  logic [3:0]  din_adc,
  output logic        dout_bg, dout_dft, dout_fe, dout_feck,
  output logic [3:0]  dout_adc,
  output logic [29:0] q_bg,
  output logic [9:0]  q_dft,
  output logic [59:0] q_fe,
  output logic [9:0]  q_feck,
  output logic [3:0][9:0] q_adc,
  input  logic        piso_clk, piso_load,
  input  logic [9:0]  piso_par,
  output logic        piso_dout,
  output logic [9:0]  piso_loaded
);
  logic [7:0] pin;   // {adc3..adc0, feck, fe, dft, bg}
  logic       piso_pin;

  chip_sipo_model #(.NSIPO(3)) m_bg   (.sclk(clk_bg),   .din(din_bg),   .latch(lat_bg),   .q_o(q_bg),   .dout(pin[0]));
  chip_sipo_model #(.NSIPO(1)) m_dft  (.sclk(clk_dft),  .din(din_dft),  .latch(lat_dft),  .q_o(q_dft),  .dout(pin[1]));
  chip_sipo_model #(.NSIPO(6)) m_fe   (.sclk(clk_fe),   .din(din_fe),   .latch(lat_fe),   .q_o(q_fe),   .dout(pin[2]));
  chip_sipo_model #(.NSIPO(1)) m_feck (.sclk(clk_feck), .din(din_feck), .latch(lat_feck), .q_o(q_feck), .dout(pin[3]));
  for (genvar l = 0; l < 4; l++) begin : g_adc
    chip_sipo_model #(.NSIPO(1)) m_adc (.sclk(clk_adc), .din(din_adc[l]), .latch(lat_adc),
                                        .q_o(q_adc[l]), .dout(pin[4+l]));
  end

  chip_piso_model #(.PATH_DLY(PISO_PATH)) m_piso (.clk, .sclk(piso_clk), .load(piso_load),
    .par(piso_par), .dout_pin(piso_pin), .dout_fpga(piso_dout), .loaded_o(piso_loaded));

  logic [7:0] path [SIPO_PATH+1];
  assign path[0] = pin;
  for (genvar k = 1; k <= SIPO_PATH; k++) begin : g_path
    always @(posedge clk) path[k] <= path[k-1];
  end
  assign {dout_adc, dout_feck, dout_fe, dout_dft, dout_bg} = path[SIPO_PATH];
endmodule
