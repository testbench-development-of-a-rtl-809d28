// chip_piso_data_gen: stimulus for the parallel inputs of the chip's PISO.
//
// In a chip-level simulation the PISO's ten inputs are driven from the FPGA
// side so that the word read back by sipo_rx can be compared with a known
// value. This block steps through the three words of
// shreg_pkg::CHIP_PISO_WORDS in a loop, holding each for WAIT system clocks;
// 28 clocks cover one complete 10-bit read at a divider of 2 (20 clocks of
// serial clock plus margin). The first word is out during and right after
// reset. index_o tells which word is out. rst is synchronous, active high.
//
// The three-word loop and the 28-clock hold follow the document; the words
// themselves are this design's own, the first being the document's example.
module chip_piso_data_gen
  import shreg_pkg::*;
#(
  parameter int unsigned WAIT = 28
) (
  input  logic                  clk,
  input  logic                  rst,
  output logic [PISO_BITS-1:0]  data_o,
  output logic [1:0]            index_o
);

  localparam int unsigned CW = $clog2(WAIT + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= CW'(WAIT - 1);
      index_o <= 2'd0;
    end else if (cnt == '0) begin
      cnt     <= CW'(WAIT - 1);
      index_o <= (index_o == 2'd2) ? 2'd0 : index_o + 2'd1;
    end else begin
      cnt <= cnt - 1'b1;
    end
  end

  always_comb begin
    unique case (index_o)
      2'd0:    data_o = CHIP_PISO_WORDS[0];
      2'd1:    data_o = CHIP_PISO_WORDS[1];
      default: data_o = CHIP_PISO_WORDS[2];
    endcase
  end

endmodule
