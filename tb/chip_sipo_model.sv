// chip_sipo_model: behavioural model of a chain of the chip's SIPO registers
// (testbench only).
//
// Each chip SIPO is ten flip-flops in a shift chain, clocked on the rising edge
// of the serial clock, plus ten output flip-flops clocked by the latch signal.
// NSIPO registers in series behave as one chain of 10*NSIPO flip-flops whose
// last stage drives Data Out. The bit shifted in first ends in q_o[top].
module chip_sipo_model #(
  parameter int unsigned NSIPO = 1
) (
  input  logic                   sclk,
  input  logic                   din,
  input  logic                   latch,
  output logic [10*NSIPO-1:0]    q_o,     // latched parallel outputs
  output logic                   dout     // Data Out of the last SIPO
);
  localparam int unsigned N = 10 * NSIPO;
  logic [N-1:0] chain = '0;

  initial q_o = '0;
  always @(posedge sclk) chain <= {chain[N-2:0], din};
  always @(posedge latch) q_o <= chain;
  assign dout = chain[N-1];
endmodule
