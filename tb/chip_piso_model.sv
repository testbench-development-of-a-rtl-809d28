// chip_piso_model: behavioural model of the chip's 10-bit PISO register and of
// the board path its output takes back to the FPGA (testbench only).
//
// Ten flip-flops on the rising edge of sclk with a multiplexer in front of
// each: while load is high the parallel inputs are taken, otherwise the chain
// shifts towards the output. The output is the last flip-flop, so the MSB is
// on the pin after the loading edge. The pin then passes PATH_DLY system-clock
// stages (0 = no delay) to model the chip, board and level-shifter delay.
// loaded_o keeps the last word taken, for the testbench's reference.
module chip_piso_model #(
  parameter int unsigned PATH_DLY = 0
) (
  input  logic        clk,       // FPGA system clock, for the path model
  input  logic        sclk,
  input  logic        load,
  input  logic [9:0]  par,
  output logic        dout_pin,  // at the chip
  output logic        dout_fpga, // at the FPGA
  output logic [9:0]  loaded_o
);
  logic [9:0] q = '0;
  logic [PATH_DLY:0] dly;

  initial loaded_o = '0;
  always @(posedge sclk) begin
    if (load) begin
      q        <= par;
      loaded_o <= par;
    end else begin
      q <= {q[8:0], 1'b0};
    end
  end
  assign dout_pin = q[9];

  assign dly[0] = dout_pin;
  if (PATH_DLY > 0) begin : g_dly
    initial dly[PATH_DLY:1] = '0;
    always @(posedge clk) dly[PATH_DLY:1] <= dly[PATH_DLY-1:0];
  end
  assign dout_fpga = dly[PATH_DLY];
endmodule
