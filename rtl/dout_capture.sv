// dout_capture: reads back the serial Data Out line of a chip SIPO group.
//
// The last SIPO of each group puts its shift chain out on a Data Out pin,
// one bit per rising edge of the group's serial clock, so the word written in
// one transfer comes back during the next one. This block watches the group's
// serial clock and latch (both produced inside the FPGA, so free of board
// delay) and samples the Data Out line, which does carry the board delay.
//
// sdata_i first passes one input register. Each rising edge of sclk_i, seen one
// system clock late through a second register, schedules a sample CAPTURE
// system clocks after the clock edge that raised sclk_i; the sample is the
// input register's content at that moment, which is the pin as it was
// CAPTURE-1 clocks after that edge. With CAPTURE = 1 the bit present on the pin
// just before the chip shifts is taken; each step of CAPTURE moves every sample
// one system clock later, to follow a longer board delay.
//
// After a latch pulse the next NBITS samples are kept (first in the MSB); the
// rest of a long chain's bits (BG, FE) are ignored, so those groups return their
// NBITS most significant bits. When the NBITS-th sample is in, word_o takes the
// word and valid_o pulses. The latch edge travels through the same delay as the
// samples, so samples still pending from one transfer are never counted in the
// next. Before the first latch after reset nothing is kept.
//
// The per-edge capture and the CAPTURE parameter (minimum 1, one system clock
// per step) follow the document. Which bit a given CAPTURE value lands on, the
// input register and the latch-based framing are this design's own choices.
module dout_capture #(
  parameter int unsigned NBITS   = 10,
  parameter int unsigned CAPTURE = 1   // >= 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sclk_i,
  input  logic              latch_i,
  input  logic              sdata_i,
  output logic [NBITS-1:0]  word_o,
  output logic              valid_o
);

  localparam int unsigned BW = $clog2(NBITS + 2);

  logic              sclk_q, latch_q, sdata_q;
  logic              rise, lrise;
  logic [CAPTURE-1:0] rise_pipe, lrise_pipe;  // [0] is the edge seen this clock
  logic              strobe, frame;
  logic [BW-1:0]     nsamp;
  logic [NBITS-2:0]  sr;

  initial begin
    if (CAPTURE < 1) $error("dout_capture: CAPTURE must be at least 1");
  end

  assign rise  = sclk_i  && !sclk_q;
  assign lrise = latch_i && !latch_q;

  always_comb begin
    rise_pipe[0]  = rise;
    lrise_pipe[0] = lrise;
  end

  if (CAPTURE > 1) begin : g_pipe
    always_ff @(posedge clk) begin
      if (rst) begin
        rise_pipe[CAPTURE-1:1]  <= '0;
        lrise_pipe[CAPTURE-1:1] <= '0;
      end else begin
        rise_pipe[CAPTURE-1:1]  <= rise_pipe[CAPTURE-2:0];
        lrise_pipe[CAPTURE-1:1] <= lrise_pipe[CAPTURE-2:0];
      end
    end
  end

  assign strobe = rise_pipe[CAPTURE-1];
  assign frame  = lrise_pipe[CAPTURE-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_q  <= 1'b0;
      latch_q <= 1'b0;
      sdata_q <= 1'b0;
      nsamp   <= BW'(NBITS + 1);   // idle until the first latch
      sr      <= '0;
      word_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      sclk_q  <= sclk_i;
      latch_q <= latch_i;
      sdata_q <= sdata_i;
      valid_o <= 1'b0;
      if (frame) begin
        nsamp <= '0;
      end else if (strobe && nsamp < BW'(NBITS)) begin
        sr    <= {sr[NBITS-3:0], sdata_q};
        nsamp <= nsamp + 1'b1;
        if (nsamp == BW'(NBITS - 1)) begin
          word_o  <= {sr, sdata_q};
          valid_o <= 1'b1;
        end
      end
    end
  end

endmodule
