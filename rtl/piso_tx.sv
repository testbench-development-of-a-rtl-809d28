// piso_tx: parallel-in serial-out transmitter that writes one group of the
// chip's SIPO registers.
//
// The chip's SIPOs shift on the rising edge of their serial clock and copy the
// shifted word to their outputs on a latch pulse. This block produces all three
// signals from the FPGA system clock:
//   * sclk_o  - NBITS clock pulses, DIV system clocks per period
//               (high for DIV/2, low for the rest);
//   * sdata_o - one serial line per lane, most significant bit first; each new
//               bit is put out when sclk_o falls, so it is stable at the next
//               rising edge. The first bit is put out on an imagined falling
//               edge, one low half-period before the first rising edge;
//   * latch_o - one pulse, as wide as the clock's high time, one low
//               half-period after the last clock pulse.
// A group of SIPOs in series is written by one lane of NBITS = 10 x (number of
// SIPOs); SIPOs that share clock and latch but have their own data inputs are
// written by NLANES lanes of 10 bits.
//
// A transfer starts whenever data_i differs from its value one clock earlier,
// or when start_i is high. Either event during a transfer aborts it and starts
// again with the new data, so no latch pulse is given for an aborted word.
// From the start event a complete transfer takes (NBITS+1)*DIV system clocks;
// done_o pulses for one clock when latch_o falls. rst (synchronous, active
// high) stops any transfer, drives all outputs low and takes the present data_i
// as the reference, so a word is only sent after it changes or on start_i.
//
// The serial timing, the latch width and the restart-on-change rule follow the
// document; the latch position, the reset reference and the splitting of odd
// DIV values are this design's own choices.
module piso_tx #(
  parameter int unsigned NBITS  = 10,  // bits per lane
  parameter int unsigned NLANES = 1,   // parallel serial lanes sharing sclk/latch
  parameter int unsigned DIV    = 2    // system clocks per serial clock period
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic [NLANES-1:0][NBITS-1:0]      data_i,
  input  logic                              start_i,   // one-clock manual request
  output logic                              sclk_o,
  output logic [NLANES-1:0]                 sdata_o,
  output logic                              latch_o,
  output logic                              busy_o,
  output logic                              done_o
);

  localparam int unsigned HI = DIV / 2;        // high time of sclk
  localparam int unsigned LO = DIV - DIV / 2;  // low time of sclk
  localparam int unsigned PW = $clog2(DIV + 1);
  localparam int unsigned BW = $clog2(NBITS + 1);

  typedef enum logic [2:0] {S_IDLE, S_LEAD, S_HIGH, S_LOW, S_LATCH} state_e;

  state_e                         state;
  logic [PW-1:0]                  ph;      // clocks left in this phase, minus one
  logic [BW-1:0]                  nbit;    // clock pulses completed
  logic [NLANES-1:0][NBITS-1:0]   shreg;
  logic [NLANES-1:0][NBITS-1:0]   prev;
  logic                           restart;

  initial begin
    if (DIV < 2) $error("piso_tx: DIV must be at least 2");
  end

  assign restart = start_i || (data_i != prev);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      ph      <= '0;
      nbit    <= '0;
      shreg   <= '0;
      prev    <= data_i;
      sclk_o  <= 1'b0;
      latch_o <= 1'b0;
      done_o  <= 1'b0;
    end else begin
      prev   <= data_i;
      done_o <= 1'b0;
      if (restart) begin
        shreg   <= data_i;
        sclk_o  <= 1'b0;
        latch_o <= 1'b0;
        nbit    <= '0;
        ph      <= PW'(LO - 1);
        state   <= S_LEAD;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_LEAD, S_LOW: begin
            if (ph != '0) begin
              ph <= ph - 1'b1;
            end else if (nbit == BW'(NBITS)) begin
              latch_o <= 1'b1;
              ph      <= PW'(HI - 1);
              state   <= S_LATCH;
            end else begin
              sclk_o <= 1'b1;
              ph     <= PW'(HI - 1);
              state  <= S_HIGH;
            end
          end
          S_HIGH: begin
            if (ph != '0) begin
              ph <= ph - 1'b1;
            end else begin
              sclk_o <= 1'b0;
              nbit   <= nbit + 1'b1;
              for (int l = 0; l < int'(NLANES); l++)
                shreg[l] <= {shreg[l][NBITS-2:0], 1'b0};
              ph     <= PW'(LO - 1);
              state  <= S_LOW;
            end
          end
          S_LATCH: begin
            if (ph != '0) begin
              ph <= ph - 1'b1;
            end else begin
              latch_o <= 1'b0;
              done_o  <= 1'b1;
              state   <= S_IDLE;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    for (int l = 0; l < int'(NLANES); l++) sdata_o[l] = shreg[l][NBITS-1];
  end

  assign busy_o = (state != S_IDLE);

  // The latch pulse only follows a complete word.
  property p_latch_after_word;
    @(posedge clk) disable iff (rst) $rose(latch_o) |-> (nbit == BW'(NBITS));
  endproperty
  a_latch_after_word: assert property (p_latch_after_word);

endmodule
