// sipo_rx: serial-in parallel-out receiver that reads the chip's 10-bit PISO
// register (the ADC read-out register).
//
// The chip PISO loads its parallel inputs on a rising edge of its clock while
// its load input is high, and shifts one bit out (MSB first) on every later
// rising edge. This block drives that register and collects its output:
//   * load_o  - one pulse per read, as wide as one serial clock period, placed
//               so that the first rising edge of sclk_o falls in its middle;
//   * sclk_o  - NBITS clock pulses, DIV system clocks per period (low for
//               DIV - DIV/2, then high for DIV/2), the first inside load_o;
//   * sdata_i - sampled on the system clock edge on which sclk_o rises for
//               pulses 2 .. NBITS, and once more one period after the last
//               pulse (an eleventh rising edge that is not put out), each
//               delayed by DELAY further system clocks. The first bit is thus
//               read one serial period after the chip put it out, which leaves
//               room for the FPGA-to-chip round-trip delay; DELAY adds more
//               when the board adds more.
// When the last bit is in, data_o takes the word (first bit received in the
// MSB) and valid_o pulses for one clock.
//
// While enable_i is high reads repeat, IDLE clocks apart after the last sample
// of the previous read. enable_i is only looked at when a read could start: if
// it falls during a read, the read is completed and no new one starts.
// rst (synchronous, active high) stops any read and clears data_o.
//
// Timing from the first clock of load_o (t = 0): sclk_o rises at t = LO + k*DIV
// (k = 0 .. NBITS-1), sample k at t = LO + (k+1)*DIV + DELAY, the next read
// starts at t = LO + NBITS*DIV + DELAY + IDLE + 1.
//
// Load width and position, capture from the second rising edge, the DELAY
// parameter, and the enable loop follow the document. The IDLE gap length is
// this design's choice; the document only says reads are spaced.
module sipo_rx #(
  parameter int unsigned NBITS = 10,
  parameter int unsigned DIV   = 2,    // system clocks per serial clock period
  parameter int unsigned DELAY = 0,    // extra system clocks before each sample
  parameter int unsigned IDLE  = 4     // system clocks between reads
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable_i,
  input  logic              sdata_i,   // PISO_DOUT from the chip
  output logic              sclk_o,    // PISO_CLK to the chip
  output logic              load_o,    // PISO_LATCH (load) to the chip
  output logic [NBITS-1:0]  data_o,
  output logic              valid_o,
  output logic              busy_o
);

  localparam int unsigned LO     = DIV - DIV / 2;
  localparam int unsigned T_CLK  = LO + NBITS * DIV;          // clock pulses end
  localparam int unsigned T_LAST = LO + NBITS * DIV + DELAY;  // last sample
  localparam int unsigned T_END  = T_LAST + IDLE;             // read slot ends
  localparam int unsigned TW     = $clog2(T_END + 2);
  localparam int unsigned PW     = $clog2(DIV + 1);
  localparam int unsigned BW     = $clog2(NBITS + 1);

  logic              run;      // a read slot is in progress
  logic [TW-1:0]     t;        // system clocks since the read started
  logic [PW-1:0]     ph;       // position inside the serial clock period
  logic [TW-1:0]     t_cap;    // time of the next sample
  logic [BW-1:0]     nsamp;    // samples taken
  logic [NBITS-2:0]  sr;       // samples so far, newest in bit 0

  // Next-state values; all outputs are registered from them.
  logic              run_n;
  logic [TW-1:0]     t_n;
  logic [PW-1:0]     ph_n;
  logic              start;

  initial begin
    if (DIV < 2) $error("sipo_rx: DIV must be at least 2");
  end

  always_comb begin
    start = 1'b0;
    run_n = run;
    t_n   = t;
    if (!run || t == TW'(T_END)) begin
      if (enable_i) begin
        start = 1'b1;
        run_n = 1'b1;
        t_n   = '0;
      end else begin
        run_n = 1'b0;
      end
    end else begin
      t_n = t + 1'b1;
    end
    // Phase inside the serial period, counted from the low half.
    if (start || ph == PW'(DIV - 1)) ph_n = '0;
    else                              ph_n = ph + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run     <= 1'b0;
      t       <= '0;
      ph      <= '0;
      t_cap   <= '0;
      nsamp   <= '0;
      sr      <= '0;
      data_o  <= '0;
      valid_o <= 1'b0;
      sclk_o  <= 1'b0;
      load_o  <= 1'b0;
    end else begin
      run     <= run_n;
      t       <= t_n;
      ph      <= ph_n;
      valid_o <= 1'b0;
      load_o  <= run_n && (t_n < TW'(DIV));
      sclk_o  <= run_n && (t_n >= TW'(LO)) && (t_n < TW'(T_CLK)) && (ph_n >= PW'(LO));
      if (start) begin
        t_cap <= TW'(LO + DIV + DELAY);
        nsamp <= '0;
      end else if (run && nsamp != BW'(NBITS) && t_n == t_cap) begin
        sr    <= {sr[NBITS-3:0], sdata_i};
        nsamp <= nsamp + 1'b1;
        t_cap <= t_cap + TW'(DIV);
        if (nsamp == BW'(NBITS - 1)) begin
          data_o  <= {sr, sdata_i};
          valid_o <= 1'b1;
        end
      end
    end
  end

  assign busy_o = run;

endmodule
