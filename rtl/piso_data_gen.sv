// piso_data_gen: produces the 150 parallel bits written to the chip's SIPOs.
//
// During reset every output is zero. In the first clock after reset the first
// data set appears; since the transmitters start a transfer on any change of
// their input, this sends one word to every SIPO group.
//   mode_i = 0: the first set stays; one transfer per group.
//   mode_i = 1: WAIT system clocks after the first set, the second set
//               appears; when the next latch pulse of the FE group
//               (latch_fe_i), the longest transfer, has ended, the third set
//               appears and stays. Three transfers per group, each with
//               different data. Waiting for the end of the pulse keeps the
//               new data from cutting the FE latch pulse short.
// mode_i is read in the clock after reset only. Because WAIT (52) is shorter
// than the BG and FE transfers at the fastest divider, the second set
// interrupts those two and they restart with it, as the transmitters require.
// set_o tells which set is out (0 during reset, then 1..3).
//
// The two modes, the 52-clock wait and the use of the FE latch follow the
// document; the data values and the reset value are this design's own.
module piso_data_gen
  import shreg_pkg::*;
#(
  parameter int unsigned WAIT = 52
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        mode_i,
  input  logic        latch_fe_i,
  output piso_data_t  data_o,
  output logic [1:0]  set_o
);

  typedef enum logic [2:0] {G_RESET, G_SET1_HOLD, G_SET1_WAIT, G_SET2, G_SET3} gstate_e;

  localparam int unsigned CW = $clog2(WAIT + 1);

  gstate_e        state;
  logic [CW-1:0]  cnt;
  logic           latch_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= G_RESET;
      cnt     <= '0;
      latch_q <= 1'b0;
    end else begin
      latch_q <= latch_fe_i;
      unique case (state)
        G_RESET: begin
          state <= mode_i ? G_SET1_WAIT : G_SET1_HOLD;
          cnt   <= CW'(WAIT - 1);
        end
        G_SET1_HOLD: ;
        G_SET1_WAIT: begin
          if (cnt == '0) state <= G_SET2;
          else           cnt   <= cnt - 1'b1;
        end
        G_SET2: if (!latch_fe_i && latch_q) state <= G_SET3;   // latch pulse over
        G_SET3: ;
        default: state <= G_RESET;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      G_RESET:                  begin data_o = '0;        set_o = 2'd0; end
      G_SET1_HOLD, G_SET1_WAIT: begin data_o = TEST_SET1; set_o = 2'd1; end
      G_SET2:                   begin data_o = TEST_SET2; set_o = 2'd2; end
      G_SET3:                   begin data_o = TEST_SET3; set_o = 2'd3; end
      default:                  begin data_o = '0;        set_o = 2'd0; end
    endcase
  end

endmodule
