// shreg_pkg: sizes, types and test words shared by the shift-register tester.
//
// The chip under test holds fifteen 10-bit SIPO registers in five groups and one
// 10-bit PISO register. The group sizes below are those of the chip: BG is three
// SIPOs in series (30 bits), DFT one SIPO, FE six SIPOs in series (60 bits), FECK
// one SIPO, and ADC four separate SIPOs that share clock and latch. Together they
// take 150 bits. The eight read-back selector codes follow the switch table of the
// physical test set-up (SW2..SW0).
//
// The TEST_* words are the data sets sent by the PISO data generator. The ten
// most significant bits of each group in TEST_SET1 are the sequences that were
// read back from the chip in the lab; the remaining bits and the other two sets
// are this design's own choice, picked so that every group differs between sets.
package shreg_pkg;

  localparam int unsigned SIPO_BITS = 10;  // bits held by one chip SIPO
  localparam int unsigned BG_BITS   = 30;  // 3 SIPOs in series
  localparam int unsigned DFT_BITS  = 10;  // 1 SIPO
  localparam int unsigned FE_BITS   = 60;  // 6 SIPOs in series
  localparam int unsigned FECK_BITS = 10;  // 1 SIPO
  localparam int unsigned ADC_LANES = 4;   // 4 parallel SIPOs, shared clock/latch
  localparam int unsigned ADC_BITS  = 10;
  localparam int unsigned PISO_BITS = 10;  // the chip's only PISO register

  // Parallel data for all five transmitters; 150 bits in all.
  typedef struct packed {
    logic [BG_BITS-1:0]                  bg;
    logic [DFT_BITS-1:0]                 dft;
    logic [FE_BITS-1:0]                  fe;
    logic [FECK_BITS-1:0]                feck;
    logic [ADC_LANES-1:0][ADC_BITS-1:0]  adc;
  } piso_data_t;

  // Read-back selector (switches SW2..SW0).
  typedef enum logic [2:0] {
    SEL_FECK = 3'd0,
    SEL_DFT  = 3'd1,
    SEL_ADC0 = 3'd2,
    SEL_ADC1 = 3'd3,
    SEL_ADC2 = 3'd4,
    SEL_ADC3 = 3'd5,
    SEL_BG   = 3'd6,
    SEL_FE   = 3'd7
  } dout_sel_e;

  localparam piso_data_t TEST_SET1 = '{
    bg:   {10'b0111010001, 20'b1001_0110_1100_0011_1010},
    dft:  10'b1000101000,
    fe:   {10'b1101010100, 50'h2_A5C3_1F0E_96B4},
    feck: 10'b0110001010,
    adc:  '{10'b1110111101, 10'b1110110111, 10'b0101101110, 10'b1011100101}
  };

  localparam piso_data_t TEST_SET2 = '{
    bg:   30'h2B4C_19E7,
    dft:  10'b0011010001,
    fe:   60'h9E1_7C3A_5B06_D248,
    feck: 10'b1010100101,
    adc:  '{10'b0110011001, 10'b1000011110, 10'b0011100011, 10'b1111000001}
  };

  localparam piso_data_t TEST_SET3 = '{
    bg:   30'h15A3_C7D2,
    dft:  10'b1111011111,
    fe:   60'h3C5_E1A7_0F92_B86D,
    feck: 10'b0101011010,
    adc:  '{10'b0001110110, 10'b1100101010, 10'b1010010011, 10'b0100111100}
  };

  // Words loaded into the chip PISO, in a loop. The first is the sequence of
  // the single-transfer example; the other two are this design's choice.
  localparam logic [PISO_BITS-1:0] CHIP_PISO_WORDS [3] = '{
    10'b1001110110, 10'b0110100011, 10'b1100011101
  };

endpackage
