// tb_sipo_readback: self-checking testbench for sipo_readback.
//
// Eight behavioural 10-bit chip SIPOs are written at the same time with
// different random words (serial clock period 2 system clocks). For each of
// the eight selector codes two rounds are sent; after the second the captured
// word must be the word the selected SIPO received in the first round, and
// the LEDs must show its upper five bits with the weight switch on and its
// lower five bits with it off.
module tb_sipo_readback;
  import shreg_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] sclk = '0, latch = '0, din = '0, dout;
  logic [7:0][9:0] q;
  for (genvar c = 0; c < 8; c++) begin : g_ch
    chip_sipo_model #(.NSIPO(1)) m (.sclk(sclk[c]), .din(din[c]), .latch(latch[c]),
                                    .q_o(q[c]), .dout(dout[c]));
  end

  dout_sel_e  sel;
  logic       weight;
  logic [9:0] word;
  logic       valid;
  logic [4:0] leds;

  sipo_readback #(.CAPTURE(1)) dut (
    .clk, .rst, .sel_i(sel), .weight_i(weight),
    .sclk_i(sclk), .latch_i(latch), .dout_i(dout),
    .word_o(word), .valid_o(valid), .leds_o(leds));

  // All eight channels together, DIV = 2.
  task automatic send_all(input logic [7:0][9:0] w);
    @(posedge clk);
    for (int c = 0; c < 8; c++) din[c] <= w[c][9];
    @(posedge clk);
    for (int i = 0; i < 10; i++) begin
      sclk <= '1;
      @(posedge clk);
      sclk <= '0;
      for (int c = 0; c < 8; c++) din[c] <= (i < 9) ? w[c][8-i] : 1'b0;
      @(posedge clk);
    end
    latch <= '1;
    @(posedge clk);
    latch <= '0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    logic [7:0][9:0] w1, w2;
    sel = SEL_FECK; weight = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int s = 0; s < 8; s++) begin
      for (int c = 0; c < 8; c++) begin
        w1[c] = 10'($urandom);
        w2[c] = 10'($urandom);
      end
      sel = dout_sel_e'(s);
      send_all(w1);
      send_all(w2);
      @(negedge clk);
      check(word == w1[s], $sformatf("sel %0d: word %b expected %b", s, word, w1[s]));
      weight = 1'b1;
      #1 check(leds == w1[s][9:5], $sformatf("sel %0d: LEDs (MSB) %b", s, leds));
      weight = 1'b0;
      #1 check(leds == w1[s][4:0], $sformatf("sel %0d: LEDs (LSB) %b", s, leds));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
