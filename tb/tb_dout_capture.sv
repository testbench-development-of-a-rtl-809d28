// tb_dout_capture: self-checking testbench for dout_capture.
//
// The testbench plays the FPGA transmitter (serial clock, data, latch) into
// behavioural chip SIPO chains and delays each chain's Data Out by a board
// path of P system clocks. Three capture units are checked:
//   A: 10-bit chain, DIV 2, P 0, CAPTURE 1;
//   B: 30-bit chain, DIV 8, P 8 (one serial period), CAPTURE 9;
//   C: 60-bit chain, DIV 2, P 2 (one serial period), CAPTURE 3.
// After each transfer the unit must hold the ten most significant bits of the
// word written in the transfer before; nothing is reported before the first
// latch after reset.
module tb_dout_capture;
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

  // Serial drivers, one per channel.
  logic [2:0] sclk = '0, din = '0, latch = '0;
  logic [2:0] pin, fpga;
  logic [9:0]  qa;
  logic [29:0] qb;
  logic [59:0] qc;

  chip_sipo_model #(.NSIPO(1)) ma (.sclk(sclk[0]), .din(din[0]), .latch(latch[0]), .q_o(qa), .dout(pin[0]));
  chip_sipo_model #(.NSIPO(3)) mb (.sclk(sclk[1]), .din(din[1]), .latch(latch[1]), .q_o(qb), .dout(pin[1]));
  chip_sipo_model #(.NSIPO(6)) mc (.sclk(sclk[2]), .din(din[2]), .latch(latch[2]), .q_o(qc), .dout(pin[2]));

  // Board paths.
  logic [8:1] pb = '0;
  logic [2:1] pc = '0;
  always @(posedge clk) begin
    pb <= {pb[7:1], pin[1]};
    pc <= {pc[1], pin[2]};
  end
  assign fpga[0] = pin[0];
  assign fpga[1] = pb[8];
  assign fpga[2] = pc[2];

  logic [9:0] wa, wb, wc;
  logic       va, vb, vc;
  dout_capture #(.NBITS(10), .CAPTURE(1)) dut_a (.clk, .rst, .sclk_i(sclk[0]), .latch_i(latch[0]),
    .sdata_i(fpga[0]), .word_o(wa), .valid_o(va));
  dout_capture #(.NBITS(10), .CAPTURE(9)) dut_b (.clk, .rst, .sclk_i(sclk[1]), .latch_i(latch[1]),
    .sdata_i(fpga[1]), .word_o(wb), .valid_o(vb));
  dout_capture #(.NBITS(10), .CAPTURE(3)) dut_c (.clk, .rst, .sclk_i(sclk[2]), .latch_i(latch[2]),
    .sdata_i(fpga[2]), .word_o(wc), .valid_o(vc));

  // Send one word on channel ch: first bit put out half a period before the
  // first rising edge, a new bit on every falling edge, latch after the last.
  task automatic send(input int ch, input logic [59:0] w, input int n, input int div);
    int hi = div / 2, lo = div - div / 2;
    @(posedge clk);
    din[ch] <= w[n-1];
    repeat (lo) @(posedge clk);
    for (int i = 0; i < n; i++) begin
      sclk[ch] <= 1'b1;
      repeat (hi) @(posedge clk);
      sclk[ch] <= 1'b0;
      din[ch]  <= (i + 1 < n) ? w[n-2-i] : 1'b0;
      repeat (lo) @(posedge clk);
    end
    latch[ch] <= 1'b1;
    repeat (hi) @(posedge clk);
    latch[ch] <= 1'b0;
    repeat (div) @(posedge clk);
  endtask

  int nva = 0, nvb = 0, nvc = 0;
  always @(negedge clk) begin
    if (va) nva++;
    if (vb) nvb++;
    if (vc) nvc++;
  end

  // Each channel: NW words in a row; after word k (k >= 1) the capture must
  // hold the top ten bits of word k-1.
  localparam int NW = 12;

  task automatic run_channel(input int ch, input int n, input int div);
    logic [59:0] prev, cur;
    int          nv0;
    prev = '0;
    for (int k = 0; k < NW; k++) begin
      cur = {$urandom, $urandom};
      if (n < 60) cur = cur & ((60'd1 << n) - 1);
      nv0 = (ch == 0) ? nva : (ch == 1) ? nvb : nvc;
      send(ch, cur, n, div);
      repeat (12) @(posedge clk);
      @(negedge clk);
      if (k == 0) begin
        check(((ch == 0) ? nva : (ch == 1) ? nvb : nvc) == nv0,
              $sformatf("ch%0d: no word before the first latch", ch));
      end else begin
        logic [9:0] exp_w, got;
        exp_w = 10'(prev >> (n - 10));
        got   = (ch == 0) ? wa : (ch == 1) ? wb : wc;
        check(got == exp_w, $sformatf("ch%0d word %0d: got %b expected %b", ch, k, got, exp_w));
        check(((ch == 0) ? nva : (ch == 1) ? nvb : nvc) == nv0 + 1,
              $sformatf("ch%0d word %0d: one valid per transfer", ch, k));
      end
      prev = cur;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    fork
      run_channel(0, 10, 2);
      run_channel(1, 30, 8);
      run_channel(2, 60, 2);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
