// tb_sipo_rx: self-checking testbench for sipo_rx.
//
// Two receivers read behavioural chip PISOs whose parallel inputs change at
// random times: A at DIV = 2 with no path delay and DELAY = 0, B at DIV = 8
// with a 34-clock path delay and DELAY = 34, and C at DIV = 2 with a 5-clock
// path delay and DELAY = 4 (the lower end of its window; only C's words are
// checked). Checked: every word read equals
// the word the chip PISO loaded; the load pulse is one serial period wide and
// the first rising clock edge comes LO clocks into it; ten clock pulses per
// read; the spacing of reads while enable is high; a read in progress when
// enable falls is completed and no further read starts; reset clears the
// output word.
module tb_sipo_rx;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic en  = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- A ----------------
  logic       sclka, loada, valida, busya, dpa, dfa;
  logic [9:0] wa, para, lda;
  sipo_rx #(.NBITS(10), .DIV(2), .DELAY(0), .IDLE(4)) dut_a (
    .clk, .rst, .enable_i(en), .sdata_i(dfa), .sclk_o(sclka), .load_o(loada),
    .data_o(wa), .valid_o(valida), .busy_o(busya));
  chip_piso_model #(.PATH_DLY(0)) ma (.clk, .sclk(sclka), .load(loada), .par(para),
    .dout_pin(dpa), .dout_fpga(dfa), .loaded_o(lda));

  // ---------------- B ----------------
  logic       sclkb, loadb, validb, busyb, dpb, dfb;
  logic [9:0] wb, parb, ldb;
  sipo_rx #(.NBITS(10), .DIV(8), .DELAY(34), .IDLE(4)) dut_b (
    .clk, .rst, .enable_i(en), .sdata_i(dfb), .sclk_o(sclkb), .load_o(loadb),
    .data_o(wb), .valid_o(validb), .busy_o(busyb));
  chip_piso_model #(.PATH_DLY(34)) mb (.clk, .sclk(sclkb), .load(loadb), .par(parb),
    .dout_pin(dpb), .dout_fpga(dfb), .loaded_o(ldb));

  // ---------------- C ----------------
  logic       sclkc, loadc, validc, busyc, dpc, dfc;
  logic [9:0] wc, parc, ldc;
  sipo_rx #(.NBITS(10), .DIV(2), .DELAY(4), .IDLE(4)) dut_c (
    .clk, .rst, .enable_i(en), .sdata_i(dfc), .sclk_o(sclkc), .load_o(loadc),
    .data_o(wc), .valid_o(validc), .busy_o(busyc));
  chip_piso_model #(.PATH_DLY(5)) mc (.clk, .sclk(sclkc), .load(loadc), .par(parc),
    .dout_pin(dpc), .dout_fpga(dfc), .loaded_o(ldc));

  // Random parallel data for the chip PISOs.
  always @(posedge clk) begin
    if ($urandom_range(0, 15) == 0) parc <= 10'($urandom);
    if ($urandom_range(0, 15) == 0) para <= 10'($urandom);
    if ($urandom_range(0, 15) == 0) parb <= 10'($urandom);
  end

  // Timing monitors (sampled at negedge, after all updates).
  int reads_a = 0, reads_b = 0, pulses_a = 0, pulses_b = 0;
  int loadw_a = 0, loadw_b = 0, lead_a = 0, lead_b = 0;
  int start_a = 0, start_b = 0, period_a = -1, period_b = -1;
  int cyc = 0, reads_c = 0;
  logic sclka_q = 0, sclkb_q = 0, loada_q = 0, loadb_q = 0;
  bit   seen_rise_a = 0, seen_rise_b = 0;

  always @(negedge clk) begin
    cyc++;
    if (!en && !busya) start_a = 0;   // a pause is not a read period
    if (!en && !busyb) start_b = 0;
    if (loada && !loada_q) begin
      if (start_a != 0) period_a = cyc - start_a;
      start_a = cyc; loadw_a = 0; lead_a = 0; seen_rise_a = 0;
    end
    if (loada) loadw_a++;
    if (loada && !sclka && !seen_rise_a) lead_a++;
    if (sclka && !sclka_q) begin pulses_a++; seen_rise_a = 1; end
    if (loadb && !loadb_q) begin
      if (start_b != 0) period_b = cyc - start_b;
      start_b = cyc; loadw_b = 0; lead_b = 0; seen_rise_b = 0;
    end
    if (loadb) loadw_b++;
    if (loadb && !sclkb && !seen_rise_b) lead_b++;
    if (sclkb && !sclkb_q) begin pulses_b++; seen_rise_b = 1; end
    sclka_q = sclka; sclkb_q = sclkb; loada_q = loada; loadb_q = loadb;

    if (!rst && valida) begin
      reads_a++;
      check(wa == lda, $sformatf("A read %b, chip loaded %b", wa, lda));
      check(pulses_a == 10, $sformatf("A pulses per read %0d", pulses_a));
      check(loadw_a == 2 && lead_a == 1, $sformatf("A load width %0d lead %0d", loadw_a, lead_a));
      if (period_a > 0) check(period_a == 1 + 20 + 0 + 4 + 1, $sformatf("A read period %0d", period_a));
      pulses_a = 0;
    end
    if (!rst && validc) begin
      reads_c++;
      check(wc == ldc, $sformatf("C read %b, chip loaded %b", wc, ldc));
    end
    if (!rst && validb) begin
      reads_b++;
      check(wb == ldb, $sformatf("B read %b, chip loaded %b", wb, ldb));
      check(pulses_b == 10, $sformatf("B pulses per read %0d", pulses_b));
      check(loadw_b == 8 && lead_b == 4, $sformatf("B load width %0d lead %0d", loadw_b, lead_b));
      if (period_b > 0) check(period_b == 4 + 80 + 34 + 4 + 1, $sformatf("B read period %0d", period_b));
      pulses_b = 0;
    end
  end

  initial begin
    para = 10'h2C7; parb = 10'h135; parc = 10'h0F3;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (20) @(posedge clk);
    check(!busya && !busyb && !sclka && !loada, "no read while enable is low");

    @(negedge clk) en = 1;
    repeat (3000) @(posedge clk);
    check(reads_a > 100, $sformatf("A reads in loop %0d", reads_a));
    check(reads_b > 20, $sformatf("B reads in loop %0d", reads_b));
    check(reads_c > 80, $sformatf("C reads in loop %0d", reads_c));

    // Enable falls during a read of B: that read completes, no new one.
    wait (loadb);
    repeat (30) @(posedge clk);
    @(negedge clk) en = 0;
    begin
      int rb0, ra0;
      rb0 = reads_b;
      repeat (300) @(posedge clk);
      check(reads_b == rb0 + 1, $sformatf("B completes the open read (%0d -> %0d)", rb0, reads_b));
      ra0 = reads_a;
      repeat (300) @(posedge clk);
      check(reads_a == ra0 && reads_b == rb0 + 1, "no reads after enable fell");
      check(!busya && !busyb, "receivers idle");
    end

    // Resume, then reset in the middle of a read.
    @(negedge clk) en = 1;
    repeat (500) @(posedge clk);
    @(negedge clk) begin rst = 1; en = 0; end
    @(negedge clk);
    check(wa == '0 && wb == '0 && !sclka && !loadb, "reset clears the word and stops the clock");
    @(negedge clk) rst = 0;

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
