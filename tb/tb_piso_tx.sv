// tb_piso_tx: self-checking testbench for piso_tx.
//
// Two transmitters are driven into behavioural chip SIPO chains: a four-lane,
// 10-bit one at DIV = 2 (like the ADC group) and a one-lane, 30-bit one at
// DIV = 3 (like the BG group, with an odd divider). The testbench checks the
// words latched by the chip models against the words applied, the number of
// clock pulses per transfer, the latch width, the transfer time of
// (NBITS+1)*DIV clocks, the restart on a data change, the manual start and
// the reset.
module tb_piso_tx;
  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // DUT A: 4 lanes x 10 bits, DIV 2
  logic [3:0][9:0] da;
  logic            sta;
  logic            sclka, latcha, busya, donea;
  logic [3:0]      sda;
  logic [3:0][9:0] qa;
  logic [3:0]      douta;

  piso_tx #(.NBITS(10), .NLANES(4), .DIV(2)) dut_a (
    .clk, .rst, .data_i(da), .start_i(sta),
    .sclk_o(sclka), .sdata_o(sda), .latch_o(latcha), .busy_o(busya), .done_o(donea)
  );
  for (genvar l = 0; l < 4; l++) begin : g_a
    chip_sipo_model #(.NSIPO(1)) m (.sclk(sclka), .din(sda[l]), .latch(latcha),
                                    .q_o(qa[l]), .dout(douta[l]));
  end

  // DUT B: 1 lane x 30 bits, DIV 3
  logic [29:0] db;
  logic        stb;
  logic        sclkb, latchb, busyb, doneb, sdb, doutb;
  logic [29:0] qb;

  piso_tx #(.NBITS(30), .NLANES(1), .DIV(3)) dut_b (
    .clk, .rst, .data_i(db), .start_i(stb),
    .sclk_o(sclkb), .sdata_o(sdb), .latch_o(latchb), .busy_o(busyb), .done_o(doneb)
  );
  chip_sipo_model #(.NSIPO(3)) mb (.sclk(sclkb), .din(sdb), .latch(latchb), .q_o(qb), .dout(doutb));

  // Pulse, latch and cycle counters.
  int pulses_a = 0, latches_a = 0, latch_w_a = 0;
  int pulses_b = 0, latches_b = 0, latch_w_b = 0;
  logic sclka_q = 0, latcha_q = 0, sclkb_q = 0, latchb_q = 0;
  always @(posedge clk) begin
    sclka_q <= sclka; latcha_q <= latcha; sclkb_q <= sclkb; latchb_q <= latchb;
    if (sclka && !sclka_q) pulses_a++;
    if (latcha && !latcha_q) latches_a++;
    if (latcha) latch_w_a++;
    if (sclkb && !sclkb_q) pulses_b++;
    if (latchb && !latchb_q) latches_b++;
    if (latchb) latch_w_b++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_counts();
    pulses_a = 0; latches_a = 0; latch_w_a = 0;
    pulses_b = 0; latches_b = 0; latch_w_b = 0;
  endtask

  // Apply a new word to A, then count clocks until done.
  task automatic word_a(input logic [3:0][9:0] w);
    int n = -1;  // the first negedge counted follows E0 itself
    @(negedge clk);
    clear_counts();
    da = w;
    @(posedge clk);            // change seen at this edge (E0); count edges to done
    while (!donea) begin
      @(negedge clk);
      n++;
      if (n > 1000) break;
    end
    check(n == 22, $sformatf("A transfer time %0d, expected 22", n));
    check(pulses_a == 10, $sformatf("A pulses %0d", pulses_a));
    check(latches_a == 1 && latch_w_a == 1, $sformatf("A latch count %0d width %0d", latches_a, latch_w_a));
    #1;
    for (int l = 0; l < 4; l++)
      check(qa[l] == w[l], $sformatf("A lane %0d got %b expected %b", l, qa[l], w[l]));
  endtask

  task automatic word_b(input logic [29:0] w);
    int n = -1;  // the first negedge counted follows E0 itself
    @(negedge clk);
    clear_counts();
    db = w;
    @(posedge clk);
    while (!doneb) begin
      @(negedge clk);
      n++;
      if (n > 1000) break;
    end
    check(n == 93, $sformatf("B transfer time %0d, expected 93", n));
    check(pulses_b == 30, $sformatf("B pulses %0d", pulses_b));
    check(latches_b == 1 && latch_w_b == 1, $sformatf("B latch count %0d width %0d", latches_b, latch_w_b));
    #1;
    check(qb == w, $sformatf("B got %h expected %h", qb, w));
  endtask

  initial begin
    da = '0; db = '0; sta = 0; stb = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5) @(posedge clk);
    check(!busya && !busyb && !sclka && !latcha, "idle after reset without a data change");

    // Random words
    for (int i = 0; i < 20; i++) begin
      logic [3:0][9:0] w;
      for (int l = 0; l < 4; l++) w[l] = 10'($urandom);
      word_a(w);
    end
    for (int i = 0; i < 10; i++) word_b(30'($urandom));

    // Restart on change: change A mid-transfer, only the new word is latched.
    begin
      logic [3:0][9:0] w1, w2;
      int n = -1;  // the first negedge counted follows E0 itself
      w1 = {10'h155, 10'h2AA, 10'h0F0, 10'h30F};
      w2 = {10'h3C3, 10'h001, 10'h200, 10'h1E1};
      @(negedge clk);
      clear_counts();
      da = w1;
      repeat (9) @(posedge clk);
      @(negedge clk) da = w2;
      @(posedge clk);
      while (!donea && n < 1000) begin @(negedge clk); n++; end
      check(n == 22, $sformatf("A restarted transfer time %0d", n));
      check(latches_a == 1, $sformatf("A latches after abort %0d", latches_a));
      check(pulses_a == 10 + 4, $sformatf("A pulses with abort %0d", pulses_a));
      #1;
      for (int l = 0; l < 4; l++) check(qa[l] == w2[l], "A word after abort");
    end

    // Manual start with unchanged data resends the word.
    begin
      int n = -1;  // the first negedge counted follows E0 itself
      @(negedge clk);
      clear_counts();
      stb = 1;
      @(negedge clk) stb = 0;
      while (!doneb && n < 1000) begin @(negedge clk); n++; end
      check(pulses_b == 30 && latches_b == 1, "B manual resend");
      check(qb == db, "B word after manual resend");
    end

    // Reset during a transfer stops it.
    begin
      @(negedge clk);
      clear_counts();
      db = ~db;
      repeat (20) @(posedge clk);
      @(negedge clk) rst = 1;
      @(negedge clk) rst = 0;
      repeat (200) @(posedge clk);
      check(latches_b == 0, "no latch after reset mid-transfer");
      check(!busyb && !sclkb && !latchb, "B idle after reset");
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
