// tb_shreg_tester_top: end-to-end test of shreg_tester_top at its default
// parameters (DIV 2, no board delay, CAPTURE 1, RX_DELAY 0).
//
// The design drives a behavioural model of the chip. The test runs:
//   1. mode 1: three data sets; the second set interrupts the BG and FE
//      transfers of the first (input change detection), the third is sent on
//      the FE latch. Every chip SIPO must end up holding the third set, and
//      the FE transfer of that set must take 61*DIV clocks.
//   2. for each of the eight read-back switch codes a manual transmission;
//      the read-back word must be the ten most significant bits of that
//      group's data, shown on the LEDs as MSB and LSB halves.
//   3. a manual edge during a transfer, which restarts every group.
//   4. the chip PISO read loop, running throughout: every word read must equal
//      the word the chip PISO loaded; enable falling during a read completes
//      that read and stops the loop.
//   5. mode 0 after a reset: exactly one transfer per group, of the first set.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_shreg_tester_top;
  import shreg_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic mode = 1'b1, manual = 1'b0, rx_en = 1'b0, weight = 1'b0;
  dout_sel_e sel = SEL_FECK;
  int   checks = 0, failures = 0;
  localparam int DIV_TB = 2;   // the design's serial clock divider

  always #2 clk = ~clk;   // 250 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk_bg, din_bg, lat_bg, clk_dft, din_dft, lat_dft, clk_fe, din_fe, lat_fe;
  logic clk_feck, din_feck, lat_feck, clk_adc, lat_adc;
  logic [3:0] din_adc, dout_adc;
  logic dout_bg, dout_dft, dout_fe, dout_feck;
  logic piso_clk, piso_load, piso_dout;
  logic [9:0] piso_par, piso_loaded, adc_word, rb_word;
  logic [1:0] piso_idx, set;
  logic adc_valid, adc_busy, rb_valid;
  logic [4:0] leds, busy, done;
  logic [29:0] q_bg;  logic [9:0] q_dft;  logic [59:0] q_fe;  logic [9:0] q_feck;
  logic [3:0][9:0] q_adc;

  shreg_tester_top dut (
    .clk, .rst,
    .mode_i(mode), .manual_tx_i(manual), .rx_enable_i(rx_en), .sel_i(sel), .weight_i(weight),
    .sipo_clk_bg_o(clk_bg), .sipo_din_bg_o(din_bg), .sipo_latch_bg_o(lat_bg),
    .sipo_clk_dft_o(clk_dft), .sipo_din_dft_o(din_dft), .sipo_latch_dft_o(lat_dft),
    .sipo_clk_fe_o(clk_fe), .sipo_din_fe_o(din_fe), .sipo_latch_fe_o(lat_fe),
    .sipo_clk_feck_o(clk_feck), .sipo_din_feck_o(din_feck), .sipo_latch_feck_o(lat_feck),
    .sipo_clk_adc_o(clk_adc), .sipo_din_adc_o(din_adc), .sipo_latch_adc_o(lat_adc),
    .sipo_dout_bg_i(dout_bg), .sipo_dout_dft_i(dout_dft), .sipo_dout_fe_i(dout_fe),
    .sipo_dout_feck_i(dout_feck), .sipo_dout_adc_i(dout_adc),
    .piso_clk_adc_o(piso_clk), .piso_latch_adc_o(piso_load), .piso_dout_adc_i(piso_dout),
    .chip_piso_data_o(piso_par), .chip_piso_index_o(piso_idx),
    .adc_word_o(adc_word), .adc_valid_o(adc_valid), .adc_busy_o(adc_busy),
    .readback_word_o(rb_word), .readback_valid_o(rb_valid), .leds_o(leds),
    .data_set_o(set), .tx_busy_o(busy), .tx_done_o(done));

  chip_model #(.SIPO_PATH(0), .PISO_PATH(0)) chip (
    .clk,
    .clk_bg, .din_bg, .lat_bg, .clk_dft, .din_dft, .lat_dft, .clk_fe, .din_fe, .lat_fe,
    .clk_feck, .din_feck, .lat_feck, .clk_adc, .lat_adc, .din_adc,
    .dout_bg, .dout_dft, .dout_fe, .dout_feck, .dout_adc,
    .q_bg, .q_dft, .q_fe, .q_feck, .q_adc,
    .piso_clk, .piso_load, .piso_par, .piso_dout, .piso_loaded);

  // ---------------- mechanism counters ----------------
  int n_latch [5];      // {bg, dft, fe, feck, adc} completed words
  int n_abort_change;   // transfers restarted by a data change
  int n_manual;         // manual transmissions
  int n_manual_restart; // manual edges during a transfer
  int n_reads;          // chip PISO reads checked
  int n_enable_stop;    // reads completed after enable fell
  int n_readback;       // read-back words checked
  int n_mode0, n_mode1; // generator runs per mode
  logic [1:0] set_q = '0;
  logic [4:0] lt, lt_q = '0;
  assign lt = {lat_adc, lat_feck, lat_fe, lat_dft, lat_bg};

  always @(negedge clk) begin
    if (!rst) begin
      for (int g = 0; g < 5; g++) if (lt[g] && !lt_q[g]) n_latch[g]++;
      if (set != set_q && set_q != 2'd0) n_abort_change += $countones(busy);
      if (adc_valid) begin
        n_reads++;
        check(adc_word == piso_loaded, $sformatf("PISO read %b, chip loaded %b", adc_word, piso_loaded));
      end
    end
    lt_q  = lt;
    set_q = set;
  end

  task automatic clear_latches();
    for (int g = 0; g < 5; g++) n_latch[g] = 0;
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while (busy != '0 && n < 10000) begin @(negedge clk); n++; end
    repeat (4) @(negedge clk);
  endtask

  task automatic check_chip(input piso_data_t e, input string tag);
    check(q_bg == e.bg && q_dft == e.dft && q_fe == e.fe && q_feck == e.feck && q_adc == e.adc,
          {tag, ": chip SIPO outputs"});
  endtask

  function automatic logic [9:0] top10(input piso_data_t e, input int s);
    case (s)
      0: return e.feck;
      1: return e.dft;
      2: return e.adc[0];
      3: return e.adc[1];
      4: return e.adc[2];
      5: return e.adc[3];
      6: return e.bg[29:20];
      default: return e.fe[59:50];
    endcase
  endfunction

  task automatic manual_pulse();
    @(negedge clk) manual = 1'b1;
    repeat (3) @(negedge clk);
    manual = 1'b0;
    n_manual++;
  endtask

  initial begin
    int t0, tfe;
    clear_latches();
    n_abort_change = 0; n_manual = 0; n_manual_restart = 0; n_reads = 0;
    n_enable_stop = 0; n_readback = 0; n_mode0 = 0; n_mode1 = 0;

    // ---- 1. mode 1, three data sets; PISO loop on ----
    repeat (4) @(posedge clk);
    @(negedge clk) begin rst = 0; rx_en = 1; end
    n_mode1++;
    wait (set == 2'd3);
    @(negedge clk);
    t0 = 0; tfe = 0;
    while (!lat_fe && t0 < 1000) begin @(negedge clk); t0++; end
    // one clock to see the change, then latch high after (60+1)*DIV - DIV/2 clocks
    check(t0 == 1 + 61 * DIV_TB - DIV_TB / 2, $sformatf("FE transfer: latch after %0d clocks", t0));
    wait_idle();
    check_chip(TEST_SET3, "mode 1");
    check(n_latch[0] == 2 && n_latch[2] == 2, $sformatf("BG/FE words completed %0d/%0d (set 1 aborted)",
          n_latch[0], n_latch[2]));
    check(n_latch[1] == 3 && n_latch[3] == 3 && n_latch[4] == 3, "DFT/FECK/ADC completed all three sets");

    // ---- 2. read-back of every group ----
    for (int s = 0; s < 8; s++) begin
      sel = dout_sel_e'(s);
      manual_pulse();
      wait_idle();
      check(rb_word == top10(TEST_SET3, s), $sformatf("read-back sel %0d: %b expected %b",
            s, rb_word, top10(TEST_SET3, s)));
      weight = 1'b1;
      @(negedge clk) check(leds == rb_word[9:5], "LEDs show MSBs");
      weight = 1'b0;
      @(negedge clk) check(leds == rb_word[4:0], "LEDs show LSBs");
      n_readback++;
    end
    check_chip(TEST_SET3, "after manual transmissions");

    // ---- 3. manual edge during a transfer ----
    clear_latches();
    manual_pulse();
    repeat (20 * DIV_TB) @(negedge clk);
    check(busy[2], "FE still busy at the second edge");
    manual_pulse();
    n_manual_restart++;
    wait_idle();
    check(n_latch[2] == 1 && n_latch[0] == 1, "manual restart: one FE and one BG latch");
    check_chip(TEST_SET3, "after manual restart");

    // ---- 4. enable falls during a PISO read ----
    begin
      int r0;
      wait (piso_load);
      repeat (6) @(negedge clk);
      r0 = n_reads;
      rx_en = 1'b0;
      repeat (50 * DIV_TB) @(negedge clk);
      check(n_reads == r0 + 1, "open read completed after enable fell");
      check(!adc_busy, "read loop stopped");
      if (n_reads == r0 + 1) n_enable_stop++;
    end

    // ---- 5. mode 0 ----
    @(negedge clk) begin rst = 1; mode = 0; end
    repeat (3) @(negedge clk);
    clear_latches();
    rst = 0;
    n_mode0++;
    repeat (200 * DIV_TB) @(negedge clk);
    check(set == 2'd1, "mode 0 stays on set 1");
    check(n_latch[0] == 1 && n_latch[1] == 1 && n_latch[2] == 1 && n_latch[3] == 1 && n_latch[4] == 1,
          "mode 0: one word per group");
    check_chip(TEST_SET1, "mode 0");

    // ---- mechanism coverage ----
    $display("mechanisms: change restarts %0d, manual %0d, manual restarts %0d, PISO reads %0d, enable stops %0d, read-backs %0d, mode0 %0d, mode1 %0d",
             n_abort_change, n_manual, n_manual_restart, n_reads, n_enable_stop, n_readback, n_mode0, n_mode1);
    check(n_abort_change > 0, "input change restart happened");
    check(n_manual > 0, "manual transmission happened");
    check(n_manual_restart > 0, "manual restart happened");
    check(n_reads > 10, "PISO read loop happened");
    check(n_enable_stop > 0, "enable stop happened");
    check(n_readback == 8, "all eight read-back selections happened");
    check(n_mode0 > 0 && n_mode1 > 0, "both generator modes happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
