// tb_piso_top: self-checking testbench for piso_top.
//
// All five groups drive behavioural chip SIPO chains (BG 3 SIPOs, DFT 1, FE 6,
// FECK 1, ADC 4 separate SIPOs on one clock and latch), DIV = 2. Checked:
//   * a new data set reaches every group's SIPO outputs, each group with its
//     own number of clock pulses (30, 10, 60, 10, 10) and one latch;
//   * a DFT change during a joint DFT+BG transfer restarts only DFT;
//   * a rising edge on manual_tx resends all groups with unchanged data, a
//     long high level sends only once, and an edge during a transfer restarts
//     it (one latch per group in the end).
module tb_piso_top;
  import shreg_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic manual = 1'b0;
  piso_data_t d;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk_bg, din_bg, lat_bg, clk_dft, din_dft, lat_dft, clk_fe, din_fe, lat_fe;
  logic clk_feck, din_feck, lat_feck, clk_adc, lat_adc;
  logic [3:0] din_adc;
  logic [4:0] busy, done;

  piso_top #(.DIV(2)) dut (
    .clk, .rst, .data_i(d), .manual_tx_i(manual),
    .sipo_clk_bg_o(clk_bg), .sipo_din_bg_o(din_bg), .sipo_latch_bg_o(lat_bg),
    .sipo_clk_dft_o(clk_dft), .sipo_din_dft_o(din_dft), .sipo_latch_dft_o(lat_dft),
    .sipo_clk_fe_o(clk_fe), .sipo_din_fe_o(din_fe), .sipo_latch_fe_o(lat_fe),
    .sipo_clk_feck_o(clk_feck), .sipo_din_feck_o(din_feck), .sipo_latch_feck_o(lat_feck),
    .sipo_clk_adc_o(clk_adc), .sipo_din_adc_o(din_adc), .sipo_latch_adc_o(lat_adc),
    .busy_o(busy), .done_o(done));

  logic [29:0] q_bg;  logic [9:0] q_dft;  logic [59:0] q_fe;  logic [9:0] q_feck;
  logic [3:0][9:0] q_adc;
  logic [4:0] dout_unused;
  logic [3:0] dout_adc_unused;
  chip_sipo_model #(.NSIPO(3)) m_bg   (.sclk(clk_bg),   .din(din_bg),   .latch(lat_bg),   .q_o(q_bg),   .dout(dout_unused[0]));
  chip_sipo_model #(.NSIPO(1)) m_dft  (.sclk(clk_dft),  .din(din_dft),  .latch(lat_dft),  .q_o(q_dft),  .dout(dout_unused[1]));
  chip_sipo_model #(.NSIPO(6)) m_fe   (.sclk(clk_fe),   .din(din_fe),   .latch(lat_fe),   .q_o(q_fe),   .dout(dout_unused[2]));
  chip_sipo_model #(.NSIPO(1)) m_feck (.sclk(clk_feck), .din(din_feck), .latch(lat_feck), .q_o(q_feck), .dout(dout_unused[3]));
  for (genvar l = 0; l < 4; l++) begin : g_adc
    chip_sipo_model #(.NSIPO(1)) m_adc (.sclk(clk_adc), .din(din_adc[l]), .latch(lat_adc),
                                        .q_o(q_adc[l]), .dout(dout_adc_unused[l]));
  end

  // Per-group clock pulse and latch counters: {adc, feck, fe, dft, bg}.
  int pulses [5];
  int latches [5];
  logic [4:0] ck, lt, ck_q = '0, lt_q = '0;
  assign ck = {clk_adc, clk_feck, clk_fe, clk_dft, clk_bg};
  assign lt = {lat_adc, lat_feck, lat_fe, lat_dft, lat_bg};
  always @(negedge clk) begin
    for (int g = 0; g < 5; g++) begin
      if (ck[g] && !ck_q[g]) pulses[g]++;
      if (lt[g] && !lt_q[g]) latches[g]++;
    end
    ck_q = ck; lt_q = lt;
  end

  task automatic clear_counts();
    for (int g = 0; g < 5; g++) begin pulses[g] = 0; latches[g] = 0; end
  endtask

  task automatic wait_idle();
    int n = 0;
    @(negedge clk);
    while (busy != '0 && n < 5000) begin @(negedge clk); n++; end
    #1;
  endtask

  task automatic check_outputs(input string tag);
    check(q_bg == d.bg,     {tag, ": BG"});
    check(q_dft == d.dft,   {tag, ": DFT"});
    check(q_fe == d.fe,     {tag, ": FE"});
    check(q_feck == d.feck, {tag, ": FECK"});
    check(q_adc == d.adc,   {tag, ": ADC"});
  endtask

  function automatic piso_data_t rand_set();
    piso_data_t r;
    logic [159:0] x;
    for (int i = 0; i < 5; i++) x[i*32 +: 32] = $urandom;
    r = piso_data_t'(x[149:0]);
    return r;
  endfunction

  initial begin
    d = '0;
    for (int g = 0; g < 5; g++) begin pulses[g] = 0; latches[g] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    // New data sets.
    for (int i = 0; i < 5; i++) begin
      @(negedge clk);
      clear_counts();
      d = rand_set();
      wait_idle();
      check_outputs($sformatf("set %0d", i));
      check(pulses[0] == 30 && pulses[1] == 10 && pulses[2] == 60 && pulses[3] == 10 && pulses[4] == 10,
            $sformatf("pulse counts %0d %0d %0d %0d %0d", pulses[0], pulses[1], pulses[2], pulses[3], pulses[4]));
      for (int g = 0; g < 5; g++) check(latches[g] == 1, $sformatf("group %0d latches %0d", g, latches[g]));
    end

    // DFT changes during a joint DFT+BG transfer: only DFT restarts.
    @(negedge clk);
    clear_counts();
    d.dft = ~d.dft;
    d.bg  = ~d.bg;
    repeat (12) @(negedge clk);
    check(busy[1] && busy[0], "DFT and BG busy");
    d.dft = d.dft ^ 10'h021;
    wait_idle();
    check(q_dft == d.dft && q_bg == d.bg, "DFT and BG words after DFT restart");
    check(pulses[0] == 30, $sformatf("BG not restarted (%0d pulses)", pulses[0]));
    check(pulses[1] > 10 && latches[1] == 1, $sformatf("DFT restarted (%0d pulses, %0d latches)", pulses[1], latches[1]));
    check(pulses[2] == 0 && pulses[3] == 0 && pulses[4] == 0, "other groups untouched");

    // Manual transmission: long high level sends once.
    @(negedge clk);
    clear_counts();
    manual = 1'b1;
    repeat (300) @(negedge clk);
    check(busy == '0, "manual level does not repeat");
    check_outputs("manual");
    for (int g = 0; g < 5; g++) check(latches[g] == 1, $sformatf("manual: group %0d latches %0d", g, latches[g]));
    manual = 1'b0;

    // Manual edge during a transfer restarts all groups.
    @(negedge clk);
    clear_counts();
    manual = 1'b1;
    @(negedge clk) manual = 1'b0;
    repeat (30) @(negedge clk);
    manual = 1'b1;
    @(negedge clk) manual = 1'b0;
    wait_idle();
    check_outputs("manual restart");
    check(pulses[2] > 60 && latches[2] == 1, $sformatf("FE restarted by manual (%0d pulses, %0d latches)", pulses[2], latches[2]));
    check(latches[1] == 2, "DFT finished before the second edge, sent twice");

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
