// tb_piso_data_gen: self-checking testbench for piso_data_gen.
//
// Mode 0: zeros during reset, the first data set from the first clock after
// reset, unchanged for good (latch pulses do not move it).
// Mode 1: the first set for exactly WAIT = 52 clocks, then the second set until
// an FE latch pulse, then the third set for good.
// The first set's ten most significant bits per group are compared with the
// sequences read back in the physical test, written out here independently;
// every group must differ between consecutive sets.
module tb_piso_data_gen;
  import shreg_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic mode = 1'b0;
  logic latch_fe = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  piso_data_t d;
  logic [1:0] set;

  piso_data_gen #(.WAIT(52)) dut (.clk, .rst, .mode_i(mode), .latch_fe_i(latch_fe),
                                  .data_o(d), .set_o(set));

  function automatic bit groups_differ(input piso_data_t a, input piso_data_t b);
    return a.bg != b.bg && a.dft != b.dft && a.fe != b.fe && a.feck != b.feck &&
           a.adc[0] != b.adc[0] && a.adc[1] != b.adc[1] && a.adc[2] != b.adc[2] &&
           a.adc[3] != b.adc[3];
  endfunction

  task automatic pulse_latch();
    @(negedge clk) latch_fe = 1'b1;
    @(negedge clk) latch_fe = 1'b0;
  endtask

  piso_data_t s1, s2;
  int n;

  initial begin
    // ---- mode 0 ----
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(d == '0 && set == 2'd0, "zeros during reset");
    rst = 0;
    @(negedge clk);
    check(set == 2'd1, "set 1 in the first clock after reset");
    s1 = d;
    check(d.bg[29:20] == 10'b0111010001, "BG MSBs");
    check(d.dft       == 10'b1000101000, "DFT word");
    check(d.fe[59:50] == 10'b1101010100, "FE MSBs");
    check(d.feck      == 10'b0110001010, "FECK word");
    check(d.adc[0] == 10'b1011100101 && d.adc[1] == 10'b0101101110 &&
          d.adc[2] == 10'b1110110111 && d.adc[3] == 10'b1110111101, "ADC words");
    repeat (100) @(posedge clk);
    pulse_latch();
    repeat (100) @(posedge clk);
    @(negedge clk);
    check(d == s1 && set == 2'd1, "mode 0 keeps set 1");

    // ---- mode 1 ----
    rst = 1; mode = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    n = 0;
    @(negedge clk);
    while (set == 2'd1 && n < 1000) begin
      n++;
      @(negedge clk);
    end
    check(n == 52, $sformatf("set 1 held %0d clocks, expected 52", n));
    check(set == 2'd2 && groups_differ(s1, d), "set 2 differs from set 1 in every group");
    s2 = d;
    repeat (300) @(posedge clk);
    @(negedge clk);
    check(set == 2'd2, "set 2 waits for the FE latch");
    pulse_latch();
    @(negedge clk);
    check(set == 2'd3 && groups_differ(s2, d), "set 3 after the FE latch, differs from set 2");
    pulse_latch();
    repeat (50) @(posedge clk);
    @(negedge clk);
    check(set == 2'd3, "set 3 stays");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
