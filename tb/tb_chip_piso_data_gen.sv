// tb_chip_piso_data_gen: self-checking testbench for chip_piso_data_gen.
//
// Checks that the first word is out during and after reset, that each word is
// held for exactly WAIT = 28 clocks, and that the three words follow one
// another in a loop: 1001110110, 0110100011, 1100011101.
module tb_chip_piso_data_gen;
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

  logic [9:0] d;
  logic [1:0] idx;
  chip_piso_data_gen #(.WAIT(28)) dut (.clk, .rst, .data_o(d), .index_o(idx));

  localparam logic [9:0] EXP [3] = '{10'b1001110110, 10'b0110100011, 10'b1100011101};

  initial begin
    int n, k;
    repeat (3) @(posedge clk);
    @(negedge clk);
    check(d == EXP[0], "first word during reset");
    rst = 0;
    k = 0;
    for (int w = 0; w < 9; w++) begin
      n = 0;
      while (d == EXP[k] && n < 100) begin
        @(negedge clk);
        n++;
      end
      check(n == 28, $sformatf("word %0d held %0d clocks", w, n));
      k = (k + 1) % 3;
      check(d == EXP[k] && idx == 2'(k), $sformatf("word %0d followed by %b", w, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
