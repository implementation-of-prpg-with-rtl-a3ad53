// weight_logic_tb: self-checking testbench of weight_logic.
//
// For each of the eight switching codes, loads the code, drives random PRPG
// states and checks the enable bit against the reference: the AND of the
// first k+1 of PRPG stages 3, 11, 19, 27 (k = code[1:0]), inverted when
// code[2] is 1. Also checks that the measured fraction of 1s over 4096
// random states is close to the programmed weight, and that the switching
// register keeps its code while cfg_load is 0.
module weight_logic_tb;
  logic        clk = 1'b0, rst_n = 1'b0, cfg_load = 1'b0;
  logic [2:0]  sw_code = '0;
  logic [31:0] prpg = '0;
  logic        en_bit;
  int          checks = 0, failures = 0;

  weight_logic dut (.clk, .rst_n, .cfg_load, .sw_code, .prpg, .en_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_bit(logic [2:0] code, logic [31:0] s);
    logic a;
    a = s[3];
    if (code[1:0] >= 1) a = a & s[11];
    if (code[1:0] >= 2) a = a & s[19];
    if (code[1:0] >= 3) a = a & s[27];
    return a ^ code[2];
  endfunction

  initial begin
    #12 rst_n = 1'b1;
    for (int c = 0; c < 8; c++) begin
      int ones;
      real expected, measured;
      @(negedge clk);
      sw_code = 3'(c); cfg_load = 1'b1;
      @(negedge clk);
      cfg_load = 1'b0; sw_code = 3'(c + 3);  // must be ignored
      ones = 0;
      for (int t = 0; t < 4096; t++) begin
        prpg = $urandom;
        #1;
        checks++;
        if (en_bit !== ref_bit(3'(c), prpg)) begin
          failures++;
          $display("FAIL code=%0d prpg=%h en_bit=%b", c, prpg, en_bit);
        end
        ones += int'(en_bit);
      end
      expected = 1.0 / real'(2 ** ((c % 4) + 1));
      if (c >= 4) expected = 1.0 - expected;
      measured = real'(ones) / 4096.0;
      checks++;
      if (measured < expected - 0.03 || measured > expected + 0.03) begin
        failures++;
        $display("FAIL code=%0d weight %f expected %f", c, measured, expected);
      end
      $display("code %0d: fraction of 1s %f (programmed %f)", c, measured, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
