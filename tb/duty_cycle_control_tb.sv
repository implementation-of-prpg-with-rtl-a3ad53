// duty_cycle_control_tb: self-checking testbench of duty_cycle_control.
//
// Runs 60 patterns of 64 shift cycles with random Hold/Toggle lengths,
// initial T value and offset (about one pattern in six with Hold = 0), with
// random idle cycles (adv=0) between shift cycles. The expected phase of
// every shift cycle after the first is generated independently: the
// initial phase lasts offset+1 cycles, then toggle and hold phases
// alternate with Toggle+1 and Hold+1 cycles, and Hold = 0 means toggle all
// the time (No Hold). Checks toggle_phase, no_hold and that the phase does
// not move during idle cycles.
module duty_cycle_control_tb;
  localparam int L = 64;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       cfg_load = 1'b0, t_init = 1'b0, first_cycle = 1'b0, adv = 1'b0;
  logic [3:0] hold_len = '0, toggle_len = '0, offset = '0;
  logic       toggle_phase, no_hold;
  int         checks = 0, failures = 0;
  int         hold_cycles = 0, toggle_cycles = 0, no_hold_patterns = 0, idle_cycles = 0;

  duty_cycle_control dut (.clk, .rst_n, .cfg_load, .hold_len, .toggle_len, .t_init,
                          .offset, .first_cycle, .adv, .toggle_phase, .no_hold);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (H=%0d T=%0d t0=%b off=%0d)",
               what, got, exp, hold_len, toggle_len, t_init, offset);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int p = 0; p < 60; p++) begin
      logic exp_seq [L];
      logic ph;
      int   rem;
      // load this pattern's controls
      @(negedge clk);
      hold_len   = (($urandom % 6) == 0) ? 4'd0 : 4'($urandom);
      toggle_len = 4'($urandom);
      t_init     = 1'($urandom);
      offset     = 4'($urandom);
      cfg_load   = 1'b1;
      @(negedge clk);
      cfg_load = 1'b0;
      if (hold_len == 0) no_hold_patterns++;
      // independent schedule of the phases
      ph = t_init; rem = int'(offset) + 1;
      for (int k = 1; k < L; k++) begin
        exp_seq[k] = ph | (hold_len == 0);
        rem--;
        if (rem == 0) begin
          ph  = ~ph;
          rem = (ph ? int'(toggle_len) : int'(hold_len)) + 1;
        end
      end
      for (int k = 0; k < L; k++) begin
        adv = 1'b1; first_cycle = (k == 0);
        #1;
        if (k > 0) begin
          expect_eq(toggle_phase, exp_seq[k], "toggle_phase");
          if (exp_seq[k]) toggle_cycles++; else hold_cycles++;
        end
        expect_eq(no_hold, hold_len == 0, "no_hold");
        @(negedge clk);
        adv = 1'b0; first_cycle = 1'b0;
        if (($urandom % 8) == 0 && k > 0 && k < L - 1) begin
          // idle cycle: the phase must not advance
          @(negedge clk);
          idle_cycles++;
          #1 expect_eq(toggle_phase, exp_seq[k + 1], "idle");
        end
      end
    end
    $display("hold cycles %0d, toggle cycles %0d, no-hold patterns %0d, idle cycles %0d",
             hold_cycles, toggle_cycles, no_hold_patterns, idle_cycles);
    checks++;
    if (hold_cycles == 0 || toggle_cycles == 0 || no_hold_patterns == 0 || idle_cycles == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
