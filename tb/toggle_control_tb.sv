// toggle_control_tb: self-checking testbench of toggle_control.
//
// Shifts random weighted bits into the shift register and reloads the
// toggle control register at random moments, comparing the control
// register with a reference shift-register model after every clock: it must
// change only on reload, and then take the shift register contents from
// before that clock's shift.
module toggle_control_tb;
  localparam int N = 32;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         shift = 1'b0, en_bit = 1'b0, reload = 1'b0;
  logic [N-1:0] tcr;
  logic [N-1:0] ref_sr, ref_tcr;
  int           checks = 0, failures = 0;
  int           reloads = 0;

  toggle_control #(.N(N)) dut (.clk, .rst_n, .shift, .en_bit, .reload, .tcr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_sr = '0; ref_tcr = '0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      shift  = ($urandom % 4) != 0;
      en_bit = 1'($urandom);
      reload = ($urandom % 20) == 0;
      @(posedge clk);
      if (reload) begin ref_tcr = ref_sr; reloads++; end
      if (shift)  ref_sr = {ref_sr[N-2:0], en_bit};
      #1;
      checks++;
      if (tcr !== ref_tcr) begin
        failures++;
        $display("FAIL cycle %0d tcr=%h expected %h", t, tcr, ref_tcr);
      end
    end
    checks++;
    if (reloads < 10) begin failures++; $display("FAIL too few reloads"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
