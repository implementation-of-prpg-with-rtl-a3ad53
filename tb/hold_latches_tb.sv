// hold_latches_tb: self-checking testbench of hold_latches.
//
// Drives random PRPG bits and random enables and checks every output bit
// against a reference: an enabled latch shows the current input (toggle
// mode), a disabled one the value it showed in its last enabled cycle
// (hold mode). Also checks that all latches hold through long disabled
// stretches while the input keeps changing.
module hold_latches_tb;
  localparam int N = 32;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] d = '0, en = '0, q;
  logic [N-1:0] ref_held;
  int           checks = 0, failures = 0;

  hold_latches #(.N(N)) dut (.clk, .rst_n, .d, .en, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check(logic [N-1:0] nd, logic [N-1:0] nen);
    logic [N-1:0] exp_q;
    @(negedge clk);
    d = nd; en = nen;
    #1;
    for (int i = 0; i < N; i++) exp_q[i] = en[i] ? d[i] : ref_held[i];
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL d=%h en=%h q=%h expected %h", d, en, q, exp_q);
    end
    @(posedge clk);
    ref_held = exp_q;
  endtask

  initial begin
    ref_held = '0;
    #12 rst_n = 1'b1;
    // all transparent
    repeat (10) step_and_check($urandom, '1);
    // all held while the input changes
    repeat (10) step_and_check($urandom, '0);
    // random mixes, sparse and dense enables
    repeat (300) step_and_check($urandom, $urandom);
    repeat (300) step_and_check($urandom, $urandom & $urandom & $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
