// prpg_tb: self-checking testbench of prpg.
//
// Compares the PRPG state, cycle by cycle, with a reference LFSR written
// from the polynomial's exponents (x^32 + x^22 + x^2 + x + 1: feedback from
// stages 31, 21, 1 and 0). Covers reset to the seed, stepping, holding with
// adv=0, loading a seed, and XOR injection of the two tester channels into
// stages 10 and 21.
module prpg_tb;
  import presto_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0, adv = 1'b0, inj_en = 1'b0;
  logic [31:0] seed = '0;
  logic [1:0]  inj = '0;
  logic [31:0] state;
  logic [31:0] ref_s;
  int          checks = 0, failures = 0;

  prpg dut (.clk, .rst_n, .load, .seed, .adv, .inj_en, .inj, .state);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_step(logic [31:0] s, logic ie, logic [1:0] ij);
    logic [31:0] n;
    n = {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    if (ie) begin
      n[10] = n[10] ^ ij[0];
      n[21] = n[21] ^ ij[1];
    end
    return n;
  endfunction

  task automatic check(string what);
    checks++;
    if (state !== ref_s) begin
      failures++;
      $display("FAIL %s: state %h expected %h", what, state, ref_s);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    ref_s = 32'h1;
    check("reset");
    // free run
    adv = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk); #1;
      ref_s = ref_step(ref_s, 1'b0, 2'b00);
      check("step");
    end
    // hold
    adv = 1'b0;
    repeat (5) begin @(posedge clk); #1; check("hold"); end
    // load seed (priority over adv)
    seed = 32'hDEAD_BEEF; load = 1'b1; adv = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    ref_s = 32'hDEAD_BEEF;
    check("load");
    // injection
    inj_en = 1'b1;
    for (int i = 0; i < 300; i++) begin
      inj = 2'($urandom);
      @(posedge clk); #1;
      ref_s = ref_step(ref_s, 1'b1, inj);
      check("inject");
    end
    // inj ignored when inj_en = 0
    inj_en = 1'b0; inj = 2'b11;
    @(posedge clk); #1;
    ref_s = ref_step(ref_s, 1'b0, 2'b00);
    check("inj disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
