// tra_tb: self-checking testbench of tra.
//
// Feeds random 16-bit scan responses into the 32-bit MISR and compares the
// signature after every clock with a reference written from the
// polynomial's exponents (feedback from stages 31, 21, 1, 0; response bit j
// XORed into stage j). Also checks clear, hold with en=0, and that a single
// flipped response bit changes the final signature.
module tra_tb;
  logic        clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [15:0] resp = '0;
  logic [31:0] signature, ref_sig, good_sig;
  logic [15:0] stream [200];
  int          checks = 0, failures = 0;

  tra dut (.clk, .rst_n, .clear, .en, .resp, .signature);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_step(logic [31:0] s, logic [15:0] r);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]} ^ {16'h0, r};
  endfunction

  task automatic run_stream(int flip_at);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    ref_sig = '0;
    for (int t = 0; t < 200; t++) begin
      en   = (t % 7) != 3;
      resp = stream[t] ^ ((t == flip_at) ? 16'h0100 : 16'h0);
      @(posedge clk);
      if (en) ref_sig = ref_step(ref_sig, resp);
      #1;
      checks++;
      if (signature !== ref_sig) begin
        failures++;
        $display("FAIL t=%0d signature %h expected %h", t, signature, ref_sig);
      end
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    foreach (stream[t]) stream[t] = 16'($urandom);
    #12 rst_n = 1'b1;
    run_stream(-1);
    good_sig = signature;
    run_stream(57);
    checks++;
    if (signature == good_sig) begin
      failures++;
      $display("FAIL single-bit error not seen in the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
