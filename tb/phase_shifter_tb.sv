// phase_shifter_tb: self-checking testbench of phase_shifter.
//
// Default size (32 latches, 16 outputs): every output must equal the XOR of
// latches j, j+1, j+2 (mod 32), checked on random vectors. A second
// instance with 8 latches and 20 outputs (so the tap spacing changes with
// j) is checked structurally: flipping one latch at a time must show that
// each output depends on exactly three different latches.
module phase_shifter_tb;
  logic [31:0] lat;
  logic [15:0] ps;
  logic [7:0]  lat_s;
  logic [19:0] ps_s, base_s;
  int          checks = 0, failures = 0;
  int          deps [20];

  phase_shifter #(.N(32), .M(16)) dut (.lat, .ps);
  phase_shifter #(.N(8),  .M(20)) dut_s (.lat(lat_s), .ps(ps_s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_ps;
    for (int t = 0; t < 500; t++) begin
      lat = (t < 32) ? (32'h1 << t) : $urandom;
      #1;
      for (int j = 0; j < 16; j++) exp_ps[j] = lat[j] ^ lat[(j + 1) % 32] ^ lat[(j + 2) % 32];
      checks++;
      if (ps !== exp_ps) begin
        failures++;
        $display("FAIL lat=%h ps=%h expected %h", lat, ps, exp_ps);
      end
    end
    for (int t = 0; t < 20; t++) begin
      lat_s = 8'($urandom);
      #1 base_s = ps_s;
      foreach (deps[j]) deps[j] = 0;
      for (int i = 0; i < 8; i++) begin
        lat_s[i] = ~lat_s[i];
        #1;
        for (int j = 0; j < 20; j++) if (ps_s[j] != base_s[j]) deps[j]++;
        lat_s[i] = ~lat_s[i];
        #1;
      end
      for (int j = 0; j < 20; j++) begin
        checks++;
        if (deps[j] != 3) begin
          failures++;
          $display("FAIL output %0d depends on %0d latches", j, deps[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
