// tb_prbs_source: checks the PRBS-15 test-data source.
//
// A reference LFSR per lane (x^15 + x^14 + 1, seed 1 + lane) must match
// every word the source delivers; the word must hold while out_ready is
// low, out_valid must follow enable, and the sequence of lane 0 must repeat
// after exactly 2^15 - 1 bits.
module tb_prbs_source;
  localparam int NL = 3, W = 37;
  logic clk = 0, rst_n = 0, enable = 0, out_ready = 0, out_valid;
  logic [NL*W-1:0] out_data, held;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  prbs_source #(.NL(NL), .W(W)) dut (.*);

  logic [14:0] st [NL];
  bit          seq0 [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < NL; e++) st[e] = 15'(1 + e);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("valid while disabled"); end
    enable = 1;
    for (int n = 0; n < 2000; n++) begin
      out_ready = ($urandom % 4) != 0;
      #1;
      checks++;
      if (out_valid !== 1'b1) begin failures++; $display("valid low while enabled"); end
      for (int e = 0; e < NL; e++) begin
        logic [14:0] s;
        s = st[e];
        for (int i = 0; i < W; i++) begin
          bit r;
          r = s[14] ^ s[13];
          s = {s[13:0], r};
          checks++;
          if (out_data[e*W + i] !== r) begin
            failures++;
            if (failures < 5) $display("word %0d lane %0d bit %0d wrong", n, e, i);
          end
          if (e == 0 && out_ready) seq0.push_back(r);
        end
        if (out_ready) st[e] = s;
      end
      held = out_data;
      @(negedge clk);
      if (!out_ready) begin
        checks++;
        if (out_data !== held) begin failures++; $display("word changed without ready"); end
      end
    end
    checks++;
    if (seq0.size() < 32767 + 100) begin failures++; $display("too few bits"); end
    else begin
      int bad = 0;
      for (int i = 0; i < 100; i++) if (seq0[i] != seq0[i + 32767]) bad++;
      for (int p = 1; p < 32767; p++) if (p % 4681 == 0 && seq0[0:30] == seq0[p:p+30]) bad++;
      if (bad != 0) begin failures++; $display("period is not 2^15-1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
