// tb_ber_checker: checks the embedded pattern matcher.
//
// Three lanes of PRBS-15 words (seed 1 + lane) are fed at random moments,
// with known bit errors inserted at random.  The bit and error totals must
// equal the counts kept by the testbench after every word, words with
// in_valid low must be ignored, and clear must restart both totals.
module tb_ber_checker;
  localparam int NL = 3, W = 96;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [NL-1:0]   in_valid = '0;
  logic [NL*W-1:0] in_bits;
  logic [55:0]     bits, errs;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ber_checker #(.NL(NL), .W(W)) dut (.*);

  logic [14:0] st [NL];
  longint      exp_bits = 0, exp_errs = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < NL; l++) st[l] = 15'(1 + l);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      clear = (n == 1500);
      if (clear) begin exp_bits = 0; exp_errs = 0; end
      for (int l = 0; l < NL; l++) begin
        logic [14:0] s;
        in_valid[l] = ($urandom % 3) != 0;
        s = st[l];
        for (int i = 0; i < W; i++) begin
          bit r;
          r = s[14] ^ s[13];
          s = {s[13:0], r};
          if (in_valid[l] && ($urandom % 500) == 0) begin
            r = !r;
            exp_errs++;
          end
          if (!in_valid[l]) r = 1'($urandom);
          in_bits[l*W + i] = r;
        end
        if (in_valid[l]) begin st[l] = s; exp_bits += W; end
      end
      @(negedge clk);
      checks++;
      if (bits != 56'(exp_bits) || errs != 56'(exp_errs)) begin
        failures++;
        if (failures < 5) $display("word %0d: bits %0d errs %0d, expected %0d %0d", n, bits, errs, exp_bits, exp_errs);
      end
    end
    checks++;
    if (exp_errs == 0) begin failures++; $display("no errors were inserted"); end
    $display("errors inserted after clear: %0d", exp_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
