// tb_mlse_stats: checks the channel statistics.
// Before any window the means are the ideal levels of a_k.  Random decisions
// and values are fed for two 1024-symbol windows (pattern 63 = '3,3,3' is
// never produced in the first window); after each window the 64 published
// means must equal the testbench's own per-pattern sum / count (truncated
// toward zero, first two symbols using the previous beat's last two
// decisions, the very first using termination symbols), an unseen pattern
// must keep its mean, and update must pulse once per window.
module tb_mlse_stats;
  localparam int N = 128, WIN = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, update;
  logic [N*7-1:0] y;
  logic [2*N-1:0] dec;
  logic [64*7-1:0] means;

  mlse_stats dut (.clk, .rst_n, .in_valid, .y, .dec, .means, .update);

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum [64], cnt [64], expm [64];
    int h2, h1, nupd;
    h2 = 0; h1 = 0; nupd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 64; p++) begin
      expm[p] = (p % 4) * 32 - 48;
      checks++;
      if ($signed(means[p*7 +: 7]) != expm[p]) failures++;
    end
    for (int w = 0; w < 2; w++) begin
      for (int p = 0; p < 64; p++) begin sum[p] = 0; cnt[p] = 0; end
      for (int b = 0; b < WIN / N; b++) begin
        for (int k = 0; k < N; k++) begin
          int d, v, p;
          d = $urandom_range(3);
          if (w == 0 && h2 == 3 && h1 == 3 && d == 3) d = 2;
          v = $signed($urandom_range(127)) - 64;
          y[k*7 +: 7] = 7'(v); dec[2*k +: 2] = 2'(d);
          p = h2 * 16 + h1 * 4 + d;
          sum[p] += v; cnt[p]++;
          h2 = h1; h1 = d;
        end
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        if (update) nupd++;
      end
      for (int p = 0; p < 64; p++) begin
        if (cnt[p] != 0) expm[p] = sum[p] / cnt[p];
        checks++;
        if ($signed(means[p*7 +: 7]) != expm[p]) begin
          failures++;
          if (failures < 5) $display("window %0d pattern %0d: %0d expected %0d (n=%0d)", w, p, $signed(means[p*7 +: 7]), expm[p], cnt[p]);
        end
      end
    end
    checks++;
    if (nupd != 2) begin failures++; $display("%0d updates", nupd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
