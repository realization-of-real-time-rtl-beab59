// tb_mm_ted: checks the Mueller-Mueller estimator against its formula on
// random inputs, its sign on a sampled pulse train (late sampling gives a
// negative error, early a positive one) and saturation.
module tb_mm_ted;
  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  logic [N*7-1:0] y;
  logic [2*N-1:0] dec;
  logic signed [13:0] err;

  mm_ted dut (.clk, .rst_n, .in_valid, .y, .dec, .out_valid, .err);

  function automatic int a_of(int s); return 2*s - 3; endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(int exp_v);
    @(negedge clk); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || err != 14'(exp_v)) begin failures++; $display("err %0d expected %0d", err, exp_v); end
  endtask

  initial begin
    int ys [N], ds [N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      int s;
      s = 0;
      for (int k = 0; k < N; k++) begin
        ys[k] = $signed($urandom_range(127)) - 64;
        ds[k] = $urandom_range(3);
        y[k*7 +: 7] = 7'(ys[k]); dec[2*k +: 2] = 2'(ds[k]);
      end
      for (int k = 1; k < N; k++) s += ys[k] * a_of(ds[k-1]) - ys[k-1] * a_of(ds[k]);
      s = s >>> 3;
      if (s > 8191) s = 8191;
      if (s < -8192) s = -8192;
      apply_and_check(s);
    end
    // sign: triangular pulse h(t) = max(0, 1 - |t|/1.5), sampled at k + tau
    for (int sgn = -1; sgn <= 1; sgn += 2) begin
      int sy [N];
      real tau;
      tau = 0.25 * sgn;
      for (int k = 0; k < N; k++) sy[k] = $urandom_range(3);
      for (int k = 0; k < N; k++) begin
        real v;
        v = 0;
        for (int n = k - 2; n <= k + 2; n++) if (n >= 0 && n < N) begin
          real t;
          t = (k + tau) - n;
          if (t < 0) t = -t;
          if (t < 1.5) v += 16.0 * a_of(sy[n]) * (1.0 - t / 1.5);
        end
        y[k*7 +: 7] = 7'(int'(v));
        dec[2*k +: 2] = 2'(sy[k]);
      end
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if ((sgn > 0 && err >= 0) || (sgn < 0 && err <= 0)) begin
        failures++; $display("tau %f gives err %0d", tau, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
