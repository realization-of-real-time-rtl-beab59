// tb_timing_comp: checks the fractional-delay compensator.
// For random samples and every delay mu in -32..31 (1/16 sample), output j
// must be 2 * the linear interpolation of the input at position
// j + 2 + mu/16 (floor division), computed here in real arithmetic and
// rounded down as the hardware does; a smooth ramp input must be shifted by
// exactly mu/16 samples.
module tb_timing_comp;
  localparam int IN_N = 284, OUT_N = 280;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  logic [IN_N*6-1:0] in_smp;
  logic signed [5:0] mu = 0;
  logic [OUT_N*7-1:0] out_smp;

  timing_comp dut (.clk, .rst_n, .in_valid, .in_smp, .mu, .out_valid, .out_smp);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x [IN_N];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = -32; m < 32; m++) begin
      for (int i = 0; i < IN_N; i++) begin
        x[i] = $signed($urandom_range(63)) - 32;
        in_smp[i*6 +: 6] = 6'(x[i]);
      end
      @(negedge clk);
      in_valid = 1; mu = 6'(m);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int j = 0; j < OUT_N; j++) begin
        real pos, fr, v;
        int i0, e;
        pos = j + 2 + m / 16.0;
        i0 = $floor(pos);
        fr = pos - i0;
        v = 2.0 * (x[i0] * (1.0 - fr) + ((fr > 0) ? x[i0+1] * fr : 0.0));
        e = $floor(v + 1e-9);
        checks++;
        if ($signed(out_smp[j*7 +: 7]) != e) begin
          failures++;
          if (failures < 5) $display("mu %0d out %0d: %0d expected %0d", m, j, $signed(out_smp[j*7 +: 7]), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
