// tb_llr_buffer: checks termination removal and repacking.
// Random soft values are sent for 40 payload beats with random gaps; the
// output stream (288 per beat) must equal the input stream with the values
// of symbols 31, 63, 95 and 127 (indices 62,63,126,127,190,191,254,255)
// removed, in order, and never overflow.
module tb_llr_buffer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid, overflow;
  logic [256*5-1:0] in_llr;
  logic [288*5-1:0] out_llr;

  llr_buffer dut (.clk, .rst_n, .in_valid, .in_llr, .out_valid, .out_llr, .overflow);

  logic [4:0] exp_q [$];
  int nout = 0, novf = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (overflow) novf++;
    if (out_valid) begin
      for (int j = 0; j < 288; j++) begin
        logic [4:0] e;
        e = exp_q.pop_front();
        checks++;
        if (out_llr[j*5 +: 5] !== e) begin failures++; if (failures < 5) $display("out beat %0d value %0d", nout, j); end
      end
      nout++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      for (int i = 0; i < 256; i++) begin
        in_llr[i*5 +: 5] = 5'($urandom);
        if ((i / 2) % 32 != 31) exp_q.push_back(in_llr[i*5 +: 5]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (nout != (40 * 248) / 288) begin failures++; $display("%0d output beats", nout); end
    checks++;
    if (novf != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
