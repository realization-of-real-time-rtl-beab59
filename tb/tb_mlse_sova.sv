// tb_mlse_sova: checks the MLSE on a channel with memory two.
// Means: m(a,b,c) = 0.55 L(c) + 0.35 L(b) + 0.1 L(a) (a = a_{k-2}, b = a_{k-1},
// c = a_k), levels -48, -16, 16, 48.  The testbench sends random symbols,
// termination symbols (0) closing each 32-symbol block, with small noise
// (+-3).  A plain slicer fails on this channel (checked); the MLSE must
// decide every symbol correctly, each non-zero soft value's sign must
// give the transmitted Gray bit (fewer than 1% may quantize to zero), and the termination symbols' soft values must be at
// full positive scale (their bits are known to be 0).
module tb_mlse_sova;
  localparam int N = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_data = 1, out_valid, out_data;
  logic [N*7-1:0] y, y_out;
  logic [64*7-1:0] means;
  logic [2*N*5-1:0] llr;
  logic [2*N-1:0] dec;

  mlse_sova dut (.clk, .rst_n, .in_valid, .in_data, .y, .means, .out_valid, .out_data, .llr, .dec, .y_out);

  function automatic int lev(int s); return s * 32 - 48; endfunction
  function automatic int mean_of(int a, int b, int c);
    return int'($floor(0.55 * lev(c) + 0.35 * lev(b) + 0.1 * lev(a) + 0.5));
  endfunction
  function automatic logic [1:0] gray_bits(int s);
    case (s) 0: return 2'b00; 1: return 2'b01; 2: return 2'b11; default: return 2'b10; endcase
  endfunction

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sy [N+2];
    int slicer_err, nzero;
    slicer_err = 0; nzero = 0;
    for (int p = 0; p < 64; p++) means[p*7 +: 7] = 7'(mean_of(p / 16, (p / 4) % 4, p % 4));
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 30; n++) begin
      sy[0] = $urandom_range(3); sy[1] = 0;    // a_{-2} arbitrary, a_{-1} termination
      for (int k = 0; k < N; k++) sy[k+2] = (k % 32 == 31) ? 0 : $urandom_range(3);
      for (int k = 0; k < N; k++) begin
        int v, a2;
        // first symbol of each block follows (x, termination)
        a2 = (k % 32 == 0) ? sy[k+0] : sy[k];
        v = mean_of(a2, sy[k+1], sy[k+2]) + $signed($urandom_range(6)) - 3;
        y[k*7 +: 7] = 7'(v);
        if ((v < -32 ? 0 : v < 0 ? 1 : v < 32 ? 2 : 3) != sy[k+2]) slicer_err++;
      end
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || !out_data || y_out !== y) failures++;
      for (int k = 0; k < N; k++) begin
        logic [1:0] gb;
        gb = gray_bits(sy[k+2]);
        checks++;
        if (dec[2*k +: 2] !== 2'(sy[k+2])) begin
          failures++;
          if (failures < 5) $display("run %0d symbol %0d: %0d expected %0d", n, k, dec[2*k +: 2], sy[k+2]);
        end
        for (int b = 0; b < 2; b++) begin
          int l;
          l = $signed(llr[(2*k+b)*5 +: 5]);
          checks++;
          if ((gb[b] && l > 0) || (!gb[b] && l < 0)) begin
            failures++;
            if (failures < 5) $display("run %0d symbol %0d bit %0d llr %0d", n, k, b, l);
          end
          if (l == 0) nzero++;
          if (k % 32 == 31) begin
            checks++;
            if (l != 15) failures++;
          end
        end
      end
    end
    checks++;
    if (nzero > 30 * 256 / 100) begin failures++; $display("%0d soft values are zero", nzero); end
    checks++;
    if (slicer_err == 0) begin failures++; $display("channel too easy"); end
    $display("slicer errors %0d", slicer_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
