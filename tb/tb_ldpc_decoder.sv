// tb_ldpc_decoder: checks the min-sum decoder.
// The testbench encodes random information words itself (dual-diagonal
// parity: p_0 = S_0, p_r = S_r ^ p_{r-1}, S_r[k] = XOR_c u_c[(k + (r*c mod
// 47)) mod 48]), maps bits to soft values +-10 (positive = 0), then weakens
// 40 values to +-2 and flips the sign of 12 of them at small magnitude, and
// streams two codewords 96 values per clock (25.5 clocks each).  The 2256
// information bits of each codeword must come back exactly, 96 per clock,
// and the flipped bits must have been corrected (their hard decisions were
// wrong at the input).
module tb_ldpc_decoder;
  localparam int Z = 48, KB = 47, N = 2448, K = 2256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid, overrun;
  logic [96*5-1:0] in_llr;
  logic [95:0] out_bits;

  ldpc_decoder dut (.clk, .rst_n, .in_valid, .in_llr, .out_valid, .out_bits, .overrun);

  logic [N-1:0] cw [2];
  logic [4:0]   llr [2*N];
  logic         got [$];

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) for (int i = 0; i < 96; i++) got.push_back(out_bits[i]);
    if (overrun) begin failures++; $display("overrun"); end
  end

  initial begin
    int nflip;
    nflip = 0;
    for (int m = 0; m < 2; m++) begin
      logic [Z-1:0] prev;
      for (int i = 0; i < K; i++) cw[m][i] = 1'($urandom);
      prev = '0;
      for (int r = 0; r < 4; r++) begin
        logic [Z-1:0] s;
        s = '0;
        for (int c = 0; c < KB; c++)
          for (int k = 0; k < Z; k++) s[k] ^= cw[m][c*Z + (k + (r*c) % 47) % Z];
        prev = prev ^ s;
        cw[m][K + r*Z +: Z] = prev;
      end
      for (int i = 0; i < N; i++) llr[m*N + i] = cw[m][i] ? -5'sd10 : 5'sd10;
      for (int e = 0; e < 40; e++) begin
        int i;
        i = $urandom_range(N - 1);
        if (e < 12) begin llr[m*N + i] = cw[m][i] ? 5'sd2 : -5'sd2; nflip++; end
        else        llr[m*N + i] = cw[m][i] ? -5'sd2 : 5'sd2;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 51; t++) begin
      for (int k = 0; k < 96; k++) in_llr[k*5 +: 5] = llr[t*96 + k];
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (got.size() != 2 * K) begin failures++; $display("%0d bits out", got.size()); end
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < K; i++) begin
        checks++;
        if (got.size() > 0) begin
          if (got.pop_front() !== cw[m][i]) begin
            failures++;
            if (failures < 5) $display("codeword %0d bit %0d wrong", m, i);
          end
        end else failures++;
      end
    $display("flipped inputs %0d", nflip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
