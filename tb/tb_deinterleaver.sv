// tb_deinterleaver: checks the receive de-interleaver.
// Two blocks of random values are held in codeword order q (codeword m at
// q = 2448m ..); the testbench interleaves them itself (received position
// p = (q % 1224) * 12 + q / 1224) and sends 51 beats of 288 per block.  Each
// output beat t must give decoder d the values of codeword d (beats 0..25.5)
// then d+3, in order, 96 per beat; a block must take 51 output beats.
module tb_deinterleaver;
  localparam int BLKN = 14688, NW = 288;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid, overflow;
  logic [NW*5-1:0] in_llr, out_llr;

  deinterleaver dut (.clk, .rst_n, .in_valid, .in_llr, .out_valid, .out_llr, .overflow);

  logic [4:0] orig [2][BLKN];
  int nout = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    int blk, t;
    blk = nout / 51; t = nout % 51;
    for (int d = 0; d < 3; d++)
      for (int k = 0; k < 96; k++) begin
        int s, q;
        s = t * 96 + k;
        q = (d + 3 * (s / 2448)) * 2448 + s % 2448;
        checks++;
        if (out_llr[(d*96+k)*5 +: 5] !== orig[blk][q]) begin
          failures++;
          if (failures < 5) $display("block %0d beat %0d dec %0d k %0d", blk, t, d, k);
        end
      end
    checks++;
    if (overflow) failures++;
    nout++;
  end

  initial begin
    for (int b = 0; b < 2; b++) for (int q = 0; q < BLKN; q++) orig[b][q] = 5'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int t = 0; t < BLKN / NW; t++) begin
        for (int j = 0; j < NW; j++) begin
          int p, q;
          p = t * NW + j;
          q = (p % 12) * 1224 + p / 12;
          in_llr[j*5 +: 5] = orig[b][q];
        end
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(4) == 0) @(negedge clk);
      end
    repeat (60) @(negedge clk);
    checks++;
    if (nout != 102) begin failures++; $display("%0d output beats", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
