// tb_tx_interleaver: checks the 12 x 1224 block interleaver.
// Two blocks of random bits (two input beats of three codewords each) are
// written; with a randomly stalling output, each output bit p must equal
// stream bit q = (p % 12) * 1224 + p / 12 of its block, and each block must
// take exactly 51 output beats.
module tb_tx_interleaver;
  localparam int IN_W = 7344, OUT_W = 288, BLKB = 14688;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [IN_W-1:0]  in_data;
  logic [OUT_W-1:0] out_data;
  logic [BLKB-1:0]  blk [3];

  tx_interleaver dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  initial begin
    repeat (3000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    for (int b = 0; b < 3; b++) for (int i = 0; i < BLKB; i++) blk[b][i] = 1'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 3; b++)
      for (int h = 0; h < 2; h++) begin
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1; in_data = blk[b][h*IN_W +: IN_W];
        @(negedge clk); in_valid = 0;
      end
  end

  // reader
  initial begin
    int beats;
    beats = 0;
    @(posedge rst_n);
    for (int b = 0; b < 3; b++) begin
      for (int t = 0; t < BLKB / OUT_W; t++) begin
        @(negedge clk);
        out_ready = 1'($urandom);
        while (!(out_valid && out_ready)) begin @(negedge clk); out_ready = 1'($urandom); end
        for (int j = 0; j < OUT_W; j++) begin
          int p, q;
          p = t * OUT_W + j;
          q = (p % 12) * 1224 + p / 12;
          checks++;
          if (out_data[j] !== blk[b][q]) begin
            failures++;
            if (failures < 5) $display("block %0d beat %0d bit %0d mismatch", b, t, j);
          end
        end
        beats++;
      end
    end
    @(negedge clk); out_ready = 0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("extra output after 3 blocks"); end
    checks++;
    if (beats != 153) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
