// tb_tx_dsp: end-to-end check of the transmitter.
// Random information beats are fed as fast as accepted.  The testbench
// captures the symbol stream, checks the frame marker and the termination
// slots, then undoes the chain on its own: Gray demapping, removal of the
// terminations, and column-to-row de-interleaving of each 14688-bit block.
// The information bits of all six codewords of the first two blocks must
// match what was sent (codeword 3b+e = beat b of encoder e).  The output must
// never underrun after training.
module tb_tx_dsp;
  localparam int TRB = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, info_valid = 0, info_ready, sym_valid, underrun, in_training;
  logic [3*2256-1:0] info;
  logic [255:0] sym;

  tx_dsp #(.TRAIN_BEATS(TRB)) dut (.clk, .rst_n, .start, .info_valid, .info_ready, .info,
    .sym_valid, .sym, .underrun, .in_training);

  logic [3*2256-1:0] sent [8];
  int nsent = 0;
  logic [14688*3-1:0] rx_stream;   // payload bits after the training beats
  int nbits = 0, nbeats = 0, nunder = 0;

  function automatic logic [1:0] demap(logic [1:0] s);
    case (s) 2'd0: return 2'b00; 2'd1: return 2'b01; 2'd2: return 2'b11; default: return 2'b10; endcase
  endfunction

  initial begin
    repeat (800) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (nsent < 8) begin
      for (int i = 0; i < 3*2256; i++) info[i] = 1'($urandom);
      info_valid = 1;
      @(posedge clk);
      while (!info_ready) @(posedge clk);
      sent[nsent] = info;
      nsent++;
      @(negedge clk);
      info_valid = 0;
    end
  end

  // sink
  always @(posedge clk) if (rst_n && sym_valid) begin
    if (nbeats == 0) begin
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (sym[2*k +: 2] !== ((k < 16) ? 2'd3 : 2'd0)) begin failures++; $display("marker symbol %0d", k); end
      end
    end
    for (int k = 31; k < 128; k += 32) begin
      checks++;
      if (sym[2*k +: 2] !== 2'd0) failures++;
    end
    if (nbeats > TRB) begin
      if (underrun) nunder++;
      for (int k = 0; k < 128; k++)
        if (k % 32 != 31 && nbits < 3*14688) begin
          logic [1:0] b;
          b = demap(sym[2*k +: 2]);
          rx_stream[nbits] = b[0];
          rx_stream[nbits+1] = b[1];
          nbits += 2;
        end
    end
    nbeats++;
  end

  initial begin
    wait (nbits >= 2*14688);
    @(negedge clk);
    for (int blk = 0; blk < 2; blk++)
      for (int m = 0; m < 6; m++)
        for (int i = 0; i < 2256; i++) begin
          int q, p;
          q = m * 2448 + i;
          p = (q % 1224) * 12 + q / 1224;
          checks++;
          if (rx_stream[blk*14688 + p] !== sent[blk*2 + m/3][(m%3)*2256 + i]) begin
            failures++;
            if (failures < 5) $display("block %0d codeword %0d bit %0d mismatch", blk, m, i);
          end
        end
    checks++;
    if (nunder != 0) begin failures++; $display("%0d underruns", nunder); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
