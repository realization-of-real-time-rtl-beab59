// tb_training_insert: checks the transmit frame.
// Beat 0 must hold 16 symbols '3' (bits 10) and 15 symbols '0', the rest
// PRBS-15 training bits; the next TRAIN_BEATS beats continue the PRBS
// (x^15 + x^14 + 1, seed all ones, 248 bits per beat; the testbench runs its
// own LFSR); then payload passes unchanged, and a missing payload raises
// underrun.
module tb_training_insert;
  localparam int TB_TRAIN = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, data_valid = 0, data_ready, out_valid, underrun, in_training;
  logic [247:0] data, out_bits;
  logic [14:0] lfsr;
  logic [247:0] exp_tr;

  training_insert #(.TRAIN_BEATS(TB_TRAIN)) dut (.clk, .rst_n, .start, .data_valid, .data_ready, .data,
    .out_valid, .out_bits, .underrun, .in_training);

  task automatic next_prbs();
    for (int i = 0; i < 248; i++) begin
      logic nb;
      nb = lfsr[14] ^ lfsr[13];
      exp_tr[i] = nb;
      lfsr = {lfsr[13:0], nb};
    end
  endtask

  initial begin
    repeat (300) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lfsr = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // marker beat appears one clock later
    @(negedge clk);
    next_prbs();
    checks++;
    if (!out_valid) failures++;
    for (int i = 0; i < 124; i++) begin
      logic [1:0] e;
      e = (i < 16) ? 2'b10 : (i < 31) ? 2'b00 : exp_tr[2*i +: 2];
      checks++;
      if (out_bits[2*i +: 2] !== e) begin failures++; if (failures < 5) $display("marker slot %0d", i); end
    end
    for (int t = 0; t < TB_TRAIN; t++) begin
      @(negedge clk);
      next_prbs();
      checks++;
      if (!out_valid || out_bits !== exp_tr) begin failures++; $display("training beat %0d wrong", t); end
    end
    // data beats
    data_valid = 1;
    for (int t = 0; t < 4; t++) begin
      logic [247:0] d;
      for (int i = 0; i < 248; i++) d[i] = 1'($urandom);
      data = d;
      checks++;
      if (!data_ready) begin failures++; $display("not ready in data phase"); end
      @(negedge clk);
      checks++;
      if (!out_valid || out_bits !== d || underrun) begin failures++; $display("data beat %0d wrong", t); end
    end
    data_valid = 0;
    @(negedge clk);
    checks++;
    if (!underrun) begin failures++; $display("no underrun flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
