// tb_data_align: checks the frame-aligned windows.
// Raw samples carry their index (mod 64).  After a lock pulse naming marker
// offset o in beat m (pulse while beat m+3 is presented), output beat b must
// hold raw samples (m+1+b)*256 + o - 14 + j for j = 0..283, one clock after
// each input beat, with beat = b.
module tb_data_align;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, lock_pulse = 0, out_valid;
  logic [256*6-1:0] in_smp;
  logic [7:0] offset = 0;
  logic [284*6-1:0] out_smp;
  logic [31:0] beat;

  data_align dut (.clk, .rst_n, .in_valid, .in_smp, .lock_pulse, .offset, .out_valid, .out_smp, .beat);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int offs [3] = '{0, 99, 255};
    foreach (offs[t]) begin
      int o, m, nout;
      o = offs[t]; m = 2; nout = 0;
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < 12; n++) begin
        @(negedge clk);
        // check output of the previous input beat
        if (n > m + 3) begin
          int b;
          b = n - 1 - (m + 3);
          checks++;
          if (!out_valid || beat != 32'(b)) begin failures++; $display("o=%0d beat %0d missing", o, b); end
          for (int j = 0; j < 284; j++) begin
            checks++;
            if (out_smp[j*6 +: 6] !== 6'((m + 1 + b) * 256 + o - 14 + j)) begin
              failures++;
              if (failures < 5) $display("o=%0d beat %0d sample %0d", o, b, j);
            end
          end
          nout++;
        end else begin
          checks++;
          if (out_valid) begin failures++; $display("output before lock"); end
        end
        in_valid = 1;
        for (int i = 0; i < 256; i++) in_smp[i*6 +: 6] = 6'(n*256 + i);
        lock_pulse = (n == m + 3);
        offset = 8'(o);
      end
      @(negedge clk); in_valid = 0; lock_pulse = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
