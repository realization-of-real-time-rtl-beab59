// tb_frame_sync: checks marker detection.
// Random low-level samples (|x| <= 10) are sent, then a beat with the
// marker (32 samples +24, 32 samples -24) starting at a chosen offset, then
// more random beats.  For several offsets (including ones where the marker
// straddles two beats) the lock offset must be exact and lock_pulse must
// come in the clock in which the third beat after the marker beat is
// presented.
module tb_frame_sync;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, lock, lock_pulse;
  logic [256*6-1:0] in_smp;
  logic [7:0] offset;

  frame_sync dut (.clk, .rst_n, .in_valid, .in_smp, .lock, .lock_pulse, .offset);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int offs [5] = '{0, 17, 200, 230, 255};
    foreach (offs[t]) begin
      logic signed [5:0] stream [256*12];
      int o, pulse_beat;
      o = offs[t];
      for (int i = 0; i < 256*12; i++) stream[i] = 6'($signed($urandom_range(20)) - 10);
      for (int i = 0; i < 64; i++) stream[256*5 + o + i] = (i < 32) ? 6'sd24 : -6'sd24;
      rst_n = 0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      pulse_beat = -1;
      for (int b = 0; b < 12; b++) begin
        @(negedge clk);
        in_valid = 1;
        for (int i = 0; i < 256; i++) in_smp[i*6 +: 6] = stream[b*256 + i];
        #1;
        if (lock_pulse) pulse_beat = b;
      end
      @(negedge clk); in_valid = 0;
      checks++;
      if (!lock || offset != 8'(o)) begin failures++; $display("offset %0d: lock %0d got %0d", o, lock, offset); end
      checks++;
      if (pulse_beat != 8) begin failures++; $display("offset %0d: pulse with beat %0d", o, pulse_beat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
