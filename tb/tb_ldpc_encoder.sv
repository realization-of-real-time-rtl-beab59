// tb_ldpc_encoder: checks the QC-LDPC encoder.
// Random information words are encoded; every codeword must be systematic
// (information bits unchanged) and satisfy all 192 parity checks of the
// parity-check matrix, which the testbench builds on its own from the
// circulant shifts (information part: shift (r*c) mod 47; parity part:
// identity on the diagonal and sub-diagonal).  Latency must be one clock.
module tb_ldpc_encoder;
  localparam int Z = 48, MB = 4, NB = 51, KB = NB - MB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic              in_valid = 0;
  logic [KB*Z-1:0]   info;
  logic              out_valid;
  logic [NB*Z-1:0]   cw;

  ldpc_encoder dut (.clk, .rst_n, .in_valid, .info, .out_valid, .codeword(cw));

  function automatic int shift_of(int r, int c);
    return (r * c) % 47;
  endfunction

  function automatic int syndrome_weight(logic [NB*Z-1:0] x);
    int w = 0;
    for (int r = 0; r < MB; r++)
      for (int k = 0; k < Z; k++) begin
        logic s = 0;
        for (int c = 0; c < KB; c++) s ^= x[c*Z + (k + shift_of(r, c)) % Z];
        s ^= x[(KB + r)*Z + k];
        if (r > 0) s ^= x[(KB + r - 1)*Z + k];
        w += s;
      end
    return w;
  endfunction

  initial begin
    repeat (200) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < KB*Z; i++) info[i] = (n == 0) ? (i == 5) : 1'($urandom);
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid) begin failures++; $display("no valid after 1 clock"); end
      checks++;
      if (cw[KB*Z-1:0] !== info) begin failures++; $display("not systematic"); end
      checks++;
      if (syndrome_weight(cw) != 0) begin
        failures++; $display("codeword %0d: %0d parity checks fail", n, syndrome_weight(cw));
      end
      checks++;
      if (n > 0 && cw[NB*Z-1:KB*Z] == '0) begin failures++; $display("parity all zero"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
