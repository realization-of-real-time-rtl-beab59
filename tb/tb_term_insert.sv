// tb_term_insert: checks that output symbols 31, 63, 95 and 127 are the
// termination symbol (0) and the other 124 carry the input symbols in order.
module tb_term_insert;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  logic [247:0] in_sym;
  logic [255:0] out_sym;

  term_insert dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out_sym);

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      int src;
      for (int i = 0; i < 124; i++) in_sym[2*i +: 2] = (n == 0) ? 2'd3 : 2'($urandom);
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      src = 0;
      for (int k = 0; k < 128; k++) begin
        checks++;
        if (k == 31 || k == 63 || k == 95 || k == 127) begin
          if (out_sym[2*k +: 2] !== 2'd0) begin failures++; $display("slot %0d not termination", k); end
        end else begin
          if (out_sym[2*k +: 2] !== in_sym[2*src +: 2]) begin failures++; $display("slot %0d wrong", k); end
          src++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
