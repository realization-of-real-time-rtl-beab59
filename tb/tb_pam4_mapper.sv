// tb_pam4_mapper: checks the Gray PAM-4 mapping against the table
// 00->0, 01->1, 11->2, 10->3 on random bit vectors, and that neighbouring
// levels differ in one bit.
module tb_pam4_mapper;
  localparam int N = 124;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, out_valid;
  logic [2*N-1:0] in_bits, out_sym;
  logic [1:0] tbl [4];

  pam4_mapper dut (.clk, .rst_n, .in_valid, .in_bits, .out_valid, .out_sym);

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tbl[0] = 2'd0; tbl[1] = 2'd1; tbl[3] = 2'd2; tbl[2] = 2'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 2*N; i++) in_bits[i] = 1'($urandom);
      @(negedge clk); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (out_sym[2*i +: 2] !== tbl[in_bits[2*i +: 2]]) begin
          failures++;
          if (failures < 5) $display("symbol %0d: bits %b -> %0d", i, in_bits[2*i +: 2], out_sym[2*i +: 2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
