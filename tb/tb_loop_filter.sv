// tb_loop_filter: checks the second-order loop filter against a model of
// integ += e; phase += (e >>> 4) + (integ >>> 14); mu = phase >>> 8 with
// clamping, for random errors, a constant error (mu must ramp and then
// saturate at +31) and a negative constant error (saturate at -32).
module tb_loop_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0;
  logic signed [13:0] err = 0;
  logic signed [5:0] mu;

  loop_filter dut (.clk, .rst_n, .in_valid, .err, .mu);

  longint ig = 0, ph = 0;
  localparam longint PMAX = 31 * 256, PMIN = -32 * 256;

  task automatic step(int e);
    int m;
    @(negedge clk);
    err = 14'(e); in_valid = 1;
    ig += e;
    if (ig > PMAX * 4096) ig = PMAX * 4096;
    if (ig < PMIN * 4096) ig = PMIN * 4096;
    ph += (e >>> 4) + (ig >>> 14);
    if (ph > PMAX) ph = PMAX;
    if (ph < PMIN) ph = PMIN;
    @(negedge clk); in_valid = 0;
    m = int'(ph >>> 8);
    checks++;
    if (mu != 6'(m)) begin failures++; if (failures < 5) $display("mu %0d expected %0d", mu, m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) step($signed($urandom_range(400)) - 200);
    for (int n = 0; n < 2000; n++) step(3000);
    checks++;
    if (mu != 31) begin failures++; $display("no positive saturation: %0d", mu); end
    for (int n = 0; n < 4000; n++) step(-3000);
    checks++;
    if (mu != -32) begin failures++; $display("no negative saturation: %0d", mu); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
