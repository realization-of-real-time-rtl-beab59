// gearbox: width converter for a stream of fixed-size elements.
//
// Takes IN_N elements of EW bits per accepted input beat and delivers OUT_N
// elements per output beat, in order (element 0 in the least significant
// bits).  Elements are held in a shift buffer of IN_N + OUT_N entries: an
// output beat leaves from the bottom, an input beat is written above the
// elements already held.  The output has a ready input; the input is refused
// (in_ready low) only when the buffer could overflow.  One cycle from an
// accepted input to the earliest output.  A helper of this design; used
// wherever the datapath changes the number of values per clock.
module gearbox #(
  parameter int EW    = 5,
  parameter int IN_N  = 248,
  parameter int OUT_N = 288
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [IN_N*EW-1:0]    in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [OUT_N*EW-1:0]   out_data
);
  localparam int CAP = IN_N + OUT_N;
  localparam int CW  = $clog2(CAP + 1);

  logic [CAP*EW-1:0] buf_q;
  logic [CW-1:0]     cnt_q;
  logic              out_fire;
  logic [CW-1:0]     cnt_after;

  assign out_valid = cnt_q >= CW'(OUT_N);
  assign out_data  = buf_q[OUT_N*EW-1:0];
  assign out_fire  = out_valid && out_ready;
  assign cnt_after = out_fire ? cnt_q - CW'(OUT_N) : cnt_q;
  assign in_ready  = (32'(cnt_after) + IN_N) <= CAP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      logic [CAP*EW-1:0] nb;
      nb = buf_q;
      if (out_fire) nb = nb >> (OUT_N * EW);
      if (in_valid && in_ready) begin
        nb[32'(cnt_after)*EW +: IN_N*EW] = in_data;
        cnt_q <= cnt_after + CW'(IN_N);
      end else begin
        cnt_q <= cnt_after;
      end
      buf_q <= nb;
    end
  end

  // The writer must never be refused while it insists on writing past capacity.
  assert property (@(posedge clk) disable iff (!rst_n) (32'(cnt_q) <= CAP));

endmodule
