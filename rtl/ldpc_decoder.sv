// ldpc_decoder: one LDPC decoder core with its input and output staging.
//
// Soft values arrive IN_N (96) per clock, so a 2448-value codeword takes
// 25.5 clocks; a gearbox of 48-value groups (2 in, 51 out) assembles
// codewords, ldpc_dec_core decodes them, and a second gearbox (47 groups of
// 48 bits in, 2 out) returns the 2256 decoded information bits 96 per clock.
// 96 values in and 96 out per clock follow the source design; the staging
// is this design's choice.  With ITER <= 23 the core finishes a codeword
// before the next is assembled; overrun flags a value beat refused because
// the previous codeword was still being decoded.
//
// Interface: in_valid/in_llr (96 x 5-bit); out_valid/out_bits (96 bits,
// information bit order).  Latency from the last value of a codeword to its
// first output bits: ITER + 4 clocks.
module ldpc_decoder
  import pam4_pkg::*;
#(
  parameter int ITER  = 16,
  parameter int LLRW  = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [2*LZ*LLRW-1:0]  in_llr,
  output logic                  out_valid,
  output logic [2*LZ-1:0]       out_bits,
  output logic                  overrun
);
  logic               ld_ready, cw_valid, core_ready;
  logic [LN*LLRW-1:0] cw;
  logic               dec_valid, ul_ready;
  logic [LK-1:0]      dec_bits;

  gearbox #(.EW(LZ*LLRW), .IN_N(2), .OUT_N(LNB)) u_load (
    .clk, .rst_n,
    .in_valid, .in_ready(ld_ready), .in_data(in_llr),
    .out_valid(cw_valid), .out_ready(core_ready), .out_data(cw)
  );

  ldpc_dec_core #(.ITER(ITER), .LLRW(LLRW)) u_core (
    .clk, .rst_n,
    .in_valid(cw_valid), .in_ready(core_ready), .in_llr(cw),
    .out_valid(dec_valid), .out_ready(ul_ready), .out_bits(dec_bits)
  );

  gearbox #(.EW(LZ), .IN_N(LKB), .OUT_N(2)) u_unload (
    .clk, .rst_n,
    .in_valid(dec_valid), .in_ready(ul_ready), .in_data(dec_bits),
    .out_valid, .out_ready(1'b1), .out_data(out_bits)
  );

  assign overrun = in_valid && !ld_ready;

endmodule
