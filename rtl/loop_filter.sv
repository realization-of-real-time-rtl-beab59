// loop_filter: second-order loop filter of the timing recovery loop.
//
// A proportional-integral filter followed by a phase accumulator:
//   integ += err;  phase += (err >>> KP_SHIFT) + (integ >>> KI_SHIFT);
//   mu = phase >>> FRAC, saturated to MUW bits.
// The phase is clamped to the mu range, so the loop tracks up to the edge
// of the compensator window and does not slip samples.  A second-order loop
// follows the source design; the structure, gains and clamping are this
// design's choices.
//
// Interface: err (EW-bit signed) with in_valid; mu is registered and updated
// one clock after each valid error.
module loop_filter #(
  parameter int EW       = 14,
  parameter int MUW      = 6,
  parameter int KP_SHIFT = 4,
  parameter int KI_SHIFT = 14,
  parameter int FRAC     = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [EW-1:0]   err,
  output logic signed [MUW-1:0]  mu
);
  localparam int PW = 32;
  localparam logic signed [PW-1:0] PMAX = PW'((2**(MUW-1) - 1) * 2**FRAC);
  localparam logic signed [PW-1:0] PMIN = PW'(-(2**(MUW-1)) * 2**FRAC);

  logic signed [PW-1:0] integ_q, phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ_q <= '0;
      phase_q <= '0;
      mu      <= '0;
    end else if (in_valid) begin
      logic signed [PW-1:0] ig, ph;
      ig = integ_q + PW'(err);
      if (ig > (PMAX <<< KI_SHIFT)) ig = PMAX <<< KI_SHIFT;
      if (ig < (PMIN <<< KI_SHIFT)) ig = PMIN <<< KI_SHIFT;
      ph = phase_q + (PW'(err) >>> KP_SHIFT) + (ig >>> KI_SHIFT);
      if (ph > PMAX) ph = PMAX;
      if (ph < PMIN) ph = PMIN;
      integ_q <= ig;
      phase_q <= ph;
      mu      <= MUW'(ph >>> FRAC);
    end
  end
endmodule
