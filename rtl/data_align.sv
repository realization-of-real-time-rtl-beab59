// data_align: cuts the raw sample stream into frame-aligned beats.
//
// Aligned beat 0 begins at the first sample after the marker beat, i.e.
// `offset` samples into the beat that follows the beat holding the marker.
// Each output beat carries OUT_N = NS + 2*PAD samples: the NS samples of the
// aligned beat plus PAD samples of history before and PAD after, which the
// 5-tap timing compensator (2 each side) and the 25-tap FFE (12 each side)
// need (PAD = 14).  The module keeps the last three raw beats and selects
// the window with a variable shift.  Passing an overlapping window follows
// the source design; the exact framing is this design's choice.
//
// Timing: lock_pulse must arrive in the clock in which the raw beat three
// beats after the marker beat is presented (frame_sync provides that).
// From then on every valid input beat yields one output beat one clock
// later; beat counts aligned beats from 0.  in_valid is expected to be
// continuous, as for an ADC stream.
module data_align #(
  parameter int NS  = 256,
  parameter int SW  = 6,
  parameter int PAD = 14
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [NS*SW-1:0]          in_smp,
  input  logic                      lock_pulse,
  input  logic [$clog2(NS)-1:0]     offset,
  output logic                      out_valid,
  output logic [(NS+2*PAD)*SW-1:0]  out_smp,
  output logic [31:0]               beat
);
  localparam int OUT_N = NS + 2*PAD;

  logic [NS*SW-1:0]      r1_q, r2_q, r3_q;
  logic                  run_q;
  logic [$clog2(NS)-1:0] off_q;
  logic [31:0]           cnt_q;

  logic [4*NS*SW-1:0] win;
  assign win = {in_smp, r1_q, r2_q, r3_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_q <= '0; r2_q <= '0; r3_q <= '0;
      run_q <= 1'b0; off_q <= '0; cnt_q <= '0;
      out_valid <= 1'b0; out_smp <= '0; beat <= '0;
    end else begin
      logic [$clog2(NS)-1:0] o;
      out_valid <= 1'b0;
      o = lock_pulse ? offset : off_q;
      if (in_valid) begin
        r1_q <= in_smp; r2_q <= r1_q; r3_q <= r2_q;
        if (lock_pulse || run_q) begin
          out_smp   <= win[(NS - PAD + int'(o))*SW +: OUT_N*SW];
          out_valid <= 1'b1;
          beat      <= lock_pulse ? '0 : cnt_q;
          cnt_q     <= lock_pulse ? 32'd1 : cnt_q + 1;
        end
      end
      if (lock_pulse) begin
        run_q <= 1'b1;
        off_q <= offset;
      end
    end
  end

endmodule
