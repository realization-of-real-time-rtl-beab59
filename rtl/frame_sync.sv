// frame_sync: frame-marker search on the raw ADC sample stream.
//
// The marker is 16 symbols '3' then 16 symbols '0', i.e. 32 high samples and
// 32 low samples at two samples per symbol.  For every start offset o of the
// previous beat the correlation with the +1/-1 template,
//   C(o) = sum(x[o .. o+31]) - sum(x[o+32 .. o+63]),
// is formed from prefix sums over the previous and current beat (512
// samples), and the largest C(o) of the beat is kept as candidate if it beats
// the stored one.  The search locks on a candidate of at least THRESH once a
// following beat brings no larger value.  Cross-correlation with the marker
// follows the source design; the prefix-sum form, the threshold and the lock
// rule are this design's choices.
//
// Interface: in_valid/in_smp (NS signed samples, sample i in bits i*SW ...,
// earliest first).  lock stays high after locking; lock_pulse is high for
// one clock, during the clock in which the beat two beats after the marker
// beat is presented at in_smp.  offset is the marker's first sample within
// the marker beat.
module frame_sync #(
  parameter int NS     = 256,
  parameter int SW     = 6,
  parameter int MLEN   = 32,           // samples per marker half
  parameter int THRESH = 768
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [NS*SW-1:0]   in_smp,
  output logic               lock,
  output logic               lock_pulse,
  output logic [$clog2(NS)-1:0] offset
);
  localparam int AW = SW + $clog2(2*NS) + 1;
  typedef logic signed [AW-1:0] acc_t;

  logic [NS*SW-1:0] prev_q;
  logic             have_prev_q;
  logic             cand_q;
  acc_t             cand_val_q;
  logic [$clog2(NS)-1:0] cand_off_q;

  acc_t                  best_val;
  logic [$clog2(NS)-1:0] best_off;

  always_comb begin
    acc_t pre [2*NS+1];
    logic [2*NS*SW-1:0] win;
    win = {in_smp, prev_q};
    pre[0] = '0;
    for (int i = 0; i < 2*NS; i++)
      pre[i+1] = pre[i] + acc_t'(signed'(win[i*SW +: SW]));
    best_val = acc_t'(-(2**(AW-2)));
    best_off = '0;
    for (int o = 0; o < NS; o++) begin
      acc_t c;
      c = (pre[o+MLEN] - pre[o]) - (pre[o+2*MLEN] - pre[o+MLEN]);
      if (c > best_val) begin
        best_val = c;
        best_off = o[$clog2(NS)-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q      <= '0;
      have_prev_q <= 1'b0;
      cand_q      <= 1'b0;
      cand_val_q  <= '0;
      cand_off_q  <= '0;
      lock        <= 1'b0;
      lock_pulse  <= 1'b0;
      offset      <= '0;
    end else begin
      lock_pulse <= 1'b0;
      if (in_valid) begin
        prev_q      <= in_smp;
        have_prev_q <= 1'b1;
        if (!lock && have_prev_q) begin
          if (best_val >= acc_t'(THRESH) && (!cand_q || best_val > cand_val_q)) begin
            cand_q     <= 1'b1;
            cand_val_q <= best_val;
            cand_off_q <= best_off;
          end else if (cand_q) begin
            lock       <= 1'b1;
            lock_pulse <= 1'b1;
            offset     <= cand_off_q;
          end
        end
      end
    end
  end

endmodule
