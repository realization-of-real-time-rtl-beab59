// training_insert: frame controller of the transmitter.
//
// After start it emits, one beat per clock, the payload bits of the 124
// symbol slots of a 128-symbol beat (the termination slots are added later
// by term_insert):
//   beat 0            frame marker: 16 symbols '3' and 15 symbols '0' (the
//                     termination symbol '0' completes the 16 zeros), the rest
//                     of the beat training bits;
//   beats 1..TRAIN_BEATS   training bits;
//   then              data bits from the interleaver, continuously.
// The marker pattern and the marker / training / data order follow the
// source design.  Training content (PRBS-15, x^15+x^14+1, seed all ones,
// started at the marker beat) and the training length are this design's
// choice; the receiver regenerates the same bits.  If no payload is
// available in a data beat the beat is still sent (zeros) and underrun is
// raised for that clock.
//
// Interface: data_valid/data_ready/data (248 bits, two per symbol, MSB
// first); out_valid/out_bits, registered (one clock after the decision).
module training_insert
  import pam4_pkg::*;
#(
  parameter int TRAIN_BEATS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              data_valid,
  output logic              data_ready,
  input  logic [DBITS-1:0]  data,
  output logic              out_valid,
  output logic [DBITS-1:0]  out_bits,
  output logic              underrun,
  output logic              in_training
);
  typedef enum logic [1:0] {S_IDLE, S_MARK, S_TRAIN, S_DATA} state_e;
  state_e      st_q;
  logic [31:0] cnt_q;
  logic [14:0] prbs_q;

  assign data_ready  = (st_q == S_DATA);
  assign in_training = (st_q == S_MARK) || (st_q == S_TRAIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= S_IDLE;
      cnt_q     <= '0;
      prbs_q    <= PRBS_SEED;
      out_valid <= 1'b0;
      out_bits  <= '0;
      underrun  <= 1'b0;
    end else begin
      logic [14:0]      s;
      logic [DBITS-1:0] tb;
      s  = prbs_q;
      tb = prbs_beat(s);
      out_valid <= (st_q != S_IDLE);
      underrun  <= 1'b0;
      case (st_q)
        S_IDLE: if (start) st_q <= S_MARK;
        S_MARK: begin
          for (int i = 0; i < NDATA; i++) begin
            if (i < 16)      out_bits[2*i +: 2] <= 2'b10;      // symbol 3
            else if (i < 31) out_bits[2*i +: 2] <= 2'b00;      // symbol 0
            else             out_bits[2*i +: 2] <= tb[2*i +: 2];
          end
          prbs_q <= s;
          cnt_q  <= '0;
          st_q   <= (TRAIN_BEATS == 0) ? S_DATA : S_TRAIN;
        end
        S_TRAIN: begin
          out_bits <= tb;
          prbs_q   <= s;
          if (int'(cnt_q) == TRAIN_BEATS - 1) st_q <= S_DATA;
          cnt_q <= cnt_q + 1;
        end
        default: begin
          out_bits <= data_valid ? data : '0;
          underrun <= !data_valid;
        end
      endcase
    end
  end

endmodule
