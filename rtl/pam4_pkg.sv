// pam4_pkg: constants and helper functions shared by the PAM-4 transmitter
// and receiver DSP.
//
// It fixes the beat format (128 PAM-4 symbols per clock, four 32-symbol
// blocks each closed by one termination symbol), the Gray mapping, the
// receiver's level scale, the quasi-cyclic LDPC code geometry (Z = 48,
// 4 x 51 base matrix) and the training-symbol generator.
//
// Follows the source design: 128 symbols per clock, 31 + 1 symbol blocks,
// frame marker of 16 '3' and 16 '0', QC-LDPC (2448,2256) with Z = 48,
// 12 x 1224 interleaver.  Own choices: termination symbol value 0, the Gray
// table, the circulant shifts of the information part (r*c mod 47) with a
// dual-diagonal parity part, and PRBS-15 training symbols.
package pam4_pkg;

  localparam int NSYM      = 128;   // symbols per beat
  localparam int BLK       = 32;    // symbols per termination block
  localparam int NBLK      = NSYM / BLK;
  localparam int NDATA     = NSYM - NBLK;   // 124 payload slots per beat
  localparam int DBITS     = 2 * NDATA;     // 248 payload bits per beat
  localparam int NSMP      = 2 * NSYM;      // 256 samples per beat (2 per symbol)
  localparam logic [1:0] TERM_SYM = 2'd0;

  // LDPC code geometry
  localparam int LZ   = 48;
  localparam int LMB  = 4;                  // block rows
  localparam int LNB  = 51;                 // block columns
  localparam int LKB  = LNB - LMB;          // 47 information block columns
  localparam int LN   = LNB * LZ;           // 2448
  localparam int LK   = LKB * LZ;           // 2256

  // Interleaver geometry
  localparam int IL_ROWS = 12;
  localparam int IL_COLS = 1224;
  localparam int IL_BLK  = IL_ROWS * IL_COLS;   // 14688 = 6 codewords

  // Is block (r,c) of the base parity-check matrix non-zero?
  function automatic bit ldpc_nz(int r, int c);
    if (c < LKB) return 1'b1;
    if (c - LKB == r) return 1'b1;          // parity diagonal
    if (c - LKB == r - 1) return 1'b1;      // parity sub-diagonal
    return 1'b0;
  endfunction

  // Circulant shift of block (r,c): row k of the block has its one in column
  // (k + shift) mod Z.
  function automatic int ldpc_shift(int r, int c);
    if (c < LKB) return (r * c) % 47;
    return 0;
  endfunction

  // Gray mapping: bit pair {msb,lsb} -> symbol index (0..3 = lowest..highest level)
  function automatic logic [1:0] gray_map(logic [1:0] b);
    case (b)
      2'b00: return 2'd0;
      2'b01: return 2'd1;
      2'b11: return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  function automatic logic [1:0] gray_demap(logic [1:0] s);
    case (s)
      2'd0: return 2'b00;
      2'd1: return 2'b01;
      2'd2: return 2'b11;
      default: return 2'b10;
    endcase
  endfunction

  // Receiver 7-bit level of a symbol: -48, -16, 16, 48
  function automatic logic signed [7:0] level7(logic [1:0] s);
    return 8'(signed'({1'b0, s}) * 32 - 48);
  endfunction

  // Integer amplitude of a symbol: -3, -1, 1, 3
  function automatic logic signed [2:0] amp(logic [1:0] s);
    return 3'(signed'({2'b0, s}) * 2 - 3);
  endfunction

  // Slicer on the 7-bit scale
  function automatic logic [1:0] slice7(logic signed [15:0] y);
    if (y < -32) return 2'd0;
    if (y < 0)   return 2'd1;
    if (y < 32)  return 2'd2;
    return 2'd3;
  endfunction

  // One beat of training bits: 248 bits of a PRBS-15 (x^15 + x^14 + 1),
  // continuing from state s; the new state is returned through s.
  function automatic logic [DBITS-1:0] prbs_beat(inout logic [14:0] s);
    logic [DBITS-1:0] b;
    for (int i = 0; i < DBITS; i++) begin
      logic nb;
      nb = s[14] ^ s[13];
      b[i] = nb;
      s = {s[13:0], nb};
    end
    return b;
  endfunction

  localparam logic [14:0] PRBS_SEED = 15'h7FFF;

endpackage
