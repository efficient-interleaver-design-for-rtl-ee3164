// Constellation mapper: two ROMs, one for I and one for Q, addressed by the
// NCPC-bit symbol from the interleaver (1 BPSK, 2 QPSK, 4 16-QAM, 6 64-QAM).
// Words are 16 bits with 14 fraction bits, one integer bit and a sign bit, so
// the largest 64-QAM level, 7/sqrt(42) = 1.08, fits. The first symbol bit
// (sym[NCPC-1]) is the MSB. The ROM contents are computed at elaboration:
// the first half of the bits select the I level, the second half the Q level,
// each through a Gray code (000 -> -7, 001 -> -5, 011 -> -3, 010 -> -1,
// 110 -> +1, 111 -> +3, 101 -> +5, 100 -> +7 for 64-QAM; the same rule for
// 16-QAM and QPSK), scaled by 1, 1/sqrt(2), 1/sqrt(10), 1/sqrt(42) for unit
// average power. BPSK maps 0 to -1 and 1 to +1 on I, with Q = 0.
// Timing: registered ROM output, one cycle from in_valid to out_valid.
// The ROM-pair structure and the word format are the document's; the exact
// Gray labelling is this design's reading of the standard's mapping.
module const_mapper
  import tx_pkg::*;
#(
  parameter int unsigned NCPC = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [NCPC-1:0] in_sym,
  output logic            out_valid,
  output cplx_t           out
);
  localparam int unsigned NSYM = 1 << NCPC;
  typedef sample_t rom_t [NSYM];

  function automatic int gray2bin(int g, int nbits);
    int b = 0;
    for (int i = nbits - 1; i >= 0; i--)
      b = (b << 1) | (((g >> i) & 1) ^ (b & 1));
    return b;
  endfunction

  function automatic int level(int bits, int nbits);   // odd level -(2^n-1)..(2^n-1)
    return 2 * gray2bin(bits, nbits) - ((1 << nbits) - 1);
  endfunction

  function automatic real kmod();
    case (NCPC)
      1, 2:    return 1.0 / $sqrt(real'(NCPC));
      4:       return 1.0 / $sqrt(10.0);
      default: return 1.0 / $sqrt(42.0);
    endcase
  endfunction

  function automatic sample_t to_q14(real v);
    real x = v * real'(1 << FRAC_W);
    return sample_t'($rtoi(x >= 0.0 ? x + 0.5 : x - 0.5));
  endfunction

  function automatic rom_t make_rom(bit is_q);
    rom_t r;
    int half = (NCPC == 1) ? 1 : NCPC / 2;
    for (int a = 0; a < int'(NSYM); a++) begin
      int li, lq;
      li = level((NCPC == 1) ? a : (a >> half), half);
      lq = (NCPC == 1) ? 0 : level(a & ((1 << half) - 1), half);
      r[a] = to_q14(real'(is_q ? lq : li) * kmod());
    end
    return r;
  endfunction

  localparam rom_t ROM_I = make_rom(1'b0);
  localparam rom_t ROM_Q = make_rom(1'b1);

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    if (in_valid) begin
      out.re <= ROM_I[in_sym];
      out.im <= ROM_Q[in_sym];
    end
  end
endmodule
