// Shared types and constants of the 802.16 OFDM transmitter.
// Sample format: 16-bit two's complement with 14 fraction bits (sign bit, one
// integer/magnitude bit, 14 fraction bits), used from the constellation ROMs to
// the transmitter output. The OFDM numerology (256-point IFFT, 192 data
// subcarriers, 8 pilots, DC, 55 guard carriers, 64-sample cyclic prefix giving
// a 320-sample symbol) is that of the 802.16 OFDM PHY the design targets.
package tx_pkg;
  localparam int SAMPLE_W  = 16;           // I and Q word width
  localparam int FRAC_W    = 14;           // fraction bits of a sample
  localparam int NFFT      = 256;          // IFFT size
  localparam int NDATA     = 192;          // data subcarriers per OFDM symbol
  localparam int NCP       = 64;           // cyclic prefix length (Tg = Tb/4)
  localparam int NSYM_OUT  = NFFT + NCP;   // 320 output samples per symbol

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Value sent on every pilot subcarrier (+1.0); see the modulator header.
  localparam sample_t PILOT_VALUE = sample_t'(1 << FRAC_W);

  // Interleaver bank count equals bits per subcarrier (1, 2, 4 or 6).
  // s = ceil(Ncpc/2) of the second permutation.
  function automatic int s_of(input int ncpc);
    return (ncpc + 1) / 2;
  endfunction
endpackage
