// 2x2 MIMO-OFDM transmitter after IEEE 802.16 (256-point OFDM PHY, 16
// subchannels), with two independent data streams, one per antenna, for
// spatial multiplexing. Each antenna has its own chain:
//   convolutional encoder (K = 7, rate 1/2)
//   -> puncturer (rate 3/4 for QPSK/16-QAM/64-QAM, none for BPSK)
//   -> interleaver (NCPC RAM banks, double buffered, block 192*NCPC bits)
//   -> constellation mapper (I and Q ROMs, 16-bit Q2.14)
//   -> OFDM modulator buffer with pilot/DC/null insertion
//   -> pipelined 256-point IFFT -> cyclic prefix insertion (320 samples).
// This is per-antenna coding with per-antenna interleaving; the modulation is
// chosen at build time with NCPC (1 BPSK, 2 QPSK, 4 16-QAM, 6 64-QAM).
// The receive side's de-interleavers, one per antenna, are included as well
// (same bank structure, reversed orders); the demapper that would feed them
// and the decoder that would take their output are outside this design, so
// their ports are brought out.
//
// Interface per antenna a: in_valid[a]/in_ready[a]/in_bit[a] for the data
// bits; out_valid[a]/out_first[a]/out[a] for the baseband samples (one per
// cycle while a symbol is sent, out_first on its first prefix sample);
// overrun[a], a sticky flag raised if data arrives faster than whole OFDM
// symbols can be modulated (the input must average at most one symbol of
// data per about 850 cycles; the 802.16 symbol of 13.82 us is 2073 cycles at
// the 150 MHz clock of the document's timing figures).
// Receive side per antenna: rx_valid[a]/rx_ready[a]/rx_sym[a] take
// hard-decision symbols of NCPC bits (rx_sym[a][NCPC-1] first);
// rx_bit_valid[a]/rx_bit[a] give the de-interleaved coded bits.
module mimo_tx
  import tx_pkg::*;
#(
  parameter int unsigned NCPC   = 6,                  // 64-QAM
  parameter int unsigned NANT   = 2,                  // 2x2 MIMO
  localparam int unsigned NCBPS = 192 * NCPC          // 16 subchannels, Table I
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NANT-1:0] in_valid,
  output logic [NANT-1:0] in_ready,
  input  logic [NANT-1:0] in_bit,
  output logic [NANT-1:0] out_valid,
  output logic [NANT-1:0] out_first,
  output cplx_t           out [NANT],
  output logic [NANT-1:0] overrun,
  input  logic [NANT-1:0] rx_valid,
  output logic [NANT-1:0] rx_ready,
  input  logic [NCPC-1:0] rx_sym [NANT],
  output logic [NANT-1:0] rx_bit_valid,
  output logic [NANT-1:0] rx_bit
);
  for (genvar a = 0; a < NANT; a++) begin : g_ant
    logic  enc_valid, enc_ready, enc_x, enc_y;
    logic  cb_valid, cb_ready, cb_bit;
    logic  sym_valid;
    logic [NCPC-1:0] sym;
    logic  pt_valid;
    cplx_t pt;
    logic  bin_valid, bin_ready;
    cplx_t bin;
    logic  td_valid;
    cplx_t td;
    logic [7:0] td_addr;
    logic  cp_idle;

    conv_encoder u_enc (
      .clk, .rst_n,
      .in_valid (in_valid[a]), .in_ready (in_ready[a]), .in_bit (in_bit[a]),
      .out_valid (enc_valid), .out_ready (enc_ready), .out_x (enc_x), .out_y (enc_y));

    puncturer #(.RATE34(NCPC > 1)) u_punct (
      .clk, .rst_n,
      .in_valid (enc_valid), .in_ready (enc_ready), .in_x (enc_x), .in_y (enc_y),
      .out_valid (cb_valid), .out_ready (cb_ready), .out_bit (cb_bit));

    interleaver #(.NCPC(NCPC), .NCBPS(NCBPS)) u_il (
      .clk, .rst_n,
      .in_valid (cb_valid), .in_ready (cb_ready), .in_bit (cb_bit),
      .out_valid (sym_valid), .out_sym (sym));

    const_mapper #(.NCPC(NCPC)) u_map (
      .clk, .rst_n, .in_valid (sym_valid), .in_sym (sym),
      .out_valid (pt_valid), .out (pt));

    ofdm_mod u_mod (
      .clk, .rst_n, .in_valid (pt_valid), .in (pt),
      .out_valid (bin_valid), .out_ready (bin_ready), .out (bin),
      .sink_idle (cp_idle), .overrun (overrun[a]));

    ifft_sdf #(.LOGN(8)) u_ifft (
      .clk, .rst_n, .in_valid (bin_valid), .in_ready (bin_ready), .in (bin),
      .out_valid (td_valid), .out (td), .out_addr (td_addr));

    cp_insert #(.LOGN(8), .NCPL(NCP)) u_cp (
      .clk, .rst_n, .in_valid (td_valid), .in_addr (td_addr), .in (td),
      .out_valid (out_valid[a]), .out_first (out_first[a]), .out (out[a]),
      .idle (cp_idle));

    deinterleaver #(.NCPC(NCPC), .NCBPS(NCBPS)) u_deil (
      .clk, .rst_n,
      .in_valid (rx_valid[a]), .in_ready (rx_ready[a]), .in_sym (rx_sym[a]),
      .out_valid (rx_bit_valid[a]), .out_bit (rx_bit[a]));
  end
endmodule
