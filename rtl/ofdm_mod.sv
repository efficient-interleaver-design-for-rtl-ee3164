// Front end of the OFDM modulator: the data-symbol double buffer and the
// subcarrier allocation that forms the IFFT input.
//
// Constellation points (I and Q, 16 bits each) are written in arrival order
// into a buffer of 2 x 192 words. When 192 points (one OFDM symbol's worth of
// data subcarriers) are stored, that half is handed to the IFFT while the next
// 192 points go to the other half. The IFFT input is produced bin by bin in
// natural order 0..255 (bin b is subcarrier b for b < 128 and b - 256 above):
// guard carriers (subcarriers -128..-101 and 101..127) and DC carry zero,
// the pilots at subcarriers -88, -63, -38, -13, 13, 38, 63, 88 carry
// PILOT_VALUE, and the remaining 192 carry the data points in ascending
// subcarrier order (-100 gets the first point, +100 the last).
//
// A frame is started only when a buffer half is full and the next stage
// reports sink_idle (the cyclic prefix buffer is empty). The IFFT input uses a
// valid/ready handshake with a one-word output register behind the
// synchronous buffer read. A point that arrives while both halves are full is
// dropped and raises the sticky overrun flag.
// Interface: in_valid/in (points), out_valid/out_ready/out (IFFT bins),
// sink_idle, overrun.
// The 384 x 16-bit double buffers and the insertion of pilots, DC and nulls
// are the document's; the carrier layout is that of the 802.16 256-point OFDM
// PHY; the constant pilot value and the handshakes are this design's choices.
module ofdm_mod
  import tx_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in,
  output logic  out_valid,
  input  logic  out_ready,
  output cplx_t out,
  input  logic  sink_idle,
  output logic  overrun
);
  typedef enum logic [1:0] {SC_NULL, SC_PILOT, SC_DATA} sc_kind_t;

  function automatic sc_kind_t kind_of(logic [7:0] bin);
    int sc, m;
    sc = (bin < 8'd128) ? int'(bin) : int'(bin) - 256;
    m  = (sc < 0) ? -sc : sc;
    if (sc == 0 || m > 100)                      return SC_NULL;
    if (m == 13 || m == 38 || m == 63 || m == 88) return SC_PILOT;
    return SC_DATA;
  endfunction

  cplx_t mem [2*NDATA];

  // ---------------- write side ----------------
  logic       wr_half;
  logic [7:0] wr_idx;
  logic [1:0] full;
  logic       wr_ok, wr_last;

  assign wr_ok   = !full[wr_half];
  assign wr_last = in_valid && wr_ok && (wr_idx == 8'(NDATA - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_half <= 1'b0;
      wr_idx  <= '0;
      overrun <= 1'b0;
    end else if (in_valid) begin
      if (!wr_ok) begin
        overrun <= 1'b1;
      end else if (wr_last) begin
        wr_idx  <= '0;
        wr_half <= !wr_half;
      end else begin
        wr_idx  <= wr_idx + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && wr_ok) mem[wr_half ? 9'(NDATA) + 9'(wr_idx) : 9'(wr_idx)] <= in;
  end

  // ---------------- read side ----------------
  logic       rd_half, active, adv;
  logic [7:0] bin, didx;
  sc_kind_t   kind, kind_q;
  logic       last_bin;

  assign kind     = kind_of(bin);
  assign adv      = !out_valid || out_ready;
  assign last_bin = (bin == 8'd255);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_half   <= 1'b0;
      active    <= 1'b0;
      bin       <= '0;
      didx      <= '0;
      full      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (wr_last) full[wr_half] <= 1'b1;
      if (!active) begin
        if (full[rd_half] && sink_idle) begin
          active <= 1'b1;
          bin    <= '0;
          didx   <= 8'd96;            // positive subcarriers take points 96..191
        end
        if (adv) out_valid <= 1'b0;
      end else if (adv) begin
        out_valid <= 1'b1;
        kind_q    <= kind;
        if (kind == SC_DATA) didx <= didx + 1'b1;
        if (bin == 8'd127)   didx <= '0;   // negative subcarriers take 0..95
        bin <= bin + 1'b1;
        if (last_bin) begin
          active        <= 1'b0;
          full[rd_half] <= 1'b0;
          rd_half       <= !rd_half;
        end
      end
    end
  end

  cplx_t rdata;
  always_ff @(posedge clk) begin
    if (active && adv && kind == SC_DATA)
      rdata <= mem[rd_half ? 9'(NDATA) + 9'(didx) : 9'(didx)];
  end

  always_comb begin
    case (kind_q)
      SC_DATA:  out = rdata;
      SC_PILOT: out = '{re: PILOT_VALUE, im: '0};
      default:  out = '0;
    endcase
  end
endmodule
