// Pipelined radix-2 IFFT, single-path delay-feedback (SDF) architecture,
// decimation in frequency. Computes x[n] = (1/N) sum_k X[k] exp(+j2*pi*k*n/N)
// for N = 2^LOGN (256 for the 802.16 OFDM symbol).
//
// Stage s (s = 0..LOGN-1) holds a feedback delay line of D = N/2^(s+1)
// samples. During the first D samples of each group of 2D it stores its input
// and forwards what the line holds (the twiddled differences of the previous
// group); during the next D samples it forms a + b (forwarded) and
// (a - b) * W^(q*2^s) with W = exp(+j2*pi/N) (fed back into the line). Every
// butterfly halves its result, which gives the 1/N scaling and keeps the
// 16-bit words from overflowing. A register follows every stage. Twiddles are
// Q1.14 constants computed at elaboration.
//
// All stages advance together on one enable, so the pipeline simply stalls
// when the input pauses. After the last sample of a frame the pipeline drains
// on its own (zeros pushed in) until every real sample has come out. A frame
// may only start at a frame boundary of the internal sample counter:
// in_ready is high during a frame, at a boundary, and after the pipe is empty.
//
// Interface: in_valid/in_ready/in (frequency bins 0..N-1 in natural order);
// out_valid/out/out_addr with out_addr the time index n of the sample. The
// output comes in bit-reversed order. Latency: N-1+LOGN enabled cycles from
// sample 0 in to the first sample out (263 for N = 256).
// The document states only that the IFFT uses a pipelined FFT architecture;
// the SDF structure, scaling and word lengths are this design's choices.
module ifft_sdf
  import tx_pkg::*;
#(
  parameter int unsigned LOGN = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  cplx_t           in,
  output logic            out_valid,
  output cplx_t           out,
  output logic [LOGN-1:0] out_addr
);
  localparam int unsigned N   = 1 << LOGN;
  localparam int unsigned LAT = N - 1 + LOGN;

  typedef logic signed [15:0] tw_t;
  typedef tw_t tw_tab_t [N/2];

  function automatic tw_tab_t make_tw(bit im);
    tw_tab_t t;
    for (int n = 0; n < int'(N / 2); n++) begin
      real a, v;
      a = 2.0 * 3.14159265358979323846 * real'(n) / real'(N);
      v = (im ? $sin(a) : $cos(a)) * 16384.0;
      t[n] = tw_t'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam tw_tab_t TW_RE = make_tw(1'b0);
  localparam tw_tab_t TW_IM = make_tw(1'b1);

  // Offset of stage s's sample counter behind the input counter.
  function automatic int stage_off(int s);
    int o = 0;
    for (int t = 0; t < s; t++) o += (N >> (t + 1)) + 1;
    return o;
  endfunction

  // ---------------- control ----------------
  logic [LOGN-1:0] in_cnt;
  logic            feeding;
  logic [LAT-1:0]  tags;       // which pipeline slots carry real samples
  logic [$clog2(LAT+1)-1:0] n_live;
  logic            adv, take, idle;

  assign in_ready = feeding || (in_cnt == '0);
  assign take     = in_valid && in_ready;
  assign adv      = take || (!feeding && n_live != '0);
  assign idle     = !feeding && (n_live == '0) && !take;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_cnt  <= '0;
      feeding <= 1'b0;
      tags    <= '0;
      n_live  <= '0;
    end else begin
      if (adv) begin
        in_cnt <= in_cnt + 1'b1;
        tags   <= {tags[LAT-2:0], take};
        n_live <= n_live + $bits(n_live)'(take) - $bits(n_live)'(tags[LAT-1]);
      end else if (idle) begin
        in_cnt <= '0;       // empty pipe: realign to a frame boundary
      end
      if (take) feeding <= (in_cnt != LOGN'(N - 1));
    end
  end

  // ---------------- stages ----------------
  cplx_t x0;
  assign x0 = take ? in : '0;

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    localparam int unsigned D   = N >> (s + 1);
    localparam int unsigned DW  = (D > 1) ? $clog2(D) : 1;
    localparam int unsigned OFF = stage_off(s);

    cplx_t           line [D];
    cplx_t           a, b, fwd, fb, dout;
    logic [LOGN-1:0] c;
    logic            second;
    logic [DW-1:0]   q;

    assign c      = in_cnt - LOGN'(OFF);
    assign second = c[LOGN-1-s];                 // (c mod 2D) >= D
    assign q      = (D > 1) ? DW'(c) : '0;       // c mod D
    assign a      = line[q];
    if (s == 0) begin : g_first
      assign b = x0;
    end else begin : g_next
      assign b = g_stage[s-1].dout;
    end

    always_comb begin
      logic signed [16:0] sr, si, dr, di;
      logic signed [31:0] pr, pi;
      tw_t wr, wi;
      sr = 17'(a.re) + 17'(b.re);
      si = 17'(a.im) + 17'(b.im);
      dr = (17'(a.re) - 17'(b.re)) >>> 1;
      di = (17'(a.im) - 17'(b.im)) >>> 1;
      wr = TW_RE[(int'(q) << s) % (N / 2)];
      wi = TW_IM[(int'(q) << s) % (N / 2)];
      pr = 32'(dr) * 32'(wr) - 32'(di) * 32'(wi);
      pi = 32'(dr) * 32'(wi) + 32'(di) * 32'(wr);
      fwd.re = sr[16:1];
      fwd.im = si[16:1];
      fb.re  = sample_t'(pr >>> 14);
      fb.im  = sample_t'(pi >>> 14);
    end

    always_ff @(posedge clk) begin
      if (adv) begin
        line[q]     <= second ? fb : b;
        dout        <= second ? fwd : a;
      end
    end
  end

  // ---------------- output ----------------
  logic [LOGN-1:0] out_cnt;

  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] v);
    for (int i = 0; i < int'(LOGN); i++) bitrev[i] = v[LOGN-1-i];
  endfunction

  assign out_valid = adv && tags[LAT-1];
  assign out       = g_stage[LOGN-1].dout;
  assign out_addr  = bitrev(out_cnt);

  always_ff @(posedge clk) begin
    if (!rst_n)         out_cnt <= '0;
    else if (out_valid) out_cnt <= out_cnt + 1'b1;
  end
endmodule
