// Test-bench helper for one antenna of the MIMO transmitter: it generates the
// data bits, drives them into the transmitter, and checks every output sample
// against a behavioural model of the whole chain written from the 802.16
// definitions rather than from the RTL structure: K=7 encoder (171, 133 octal)
// by polynomial parity, rate-3/4 puncturing X1 Y1 Y2 X3, the interleaver by
// its two permutation formulas, Gray level tables for the mapping, the carrier
// map (pilots at +-13, +-38, +-63, +-88 set to +1.0), a floating-point inverse
// DFT with 1/N scaling, and the 64-sample cyclic prefix. Samples must match
// within TOL LSBs. GAP idle cycles are inserted after each data bit to set
// the input rate; with CHECK = 0 only the samples are counted (used when the
// input is deliberately too fast and data is dropped).
module tx_lane_tb
  import tx_pkg::*;
#(
  parameter int NCPC  = 6,
  parameter int NSYM  = 2,
  parameter int GAP   = 0,
  parameter bit CHECK = 1,
  parameter int TOL   = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  in_valid,
  input  logic  in_ready,
  output logic  in_bit,
  input  logic  out_valid,
  input  logic  out_first,
  input  cplx_t out,
  output int    checks,
  output int    failures,
  output bit    done
);
  localparam int N     = 256;
  localparam int NCBPS = 192 * NCPC;
  localparam int NCODE = NSYM * NCBPS;
  localparam int NBITS = (NCPC == 1) ? NCODE / 2 : NCODE * 3 / 4;
  localparam int S     = (NCPC + 1) / 2;
  localparam int L1 [2] = '{-1, 1};
  localparam int L2 [4] = '{-3, -1, 3, 1};
  localparam int L3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};

  bit data [NBITS];
  bit coded [NCODE];
  real xr [NSYM][N + 64];
  real xi [NSYM][N + 64];

  function automatic bit is_pilot(int sc);
    return sc == 13 || sc == -13 || sc == 38 || sc == -38 || sc == 63 || sc == -63 || sc == 88 || sc == -88;
  endfunction

  initial begin
    logic [6:0] h;
    int nc, d;
    real scale;
    int sc2d [-128:127];
    h = '0; nc = 0;
    for (int i = 0; i < NBITS; i++) begin
      bit x, y;
      data[i] = 1'($urandom);
      h = {h[5:0], data[i]};
      x = ^(h & 7'b1001111);
      y = ^(h & 7'b1101101);
      if (NCPC == 1) begin coded[nc++] = x; coded[nc++] = y; end
      else case (i % 3)
        0: begin coded[nc++] = x; coded[nc++] = y; end
        1: coded[nc++] = y;
        default: coded[nc++] = x;
      endcase
    end
    d = 0;
    for (int sc = -128; sc < 128; sc++) begin
      sc2d[sc] = -1;
      if (sc >= -100 && sc <= 100 && sc != 0 && !is_pilot(sc)) sc2d[sc] = d++;
    end
    scale = (NCPC == 1) ? 1.0 : (NCPC == 2) ? 0.70710678 : (NCPC == 4) ? 0.31622777 : 0.15430335;
    for (int s = 0; s < NSYM; s++) begin
      bit y [NCBPS];
      real pr [192];
      real pi [192];
      real Xr [N];
      real Xi [N];
      for (int k = 0; k < NCBPS; k++) begin
        int m, j;
        m = (NCBPS / 12) * (k % 12) + k / 12;
        j = S * (m / S) + (m + NCBPS - (12 * m) / NCBPS) % S;
        y[j] = coded[s * NCBPS + k];
      end
      for (int p = 0; p < 192; p++) begin
        int v, li, lq;
        v = 0;
        for (int b = 0; b < NCPC; b++) v = (v << 1) | y[p * NCPC + b];
        case (NCPC)
          1: begin li = L1[v]; lq = 0; end
          2: begin li = L1[v >> 1]; lq = L1[v & 1]; end
          4: begin li = L2[v >> 2]; lq = L2[v & 3]; end
          default: begin li = L3[v >> 3]; lq = L3[v & 7]; end
        endcase
        pr[p] = li * scale * 16384.0;
        pi[p] = lq * scale * 16384.0;
      end
      for (int b = 0; b < N; b++) begin
        int sc;
        sc = (b < 128) ? b : b - 256;
        if (sc2d[sc] >= 0) begin Xr[b] = pr[sc2d[sc]]; Xi[b] = pi[sc2d[sc]]; end
        else if (is_pilot(sc)) begin Xr[b] = 16384.0; Xi[b] = 0; end
        else begin Xr[b] = 0; Xi[b] = 0; end
      end
      for (int n = 0; n < N; n++) begin
        real sr, si, a;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin
          a = 2.0 * 3.14159265358979 * real'((k * n) % N) / real'(N);
          sr += Xr[k] * $cos(a) - Xi[k] * $sin(a);
          si += Xr[k] * $sin(a) + Xi[k] * $cos(a);
        end
        xr[s][n + 64] = sr / N;
        xi[s][n + 64] = si / N;
      end
      for (int n = 0; n < 64; n++) begin
        xr[s][n] = xr[s][n + 256];
        xi[s][n] = xi[s][n + 256];
      end
    end
  end

  // stimulus: data bits with GAP idle cycles after each accepted bit
  int nin = 0, idle_left = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 0; in_bit <= 0; nin <= 0; idle_left <= 0;
    end else if (in_valid && in_ready) begin
      nin <= nin + 1;
      if (GAP > 0 || nin + 1 >= NBITS) begin
        in_valid <= 0; idle_left <= (GAP > 0) ? GAP - 1 : 0;
      end else begin
        in_bit <= data[nin + 1];
      end
    end else if (!in_valid && nin < NBITS) begin
      if (idle_left > 0) idle_left <= idle_left - 1;
      else begin in_valid <= 1; in_bit <= data[nin]; end
    end
  end

  // checker
  int so = 0, io = 0;
  initial begin checks = 0; failures = 0; done = 0; end
  always @(posedge clk) if (rst_n && out_valid && !done) begin
    real dr, di;
    if (CHECK) begin
      dr = real'(out.re) - xr[so][io];
      di = real'(out.im) - xi[so][io];
      checks++;
      if (dr > TOL || dr < -TOL || di > TOL || di < -TOL || out_first != (io == 0)) begin
        failures++;
        if (failures < 6)
          $display("%m: symbol %0d sample %0d got (%0d,%0d) exp (%.1f,%.1f)", so, io, out.re, out.im, xr[so][io], xi[so][io]);
      end
    end
    if (io == N + 63) begin
      io <= 0; so <= so + 1;
      if (so + 1 == NSYM) done <= 1;
    end else io <= io + 1;
  end
endmodule
