// Self-checking test of the pipelined IFFT at its 256-point default.
// Four frames of random bins: frames 0 and 1 back to back, frame 2 with random
// input pauses, frame 3 offered while the pipe is still draining (it must wait
// for a frame boundary). Each output sample is compared with a direct
// floating-point evaluation of x[n] = (1/N) sum X[k] exp(+j2*pi*k*n/N); the
// output order (bit reversed, tagged by out_addr) and the latency of 263
// cycles from the first input sample to the first output sample are checked.
module tb_ifft_sdf;
  import tx_pkg::*;
  localparam int LOGN = 8;
  localparam int N = 1 << LOGN;
  localparam int NFR = 4;
  localparam int TOL = 12;    // LSBs

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid = 0, in_ready, out_valid;
  cplx_t din, dout;
  logic [LOGN-1:0] out_addr;

  ifft_sdf #(.LOGN(LOGN)) dut (.clk, .rst_n, .in_valid, .in_ready, .in(din), .out_valid, .out(dout), .out_addr);

  cplx_t X [NFR][N];
  real er [NFR][N];
  real ei [NFR][N];
  longint first_in_cycle;

  function automatic logic [LOGN-1:0] brev(logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) brev[i] = v[LOGN-1-i];
  endfunction

  initial begin
    for (int f = 0; f < NFR; f++)
      for (int k = 0; k < N; k++) begin
        X[f][k].re = sample_t'($signed(16'($urandom_range(0, 32767))) - 16384);
        X[f][k].im = sample_t'($signed(16'($urandom_range(0, 32767))) - 16384);
      end
    for (int f = 0; f < NFR; f++)
      for (int n = 0; n < N; n++) begin
        real sr, si, a;
        sr = 0; si = 0;
        for (int k = 0; k < N; k++) begin
          a = 2.0 * 3.14159265358979 * real'((k * n) % N) / real'(N);
          sr += real'(X[f][k].re) * $cos(a) - real'(X[f][k].im) * $sin(a);
          si += real'(X[f][k].re) * $sin(a) + real'(X[f][k].im) * $cos(a);
        end
        er[f][n] = sr / N;
        ei[f][n] = si / N;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int f = 0; f < NFR; f++) begin
      if (f == 1) repeat (700) @(negedge clk);   // start from an empty pipe
      if (f == 3) repeat (40) @(negedge clk);    // arrive while draining
      for (int k = 0; k < N; k++) begin
        if (f == 2) while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; din = X[f][k];
        do @(negedge clk); while (!took);
      end
      in_valid = 0;
    end
  end

  // Handshake and timing observed at the clock edge.
  logic took = 0;
  always @(posedge clk) begin
    took <= in_valid && in_ready;
    if (in_valid && in_ready && !first_seen) begin first_seen <= 1; first_in_cycle <= cyc; end
  end
  bit first_seen = 0;

  int waited_drain = 0;
  always @(posedge clk) if (in_valid && !in_ready) waited_drain++;

  int fo = 0, io = 0;
  always @(posedge clk) if (rst_n && fo < NFR && out_valid) begin
    int n;
    real dre, dim;
    sample_t gr, gi;
    gr = dout.re; gi = dout.im;
    n = int'(brev(LOGN'(io)));
    checks++;
    if (int'(out_addr) != n) begin failures++; $display("addr %0d exp %0d", out_addr, n); end
    dre = real'(gr) - er[fo][n];
    dim = real'(gi) - ei[fo][n];
    checks++;
    if (dre > TOL || dre < -TOL || dim > TOL || dim < -TOL) begin
      failures++;
      if (failures < 8) $display("frame %0d n %0d got (%0d,%0d) exp (%f,%f)", fo, n, gr, gi, er[fo][n], ei[fo][n]);
    end
    if (fo == 0 && io == 0) begin
      checks++;
      if (cyc - first_in_cycle != 263) begin failures++; $display("latency %0d", cyc - first_in_cycle); end
    end
    io++;
    if (io == N) begin io = 0; fo++; end
  end

  initial begin
    wait (fo == NFR);
    @(posedge clk);
    checks++;
    if (waited_drain == 0) begin failures++; $display("frame-boundary wait never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
