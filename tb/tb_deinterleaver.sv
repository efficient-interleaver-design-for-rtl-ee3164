// Self-checking test of the de-interleaver for BPSK, QPSK, 16-QAM and 64-QAM
// block sizes (192, 384, 768, 1152). Each instance receives three blocks of
// random symbols, the first with random gaps and the others back to back.
// Received bit j (bit j%NCPC of symbol j/NCPC, first bit = MSB) must come
// out at position k_j given by the two de-interleaver formulas
// m_j = s*floor(j/s) + (j + floor(12j/N)) mod s and
// k_j = 12*m_j - (N-1)*floor(12*m_j/N), computed here independently.
// Also checked: the output of a block is continuous (one bit per cycle).
module tb_deinterleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 4;
  localparam int CPC [NCFG] = '{1, 2, 4, 6};
  localparam int CBP [NCFG] = '{192, 384, 768, 1152};
  localparam int NBLK = 3;
  int checks_a [NCFG];
  int fails_a [NCFG];
  bit done_a [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NCPC = CPC[g];
    localparam int N = CBP[g];
    localparam int S = (NCPC + 1) / 2;

    logic in_valid = 0, in_ready, out_valid, out_bit;
    logic [NCPC-1:0] in_sym = '0;
    deinterleaver #(.NCPC(NCPC), .NCBPS(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_sym, .out_valid, .out_bit);

    bit rx [NBLK][N];
    bit ex [NBLK][N];
    int nsym = 0, nout = 0;
    longint cyc = 0, last_out = 0;

    function automatic int kj(int j);
      int m;
      m = S * (j / S) + (j + (12 * j) / N) % S;
      return 12 * m - (N - 1) * ((12 * m) / N);
    endfunction

    initial begin
      checks_a[g] = 0; fails_a[g] = 0; done_a[g] = 0;
      for (int b = 0; b < NBLK; b++)
        for (int j = 0; j < N; j++) begin
          rx[b][j] = 1'($urandom);
          ex[b][kj(j)] = rx[b][j];
        end
    end

    always @(posedge clk) if (rst_n) begin
      cyc <= cyc + 1;
      if (in_valid && in_ready) nsym <= nsym + 1;
      if (out_valid) begin
        int b, k;
        b = nout / N; k = nout % N;
        checks_a[g]++;
        if (out_bit !== ex[b][k]) begin
          fails_a[g]++;
          if (fails_a[g] < 5) $display("cfg %0d block %0d bit %0d got %b exp %b", g, b, k, out_bit, ex[b][k]);
        end
        if (k != 0) begin
          checks_a[g]++;
          if (cyc != last_out + 1) begin fails_a[g]++; $display("cfg %0d gap in output", g); end
        end
        last_out <= cyc;
        nout <= nout + 1;
        if (nout + 1 == NBLK * N) done_a[g] = 1;
      end
    end

    always @(negedge clk) if (rst_n) begin
      int n, b, j0;
      n = nsym;
      if (n < NBLK * N / NCPC && (n >= N / NCPC || $urandom_range(0, 2) != 0)) begin
        b = n / (N / NCPC); j0 = (n % (N / NCPC)) * NCPC;
        in_valid <= 1;
        for (int p = 0; p < NCPC; p++) in_sym[NCPC-1-p] <= rx[b][j0 + p];
      end else in_valid <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  initial begin
    int checks, failures;
    bit all;
    wait (rst_n);
    do begin
      @(posedge clk);
      all = 1;
      foreach (done_a[i]) all &= done_a[i];
    end while (!all);
    checks = 0; failures = 0;
    foreach (checks_a[i]) begin checks += checks_a[i]; failures += fails_a[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (checks_a[i]) begin checks += checks_a[i]; failures += fails_a[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
