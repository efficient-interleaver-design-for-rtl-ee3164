// Self-checking test of the interleaver for all four modulations at the
// 16-subchannel block sizes (192, 384, 768, 1152) and for the 64-QAM
// cross-antenna size (2304). Each instance gets three blocks of random bits at
// one bit per cycle, back to back. The expected output is built from the two
// permutation formulas of 802.16 (m from k, then j from m), independently of
// the bank/counter structure of the design. Also checked: the latency from the
// last bit of the first block to its first symbol (NCPC+2 cycles), and that
// the symbols of consecutive blocks follow without a gap.
module tb_interleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  localparam int CPC [NCFG] = '{1, 2, 4, 6, 6};
  localparam int CBP [NCFG] = '{192, 384, 768, 1152, 2304};
  localparam int NBLK = 3;

  int checks_a [NCFG];
  int fails_a  [NCFG];
  bit done_a   [NCFG];
  int checks, failures;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NCPC = CPC[g];
    localparam int N    = CBP[g];
    localparam int S    = (NCPC + 1) / 2;

    logic in_valid = 0, in_ready, in_bit = 0, out_valid;
    logic [NCPC-1:0] out_sym;

    interleaver #(.NCPC(NCPC), .NCBPS(N)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_bit, .out_valid, .out_sym);

    bit src [NBLK][N];
    bit exp_bits [NBLK][N];
    longint last_wr_cycle, first_out_cycle, prev_out_cycle;
    longint cyc = 0;
    always @(negedge clk) cyc <= cyc + 1;

    function automatic int jk(int k);
      int m, j;
      m = (N / 12) * (k % 12) + k / 12;
      j = S * (m / S) + (m + N - (12 * m) / N) % S;
      return j;
    endfunction

    initial begin
      checks_a[g] = 0; fails_a[g] = 0; done_a[g] = 0;
      for (int b = 0; b < NBLK; b++)
        for (int k = 0; k < N; k++) begin
          src[b][k] = 1'($urandom);
          exp_bits[b][jk(k)] = src[b][k];
        end
      // the permutation must be a bijection
      begin
        bit seen [N];
        int dup = 0;
        for (int k = 0; k < N; k++) begin
          if (seen[jk(k)]) dup++;
          seen[jk(k)] = 1;
        end
        checks_a[g]++; if (dup != 0) fails_a[g]++;
      end
      wait (rst_n);
      @(posedge clk);
      for (int b = 0; b < NBLK; b++)
        for (int k = 0; k < N; k++) begin
          in_valid <= 1; in_bit <= src[b][k];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          if (b == 0 && k == N - 1) last_wr_cycle = cyc;
        end
      in_valid <= 0;
    end

    // output checker
    initial begin
      int sym_i, tot;
      sym_i = 0;
      tot = NBLK * N / NCPC;
      wait (rst_n);
      while (sym_i < tot) begin
        @(posedge clk);
        if (out_valid) begin
          int b, s0;
          logic [NCPC-1:0] e;
          b = sym_i / (N / NCPC);
          s0 = (sym_i % (N / NCPC)) * NCPC;
          for (int p = 0; p < NCPC; p++) e[NCPC-1-p] = exp_bits[b][s0 + p];
          checks_a[g]++;
          if (out_sym !== e) begin
            fails_a[g]++;
            if (fails_a[g] < 5) $display("cfg %0d sym %0d: got %b exp %b", g, sym_i, out_sym, e);
          end
          if (sym_i == 0) begin
            first_out_cycle = cyc;
            checks_a[g]++;
            if (first_out_cycle - last_wr_cycle != NCPC + 2) begin
              fails_a[g]++;
              $display("cfg %0d latency %0d, expected %0d", g, first_out_cycle - last_wr_cycle, NCPC + 2);
            end
          end else begin
            checks_a[g]++;
            if (cyc - prev_out_cycle != NCPC) begin
              fails_a[g]++;
              if (fails_a[g] < 5) $display("cfg %0d sym %0d gap %0d", g, sym_i, cyc - prev_out_cycle);
            end
          end
          prev_out_cycle = cyc;
          sym_i++;
        end
      end
      done_a[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  initial begin
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
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (checks_a[i]) begin checks += checks_a[i]; failures += fails_a[i]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
