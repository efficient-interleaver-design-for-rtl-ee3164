// Self-checking test of the interleaver address generator for 64-QAM (six
// banks, block 1152) and 16-QAM (four banks, block 768). A write word is
// requested every cycle, six or four times faster than the one-bit-per-cycle
// reader, so both buffer halves fill and wr_ok must drop: this exercises the
// double-buffer full flags. Write addresses must run 0..HALF-1 in each half
// in turn; read bank, address and bit position must follow from the
// 802.16 permutation formulas: output bit m is input bit k = 12*(m%R) + m/R
// with R = NCBPS/12, stored in bank k%NCPC at offset k/NCPC, and it goes to
// position j(k) - NCPC*floor(m/NCPC) of its symbol.
module tb_il_addr_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 2;
  localparam int CPC [NCFG] = '{6, 4};
  localparam int CBP [NCFG] = '{1152, 768};
  localparam int NBLK = 4;
  int checks_a [NCFG];
  int fails_a [NCFG];
  int stalls_a [NCFG];
  bit done_a [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int NCPC = CPC[g];
    localparam int N = CBP[g];
    localparam int HALF = N / NCPC;
    localparam int R = N / 12;
    localparam int S = (NCPC + 1) / 2;
    localparam int AW = $clog2(2 * HALF);
    localparam int BW = $clog2(NCPC);

    logic wr_req, wr_ok, we, rd_en, rd_last;
    logic [AW-1:0] waddr, raddr;
    logic [BW-1:0] rd_bank, rd_pos;

    assign wr_req = rst_n;
    il_addr_gen #(.NCPC(NCPC), .NCBPS(N)) dut (.clk, .rst_n, .wr_req, .wr_ok, .we, .waddr,
      .rd_en, .rd_bank, .raddr, .rd_pos, .rd_last);

    int wcount = 0, rcount = 0;
    int writes_done_blocks;

    function automatic int jk(int k);
      int m;
      m = R * (k % 12) + k / 12;
      return S * (m / S) + (m + N - (12 * m) / N) % S;
    endfunction

    task automatic chk(bit ok, string what);
      checks_a[g]++;
      if (!ok) begin
        fails_a[g]++;
        if (fails_a[g] < 6) $display("cfg %0d %s (w%0d r%0d)", g, what, wcount, rcount);
      end
    endtask

    initial begin checks_a[g] = 0; fails_a[g] = 0; stalls_a[g] = 0; done_a[g] = 0; end

    always @(posedge clk) if (rst_n && !done_a[g]) begin
      if (wr_req && !wr_ok) stalls_a[g]++;
      if (we) begin
        int blk, off;
        blk = wcount / HALF; off = wcount % HALF;
        chk(int'(waddr) == (blk % 2) * HALF + off, "write address");
        // a block may only be written once the reader has freed its half
        chk(blk < 2 || rcount >= (blk - 1) * N, "write into unread half");
        wcount++;
      end
      if (rd_en) begin
        int blk, m, k, symbase;
        blk = rcount / N; m = rcount % N;
        k = 12 * (m % R) + m / R;
        symbase = m - m % NCPC;
        chk(wcount >= (blk + 1) * HALF, "read before block complete");
        chk(int'(rd_bank) == k % NCPC, "read bank");
        chk(int'(raddr) == (blk % 2) * HALF + k / NCPC, "read address");
        chk(int'(rd_pos) == jk(k) - symbase, "bit position");
        chk(rd_last == (m % NCPC == NCPC - 1), "symbol end");
        rcount++;
        if (rcount == NBLK * N) done_a[g] = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
  end

  initial begin
    int checks, failures;
    wait (done_a[0] && done_a[1]);
    checks = 0; failures = 0;
    for (int g = 0; g < NCFG; g++) begin
      checks += checks_a[g] + 1; failures += fails_a[g];
      if (stalls_a[g] == 0) begin failures++; $display("cfg %0d: wr_ok never dropped", g); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (10000) @(posedge clk);
    checks = 0; failures = 1;
    for (int g = 0; g < NCFG; g++) begin checks += checks_a[g]; failures += fails_a[g]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
