// Initial-latency test of the 2x2 MIMO-OFDM transmitter for all four
// modulations, with the data input at one bit every second cycle. The encoder
// then makes one bit pair per two cycles, so the interleaver receives one
// coded bit per cycle for BPSK (rate 1/2) and 4 coded bits every 6 cycles
// after rate-3/4 puncturing for QPSK, 16-QAM and 64-QAM. That is the input
// pace the published per-antenna (Case 2) interleaver latencies correspond
// to: 197, 588, 1170 and 1752 cycles, about one block of input time each.
// For every build (NCPC = 1, 2, 4, 6; 64-QAM is the default build) the test
// checks every output sample against the behavioural model, that nothing is
// dropped, that the interleaver's first symbol appears within 3% of the
// published latency after the first coded bit, and that a complete block is
// read out without gaps: each symbol follows the previous one by exactly NCPC
// cycles (one bit per cycle), although the next block is still being written
// at the slower input pace. The 64-QAM build runs two symbols, the others one.
module tb_mimo_tx_rate;
  import tx_pkg::*;
  localparam int NB = 4;
  localparam int CPC [NB] = '{1, 2, 4, 6};
  localparam int PUB_LATENCY [NB] = '{197, 588, 1170, 1752};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c_a [NB][2];
  int f_a [NB][2];
  bit d_a [NB][2];
  logic [1:0] ovr [NB];
  longint lat [NB];
  int n_sym [NB];
  int n_gap_bad [NB];
  longint cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  for (genvar g = 0; g < NB; g++) begin : g_build
    localparam int NCPC = CPC[g];
    localparam int NSYM = (NCPC == 6) ? 2 : 1;
    logic [1:0] in_valid, in_ready, in_bit, out_valid, out_first, overrun;
    cplx_t dout [2];
    logic [1:0] rx_ready, rx_bit_valid, rx_bit;
    logic [NCPC-1:0] rx_sym [2];
    assign rx_sym[0] = '0;
    assign rx_sym[1] = '0;
    mimo_tx #(.NCPC(NCPC)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_bit,
      .out_valid, .out_first, .out(dout), .overrun,
      .rx_valid(2'b00), .rx_ready, .rx_sym, .rx_bit_valid, .rx_bit);
    assign ovr[g] = overrun;
    for (genvar a = 0; a < 2; a++) begin : g_lane
      tx_lane_tb #(.NCPC(NCPC), .NSYM(NSYM), .GAP(1)) lane (
        .clk, .rst_n, .in_valid(in_valid[a]), .in_ready(in_ready[a]), .in_bit(in_bit[a]),
        .out_valid(out_valid[a]), .out_first(out_first[a]), .out(dout[a]),
        .checks(c_a[g][a]), .failures(f_a[g][a]), .done(d_a[g][a]));
    end

    // antenna 0: first coded bit, interleaver symbol timing
    longint t_first_cb = -1, t_first_sym = -1, t_last_sym = -1;
    initial begin n_sym[g] = 0; n_gap_bad[g] = 0; end
    always @(posedge clk) if (rst_n) begin
      if (t_first_cb < 0 && dut.g_ant[0].cb_valid && dut.g_ant[0].cb_ready) t_first_cb <= cyc;
      if (dut.g_ant[0].sym_valid) begin
        if (t_first_sym < 0) t_first_sym <= cyc;
        else if (n_sym[g] % 192 != 0 && cyc - t_last_sym != NCPC) n_gap_bad[g]++;
        t_last_sym <= cyc;
        n_sym[g]++;
      end
    end
    assign lat[g] = t_first_sym - t_first_cb;
  end

  initial begin
    int checks, failures;
    bit all;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NB; g++) all &= d_a[g][0] && d_a[g][1];
    end while (!all);
    checks = 0; failures = 0;
    for (int g = 0; g < NB; g++) begin
      for (int a = 0; a < 2; a++) begin checks += c_a[g][a]; failures += f_a[g][a]; end
      checks++;
      if (lat[g] * 100 < PUB_LATENCY[g] * 97 || lat[g] * 100 > PUB_LATENCY[g] * 103) failures++;
      $display("NCPC %0d: interleaver initial latency %0d cycles (published: %0d)",
               CPC[g], lat[g], PUB_LATENCY[g]);
      checks++;
      if (n_gap_bad[g] != 0) begin
        failures++; $display("NCPC %0d: %0d symbols not NCPC cycles after the previous one", CPC[g], n_gap_bad[g]);
      end
      checks++;
      if (ovr[g] != 0) begin failures++; $display("NCPC %0d: data dropped", CPC[g]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
