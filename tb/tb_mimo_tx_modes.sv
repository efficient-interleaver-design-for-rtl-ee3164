// End-to-end test of the transmitter built for the other three modulations:
// BPSK (rate 1/2, block 192), QPSK and 16-QAM (rate 3/4, blocks 384 and
// 768), two OFDM symbols each, every output sample checked against the
// behavioural model. Antenna 0 of each build is fed at a rate the modulator
// can sustain. Antenna 1 of the BPSK build is fed at the full input rate,
// which brings an OFDM symbol's worth of data every 384 cycles, faster than
// the about 850 cycles a symbol takes to modulate and send: the modulator
// must hold frames back while the cyclic prefix stage is busy, the IFFT must
// wait for a frame boundary, and the sticky overrun flag must rise.
module tb_mimo_tx_modes;
  import tx_pkg::*;
  localparam int NB = 3;
  localparam int CPC [NB] = '{1, 2, 4};
  localparam int GAPS [NB] = '{5, 2, 0};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c_a [NB][2];
  int f_a [NB][2];
  bit d_a [NB][2];
  int n_hold = 0, n_bound = 0;
  bit ovr_seen = 0;
  logic [1:0] ovr [NB];

  for (genvar g = 0; g < NB; g++) begin : g_build
    localparam int NCPC = CPC[g];
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
      localparam bit FAST = (g == 0 && a == 1);
      tx_lane_tb #(.NCPC(NCPC), .NSYM(FAST ? 6 : 2), .GAP(FAST ? 0 : GAPS[g]), .CHECK(!FAST)) lane (
        .clk, .rst_n, .in_valid(in_valid[a]), .in_ready(in_ready[a]), .in_bit(in_bit[a]),
        .out_valid(out_valid[a]), .out_first(out_first[a]), .out(dout[a]),
        .checks(c_a[g][a]), .failures(f_a[g][a]), .done(d_a[g][a]));
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (g_build[0].dut.g_ant[1].u_mod.full[g_build[0].dut.g_ant[1].u_mod.rd_half] &&
        !g_build[0].dut.g_ant[1].u_mod.active && !g_build[0].dut.g_ant[1].cp_idle) n_hold++;
    if (g_build[0].dut.g_ant[1].bin_valid && !g_build[0].dut.g_ant[1].bin_ready) n_bound++;
  end

  initial begin
    int checks, failures;
    bit all;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int g = 0; g < NB; g++) all &= d_a[g][0];
      all &= d_a[1][1] && d_a[2][1];
    end while (!all);
    checks = 0; failures = 0;
    for (int g = 0; g < NB; g++)
      for (int a = 0; a < 2; a++) begin checks += c_a[g][a]; failures += f_a[g][a]; end
    for (int g = 0; g < NB; g++) begin
      checks++;
      if (g == 0 ? ovr[g] != 2'b10 : ovr[g] != 2'b00) begin
        failures++; $display("build %0d overrun flags %b", g, ovr[g]);
      end
    end
    checks += 2;
    if (n_hold == 0) begin failures++; $display("modulator never held a frame back"); end
    if (n_bound == 0) begin failures++; $display("IFFT never waited for a frame boundary"); end
    $display("frame hold cycles %0d, IFFT boundary waits %0d, overrun flags %b", n_hold, n_bound, ovr[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
