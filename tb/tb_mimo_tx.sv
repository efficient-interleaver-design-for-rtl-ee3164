// End-to-end test of the 2x2 MIMO-OFDM transmitter at its default
// configuration (64-QAM, interleaver block 1152, 256-point IFFT). Both
// antennas get their own random data stream at the full input rate for three
// OFDM symbols; every one of the 2 x 3 x 320 output samples is checked
// against the behavioural model in tx_lane_tb. The test also counts the
// mechanisms of the design and fails if one never occurs: encoder stalls by
// the puncturer, interleaver writing one buffer half while reading the other,
// pilot insertion, IFFT pipeline draining, cyclic prefix samples. It checks
// the interleaver's initial latency (one block of input time plus NCPC+2
// cycles) and that no data was dropped. On the receive side, the interleaved
// symbols of each antenna are looped back into its de-interleaver, whose
// output must equal the coded bit stream of the model.
module tb_mimo_tx;
  import tx_pkg::*;
  localparam int NSYM = 3;
  localparam int NCPC = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] in_valid, in_ready, in_bit, out_valid, out_first, overrun;
  cplx_t dout [2];

  logic [1:0] rx_valid, rx_ready, rx_bit_valid, rx_bit;
  logic [NCPC-1:0] rx_sym [2];

  mimo_tx dut (.clk, .rst_n, .in_valid, .in_ready, .in_bit, .out_valid, .out_first, .out(dout), .overrun,
               .rx_valid, .rx_ready, .rx_sym, .rx_bit_valid, .rx_bit);

  // Receive-side loopback: each antenna's interleaved symbols go straight into
  // its de-interleaver, which must give back the coded bit stream.
  assign rx_valid = {dut.g_ant[1].sym_valid, dut.g_ant[0].sym_valid};
  assign rx_sym[0] = dut.g_ant[0].sym;
  assign rx_sym[1] = dut.g_ant[1].sym;
  int rx_n [2] = '{0, 0};
  int rx_fail = 0, rx_lost = 0;
  for (genvar a = 0; a < 2; a++) begin : g_rx
    always @(posedge clk) if (rst_n) begin
      if (rx_valid[a] && !rx_ready[a]) rx_lost++;
      if (rx_bit_valid[a]) begin
        if (rx_bit[a] !== g_lane[a].lane.coded[rx_n[a]]) begin
          rx_fail++;
          if (rx_fail < 5) $display("antenna %0d de-interleaved bit %0d wrong", a, rx_n[a]);
        end
        rx_n[a] <= rx_n[a] + 1;
      end
    end
  end

  int c_a [2];
  int f_a [2];
  bit d_a [2];
  for (genvar a = 0; a < 2; a++) begin : g_lane
    tx_lane_tb #(.NCPC(NCPC), .NSYM(NSYM)) lane (
      .clk, .rst_n, .in_valid(in_valid[a]), .in_ready(in_ready[a]), .in_bit(in_bit[a]),
      .out_valid(out_valid[a]), .out_first(out_first[a]), .out(dout[a]),
      .checks(c_a[a]), .failures(f_a[a]), .done(d_a[a]));
  end

  // mechanism counters (antenna 0)
  int n_enc_stall = 0, n_il_overlap = 0, n_pilot = 0, n_drain = 0, n_cp = 0;
  longint cyc = 0, t_first_cb = -1, t_first_sym = -1, t_first_out = -1;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (dut.g_ant[0].enc_valid && !dut.g_ant[0].enc_ready) n_enc_stall++;
    if (dut.g_ant[0].u_il.we && dut.g_ant[0].u_il.rd_en) n_il_overlap++;
    if (dut.g_ant[0].bin_valid && dut.g_ant[0].bin_ready &&
        dut.g_ant[0].bin.re == 16'sd16384 && dut.g_ant[0].bin.im == 0) n_pilot++;
    if (dut.g_ant[0].u_ifft.adv && !dut.g_ant[0].u_ifft.take) n_drain++;
    if (out_valid[0]) n_cp++;
    if (t_first_out < 0 && out_valid[0]) t_first_out <= cyc;
    if (t_first_cb < 0 && dut.g_ant[0].cb_valid && dut.g_ant[0].cb_ready) t_first_cb <= cyc;
    if (t_first_sym < 0 && dut.g_ant[0].sym_valid) t_first_sym <= cyc;
  end

  task automatic need(int count, string what, inout int checks, inout int failures);
    checks++;
    if (count == 0) begin failures++; $display("mechanism never happened: %s", what); end
    else $display("%s: %0d", what, count);
  endtask

  initial begin
    int checks, failures;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    wait (d_a[0] && d_a[1]);
    wait (rx_n[0] == NSYM * 192 * NCPC && rx_n[1] == NSYM * 192 * NCPC);
    checks = c_a[0] + c_a[1] + rx_n[0] + rx_n[1] + 1;
    failures = f_a[0] + f_a[1] + rx_fail;
    if (rx_lost != 0) begin failures++; $display("de-interleaver refused %0d symbols", rx_lost); end
    need(n_enc_stall, "encoder stalled by puncturer", checks, failures);
    need(n_il_overlap, "interleaver write/read overlap", checks, failures);
    need(n_pilot, "pilot bins", checks, failures);
    need(n_drain, "IFFT drain cycles", checks, failures);
    need(n_cp, "transmitted samples", checks, failures);
    checks++;
    if (t_first_sym - t_first_cb != 192 * NCPC - 1 + NCPC + 2) begin
      failures++;
      $display("interleaver initial latency %0d cycles", t_first_sym - t_first_cb);
    end else $display("interleaver initial latency %0d cycles", t_first_sym - t_first_cb);
    $display("first transmitted sample %0d cycles after the first coded bit", t_first_out - t_first_cb);
    checks++;
    if (overrun != 0) begin failures++; $display("data dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_a[0] + c_a[1], f_a[0] + f_a[1] + 1);
    $finish;
  end
endmodule
