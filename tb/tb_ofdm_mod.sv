// Self-checking test of the OFDM modulator front end (data double buffer and
// subcarrier allocation). Block 1 is written with random gaps and read out
// under random backpressure. Then the sink is held busy while blocks 2 and 3
// fill both halves; one more point must raise the overrun flag and no frame
// may start until sink_idle returns. Every frame of 256 bins is compared with
// an independently built carrier map: data on subcarriers -100..100 except DC
// and the pilots at +-13, +-38, +-63, +-88, in ascending order, bin b holding
// subcarrier b (b < 128) or b - 256.
module tb_ofdm_mod;
  import tx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid, out_ready = 0, sink_idle = 1, overrun;
  cplx_t din = '0, dout;
  ofdm_mod dut (.clk, .rst_n, .in_valid, .in(din), .out_valid, .out_ready, .out(dout), .sink_idle, .overrun);

  cplx_t blk [4][NDATA];
  int sc_to_data [-128:127];
  int fr = 0, bi = 0;
  bit rnd_ready = 1;
  int early_out = 0;

  function automatic bit is_pilot(int sc);
    return sc == 13 || sc == -13 || sc == 38 || sc == -38 || sc == 63 || sc == -63 || sc == 88 || sc == -88;
  endfunction

  initial begin
    int d;
    d = 0;
    for (int sc = -128; sc < 128; sc++) begin
      sc_to_data[sc] = -1;
      if (sc >= -100 && sc <= 100 && sc != 0 && !is_pilot(sc)) begin sc_to_data[sc] = d; d++; end
    end
    checks++;
    if (d != NDATA) begin failures++; $display("carrier map has %0d data carriers", d); end
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < NDATA; i++) begin
        blk[b][i].re = sample_t'($urandom);
        blk[b][i].im = sample_t'($urandom);
      end
  end

  // output checker: frames arrive in block order 0, 1, 2
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int sc;
    cplx_t e;
    sc = (bi < 128) ? bi : bi - 256;
    if (sc_to_data[sc] >= 0)  e = blk[fr][sc_to_data[sc]];
    else if (is_pilot(sc))    e = '{re: 16'sd16384, im: 16'sd0};
    else                      e = '0;
    checks++;
    if (dout !== e) begin
      failures++;
      if (failures < 8) $display("frame %0d bin %0d got %h exp %h", fr, bi, dout, e);
    end
    if (!sink_idle) early_out++;
    if (bi == 255) begin bi <= 0; fr <= fr + 1; end
    else bi <= bi + 1;
  end

  always @(negedge clk) out_ready <= !rnd_ready || ($urandom_range(0, 3) != 0);

  task automatic write_block(int b, bit gaps);
    for (int i = 0; i < NDATA; i++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; din = blk[b][i];
      @(negedge clk);
    end
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    write_block(0, 1);
    wait (fr == 1);
    @(negedge clk);
    sink_idle = 0;
    write_block(1, 0);
    write_block(2, 1);
    checks++;
    if (overrun) begin failures++; $display("overrun too early"); end
    in_valid = 1; din = blk[3][0];
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (!overrun) begin failures++; $display("overrun not flagged"); end
    repeat (20) @(negedge clk);
    checks++;
    if (fr != 1 || bi != 0) begin failures++; $display("frame started while sink busy"); end
    sink_idle = 1;
    wait (fr == 3);
    checks++;
    if (early_out != 0) begin failures++; $display("%0d bins sent while sink busy", early_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
