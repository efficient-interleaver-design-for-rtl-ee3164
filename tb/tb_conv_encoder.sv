// Self-checking test of the K=7 convolutional encoder. 2000 random bits are
// offered with random gaps while the consumer applies random backpressure.
// The expected pairs come from a bit-serial model that takes the parity of
// the 7-bit history masked with the generator polynomials 171 and 133
// (octal). Every bit must give exactly one pair, in order; the test also
// checks the one-bit-per-cycle rate when nothing stalls.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, in_bit = 0, out_valid, out_ready = 0, out_x, out_y;
  conv_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_bit, .out_valid, .out_ready, .out_x, .out_y);

  localparam int NB = 2000;
  bit src [NB];
  bit ex [NB];
  bit ey [NB];
  int nin = 0, nout = 0;
  bit stall_phase = 1;
  longint cyc = 0, t_free0 = 0;

  initial begin
    logic [6:0] h = '0;    // h[0] newest
    for (int i = 0; i < NB; i++) begin
      src[i] = 1'($urandom);
      h = {h[5:0], src[i]};
      // 171 octal = 1 111 001: delays 0,1,2,3,6 ; 133 octal = 1 011 011: delays 0,2,3,5,6
      ex[i] = ^(h & 7'b1001111);
      ey[i] = ^(h & 7'b1101101);
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (in_valid && in_ready) nin <= nin + 1;
      if (out_valid && out_ready) begin
        checks++;
        if (out_x !== ex[nout] || out_y !== ey[nout]) begin
          failures++;
          if (failures < 6) $display("pair %0d got %b%b exp %b%b", nout, out_x, out_y, ex[nout], ey[nout]);
        end
        nout <= nout + 1;
      end
    end
  end

  // drive on the falling edge
  always @(negedge clk) if (rst_n) begin
    int n;
    n = nin;
    in_valid <= (n < NB) && (!stall_phase || $urandom_range(0, 2) != 0);
    in_bit   <= src[n < NB ? n : 0];
    out_ready <= !stall_phase || $urandom_range(0, 2) != 0;
    if (n == NB / 2 && stall_phase) begin stall_phase <= 0; t_free0 <= cyc; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (nout == NB);
    checks++;
    // second half ran without stalls: about one pair per cycle
    if (cyc - t_free0 > NB / 2 + 10) begin failures++; $display("rate too low: %0d cycles", cyc - t_free0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
