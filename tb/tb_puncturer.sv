// Self-checking test of the puncturer at rate 3/4 and at rate 1/2 (two
// instances). Random encoder pairs are offered with random gaps and random
// backpressure; the expected serial stream is X1 Y1 Y2 X3 per three pairs
// (rate 3/4) or X Y per pair (rate 1/2). In a phase without stalls the
// output must carry one bit every cycle.
module tb_puncturer;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NP = 1200;
  bit done [2];

  for (genvar g = 0; g < 2; g++) begin : g_rate
    localparam bit R34 = (g == 0);
    logic in_valid = 0, in_ready, in_x = 0, in_y = 0, out_valid, out_ready = 0, out_bit;
    puncturer #(.RATE34(R34)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_x, .in_y,
                                   .out_valid, .out_ready, .out_bit);
    bit px [NP];
    bit py [NP];
    bit exp_s [$];
    int nin = 0, nout = 0, busy = 0, free_cycles = 0;
    bit stall_phase = 1;

    initial begin
      for (int i = 0; i < NP; i++) begin
        px[i] = 1'($urandom); py[i] = 1'($urandom);
        if (!R34) begin exp_s.push_back(px[i]); exp_s.push_back(py[i]); end
        else case (i % 3)
          0: begin exp_s.push_back(px[i]); exp_s.push_back(py[i]); end
          1: exp_s.push_back(py[i]);
          default: exp_s.push_back(px[i]);
        endcase
      end
    end

    always @(posedge clk) if (rst_n) begin
      if (in_valid && in_ready) nin <= nin + 1;
      if (!stall_phase && nout < exp_s.size() - 2) begin
        free_cycles++;
        if (out_valid) busy++;
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_bit !== exp_s[nout]) begin
          failures++;
          if (failures < 6) $display("rate%0d bit %0d got %b exp %b", g, nout, out_bit, exp_s[nout]);
        end
        nout <= nout + 1;
        if (nout + 1 == exp_s.size()) done[g] = 1;
      end
    end

    always @(negedge clk) if (rst_n) begin
      in_valid  <= (nin < NP) && (!stall_phase || $urandom_range(0, 2) != 0);
      in_x      <= px[nin < NP ? nin : 0];
      in_y      <= py[nin < NP ? nin : 0];
      out_ready <= !stall_phase || $urandom_range(0, 2) != 0;
      if (nin >= NP / 2) stall_phase <= 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1]);
    for (int g = 0; g < 2; g++) begin
      int b, f;
      b = (g == 0) ? g_rate[0].busy : g_rate[1].busy;
      f = (g == 0) ? g_rate[0].free_cycles : g_rate[1].free_cycles;
      checks++;
      if (f == 0 || b < f - 4) begin failures++; $display("rate%0d: output idle in free phase (%0d of %0d)", g, b, f); end
    end
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
