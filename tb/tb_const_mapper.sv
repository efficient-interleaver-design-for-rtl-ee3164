// Self-checking test of the constellation mapper for BPSK, QPSK, 16-QAM and
// 64-QAM (one instance each). Every symbol value is applied; the expected I
// and Q words come from hand-written Gray level tables (first bit = MSB, first
// half of the bits on I) scaled by 1, 1/sqrt(2), 1/sqrt(10), 1/sqrt(42) in
// Q2.14, within one LSB. Also checked: one-cycle latency and unit average
// power of each constellation.
module tb_const_mapper;
  import tx_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit done [4];

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  localparam int CPC [4] = '{1, 2, 4, 6};
  // level of a Gray-coded axis value, indexed by the bits read MSB first
  localparam int L1 [2] = '{-1, 1};
  localparam int L2 [4] = '{-3, -1, 3, 1};
  localparam int L3 [8] = '{-7, -5, -1, -3, 7, 5, 1, 3};

  for (genvar g = 0; g < 4; g++) begin : g_mod
    localparam int NCPC = CPC[g];
    logic in_valid = 0, out_valid;
    logic [NCPC-1:0] in_sym = '0;
    cplx_t dout;
    const_mapper #(.NCPC(NCPC)) dut (.clk, .rst_n, .in_valid, .in_sym, .out_valid, .out(dout));

    initial begin
      real scale, pwr;
      scale = (NCPC == 1) ? 1.0 : (NCPC == 2) ? 0.70710678 : (NCPC == 4) ? 0.31622777 : 0.15430335;
      pwr = 0;
      wait (rst_n);
      @(negedge clk);
      for (int v = 0; v < (1 << NCPC); v++) begin
        int li, lq;
        real ei, eq;
        case (NCPC)
          1: begin li = L1[v]; lq = 0; end
          2: begin li = L1[v >> 1]; lq = L1[v & 1]; end
          4: begin li = L2[v >> 2]; lq = L2[v & 3]; end
          default: begin li = L3[v >> 3]; lq = L3[v & 7]; end
        endcase
        in_valid = 1; in_sym = NCPC'(v);
        @(negedge clk);
        in_valid = 0;
        ei = li * scale * 16384.0; eq = lq * scale * 16384.0;
        checks++;
        if (!out_valid || absr(real'(dout.re) - ei) > 1.0 || absr(real'(dout.im) - eq) > 1.0) begin
          failures++;
          if (failures < 8) $display("ncpc %0d sym %0d got (%0d,%0d) exp (%f,%f) v=%b", NCPC, v, dout.re, dout.im, ei, eq, out_valid);
        end
        pwr += (real'(dout.re) ** 2 + real'(dout.im) ** 2) / (16384.0 * 16384.0);
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("valid held too long"); end
      end
      pwr = pwr / (1 << NCPC);
      checks++;
      if (absr(pwr - 1.0) > 0.001) begin failures++; $display("ncpc %0d power %f", NCPC, pwr); end
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
