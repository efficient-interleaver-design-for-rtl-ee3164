// Self-checking test of cyclic prefix insertion at 256 points with a
// 64-sample prefix. Three symbols are written in bit-reversed order (as the
// IFFT delivers them); the second is written while the first is being read.
// Each output symbol must be 320 samples: time samples 192..255 then 0..255,
// with out_first on the first one and no gap inside a symbol. The idle flag
// must be low while anything is buffered and high at the end.
module tb_cp_insert;
  import tx_pkg::*;
  localparam int LOGN = 8;
  localparam int N = 1 << LOGN;
  localparam int NCPL = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, out_valid, out_first, idle;
  logic [LOGN-1:0] in_addr = '0;
  cplx_t din = '0, dout;
  cp_insert #(.LOGN(LOGN), .NCPL(NCPL)) dut (.clk, .rst_n, .in_valid, .in_addr, .in(din),
    .out_valid, .out_first, .out(dout), .idle);

  cplx_t sym [3][N];
  int so = 0, io = 0;
  longint last_out_cyc = 0, cyc = 0;
  int overlap = 0;

  function automatic logic [LOGN-1:0] brev(logic [LOGN-1:0] v);
    for (int i = 0; i < LOGN; i++) brev[i] = v[LOGN-1-i];
  endfunction

  initial
    for (int s = 0; s < 3; s++)
      for (int n = 0; n < N; n++) sym[s][n] = cplx_t'($urandom);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && in_valid && out_valid) overlap++;
    if (rst_n && out_valid) begin
      int n;
      n = (io < NCPL) ? N - NCPL + io : io - NCPL;
      checks++;
      if (dout !== sym[so][n] || out_first !== (io == 0)) begin
        failures++;
        if (failures < 8) $display("sym %0d out %0d got %h exp %h first %b", so, io, dout, sym[so][n], out_first);
      end
      if (io > 0) begin
        checks++;
        if (cyc != last_out_cyc + 1) begin failures++; $display("gap inside a symbol"); end
      end
      last_out_cyc <= cyc;
      if (io == N + NCPL - 1) begin io <= 0; so <= so + 1; end
      else io <= io + 1;
    end
    if (rst_n && (in_valid || out_valid)) begin
      checks++;
      if (idle && out_valid) begin failures++; $display("idle while sending"); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      if (s == 2) begin wait (so == 2); @(negedge clk); end
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_addr = brev(LOGN'(i)); din = sym[s][brev(LOGN'(i))];
        @(negedge clk);
      end
      in_valid = 0;
      if (s == 0) repeat (30) @(negedge clk);
    end
    wait (so == 3);
    repeat (3) @(negedge clk);
    checks++;
    if (!idle) begin failures++; $display("not idle at the end"); end
    checks++;
    if (overlap == 0) begin failures++; $display("write and read never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
