// Self-checking test of one interleaver RAM bank at its default depth (384):
// fills it with random bits, reads every address back (one-cycle read
// latency), checks that a read and a write to the same address in one cycle
// return the old bit, and that the output holds while re is low.
module tb_il_ram;
  localparam int DEPTH = 384;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we = 0, wdata = 0, re = 0, rdata;
  logic [AW-1:0] waddr = '0, raddr = '0;
  bit ref_mem [DEPTH];

  il_ram #(.DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  task automatic check(bit exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 6) $display("%s: got %b exp %b", what, rdata, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = AW'(a); wdata = 1'($urandom); ref_mem[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      re = 1; raddr = AW'(a);
      @(negedge clk);
      check(ref_mem[a], "readback");
    end
    // read-during-write to the same address returns the old value
    for (int i = 0; i < 50; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      we = 1; re = 1; waddr = AW'(a); raddr = AW'(a); wdata = !ref_mem[a];
      @(negedge clk);
      check(ref_mem[a], "read-during-write");
      ref_mem[a] = !ref_mem[a];
    end
    we = 0;
    // hold while re is low
    re = 1; raddr = 0; @(negedge clk);
    re = 0;
    for (int i = 0; i < 5; i++) begin
      raddr = AW'($urandom_range(1, DEPTH - 1));
      @(negedge clk);
      check(ref_mem[0], "hold");
    end
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
