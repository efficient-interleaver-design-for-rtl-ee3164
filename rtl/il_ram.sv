// One memory bank of the interleaver: a simple dual-port RAM, one bit wide.
// The bank is twice the size of the part of a block it holds, so one half can
// be read while the other is being written (double buffering); the half is the
// top address bit chosen by the address generator. Write and read use the same
// clock; the read is synchronous, so data appears one cycle after the address,
// which lets a synthesis tool map the array onto distributed or block RAM.
// Interface: write port (we, waddr, wdata) and read port (re, raddr, rdata).
// A read and a write to the same address in one cycle return the old bit.
module il_ram #(
  parameter int unsigned DEPTH = 384,   // 2 x 192 bits: Table II per-antenna size
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
