// Cyclic prefix insertion. The IFFT delivers the 256 time samples of an OFDM
// symbol in bit-reversed order, each with its time index; they are written at
// that index into one half of a double buffer, which also undoes the
// bit-reversed order. Once a half holds a whole symbol, it is read out as
// NCP + NFFT samples: the last NCP samples (the cyclic prefix) and then all
// NFFT samples in time order, one per cycle, while the other half fills.
// With NCP = 64 and NFFT = 256 this gives the 320-sample symbol of the
// document (guard time Tg = Tb/4).
// Interface: in_valid/in_addr/in (no backpressure: the source must not
// overrun, see idle); out_valid/out, out_first marking the first prefix
// sample of each symbol. idle is high when no sample is buffered and no symbol
// is being written or read; the modulator starts an IFFT frame only then,
// which guarantees that no half is overwritten before it is read.
// Timing: the first output sample appears two cycles after the last sample
// of a symbol is written (one cycle to start, one of RAM read latency).
// The 320-sample output is the document's; the buffer organisation is this
// design's choice.
module cp_insert
  import tx_pkg::*;
#(
  parameter int unsigned LOGN = 8,            // log2 of the IFFT size (256)
  parameter int unsigned NCPL = NCP           // cyclic prefix length (64)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [LOGN-1:0] in_addr,
  input  cplx_t           in,
  output logic            out_valid,
  output logic            out_first,
  output cplx_t           out,
  output logic            idle
);
  localparam int unsigned N  = 1 << LOGN;
  localparam int unsigned NO = N + NCPL;
  localparam int unsigned OW = $clog2(NO);

  cplx_t mem [2*N];

  logic          wr_half, rd_half;
  logic [LOGN:0] wr_cnt;
  logic [1:0]    full;
  logic          rd_active;
  logic [OW-1:0] rd_cnt;

  assign idle = (full == '0) && (wr_cnt == '0) && !rd_active && !out_valid;

  // write side
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_half <= 1'b0;
      wr_cnt  <= '0;
    end else if (in_valid) begin
      if (wr_cnt == (LOGN+1)'(N - 1)) begin
        wr_cnt  <= '0;
        wr_half <= !wr_half;
      end else begin
        wr_cnt  <= wr_cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wr_half, in_addr}] <= in;
  end

  // read side: sample index N-NCPL .. N-1, then 0 .. N-1
  logic [LOGN-1:0] rd_addr;
  assign rd_addr = (rd_cnt < OW'(NCPL)) ? LOGN'(N - NCPL + rd_cnt) : LOGN'(rd_cnt - OW'(NCPL));

  logic rd_last;
  assign rd_last = rd_active && (rd_cnt == OW'(NO - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_half   <= 1'b0;
      rd_cnt    <= '0;
      full      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      if (in_valid && wr_cnt == (LOGN+1)'(N - 1)) full[wr_half] <= 1'b1;
      if (!rd_active && full[rd_half]) begin
        rd_active <= 1'b1;
        rd_cnt    <= '0;
      end else if (rd_active) begin
        if (rd_last) begin
          rd_active     <= 1'b0;
          full[rd_half] <= 1'b0;
          rd_half       <= !rd_half;
        end
        rd_cnt <= rd_cnt + 1'b1;
      end
      out_valid <= rd_active;
      out_first <= rd_active && (rd_cnt == '0);
    end
  end

  always_ff @(posedge clk) begin
    if (rd_active) out <= mem[{rd_half, rd_addr}];
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_valid && wr_cnt == (LOGN+1)'(N - 1)) |-> !full[wr_half])
    else $error("cyclic prefix buffer overrun");
endmodule
