// 802.16 bit de-interleaver, the mirror of the interleaver: the same NCPC
// one-bit RAM banks and the same counters, with the write and read orders
// swapped. A received symbol of NCPC bits (in_sym[NCPC-1] = first bit) is
// written one bit per cycle into one bank, down a column of the 12-column
// block matrix: bank c%NCPC, offsets c/NCPC + r*(12/NCPC), each bit taken from
// its place after the second permutation, so the stored matrix is exactly the
// one the transmitter's interleaver held. When a block of NCBPS bits is
// complete, all banks are read at one shared address and each word of NCPC
// bits is sent out one bit per cycle, bank 0 first, which restores the
// original coded-bit order k. Equivalently it applies
// m_j = s*floor(j/s) + (j + floor(12j/NCBPS)) mod s and
// k_j = 12*m_j - (NCBPS-1)*floor(12*m_j/NCBPS).
// Double buffering as in the interleaver: each bank holds two blocks.
// Interface: in_valid/in_ready/in_sym (one symbol per NCPC cycles is
// sustained); out_valid/out_bit (no backpressure). Latency: the first bit of
// a block leaves two cycles after its last bit is written.
// That the de-interleaver reuses the interleaver's technique with reversed
// orders is the document's; the handshake and serial output are this
// design's choices.
module deinterleaver #(
  parameter int unsigned NCPC  = 6,
  parameter int unsigned NCBPS = 1152,
  localparam int unsigned BW   = (NCPC > 1) ? $clog2(NCPC) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [NCPC-1:0] in_sym,
  output logic            out_valid,
  output logic            out_bit
);
  localparam int unsigned HALF  = NCBPS / NCPC;
  localparam int unsigned DEPTH = 2 * HALF;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned ROWS  = NCBPS / 12;
  localparam int unsigned INC   = 12 / NCPC;
  localparam int unsigned S     = (NCPC + 1) / 2;
  localparam int unsigned RW    = $clog2(ROWS);
  localparam int unsigned OW    = $clog2(HALF);

  logic [1:0] full;

  // ---------------- column-wise write side ----------------
  logic [NCPC-1:0] held;
  logic            have;
  logic            wr_half;
  logic [RW-1:0]   row;
  logic [3:0]      col;
  logic [BW-1:0]   bank, rpos, pos;
  logic [OW-1:0]   base, off;
  logic [1:0]      cmod;
  logic            wstep, sym_end, col_end, blk_end;

  assign wstep    = have && !full[wr_half];
  assign sym_end  = (rpos == BW'(NCPC - 1));
  assign in_ready = !have || (wstep && sym_end);
  assign col_end  = (row == RW'(ROWS - 1));
  assign blk_end  = col_end && (col == 4'd11);

  always_comb begin
    int unsigned g, u, v;
    g = int'(rpos) / S;
    u = int'(rpos) % S;
    v = (u + S - int'(cmod)) % S;
    pos = BW'(g * S + v);
  end

  logic [AW-1:0] waddr;
  logic          wbit;
  assign waddr = AW'(wr_half) * AW'(HALF) + AW'(off);
  assign wbit  = held[NCPC-1-int'(pos)];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      have    <= 1'b0;
      wr_half <= 1'b0;
      row     <= '0;
      col     <= '0;
      bank    <= '0;
      base    <= '0;
      off     <= '0;
      rpos    <= '0;
      cmod    <= '0;
    end else begin
      if (in_valid && in_ready) begin
        held <= in_sym;
        have <= 1'b1;
      end else if (wstep && sym_end) begin
        have <= 1'b0;
      end
      if (wstep) begin
        rpos <= sym_end ? '0 : rpos + 1'b1;
        if (!col_end) begin
          row <= row + 1'b1;
          off <= off + OW'(INC);
        end else begin
          row  <= '0;
          cmod <= (cmod == 2'(S - 1)) ? '0 : cmod + 1'b1;
          if (blk_end) begin
            col     <= '0;
            bank    <= '0;
            base    <= '0;
            off     <= '0;
            cmod    <= '0;
            wr_half <= !wr_half;
          end else begin
            col <= col + 1'b1;
            if (bank == BW'(NCPC - 1)) begin
              bank <= '0;
              base <= base + 1'b1;
              off  <= base + 1'b1;
            end else begin
              bank <= bank + 1'b1;
              off  <= base;
            end
          end
        end
      end
    end
  end

  // ---------------- row-wise read side ----------------
  logic          rd_half, rd_on, issue, rd_done;
  logic [OW-1:0] rd_off;
  logic [BW-1:0] sub;
  logic [NCPC-1:0] rdata;

  assign issue   = full[rd_half] && (!rd_on || sub == BW'(NCPC - 1));
  assign rd_done = issue && (rd_off == OW'(HALF - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_half <= 1'b0;
      rd_off  <= '0;
      rd_on   <= 1'b0;
      sub     <= '0;
    end else begin
      if (issue) begin
        rd_off <= rd_done ? '0 : rd_off + 1'b1;
        if (rd_done) rd_half <= !rd_half;
      end
      if (rd_on) sub <= (sub == BW'(NCPC - 1)) ? '0 : sub + 1'b1;
      if (issue)                          rd_on <= 1'b1;
      else if (sub == BW'(NCPC - 1))      rd_on <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= '0;
    end else begin
      if (wstep && blk_end) full[wr_half] <= 1'b1;
      if (rd_done)          full[rd_half] <= 1'b0;
    end
  end

  for (genvar b = 0; b < NCPC; b++) begin : g_bank
    il_ram #(.DEPTH(DEPTH)) u_ram (
      .clk,
      .we    (wstep && bank == BW'(b)),
      .waddr (waddr),
      .wdata (wbit),
      .re    (issue),
      .raddr (AW'(rd_half) * AW'(HALF) + AW'(rd_off)),
      .rdata (rdata[b])
    );
  end

  assign out_valid = rd_on;
  assign out_bit   = rdata[sub];
endmodule
