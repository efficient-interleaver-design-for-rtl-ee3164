// 802.16 bit interleaver for one modulation, built from NCPC one-bit RAM banks
// and an address generator (the 64-QAM instance has six banks).
//
// Coded bits arrive one per cycle at most (in_valid/in_ready). They are
// gathered NCPC at a time and written to all banks at once at one shared
// address, bit k of the block going to bank k%NCPC. When a whole block of
// NCBPS bits is stored, the address generator reads it back column by column,
// one bit per cycle, NCPC successive addresses from the same bank per
// modulation symbol, and places each bit at its position after the second
// permutation. One symbol of NCPC bits leaves on out_sym with a one-cycle
// out_valid; out_sym[NCPC-1] is the first bit of the symbol (the constellation
// MSB). Each bank is double sized: while one block is read, the next one is
// written, so after the first block there is no gap in the output stream.
//
// Timing: the last bit of a block is written in cycle t; its first read
// address is issued in t+1, the RAM answers one cycle after each address and
// the first symbol is out_valid in t+2+NCPC. A symbol then follows every NCPC
// cycles. in_ready
// drops only when both halves hold unread blocks, which cannot happen while
// the input rate stays at one bit per cycle or below.
// The bank structure, shared write address and column-wise read follow the
// document; the valid/ready handshake and bit order on the ports are this
// design's choice.
module interleaver #(
  parameter int unsigned NCPC  = 6,      // 1 BPSK, 2 QPSK, 4 16-QAM, 6 64-QAM
  parameter int unsigned NCBPS = 1152,   // block size, Table I (16 subchannels)
  localparam int unsigned BW   = (NCPC > 1) ? $clog2(NCPC) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_bit,
  output logic            out_valid,
  output logic [NCPC-1:0] out_sym
);
  localparam int unsigned DEPTH = 2 * NCBPS / NCPC;
  localparam int unsigned AW    = $clog2(DEPTH);

  // Gather NCPC input bits into one write word (word[b] = bank b).
  logic [NCPC-1:0] word;
  logic [BW-1:0]   wcnt;
  logic            wr_req, wr_ok, we;
  logic [AW-1:0]   waddr;
  logic [NCPC-1:0] wdata;

  assign wr_req   = in_valid && (wcnt == BW'(NCPC - 1));
  assign in_ready = wr_ok;

  always_comb begin
    wdata = word;
    wdata[NCPC-1] = in_bit;     // bank NCPC-1 takes the bit arriving now
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt <= '0;
    end else if (in_valid && in_ready) begin
      word[wcnt] <= in_bit;
      wcnt <= (wcnt == BW'(NCPC - 1)) ? '0 : wcnt + 1'b1;
    end
  end

  logic          rd_en, rd_last;
  logic [BW-1:0] rd_bank, rd_pos;
  logic [AW-1:0] raddr;

  il_addr_gen #(.NCPC(NCPC), .NCBPS(NCBPS)) u_agen (
    .clk, .rst_n, .wr_req, .wr_ok, .we, .waddr,
    .rd_en, .rd_bank, .raddr, .rd_pos, .rd_last
  );

  logic [NCPC-1:0] rdata;

  for (genvar b = 0; b < NCPC; b++) begin : g_bank
    il_ram #(.DEPTH(DEPTH)) u_ram (
      .clk,
      .we    (we),
      .waddr (waddr),
      .wdata (wdata[b]),
      .re    (rd_en && rd_bank == BW'(b)),
      .raddr (raddr),
      .rdata (rdata[b])
    );
  end

  // One cycle of RAM latency: remember which bank answered and where its bit goes.
  logic          p_valid, p_last;
  logic [BW-1:0] p_bank, p_pos;
  logic [NCPC-1:0] sym;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      p_last    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      p_valid   <= rd_en;
      p_last    <= rd_last;
      out_valid <= p_valid && p_last;
    end
    p_bank <= rd_bank;
    p_pos  <= rd_pos;
  end

  // Assemble the symbol; position 0 (first bit out) is the MSB.
  logic [NCPC-1:0] sym_next;
  always_comb begin
    sym_next = sym;
    sym_next[NCPC-1-int'(p_pos)] = rdata[p_bank];
  end

  always_ff @(posedge clk) begin
    if (p_valid) sym <= sym_next;
    if (p_valid && p_last) out_sym <= sym_next;
  end
endmodule
