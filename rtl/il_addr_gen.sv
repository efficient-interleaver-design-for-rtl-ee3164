// Address generator of the 802.16 block interleaver (the state machine that
// drives the RAM banks of the interleaver).
//
// A block of NCBPS coded bits is viewed as a matrix of 12 columns and
// R = NCBPS/12 rows, written row by row (bit k goes to row k/12, column k%12)
// and read column by column: this is the first permutation
// m = (NCBPS/12)*(k%12) + k/12. The bits are stored in NCPC one-bit banks:
// NCPC consecutive coded bits are written at once, bit k into bank k%NCPC at
// offset k/NCPC, so all banks share one write address. Because 12 is a multiple
// of NCPC, a column c lives entirely in bank c%NCPC, at offsets
// c/NCPC + r*(12/NCPC): a column is read from one bank with a plain increment
// of 12/NCPC (12, 6, 3 or 2), and the columns are taken from bank 0, 1, ...
// in turn. Every R/NCPC run of NCPC consecutive rows of a column makes one
// modulation symbol. The second permutation only moves bits inside groups of
// s = ceil(NCPC/2) bits of a symbol: the bit read from row r is placed at
// position s*g + ((u - c) mod s), u = r%s, g = (r%NCPC)/s, which equals
// j = s*floor(m/s) + (m + NCBPS - floor(12m/NCBPS)) mod s.
//
// Double buffering: each bank holds two blocks (half = top part of the
// address). A half is marked full when its last word is written and released
// when its last read address is issued, so reading a block starts the cycle
// after the block is complete and writing goes on into the other half.
//
// Interface: wr_req asks to write one NCPC-bit word; wr_ok says the half being
// written is free, we = wr_req & wr_ok. Each cycle with rd_en the generator
// issues one read: rd_bank, raddr, and rd_pos (position of that bit in the
// symbol, 0 = first bit out). rd_last marks the last bit of a symbol.
// The write and read address counters are the document's; the bit-position
// output for the second permutation is this design's way of realising eq. (2).
module il_addr_gen #(
  parameter int unsigned NCPC  = 6,      // coded bits per subcarrier: 1,2,4,6
  parameter int unsigned NCBPS = 1152,   // interleaver block size
  localparam int unsigned HALF = NCBPS / NCPC,         // words per block
  localparam int unsigned AW   = $clog2(2 * HALF),     // bank address width
  localparam int unsigned BW   = (NCPC > 1) ? $clog2(NCPC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_req,
  output logic          wr_ok,
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic          rd_en,
  output logic [BW-1:0] rd_bank,
  output logic [AW-1:0] raddr,
  output logic [BW-1:0] rd_pos,
  output logic          rd_last
);
  localparam int unsigned ROWS = NCBPS / 12;
  localparam int unsigned INC  = 12 / NCPC;
  localparam int unsigned S    = (NCPC + 1) / 2;
  localparam int unsigned RW   = $clog2(ROWS);
  localparam int unsigned OW   = $clog2(HALF);

  initial begin
    assert (NCPC == 1 || NCPC == 2 || NCPC == 4 || NCPC == 6)
      else $error("NCPC must be 1, 2, 4 or 6");
    assert (NCBPS % 12 == 0 && ROWS % NCPC == 0)
      else $error("NCBPS must be a multiple of 12*NCPC");
  end

  logic [1:0] full;

  // ---------------- write side ----------------
  logic          wr_half;
  logic [OW-1:0] wr_off;

  assign wr_ok = !full[wr_half];
  assign we    = wr_req && wr_ok;
  assign waddr = AW'(wr_half) * AW'(HALF) + AW'(wr_off);

  logic wr_done;
  assign wr_done = we && (wr_off == OW'(HALF - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_half <= 1'b0;
      wr_off  <= '0;
    end else if (we) begin
      if (wr_done) begin
        wr_off  <= '0;
        wr_half <= !wr_half;
      end else begin
        wr_off  <= wr_off + 1'b1;
      end
    end
  end

  // ---------------- read side ----------------
  logic          rd_half;
  logic [RW-1:0] row;        // row r of the current column
  logic [3:0]    col;        // column c, 0..11
  logic [BW-1:0] bank;       // c % NCPC
  logic [OW-1:0] base;       // c / NCPC: first offset of the column
  logic [OW-1:0] off;        // base + r*INC
  logic [BW-1:0] rpos;       // r % NCPC
  logic [1:0]    cmod;       // c % S

  assign rd_en   = full[rd_half];
  assign rd_bank = bank;
  assign raddr   = AW'(rd_half) * AW'(HALF) + AW'(off);
  assign rd_last = rd_en && (rpos == BW'(NCPC - 1));

  // Second permutation inside a group of S bits: u -> (u - c) mod S.
  always_comb begin
    int unsigned g, u, v;
    g = int'(rpos) / S;
    u = int'(rpos) % S;
    v = (u + S - int'(cmod)) % S;
    rd_pos = BW'(g * S + v);
  end

  logic col_end, blk_end;
  assign col_end = (row == RW'(ROWS - 1));
  assign blk_end = col_end && (col == 4'd11);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_half <= 1'b0;
      row     <= '0;
      col     <= '0;
      bank    <= '0;
      base    <= '0;
      off     <= '0;
      rpos    <= '0;
      cmod    <= '0;
    end else if (rd_en) begin
      rpos <= (rpos == BW'(NCPC - 1)) ? '0 : rpos + 1'b1;
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
          rd_half <= !rd_half;
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

  // Full flags: set by the last write of a block, cleared by the last read.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= '0;
    end else begin
      if (wr_done)           full[wr_half] <= 1'b1;
      if (rd_en && blk_end)  full[rd_half] <= 1'b0;
    end
  end

  // A block can only be completed into a free half.
  assert property (@(posedge clk) disable iff (!rst_n) wr_done |-> !full[wr_half]);
endmodule
