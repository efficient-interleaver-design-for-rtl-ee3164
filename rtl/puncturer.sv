// Puncturing and serialisation of the encoder output. With RATE34 = 1 the
// 802.16 rate-3/4 pattern is applied over three encoder pairs: X1 Y1 Y2 X3
// are sent and X2, Y3 are dropped (QPSK, 16-QAM and 64-QAM). With RATE34 = 0
// nothing is punctured and every pair is sent as X then Y (BPSK, rate 1/2).
// The kept bits leave one per cycle on a valid/ready serial interface, which
// feeds the interleaver. A new pair is loaded as the last bit of the previous
// one leaves, so a continuous coded stream has no bubbles.
// Interface: in_valid/in_ready/in_x/in_y from the encoder;
// out_valid/out_ready/out_bit to the interleaver.
// The rates per modulation are the document's; the puncturing pattern and
// bit order are those of the standard it implements; the handshake is this
// design's choice.
module puncturer #(
  parameter bit RATE34 = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_x,
  input  logic in_y,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit
);
  logic [1:0] q;       // bits still to send, q[0] first
  logic [1:0] n;       // how many of them
  logic [1:0] phase;   // position in the 3-pair puncturing period

  assign out_valid = (n != 2'd0);
  assign out_bit   = q[0];
  assign in_ready  = (n == 2'd0) || (n == 2'd1 && out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n     <= '0;
      phase <= '0;
    end else if (in_valid && in_ready) begin
      if (!RATE34 || phase == 2'd0) begin
        q <= {in_y, in_x};  n <= 2'd2;       // X1 Y1 (or X Y at rate 1/2)
      end else if (phase == 2'd1) begin
        q <= {1'b0, in_y};  n <= 2'd1;       // Y2
      end else begin
        q <= {1'b0, in_x};  n <= 2'd1;       // X3
      end
      if (RATE34) phase <= (phase == 2'd2) ? 2'd0 : phase + 2'd1;
    end else if (out_valid && out_ready) begin
      q <= {1'b0, q[1]};
      n <= n - 2'd1;
    end
  end
endmodule
