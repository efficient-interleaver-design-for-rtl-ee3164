// Rate-1/2 convolutional encoder of the 802.16 OFDM PHY: constraint length 7,
// generator polynomials 171 (octal, output X) and 133 (octal, output Y),
// built from a 6-bit shift register and XOR gates. Each accepted data bit
// produces one (X, Y) pair, held in an output register until taken.
// Interface: in_valid/in_ready/in_bit, out_valid/out_ready/out_x/out_y
// (valid/ready handshakes; a pair can be taken and a new bit accepted in the
// same cycle, so one bit per cycle is sustained). Latency: one cycle.
// The shift-register-and-XOR structure is the document's; the polynomials are
// those of the standard it implements; the handshake and the reset to the
// all-zero state (no tail or tail-biting handling) are this design's choices.
module conv_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_x,
  output logic out_y
);
  logic [6:1] sr;   // sr[i] = data bit i steps ago

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr        <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        // G1 = 171o = 1111001b: taps at delays 0,1,2,3,6
        out_x     <= in_bit ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[6];
        // G2 = 133o = 1011011b: taps at delays 0,2,3,5,6
        out_y     <= in_bit ^ sr[2] ^ sr[3] ^ sr[5] ^ sr[6];
        sr        <= {sr[5:1], in_bit};
        out_valid <= 1'b1;
      end
    end
  end
endmodule
