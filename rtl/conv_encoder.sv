// Rate-1/2, constraint-length-7 convolutional encoder.
//
// A 6-bit shift register holds the six previous input bits. Each accepted
// input bit produces two coded bits, X and Y, as modulo-2 sums (XOR) of the
// current bit and selected register taps. The taps are the IEEE 802.16
// generators: G1 = 171 (octal) for X and G2 = 133 (octal) for Y; the document
// fixes K=7, the 6-bit register and the XOR construction, while the exact
// polynomials are taken from the standard it cites.
//
// Interface: in_valid/in_bit are sampled on the rising clock edge; one cycle
// later out_valid is high with the coded pair (x, y). No back-pressure: one
// input bit may be accepted every cycle. Reset (active low, synchronous)
// clears the register to the all-zero state; there is no tail handling, the
// encoder runs continuously over the bit stream.
module conv_encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic x,
  output logic y
);
  // sr[0] is the most recent past bit, sr[5] the oldest
  logic [5:0] sr;
  logic       x_c, y_c;

  // G1 = 171 octal = 1 111 001: current, d1, d2, d3, d6
  // G2 = 133 octal = 1 011 011: current, d2, d3, d5, d6
  always_comb begin
    x_c = in_bit ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[5];
    y_c = in_bit ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr        <= '0;
      out_valid <= 1'b0;
      x         <= 1'b0;
      y         <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sr <= {sr[4:0], in_bit};
        x  <= x_c;
        y  <= y_c;
      end
    end
  end
endmodule
