// One modulation branch of the transmitter (the blocks labelled BPSK, QPSK,
// 16-QAM and 64-QAM in the system diagram), built as cross-antenna coding
// with per-antenna interleaving.
//
// A single convolutional encoder codes the whole input bit stream. The
// puncturer turns its X and Y outputs into one NBPSC-bit word per antenna
// stream (x and y). Each stream has its own interleaver (NCBPS = 192*NBPSC
// bits per OFDM symbol) and its own constellation mapper, giving the
// complex symbol streams chx (antenna x) and chy (antenna y).
//
// Interface: in_valid/in_bit is the information bit stream, at most one bit
// per clock. out_valid marks one data-subcarrier symbol on both antennas at
// once (chx_i/chx_q and chy_i/chy_q); 192 of them make one OFDM symbol.
// Per 192 symbols the branch consumes 384*NBPSC*R input bits, with code rate
// R = 1/2 for BPSK and 3/4 otherwise: 192, 576, 1152 or 1728. overflow is
// set when an interleaver half is overwritten before being read.
module mod_chain
  import ofdm_tx_pkg::sample_t, ofdm_tx_pkg::NDATA;
#(
  parameter int unsigned NBPSC = 6
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_bit,
  output logic    out_valid,
  output sample_t chx_i,
  output sample_t chx_q,
  output sample_t chy_i,
  output sample_t chy_q,
  output logic    overflow
);
  logic             enc_v, enc_x, enc_y;
  logic             pun_v;
  logic [NBPSC-1:0] pun_x, pun_y;
  logic             ix_v, iy_v, ovf_x, ovf_y, my_v;
  logic [NBPSC-1:0] ix_sym, iy_sym;

  conv_encoder u_enc (
    .clk, .rst_n,
    .in_valid (in_valid), .in_bit (in_bit),
    .out_valid(enc_v), .x(enc_x), .y(enc_y)
  );

  puncturer #(.NBPSC(NBPSC)) u_punct (
    .clk, .rst_n,
    .in_valid (enc_v), .x(enc_x), .y(enc_y),
    .out_valid(pun_v), .x_word(pun_x), .y_word(pun_y)
  );

  interleaver #(.NBPSC(NBPSC), .HALF(NDATA)) u_ilv_x (
    .clk, .rst_n,
    .in_valid (pun_v), .in_word(pun_x),
    .sym_valid(ix_v), .sym(ix_sym), .overflow(ovf_x)
  );

  interleaver #(.NBPSC(NBPSC), .HALF(NDATA)) u_ilv_y (
    .clk, .rst_n,
    .in_valid (pun_v), .in_word(pun_y),
    .sym_valid(iy_v), .sym(iy_sym), .overflow(ovf_y)
  );

  constellation_mapper #(.NBPSC(NBPSC)) u_map_x (
    .clk, .rst_n,
    .in_valid (ix_v), .sym(ix_sym),
    .out_valid(out_valid), .i(chx_i), .q(chx_q)
  );

  constellation_mapper #(.NBPSC(NBPSC)) u_map_y (
    .clk, .rst_n,
    .in_valid (iy_v), .sym(iy_sym),
    .out_valid(my_v), .i(chy_i), .q(chy_q)
  );

  assign overflow = ovf_x | ovf_y;

  // Both interleavers see the same write timing, so their outputs line up.
  always_ff @(posedge clk) begin
    if (rst_n) assert (my_v == out_valid) else $error("mod_chain: antenna streams out of step");
  end
endmodule
