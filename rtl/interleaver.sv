// Double-buffered per-antenna block interleaver for one antenna stream.
//
// The coded bits of one OFDM symbol on one antenna (NCBPS = 192*NBPSC bits)
// are written word by word: each NBPSC-bit input word puts one bit into each
// of NBPSC one-bit RAMs at the same address, so coded bit k lands in RAM
// (k mod NBPSC) at address k / NBPSC. Every RAM is 2 x 192 bits deep: one
// half fills while the other is read out. ilv_addr_gen reads a full half
// one bit per cycle, partition by partition, which yields the coded bits in
// the order of the first 802.16 interleaver permutation (12 columns, bit k
// goes to position (NCBPS/12)*(k mod 12) + k/12). NBPSC successive bits
// form one constellation symbol; the first bit read is the symbol's MSB.
//
// When SECOND_PERM is set, the bits of each symbol are also placed by the
// standard's second permutation: inside every group of s = max(NBPSC/2,1)
// bits, the bit read at offset o goes to offset (o - column) mod s. It only
// moves bits inside a symbol (16-QAM and 64-QAM), so the memories and the
// read order stay as described above. The RAM organisation, partitions and
// read order follow the document; the symbol assembly, including the second
// permutation, is this design's own.
//
// Interface: in_valid/in_word come from the puncturer (bit 0 = earliest
// coded bit). sym_valid pulses for one cycle with sym, NBPSC bits, MSB
// first. The first symbol of a block appears a few cycles after the
// block's last input word (the initial latency is one block fill time);
// after that, output keeps pace with input.
module interleaver #(
  parameter int unsigned NBPSC       = 6,
  parameter int unsigned HALF        = 192,  // data subcarriers per OFDM symbol
  parameter bit          SECOND_PERM = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NBPSC-1:0] in_word,
  output logic             sym_valid,
  output logic [NBPSC-1:0] sym,
  output logic             overflow
);
  localparam int unsigned DEPTH = 2 * HALF;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned S     = (NBPSC > 1) ? NBPSC / 2 : 1;

  logic             we;
  logic [AW-1:0]    w_addr, r_addr;
  logic [NBPSC-1:0] re, ram_dout;
  logic [3:0]       rd_col;
  logic [2:0]       rd_pos;

  ilv_addr_gen #(.NBPSC(NBPSC), .HALF(HALF)) u_agen (
    .clk, .rst_n,
    .enable  (in_valid),
    .we, .w_addr, .re, .r_addr, .rd_col, .rd_pos, .overflow
  );

  for (genvar b = 0; b < NBPSC; b++) begin : g_ram
    ilv_bit_ram #(.DEPTH(DEPTH)) u_ram (
      .clk,
      .we     (we),
      .w_addr (w_addr),
      .din    (in_word[b]),
      .re     (re[b]),
      .r_addr (r_addr),
      .dout   (ram_dout[b])
    );
  end

  // Read data arrives one cycle after re: delay the bookkeeping to match.
  logic             rd_v_q;
  logic [NBPSC-1:0] re_q;
  logic [3:0]       col_q;
  logic [2:0]       pos_q;
  logic             bit_q;
  logic [2:0]       slot;
  logic [NBPSC-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_v_q <= 1'b0;
      re_q   <= '0;
      col_q  <= '0;
      pos_q  <= '0;
    end else begin
      rd_v_q <= |re;
      re_q   <= re;
      col_q  <= rd_col;
      pos_q  <= rd_pos;
    end
  end

  assign bit_q = |(ram_dout & re_q);

  // Position of the bit inside its symbol (0 = first out = MSB)
  always_comb begin
    int unsigned grp, off, rot;
    grp = 32'(pos_q) / S;
    off = 32'(pos_q) % S;
    rot = 32'(col_q) % S;
    if (SECOND_PERM) slot = 3'(grp * S + ((off + S - rot) % S));
    else             slot = pos_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      sym       <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (rd_v_q) begin
        if (pos_q == 3'(NBPSC - 1)) begin
          logic [NBPSC-1:0] full_sym;
          full_sym = acc;
          full_sym[NBPSC-1-32'(slot)] = bit_q;
          sym       <= full_sym;
          sym_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc[NBPSC-1-32'(slot)] <= bit_q;
        end
      end
    end
  end
endmodule
