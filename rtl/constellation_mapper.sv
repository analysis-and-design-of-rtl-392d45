// Constellation mapper: BPSK, QPSK, 16-QAM or 64-QAM (set by NBPSC).
//
// Two ROMs of 2^NBPSC words, one for I and one for Q, hold the precomputed
// constellation points as signed 16-bit values with 14 fractional bits
// (Q2.14). The symbol is the ROM address. The ROM contents are computed at
// elaboration from the level tables below, with the 802.16 power
// normalisation (1, 1/sqrt(2), 1/sqrt(10), 1/sqrt(42)).
//
// Bit assignment (MSB = first interleaver bit): the first half of the bits
// sets I, the second half Q (BPSK: I only, Q = 0). On each axis the first
// bit is the sign (0 = positive) and the remaining bits Gray-code the
// magnitude from the centre outwards (16-QAM: 0->1, 1->3; 64-QAM:
// 00->1, 01->3, 11->5, 10->7), so neighbouring points differ in one bit.
// The two-ROM structure and the Q2.14 format follow the document; the exact
// bit-to-point assignment is this design's choice.
//
// Interface: in_valid/sym in, out_valid/i/q one cycle later.
module constellation_mapper
  import ofdm_tx_pkg::sample_t;
#(
  parameter int unsigned NBPSC = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NBPSC-1:0] sym,
  output logic             out_valid,
  output sample_t          i,
  output sample_t          q
);
  localparam int unsigned NPTS = 1 << NBPSC;
  localparam int unsigned AXW  = (NBPSC > 1) ? NBPSC / 2 : 1;

  // Magnitude in Q2.14 for a Gray-coded magnitude field
  function automatic int axis_level(int unsigned g);
    case (NBPSC)
      1: return 16384;                     // 1
      2: return 11585;                     // 1/sqrt(2)
      4: return (g == 0) ? 5181 : 15543;   // {1,3}/sqrt(10)
      default:
        case (g)
          0: return 2528;                  // 1/sqrt(42)
          1: return 7584;                  // 3/sqrt(42)
          3: return 12641;                 // 5/sqrt(42)
          default: return 17697;           // 7/sqrt(42)
        endcase
    endcase
  endfunction

  function automatic sample_t axis_value(int unsigned bits);
    int unsigned sgn, mag;
    int lvl;
    sgn = (bits >> (AXW - 1)) & 1;
    mag = bits & ((1 << (AXW - 1)) - 1);
    lvl = axis_level(mag);
    return sample_t'((sgn != 0) ? -lvl : lvl);
  endfunction

  function automatic sample_t rom_i_val(int unsigned a);
    if (NBPSC == 1) return axis_value(a);
    return axis_value(a >> AXW);
  endfunction

  function automatic sample_t rom_q_val(int unsigned a);
    if (NBPSC == 1) return '0;
    return axis_value(a & ((1 << AXW) - 1));
  endfunction

  sample_t rom_i [NPTS];
  sample_t rom_q [NPTS];

  for (genvar a = 0; a < NPTS; a++) begin : g_rom
    assign rom_i[a] = rom_i_val(a);
    assign rom_q[a] = rom_q_val(a);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      i         <= '0;
      q         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i <= rom_i[sym];
        q <= rom_q[sym];
      end
    end
  end
endmodule
