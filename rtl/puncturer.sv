// Puncturing of the convolutional code to rate 3/4 and split into the two
// antenna streams.
//
// The X and Y outputs of the encoder are shifted into two registers of
// L = 3*NBPSC/2 bits (3 for QPSK, 6 for 16-QAM, 9 for 64-QAM). After L coded
// pairs the registers are full and the bits marked '1' in the keep patterns
// are sent on: X_PAT = ...101 and Y_PAT = ...110, read from the oldest
// register position (L-1) to the newest (0), which is the 802.16 rate-3/4
// pattern repeated. Each register then yields NBPSC bits: the X register
// forms the symbol word of antenna stream x, the Y register that of antenna
// stream y. With NBPSC = 1 (BPSK) nothing is punctured and every coded pair
// is passed on at once (rate 1/2).
//
// Register lengths and keep patterns follow the document. Sending the X
// register to one antenna and the Y register to the other, and the
// ordering of bits inside a word, are this design's reading of it.
//
// Interface: in_valid/x/y come from the encoder. One cycle after the pair
// that completes a register, out_valid pulses for one cycle with
// x_word/y_word; bit 0 of a word is the earliest kept bit. No back-pressure.
module puncturer #(
  parameter int unsigned NBPSC = 6  // coded bits per subcarrier: 1, 2, 4 or 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             x,
  input  logic             y,
  output logic             out_valid,
  output logic [NBPSC-1:0] x_word,
  output logic [NBPSC-1:0] y_word
);
  localparam int unsigned L  = (NBPSC == 1) ? 1 : (3 * NBPSC) / 2;
  localparam int unsigned CW = (L > 1) ? $clog2(L) : 1;
  localparam logic [8:0] X_PAT9 = 9'b101_101_101;
  localparam logic [8:0] Y_PAT9 = 9'b110_110_110;
  localparam logic [L-1:0] X_PAT = (NBPSC == 1) ? L'(1) : X_PAT9[L-1:0];
  localparam logic [L-1:0] Y_PAT = (NBPSC == 1) ? L'(1) : Y_PAT9[L-1:0];

  initial begin
    assert (NBPSC == 1 || NBPSC == 2 || NBPSC == 4 || NBPSC == 6)
      else $error("puncturer: NBPSC must be 1, 2, 4 or 6");
  end

  logic [L-1:0]    xsr, ysr, xsr_n, ysr_n;
  logic [CW-1:0]   cnt;
  logic [NBPSC-1:0] xsel, ysel;

  always_comb begin
    if (L == 1) begin
      xsr_n = L'(x);
      ysr_n = L'(y);
    end else begin
      xsr_n = L'({xsr, x});
      ysr_n = L'({ysr, y});
    end
    // keep the marked positions, oldest (L-1) first
    xsel = '0;
    ysel = '0;
    begin
      int unsigned jx, jy;
      jx = 0;
      jy = 0;
      for (int p = L - 1; p >= 0; p--) begin
        if (X_PAT[p]) begin
          xsel[jx] = xsr_n[p];
          jx++;
        end
        if (Y_PAT[p]) begin
          ysel[jy] = ysr_n[p];
          jy++;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xsr       <= '0;
      ysr       <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      x_word    <= '0;
      y_word    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        xsr <= xsr_n;
        ysr <= ysr_n;
        if (cnt == CW'(L - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          x_word    <= xsel;
          y_word    <= ysel;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
