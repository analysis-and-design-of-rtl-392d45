// Subcarrier assembly for one antenna: inserts pilots, DC and guard
// (null) subcarriers around the 192 data symbols of an OFDM symbol and
// streams the 256 frequency-domain values into the IFFT.
//
// When both the I and the Q double buffer hold a full half (data_ready),
// the block walks the IFFT input bins n = 0..255 in natural order. Bin n is
// subcarrier k = n for n < 128 and k = n - 256 otherwise. Subcarriers
// -128..-101 and +101..+127 are guard bands (zero), k = 0 is DC (zero),
// k = +-13, +-38, +-63, +-88 carry a pilot (+1.0 + j0), and the other 192
// carry the data symbols, the lowest subcarrier (k = -100) taking data
// symbol 0 and the highest (k = +100) data symbol 191. After the last data
// read the half is released back to the buffers.
//
// The counts (192 data, 8 pilots, 1 DC, 55 null, 256 bins) follow the
// document. The subcarrier positions are those of the 802.16 OFDM PHY,
// which the document cites. The constant pilot value (no pilot
// polarity sequence) and the natural bin order are this design's choices.
//
// Timing: one bin per clock for 256 clocks. A new symbol is not started
// sooner than SYM_PERIOD clocks after the previous one, so that the
// cyclic-prefix stage, which sends NFFT+NCP = 320 samples per symbol, keeps
// up. Output samples follow the buffer read by one clock: out_valid with
// out_sop on bin 0.
module pilot_insertion
  import ofdm_tx_pkg::*;
#(
  parameter int unsigned SYM_PERIOD = NFFT + NCP
) (
  input  logic       clk,
  input  logic       rst_n,
  // double-buffer read side (shared by the I and Q buffers)
  input  logic       data_ready,
  output logic       rd_en,
  output logic [7:0] rd_addr,
  input  sample_t    rd_data_i,
  input  sample_t    rd_data_q,
  output logic       rd_release,
  // stream to the IFFT
  output logic       out_valid,
  output logic       out_sop,
  output iq_t        out
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  typedef enum logic [1:0] {SC_NULL, SC_PILOT, SC_DATA} sc_e;

  state_e     state;
  logic [7:0] n;        // current bin
  logic [7:0] d;        // data symbol index for the next data bin
  logic [8:0] wcnt;
  sc_e        sc, sc_q;
  logic       run_q, sop_q;

  // Subcarrier type of bin n
  always_comb begin
    int k;
    k = (n < 8'd128) ? int'(n) : int'(n) - 256;
    if (k == 0 || k < -128 + int'(GUARD_LO) || k >= 128 - int'(GUARD_HI)) sc = SC_NULL;
    else if (is_pilot(k))               sc = SC_PILOT;
    else                                sc = SC_DATA;
  end

  assign rd_en      = (state == S_RUN) && (sc == SC_DATA);
  assign rd_addr    = d;
  assign rd_release = (state == S_RUN) && (n == 8'd255);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n     <= '0;
      d     <= '0;
      wcnt  <= '0;
    end else begin
      case (state)
        S_IDLE: begin
          if (data_ready) begin
            state <= S_RUN;
            n     <= '0;
            d     <= 8'(NDATA / 2);  // bins 1..100 hold the upper data half
          end
        end
        S_RUN: begin
          n <= n + 1'b1;
          if (n == 8'd127)       d <= '0;   // next bin is k = -128: lower half
          else if (sc == SC_DATA) d <= d + 1'b1;
          if (n == 8'd255) begin
            state <= S_WAIT;
            wcnt  <= 9'(NFFT);
          end
        end
        S_WAIT: begin
          if (wcnt >= 9'(SYM_PERIOD - 2)) state <= S_IDLE;
          else wcnt <= wcnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      sop_q <= 1'b0;
      sc_q  <= SC_NULL;
    end else begin
      run_q <= (state == S_RUN);
      sop_q <= (state == S_RUN) && (n == 8'd0);
      sc_q  <= sc;
    end
  end

  always_comb begin
    out_valid = run_q;
    out_sop   = sop_q;
    case (sc_q)
      SC_DATA:  out = '{i: rd_data_i, q: rd_data_q};
      SC_PILOT: out = '{i: PILOT_VAL, q: '0};
      default:  out = '{i: '0, q: '0};
    endcase
  end
endmodule
