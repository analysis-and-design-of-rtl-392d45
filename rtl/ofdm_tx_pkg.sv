// Shared constants and types for the 2x2 MIMO-OFDM transmitter.
//
// The transmitter follows the IEEE 802.16 OFDM PHY: a rate-1/2 K=7
// convolutional code, puncturing to rate 3/4 for QPSK/16-QAM/64-QAM, a
// 12-column block interleaver of 192 subcarriers' worth of coded bits, a
// 256-point IFFT with 192 data, 8 pilot, 1 DC and 55 guard subcarriers, and a
// 64-sample cyclic prefix (1/4 of the useful symbol). Samples are signed
// 16-bit fixed point with 14 fractional bits (Q2.14).
package ofdm_tx_pkg;

  // OFDM symbol geometry
  localparam int unsigned NFFT      = 256;  // IFFT size
  localparam int unsigned NDATA     = 192;  // data subcarriers per OFDM symbol
  localparam int unsigned NCP       = 64;   // cyclic prefix samples (Tg = Tb/4)
  localparam int unsigned NCOL      = 12;   // interleaver columns (d in 802.16 OFDM PHY)
  localparam int unsigned GUARD_LO  = 28;   // null subcarriers -128..-101
  localparam int unsigned GUARD_HI  = 27;   // null subcarriers +101..+127

  // Sample format: 16 bits, 14 fractional
  localparam int unsigned SAMPLE_W  = 16;
  localparam int unsigned FRAC_W    = 14;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // Modulation select (the two MSBs of the sel switch)
  typedef enum logic [1:0] {
    MOD_BPSK  = 2'd0,
    MOD_QPSK  = 2'd1,
    MOD_QAM16 = 2'd2,
    MOD_QAM64 = 2'd3
  } mod_e;

  // Coded bits per subcarrier for each modulation
  function automatic int unsigned bpsc(mod_e m);
    case (m)
      MOD_BPSK:  return 1;
      MOD_QPSK:  return 2;
      MOD_QAM16: return 4;
      default:   return 6;
    endcase
  endfunction

  // Pilot value (+1.0 on the real axis)
  localparam sample_t PILOT_VAL = sample_t'(1 << FRAC_W);

  // Is subcarrier k (-128..127) a pilot? 802.16 OFDM PHY pilots: +-13, +-38, +-63, +-88
  function automatic logic is_pilot(int k);
    return (k == -88) || (k == -63) || (k == -38) || (k == -13) ||
           (k ==  13) || (k ==  38) || (k ==  63) || (k ==  88);
  endfunction

endpackage
