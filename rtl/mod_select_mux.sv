// Modulation selector: picks the output of one of the four modulation
// branches (BPSK, QPSK, 16-QAM, 64-QAM) with the 2-bit sel code, for both
// antennas and both I and Q. Combinational; valid is selected with the data.
module mod_select_mux
  import ofdm_tx_pkg::iq_t, ofdm_tx_pkg::mod_e;
(
  input  mod_e       sel,
  input  logic [3:0] in_valid,
  input  iq_t        in_x [4],
  input  iq_t        in_y [4],
  output logic       out_valid,
  output iq_t        out_x,
  output iq_t        out_y
);
  always_comb begin
    out_valid = in_valid[sel];
    out_x     = in_x[sel];
    out_y     = in_y[sel];
  end
endmodule
