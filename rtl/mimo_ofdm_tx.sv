// 2x2 MIMO-OFDM (IEEE 802.16 OFDM PHY style) transmitter with
// cross-antenna convolutional coding and per-antenna interleaving.
//
// System clock domain: the information bit stream feeds four modulation
// branches in parallel (BPSK, QPSK, 16-QAM, 64-QAM). Each branch codes the
// stream with one K=7 encoder, punctures it (rate 1/2 for BPSK, 3/4
// otherwise), splits it into the two antenna streams, interleaves each
// stream separately in a double-buffered bit interleaver and maps it to
// Q2.14 I/Q symbols. sel picks one branch. The selected symbols of each
// antenna are written into dual-clock double buffers (384 x 16 bits for I
// and for Q) which carry them into the OFDM clock domain.
//
// OFDM clock domain, per antenna: pilot_insertion builds the 256 IFFT
// input bins (192 data, 8 pilots, DC, 55 guard) from each 192-symbol half;
// the 256-point IFFT is an external streaming core, connected through the
// ifft_* ports; cp_insertion prepends the 64-sample cyclic prefix to each
// IFFT output symbol, giving 320 samples per OFDM symbol at tx_*.
//
// The OFDM clock must be at least (320/192) x the rate at which the
// selected branch delivers symbols; then each OFDM symbol is sent as soon
// as its 192 data symbols are buffered and the output is continuous once
// the buffers are primed. sel should only change while sys_rst_n is low:
// the buffers do not realign to a new branch mid-symbol. The *_overflow
// outputs are sticky error flags for clock ratios that are too low.
//
// The structure (four parallel branches selected by sel, 384 x 16 double
// buffers for I and Q at the clock-domain boundary, pilot insertion, an
// external streaming IFFT, cyclic-prefix insertion per antenna) follows the
// published design. The sel encoding, the per-domain synchronous resets and
// the overflow flags are this design's own.
module mimo_ofdm_tx
  import ofdm_tx_pkg::*;
(
  input  logic       sys_clk,
  input  logic       sys_rst_n,
  input  logic       ofdm_clk,
  input  logic       ofdm_rst_n,
  input  mod_e       sel,
  input  logic       data_valid,
  input  logic       data_in,

  // antenna x: IFFT core interface and transmit samples
  output logic       ifft_x_in_valid,
  output logic       ifft_x_in_sop,
  output iq_t        ifft_x_in,
  input  logic       ifft_x_out_valid,
  input  iq_t        ifft_x_out,
  output logic       tx_x_valid,
  output logic       tx_x_sos,
  output iq_t        tx_x,

  // antenna y
  output logic       ifft_y_in_valid,
  output logic       ifft_y_in_sop,
  output iq_t        ifft_y_in,
  input  logic       ifft_y_out_valid,
  input  iq_t        ifft_y_out,
  output logic       tx_y_valid,
  output logic       tx_y_sos,
  output iq_t        tx_y,

  // sticky error flags
  output logic [3:0] ilv_overflow,   // per branch: BPSK, QPSK, 16-QAM, 64-QAM
  output logic       buf_overflow,   // system-clock side of the double buffers
  output logic       cp_overflow
);
  // ---------------- modulation branches ----------------
  localparam int unsigned BR_NBPSC [4] = '{1, 2, 4, 6};

  logic [3:0] br_valid;
  iq_t        br_x [4];
  iq_t        br_y [4];

  for (genvar b = 0; b < 4; b++) begin : g_branch
    mod_chain #(.NBPSC(BR_NBPSC[b])) u_chain (
      .clk      (sys_clk),
      .rst_n    (sys_rst_n),
      .in_valid (data_valid),
      .in_bit   (data_in),
      .out_valid(br_valid[b]),
      .chx_i    (br_x[b].i),
      .chx_q    (br_x[b].q),
      .chy_i    (br_y[b].i),
      .chy_q    (br_y[b].q),
      .overflow (ilv_overflow[b])
    );
  end

  logic sym_valid;
  iq_t  sym_x, sym_y;

  mod_select_mux u_mux (
    .sel, .in_valid(br_valid), .in_x(br_x), .in_y(br_y),
    .out_valid(sym_valid), .out_x(sym_x), .out_y(sym_y)
  );

  // ---------------- clock-domain crossing double buffers ----------------
  logic [3:0] bovf, brdy;
  logic       px_rd_en, py_rd_en, px_rel, py_rel;
  logic [7:0] px_addr, py_addr;
  sample_t    bx_i, bx_q, by_i, by_q;

  symbol_cdc_buffer #(.W(SAMPLE_W), .HALF(NDATA)) u_buf_xi (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .wr_en(sym_valid), .wr_data(sym_x.i), .overflow(bovf[0]),
    .rclk(ofdm_clk), .rrst_n(ofdm_rst_n), .rd_ready(brdy[0]), .rd_en(px_rd_en),
    .rd_addr(px_addr), .rd_data(bx_i), .rd_release(px_rel)
  );
  symbol_cdc_buffer #(.W(SAMPLE_W), .HALF(NDATA)) u_buf_xq (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .wr_en(sym_valid), .wr_data(sym_x.q), .overflow(bovf[1]),
    .rclk(ofdm_clk), .rrst_n(ofdm_rst_n), .rd_ready(brdy[1]), .rd_en(px_rd_en),
    .rd_addr(px_addr), .rd_data(bx_q), .rd_release(px_rel)
  );
  symbol_cdc_buffer #(.W(SAMPLE_W), .HALF(NDATA)) u_buf_yi (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .wr_en(sym_valid), .wr_data(sym_y.i), .overflow(bovf[2]),
    .rclk(ofdm_clk), .rrst_n(ofdm_rst_n), .rd_ready(brdy[2]), .rd_en(py_rd_en),
    .rd_addr(py_addr), .rd_data(by_i), .rd_release(py_rel)
  );
  symbol_cdc_buffer #(.W(SAMPLE_W), .HALF(NDATA)) u_buf_yq (
    .wclk(sys_clk), .wrst_n(sys_rst_n), .wr_en(sym_valid), .wr_data(sym_y.q), .overflow(bovf[3]),
    .rclk(ofdm_clk), .rrst_n(ofdm_rst_n), .rd_ready(brdy[3]), .rd_en(py_rd_en),
    .rd_addr(py_addr), .rd_data(by_q), .rd_release(py_rel)
  );

  assign buf_overflow = |bovf;

  // ---------------- OFDM modulation, antenna x ----------------
  logic cpx_ovf, cpy_ovf;

  pilot_insertion u_pilot_x (
    .clk(ofdm_clk), .rst_n(ofdm_rst_n),
    .data_ready(brdy[0] & brdy[1]), .rd_en(px_rd_en), .rd_addr(px_addr),
    .rd_data_i(bx_i), .rd_data_q(bx_q), .rd_release(px_rel),
    .out_valid(ifft_x_in_valid), .out_sop(ifft_x_in_sop), .out(ifft_x_in)
  );

  cp_insertion u_cp_x (
    .clk(ofdm_clk), .rst_n(ofdm_rst_n),
    .in_valid(ifft_x_out_valid), .in(ifft_x_out),
    .out_valid(tx_x_valid), .out_sos(tx_x_sos), .out(tx_x), .overflow(cpx_ovf)
  );

  // ---------------- OFDM modulation, antenna y ----------------
  pilot_insertion u_pilot_y (
    .clk(ofdm_clk), .rst_n(ofdm_rst_n),
    .data_ready(brdy[2] & brdy[3]), .rd_en(py_rd_en), .rd_addr(py_addr),
    .rd_data_i(by_i), .rd_data_q(by_q), .rd_release(py_rel),
    .out_valid(ifft_y_in_valid), .out_sop(ifft_y_in_sop), .out(ifft_y_in)
  );

  cp_insertion u_cp_y (
    .clk(ofdm_clk), .rst_n(ofdm_rst_n),
    .in_valid(ifft_y_out_valid), .in(ifft_y_out),
    .out_valid(tx_y_valid), .out_sos(tx_y_sos), .out(tx_y), .overflow(cpy_ovf)
  );

  assign cp_overflow = cpx_ovf | cpy_ovf;
endmodule
