// Cyclic-prefix insertion for one antenna.
//
// The NFFT time-domain samples of each IFFT output symbol are written, in
// order, into one half of a 2 x NFFT ping-pong buffer of I/Q words. When a
// half is full it is read out as NFFT + NCP samples: first the last NCP
// samples (the prefix, a copy of the end of the symbol), then all NFFT
// samples from the start. Meanwhile the next IFFT symbol fills the other
// half. With NFFT = 256 and NCP = 64 (Tg = Tb/4) one OFDM symbol is 320
// samples, as in the document; the ping-pong organisation is this design's
// choice.
//
// Interface: in_valid/in carry the IFFT output, NFFT valid samples per
// symbol (gaps allowed). out_valid/out carry the transmitted samples,
// out_sos marks the first prefix sample of each symbol. Reading starts the
// cycle after a half is complete and output appears one cycle after that;
// a following half is read with no gap. overflow (sticky) flags a half
// completed while still waiting to be sent.
module cp_insertion
  import ofdm_tx_pkg::NFFT, ofdm_tx_pkg::NCP, ofdm_tx_pkg::iq_t;
#(
  parameter int unsigned N  = NFFT,
  parameter int unsigned CP = NCP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  iq_t  in,
  output logic out_valid,
  output logic out_sos,
  output iq_t  out,
  output logic overflow
);
  localparam int unsigned NW = $clog2(N);
  localparam int unsigned OW = $clog2(N + CP);

  iq_t mem [2 * N];

  logic          wbank, rbank;
  logic [NW-1:0] wcnt;
  logic [1:0]    full, full_set, full_clr;
  logic          wr_done;
  logic          reading;
  logic [OW-1:0] ocnt;     // 0 .. N+CP-1
  logic [NW-1:0] ridx;
  logic          rd_last;

  assign wr_done = in_valid && (wcnt == NW'(N - 1));
  assign rd_last = reading && (ocnt == OW'(N + CP - 1));
  // output sample ocnt is buffer sample (ocnt - CP) mod N
  assign ridx    = (ocnt < OW'(CP)) ? NW'(ocnt + OW'(N - CP)) : NW'(ocnt - OW'(CP));

  always_comb begin
    full_set = '0;
    full_clr = '0;
    if (wr_done) full_set[wbank] = 1'b1;
    if (rd_last) full_clr[rbank] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wbank, wcnt}] <= in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank    <= 1'b0;
      wcnt     <= '0;
      full     <= '0;
      overflow <= 1'b0;
    end else begin
      full <= (full & ~full_clr) | full_set;
      if (wr_done && full[wbank] && !full_clr[wbank]) overflow <= 1'b1;
      if (in_valid) begin
        wcnt <= wcnt + 1'b1;
        if (wr_done) wbank <= ~wbank;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading <= 1'b0;
      rbank   <= 1'b0;
      ocnt    <= '0;
    end else if (!reading) begin
      if (full[rbank]) begin
        reading <= 1'b1;
        ocnt    <= '0;
      end
    end else if (rd_last) begin
      ocnt  <= '0;
      rbank <= ~rbank;
      if (!(full[~rbank] || full_set[~rbank])) reading <= 1'b0;
    end else begin
      ocnt <= ocnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sos   <= 1'b0;
    end else begin
      out_valid <= reading;
      out_sos   <= reading && (ocnt == '0);
    end
  end

  always_ff @(posedge clk) begin
    if (reading) out <= mem[{rbank, ridx}];
  end
endmodule
