// Self-checking test of pilot_insertion. A behavioural double buffer
// (registered read) offers three halves of 192 random data symbols, always
// ready. For each OFDM symbol the 256 output bins are checked: bin n is
// subcarrier k = n (n < 128) or n - 256; guards |k| > 100 and DC are zero,
// pilots at +-13, +-38, +-63, +-88 are +1.0, and the data subcarriers carry
// the 192 symbols in ascending-k order. Also checked: 256 bins per symbol,
// out_sop on bin 0, symbols starting exactly 320 clocks apart, one release
// per symbol.
module tb_pilot_insertion;
  import ofdm_tx_pkg::*;

  localparam int NSYM = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic data_ready, rd_en, rd_release, out_valid, out_sop;
  logic [7:0] rd_addr;
  sample_t rd_data_i, rd_data_q;
  iq_t out;
  int checks = 0, failures = 0;
  int cyc = 0;
  sample_t di [NSYM][192], dq [NSYM][192];
  int half = 0, bin = 0, nsop = 0, last_sop = -1, nrel = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  pilot_insertion dut (.*);

  assign data_ready = (half < NSYM);

  always @(posedge clk) begin
    if (rd_en) begin
      rd_data_i <= di[half][rd_addr];
      rd_data_q <= dq[half][rd_addr];
    end
    if (rd_release) begin
      half <= half + 1;
      nrel++;
    end
  end

  // expected value of bin n of symbol s
  function automatic iq_t expected(int s, int n);
    int k, d;
    iq_t e;
    k = (n < 128) ? n : n - 256;
    e = '{i: '0, q: '0};
    if (k == 0 || k > 100 || k < -100) return e;
    if (k == 13 || k == -13 || k == 38 || k == -38 || k == 63 || k == -63 || k == 88 || k == -88) begin
      e.i = 16'sd16384;
      return e;
    end
    d = 0;
    for (int kk = -100; kk < k; kk++)
      if (kk != 0 && !(kk == 13 || kk == -13 || kk == 38 || kk == -38 ||
                       kk == 63 || kk == -63 || kk == 88 || kk == -88)) d++;
    e.i = di[s][d];
    e.q = dq[s][d];
    return e;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_sop) begin
        if (nsop > 0) begin
          checks++;
          if (bin != 256) begin
            failures++;
            $display("symbol %0d had %0d bins", nsop - 1, bin);
          end
          checks++;
          if (cyc - last_sop != 320) begin
            failures++;
            $display("symbol start spacing %0d, expected 320", cyc - last_sop);
          end
        end
        last_sop = cyc;
        bin = 0;
        nsop++;
      end
      checks++;
      if (out !== expected(nsop - 1, bin)) begin
        failures++;
        if (failures < 10) $display("symbol %0d bin %0d: got %0d,%0d", nsop - 1, bin, out.i, out.q);
      end
      bin++;
    end
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSYM; s++)
      for (int d = 0; d < 192; d++) begin
        di[s][d] = sample_t'($urandom);
        dq[s][d] = sample_t'($urandom);
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (NSYM * 320 + 100) @(posedge clk);
    checks++;
    if (nsop != NSYM || bin != 256 || nrel != NSYM) begin
      failures++;
      $display("%0d symbols, %0d bins in the last, %0d releases", nsop, bin, nrel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
