// End-to-end test of the 2x2 MIMO-OFDM transmitter at its default
// (full) sizes, with a behavioural IFFT on each antenna.
//
// Runs, each after a reset of both clock domains:
//   1-4. sel = BPSK, QPSK, 16-QAM, 64-QAM. The bit stream is one bit per
//        system clock, and the system clock is chosen so that one OFDM
//        symbol's worth of bits (192, 576, 1152, 1728) takes exactly 320
//        OFDM clocks, the rate relation of the design. Four OFDM symbols
//        per run.
//   5.   BPSK with the OFDM clock too slow, which must raise buf_overflow.
// Checked in runs 1-4, for both antennas:
//   - every IFFT input bin against the reference chain (encoder, rate-3/4
//     puncturing, 802.16 interleaver formulas, constellation levels) and
//     the pilot / DC / guard layout;
//   - every transmitted sample against the IFFT output with the cyclic
//     prefix (last 64 of 256) in front, 320 samples per symbol;
//   - that after the first OFDM symbol the output has no idle clocks;
//   - that no overflow flag rises.
// Each mechanism (mode, interleaver and CDC half swap, pilot insertion,
// CP insertion, gap-free output, overflow detection) is counted and must
// have happened at least once.
module tb_mimo_ofdm_tx;
  import ofdm_tx_pkg::*;
  import tx_ref_pkg::*;

  localparam int NSYM = 4;
  localparam int OFDM_HALF = 27000;                 // OFDM clock half period (time units)
  localparam int SYS_HALF [4] = '{45000, 15000, 7500, 5000};

  logic sys_clk = 1'b0, ofdm_clk = 1'b0, sys_rst_n = 1'b0, ofdm_rst_n = 1'b0;
  mod_e sel = MOD_BPSK;
  logic data_valid = 1'b0, data_in = 1'b0;
  logic ifft_x_in_valid, ifft_x_in_sop, ifft_x_out_valid, tx_x_valid, tx_x_sos;
  logic ifft_y_in_valid, ifft_y_in_sop, ifft_y_out_valid, tx_y_valid, tx_y_sos;
  iq_t  ifft_x_in, ifft_x_out, tx_x, ifft_y_in, ifft_y_out, tx_y;
  logic [3:0] ilv_overflow;
  logic buf_overflow, cp_overflow;

  int sys_half = 45000, ofdm_half = OFDM_HALF;
  // clocks with run-time periods, built from fixed 500-unit steps
  always begin
    repeat (sys_half / 500) #500;
    sys_clk = ~sys_clk;
  end
  always begin
    repeat (ofdm_half / 500) #500;
    ofdm_clk = ~ofdm_clk;
  end

  mimo_ofdm_tx dut (.*);

  ifft256_model u_ifft_x (.clk(ofdm_clk), .in_valid(ifft_x_in_valid), .in_sop(ifft_x_in_sop),
                          .in(ifft_x_in), .out_valid(ifft_x_out_valid), .out(ifft_x_out));
  ifft256_model u_ifft_y (.clk(ofdm_clk), .in_valid(ifft_y_in_valid), .in_sop(ifft_y_in_sop),
                          .in(ifft_y_in), .out_valid(ifft_y_out_valid), .out(ifft_y_out));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_mode [4], n_pilot = 0, n_cp = 0, n_swap = 0, n_cdc = 0, n_gapless = 0, n_ovf = 0;

  // reference symbols of the current run
  int rxi [$], rxq [$], ryi [$], ryq [$];
  int nb = 1;
  bit checking = 1'b0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL: %s", msg);
  endtask

  function automatic bit pilot_k(int k);
    return k == 13 || k == -13 || k == 38 || k == -38 || k == 63 || k == -63 || k == 88 || k == -88;
  endfunction

  // data index of subcarrier k (ascending k over -100..100, minus DC and pilots)
  function automatic int data_index(int k);
    int d = 0;
    for (int kk = -100; kk < k; kk++) if (kk != 0 && !pilot_k(kk)) d++;
    return d;
  endfunction

  // ---------------- IFFT input monitor (both antennas) ----------------
  int fsym [2], fbin [2];
  iq_t fifo_ifft [2][$];

  task automatic check_bin(int ant, iq_t v, int s, int n);
    int k = (n < 128) ? n : n - 256;
    int ei = 0, eq = 0;
    if (k == 0 || k > 100 || k < -100) begin
      ei = 0;
    end else if (pilot_k(k)) begin
      ei = 16384;
      n_pilot++;
    end else begin
      int d = s * 192 + data_index(k);
      ei = (ant == 0) ? rxi[d] : ryi[d];
      eq = (ant == 0) ? rxq[d] : ryq[d];
    end
    checks++;
    if (int'(v.i) != ei || int'(v.q) != eq)
      fail($sformatf("ant %0d symbol %0d bin %0d: got %0d,%0d expected %0d,%0d", ant, s, n, v.i, v.q, ei, eq));
  endtask

  always @(posedge ofdm_clk) begin
    if (checking) begin
      if (ifft_x_in_valid) begin
        if (ifft_x_in_sop) begin fsym[0]++; fbin[0] = 0; end
        check_bin(0, ifft_x_in, fsym[0] - 1, fbin[0]);
        fbin[0]++;
      end
      if (ifft_y_in_valid) begin
        if (ifft_y_in_sop) begin fsym[1]++; fbin[1] = 0; end
        check_bin(1, ifft_y_in, fsym[1] - 1, fbin[1]);
        fbin[1]++;
      end
      if (ifft_x_out_valid) fifo_ifft[0].push_back(ifft_x_out);
      if (ifft_y_out_valid) fifo_ifft[1].push_back(ifft_y_out);
    end
  end

  // ---------------- transmit output monitor ----------------
  int tsym [2], tpos [2];
  iq_t cur [2][256];
  logic prev_tx [2];

  time t_first_bit, t_first_tx;

  task automatic tx_sample(int ant, logic sos, iq_t v);
    if (ant == 0 && tsym[0] == 0 && tpos[0] == 0) t_first_tx = $time;
    if (sos) begin
      if (tsym[ant] > 0 && tpos[ant] != 320) fail($sformatf("ant %0d: symbol of %0d samples", ant, tpos[ant]));
      if (tsym[ant] > 0 && prev_tx[ant]) n_gapless++;
      if (fifo_ifft[ant].size() < 256) fail("transmit symbol before its IFFT output");
      else for (int n = 0; n < 256; n++) cur[ant][n] = fifo_ifft[ant].pop_front();
      tsym[ant]++;
      tpos[ant] = 0;
    end
    checks++;
    if (tsym[ant] == 0) fail("sample before first symbol start");
    else begin
      int idx = (tpos[ant] < 64) ? tpos[ant] + 192 : tpos[ant] - 64;
      if (v !== cur[ant][idx]) fail($sformatf("ant %0d symbol %0d sample %0d wrong", ant, tsym[ant] - 1, tpos[ant]));
      if (tpos[ant] < 64) n_cp++;
    end
    tpos[ant]++;
  endtask

  always @(posedge ofdm_clk) begin
    if (checking) begin
      if (tx_x_valid) tx_sample(0, tx_x_sos, tx_x);
      else if (tsym[0] > 0 && tsym[0] < NSYM && tpos[0] == 320) ; // allowed only before symbol 2 is ready
      if (tx_y_valid) tx_sample(1, tx_y_sos, tx_y);
      // after the first symbol the stream must not pause while symbols remain
      if (tsym[0] >= 1 && tsym[0] < NSYM && !tx_x_valid && prev_tx[0])
        fail($sformatf("gap in antenna x output after symbol %0d", tsym[0]));
      prev_tx[0] <= tx_x_valid;
      prev_tx[1] <= tx_y_valid;
    end
  end

  // ---------------- run control ----------------
  task automatic do_reset();
    sys_rst_n  <= 1'b0;
    ofdm_rst_n <= 1'b0;
    data_valid <= 1'b0;
    repeat (4) @(posedge sys_clk);
    repeat (4) @(posedge ofdm_clk);
    @(posedge sys_clk);
    sys_rst_n <= 1'b1;
    @(posedge ofdm_clk);
    ofdm_rst_n <= 1'b1;
  endtask

  task automatic run_mode(int m);
    bitq_t bits;
    int bits_per_sym;
    nb = bpsc(mod_e'(m));
    bits_per_sym = (nb == 1) ? 192 : 288 * nb;
    sys_half  = SYS_HALF[m];
    ofdm_half = OFDM_HALF;
    sel = mod_e'(m);
    for (int i = 0; i < NSYM * bits_per_sym; i++) bits.push_back(1'($urandom));
    branch(nb, bits, rxi, rxq, ryi, ryq);
    for (int a = 0; a < 2; a++) begin
      fsym[a] = 0; fbin[a] = 0; tsym[a] = 0; tpos[a] = 0; prev_tx[a] = 1'b0;
      fifo_ifft[a].delete();
    end
    do_reset();
    checking = 1'b1;
    @(posedge sys_clk);
    t_first_bit = $time;
    foreach (bits[i]) begin
      data_valid <= 1'b1;
      data_in    <= bits[i];
      @(posedge sys_clk);
    end
    data_valid <= 1'b0;
    // let the last symbol through the interleaver, buffer, IFFT and CP stage
    repeat (6 * 320) @(posedge ofdm_clk);
    checking = 1'b0;
    for (int a = 0; a < 2; a++) begin
      checks++;
      if (fsym[a] != NSYM || tsym[a] != NSYM || tpos[a] != 320)
        fail($sformatf("mode %0d ant %0d: %0d IFFT symbols, %0d transmitted (%0d samples in last)", m, a, fsym[a], tsym[a], tpos[a]));
    end
    checks++;
    if (ilv_overflow != 0 || buf_overflow || cp_overflow) fail($sformatf("mode %0d: overflow flag set", m));
    n_mode[m]++;
    n_swap += tsym[0] - 1;
    n_cdc  += fsym[0];
    $display("mode %0d: %0d OFDM symbols per antenna checked; first bit to first sample: %0d system clocks, %.2f OFDM symbol periods",
             m, tsym[0], (t_first_tx - t_first_bit) / (2 * sys_half), real'(t_first_tx - t_first_bit) / real'(640 * OFDM_HALF));
  endtask

  initial begin : watchdog
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) n_mode[m] = 0;
    for (int m = 0; m < 4; m++) run_mode(m);

    // Run 5: OFDM clock too slow for BPSK: the buffers must flag overflow
    sel = MOD_BPSK;
    sys_half  = 45000;
    ofdm_half = 60000;
    do_reset();
    for (int i = 0; i < 6 * 192; i++) begin
      data_valid <= 1'b1;
      data_in    <= 1'($urandom);
      @(posedge sys_clk);
    end
    data_valid <= 1'b0;
    repeat (10) @(posedge sys_clk);
    checks++;
    if (!buf_overflow) fail("overflow not flagged with a slow OFDM clock");
    else n_ovf++;

    // every mechanism must have happened
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) fail($sformatf("mode %0d never run", m));
    end
    checks++; if (n_pilot == 0)   fail("no pilot inserted");
    checks++; if (n_cp == 0)      fail("no cyclic prefix sample");
    checks++; if (n_swap == 0)    fail("no double-buffer half swap");
    checks++; if (n_cdc == 0)     fail("nothing crossed the clock domains");
    checks++; if (n_gapless == 0) fail("no back-to-back output symbols");
    checks++; if (n_ovf == 0)     fail("overflow never detected");
    $display("mechanisms: modes %0d/%0d/%0d/%0d, pilots %0d, CP samples %0d, half swaps %0d, CDC symbols %0d, gap-free joins %0d, overflow %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_pilot, n_cp, n_swap, n_cdc, n_gapless, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
