// Self-checking test of the double-buffered interleaver, all four
// modulations at once. Each instance gets random coded-bit words at the
// rate the puncturer delivers them (one word every 1, 3, 6 or 9 clocks) for
// three OFDM symbols. Every output symbol is compared with the 802.16
// interleaver formulas applied to the same bits; the initial latency (about
// one block fill time, 192 x 1/3/6/9 clocks) and the symbol count are
// checked. A fifth instance (QPSK) is fed one word every clock, faster than
// it can be read, and must raise overflow.
module tb_interleaver;
  import tx_ref_pkg::*;

  localparam int NB [4] = '{1, 2, 4, 6};
  localparam int NBLK = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  logic       iv [4];
  logic [5:0] iw [4];
  logic       sv [4];
  logic [5:0] sy [4];
  logic       ovf [4];
  bitq_t      ref_bits [4];   // interleaved reference bits, all blocks
  int         nsym [4], first_in [4], first_out [4];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    logic [NB[g]-1:0] sym_o;
    interleaver #(.NBPSC(NB[g])) dut (
      .clk, .rst_n,
      .in_valid(iv[g]), .in_word(iw[g][NB[g]-1:0]),
      .sym_valid(sv[g]), .sym(sym_o), .overflow(ovf[g])
    );
    assign sy[g] = 6'(sym_o);
  end

  // Overflow instance
  logic       ov_v = 1'b0, ov_flag, ov_sv;
  logic [1:0] ov_w = '0, ov_sym;
  interleaver #(.NBPSC(2)) dut_ovf (
    .clk, .rst_n, .in_valid(ov_v), .in_word(ov_w),
    .sym_valid(ov_sv), .sym(ov_sym), .overflow(ov_flag)
  );

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < 4; g++) begin
        if (sv[g]) begin
          automatic logic [5:0] exp_sym = '0;
          if (nsym[g] == 0) first_out[g] = cyc;
          for (int t = 0; t < NB[g]; t++)
            exp_sym = (exp_sym << 1) | 6'(ref_bits[g][nsym[g] * NB[g] + t]);
          checks++;
          if (sy[g] !== exp_sym) begin
            failures++;
            if (failures < 10) $display("NBPSC=%0d symbol %0d: got %h expected %h", NB[g], nsym[g], sy[g], exp_sym);
          end
          nsym[g]++;
        end
      end
    end
  end

  // One driver per modulation
  for (genvar g = 0; g < 4; g++) begin : g_drv
    initial begin
      automatic int l = (NB[g] == 1) ? 1 : 3 * NB[g] / 2;
      automatic int ncbps = 192 * NB[g];
      bitq_t raw;
      iv[g] = 1'b0;
      iw[g] = '0;
      nsym[g] = 0;
      for (int b = 0; b < NBLK; b++) begin
        bitq_t blk, il;
        blk = {};
        for (int k = 0; k < ncbps; k++) blk.push_back(1'($urandom));
        il = interleave(NB[g], blk);
        foreach (il[k]) ref_bits[g].push_back(il[k]);
        foreach (blk[k]) raw.push_back(blk[k]);
      end
      wait (rst_n);
      @(posedge clk);
      first_in[g] = cyc;
      for (int w = 0; w < NBLK * 192; w++) begin
        iv[g] <= 1'b1;
        for (int t = 0; t < NB[g]; t++) iw[g][t] <= raw[w * NB[g] + t];
        @(posedge clk);
        if (l > 1) begin
          iv[g] <= 1'b0;
          repeat (l - 1) @(posedge clk);
        end
      end
      iv[g] <= 1'b0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 3 * 192; w++) begin
      ov_v <= 1'b1;
      ov_w <= 2'($urandom);
      @(posedge clk);
    end
    ov_v <= 1'b0;
  end

  initial begin
    wait (rst_n);
    repeat ((NBLK + 1) * 192 * 9 + 200) @(posedge clk);
    for (int g = 0; g < 4; g++) begin
      automatic int l = (NB[g] == 1) ? 1 : 3 * NB[g] / 2;
      automatic int lat = first_out[g] - first_in[g];
      checks++;
      if (nsym[g] != NBLK * 192) begin
        failures++;
        $display("NBPSC=%0d: %0d symbols, expected %0d", NB[g], nsym[g], NBLK * 192);
      end
      checks++;
      if (lat < 192 * l - l || lat > 192 * l + 12) begin
        failures++;
        $display("NBPSC=%0d: initial latency %0d clocks, expected about %0d", NB[g], lat, 192 * l);
      end else begin
        $display("NBPSC=%0d: initial latency %0d clocks", NB[g], lat);
      end
      checks++;
      if (ovf[g]) begin
        failures++;
        $display("NBPSC=%0d: unexpected overflow", NB[g]);
      end
    end
    checks++;
    if (!ov_flag) begin
      failures++;
      $display("overflow not flagged when written faster than read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
