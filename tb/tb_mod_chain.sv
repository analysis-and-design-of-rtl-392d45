// Self-checking test of one modulation branch per modulation (BPSK, QPSK,
// 16-QAM, 64-QAM): a random bit stream at one bit per clock goes through
// encoder, puncturer, both interleavers and both mappers; every antenna-x
// and antenna-y symbol is compared with the reference chain, and the
// number of symbols per OFDM symbol period is checked (192 symbols per
// 192, 576, 1152, 1728 input bits).
module tb_mod_chain;
  import tx_ref_pkg::*;
  import ofdm_tx_pkg::*;

  localparam int NB [4] = '{1, 2, 4, 6};
  localparam int NBLK = 2;
  localparam int NBITS = NBLK * 1728 + 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_bit = 1'b0;
  int   checks = 0, failures = 0;
  bitq_t bits;
  logic    ov [4], ovf [4];
  sample_t xi [4], xq [4], yi [4], yq [4];
  int rxi [4][$], rxq [4][$], ryi [4][$], ryq [4][$];
  int nsym [4];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    mod_chain #(.NBPSC(NB[g])) dut (
      .clk, .rst_n, .in_valid, .in_bit,
      .out_valid(ov[g]), .chx_i(xi[g]), .chx_q(xq[g]), .chy_i(yi[g]), .chy_q(yq[g]),
      .overflow(ovf[g])
    );
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int g = 0; g < 4; g++) begin
        if (ov[g]) begin
          automatic int n = nsym[g];
          checks++;
          if (n >= rxi[g].size()) begin
            failures++;
            $display("NBPSC=%0d: extra symbol %0d", NB[g], n);
          end else if (int'(xi[g]) != rxi[g][n] || int'(xq[g]) != rxq[g][n] ||
                       int'(yi[g]) != ryi[g][n] || int'(yq[g]) != ryq[g][n]) begin
            failures++;
            if (failures < 10) $display("NBPSC=%0d symbol %0d mismatch: x %0d,%0d (%0d,%0d) y %0d,%0d (%0d,%0d)",
              NB[g], n, xi[g], xq[g], rxi[g][n], rxq[g][n], yi[g], yq[g], ryi[g][n], ryq[g][n]);
          end
          nsym[g]++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NBITS; i++) bits.push_back(1'($urandom));
    for (int g = 0; g < 4; g++) begin
      branch(NB[g], bits, rxi[g], rxq[g], ryi[g], ryq[g]);
      nsym[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (bits[i]) begin
      in_valid <= 1'b1;
      in_bit   <= bits[i];
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (2000) @(posedge clk);
    for (int g = 0; g < 4; g++) begin
      // symbols of complete blocks: 192 per 384*NBPSC*R input bits
      automatic int per_blk = (NB[g] == 1) ? 192 : 192 * 3 * NB[g] / 2;
      checks++;
      if (nsym[g] != (NBITS / per_blk) * 192 || ovf[g]) begin
        failures++;
        $display("NBPSC=%0d: %0d symbols, expected %0d (overflow %b)", NB[g], nsym[g], (NBITS / per_blk) * 192, ovf[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
