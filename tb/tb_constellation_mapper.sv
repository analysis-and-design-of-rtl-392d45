// Self-checking test of constellation_mapper: every symbol of every
// modulation (BPSK, QPSK, 16-QAM, 64-QAM) is applied and the I/Q output
// compared with levels computed in real arithmetic by the reference model.
// Also checks the one-clock latency and that points on each axis are Gray
// neighbours.
module tb_constellation_mapper;
  import tx_ref_pkg::*;
  import ofdm_tx_pkg::*;

  localparam int NB [4] = '{1, 2, 4, 6};

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [5:0] sym = '0;
  int   checks = 0, failures = 0;
  logic    ov [4];
  sample_t oi [4], oq [4];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    constellation_mapper #(.NBPSC(NB[g])) dut (
      .clk, .rst_n, .in_valid, .sym(sym[NB[g]-1:0]),
      .out_valid(ov[g]), .i(oi[g]), .q(oq[g])
    );
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < 64; s++) begin
      in_valid <= 1'b1;
      sym      <= 6'(s);
      @(posedge clk);
      in_valid <= 1'b0;
      @(negedge clk);
      for (int g = 0; g < 4; g++) begin
        automatic int ei, eq;
        map(NB[g], s % (1 << NB[g]), ei, eq);
        checks++;
        if (!ov[g] || int'(oi[g]) != ei || int'(oq[g]) != eq) begin
          failures++;
          if (failures < 10) $display("NBPSC=%0d sym %0d: got %0d,%0d expected %0d,%0d", NB[g], s, oi[g], oq[g], ei, eq);
        end
      end
      @(posedge clk);
    end
    // Gray property: 64-QAM I levels of adjacent points differ in one bit
    for (int a = 0; a < 8; a++) begin
      for (int b = 0; b < 8; b++) begin
        if (axis(6, b) - axis(6, a) > 4000 && axis(6, b) - axis(6, a) < 6000) begin
          checks++;
          if ($countones(a ^ b) != 1) begin
            failures++;
            $display("64-QAM levels %0d and %0d not Gray neighbours", a, b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
