// Self-checking test of puncturer for all four modulations at once: random
// coded pairs go into one instance per NBPSC (1, 2, 4, 6); the words coming
// out are compared with the reference rate-3/4 puncturing (X=101, Y=110 in
// time order) and the output rate (one word per 1, 3, 6, 9 pairs) is checked.
module tb_puncturer;
  import tx_ref_pkg::*;

  localparam int NB [4] = '{1, 2, 4, 6};
  localparam int NPAIRS = 900;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, x = 1'b0, y = 1'b0;
  int   checks = 0, failures = 0;
  bitq_t xs, ys;
  bitq_t sx [4], sy [4];
  int   nw [4];
  logic       ov [4];
  logic [5:0] xw [4], yw [4];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 4; g++) begin : g_dut
    logic [NB[g]-1:0] xwd, ywd;
    puncturer #(.NBPSC(NB[g])) dut (
      .clk, .rst_n, .in_valid, .x, .y,
      .out_valid(ov[g]), .x_word(xwd), .y_word(ywd)
    );
    assign xw[g] = 6'(xwd);
    assign yw[g] = 6'(ywd);
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
          for (int b = 0; b < NB[g]; b++) begin
            checks++;
            if (xw[g][b] !== sx[g][nw[g] * NB[g] + b] || yw[g][b] !== sy[g][nw[g] * NB[g] + b]) begin
              failures++;
              if (failures < 10) $display("NBPSC=%0d word %0d bit %0d mismatch", NB[g], nw[g], b);
            end
          end
          nw[g]++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < NPAIRS; i++) begin
      xs.push_back(1'($urandom));
      ys.push_back(1'($urandom));
    end
    for (int g = 0; g < 4; g++) begin
      puncture(NB[g], xs, ys, sx[g], sy[g]);
      nw[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (xs[i]) begin
      in_valid <= 1'b1;
      x <= xs[i];
      y <= ys[i];
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    // output rate: NPAIRS pairs give NPAIRS / L words
    for (int g = 0; g < 4; g++) begin
      automatic int l = (NB[g] == 1) ? 1 : 3 * NB[g] / 2;
      checks++;
      if (nw[g] != NPAIRS / l) begin
        failures++;
        $display("NBPSC=%0d: %0d words, expected %0d", NB[g], nw[g], NPAIRS / l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
