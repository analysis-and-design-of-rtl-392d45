// Self-checking test of cp_insertion. Four symbols of 256 random samples
// are streamed in, the first two back to back and the others with random
// gaps. Every symbol must come out as 320 samples: samples 192..255 (the
// prefix) followed by samples 0..255, with out_sos on the first one, and
// consecutive symbols must follow each other without idle clocks once the
// second symbol is buffered in time.
module tb_cp_insertion;
  import ofdm_tx_pkg::*;

  localparam int NSYM = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid, out_sos, overflow;
  iq_t in = '0, out;
  int checks = 0, failures = 0;
  iq_t sym [NSYM][256];
  int ns = 0, pos = 0, gaps_inside = 0;
  logic prev_valid = 1'b0;

  always #5 clk = ~clk;

  cp_insertion dut (.*);

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        automatic int idx;
        if (out_sos) begin
          if (ns > 0) begin
            checks++;
            if (pos != 320) begin
              failures++;
              $display("symbol %0d: %0d samples", ns - 1, pos);
            end
          end
          ns++;
          pos = 0;
        end
        idx = (pos < 64) ? pos + 192 : pos - 64;
        checks++;
        if (ns == 0 || out !== sym[ns - 1][idx]) begin
          failures++;
          if (failures < 10) $display("symbol %0d sample %0d wrong", ns - 1, pos);
        end
        pos++;
      end else if (prev_valid && ns == 1 && pos == 320) begin
        gaps_inside++;  // symbol 1 was buffered in time, so no gap allowed here
      end
      prev_valid <= out_valid;
    end
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSYM; s++)
      for (int n = 0; n < 256; n++) sym[s][n] = iq_t'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int s = 0; s < NSYM; s++) begin
      for (int n = 0; n < 256; n++) begin
        if (s >= 2) begin
          while ($urandom % 4 == 0) begin
            in_valid <= 1'b0;
            @(posedge clk);
          end
        end
        in_valid <= 1'b1;
        in       <= sym[s][n];
        @(posedge clk);
      end
      if (s == 1) begin
        in_valid <= 1'b0;
        repeat (300) @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (800) @(posedge clk);
    checks++;
    if (ns != NSYM || pos != 320) begin
      failures++;
      $display("%0d symbols out, last with %0d samples", ns, pos);
    end
    checks++;
    if (gaps_inside != 0 || overflow) begin
      failures++;
      $display("gap between back-to-back symbols or overflow");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
