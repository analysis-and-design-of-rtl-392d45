// Self-checking test of conv_encoder: random bits with random idle cycles,
// each coded pair compared with the reference code (G1=171, G2=133).
module tb_conv_encoder;
  import tx_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_bit = 1'b0;
  logic out_valid, x, y;
  int   checks = 0, failures = 0;
  bitq_t bits, xs, ys;
  int   nout = 0;

  always #5 clk = ~clk;

  conv_encoder dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (x !== xs[nout] || y !== ys[nout]) begin
        failures++;
        if (failures < 10) $display("pair %0d: got %b%b expected %b%b", nout, x, y, xs[nout], ys[nout]);
      end
      nout++;
    end
  end

  initial begin
    for (int i = 0; i < 1000; i++) bits.push_back(1'($urandom));
    encode(bits, xs, ys);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    foreach (bits[i]) begin
      while (($urandom % 4) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid <= 1'b1;
      in_bit   <= bits[i];
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (nout != bits.size()) begin
      failures++;
      $display("got %0d pairs, expected %0d", nout, bits.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
