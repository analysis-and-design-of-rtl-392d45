// Self-checking test of the dual-clock double buffer. The writer (10 ns
// clock) writes six halves of 192 random words with random idle cycles;
// the reader (6 ns clock) waits for rd_ready, reads each half in a random
// address order, compares every word and releases the half. Afterwards the
// reader stops and the writer writes three more halves, which must set
// overflow; before that overflow must stay low.
module tb_symbol_cdc_buffer;
  localparam int HALF = 192;
  localparam int NH   = 6;

  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [15:0] wr_data = '0;
  logic overflow, rd_ready, rd_en = 1'b0, rd_release = 1'b0;
  logic [7:0] rd_addr = '0;
  logic [15:0] rd_data;
  int checks = 0, failures = 0;
  logic [15:0] data [NH][HALF];
  bit reader_on = 1'b1;
  int halves_read = 0;

  always #5 wclk = ~wclk;
  always #3 rclk = ~rclk;

  symbol_cdc_buffer #(.W(16), .HALF(HALF)) dut (.*);

  initial begin : watchdog
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    for (int h = 0; h < NH; h++)
      for (int a = 0; a < HALF; a++) data[h][a] = 16'($urandom);
    repeat (3) @(posedge wclk);
    wrst_n <= 1'b1;
    @(posedge wclk);
    for (int h = 0; h < NH; h++) begin
      for (int a = 0; a < HALF; a++) begin
        while ($urandom % 3 == 0) begin
          wr_en <= 1'b0;
          @(posedge wclk);
        end
        wr_en   <= 1'b1;
        wr_data <= data[h][a];
        @(posedge wclk);
      end
    end
    wr_en <= 1'b0;
    wait (halves_read == NH);
    reader_on = 1'b0;
    repeat (10) @(posedge wclk);
    checks++;
    if (overflow) begin
      failures++;
      $display("overflow raised in normal operation");
    end
    for (int a = 0; a < 3 * HALF; a++) begin
      wr_en   <= 1'b1;
      wr_data <= 16'($urandom);
      @(posedge wclk);
    end
    wr_en <= 1'b0;
    @(posedge wclk);
    checks++;
    if (!overflow) begin
      failures++;
      $display("overflow not raised with a stalled reader");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reader
  initial begin
    repeat (3) @(posedge rclk);
    rrst_n <= 1'b1;
    for (int h = 0; h < NH; h++) begin
      int order [HALF];
      do @(posedge rclk); while (!rd_ready);
      foreach (order[a]) order[a] = a;
      order.shuffle();
      foreach (order[a]) begin
        rd_en   <= 1'b1;
        rd_addr <= 8'(order[a]);
        @(posedge rclk);
        rd_en <= 1'b0;
        @(negedge rclk);
        checks++;
        if (rd_data !== data[h][order[a]]) begin
          failures++;
          if (failures < 10) $display("half %0d addr %0d: got %h expected %h", h, order[a], rd_data, data[h][order[a]]);
        end
      end
      @(posedge rclk);
      rd_release <= 1'b1;
      @(posedge rclk);
      rd_release <= 1'b0;
      halves_read++;
    end
  end
endmodule
