// Dual-clock double buffer between the symbol-rate clock domain (writer,
// constellation mapper side) and the OFDM clock domain (reader, pilot
// insertion / IFFT side).
//
// The memory has 2*HALF words of W bits (384 x 16 by default): two halves
// of one OFDM symbol's 192 data values each. The writer fills one half in
// order; when it has written HALF words the half is handed to the reader
// and writing continues in the other half. The reader reads a handed-over
// half in any order (by rd_addr) and gives it back with rd_release.
//
// Hand-over uses one toggle flag per half and per direction: the writer
// toggles wr_tgl[b] when half b is full, the reader toggles rd_tgl[b] when
// it releases it. Each toggle crosses to the other domain through a
// two-flop synchroniser; a half is full while the two toggles differ.
// Because only toggles cross, the clocks may have any ratio; the
// document's design runs the reader 320/192 times faster than the writer.
// The document gives the size, the double buffering and the separate clocks;
// the toggle hand-shake and the overflow flag are this design's own.
//
// Write side (wclk): wr_en/wr_data, one word per cycle at most. A word
// that arrives while the half it would go to is still held by the reader
// is dropped and overflow goes high (sticky); the writer never takes a
// half back from the reader, so the hand-over stays consistent. Read side (rclk): rd_ready says a full half is waiting;
// rd_data follows rd_en/rd_addr by one cycle; rd_release (one cycle) frees
// the half and moves the reader to the other one.
module symbol_cdc_buffer #(
  parameter int unsigned W    = 16,
  parameter int unsigned HALF = 192,
  parameter int unsigned HW   = $clog2(HALF)
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic          overflow,

  input  logic          rclk,
  input  logic          rrst_n,
  output logic          rd_ready,
  input  logic          rd_en,
  input  logic [HW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          rd_release
);
  localparam int unsigned AW = $clog2(2 * HALF);

  logic [W-1:0] mem [2 * HALF];

  logic [1:0]    wr_tgl;   // written by the write domain
  logic [1:0]    rd_tgl;   // written by the read domain

  // ---------------- write domain ----------------
  logic          wbank;
  logic [HW-1:0] wcnt;
  logic [1:0]    rd_tgl_s1, rd_tgl_s2;   // reader toggles, synchronised
  logic [1:0]    full_w;

  assign full_w = wr_tgl ^ rd_tgl_s2;

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      rd_tgl_s1 <= '0;
      rd_tgl_s2 <= '0;
    end else begin
      rd_tgl_s1 <= rd_tgl;
      rd_tgl_s2 <= rd_tgl_s1;
    end
  end

  logic wr_ok;
  assign wr_ok = wr_en && !full_w[wbank];

  always_ff @(posedge wclk) begin
    if (wr_ok) mem[AW'(wbank) * AW'(HALF) + AW'(wcnt)] <= wr_data;
  end

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbank    <= 1'b0;
      wcnt     <= '0;
      wr_tgl   <= '0;
      overflow <= 1'b0;
    end else if (wr_en && !wr_ok) begin
      overflow <= 1'b1;
    end else if (wr_ok) begin
      if (wcnt == HW'(HALF - 1)) begin
        wr_tgl[wbank] <= ~wr_tgl[wbank];
        wbank         <= ~wbank;
        wcnt          <= '0;
      end else begin
        wcnt <= wcnt + 1'b1;
      end
    end
  end

  // ---------------- read domain ----------------
  logic       rbank;
  logic [1:0] wr_tgl_s1, wr_tgl_s2;      // writer toggles, synchronised

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      wr_tgl_s1 <= '0;
      wr_tgl_s2 <= '0;
    end else begin
      wr_tgl_s1 <= wr_tgl;
      wr_tgl_s2 <= wr_tgl_s1;
    end
  end

  assign rd_ready = wr_tgl_s2[rbank] ^ rd_tgl[rbank];

  always_ff @(posedge rclk) begin
    if (rd_en) rd_data <= mem[AW'(rbank) * AW'(HALF) + AW'(rd_addr)];
  end

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbank  <= 1'b0;
      rd_tgl <= '0;
    end else if (rd_release) begin
      rd_tgl[rbank] <= ~rd_tgl[rbank];
      rbank         <= ~rbank;
    end
  end

  // The reader only releases a half it holds.
  always_ff @(posedge rclk) begin
    if (rrst_n && rd_release) assert (rd_ready) else $error("symbol_cdc_buffer: release of an empty half");
  end
endmodule
