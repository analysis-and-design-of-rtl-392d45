// Address generator state machine of the double-buffered block interleaver.
//
// Write side: each accepted input word is written to address
// wbank*HALF + wcnt of every RAM (one bit per RAM); after HALF words the
// half is marked full and writing moves to the other half.
// Read side: once a half is full it is drained one bit per cycle. Each RAM is
// split into P = 12/NBPSC logical partitions (partition p = addresses with
// address % P == p). Partition 0 of RAM 0, then partition 0 of RAM 1, ...,
// partition 0 of RAM NBPSC-1, then partition 1 of each RAM in the same order,
// and so on; inside a partition the address steps by P. This visits the
// coded bits column by column of a 12-column block interleaver. If the
// other half is already full when a drain ends, the next drain starts in the
// following cycle without a gap.
//
// The read order and the double buffering follow the document; the single
// shared read address (all RAMs get the same r_addr, only one re is high),
// the gap-free hand-over and the overflow flag are this design's choices.
//
// The write enable we is the enable input itself: every accepted word is
// written. Outputs for the read datapath, valid in the cycle re is high: rd_col is
// the interleaver column (0..11) being read, rd_pos the bit's place (0 =
// first) in its NBPSC-bit symbol. overflow is sticky: a half was completed
// by the writer while it was still waiting to be read.
module ilv_addr_gen
  import ofdm_tx_pkg::NCOL;
#(
  parameter int unsigned NBPSC = 6,
  parameter int unsigned HALF  = 192,
  parameter int unsigned AW    = $clog2(2 * HALF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,     // one input word this cycle
  output logic             we,
  output logic [AW-1:0]    w_addr,
  output logic [NBPSC-1:0] re,
  output logic [AW-1:0]    r_addr,
  output logic [3:0]       rd_col,
  output logic [2:0]       rd_pos,
  output logic             overflow
);
  localparam int unsigned P    = NCOL / NBPSC;      // partitions per RAM
  localparam int unsigned PLEN = HALF / P;        // reads per partition
  localparam int unsigned HW   = $clog2(HALF);
  localparam int unsigned PW   = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned RW   = (NBPSC > 1) ? $clog2(NBPSC) : 1;
  localparam int unsigned IW   = $clog2(PLEN);

  initial begin
    assert (12 % NBPSC == 0 && HALF % P == 0 && PLEN % NBPSC == 0)
      else $error("ilv_addr_gen: unsupported NBPSC/HALF");
  end

  typedef enum logic {RD_IDLE, RD_RUN} rd_state_e;
  rd_state_e rd_state;

  logic          wbank, rbank;
  logic [HW-1:0] wcnt;
  logic [1:0]    full;
  logic          wr_done;
  logic [PW-1:0] part;
  logic [RW-1:0] ram;
  logic [IW-1:0] idx;
  logic [HW-1:0] roff;     // part + idx*P
  logic [2:0]    pos;
  logic          rd_last;
  logic [1:0]    full_set, full_clr;

  assign wr_done = enable && (wcnt == HW'(HALF - 1));
  assign rd_last = (rd_state == RD_RUN) && (idx == IW'(PLEN - 1)) &&
                   (ram == RW'(NBPSC - 1)) && (part == PW'(P - 1));

  always_comb begin
    full_set = '0;
    full_clr = '0;
    if (wr_done) full_set[wbank] = 1'b1;
    if (rd_last) full_clr[rbank] = 1'b1;
  end

  // Write address and bank
  assign we     = enable;
  assign w_addr = AW'(wbank) * AW'(HALF) + AW'(wcnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt     <= '0;
      wbank    <= 1'b0;
      full     <= '0;
      overflow <= 1'b0;
    end else begin
      full <= (full & ~full_clr) | full_set;
      if (wr_done && full[wbank] && !full_clr[wbank]) overflow <= 1'b1;
      if (enable) begin
        if (wr_done) begin
          wcnt  <= '0;
          wbank <= ~wbank;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
    end
  end

  // Read sequencing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_state <= RD_IDLE;
      rbank    <= 1'b0;
      part     <= '0;
      ram      <= '0;
      idx      <= '0;
      roff     <= '0;
      pos      <= '0;
    end else begin
      case (rd_state)
        RD_IDLE: begin
          if (full[rbank]) rd_state <= RD_RUN;
        end
        RD_RUN: begin
          pos <= (pos == 3'(NBPSC - 1)) ? 3'd0 : pos + 3'd1;
          if (idx != IW'(PLEN - 1)) begin
            idx  <= idx + 1'b1;
            roff <= roff + HW'(P);
          end else begin
            idx <= '0;
            if (ram != RW'(NBPSC - 1)) begin
              ram  <= ram + 1'b1;
              roff <= HW'(part);
            end else begin
              ram <= '0;
              if (part != PW'(P - 1)) begin
                part <= part + 1'b1;
                roff <= HW'(part) + 1'b1;
              end else begin
                part  <= '0;
                roff  <= '0;
                rbank <= ~rbank;
                // continue straight into the other half if it is (becoming) full
                if (!(full[~rbank] || full_set[~rbank])) rd_state <= RD_IDLE;
              end
            end
          end
        end
        default: rd_state <= RD_IDLE;
      endcase
    end
  end

  always_comb begin
    re = '0;
    if (rd_state == RD_RUN) re[ram] = 1'b1;
  end
  assign r_addr = AW'(rbank) * AW'(HALF) + AW'(roff);
  assign rd_col = 4'(part) * 4'(NBPSC) + 4'(ram);
  assign rd_pos = pos;
endmodule
