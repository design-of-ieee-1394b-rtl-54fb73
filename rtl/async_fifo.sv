// async_fifo: dual-clock first-word-fall-through FIFO used for the AT, IT and
// GR FIFOs of the link controller, which sit between the host clock domain and
// the PHY clock domain.
//
// Each side keeps a free-running binary count of the words it has moved; the
// counts cross to the other side as Gray code through two flops. Because the
// counts are one bit wider than needed for DEPTH, occupancy is their
// difference even when DEPTH is not a power of two (the 5 KB AT FIFO holds
// 1280 quadlets). The memory index of each side is a separate counter that
// wraps at DEPTH. rdata always shows the oldest word (combinational read);
// rd_en pops it. wlevel is the occupancy seen from the write side (never
// lower than the true one) and rlevel the occupancy seen from the read side
// (never higher). A write when full or a read when empty is ignored.
// Depths are the document's capacities; counting them as bytes of 32-bit
// quadlets, the two-flop Gray synchronizers and the fall-through read are
// this design's choices.
module async_fifo #(
  parameter int DEPTH = 1280,
  parameter int DW    = 32,
  localparam int IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW   = $clog2(DEPTH) + 2
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          full,
  output logic [CW-1:0] wlevel,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [CW-1:0] rlevel
);
  logic [DW-1:0] mem [DEPTH];

  logic [CW-1:0] wcnt, rcnt;            // binary counts
  logic [CW-1:0] wgray, rgray;          // Gray counts, registered
  logic [CW-1:0] rgray_s1, rgray_s2;    // read count in write domain
  logic [CW-1:0] wgray_s1, wgray_s2;    // write count in read domain
  logic [IW-1:0] widx, ridx;

  function automatic logic [CW-1:0] bin2gray(input logic [CW-1:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [CW-1:0] gray2bin(input logic [CW-1:0] g);
    logic [CW-1:0] b;
    b[CW-1] = g[CW-1];
    for (int i = CW - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  logic do_wr;
  assign wlevel = wcnt - gray2bin(rgray_s2);
  assign full   = (wlevel >= CW'(DEPTH));
  assign do_wr  = wr_en && !full;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wcnt     <= '0;
      wgray    <= '0;
      widx     <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (do_wr) begin
        wcnt  <= wcnt + 1'b1;
        wgray <= bin2gray(wcnt + 1'b1);
        widx  <= (widx == IW'(DEPTH - 1)) ? '0 : widx + 1'b1;
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (do_wr) mem[widx] <= wdata;
  end

  // ---------------- read side ----------------
  logic do_rd;
  assign rlevel = gray2bin(wgray_s2) - rcnt;
  assign empty  = (rlevel == '0);
  assign do_rd  = rd_en && !empty;
  assign rdata  = mem[ridx];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rcnt     <= '0;
      rgray    <= '0;
      ridx     <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      if (do_rd) begin
        rcnt  <= rcnt + 1'b1;
        rgray <= bin2gray(rcnt + 1'b1);
        ridx  <= (ridx == IW'(DEPTH - 1)) ? '0 : ridx + 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge wclk) disable iff (wrst) wlevel <= CW'(DEPTH));
endmodule
