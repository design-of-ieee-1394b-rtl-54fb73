// receiver: takes packets and status from the PHY and stores packets into the
// GR FIFO.
//
// A receive is CTL = 10 from the PHY. Bytes of FF ("data on") are skipped;
// the first other byte is the speed code, then come packet bytes, one per
// SCLK, most significant byte of each quadlet first, until CTL leaves 10.
// Bytes are assembled into quadlets. Quadlet 0 gives the transaction code and
// so the header length; the header CRC quadlet is compared with a CRC-32
// computed over the header, and for packets with a data block (length from
// the header) a second CRC covers the data. A packet is kept when its header
// CRC is good and it is an asynchronous packet for this node or a broadcast
// (and asynchronous receive is enabled), or an isochronous packet on the
// enabled channel. A kept packet goes to the GR FIFO as its header quadlets
// (written while the data is still arriving), its data quadlets and a trailer
// quadlet {speed code[7:0], 16'h0, ack[3:0], 1'b0, complete, header_ok,
// data_ok}: the CRC quadlets are dropped and the status added. The room it
// needs is checked at the header CRC; if it does not fit, it is dropped and
// answered with ack_busy_X. Other asynchronous packets addressed to this node
// are answered with ack_complete (writes, responses), ack_pending (reads,
// locks) or ack_data_error (bad data CRC) through the asynchronous
// transmitter. A one-byte packet is an acknowledge: when the transmitter is
// waiting for one (ack_expect) it is reported on ack_rcv, and if none comes
// within ACK_TIMEOUT SCLKs ack_timeout is pulsed. A good cycle start packet
// is passed to the cycle monitor instead of the FIFO. CTL = 01 is a PHY
// status transfer, two bits per SCLK on D[1:0], most significant first:
// two cycles carry the four status bits, eight cycles carry
// {status[3:0], register address[3:0], register data[7:0]}; status bit 1 of
// the nibble (S2) reports a bus reset.
// The GR FIFO packet layout, the trailer, the timeout and the status order
// are this design's choices; packet fields, CRC and ack codes follow
// IEEE 1394.
module receiver #(
  parameter int GRF_DEPTH   = 1280,
  parameter int ACK_TIMEOUT = 256,
  localparam int CW = $clog2(GRF_DEPTH) + 2
) (
  input  logic          sclk,
  input  logic          rst,
  input  logic [1:0]    ctl_r,
  input  logic [7:0]    d_r,
  // configuration
  input  logic [9:0]    bus_number,
  input  logic [5:0]    node_number,
  input  logic          rx_en,
  input  logic          ir_en,
  input  logic [5:0]    ir_channel,
  // GR FIFO write side
  output logic          grf_wr_en,
  output logic [31:0]   grf_wdata,
  input  logic [CW-1:0] grf_wlevel,
  // acknowledges
  output logic          ack_req,
  output logic [7:0]    ack,          // ACK: acknowledge byte {code, ~code} to send
  input  logic          ack_expect,
  output logic          ack_rcv,
  output logic [3:0]    ack_rcv_code,
  output logic          ack_timeout,
  output logic          rx_busy,
  // cycle start packets
  output logic          cyc_start_pkt,
  output logic [31:0]   cyc_time,
  // status
  output logic          rx_pkt,
  output logic          hdr_err,
  output logic          phy_reg_valid,
  output logic [3:0]    phy_reg_addr,
  output logic [7:0]    phy_reg_data,
  output logic          bus_reset
);
  import lhc_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_DATAON, S_PKT, S_END, S_STATUS} state_e;
  state_e state;

  logic [7:0]  spd_code;
  logic [23:0] qacc;        // bytes of the quadlet being assembled
  logic [1:0]  bcnt;
  logic [15:0] qn;          // quadlets completed so far
  logic [15:0] nbytes;
  logic [31:0] hdr [4];
  logic [3:0]  tcode;
  logic [2:0]  hq;
  logic [14:0] dq;
  logic        hdr_ok, data_ok, hdr_done, data_done;
  logic        store, ours, nofit;
  logic [2:0]  flush_idx;
  logic        flushing;
  logic [15:0] sbits;
  logic [3:0]  scnt;
  logic        ack_wait;
  logic [15:0] ack_tmr;

  logic        byte_in;     // a packet byte is on d_r this cycle
  logic [31:0] qw;          // completed quadlet (valid when qdone)
  logic        qdone;
  assign byte_in = (state == S_PKT) && (ctl_r == PCTL_RECEIVE);
  assign qw      = {qacc, d_r};
  assign qdone   = byte_in && (bcnt == 2'd3);

  // ---------------- CRC ----------------
  logic        crc_init, crc_en;
  logic [31:0] crc;
  logic [15:0] dq16;
  assign dq16 = {1'b0, dq};
  // a byte belongs to the header while qn < hq (quadlet 0 always does),
  // to the data block while hq < qn <= hq + dq
  assign crc_en   = byte_in && ((qn == 16'd0) || (qn < 16'(hq)) ||
                    (qn > 16'(hq) && qn <= 16'(hq) + dq16));
  assign crc_init = (state == S_IDLE) || (state == S_DATAON) || (qdone && qn == 16'(hq) && qn != 16'd0);
  crc32_unit u_crc (.clk(sclk), .rst(rst), .init(crc_init), .en(crc_en), .din(d_r), .crc(crc));

  // ---------------- header decisions ----------------
  logic [15:0] dest;
  logic        is_iso, to_us, bcast, accept_c, fits_c;
  logic [15:0] need;
  logic [CW:0] space;
  assign dest     = hdr[0][31:16];
  assign is_iso   = (tcode == TC_ISO);
  assign to_us    = (dest == {bus_number, node_number});
  assign bcast    = (dest[5:0] == 6'h3F) && (dest[15:6] == bus_number || dest[15:6] == 10'h3FF);
  assign need     = 16'(hq) + dq16 + 16'd1;
  assign space    = (CW+1)'(GRF_DEPTH) - {1'b0, grf_wlevel};
  assign fits_c   = ({{(32-CW-1){1'b0}}, space} >= {16'h0, need});
  assign accept_c = (qw == crc) && (is_iso ? (ir_en && hdr[0][13:8] == ir_channel)
                                           : (rx_en && (to_us || bcast) && tcode != TC_CYCST));
  logic at_hdr_crc;
  assign at_hdr_crc = qdone && qn != 16'd0 && qn == 16'(hq);

  logic [3:0] ack_code_c;
  logic       ack_due;

  // ---------------- GR FIFO writes ----------------
  always_comb begin
    grf_wr_en = 1'b0;
    grf_wdata = '0;
    if (at_hdr_crc && accept_c && fits_c) begin
      grf_wr_en = 1'b1;
      grf_wdata = hdr[0];
    end else if (flushing) begin
      grf_wr_en = 1'b1;
      grf_wdata = hdr[flush_idx[1:0]];
    end else if (store && qdone && qn > 16'(hq) && qn <= 16'(hq) + dq16) begin
      grf_wr_en = 1'b1;
      grf_wdata = qw;
    end else if (state == S_END && !flushing && store) begin
      grf_wr_en = 1'b1;
      grf_wdata = {spd_code, 16'h0, ack_code_c, 1'b0, (data_done || dq == '0),
                   hdr_ok, data_ok};
    end
  end

  // ack code for the packet just ended
  always_comb begin
    if (nofit)
      ack_code_c = ACK_BUSY_X;
    else if (!data_ok || (dq != '0 && !data_done))
      ack_code_c = ACK_DATA_ERROR;
    else if (tcode == TC_RRQ || tcode == TC_RRB || tcode == TC_LRQ)
      ack_code_c = ACK_PENDING;
    else
      ack_code_c = ACK_COMPLETE;
  end
  assign ack_due = hdr_done && hdr_ok && !is_iso && ours && tcode != TC_CYCST;

  assign rx_busy = (state != S_IDLE);

  always_ff @(posedge sclk) begin
    if (rst) begin
      state         <= S_IDLE;
      spd_code      <= '0;
      qacc          <= '0;
      bcnt          <= '0;
      qn            <= '0;
      nbytes        <= '0;
      tcode         <= '0;
      hq            <= '0;
      dq            <= '0;
      hdr_ok        <= 1'b0;
      data_ok       <= 1'b1;
      hdr_done      <= 1'b0;
      data_done     <= 1'b0;
      store         <= 1'b0;
      ours          <= 1'b0;
      nofit         <= 1'b0;
      flush_idx     <= '0;
      flushing      <= 1'b0;
      sbits         <= '0;
      scnt          <= '0;
      ack_wait      <= 1'b0;
      ack_tmr       <= '0;
      ack_req       <= 1'b0;
      ack           <= '0;
      ack_rcv       <= 1'b0;
      ack_rcv_code  <= '0;
      ack_timeout   <= 1'b0;
      cyc_start_pkt <= 1'b0;
      cyc_time      <= '0;
      rx_pkt        <= 1'b0;
      hdr_err       <= 1'b0;
      phy_reg_valid <= 1'b0;
      phy_reg_addr  <= '0;
      phy_reg_data  <= '0;
      bus_reset     <= 1'b0;
      for (int i = 0; i < 4; i++) hdr[i] <= '0;
    end else begin
      ack_req       <= 1'b0;
      ack_rcv       <= 1'b0;
      ack_timeout   <= 1'b0;
      cyc_start_pkt <= 1'b0;
      rx_pkt        <= 1'b0;
      hdr_err       <= 1'b0;
      phy_reg_valid <= 1'b0;
      bus_reset     <= 1'b0;

      // ack timeout
      if (ack_expect) begin
        ack_wait <= 1'b1;
        ack_tmr  <= '0;
      end else if (ack_wait && state == S_IDLE) begin
        ack_tmr <= ack_tmr + 1'b1;
        if (ack_tmr == 16'(ACK_TIMEOUT - 1)) begin
          ack_wait    <= 1'b0;
          ack_timeout <= 1'b1;
        end
      end

      // header flush into the GR FIFO
      if (at_hdr_crc && accept_c && fits_c && hq > 3'd1) begin
        flushing  <= 1'b1;
        flush_idx <= 3'd1;
      end else if (flushing) begin
        flush_idx <= flush_idx + 1'b1;
        if (flush_idx + 1'b1 == hq) flushing <= 1'b0;
      end

      case (state)
        S_IDLE: begin
          if (ctl_r == PCTL_RECEIVE) begin
            state <= S_DATAON;
            if (d_r != 8'hFF) begin
              spd_code <= d_r;
              state    <= S_PKT;
            end
          end else if (ctl_r == PCTL_STATUS) begin
            sbits <= {14'h0, d_r[1:0]};
            scnt  <= 4'd1;
            state <= S_STATUS;
          end
          qn        <= '0;
          bcnt      <= '0;
          nbytes    <= '0;
          hq        <= '0;
          dq        <= '0;
          hdr_ok    <= 1'b0;
          data_ok   <= 1'b1;
          hdr_done  <= 1'b0;
          data_done <= 1'b0;
          store     <= 1'b0;
          ours      <= 1'b0;
          nofit     <= 1'b0;
        end

        S_DATAON: begin
          if (ctl_r != PCTL_RECEIVE) state <= S_IDLE;
          else if (d_r != 8'hFF) begin
            spd_code <= d_r;
            state    <= S_PKT;
          end
        end

        S_PKT: begin
          if (ctl_r != PCTL_RECEIVE) begin
            state <= S_END;
          end else begin
            nbytes <= nbytes + 1'b1;
            qacc   <= {qacc[15:0], d_r};
            bcnt   <= bcnt + 1'b1;
            if (qdone) begin
              qn <= qn + 1'b1;
              if (qn == 16'd0) begin
                hdr[0] <= qw;
                tcode  <= qw[7:4];
                if (qw[7:4] == TC_ISO) begin
                  hq <= 3'd1;
                  dq <= bytes_to_quads(qw[31:16]);
                end else begin
                  hq <= async_hdr_quads(qw[7:4]);
                  dq <= '0;
                end
              end else if (qn < 16'(hq)) begin
                hdr[qn[1:0]] <= qw;
                if (qn == 16'd3 && async_has_block(tcode)) dq <= bytes_to_quads(qw[31:16]);
              end else if (qn == 16'(hq) && hq != 3'd0) begin
                hdr_done <= 1'b1;
                hdr_ok   <= (qw == crc);
                hdr_err  <= (qw != crc);
                store    <= accept_c && fits_c;
                nofit    <= accept_c && !fits_c;
                ours     <= !is_iso && to_us && rx_en;
                if (qw == crc && tcode == TC_CYCST) begin
                  cyc_start_pkt <= 1'b1;
                  cyc_time      <= hdr[3];
                end
              end else if (dq != '0 && qn == 16'(hq) + dq16 + 16'd1) begin
                data_done <= 1'b1;
                data_ok   <= (qw == crc);
              end
            end
          end
        end

        S_END: begin
          if (!flushing) begin
            state <= S_IDLE;
            if (nbytes == 16'd1) begin
              // acknowledge packet
              if (ack_wait && qacc[7:4] == ~qacc[3:0]) begin
                ack_wait     <= 1'b0;
                ack_rcv      <= 1'b1;
                ack_rcv_code <= qacc[7:4];
              end
            end else begin
              if (store) rx_pkt <= 1'b1;
              if (ack_due) begin
                ack_req  <= 1'b1;
                ack <= ack_byte(ack_code_c);
              end
            end
          end
        end

        S_STATUS: begin
          if (ctl_r == PCTL_STATUS) begin
            sbits <= {sbits[13:0], d_r[1:0]};
            scnt  <= scnt + 1'b1;
          end else begin
            state <= S_IDLE;
            if (scnt >= 4'd8) begin
              phy_reg_valid <= 1'b1;
              phy_reg_addr  <= sbits[11:8];
              phy_reg_data  <= sbits[7:0];
              bus_reset     <= sbits[13];
            end else if (scnt >= 4'd2) begin
              bus_reset     <= sbits[1];
            end
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_grf_room: assert property (@(posedge sclk) disable iff (rst)
                               grf_wr_en |-> (grf_wlevel < CW'(GRF_DEPTH)));
endmodule
