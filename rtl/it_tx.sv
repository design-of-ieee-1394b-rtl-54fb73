// it_tx: isochronous transmitter.
//
// The host writes a two-quadlet header into the IT FIFO,
//   quadlet 0 = {14'b0, spd[1:0], tag[1:0], channel[5:0], tcode[3:0], sy[3:0]}
//   quadlet 1 = {data_length[15:0], 16'b0},
// followed by the data block. The transmitter re-organizes this into the one
// quadlet bus header {data_length, tag, channel, tcode, sy}. When TxIEn is
// set it waits for a cycle start (from the cycle monitor), checks the
// transaction code (anything but A raises TcErr and empties the IT FIFO),
// waits until the whole data block is in the FIFO, sends an isochronous
// request on LREQ and, on the grant, drives CTL = 00 for two SCLKs and then
// CTL = 10 with one byte per SCLK: header, header CRC, data read straight from
// the IT FIFO, data CRC. It ends with CTL = 00 for one SCLK and pulses it_done.
// One packet is sent per isochronous cycle. A receive that pre-empts the
// request pulses con_err and the request is repeated after it.
// The host header layout and one packet per cycle are this design's choices.
module it_tx (
  input  logic        sclk,
  input  logic        rst,
  input  logic [31:0] itf_rdata,
  input  logic        itf_empty,
  input  logic [12:0] itf_rlevel,
  output logic        itf_rd_en,
  input  logic        tx_en,
  input  logic        rst_tx,
  input  logic        cyc_start,
  input  logic        rx_busy,
  output logic        tx_busy,
  output logic        req_valid,
  output lhc_pkg::lreq_t req,
  input  logic        req_ready,
  input  logic        grant,
  input  logic        lost,
  output logic        drv,
  output logic [1:0]  ctl,
  output logic [7:0]  d,
  output logic        it_done,
  output logic        tc_err,
  output logic        con_err
);
  import lhc_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_HDR_RD, S_DATA_WAIT, S_REQ, S_WAIT_GRANT, S_LOST,
    S_TX_PRE, S_TX_HDR, S_TX_DATA, S_TX_END, S_TX_REL, S_DRAIN
  } state_e;
  state_e state;

  logic [31:0] hdr;
  logic [1:0]  spd;
  logic        qi;
  logic [1:0]  bi;
  logic        hdr_crc_sent;
  logic [14:0] dq, di;
  logic        armed;          // a cycle start was seen since the last packet

  logic        crc_init, crc_en;
  logic [31:0] crc;
  logic [31:0] cur_q;
  logic        sending_crc;
  logic [7:0]  cur_byte;

  always_comb begin
    sending_crc = 1'b0;
    cur_q = hdr;
    if (state == S_TX_HDR) begin
      sending_crc = hdr_crc_sent;
      cur_q = hdr_crc_sent ? crc : hdr;
    end else if (state == S_TX_DATA) begin
      sending_crc = (di == dq);
      cur_q = (di == dq) ? crc : itf_rdata;
    end
  end
  assign cur_byte = cur_q[8*(2'd3 - bi) +: 8];
  assign crc_en   = (state == S_TX_HDR || state == S_TX_DATA) && !sending_crc;
  assign crc_init = (state == S_TX_PRE) || (state == S_TX_HDR && sending_crc && bi == 2'd3);

  crc32_unit u_crc (.clk(sclk), .rst(rst), .init(crc_init), .en(crc_en), .din(cur_byte), .crc(crc));

  assign req_valid = (state == S_REQ);
  assign req = '{rtype: LR_ISO, speed: {spd, 1'b0}, addr: 4'h0, data: 8'h00};

  always_comb begin
    itf_rd_en = 1'b0;
    case (state)
      S_HDR_RD:  itf_rd_en = 1'b1;
      S_TX_DATA: itf_rd_en = (di != dq) && (bi == 2'd3);
      S_DRAIN:   itf_rd_en = !itf_empty;
      default: ;
    endcase
  end

  assign tx_busy = (state inside {S_TX_PRE, S_TX_HDR, S_TX_DATA, S_TX_END, S_TX_REL});

  always_ff @(posedge sclk) begin
    if (rst) begin
      state        <= S_IDLE;
      hdr          <= '0;
      spd          <= '0;
      qi           <= 1'b0;
      bi           <= '0;
      hdr_crc_sent <= 1'b0;
      dq           <= '0;
      di           <= '0;
      armed        <= 1'b0;
      drv          <= 1'b0;
      ctl          <= LCTL_IDLE;
      d            <= '0;
      it_done      <= 1'b0;
      tc_err       <= 1'b0;
      con_err      <= 1'b0;
    end else begin
      it_done <= 1'b0;
      tc_err  <= 1'b0;
      con_err <= 1'b0;
      if (cyc_start) armed <= 1'b1;

      case (state)
        S_IDLE: begin
          drv <= 1'b0;
          if (tx_en && !itf_empty && armed) begin
            if (itf_rdata[7:4] != TC_ISO) begin
              tc_err <= 1'b1;
              state  <= S_DRAIN;
            end else if (itf_rlevel >= 13'd2) begin
              qi    <= 1'b0;
              state <= S_HDR_RD;
            end
          end
        end

        S_HDR_RD: begin
          if (!qi) begin
            spd        <= itf_rdata[17:16];
            hdr[15:0]  <= itf_rdata[15:0];
            qi         <= 1'b1;
          end else begin
            hdr[31:16] <= itf_rdata[31:16];
            dq         <= bytes_to_quads(itf_rdata[31:16]);
            state      <= S_DATA_WAIT;
          end
        end

        S_DATA_WAIT: if (itf_rlevel >= 13'(dq)) state <= S_REQ;

        S_REQ: if (req_ready) state <= S_WAIT_GRANT;

        S_WAIT_GRANT: begin
          if (grant) begin
            drv   <= 1'b1;
            ctl   <= LCTL_IDLE;
            d     <= '0;
            state <= S_TX_PRE;
          end else if (lost) begin
            con_err <= 1'b1;
            state   <= S_LOST;
          end
        end

        S_LOST: if (!rx_busy) state <= S_REQ;

        S_TX_PRE: begin
          bi           <= '0;
          di           <= '0;
          hdr_crc_sent <= 1'b0;
          state        <= S_TX_HDR;
        end

        S_TX_HDR: begin
          ctl <= LCTL_TRANSMIT;
          d   <= cur_byte;
          bi  <= bi + 1'b1;
          if (bi == 2'd3) begin
            if (sending_crc) state <= (dq != '0) ? S_TX_DATA : S_TX_END;
            else             hdr_crc_sent <= 1'b1;
          end
        end

        S_TX_DATA: begin
          ctl <= LCTL_TRANSMIT;
          d   <= cur_byte;
          bi  <= bi + 1'b1;
          if (bi == 2'd3) begin
            if (sending_crc) state <= S_TX_END;
            else             di <= di + 1'b1;
          end
        end

        S_TX_END: begin
          ctl   <= LCTL_IDLE;
          d     <= '0;
          state <= S_TX_REL;
        end

        S_TX_REL: begin
          drv     <= 1'b0;
          armed   <= cyc_start;
          it_done <= 1'b1;
          state   <= S_IDLE;
        end

        S_DRAIN: if (itf_empty) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase

      if (rst_tx) begin
        state <= S_DRAIN;
        drv   <= 1'b0;
      end
    end
  end
endmodule
