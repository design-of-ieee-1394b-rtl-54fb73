// at_tx: asynchronous transmitter.
//
// Three functions are combined here: requesting and releasing the serial bus,
// organizing the header of an asynchronous packet, and sending the packet.
// When TxAEn is set and a packet sits in the AT FIFO the transmitter peeks
// at the transaction code, pops the host header (3 or 4 quadlets), and builds
// the bus header: the destination ID moves from host quadlet 1 into quadlet 0
// and the source ID {BusNumber, NodeNumber} is inserted in quadlet 1. An
// unsupported code raises TcErr and the AT FIFO is emptied. Once the whole
// data block is in the FIFO it sends a fair request on LREQ, waits for the
// grant, drives CTL = 00 for two SCLKs, then CTL = 10 with one byte per SCLK on
// D: header, header CRC, data block, data CRC. It ends with CTL = 00 for one
// SCLK and releases the bus. A non-broadcast packet then waits for the ack
// reported by the receiver (ACKRCV) or its timeout; a missing ack or one that
// is neither complete nor pending raises AccsFailINT. TxRDY marks the end.
// If the PHY starts receiving instead of granting, ConErr is pulsed and the
// request is sent again after the receive. Acknowledge bytes (ACK, 8 bits)
// requested by the receiver (ACK_REQ) are sent unchanged with an immediate
// request as a one-byte packet, ahead of any pending transmission, and PHY
// register accesses (Wrphy/Rdphy) are forwarded to LREQ while idle. RstTx aborts and empties the AT FIFO.
// Host header layout (quadlet 0 = {14'b0, spd, tl, rt, tcode, pri},
// quadlet 1 = {destination_ID, offset_high}) and the ack wait are this
// design's choices; bus packet fields follow IEEE 1394.
module at_tx (
  input  logic        sclk,
  input  logic        rst,
  // AT FIFO read side
  input  logic [31:0] atf_rdata,
  input  logic        atf_empty,
  input  logic [12:0] atf_rlevel,
  output logic        atf_rd_en,
  // control from C/SR (already in the SCLK domain)
  input  logic        tx_en,
  input  logic        rst_tx,
  input  logic [9:0]  bus_number,
  input  logic [5:0]  node_number,
  input  logic [3:0]  phy_rg_ad,
  input  logic [7:0]  phy_rg_data,
  input  logic        wr_phy,
  input  logic        rd_phy,
  // receiver
  input  logic        ack_req,
  input  logic [7:0]  ack,          // ACK: acknowledge byte to send
  input  logic        ack_rcv,
  input  logic [3:0]  ack_rcv_code,
  input  logic        ack_timeout,
  input  logic        rx_busy,
  output logic        ack_expect,
  output logic        tx_busy,
  // PHY interface
  output logic        req_valid,
  output lhc_pkg::lreq_t req,
  input  logic        req_ready,
  input  logic        grant,
  input  logic        lost,
  output logic        drv,
  output logic [1:0]  ctl,
  output logic [7:0]  d,
  // status to C/SR
  output logic        tx_rdy,
  output logic        ackrcv,
  output logic [4:0]  ack_status,  // {timeout, code}
  output logic        tc_err,
  output logic        accs_fail,
  output logic        con_err
);
  import lhc_pkg::*;

  typedef enum logic [4:0] {
    S_IDLE, S_HDR_RD, S_DATA_WAIT, S_REQ, S_WAIT_GRANT, S_LOST,
    S_TX_PRE, S_TX_HDR, S_TX_DATA, S_TX_END, S_TX_REL, S_ACK_WAIT, S_DONE,
    S_DRAIN, S_PHYREQ,
    S_ACK_REQ, S_ACK_GRANT, S_ACK_LOST, S_ACK_PRE, S_ACK_TX, S_ACK_END
  } state_e;

  state_e state, ret_state;

  logic [31:0] hreg [4];       // organized bus header
  logic [2:0]  hq;             // header quadlets
  logic [2:0]  qi;             // quadlet index while reading/sending header
  logic [1:0]  bi;             // byte index within quadlet
  logic [14:0] dq;             // data quadlets
  logic [14:0] di;             // data quadlet index
  logic [1:0]  spd;
  logic        ack_pend;
  logic [7:0]  ack_pend_byte;
  logic        wrphy_pend, rdphy_pend;

  // CRC generator shared by header and data
  logic        crc_init, crc_en;
  logic [7:0]  crc_din;
  logic [31:0] crc;
  crc32_unit u_crc (.clk(sclk), .rst(rst), .init(crc_init), .en(crc_en), .din(crc_din), .crc(crc));

  // quadlet currently being sent
  logic [31:0] cur_q;
  logic        sending_crc;
  always_comb begin
    sending_crc = 1'b0;
    cur_q = '0;
    if (state == S_TX_HDR) begin
      if (qi == hq) begin
        cur_q = crc;
        sending_crc = 1'b1;
      end else begin
        cur_q = hreg[qi[1:0]];
      end
    end else if (state == S_TX_DATA) begin
      if (di == dq) begin
        cur_q = crc;
        sending_crc = 1'b1;
      end else begin
        cur_q = atf_rdata;
      end
    end
  end

  logic [7:0] cur_byte;
  assign cur_byte = cur_q[8*(2'd3 - bi) +: 8];
  assign crc_din  = cur_byte;
  assign crc_en   = (state == S_TX_HDR || state == S_TX_DATA) && !sending_crc;
  assign crc_init = (state == S_TX_PRE) || (state == S_TX_HDR && sending_crc && bi == 2'd3);

  // request to the LREQ serializer
  always_comb begin
    req_valid = 1'b0;
    req = '{rtype: LR_FAIR, speed: {spd, 1'b0}, addr: phy_rg_ad, data: phy_rg_data};
    case (state)
      S_REQ:     req_valid = !ack_pend;
      S_ACK_REQ: begin req_valid = 1'b1; req.rtype = LR_IMM; end
      S_PHYREQ:  begin req_valid = 1'b1; req.rtype = wrphy_pend ? LR_WRREG : LR_RDREG; end
      default: ;
    endcase
  end

  // FIFO pops
  always_comb begin
    atf_rd_en = 1'b0;
    case (state)
      S_HDR_RD:  atf_rd_en = 1'b1;
      S_TX_DATA: atf_rd_en = (di != dq) && (bi == 2'd3);
      S_DRAIN:   atf_rd_en = !atf_empty;
      default: ;
    endcase
  end

  logic [3:0] peek_tc;
  logic [2:0] peek_hq;
  assign peek_tc = atf_rdata[7:4];
  assign peek_hq = async_hdr_quads(peek_tc);

  logic broadcast;
  assign broadcast = (hreg[0][21:16] == 6'h3F);

  assign tx_busy = (state inside {S_TX_PRE, S_TX_HDR, S_TX_DATA, S_TX_END, S_TX_REL,
                                  S_ACK_PRE, S_ACK_TX, S_ACK_END});

  always_ff @(posedge sclk) begin
    if (rst) begin
      state         <= S_IDLE;
      ret_state     <= S_IDLE;
      qi            <= '0;
      bi            <= '0;
      hq            <= '0;
      dq            <= '0;
      di            <= '0;
      spd           <= '0;
      ack_pend      <= 1'b0;
      ack_pend_byte <= '0;
      wrphy_pend    <= 1'b0;
      rdphy_pend    <= 1'b0;
      drv           <= 1'b0;
      ctl           <= LCTL_IDLE;
      d             <= '0;
      ack_expect    <= 1'b0;
      tx_rdy        <= 1'b0;
      ackrcv        <= 1'b0;
      ack_status    <= '0;
      tc_err        <= 1'b0;
      accs_fail     <= 1'b0;
      con_err       <= 1'b0;
      for (int i = 0; i < 4; i++) hreg[i] <= '0;
    end else begin
      ack_expect <= 1'b0;
      tx_rdy     <= 1'b0;
      ackrcv     <= 1'b0;
      tc_err     <= 1'b0;
      accs_fail  <= 1'b0;
      con_err    <= 1'b0;
      if (ack_req) begin
        ack_pend      <= 1'b1;
        ack_pend_byte <= ack;
      end
      if (wr_phy) wrphy_pend <= 1'b1;
      if (rd_phy) rdphy_pend <= 1'b1;

      case (state)
        S_IDLE: begin
          drv <= 1'b0;
          if (ack_pend) begin
            ret_state <= S_IDLE;
            state     <= S_ACK_REQ;
          end else if (wrphy_pend || rdphy_pend) begin
            state <= S_PHYREQ;
          end else if (tx_en && !atf_empty) begin
            if (peek_hq == 3'd0) begin
              tc_err <= 1'b1;
              state  <= S_DRAIN;
            end else if (atf_rlevel >= 13'(peek_hq)) begin
              hq    <= peek_hq;
              qi    <= '0;
              state <= S_HDR_RD;
            end
          end
        end

        // header organization: one host quadlet per cycle
        S_HDR_RD: begin
          case (qi)
            3'd0: begin
              spd     <= atf_rdata[17:16];
              hreg[0] <= {16'h0, atf_rdata[15:0]};
            end
            3'd1: begin
              hreg[0][31:16] <= atf_rdata[31:16];
              hreg[1]        <= {bus_number, node_number, atf_rdata[15:0]};
            end
            default: hreg[qi[1:0]] <= atf_rdata;
          endcase
          if (qi + 1'b1 == hq) state <= S_DATA_WAIT;
          qi <= qi + 1'b1;
        end

        S_DATA_WAIT: begin
          dq <= async_has_block(hreg[0][7:4]) ? bytes_to_quads(hreg[3][31:16]) : '0;
          if (ack_pend) begin
            ret_state <= S_DATA_WAIT;
            state     <= S_ACK_REQ;
          end else if (atf_rlevel >= 13'(async_has_block(hreg[0][7:4]) ? bytes_to_quads(hreg[3][31:16]) : 15'd0)) begin
            state <= S_REQ;
          end
        end

        S_REQ: begin
          if (ack_pend) begin
            ret_state <= S_REQ;
            state     <= S_ACK_REQ;
          end else if (req_ready) begin
            state <= S_WAIT_GRANT;
          end
        end

        S_WAIT_GRANT: begin
          if (grant) begin
            state <= S_TX_PRE;
            drv   <= 1'b1;
            ctl   <= LCTL_IDLE;
            d     <= '0;
          end else if (lost) begin
            con_err <= 1'b1;
            state   <= S_LOST;
          end
        end

        S_LOST: if (!rx_busy) state <= S_REQ;

        S_TX_PRE: begin
          qi    <= '0;
          bi    <= '0;
          di    <= '0;
          state <= S_TX_HDR;
        end

        S_TX_HDR: begin
          ctl <= LCTL_TRANSMIT;
          d   <= cur_byte;
          bi  <= bi + 1'b1;
          if (bi == 2'd3) begin
            if (sending_crc) state <= (dq != '0) ? S_TX_DATA : S_TX_END;
            else             qi <= qi + 1'b1;
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
          drv <= 1'b0;
          if (!broadcast) begin
            ack_expect <= 1'b1;
            state      <= S_ACK_WAIT;
          end else begin
            state <= S_DONE;
          end
        end

        S_ACK_WAIT: begin
          if (ack_rcv) begin
            ackrcv     <= 1'b1;
            ack_status <= {1'b0, ack_rcv_code};
            accs_fail  <= !(ack_rcv_code == ACK_COMPLETE || ack_rcv_code == ACK_PENDING);
            state      <= S_DONE;
          end else if (ack_timeout) begin
            ack_status <= 5'h10;
            accs_fail  <= 1'b1;
            state      <= S_DONE;
          end
        end

        S_DONE: begin
          tx_rdy <= 1'b1;
          state  <= S_IDLE;
        end

        S_DRAIN: if (atf_empty) state <= S_IDLE;

        S_PHYREQ: begin
          if (req_ready) begin
            if (wrphy_pend) wrphy_pend <= 1'b0;
            else            rdphy_pend <= 1'b0;
            state <= S_IDLE;
          end
        end

        // ---- acknowledge packet ----
        S_ACK_REQ: if (req_ready) state <= S_ACK_GRANT;

        S_ACK_GRANT: begin
          if (grant) begin
            drv   <= 1'b1;
            ctl   <= LCTL_IDLE;
            d     <= '0;
            state <= S_ACK_PRE;
          end else if (lost) begin
            state <= S_ACK_LOST;
          end
        end

        S_ACK_LOST: if (!rx_busy) state <= S_ACK_REQ;

        S_ACK_PRE: begin
          ctl   <= LCTL_TRANSMIT;
          d     <= ack_pend_byte;
          state <= S_ACK_TX;
        end

        S_ACK_TX: begin
          ctl   <= LCTL_IDLE;
          d     <= '0;
          state <= S_ACK_END;
        end

        S_ACK_END: begin
          drv      <= 1'b0;
          ack_pend <= ack_req;
          state    <= ret_state;
        end

        default: state <= S_IDLE;
      endcase

      if (rst_tx) begin
        state      <= S_DRAIN;
        drv        <= 1'b0;
        ack_pend   <= 1'b0;
        wrphy_pend <= 1'b0;
        rdphy_pend <= 1'b0;
      end
    end
  end
endmodule
