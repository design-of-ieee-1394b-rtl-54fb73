// lhc_pkg: types and constants shared by the IEEE 1394b link-layer controller.
//
// Holds the PHY-link interface encodings (CTL codes, LREQ request types,
// speed codes), the IEEE 1394 transaction codes and acknowledge codes, the
// host register map of the controller, and the byte-serial CRC-32 update
// used for header and data CRCs. The 1394 encodings follow the IEEE 1394
// standard; the register map and the PHY status layout are this design's own.
package lhc_pkg;

  // CTL[1:0] driven by the PHY
  typedef enum logic [1:0] {
    PCTL_IDLE    = 2'b00,
    PCTL_STATUS  = 2'b01,
    PCTL_RECEIVE = 2'b10,
    PCTL_GRANT   = 2'b11
  } phy_ctl_e;

  // CTL[1:0] driven by the link after a grant
  localparam logic [1:0] LCTL_IDLE     = 2'b00;
  localparam logic [1:0] LCTL_HOLD     = 2'b01;
  localparam logic [1:0] LCTL_TRANSMIT = 2'b10;

  // LREQ request types (3 bits, sent after the start bit)
  typedef enum logic [2:0] {
    LR_IMM  = 3'b000,
    LR_ISO  = 3'b001,
    LR_PRI  = 3'b010,
    LR_FAIR = 3'b011,
    LR_RDREG = 3'b100,
    LR_WRREG = 3'b101
  } lreq_type_e;

  // A request handed to the LREQ serializer
  typedef struct packed {
    lreq_type_e  rtype;
    logic [2:0]  speed;   // LREQ speed field
    logic [3:0]  addr;    // PHY register address (RdReg/WrReg)
    logic [7:0]  data;    // PHY register data (WrReg)
  } lreq_t;

  // Transaction codes
  localparam logic [3:0] TC_WRQ   = 4'h0; // write request, quadlet
  localparam logic [3:0] TC_WRB   = 4'h1; // write request, block
  localparam logic [3:0] TC_WRS   = 4'h2; // write response
  localparam logic [3:0] TC_RRQ   = 4'h4; // read request, quadlet
  localparam logic [3:0] TC_RRB   = 4'h5; // read request, block
  localparam logic [3:0] TC_RRSQ  = 4'h6; // read response, quadlet
  localparam logic [3:0] TC_RRSB  = 4'h7; // read response, block
  localparam logic [3:0] TC_CYCST = 4'h8; // cycle start
  localparam logic [3:0] TC_LRQ   = 4'h9; // lock request
  localparam logic [3:0] TC_ISO   = 4'hA; // isochronous block
  localparam logic [3:0] TC_LRS   = 4'hB; // lock response

  // Acknowledge codes
  localparam logic [3:0] ACK_COMPLETE   = 4'h1;
  localparam logic [3:0] ACK_PENDING    = 4'h2;
  localparam logic [3:0] ACK_BUSY_X     = 4'h4;
  localparam logic [3:0] ACK_DATA_ERROR = 4'hD;

  // Header length in quadlets (without the header CRC) of an asynchronous
  // packet; 0 marks a transaction code the transmitter does not handle.
  function automatic logic [2:0] async_hdr_quads(input logic [3:0] tc);
    case (tc)
      TC_WRQ, TC_WRB, TC_RRB, TC_RRSQ, TC_RRSB, TC_CYCST, TC_LRQ, TC_LRS: return 3'd4;
      TC_WRS, TC_RRQ: return 3'd3;
      default: return 3'd0;
    endcase
  endfunction

  // Does the asynchronous packet carry a data block (length in quadlet 3)?
  function automatic logic async_has_block(input logic [3:0] tc);
    return (tc == TC_WRB) || (tc == TC_RRSB) || (tc == TC_LRQ) || (tc == TC_LRS);
  endfunction

  // Bytes to whole quadlets
  function automatic logic [14:0] bytes_to_quads(input logic [15:0] nbytes);
    return 15'((17'(nbytes) + 17'd3) >> 2);
  endfunction

  // Ack byte: code in the upper nibble, its one's complement below
  function automatic logic [7:0] ack_byte(input logic [3:0] code);
    return {code, ~code};
  endfunction

  // CRC-32 (polynomial 04C11DB7), one byte, most significant bit first
  localparam logic [31:0] CRC_POLY = 32'h04C1_1DB7;
  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] b);
    logic [31:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[31] ^ b[i]) c = (c << 1) ^ CRC_POLY;
      else              c = c << 1;
    end
    return c;
  endfunction

  // Host register map (byte addresses)
  localparam logic [7:0] A_CTRL   = 8'h00;
  localparam logic [7:0] A_NODEID = 8'h04;
  localparam logic [7:0] A_INTSTS = 8'h08;
  localparam logic [7:0] A_INTMSK = 8'h0C;
  localparam logic [7:0] A_ACKSTS = 8'h10;
  localparam logic [7:0] A_PHYREG = 8'h14;
  localparam logic [7:0] A_CYCTMR = 8'h18;
  localparam logic [7:0] A_FIFOST = 8'h1C;
  localparam logic [7:0] A_ATF    = 8'h20;
  localparam logic [7:0] A_ITF    = 8'h24;
  localparam logic [7:0] A_GRF    = 8'h28;

  // Interrupt status bits
  localparam int I_TXRDY    = 0;  // asynchronous packet finished
  localparam int I_ACKRCV   = 1;  // acknowledge received
  localparam int I_TCERR    = 2;  // unsupported transaction code in AT FIFO
  localparam int I_ACCSFAIL = 3;  // ack missing or not complete/pending
  localparam int I_CONERR   = 4;  // arbitration lost, request reissued
  localparam int I_RXPKT    = 5;  // packet stored in GR FIFO
  localparam int I_ITDONE   = 6;  // isochronous packet sent
  localparam int I_PHYREG   = 7;  // PHY register read data arrived
  localparam int I_BUSRST   = 8;  // PHY reported bus reset
  localparam int I_CYCLOST  = 9;  // cycle start missing
  localparam int I_HDRERR   = 10; // received header CRC error
  localparam int I_CYCST    = 11; // cycle start received
  localparam int N_INT      = 12;

endpackage
