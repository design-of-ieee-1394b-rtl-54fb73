// phy_if: link side of the PHY-link interface (CTL[1:0], D[7:0], LREQ).
//
// Inputs from the PHY are registered once on SCLK and handed to the receiver
// and the transmitters as ctl_r / d_r. Requests from the asynchronous and
// isochronous transmitters are serialized on LREQ, one bit per SCLK, start bit
// first:
//   bus request (Imm/Iso/Pri/Fair): 1, type[2:0], speed[2:0], 0      (8 bits)
//   PHY register read  (RdReg):     1, 100, addr[3:0], 0             (9 bits)
//   PHY register write (WrReg):     1, 101, addr[3:0], data[7:0], 0  (17 bits)
// The isochronous transmitter wins when both ask in the same cycle. Only one
// bus request is outstanding at a time: a PHY grant (CTL = 11) is routed to
// the transmitter that issued it; if the PHY starts a receive (CTL = 10)
// first, the request is dropped and its owner gets a lost pulse so that it
// can request again. After a grant the owning transmitter drives CTL and D;
// phy_oe enables the pads while either transmitter drives.
// The request formats follow the PHY-link interface of IEEE 1394 with the
// speed field widened to three bits; dropping a request on a receive is this
// design's choice.
module phy_if (
  input  logic        sclk,
  input  logic        rst,
  // PHY pins
  input  logic [1:0]  ctl_i,
  input  logic [7:0]  d_i,
  output logic [1:0]  ctl_o,
  output logic [7:0]  d_o,
  output logic        phy_oe,
  output logic        lreq,
  // registered PHY inputs
  output logic [1:0]  ctl_r,
  output logic [7:0]  d_r,
  // requests
  input  logic        at_req_valid,
  input  lhc_pkg::lreq_t at_req,
  output logic        at_req_ready,
  input  logic        it_req_valid,
  input  lhc_pkg::lreq_t it_req,
  output logic        it_req_ready,
  output logic        at_grant,
  output logic        it_grant,
  output logic        at_lost,
  output logic        it_lost,
  // transmit drive
  input  logic        at_drv,
  input  logic [1:0]  at_ctl,
  input  logic [7:0]  at_d,
  input  logic        it_drv,
  input  logic [1:0]  it_ctl,
  input  logic [7:0]  it_d
);
  import lhc_pkg::*;

  always_ff @(posedge sclk) begin
    if (rst) begin
      ctl_r <= PCTL_IDLE;
      d_r   <= '0;
    end else begin
      ctl_r <= ctl_i;
      d_r   <= d_i;
    end
  end

  // ---------------- LREQ serializer ----------------
  typedef enum logic [1:0] {OWN_NONE, OWN_AT, OWN_IT} owner_e;
  owner_e      owner;          // owner of the outstanding bus request
  logic [16:0] shreg;          // bits still to send, next one in [16]
  logic [4:0]  nbits;          // bits left in the shift register
  logic        busy;

  function automatic logic is_bus_req(input lreq_t r);
    return (r.rtype == LR_IMM) || (r.rtype == LR_ISO) || (r.rtype == LR_PRI) || (r.rtype == LR_FAIR);
  endfunction

  function automatic logic [16:0] frame(input lreq_t r);
    case (r.rtype)
      LR_RDREG: return {1'b1, r.rtype, r.addr, 1'b0, 8'b0};
      LR_WRREG: return {1'b1, r.rtype, r.addr, r.data, 1'b0};
      default:  return {1'b1, r.rtype, r.speed, 1'b0, 9'b0};
    endcase
  endfunction

  function automatic logic [4:0] frame_len(input lreq_t r);
    case (r.rtype)
      LR_RDREG: return 5'd9;
      LR_WRREG: return 5'd17;
      default:  return 5'd8;
    endcase
  endfunction

  logic it_can, at_can, take_it, take_at;
  assign busy   = (nbits != '0);
  assign it_can = it_req_valid && (!is_bus_req(it_req) || owner == OWN_NONE);
  assign at_can = at_req_valid && (!is_bus_req(at_req) || owner == OWN_NONE);
  assign take_it = !busy && it_can;
  assign take_at = !busy && !it_can && at_can;
  assign it_req_ready = take_it;
  assign at_req_ready = take_at;

  logic got_grant, got_recv;
  assign got_grant = (ctl_r == PCTL_GRANT)   && (owner != OWN_NONE);
  assign got_recv  = (ctl_r == PCTL_RECEIVE) && (owner != OWN_NONE);

  always_ff @(posedge sclk) begin
    if (rst) begin
      shreg <= '0;
      nbits <= '0;
      owner <= OWN_NONE;
    end else begin
      if (take_it) begin
        shreg <= frame(it_req);
        nbits <= frame_len(it_req);
      end else if (take_at) begin
        shreg <= frame(at_req);
        nbits <= frame_len(at_req);
      end else if (busy) begin
        shreg <= shreg << 1;
        nbits <= nbits - 1'b1;
      end
      if (got_grant || got_recv)                 owner <= OWN_NONE;
      else if (take_it && is_bus_req(it_req))    owner <= OWN_IT;
      else if (take_at && is_bus_req(at_req))    owner <= OWN_AT;
    end
  end

  assign lreq     = busy && shreg[16];
  assign at_grant = got_grant && owner == OWN_AT;
  assign it_grant = got_grant && owner == OWN_IT;
  assign at_lost  = got_recv && owner == OWN_AT;
  assign it_lost  = got_recv && owner == OWN_IT;

  // ---------------- output drive ----------------
  always_comb begin
    phy_oe = at_drv || it_drv;
    if (it_drv) begin
      ctl_o = it_ctl;
      d_o   = it_d;
    end else if (at_drv) begin
      ctl_o = at_ctl;
      d_o   = at_d;
    end else begin
      ctl_o = LCTL_IDLE;
      d_o   = '0;
    end
  end

  a_one_driver: assert property (@(posedge sclk) disable iff (rst) !(at_drv && it_drv));
endmodule
