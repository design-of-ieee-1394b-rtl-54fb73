// link1394b_top: IEEE 1394b link-layer controller.
//
// Joins the host bus interface, central arbiter and internal registers (host
// clock BCLK) to the transmitters, receiver, cycle timer and PHY interface
// (PHY clock SCLK) through the AT, IT and GR FIFOs, which are the only data
// paths between the two clock domains. The host writes asynchronous packets
// to the AT FIFO (address 20) and isochronous packets to the IT FIFO
// (address 24) and reads received packets from the GR FIFO (address 28);
// the register map is described in int_regs. On the PHY side CTL, D and the
// CTL/D drive enable (phy_oe) come out as separate in/out signals for the
// pads, LREQ carries the link's requests.
// reset is synchronized into each clock domain and is active high.
// Block partitioning follows the controller's block diagram; the FIFO sizes
// are 5 KB (AT) and 2 KB (IT) as specified; the GR FIFO size, 5 KB so that
// the largest asynchronous packet at 800 Mb/s fits, is this design's choice.
module link1394b_top #(
  parameter int AT_DEPTH    = 1280,   // quadlets (5 KB)
  parameter int IT_DEPTH    = 512,    // quadlets (2 KB)
  parameter int GR_DEPTH    = 1280,   // quadlets (5 KB)
  parameter int ACK_TIMEOUT = 256,    // SCLK cycles
  parameter int OFFSET_DIV  = 2,
  parameter int LOST_LIMIT  = 12288
) (
  input  logic        bclk,
  input  logic        sclk,
  input  logic        reset,
  // host bus
  input  logic        cs_n,
  input  logic        wr_n,
  input  logic [7:0]  addr,
  input  logic [31:0] data_i,
  output logic [31:0] data_o,
  output logic        data_oe,
  output logic        ca_n,
  output logic        int_n,
  output logic        host_ovf,
  // PHY-link interface
  input  logic [1:0]  ctl_i,
  input  logic [7:0]  d_i,
  output logic [1:0]  ctl_o,
  output logic [7:0]  d_o,
  output logic        phy_oe,
  output logic        lreq
);
  import lhc_pkg::*;

  // ---------------- resets ----------------
  logic [1:0] brst_q, srst_q;
  logic       brst, srst;
  always_ff @(posedge bclk) brst_q <= {brst_q[0], reset};
  always_ff @(posedge sclk) srst_q <= {srst_q[0], reset};
  assign brst = brst_q[1] || reset;
  assign srst = srst_q[1] || reset;

  // ---------------- host side ----------------
  logic        rd_en, we_en, reg_we;
  logic [7:0]  rd_addr, we_addr;
  logic [31:0] rd_data, we_data, reg_rdata, fifo_wdata;
  logic        atf_wr, itf_wr, grf_rd, ovf_at, ovf_it;

  host_bus_if u_host (
    .bclk, .rst(brst), .cs_n, .wr_n, .addr, .data_i, .data_o, .data_oe, .ca_n,
    .rd_en, .rd_addr, .rd_data, .we_en, .we_addr, .we_data);

  // FIFO signals
  localparam int ACW = $clog2(AT_DEPTH) + 2;
  localparam int ICW = $clog2(IT_DEPTH) + 2;
  localparam int GCW = $clog2(GR_DEPTH) + 2;
  logic          atf_full, itf_full, grf_empty_b;
  logic [31:0]   atf_rdata, itf_rdata, grf_rdata, grf_wdata;
  logic          atf_empty, itf_empty, atf_rd, itf_rd, grf_wr, grf_full;
  logic [ACW-1:0] atf_wlevel, atf_rlevel;
  logic [ICW-1:0] itf_wlevel, itf_rlevel;
  logic [GCW-1:0] grf_wlevel, grf_rlevel;

  central_arbiter u_arb (
    .bclk, .rst(brst), .rd_en, .rd_addr, .rd_data, .we_en, .we_addr, .we_data,
    .reg_we, .reg_rdata, .atf_wr, .itf_wr, .fifo_wdata, .atf_full, .itf_full,
    .grf_rd, .grf_rdata, .grf_empty(grf_empty_b), .ovf_at, .ovf_it);
  assign host_ovf = ovf_at || ovf_it;

  async_fifo #(.DEPTH(AT_DEPTH)) u_atf (
    .wclk(bclk), .wrst(brst), .wr_en(atf_wr), .wdata(fifo_wdata), .full(atf_full), .wlevel(atf_wlevel),
    .rclk(sclk), .rrst(srst), .rd_en(atf_rd), .rdata(atf_rdata), .empty(atf_empty), .rlevel(atf_rlevel));

  async_fifo #(.DEPTH(IT_DEPTH)) u_itf (
    .wclk(bclk), .wrst(brst), .wr_en(itf_wr), .wdata(fifo_wdata), .full(itf_full), .wlevel(itf_wlevel),
    .rclk(sclk), .rrst(srst), .rd_en(itf_rd), .rdata(itf_rdata), .empty(itf_empty), .rlevel(itf_rlevel));

  async_fifo #(.DEPTH(GR_DEPTH)) u_grf (
    .wclk(sclk), .wrst(srst), .wr_en(grf_wr), .wdata(grf_wdata), .full(grf_full), .wlevel(grf_wlevel),
    .rclk(bclk), .rrst(brst), .rd_en(grf_rd), .rdata(grf_rdata), .empty(grf_empty_b), .rlevel(grf_rlevel));

  // ---------------- registers ----------------
  logic        s_tx_a_en, s_tx_i_en, s_rx_en, s_ir_en;
  logic [5:0]  s_ir_channel, s_node_number;
  logic [9:0]  s_bus_number;
  logic [3:0]  s_phy_rg_ad;
  logic [7:0]  s_phy_rg_data;
  logic        s_rst_tx, s_wr_phy, s_rd_phy, s_cyc_load;
  logic [31:0] s_cyc_value, cycle_time;
  logic [N_INT-1:0] s_events;
  logic [4:0]  ack_status;
  logic [3:0]  phy_reg_addr;
  logic [7:0]  phy_reg_data;

  int_regs u_regs (
    .bclk, .brst, .sclk, .srst,
    .we_en(reg_we), .we_addr, .we_data, .rd_addr, .rd_data(reg_rdata), .int_n,
    .atf_full, .itf_full, .grf_empty(grf_empty_b), .grf_level(13'(grf_rlevel)),
    .s_tx_a_en, .s_tx_i_en, .s_rx_en, .s_ir_en, .s_ir_channel, .s_bus_number, .s_node_number,
    .s_phy_rg_ad, .s_phy_rg_data, .s_rst_tx, .s_wr_phy, .s_rd_phy, .s_cyc_load, .s_cyc_value,
    .s_events, .s_ack_status(ack_status), .s_phy_reg_addr(phy_reg_addr),
    .s_phy_reg_data(phy_reg_data), .s_cycle_time(cycle_time));

  // ---------------- PHY side ----------------
  logic [1:0]  ctl_r;
  logic [7:0]  d_r;
  logic        at_req_valid, at_req_ready, it_req_valid, it_req_ready;
  lreq_t       at_req, it_req;
  logic        at_grant, it_grant, at_lost, it_lost;
  logic        at_drv, it_drv;
  logic [1:0]  at_ctl, it_ctl;
  logic [7:0]  at_d, it_d;

  phy_if u_phy (
    .sclk, .rst(srst), .ctl_i, .d_i, .ctl_o, .d_o, .phy_oe, .lreq, .ctl_r, .d_r,
    .at_req_valid, .at_req, .at_req_ready, .it_req_valid, .it_req, .it_req_ready,
    .at_grant, .it_grant, .at_lost, .it_lost,
    .at_drv, .at_ctl, .at_d, .it_drv, .it_ctl, .it_d);

  logic ack_req, ack_rcv, ack_timeout, ack_expect, rx_busy, at_busy, it_busy;
  logic [7:0] ack;
  logic [3:0] ack_rcv_code;
  logic tx_rdy, ackrcv, at_tc_err, accs_fail, at_con_err;
  logic it_done, it_tc_err, it_con_err;
  logic cyc_start_pkt, cyc_start, cyc_lost, rx_pkt, hdr_err, phy_reg_valid, bus_reset;
  logic [31:0] cyc_time_rx;

  at_tx u_at (
    .sclk, .rst(srst),
    .atf_rdata, .atf_empty, .atf_rlevel(13'(atf_rlevel)), .atf_rd_en(atf_rd),
    .tx_en(s_tx_a_en), .rst_tx(s_rst_tx), .bus_number(s_bus_number), .node_number(s_node_number),
    .phy_rg_ad(s_phy_rg_ad), .phy_rg_data(s_phy_rg_data), .wr_phy(s_wr_phy), .rd_phy(s_rd_phy),
    .ack_req, .ack, .ack_rcv, .ack_rcv_code, .ack_timeout, .rx_busy, .ack_expect,
    .tx_busy(at_busy),
    .req_valid(at_req_valid), .req(at_req), .req_ready(at_req_ready), .grant(at_grant), .lost(at_lost),
    .drv(at_drv), .ctl(at_ctl), .d(at_d),
    .tx_rdy, .ackrcv, .ack_status, .tc_err(at_tc_err), .accs_fail, .con_err(at_con_err));

  it_tx u_it (
    .sclk, .rst(srst),
    .itf_rdata, .itf_empty, .itf_rlevel(13'(itf_rlevel)), .itf_rd_en(itf_rd),
    .tx_en(s_tx_i_en), .rst_tx(s_rst_tx), .cyc_start, .rx_busy, .tx_busy(it_busy),
    .req_valid(it_req_valid), .req(it_req), .req_ready(it_req_ready), .grant(it_grant), .lost(it_lost),
    .drv(it_drv), .ctl(it_ctl), .d(it_d), .it_done, .tc_err(it_tc_err), .con_err(it_con_err));

  receiver #(.GRF_DEPTH(GR_DEPTH), .ACK_TIMEOUT(ACK_TIMEOUT)) u_rx (
    .sclk, .rst(srst), .ctl_r, .d_r,
    .bus_number(s_bus_number), .node_number(s_node_number), .rx_en(s_rx_en),
    .ir_en(s_ir_en), .ir_channel(s_ir_channel),
    .grf_wr_en(grf_wr), .grf_wdata, .grf_wlevel,
    .ack_req, .ack, .ack_expect, .ack_rcv, .ack_rcv_code, .ack_timeout, .rx_busy,
    .cyc_start_pkt, .cyc_time(cyc_time_rx),
    .rx_pkt, .hdr_err, .phy_reg_valid, .phy_reg_addr, .phy_reg_data, .bus_reset);

  cycle_timer #(.OFFSET_DIV(OFFSET_DIV), .LOST_LIMIT(LOST_LIMIT)) u_cyc (
    .sclk, .rst(srst), .cyc_start_pkt, .cyc_time_in(cyc_time_rx),
    .load(s_cyc_load), .load_value(s_cyc_value), .cycle_time, .cyc_start, .cyc_lost);

  always_comb begin
    s_events             = '0;
    s_events[I_TXRDY]    = tx_rdy;
    s_events[I_ACKRCV]   = ackrcv;
    s_events[I_TCERR]    = at_tc_err || it_tc_err;
    s_events[I_ACCSFAIL] = accs_fail;
    s_events[I_CONERR]   = at_con_err || it_con_err;
    s_events[I_RXPKT]    = rx_pkt;
    s_events[I_ITDONE]   = it_done;
    s_events[I_PHYREG]   = phy_reg_valid;
    s_events[I_BUSRST]   = bus_reset;
    s_events[I_CYCLOST]  = cyc_lost;
    s_events[I_HDRERR]   = hdr_err;
    s_events[I_CYCST]    = cyc_start;
  end
endmodule
