// int_regs: internal control and status registers (C/SR) of the link.
//
// Host side (BCLK): writes arrive as we_en/we_addr/we_data from the host bus
// interface, reads are answered combinationally on rd_data from rd_addr.
// Register map (byte addresses, 32-bit registers):
//   00 CTRL    [0] TxAEn [1] TxIEn [2] RxEn [3] IrEn [4] RstTx (self-clearing)
//              [5] SoftReset (self-clearing) [13:8] isochronous receive channel
//   04 NODEID  [15:6] BusNumber [5:0] NodeNumber (reset 3FF/3F)
//   08 INTSTS  interrupt flags (lhc_pkg I_*), write 1 to clear
//   0C INTMSK  interrupt enables; INT# is low while a flag and its enable are set
//   10 ACKSTS  [4] ack timeout [3:0] last ack code received
//   14 PHYREG  [3:0] PhyRgAd [15:8] PhyRgData; write [16] Wrphy / [17] Rdphy
//              to send a PHY register write / read; [27:24] address and
//              [23:16] data of the last PHY register read
//   18 CYCTMR  cycle timer (write loads it)
//   1C FIFOST  [0] AT FIFO full [1] IT FIFO full [2] GR FIFO empty
//              [28:16] GR FIFO quadlets
// Control bits reach the SCLK domain through two-flop synchronizers (they are
// meant to be changed only while the link is idle); RstTx, SoftReset, Wrphy,
// Rdphy and the cycle timer load travel as pulses, and so do the interrupt
// events coming back from the SCLK domain. SoftReset clears the enables and
// interrupt flags and resets both transmitters like RstTx.
// The register names come from the document's transmitter diagrams; the
// addresses, bit positions and reset values are this design's choices.
module int_regs (
  input  logic        bclk,
  input  logic        brst,
  input  logic        sclk,
  input  logic        srst,
  // host access
  input  logic        we_en,
  input  logic [7:0]  we_addr,
  input  logic [31:0] we_data,
  input  logic [7:0]  rd_addr,
  output logic [31:0] rd_data,
  output logic        int_n,
  // FIFO status (BCLK domain)
  input  logic        atf_full,
  input  logic        itf_full,
  input  logic        grf_empty,
  input  logic [12:0] grf_level,
  // SCLK-domain outputs
  output logic        s_tx_a_en,
  output logic        s_tx_i_en,
  output logic        s_rx_en,
  output logic        s_ir_en,
  output logic [5:0]  s_ir_channel,
  output logic [9:0]  s_bus_number,
  output logic [5:0]  s_node_number,
  output logic [3:0]  s_phy_rg_ad,
  output logic [7:0]  s_phy_rg_data,
  output logic        s_rst_tx,
  output logic        s_wr_phy,
  output logic        s_rd_phy,
  output logic        s_cyc_load,
  output logic [31:0] s_cyc_value,
  // SCLK-domain inputs
  input  logic [lhc_pkg::N_INT-1:0] s_events,
  input  logic [4:0]  s_ack_status,
  input  logic [3:0]  s_phy_reg_addr,
  input  logic [7:0]  s_phy_reg_data,
  input  logic [31:0] s_cycle_time
);
  import lhc_pkg::*;

  logic [31:0] ctrl;
  logic [15:0] node_id;
  logic [N_INT-1:0] int_sts, int_msk;
  logic [15:0] phy_ctl;
  logic [31:0] cyc_wr;
  logic        rst_tx_p, wr_phy_p, rd_phy_p, cyc_load_p;
  logic [N_INT-1:0] ev_b;
  logic [4:0]  ack_status_b;
  logic [11:0] phy_rd_b;
  logic [31:0] cycle_time_b;


  always_ff @(posedge bclk) begin
    if (brst) begin
      ctrl       <= '0;
      node_id    <= 16'hFFFF;
      int_sts    <= '0;
      int_msk    <= '0;
      phy_ctl    <= '0;
      cyc_wr     <= '0;
      rst_tx_p   <= 1'b0;
      wr_phy_p   <= 1'b0;
      rd_phy_p   <= 1'b0;
      cyc_load_p <= 1'b0;
    end else begin
      rst_tx_p   <= 1'b0;
      wr_phy_p   <= 1'b0;
      rd_phy_p   <= 1'b0;
      cyc_load_p <= 1'b0;
      int_sts    <= int_sts | ev_b;
      if (we_en) begin
        case (we_addr)
          A_CTRL: begin
            ctrl <= {18'h0, we_data[13:8], 4'h0, we_data[3:0]};
            rst_tx_p <= we_data[4] || we_data[5];
            if (we_data[5]) begin
              ctrl    <= '0;
              int_sts <= '0;
            end
          end
          A_NODEID: node_id <= we_data[15:0];
          A_INTSTS: int_sts <= (int_sts & ~we_data[N_INT-1:0]) | ev_b;
          A_INTMSK: int_msk <= we_data[N_INT-1:0];
          A_PHYREG: begin
            phy_ctl  <= {we_data[15:8], 4'h0, we_data[3:0]};
            wr_phy_p <= we_data[16];
            rd_phy_p <= we_data[17];
          end
          A_CYCTMR: begin
            cyc_wr     <= we_data;
            cyc_load_p <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  assign int_n = !(|(int_sts & int_msk));

  always_comb begin
    case (rd_addr)
      A_CTRL:   rd_data = ctrl;
      A_NODEID: rd_data = {16'h0, node_id};
      A_INTSTS: rd_data = 32'(int_sts);
      A_INTMSK: rd_data = 32'(int_msk);
      A_ACKSTS: rd_data = {27'h0, ack_status_b};
      A_PHYREG: rd_data = {4'h0, phy_rd_b[11:8], phy_rd_b[7:0], phy_ctl};
      A_CYCTMR: rd_data = cycle_time_b;
      A_FIFOST: rd_data = {3'h0, grf_level, 13'h0, grf_empty, itf_full, atf_full};
      default:  rd_data = '0;
    endcase
  end

  // ---- BCLK -> SCLK ----
  sync2 #(.W(4 + 6 + 16 + 12 + 32)) u_sync_ctl (
    .clk(sclk), .rst(srst),
    .d({ctrl[3:0], ctrl[13:8], node_id, phy_ctl[3:0], phy_ctl[15:8], cyc_wr}),
    .q({s_ir_en, s_rx_en, s_tx_i_en, s_tx_a_en, s_ir_channel, s_bus_number, s_node_number,
        s_phy_rg_ad, s_phy_rg_data, s_cyc_value}));

  pulse_sync #(.W(4)) u_ps_b2s (
    .clk_a(bclk), .rst_a(brst), .pulse_a({rst_tx_p, wr_phy_p, rd_phy_p, cyc_load_p}),
    .clk_b(sclk), .rst_b(srst), .pulse_b({s_rst_tx, s_wr_phy, s_rd_phy, s_cyc_load}));

  // ---- SCLK -> BCLK ----
  pulse_sync #(.W(N_INT)) u_ps_s2b (
    .clk_a(sclk), .rst_a(srst), .pulse_a(s_events),
    .clk_b(bclk), .rst_b(brst), .pulse_b(ev_b));

  sync2 #(.W(5 + 12 + 32)) u_sync_sts (
    .clk(bclk), .rst(brst),
    .d({s_ack_status, s_phy_reg_addr, s_phy_reg_data, s_cycle_time}),
    .q({ack_status_b, phy_rd_b, cycle_time_b}));
endmodule
