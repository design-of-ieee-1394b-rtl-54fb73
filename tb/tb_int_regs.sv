// tb_int_regs: checks the register map: read-back of CTRL, NODEID, INTMSK and
// PHYREG, the SCLK-domain copies of the control bits, single pulses for RstTx,
// Wrphy, Rdphy and the cycle timer load, interrupt flags set by SCLK-domain
// events with write-1-to-clear and INT# masking, SoftReset, and read-back of
// ack status, PHY register data, cycle time and FIFO status; then 80 random
// steps of events and register writes against a model of the flags.
module tb_int_regs;
  import lhc_pkg::*;
  logic bclk = 0, sclk = 0, brst = 1, srst = 1;
  logic we_en = 0;
  logic [7:0] we_addr = 0, rd_addr = 0;
  logic [31:0] we_data = 0, rd_data;
  logic int_n;
  logic atf_full = 0, itf_full = 1, grf_empty = 0;
  logic [12:0] grf_level = 13'd77;
  logic s_tx_a_en, s_tx_i_en, s_rx_en, s_ir_en, s_rst_tx, s_wr_phy, s_rd_phy, s_cyc_load;
  logic [5:0] s_ir_channel, s_node_number;
  logic [9:0] s_bus_number;
  logic [3:0] s_phy_rg_ad;
  logic [7:0] s_phy_rg_data;
  logic [31:0] s_cyc_value;
  logic [N_INT-1:0] s_events = 0;
  logic [4:0] s_ack_status = 5'h02;
  logic [3:0] s_phy_reg_addr = 4'h7;
  logic [7:0] s_phy_reg_data = 8'h99;
  logic [31:0] s_cycle_time = 32'h1234_5678;
  int checks = 0, failures = 0;

  int_regs dut (.*);

  always #15 bclk = ~bclk;   // ~33 MHz
  always #10 sclk = ~sclk;   // ~49 MHz
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_rst = 0, n_wr = 0, n_rd = 0, n_load = 0;
  always @(posedge sclk) if (!srst) begin
    if (s_rst_tx) n_rst++;
    if (s_wr_phy) n_wr++;
    if (s_rd_phy) n_rd++;
    if (s_cyc_load) n_load++;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] v);
    @(negedge bclk); we_en = 1; we_addr = a; we_data = v;
    @(negedge bclk); we_en = 0;
  endtask
  logic [31:0] rv[2];
  task automatic rd(input logic [7:0] a, output logic [31:0] v);
    rd_addr = a;
    #1;
    v = rd_data;
  endtask
  task automatic event_pulse(input int bit_i);
    @(negedge sclk); s_events[bit_i] = 1; @(negedge sclk); s_events = 0;
    repeat (8) @(negedge bclk);
  endtask

  initial begin
    repeat (3) @(negedge bclk);
    brst = 0; srst = 0;
    rd(A_NODEID, rv[0]);
    chk(rv[0] == 32'h0000_FFFF, "NODEID reset value");
    chk(int_n, "no interrupt after reset");
    wr(A_CTRL, 32'h0000_0A0F);
    rd(A_CTRL, rv[0]);
    chk(rv[0] == 32'h0000_0A0F, "CTRL read back");
    wr(A_NODEID, {16'h0, 10'h155, 6'd12});
    rd(A_NODEID, rv[0]);
    chk(rv[0] == {16'h0, 10'h155, 6'd12}, "NODEID read back");
    wr(A_PHYREG, {14'h0, 2'b01, 8'hC3, 4'h0, 4'h6});
    repeat (6) @(negedge sclk);
    chk(s_tx_a_en && s_tx_i_en && s_rx_en && s_ir_en && s_ir_channel == 6'd10, "control bits in SCLK domain");
    chk(s_bus_number == 10'h155 && s_node_number == 6'd12, "node ID in SCLK domain");
    chk(s_phy_rg_ad == 4'h6 && s_phy_rg_data == 8'hC3 && n_wr == 1 && n_rd == 0, "Wrphy pulse and fields");
    wr(A_PHYREG, {14'h0, 2'b10, 8'hC3, 4'h0, 4'h6});
    repeat (6) @(negedge sclk);
    chk(n_rd == 1 && n_wr == 1, "Rdphy pulse");
    wr(A_CTRL, 32'h0000_0A1F);
    repeat (6) @(negedge sclk);
    rd(A_CTRL, rv[0]);
    chk(n_rst == 1 && rv[0] == 32'h0000_0A0F, "RstTx pulse, self-clearing");
    wr(A_CYCTMR, 32'hCAFE_0001);
    repeat (6) @(negedge sclk);
    chk(n_load == 1 && s_cyc_value == 32'hCAFE_0001, "cycle timer load");
    // interrupts
    event_pulse(I_RXPKT);
    rd(A_INTSTS, rv[0]);
    chk(rv[0] == 32'(1 << I_RXPKT), "event sets flag");
    chk(int_n, "masked flag gives no INT#");
    wr(A_INTMSK, 32'(1 << I_RXPKT));
    @(negedge bclk);
    chk(!int_n, "INT# low for enabled flag");
    event_pulse(I_TXRDY);
    rd(A_INTSTS, rv[0]);
    chk(rv[0] == 32'((1 << I_RXPKT) | (1 << I_TXRDY)), "second flag");
    wr(A_INTSTS, 32'(1 << I_RXPKT));
    @(negedge bclk);
    rd(A_INTSTS, rv[0]);
    chk(rv[0] == 32'(1 << I_TXRDY) && int_n, "write 1 clears");
    // status read-back
    rd(A_ACKSTS, rv[0]);
    chk(rv[0] == 32'h2, "ack status");
    rd(A_PHYREG, rv[0]);
    chk(rv[0] == {4'h0, 4'h7, 8'h99, 8'hC3, 4'h0, 4'h6}, "PHY register data");
    rd(A_CYCTMR, rv[0]);
    chk(rv[0] == 32'h1234_5678, "cycle time");
    rd(A_FIFOST, rv[0]);
    chk(rv[0] == {3'h0, 13'd77, 13'h0, 1'b0, 1'b1, 1'b0}, "FIFO status");
    // soft reset
    wr(A_CTRL, 32'h0000_0020);
    repeat (6) @(negedge sclk);
    rd(A_CTRL, rv[0]);
    rd(A_INTSTS, rv[1]);
    chk(rv[0] == 0 && rv[1] == 0 && n_rst == 2 && !s_tx_a_en, "SoftReset");

    // random interrupt traffic and register writes against a model
    begin
      logic [N_INT-1:0] m_sts = 0, m_msk = 0, ev;
      logic [31:0] m_ctrl = 0, v;
      logic [15:0] m_node = 16'hFFFF;
      rd(A_INTMSK, v); m_msk = v[N_INT-1:0];
      rd(A_INTSTS, v); m_sts = v[N_INT-1:0];
      rd(A_CTRL, v);   m_ctrl = v;
      rd(A_NODEID, v); m_node = v[15:0];
      for (int t = 0; t < 80; t++) begin
        case ($urandom % 5)
          0: begin   // SCLK-domain events, several at once
            ev = N_INT'($urandom);
            @(negedge sclk); s_events = ev; @(negedge sclk); s_events = 0;
            repeat (8) @(negedge bclk);
            m_sts |= ev;
          end
          1: begin v = $urandom; wr(A_INTSTS, v); m_sts &= ~v[N_INT-1:0]; end
          2: begin v = $urandom; wr(A_INTMSK, v); m_msk = v[N_INT-1:0]; end
          3: begin   // CTRL without RstTx / SoftReset
            v = $urandom & 32'h0000_3F0F; wr(A_CTRL, v); m_ctrl = v;
          end
          default: begin v = $urandom; wr(A_NODEID, v); m_node = v[15:0]; end
        endcase
        @(negedge bclk);
        rd(A_INTSTS, v);  chk(v == 32'(m_sts), "random: INTSTS");
        rd(A_INTMSK, v);  chk(v == 32'(m_msk), "random: INTMSK");
        chk(int_n == !(|(m_sts & m_msk)), "random: INT#");
        rd(A_CTRL, v);    chk(v == m_ctrl, "random: CTRL");
        rd(A_NODEID, v);  chk(v == {16'h0, m_node}, "random: NODEID");
      end
      repeat (6) @(negedge sclk);
      chk(s_bus_number == m_node[15:6] && s_node_number == m_node[5:0] && s_tx_a_en == m_ctrl[0]
          && s_ir_channel == m_ctrl[13:8], "random: SCLK-domain copies");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
