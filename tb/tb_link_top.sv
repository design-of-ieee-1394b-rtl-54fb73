// tb_link_top: end-to-end test of the link-layer controller at its default
// sizes. The testbench plays the host on the BCLK bus (CS#, WR#, ADDR, DATA,
// CA#, INT#) and a PHY on the SCLK side: it decodes LREQ, grants bus
// requests, answers PHY register reads with status transfers, captures what
// the link transmits, acknowledges the link's requests and sends packets of
// other nodes (writes, reads, cycle start, isochronous, corrupted ones).
// Every byte the link sends is compared with a packet built from the host's
// words by a bit-serial CRC reference, and every packet read back from the
// GR FIFO with what the PHY sent. Each mechanism of the design (asynchronous
// and isochronous transmit, ack reception and timeout, ack transmission,
// lost arbitration, header and data CRC errors, GR FIFO full with ack busy,
// AT FIFO overflow, TcErr, PHY register write/read, bus reset status, cycle
// start and cycle lost, interrupts, host bursts) is counted; one that never happened is a
// failure. The last step sends and receives the largest asynchronous packet
// at S800 (4096 data bytes) to show that it fits the AT and GR FIFOs.
module tb_link_top;
  timeunit 1ns;
  timeprecision 1ps;
  import lhc_pkg::*;
  import tb_util_pkg::*;

  logic bclk = 0, sclk = 0, reset = 1;
  logic cs_n = 1, wr_n = 1;
  logic [7:0] addr = 0;
  logic [31:0] data_i = 0, data_o;
  logic data_oe, ca_n, int_n, host_ovf;
  logic [1:0] ctl_i = 0, ctl_o;
  logic [7:0] d_i = 0, d_o;
  logic phy_oe, lreq;
  int checks = 0, failures = 0;

  link1394b_top dut (.*);

  always #15.0 bclk = ~bclk;     // 33.3 MHz host clock
  always #10.17 sclk = ~sclk;    // 49.152 MHz PHY clock

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_async_tx = 0, n_iso_tx = 0, n_ack_ok = 0, n_ack_timeout = 0, n_link_ack = 0;
  int n_lost = 0, n_hdr_err = 0, n_data_err = 0, n_busy = 0, n_atf_ovf = 0, n_tcerr = 0;
  int n_phy_wr = 0, n_phy_rd = 0, n_bus_reset = 0, n_cyc_start = 0, n_cyc_lost = 0;
  int n_rx_stored = 0, n_int = 0, n_burst = 0;

  always @(posedge bclk) if (!reset && host_ovf) n_atf_ovf++;
  logic int_prev = 1;
  always @(posedge bclk) begin
    if (!reset && int_prev && !int_n) n_int++;
    int_prev <= int_n;
  end

  // ---------------- host bus ----------------
  task automatic hwrite(input logic [7:0] a, input logic [31:0] v);
    @(negedge bclk); cs_n = 0; wr_n = 0; addr = a; data_i = v;
    @(negedge bclk);
    chk(!ca_n, "CA# answers write");
    cs_n = 1; wr_n = 1;
  endtask

  task automatic hread(input logic [7:0] a, output logic [31:0] v);
    @(negedge bclk); cs_n = 0; wr_n = 1; addr = a;
    @(negedge bclk);
    checks++;
    if (ca_n || !data_oe) begin failures++; $display("FAIL no CA# on read at %0t", $time); end
    v = data_o;
    cs_n = 1;
  endtask

  // wait for an interrupt flag, then clear it
  task automatic wait_int(input int bit_i, input string what);
    logic [31:0] v;
    int i;
    for (i = 0; i < 4000; i++) begin
      hread(A_INTSTS, v);
      if (v[bit_i]) break;
      repeat (4) @(negedge bclk);
    end
    chk(v[bit_i], what);
    hwrite(A_INTSTS, 32'(1) << bit_i);
  endtask

  // ---------------- PHY model ----------------
  typedef enum {A_GRANT, A_SEND, A_STATUS} act_e;
  typedef struct {
    act_e kind;
    logic [7:0] bytes[$];
    int ncyc;
    logic [15:0] word;
  } act_t;
  act_t acts[$];
  logic [7:0] phy_regs[16];
  int lose_next = 0;               // answer the next fair request with a receive
  logic [7:0] lose_pkt[$];
  int auto_ack = 1;                // acknowledge the link's requests
  logic [3:0] auto_ack_code = ACK_COMPLETE;
  logic [7:0] tx_pkts[$][$];       // packets sent by the link
  lreq_t lreqs[$];

  function automatic act_t mk_send(input logic [7:0] bs[$]);
    act_t a;
    a.kind = A_SEND; a.bytes = bs; a.ncyc = 0; a.word = 0;
    return a;
  endfunction

  // LREQ decoder
  initial begin
    forever begin
      logic [16:0] b;
      lreq_t r;
      int n;
      @(posedge sclk);
      if (!reset && lreq) begin
        b = '0;
        for (int i = 0; i < 3; i++) begin @(posedge sclk); b = {b[15:0], lreq}; end
        r.rtype = lreq_type_e'(b[2:0]);
        r.speed = 0; r.addr = 0; r.data = 0;
        case (r.rtype)
          LR_RDREG: n = 5;
          LR_WRREG: n = 13;
          default:  n = 4;
        endcase
        b = '0;
        for (int i = 0; i < n; i++) begin @(posedge sclk); b = {b[15:0], lreq}; end
        chk(b[0] == 1'b0, "LREQ stop bit");
        case (r.rtype)
          LR_RDREG: begin
            act_t a;
            r.addr = b[4:1];
            n_phy_rd++;
            a.kind = A_STATUS; a.ncyc = 8; a.word = {4'b0000, r.addr, phy_regs[r.addr]};
            acts.push_back(a);
          end
          LR_WRREG: begin
            r.addr = b[12:9]; r.data = b[8:1];
            phy_regs[r.addr] = r.data;
            n_phy_wr++;
          end
          default: begin
            act_t a;
            r.speed = b[3:1];
            if (lose_next && r.rtype == LR_FAIR) begin
              lose_next = 0;
              acts.push_back(mk_send(lose_pkt));
              n_lost++;
            end else begin
              a.kind = A_GRANT; a.ncyc = 0; a.word = 0;
              acts.push_back(a);
            end
          end
        endcase
        lreqs.push_back(r);
      end
    end
  end

  // PHY driver
  initial begin
    forever begin
      act_t a;
      @(negedge sclk);
      if (acts.size() > 0) begin
        a = acts.pop_front();
        repeat (2) @(negedge sclk);
        case (a.kind)
          A_GRANT: begin
            ctl_i = 2'b11; @(negedge sclk);
            ctl_i = 2'b00;
            for (int i = 0; i < 20 && !phy_oe; i++) @(negedge sclk);
            for (int i = 0; i < 5000 && phy_oe; i++) @(negedge sclk);
            repeat (2) @(negedge sclk);
          end
          A_SEND: begin
            ctl_i = 2'b10; d_i = 8'hFF; @(negedge sclk);
            d_i = 8'h00; @(negedge sclk);  // speed code S100
            foreach (a.bytes[i]) begin d_i = a.bytes[i]; @(negedge sclk); end
            ctl_i = 2'b00; d_i = 8'h00;
            repeat (4) @(negedge sclk);
          end
          A_STATUS: begin
            for (int i = 0; i < a.ncyc; i++) begin
              ctl_i = 2'b01; d_i = {6'h0, a.word[15 - 2*i -: 2]}; @(negedge sclk);
            end
            ctl_i = 2'b00; d_i = 0;
            repeat (2) @(negedge sclk);
          end
        endcase
      end
    end
  end

  // capture of what the link sends, and acks from the remote node
  logic [7:0] cur[$];
  logic oe_q = 0;
  always @(posedge sclk) begin
    if (phy_oe && ctl_o == 2'b10) cur.push_back(d_o);
    if (oe_q && !phy_oe && cur.size() > 0) begin
      tx_pkts.push_back(cur);
      if (cur.size() == 1) begin
        n_link_ack++;
        if (cur[0][7:4] == ACK_BUSY_X) n_busy++;
        if (cur[0][7:4] == ACK_DATA_ERROR) n_data_err++;
      end else if (cur[3][7:4] == TC_ISO) begin
        n_iso_tx++;
      end else begin
        n_async_tx++;
        if (auto_ack && cur[1][5:0] != 6'h3F) begin
          logic [7:0] ab[$];
          ab = '{ {auto_ack_code, ~auto_ack_code} };
          acts.push_front(mk_send(ab));
        end
      end
      cur = '{};
    end
    oe_q <= phy_oe;
  end

  // ---------------- helpers ----------------
  task automatic wait_tx(input int n);
    for (int i = 0; i < 20000 && tx_pkts.size() < n; i++) @(negedge sclk);
    chk(tx_pkts.size() >= n, "link transmitted");
  endtask

  // burst write: CS# held low, one quadlet per BCLK
  task automatic hwrite_burst(input logic [7:0] a, input logic [31:0] w[$]);
    @(negedge bclk); cs_n = 0; wr_n = 0; addr = a;
    foreach (w[i]) begin
      data_i = w[i];
      @(negedge bclk);
      chk(!ca_n, "CA# answers each burst write");
    end
    cs_n = 1; wr_n = 1;
    n_burst++;
  endtask

  // GR FIFO read-out as one burst of n reads
  task automatic read_grf(output logic [31:0] q[$], input int n);
    q = '{};
    @(negedge bclk); cs_n = 0; wr_n = 1; addr = A_GRF;
    for (int i = 0; i < n; i++) begin
      if (i == n - 1) begin
        @(negedge bclk); cs_n = 1;
      end else begin
        @(negedge bclk);
      end
      checks++;
      if (ca_n || !data_oe) begin failures++; $display("FAIL no CA# on burst read at %0t", $time); end
      q.push_back(data_o);
    end
    n_burst++;
  endtask

  task automatic wait_grf(input int n);
    logic [31:0] v;
    for (int i = 0; i < 2000; i++) begin
      hread(A_FIFOST, v);
      if (v[28:16] >= 13'(n)) break;
    end
    chk(v[28:16] >= 13'(n), "GR FIFO holds the packet");
  endtask

  function automatic logic [31:0] trailer(input logic [3:0] ack, input logic dok);
    return {8'h00, 16'h0, ack, 1'b0, 1'b1, 1'b1, dok};
  endfunction

  // ---------------- test ----------------
  localparam logic [15:0] MY_ID = {10'h3FF, 6'd2};
  initial begin
    logic [31:0] hdr[$], data[$], host[$], q[$], exp[$], v;
    logic [7:0] bs[$], ebs[$];
    for (int i = 0; i < 16; i++) phy_regs[i] = 8'(i * 17);
    repeat (5) @(negedge bclk);
    reset = 0;
    repeat (5) @(negedge bclk);

    hwrite(A_NODEID, {16'h0, MY_ID});
    hwrite(A_INTMSK, 32'hFFF);
    hwrite(A_CTRL, {18'h0, 6'd9, 4'h0, 4'hF});
    repeat (10) @(negedge bclk);

    // ---- 1: asynchronous write quadlet request written as one host burst,
    //      acked complete ----
    host = '{ {14'h0, 2'b10, 6'd1, 2'b01, TC_WRQ, 4'h0}, {16'hFFC1, 16'hFFFF}, 32'hF000_0400, 32'hA5A5_0001 };
    hwrite_burst(A_ATF, host);
    wait_tx(1);
    hdr = '{ {16'hFFC1, 6'd1, 2'b01, TC_WRQ, 4'h0}, {MY_ID, 16'hFFFF}, 32'hF000_0400, 32'hA5A5_0001 };
    ebs = '{}; data = '{}; packet_bytes(ebs, hdr, data);
    chk(tx_pkts[0] == ebs, "write quadlet request on the bus");
    chk(lreqs[0].rtype == LR_FAIR && lreqs[0].speed == 3'b100, "fair request at S400");
    wait_int(I_ACKRCV, "ACKRCV interrupt");
    wait_int(I_TXRDY, "TxRDY interrupt");
    hread(A_ACKSTS, v);
    chk(v == {27'h0, 1'b0, ACK_COMPLETE}, "ack complete in ACKSTS");
    if (v[3:0] == ACK_COMPLETE) n_ack_ok++;

    // ---- 2: block write, no ack: timeout ----
    auto_ack = 0;
    host = '{ {14'h0, 2'b00, 6'd2, 2'b01, TC_WRB, 4'h0}, {16'hFFC1, 16'h0000}, 32'h0000_2000, {16'd16, 16'h0},
              32'h0000_0001, 32'h0000_0002, 32'h0000_0003, 32'h0000_0004 };
    foreach (host[i]) hwrite(A_ATF, host[i]);
    wait_tx(2);
    hdr = '{ {16'hFFC1, 6'd2, 2'b01, TC_WRB, 4'h0}, {MY_ID, 16'h0000}, 32'h0000_2000, {16'd16, 16'h0} };
    data = '{32'h1, 32'h2, 32'h3, 32'h4};
    ebs = '{}; packet_bytes(ebs, hdr, data);
    chk(tx_pkts[1] == ebs, "block write request on the bus");
    wait_int(I_ACCSFAIL, "AccsFail interrupt on missing ack");
    hread(A_ACKSTS, v);
    chk(v[4], "ack timeout in ACKSTS");
    if (v[4]) n_ack_timeout++;
    wait_int(I_TXRDY, "TxRDY after timeout");
    auto_ack = 1;

    // ---- 3: lost arbitration: a packet for us arrives first ----
    hdr = '{ {MY_ID, 6'd3, 2'b01, TC_WRQ, 4'h0}, {16'hFFC5, 16'hFFFF}, 32'hF000_0800, 32'h1234_5678 };
    data = '{};
    lose_pkt = '{}; packet_bytes(lose_pkt, hdr, data);
    lose_next = 1;
    host = '{ {14'h0, 2'b00, 6'd4, 2'b01, TC_RRQ, 4'h0}, {16'hFFC1, 16'hFFFF}, 32'hF000_0400 };
    foreach (host[i]) hwrite(A_ATF, host[i]);
    wait_tx(4);
    chk(tx_pkts[2].size() == 1 && tx_pkts[2][0] == ack_byte(ACK_COMPLETE), "link acks the received write");
    ebs = '{}; packet_bytes(ebs, '{ {16'hFFC1, 6'd4, 2'b01, TC_RRQ, 4'h0}, {MY_ID, 16'hFFFF}, 32'hF000_0400 }, data);
    chk(tx_pkts[3] == ebs, "request sent after re-arbitration");
    wait_int(I_CONERR, "ConErr interrupt");
    wait_int(I_RXPKT, "packet received interrupt");
    wait_grf(5);
    read_grf(q, 5);
    exp = hdr; exp.push_back(trailer(ACK_COMPLETE, 1));
    chk(q == exp, "received write quadlet read from GR FIFO");
    if (q == exp) n_rx_stored++;

    // ---- 4: received block write with data CRC error ----
    hdr = '{ {MY_ID, 6'd5, 2'b01, TC_WRB, 4'h0}, {16'hFFC5, 16'h0000}, 32'h0000_3000, {16'd8, 16'h0} };
    data = '{32'hDEAD_0001, 32'hBEEF_0002};
    bs = '{}; packet_bytes(bs, hdr, data);
    bs[bs.size() - 2] ^= 8'h10;
    acts.push_back(mk_send(bs));
    wait_tx(5);
    chk(tx_pkts[4].size() == 1 && tx_pkts[4][0] == ack_byte(ACK_DATA_ERROR), "ack data error");
    wait_grf(7);
    read_grf(q, 7);
    exp = hdr; foreach (data[i]) exp.push_back(data[i]);
    exp.push_back(trailer(ACK_DATA_ERROR, 0));
    chk(q == exp, "packet with bad data CRC flagged in trailer");
    hwrite(A_INTSTS, 32'hFFF);

    // ---- 5: header CRC error ----
    hdr = '{ {MY_ID, 6'd6, 2'b01, TC_WRQ, 4'h0}, {16'hFFC5, 16'hFFFF}, 32'hF000_0800, 32'h0 };
    data = '{};
    bs = '{}; packet_bytes(bs, hdr, data);
    bs[17] ^= 8'h01;
    acts.push_back(mk_send(bs));
    wait_int(I_HDRERR, "header CRC error interrupt");
    n_hdr_err++;
    hread(A_FIFOST, v);
    chk(v[2], "bad header not stored");

    // ---- 6: isochronous transmit after a cycle start, and receive ----
    host = '{ {14'h0, 2'b01, 2'b01, 6'd33, TC_ISO, 4'h0}, {16'd6, 16'h0}, 32'h1122_3344, 32'h5566_0000 };
    foreach (host[i]) hwrite(A_ITF, host[i]);
    repeat (100) @(negedge sclk);
    chk(tx_pkts.size() == 5, "no isochronous packet before cycle start");
    hdr = '{ {16'hFFFF, 6'd0, 2'b00, TC_CYCST, 4'h0}, {16'hFFC0, 16'hFFFF}, 32'hF000_0200, {7'd1, 13'd100, 12'd0} };
    bs = '{}; packet_bytes(bs, hdr, data);
    acts.push_back(mk_send(bs));
    wait_int(I_CYCST, "cycle start interrupt");
    n_cyc_start++;
    wait_tx(6);
    ebs = '{}; packet_bytes(ebs, '{ {16'd6, 2'b01, 6'd33, TC_ISO, 4'h0} }, '{32'h1122_3344, 32'h5566_0000});
    chk(tx_pkts[5] == ebs, "isochronous packet on the bus");
    chk(lreqs[lreqs.size() - 1].rtype == LR_ISO, "isochronous request");
    wait_int(I_ITDONE, "isochronous done interrupt");
    hread(A_CYCTMR, v);
    chk(v[31:25] == 7'd1 && v[24:12] == 13'd100, "cycle timer follows cycle start");
    hdr = '{ {16'd4, 2'b01, 6'd9, TC_ISO, 4'h1} };
    data = '{32'h7777_8888};
    bs = '{}; packet_bytes(bs, hdr, data);
    acts.push_back(mk_send(bs));
    wait_int(I_RXPKT, "isochronous packet received");
    wait_grf(3);
    read_grf(q, 3);
    exp = '{hdr[0], data[0], trailer(ACK_COMPLETE, 1)};
    chk(q == exp, "isochronous packet from GR FIFO");
    if (q == exp) n_rx_stored++;
    chk(tx_pkts.size() == 6, "no ack for isochronous packet");

    // ---- 7: PHY register write and read ----
    hwrite(A_PHYREG, {14'h0, 2'b01, 8'h6B, 4'h0, 4'h5});
    repeat (60) @(negedge sclk);
    chk(phy_regs[5] == 8'h6B, "PHY register written through LREQ");
    hwrite(A_PHYREG, {14'h0, 2'b10, 8'h00, 4'h0, 4'h5});
    wait_int(I_PHYREG, "PHY register data interrupt");
    hread(A_PHYREG, v);
    chk(v[27:24] == 4'h5 && v[23:16] == 8'h6B, "PHY register read back");

    // ---- 8: bus reset status ----
    begin
      act_t a;
      a.kind = A_STATUS; a.ncyc = 2; a.word = {4'b0010, 12'h0};
      acts.push_back(a);
    end
    wait_int(I_BUSRST, "bus reset interrupt");
    n_bus_reset++;

    // ---- 9: unsupported tcode ----
    hwrite(A_ATF, {14'h0, 2'b00, 6'd7, 2'b01, 4'h3, 4'h0});
    wait_int(I_TCERR, "TcErr interrupt");
    n_tcerr++;

    // ---- 10: GR FIFO full: ack busy ----
    begin
      int k;
      hdr = '{ {MY_ID, 6'd8, 2'b01, TC_WRB, 4'h0}, {16'hFFC5, 16'h0000}, 32'h0000_4000, {16'd256, 16'h0} };
      data = '{};
      for (int i = 0; i < 64; i++) data.push_back(32'h0100_0000 + i);
      bs = '{}; packet_bytes(bs, hdr, data);
      k = tx_pkts.size();
      for (int p = 0; p < 30 && n_busy == 0; p++) begin
        acts.push_back(mk_send(bs));
        wait_tx(k + p + 1);
      end
      chk(n_busy == 1, "ack busy when GR FIFO is full");
      hread(A_FIFOST, v);
      // 69 quadlets per stored packet: the GR FIFO takes 1280 / 69 = 18
      chk(v[28:16] == 13'd18 * 13'd69, "eighteen packets stored");
      for (int p = 0; p < 18; p++) begin
        read_grf(q, 69);
        exp = hdr; foreach (data[i]) exp.push_back(data[i]);
        exp.push_back(trailer(ACK_COMPLETE, 1));
        chk(q == exp, "stored block write intact");
      end
    end

    // ---- 11: AT FIFO overflow, cleared by RstTx ----
    hwrite(A_CTRL, {18'h0, 6'd9, 4'h0, 4'hE});
    for (int i = 0; i < 1281; i++) hwrite(A_ATF, 32'h0);
    repeat (2) @(negedge bclk);
    chk(n_atf_ovf == 1, "AT FIFO overflow seen");
    hread(A_FIFOST, v);
    chk(v[0], "AT FIFO full flag");
    hwrite(A_CTRL, {18'h0, 6'd9, 4'h1, 4'hE});
    repeat (1400) @(negedge sclk);
    hread(A_FIFOST, v);
    chk(!v[0], "RstTx empties AT FIFO");

    // ---- 12: cycle lost ----
    wait_int(I_CYCLOST, "cycle lost interrupt");
    n_cyc_lost++;

    // ---- 13: largest asynchronous packet at S800, sent and received ----
    // 4096 data bytes: 1028 quadlets in the AT FIFO, 1029 in the GR FIFO
    begin
      int k;
      hwrite(A_CTRL, {18'h0, 6'd9, 4'h0, 4'hF});
      hread(A_FIFOST, v);
      chk(v[28:16] == 13'd0, "GR FIFO empty before the large packets");
      host = '{ {14'h0, 2'b11, 6'd10, 2'b01, TC_WRB, 4'h0}, {16'hFFC1, 16'h0000}, 32'h0000_5000, {16'd4096, 16'h0} };
      data = '{};
      for (int i = 0; i < 1024; i++) data.push_back(32'h5A00_0000 ^ (i * 32'h0001_0203));
      k = tx_pkts.size();
      hwrite_burst(A_ATF, host);
      hwrite_burst(A_ATF, data);
      wait_tx(k + 1);
      hdr = '{ {16'hFFC1, 6'd10, 2'b01, TC_WRB, 4'h0}, {MY_ID, 16'h0000}, 32'h0000_5000, {16'd4096, 16'h0} };
      ebs = '{}; packet_bytes(ebs, hdr, data);
      chk(tx_pkts.size() > k && tx_pkts[k] == ebs, "4096-byte block write on the bus");
      chk(lreqs[lreqs.size() - 1].speed == 3'b110, "request at S800");
      wait_int(I_TXRDY, "TxRDY after the large packet");

      hdr = '{ {MY_ID, 6'd11, 2'b01, TC_WRB, 4'h0}, {16'hFFC5, 16'h0000}, 32'h0000_6000, {16'd4096, 16'h0} };
      bs = '{}; packet_bytes(bs, hdr, data);
      k = tx_pkts.size();
      acts.push_back(mk_send(bs));
      wait_tx(k + 1);
      chk(tx_pkts.size() > k && tx_pkts[k].size() == 1 && tx_pkts[k][0] == ack_byte(ACK_COMPLETE),
          "4096-byte block write acked complete");
      wait_grf(1029);
      read_grf(q, 1029);
      exp = hdr; foreach (data[i]) exp.push_back(data[i]);
      exp.push_back(trailer(ACK_COMPLETE, 1));
      chk(q == exp, "4096-byte block write read from GR FIFO");
      if (q == exp) n_rx_stored++;
    end

    // ---- mechanism summary ----
    $display("async_tx=%0d iso_tx=%0d ack_ok=%0d ack_timeout=%0d link_ack=%0d lost=%0d hdr_err=%0d data_err=%0d busy=%0d atf_ovf=%0d tcerr=%0d phy_wr=%0d phy_rd=%0d bus_reset=%0d cyc_start=%0d cyc_lost=%0d rx_stored=%0d int=%0d burst=%0d",
             n_async_tx, n_iso_tx, n_ack_ok, n_ack_timeout, n_link_ack, n_lost, n_hdr_err, n_data_err,
             n_busy, n_atf_ovf, n_tcerr, n_phy_wr, n_phy_rd, n_bus_reset, n_cyc_start, n_cyc_lost,
             n_rx_stored, n_int, n_burst);
    chk(n_async_tx > 0, "mechanism: asynchronous transmit");
    chk(n_iso_tx > 0, "mechanism: isochronous transmit");
    chk(n_ack_ok > 0, "mechanism: ack received");
    chk(n_ack_timeout > 0, "mechanism: ack timeout");
    chk(n_link_ack > 0, "mechanism: ack sent");
    chk(n_lost > 0, "mechanism: lost arbitration");
    chk(n_hdr_err > 0, "mechanism: header CRC error");
    chk(n_data_err > 0, "mechanism: data CRC error");
    chk(n_busy > 0, "mechanism: GR FIFO full / ack busy");
    chk(n_atf_ovf > 0, "mechanism: AT FIFO overflow");
    chk(n_tcerr > 0, "mechanism: TcErr");
    chk(n_phy_wr > 0 && n_phy_rd > 0, "mechanism: PHY register access");
    chk(n_bus_reset > 0, "mechanism: bus reset status");
    chk(n_cyc_start > 0 && n_cyc_lost > 0, "mechanism: cycle start and cycle lost");
    chk(n_rx_stored > 0, "mechanism: receive to GR FIFO");
    chk(n_int > 0, "mechanism: interrupt");
    chk(n_burst > 0, "mechanism: host burst access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
