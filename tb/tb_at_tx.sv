// tb_at_tx: asynchronous transmitter against a queue model of the AT FIFO and
// a scripted PHY side. Checks header organization (destination and source
// IDs), the transmitted byte stream with header and data CRCs (computed by a
// bit-serial reference), CTL sequencing after the grant, ack handling
// (complete, timeout, broadcast without ack), re-request after lost
// arbitration (ConErr), ack transmission on request, TcErr with FIFO drain,
// PHY register access requests and RstTx, then 30 random packets of all
// supported transaction codes.
module tb_at_tx;
  import lhc_pkg::*;
  import tb_util_pkg::*;
  logic sclk = 0, rst = 1;
  logic [31:0] atf_rdata;
  logic atf_empty, atf_rd_en;
  logic [12:0] atf_rlevel;
  logic tx_en = 0, rst_tx = 0, wr_phy = 0, rd_phy = 0;
  logic [9:0] bus_number = 10'h3FF;
  logic [5:0] node_number = 6'd2;
  logic [3:0] phy_rg_ad = 4'h4;
  logic [7:0] phy_rg_data = 8'h81;
  logic ack_req = 0, ack_rcv = 0, ack_timeout = 0, rx_busy = 0;
  logic [7:0] ack = 0;
  logic [3:0] ack_rcv_code = 0;
  logic ack_expect, tx_busy, req_valid, req_ready = 0, grant = 0, lost = 0, drv;
  lreq_t req;
  logic [1:0] ctl;
  logic [7:0] d;
  logic tx_rdy, ackrcv, tc_err, accs_fail, con_err;
  logic [4:0] ack_status;
  int checks = 0, failures = 0;

  at_tx dut (.*);

  always #5 sclk = ~sclk;
  initial begin
    repeat (60000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // AT FIFO model (first word fall through)
  logic [31:0] fq[$];
  assign atf_empty  = (fq.size() == 0);
  assign atf_rlevel = 13'(fq.size());
  assign atf_rdata  = atf_empty ? 32'h0 : fq[0];
  always @(posedge sclk) if (atf_rd_en && fq.size() > 0) void'(fq.pop_front());

  // LREQ side: accept requests one cycle after they appear
  lreq_t reqs[$];
  always @(posedge sclk) begin
    if (req_valid && !req_ready) req_ready <= 1;
    else req_ready <= 0;
    if (req_valid && req_ready) reqs.push_back(req);
  end

  // capture of transmitted bytes
  logic [7:0] got[$];
  int first_tx_cycle, grant_cycle, cyc = 0;
  int n_txrdy = 0, n_ackrcv = 0, n_tcerr = 0, n_accs = 0, n_con = 0, n_expect = 0;
  always @(posedge sclk) begin
    cyc++;
    if (drv && ctl == 2'b10) begin
      if (got.size() == 0) first_tx_cycle = cyc;
      got.push_back(d);
    end
    if (!rst) begin
    if (tx_rdy) n_txrdy++;
    if (ackrcv) n_ackrcv++;
    if (tc_err) n_tcerr++;
    if (accs_fail) n_accs++;
    if (con_err) n_con++;
    if (ack_expect) n_expect++;
    end
  end

  int rq_idx = 0;   // requests checked so far
  task automatic wait_req(input lreq_type_e t);
    for (int i = 0; i < 500 && reqs.size() <= rq_idx; i++) @(negedge sclk);
    chk(reqs.size() > rq_idx && reqs[rq_idx].rtype == t, $sformatf("request type %0d", t));
    rq_idx++;
  endtask

  task automatic do_grant();
    repeat (3) @(negedge sclk);
    grant = 1; grant_cycle = cyc; @(negedge sclk); grant = 0;
  endtask

  task automatic wait_release();
    for (int i = 0; i < 3000 && !(drv == 0 && got.size() > 0 && !tx_busy); i++) @(negedge sclk);
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge sclk);
  endtask

  initial begin
    logic [31:0] hdr[$], data[$];
    logic [7:0] exp[$];
    repeat (3) @(negedge sclk);
    rst = 0;
    tx_en = 1;

    // 1: write quadlet request to node 3FF:1, acked complete
    fq = '{ {14'h0, 2'b10, 6'd5, 2'b00, TC_WRQ, 4'h0}, {16'hFFC1, 16'hFFFF},
            32'hF000_0400, 32'h1234_5678 };
    wait_req(LR_FAIR);
    chk(reqs[rq_idx-1].speed == 3'b100, "speed code from host header");
    do_grant();
    wait_release();
    hdr = '{ {16'hFFC1, 6'd5, 2'b00, TC_WRQ, 4'h0}, {10'h3FF, 6'd2, 16'hFFFF},
             32'hF000_0400, 32'h1234_5678 };
    data = '{};
    exp = '{};
    packet_bytes(exp, hdr, data);
    chk(got == exp, "write quadlet packet bytes");
    chk(first_tx_cycle - grant_cycle == 4, "first byte 3 SCLKs after grant");
    for (int i = 0; i < 20 && n_expect == 0; i++) @(negedge sclk);
    chk(n_expect == 1, "ack expected");
    wait_cycles(5);
    ack_rcv = 1; ack_rcv_code = ACK_COMPLETE; @(negedge sclk); ack_rcv = 0;
    wait_cycles(3);
    chk(n_ackrcv == 1 && ack_status == {1'b0, ACK_COMPLETE} && n_accs == 0, "ack complete recorded");
    chk(n_txrdy == 1, "TxRDY after ack");

    // 2: block write of 10 bytes, ack times out
    got = '{};
    fq = '{ {14'h0, 2'b00, 6'd6, 2'b00, TC_WRB, 4'h0}, {16'hFFC3, 16'h0001},
            32'h0000_0010, {16'd10, 16'h0}, 32'hAAAA_0001, 32'hBBBB_0002, 32'hCCCC_0000 };
    wait_req(LR_FAIR);
    do_grant();
    wait_release();
    hdr = '{ {16'hFFC3, 6'd6, 2'b00, TC_WRB, 4'h0}, {10'h3FF, 6'd2, 16'h0001},
             32'h0000_0010, {16'd10, 16'h0} };
    data = '{32'hAAAA_0001, 32'hBBBB_0002, 32'hCCCC_0000};
    exp = '{};
    packet_bytes(exp, hdr, data);
    chk(got == exp, "block write packet bytes");
    wait_cycles(10);
    ack_timeout = 1; @(negedge sclk); ack_timeout = 0;
    wait_cycles(3);
    chk(n_accs == 1 && ack_status[4] && n_txrdy == 2, "ack timeout gives AccsFail");
    chk(fq.size() == 0, "FIFO emptied by packet");

    // 3: broadcast read quadlet request: no ack wait
    got = '{};
    fq = '{ {14'h0, 2'b00, 6'd7, 2'b00, TC_RRQ, 4'h0}, {16'hFFFF, 16'hFFFF}, 32'hF000_0000 };
    wait_req(LR_FAIR);
    do_grant();
    wait_release();
    hdr = '{ {16'hFFFF, 6'd7, 2'b00, TC_RRQ, 4'h0}, {10'h3FF, 6'd2, 16'hFFFF}, 32'hF000_0000 };
    data = '{};
    exp = '{};
    packet_bytes(exp, hdr, data);
    chk(got == exp, "3-quadlet header packet bytes");
    wait_cycles(5);
    chk(n_expect == 2 && n_txrdy == 3, "broadcast needs no ack");

    // 4: lost arbitration, then a pending ack goes first, then re-request
    got = '{};
    fq = '{ {14'h0, 2'b00, 6'd8, 2'b00, TC_WRQ, 4'h0}, {16'hFFC1, 16'hFFFF},
            32'hF000_0400, 32'hCAFE_0001 };
    wait_req(LR_FAIR);
    wait_cycles(2);
    lost = 1; rx_busy = 1; @(negedge sclk); lost = 0;
    wait_cycles(20);
    ack_req = 1; ack = {ACK_PENDING, ~ACK_PENDING}; rx_busy = 0; @(negedge sclk); ack_req = 0;
    chk(n_con == 1, "ConErr on lost arbitration");
    wait_req(LR_IMM);
    do_grant();
    wait_cycles(6);
    chk(got.size() == 1 && got[0] == {ACK_PENDING, ~ACK_PENDING}, "ack byte sent");
    got = '{};
    wait_req(LR_FAIR);
    do_grant();
    wait_release();
    hdr = '{ {16'hFFC1, 6'd8, 2'b00, TC_WRQ, 4'h0}, {10'h3FF, 6'd2, 16'hFFFF},
             32'hF000_0400, 32'hCAFE_0001 };
    data = '{};
    exp = '{};
    packet_bytes(exp, hdr, data);
    chk(got == exp, "packet sent after re-request");
    wait_cycles(5);
    ack_rcv = 1; ack_rcv_code = ACK_BUSY_X; @(negedge sclk); ack_rcv = 0;
    wait_cycles(3);
    chk(n_accs == 2 && n_txrdy == 4, "busy ack gives AccsFail");

    // 5: unsupported tcode: TcErr and drain
    fq = '{ {14'h0, 2'b00, 6'd9, 2'b00, 4'h3, 4'h0}, 32'h1, 32'h2, 32'h3, 32'h4 };
    wait_cycles(10);
    chk(n_tcerr == 1 && fq.size() == 0, "TcErr and AT FIFO drained");

    // 6: PHY register write and read
    wr_phy = 1; @(negedge sclk); wr_phy = 0;
    wait_req(LR_WRREG);
    chk(reqs[rq_idx-1].addr == 4'h4 && reqs[rq_idx-1].data == 8'h81, "register write fields");
    rd_phy = 1; @(negedge sclk); rd_phy = 0;
    wait_req(LR_RDREG);

    // 7: RstTx while waiting for data drains
    fq = '{ {14'h0, 2'b00, 6'd9, 2'b00, TC_WRB, 4'h0}, {16'hFFC1, 16'h0}, 32'h0, {16'd64, 16'h0}, 32'h1 };
    wait_cycles(15);
    chk(reqs.size() == rq_idx, "no request before block is complete");
    rst_tx = 1; @(negedge sclk); rst_tx = 0;
    wait_cycles(10);
    chk(fq.size() == 0, "RstTx empties AT FIFO");

    // 8: random packets of every supported transaction code
    begin
      logic [3:0] tcs[9] = '{TC_WRQ, TC_WRB, TC_WRS, TC_RRQ, TC_RRB, TC_RRSQ, TC_RRSB, TC_LRQ, TC_LRS};
      for (int p = 0; p < 30; p++) begin
        logic [3:0] tc; logic [15:0] dst; logic [1:0] spd; int len, e0, t0;
        logic blk;
        logic [31:0] host[$], q2, q3;
        tc = tcs[$urandom % 9];
        dst = ($urandom % 4 == 0) ? 16'hFFFF : {10'h3FF, 6'($urandom % 63)};
        spd = 2'($urandom);
        blk = (tc == TC_WRB || tc == TC_RRSB || tc == TC_LRQ || tc == TC_LRS);
        len = 1 + ($urandom % 64);
        q2 = $urandom;
        q3 = (blk || tc == TC_RRB) ? {16'(len), 16'($urandom)} : $urandom;
        host = '{ {14'h0, spd, 6'(p), 2'b01, tc, 4'h0}, {dst, 16'(p * 3)}, q2 };
        hdr  = '{ {dst, 6'(p), 2'b01, tc, 4'h0}, {10'h3FF, 6'd2, 16'(p * 3)}, q2 };
        if (!(tc == TC_WRS || tc == TC_RRQ)) begin host.push_back(q3); hdr.push_back(q3); end
        data = '{};
        if (blk) for (int i = 0; i < (len + 3) / 4; i++) data.push_back($urandom);
        got = '{};
        e0 = n_expect; t0 = n_txrdy;
        fq = host;
        foreach (data[i]) fq.push_back(data[i]);
        wait_req(LR_FAIR);
        chk(reqs[rq_idx-1].speed == {spd, 1'b0}, "random packet: request speed");
        do_grant();
        wait_release();
        exp = '{};
        packet_bytes(exp, hdr, data);
        chk(got == exp, "random packet bytes");
        if (dst != 16'hFFFF) begin
          for (int i = 0; i < 20 && n_expect == e0; i++) @(negedge sclk);
          chk(n_expect == e0 + 1, "random packet: ack expected");
          wait_cycles(3);
          ack_rcv = 1; ack_rcv_code = ACK_COMPLETE; @(negedge sclk); ack_rcv = 0;
        end
        wait_cycles(5);
        chk(n_txrdy == t0 + 1 && n_expect == e0 + (dst != 16'hFFFF ? 1 : 0) && fq.size() == 0,
            "random packet: TxRDY, FIFO empty");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
