// tb_receiver: drives receive and status transfers on the registered
// CTL/D inputs and checks what reaches the GR FIFO model: header and data
// quadlets with CRC quadlets dropped and the status trailer added, address
// and channel filtering, header and data CRC checking, the ack code requested
// for each kind of packet, ack_busy_X when the GR FIFO lacks room,
// acknowledge reception and timeout, cycle start packets and PHY register
// and bus reset status; then 40 random asynchronous packets against a model
// of the filter, the ack choice and the GR FIFO layout.
module tb_receiver;
  import lhc_pkg::*;
  import tb_util_pkg::*;
  localparam int DEPTH = 24;
  localparam int CW = $clog2(DEPTH) + 2;
  logic sclk = 0, rst = 1;
  logic [1:0] ctl_r = 0;
  logic [7:0] d_r = 0;
  logic [9:0] bus_number = 10'h3FF;
  logic [5:0] node_number = 6'd4;
  logic rx_en = 1, ir_en = 1;
  logic [5:0] ir_channel = 6'd9;
  logic grf_wr_en;
  logic [31:0] grf_wdata;
  logic [CW-1:0] grf_wlevel;
  logic ack_req, ack_expect = 0, ack_rcv, ack_timeout, rx_busy;
  logic [7:0] ack;
  logic [3:0] ack_rcv_code;
  logic cyc_start_pkt, rx_pkt, hdr_err, phy_reg_valid, bus_reset;
  logic [31:0] cyc_time;
  logic [3:0] phy_reg_addr;
  logic [7:0] phy_reg_data;
  int checks = 0, failures = 0;

  receiver #(.GRF_DEPTH(DEPTH), .ACK_TIMEOUT(40)) dut (.*);

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

  logic [31:0] grf[$];
  assign grf_wlevel = CW'(grf.size());
  always @(posedge sclk) if (!rst && grf_wr_en) grf.push_back(grf_wdata);

  int n_ack = 0, n_pkt = 0, n_hdrerr = 0, n_cyc = 0, n_rcv = 0, n_to = 0, n_phy = 0, n_br = 0;
  logic [3:0] last_ack;
  logic ack_par_ok = 1;   // every requested ack byte carries its complement
  always @(posedge sclk) if (!rst) begin
    if (ack_req) begin n_ack++; last_ack = ack[7:4]; ack_par_ok &= (ack[3:0] == ~ack[7:4]); end
    if (rx_pkt) n_pkt++;
    if (hdr_err) n_hdrerr++;
    if (cyc_start_pkt) n_cyc++;
    if (ack_rcv) n_rcv++;
    if (ack_timeout) n_to++;
    if (phy_reg_valid) n_phy++;
    if (bus_reset) n_br++;
  end

  task automatic send(input logic [7:0] spd, input logic [7:0] bs[$]);
    @(negedge sclk);
    ctl_r = 2'b10; d_r = 8'hFF;
    @(negedge sclk);
    d_r = spd;
    @(negedge sclk);
    foreach (bs[i]) begin d_r = bs[i]; @(negedge sclk); end
    ctl_r = 2'b00; d_r = 8'h00;
    repeat (8) @(negedge sclk);
  endtask

  task automatic status(input int ncyc, input logic [15:0] w);
    @(negedge sclk);
    for (int i = 0; i < ncyc; i++) begin
      ctl_r = 2'b01; d_r = {6'h0, w[15 - 2*i -: 2]};
      @(negedge sclk);
    end
    ctl_r = 2'b00; d_r = 0;
    repeat (3) @(negedge sclk);
  endtask

  function automatic logic [31:0] trailer(input logic [7:0] spd, input logic [3:0] ack,
                                          input logic comp, input logic hok, input logic dok);
    return {spd, 16'h0, ack, 1'b0, comp, hok, dok};
  endfunction

  initial begin
    logic [31:0] hdr[$], data[$], exp[$];
    logic [7:0] bs[$];
    repeat (3) @(negedge sclk);
    rst = 0;

    // 1: write quadlet request to this node
    hdr = '{ {16'hFFC4, 6'd1, 2'b01, TC_WRQ, 4'h0}, {16'hFFC1, 16'hFFFF}, 32'hF000_0400, 32'h5566_7788 };
    data = '{};
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h50, bs);
    exp = hdr; exp.push_back(trailer(8'h50, ACK_COMPLETE, 1, 1, 1));
    chk(grf == exp, "write quadlet stored");
    chk(n_ack == 1 && last_ack == ACK_COMPLETE && n_pkt == 1, "ack complete requested");
    grf = '{};

    // 2: block write with 3 data quadlets
    hdr = '{ {16'hFFC4, 6'd2, 2'b01, TC_WRB, 4'h0}, {16'hFFC1, 16'h0000}, 32'h0000_1000, {16'd12, 16'h0} };
    data = '{32'h1111_1111, 32'h2222_2222, 32'h3333_3333};
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h00, bs);
    exp = hdr; foreach (data[i]) exp.push_back(data[i]);
    exp.push_back(trailer(8'h00, ACK_COMPLETE, 1, 1, 1));
    chk(grf == exp, "block write stored");
    chk(n_ack == 2 && last_ack == ACK_COMPLETE, "block ack complete");
    grf = '{};

    // 3: read quadlet request: pending
    hdr = '{ {16'hFFC4, 6'd3, 2'b01, TC_RRQ, 4'h0}, {16'hFFC1, 16'hFFFF}, 32'hF000_0400 };
    data = '{};
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h40, bs);
    exp = hdr; exp.push_back(trailer(8'h40, ACK_PENDING, 1, 1, 1));
    chk(grf == exp && n_ack == 3 && last_ack == ACK_PENDING, "read request acked pending");
    grf = '{};

    // 4: data CRC error
    hdr = '{ {16'hFFC4, 6'd4, 2'b01, TC_WRB, 4'h0}, {16'hFFC1, 16'h0000}, 32'h0000_1000, {16'd4, 16'h0} };
    data = '{32'hABCD_EF01};
    bs = '{}; packet_bytes(bs, hdr, data);
    bs[bs.size() - 1] ^= 8'h01;
    send(8'h00, bs);
    exp = hdr; exp.push_back(32'hABCD_EF01);
    exp.push_back(trailer(8'h00, ACK_DATA_ERROR, 1, 1, 0));
    chk(grf == exp && n_ack == 4 && last_ack == ACK_DATA_ERROR, "data CRC error");
    grf = '{};

    // 5: header CRC error: dropped, no ack
    hdr = '{ {16'hFFC4, 6'd5, 2'b01, TC_WRQ, 4'h0}, {16'hFFC1, 16'hFFFF}, 32'hF000_0400, 32'h0 };
    bs = '{}; packet_bytes(bs, hdr, data);
    bs[3] ^= 8'h80;  // corrupt the priority field, keep the tcode
    data = '{};
    send(8'h00, bs);
    chk(grf.size() == 0 && n_ack == 4 && n_hdrerr == 1 && n_pkt == 4, "header CRC error dropped");

    // 6: for another node: dropped, no ack
    hdr = '{ {16'hFFC7, 6'd6, 2'b01, TC_WRQ, 4'h0}, {16'hFFC1, 16'hFFFF}, 32'hF000_0400, 32'h0 };
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h00, bs);
    chk(grf.size() == 0 && n_ack == 4 && n_pkt == 4, "other node ignored");

    // 7: broadcast: stored, no ack
    hdr = '{ {16'hFFFF, 6'd7, 2'b01, TC_WRQ, 4'h0}, {16'hFFC1, 16'hFFFF}, 32'hF000_0400, 32'h77 };
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h00, bs);
    exp = hdr; exp.push_back(trailer(8'h00, ACK_COMPLETE, 1, 1, 1));
    chk(grf == exp && n_ack == 4 && n_pkt == 5, "broadcast stored without ack");
    grf = '{};

    // 8: isochronous, enabled channel and another channel
    hdr = '{ {16'd8, 2'b01, 6'd9, TC_ISO, 4'h2} };
    data = '{32'h0A0B_0C0D, 32'h0E0F_1011};
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h50, bs);
    exp = hdr; foreach (data[i]) exp.push_back(data[i]);
    exp.push_back(trailer(8'h50, ACK_COMPLETE, 1, 1, 1));
    chk(grf == exp && n_ack == 4, "iso packet on channel 9 stored");
    grf = '{};
    hdr = '{ {16'd8, 2'b01, 6'd10, TC_ISO, 4'h2} };
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h50, bs);
    chk(grf.size() == 0, "iso packet on channel 10 dropped");

    // 9: cycle start
    hdr = '{ {16'hFFFF, 6'd0, 2'b00, TC_CYCST, 4'h0}, {16'hFFC0, 16'hFFFF}, 32'hF000_0200, 32'h0246_8ACE };
    data = '{};
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h00, bs);
    chk(n_cyc == 1 && cyc_time == 32'h0246_8ACE && grf.size() == 0, "cycle start packet");

    // 10: acks
    @(negedge sclk); ack_expect = 1; @(negedge sclk); ack_expect = 0;
    repeat (5) @(negedge sclk);
    send(8'h00, '{ {ACK_PENDING, ~ACK_PENDING} });
    chk(n_rcv == 1 && ack_rcv_code == ACK_PENDING && n_to == 0, "ack received");
    @(negedge sclk); ack_expect = 1; @(negedge sclk); ack_expect = 0;
    send(8'h00, '{ 8'h12 });   // bad parity
    repeat (60) @(negedge sclk);
    chk(n_rcv == 1 && n_to == 1, "bad ack ignored, timeout");

    // 11: not enough room: busy
    repeat (20) grf.push_back(32'h0);
    hdr = '{ {16'hFFC4, 6'd11, 2'b01, TC_WRB, 4'h0}, {16'hFFC1, 16'h0000}, 32'h0000_1000, {16'd8, 16'h0} };
    data = '{32'h1, 32'h2};
    bs = '{}; packet_bytes(bs, hdr, data);
    send(8'h00, bs);
    chk(grf.size() == 20 && n_ack == 5 && last_ack == ACK_BUSY_X, "no room: ack busy");
    grf = '{};

    // 12: PHY status: register read data and bus reset
    status(8, {4'b0000, 4'hA, 8'h5C});
    chk(n_phy == 1 && phy_reg_addr == 4'hA && phy_reg_data == 8'h5C && n_br == 0, "PHY register status");
    status(2, {4'b0010, 12'h0});
    chk(n_br == 1, "bus reset status");
    chk(!rx_busy, "idle at end");
    chk(ack_par_ok, "ack bytes are {code, ~code}");

    // 13: random asynchronous packets checked against a model of the filter,
    // the ack choice and the GR FIFO layout
    begin
      logic [3:0] tcs[9] = '{TC_WRQ, TC_WRB, TC_WRS, TC_RRQ, TC_RRB, TC_RRSQ, TC_RRSB, TC_LRQ, TC_LRS};
      for (int p = 0; p < 40; p++) begin
        logic [3:0] tc, code; logic [15:0] dst; logic [7:0] spd; int len, sel, a0, p0;
        logic blk, bad, mine, bcast;
        tc = tcs[$urandom % 9];
        sel = $urandom % 4;
        dst = (sel == 0) ? 16'hFFC6 : (sel == 1) ? 16'hFFFF : 16'hFFC4;
        mine = (dst == 16'hFFC4); bcast = (dst == 16'hFFFF);
        blk = (tc == TC_WRB || tc == TC_RRSB || tc == TC_LRQ || tc == TC_LRS);
        len = 1 + ($urandom % 32);
        spd = 8'(($urandom % 4) << 4);
        hdr = '{ {dst, 6'(p), 2'b01, tc, 4'h0}, {16'hFFC1, 16'(p)}, $urandom };
        if (!(tc == TC_WRS || tc == TC_RRQ)) hdr.push_back(blk || tc == TC_RRB ? {16'(len), 16'h0} : $urandom);
        data = '{};
        if (blk) for (int i = 0; i < (len + 3) / 4; i++) data.push_back($urandom);
        bs = '{}; packet_bytes(bs, hdr, data);
        bad = blk && ($urandom % 4 == 0);
        if (bad) bs[bs.size() - 1 - ($urandom % 4)] ^= 8'h04;
        code = bad ? ACK_DATA_ERROR
             : (tc == TC_RRQ || tc == TC_RRB || tc == TC_LRQ) ? ACK_PENDING : ACK_COMPLETE;
        a0 = n_ack; p0 = n_pkt;
        grf = '{};
        send(spd, bs);
        exp = '{};
        if (mine || bcast) begin
          exp = hdr; foreach (data[i]) exp.push_back(data[i]);
          exp.push_back(trailer(spd, code, 1, 1, !bad));
        end
        chk(grf == exp, "random packet: GR FIFO contents");
        chk(n_pkt - p0 == ((mine || bcast) ? 1 : 0), "random packet: rx_pkt");
        chk(n_ack - a0 == (mine ? 1 : 0) && (!mine || last_ack == code), "random packet: ack request");
      end
      grf = '{};
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
