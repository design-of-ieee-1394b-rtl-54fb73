// tb_it_tx: isochronous transmitter against a queue model of the IT FIFO and
// a scripted PHY side. Checks that nothing is requested before a cycle start,
// the re-organized one-quadlet bus header, header and data CRCs (bit-serial
// reference), one packet per cycle, re-request after a lost arbitration,
// TcErr with FIFO drain and RstTx, then 25 random packets of 1 to 200
// bytes.
module tb_it_tx;
  import lhc_pkg::*;
  import tb_util_pkg::*;
  logic sclk = 0, rst = 1;
  logic [31:0] itf_rdata;
  logic itf_empty, itf_rd_en;
  logic [12:0] itf_rlevel;
  logic tx_en = 0, rst_tx = 0, cyc_start = 0, rx_busy = 0;
  logic tx_busy, req_valid, req_ready = 0, grant = 0, lost = 0, drv;
  lreq_t req;
  logic [1:0] ctl;
  logic [7:0] d;
  logic it_done, tc_err, con_err;
  int checks = 0, failures = 0;

  it_tx dut (.*);

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

  logic [31:0] fq[$];
  assign itf_empty  = (fq.size() == 0);
  assign itf_rlevel = 13'(fq.size());
  assign itf_rdata  = itf_empty ? 32'h0 : fq[0];
  always @(posedge sclk) if (itf_rd_en && fq.size() > 0) void'(fq.pop_front());

  lreq_t reqs[$];
  always @(posedge sclk) begin
    if (req_valid && !req_ready) req_ready <= 1;
    else req_ready <= 0;
    if (req_valid && req_ready) reqs.push_back(req);
  end

  logic [7:0] got[$];
  int n_done = 0, n_tc = 0, n_con = 0;
  always @(posedge sclk) if (!rst) begin
    if (drv && ctl == 2'b10) got.push_back(d);
    if (it_done) n_done++;
    if (tc_err) n_tc++;
    if (con_err) n_con++;
  end

  task automatic pulse_cycle();
    cyc_start = 1; @(negedge sclk); cyc_start = 0;
  endtask
  task automatic do_grant();
    repeat (3) @(negedge sclk);
    grant = 1; @(negedge sclk); grant = 0;
  endtask
  task automatic wait_done(input int n);
    for (int i = 0; i < 3000 && n_done < n; i++) @(negedge sclk);
  endtask

  function automatic void host_pkt(input logic [1:0] spd, input logic [1:0] tag, input logic [5:0] ch,
                                   input logic [3:0] sy, input int len, ref logic [31:0] dat[$]);
    fq.push_back({14'h0, spd, tag, ch, TC_ISO, sy});
    fq.push_back({16'(len), 16'h0});
    foreach (dat[i]) fq.push_back(dat[i]);
  endfunction

  initial begin
    logic [31:0] dat[$], dat2[$], hdr[$];
    logic [7:0] exp[$];
    repeat (3) @(negedge sclk);
    rst = 0;
    tx_en = 1;
    dat = '{32'h0102_0304, 32'h0506_0708, 32'h090A_0000};
    host_pkt(2'b01, 2'b01, 6'd17, 4'h3, 10, dat);
    dat2 = '{32'hDEAD_BEEF};
    host_pkt(2'b10, 2'b00, 6'd5, 4'h0, 4, dat2);
    repeat (20) @(negedge sclk);
    chk(reqs.size() == 0, "no request before cycle start");
    pulse_cycle();
    for (int i = 0; i < 50 && reqs.size() == 0; i++) @(negedge sclk);
    chk(reqs.size() == 1 && reqs[0].rtype == LR_ISO && reqs[0].speed == 3'b010, "iso request with speed");
    do_grant();
    wait_done(1);
    hdr = '{ {16'd10, 2'b01, 6'd17, TC_ISO, 4'h3} };
    exp = '{};
    packet_bytes(exp, hdr, dat);
    chk(got == exp, "iso packet bytes");
    // second packet waits for next cycle
    repeat (40) @(negedge sclk);
    chk(reqs.size() == 1, "one packet per cycle");
    got = '{};
    pulse_cycle();
    for (int i = 0; i < 50 && reqs.size() == 1; i++) @(negedge sclk);
    // lose arbitration once
    repeat (2) @(negedge sclk);
    lost = 1; rx_busy = 1; @(negedge sclk); lost = 0;
    repeat (10) @(negedge sclk);
    rx_busy = 0;
    for (int i = 0; i < 50 && reqs.size() == 2; i++) @(negedge sclk);
    chk(n_con == 1 && reqs.size() == 3, "re-request after lost arbitration");
    do_grant();
    wait_done(2);
    hdr = '{ {16'd4, 2'b00, 6'd5, TC_ISO, 4'h0} };
    exp = '{};
    packet_bytes(exp, hdr, dat2);
    chk(got == exp, "second iso packet bytes");
    chk(fq.size() == 0, "IT FIFO empty");
    // zero-length packet
    got = '{};
    dat = '{};
    host_pkt(2'b00, 2'b11, 6'd63, 4'hF, 0, dat);
    pulse_cycle();
    for (int i = 0; i < 50 && reqs.size() == 3; i++) @(negedge sclk);
    do_grant();
    wait_done(3);
    hdr = '{ {16'd0, 2'b11, 6'd63, TC_ISO, 4'hF} };
    exp = '{};
    packet_bytes(exp, hdr, dat);
    chk(got == exp, "header-only iso packet");
    // wrong tcode
    fq.push_back({14'h0, 2'b00, 2'b00, 6'd1, 4'h1, 4'h0});
    fq.push_back(32'h0004_0000);
    fq.push_back(32'h1);
    pulse_cycle();
    repeat (10) @(negedge sclk);
    chk(n_tc == 1 && fq.size() == 0, "TcErr drains IT FIFO");
    // RstTx while waiting for data
    fq.push_back({14'h0, 2'b00, 2'b00, 6'd1, TC_ISO, 4'h0});
    fq.push_back(32'h0040_0000);
    pulse_cycle();
    repeat (10) @(negedge sclk);
    chk(reqs.size() == 4, "waits for the whole block");
    rst_tx = 1; @(negedge sclk); rst_tx = 0;
    repeat (5) @(negedge sclk);
    chk(fq.size() == 0 && !drv, "RstTx empties IT FIFO");
    // random packets, one per cycle: lengths 1..200 bytes, padded to quadlets
    for (int p = 0; p < 25; p++) begin
      int len, nr;
      logic [1:0] spd, tag; logic [5:0] ch; logic [3:0] sy;
      len = 1 + ($urandom % 200);
      spd = 2'($urandom); tag = 2'($urandom); ch = 6'($urandom); sy = 4'($urandom);
      dat = '{};
      for (int i = 0; i < (len + 3) / 4; i++) dat.push_back($urandom);
      // bytes past len in the last quadlet are padding and sent as written
      host_pkt(spd, tag, ch, sy, len, dat);
      got = '{};
      nr = reqs.size();
      pulse_cycle();
      for (int i = 0; i < 100 && reqs.size() == nr; i++) @(negedge sclk);
      chk(reqs.size() == nr + 1 && reqs[nr].rtype == LR_ISO && reqs[nr].speed == {spd, 1'b0},
          "random packet: iso request at its speed");
      do_grant();
      wait_done(4 + p);
      hdr = '{ {16'(len), tag, ch, TC_ISO, sy} };
      exp = '{};
      packet_bytes(exp, hdr, dat);
      chk(got == exp, "random packet bytes");
      chk(fq.size() == 0, "random packet fully read from the IT FIFO");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
