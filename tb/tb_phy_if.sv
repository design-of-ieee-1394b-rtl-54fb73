// tb_phy_if: checks the LREQ serial formats (bus request, register read,
// register write), priority of the isochronous transmitter, that only one
// bus request is outstanding, grant and lost routing to the right owner, the
// one-cycle input registers and the CTL/D output drive, then 40 random
// requests from either transmitter decoded bit by bit.
module tb_phy_if;
  import lhc_pkg::*;
  logic sclk = 0, rst = 1;
  logic [1:0] ctl_i = 0, ctl_o, ctl_r, at_ctl = 0, it_ctl = 0;
  logic [7:0] d_i = 0, d_o, d_r, at_d = 0, it_d = 0;
  logic phy_oe, lreq;
  logic at_req_valid = 0, at_req_ready, it_req_valid = 0, it_req_ready;
  lreq_t at_req, it_req;
  logic at_grant, it_grant, at_lost, it_lost, at_drv = 0, it_drv = 0;
  int checks = 0, failures = 0;

  phy_if dut (.*);

  always #5 sclk = ~sclk;
  initial begin
    repeat (5000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // LREQ capture: after a start bit, collect n more bits
  task automatic capture(input int nbits, output logic [16:0] bits);
    bits = '0;
    while (!lreq) @(negedge sclk);
    for (int i = 0; i < nbits; i++) begin
      bits = {bits[15:0], lreq};
      @(negedge sclk);
    end
  endtask

  int at_g = 0, it_g = 0, at_l = 0, it_l = 0;
  always @(posedge sclk) begin
    if (at_grant) at_g++;
    if (it_grant) it_g++;
    if (at_lost) at_l++;
    if (it_lost) it_l++;
  end

  initial begin
    logic [16:0] b;
    at_req = '{rtype: LR_FAIR, speed: 3'b100, addr: 4'h0, data: 8'h00};
    it_req = '{rtype: LR_ISO, speed: 3'b010, addr: 4'h0, data: 8'h00};
    repeat (3) @(negedge sclk);
    rst = 0;
    // input registers
    ctl_i = 2'b01; d_i = 8'hA5;
    @(negedge sclk);
    chk(ctl_r == 2'b01 && d_r == 8'hA5, "inputs registered");
    ctl_i = 0; d_i = 0;
    @(negedge sclk);

    // fair request from the asynchronous transmitter
    at_req_valid = 1;
    #1 chk(at_req_ready, "at request accepted when idle");
    @(negedge sclk); at_req_valid = 0;
    // first bit already on LREQ
    b = '0;
    for (int i = 0; i < 8; i++) begin b = {b[15:0], lreq}; @(negedge sclk); end
    chk(b[7:0] == 8'b1_011_100_0, "fair request frame");
    chk(!lreq, "LREQ low after frame");

    // a second bus request is held off while the first is outstanding
    it_req_valid = 1;
    #1 chk(!it_req_ready, "second bus request blocked");
    // register read is allowed meanwhile
    at_req = '{rtype: LR_RDREG, speed: 3'b000, addr: 4'hB, data: 8'h00};
    at_req_valid = 1;
    #1 chk(at_req_ready, "register read accepted while bus request outstanding");
    @(negedge sclk); at_req_valid = 0;
    b = '0;
    for (int i = 0; i < 9; i++) begin b = {b[15:0], lreq}; @(negedge sclk); end
    chk(b[8:0] == 9'b1_100_1011_0, "register read frame");

    // grant goes to the asynchronous transmitter
    ctl_i = 2'b11; @(negedge sclk); ctl_i = 2'b00;
    @(negedge sclk);
    chk(at_g == 1 && it_g == 0, "grant routed to async transmitter");
    // now iso request is taken
    #1 chk(it_req_ready, "iso request accepted after grant");
    @(negedge sclk); it_req_valid = 0;
    b = '0;
    for (int i = 0; i < 8; i++) begin b = {b[15:0], lreq}; @(negedge sclk); end
    chk(b[7:0] == 8'b1_001_010_0, "iso request frame");
    // PHY receives instead: iso request is lost
    ctl_i = 2'b10; d_i = 8'hFF; @(negedge sclk); @(negedge sclk);
    ctl_i = 2'b00; d_i = 0; @(negedge sclk);
    chk(it_l == 1 && at_l == 0 && it_g == 0, "lost routed to iso transmitter");
    // a grant with nothing outstanding is ignored
    ctl_i = 2'b11; @(negedge sclk); ctl_i = 0; @(negedge sclk);
    chk(at_g == 1 && it_g == 0, "stray grant ignored");

    // both ask at once: iso wins
    at_req = '{rtype: LR_PRI, speed: 3'b000, addr: 4'h0, data: 8'h00};
    at_req_valid = 1; it_req_valid = 1;
    #1 chk(it_req_ready && !at_req_ready, "iso has priority");
    @(negedge sclk); it_req_valid = 0;
    repeat (8) @(negedge sclk);
    #1 chk(!at_req_ready, "async waits while iso outstanding");
    ctl_i = 2'b11; @(negedge sclk); ctl_i = 0; @(negedge sclk);
    chk(it_g == 1, "grant routed to iso transmitter");
    #1 chk(at_req_ready, "async taken after");
    @(negedge sclk); at_req_valid = 0;
    b = '0;
    for (int i = 0; i < 8; i++) begin b = {b[15:0], lreq}; @(negedge sclk); end
    chk(b[7:0] == 8'b1_010_000_0, "priority request frame");

    // register write, 17 bits
    at_req = '{rtype: LR_WRREG, speed: 3'b000, addr: 4'h5, data: 8'h3C};
    at_req_valid = 1;
    #1 chk(at_req_ready, "register write accepted");
    @(negedge sclk); at_req_valid = 0;
    b = '0;
    for (int i = 0; i < 17; i++) begin b = {b[15:0], lreq}; @(negedge sclk); end
    chk(b == 17'b1_101_0101_00111100_0, "register write frame");

    // output drive
    at_drv = 1; at_ctl = 2'b10; at_d = 8'h77;
    #1 chk(phy_oe && ctl_o == 2'b10 && d_o == 8'h77, "async drives CTL/D");
    at_drv = 0; it_drv = 1; it_ctl = 2'b01; it_d = 8'h12;
    #1 chk(phy_oe && ctl_o == 2'b01 && d_o == 8'h12, "iso drives CTL/D");
    it_drv = 0;
    #1 chk(!phy_oe, "released");

    // grant the priority request still outstanding
    ctl_i = 2'b11; @(negedge sclk); ctl_i = 0; @(negedge sclk);
    chk(at_g == 2, "outstanding priority request granted");

    // random requests from either transmitter, decoded bit by bit
    for (int p = 0; p < 40; p++) begin
      lreq_t r;
      logic iso_side;
      int n, g0;
      logic [16:0] exp;
      iso_side = ($urandom % 2 == 1);
      r.rtype = lreq_type_e'($urandom % 6);
      if (iso_side && (r.rtype == LR_RDREG || r.rtype == LR_WRREG)) r.rtype = LR_ISO;
      r.speed = 3'($urandom); r.addr = 4'($urandom); r.data = 8'($urandom);
      case (r.rtype)
        LR_RDREG: begin n = 9;  exp = 17'({1'b1, r.rtype, r.addr, 1'b0}); end
        LR_WRREG: begin n = 17; exp = {1'b1, r.rtype, r.addr, r.data, 1'b0}; end
        default:  begin n = 8;  exp = 17'({1'b1, r.rtype, r.speed, 1'b0}); end
      endcase
      if (iso_side) begin it_req = r; it_req_valid = 1; end
      else begin at_req = r; at_req_valid = 1; end
      #1 chk(iso_side ? it_req_ready : at_req_ready, "random request accepted when idle");
      @(negedge sclk); at_req_valid = 0; it_req_valid = 0;
      b = '0;
      for (int i = 0; i < n; i++) begin b = {b[15:0], lreq}; @(negedge sclk); end
      chk(b == exp, "random request frame");
      chk(!lreq, "LREQ low after random frame");
      if (n == 8) begin
        g0 = iso_side ? it_g : at_g;
        ctl_i = 2'b11; @(negedge sclk); ctl_i = 0; @(negedge sclk);
        chk((iso_side ? it_g : at_g) == g0 + 1, "grant routed to the requester");
      end
      repeat ($urandom % 3) @(negedge sclk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
