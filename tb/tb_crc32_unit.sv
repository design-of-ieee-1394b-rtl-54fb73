// tb_crc32_unit: checks the byte-serial CRC-32 against the published check
// value of CRC-32/MPEG-2 (polynomial 04C11DB7, preset all ones, no bit
// reflection) for "123456789", 0376E6E7, whose one's complement the unit
// outputs, and against a bit-serial shift-register model on random messages,
// checked after every byte, across idle gaps and with init and en together.
module tb_crc32_unit;
  logic clk = 0, rst = 1, init = 0, en = 0;
  logic [7:0]  din = 0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32_unit dut (.clk, .rst, .init, .en, .din, .crc);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-serial LFSR model
  function automatic logic [31:0] lfsr(input logic [31:0] r, input logic b);
    logic fb;
    fb = r[31] ^ b;
    r  = {r[30:0], 1'b0};
    if (fb) r = r ^ 32'h04C11DB7;
    return r;
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h exp %08h", what, got, exp);
    end
  endtask

  initial begin
    string s;
    logic [31:0] model;
    s = "123456789";
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    check(crc, 32'h0000_0000, "after init");
    for (int i = 0; i < s.len(); i++) begin
      en = 1; din = s[i];
      @(negedge clk);
    end
    en = 0;
    check(crc, ~32'h0376E6E7, "check value 123456789");
    // hold when en is low
    din = 8'h55;
    @(negedge clk);
    check(crc, ~32'h0376E6E7, "hold");
    // random messages
    for (int m = 0; m < 30; m++) begin
      int n;
      n = 1 + ($urandom % 40);
      init = 1; @(negedge clk); init = 0;
      model = 32'hFFFF_FFFF;
      for (int i = 0; i < n; i++) begin
        en = 1; din = 8'($urandom);
        for (int b = 7; b >= 0; b--) model = lfsr(model, din[b]);
        @(negedge clk);
      end
      en = 0;
      check(crc, ~model, "random message");
    end
    // per-byte comparison with random idle gaps; init wins over en
    for (int m = 0; m < 60; m++) begin
      int n;
      n = 1 + ($urandom % 24);
      init = 1; en = ($urandom % 2 == 1); din = 8'($urandom);
      @(negedge clk); init = 0;
      model = 32'hFFFF_FFFF;
      check(crc, ~model, "init has priority over en");
      for (int i = 0; i < n; i++) begin
        if ($urandom % 3 == 0) begin
          en = 0; din = 8'($urandom); @(negedge clk);
          check(crc, ~model, "idle gap holds");
        end
        en = 1; din = 8'($urandom);
        for (int b = 7; b >= 0; b--) model = lfsr(model, din[b]);
        @(negedge clk);
        check(crc, ~model, "after each byte");
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
