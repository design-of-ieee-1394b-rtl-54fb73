// tb_async_fifo: dual-clock FIFO with a non-power-of-two depth (the 5 KB AT
// FIFO scaled to 20 quadlets for a short run). Random writes on one clock and
// random reads on an unrelated clock; every word read is compared with a
// queue model, the FIFO is filled to check that exactly DEPTH words fit and
// that the full flag and write level are right, and drained to check empty.
module tb_async_fifo;
  localparam int DEPTH = 20;
  localparam int CW = $clog2(DEPTH) + 2;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1, wr_en = 0, rd_en = 0;
  logic [31:0] wdata = 0, rdata;
  logic full, empty;
  logic [CW-1:0] wlevel, rlevel;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  async_fifo #(.DEPTH(DEPTH)) dut (.wclk, .wrst, .wr_en, .wdata, .full, .wlevel,
                                   .rclk, .rrst, .rd_en, .rdata, .empty, .rlevel);

  always #7 wclk = ~wclk;
  always #5 rclk = ~rclk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int wr_budget = 0;
  bit wr_active = 0, rd_active = 0;
  int rd_pct = 50;

  // writer
  always @(negedge wclk) begin
    wr_en <= 0;
    if (wr_active && wr_budget > 0 && !full && ($urandom % 100) < 70) begin
      logic [31:0] v;
      v = $urandom;
      wr_en <= 1; wdata <= v;
      q.push_back(v);
      wr_budget--;
    end
  end
  // reader
  always @(negedge rclk) begin
    rd_en <= 0;
    if (rd_active && !empty && ($urandom % 100) < rd_pct) begin
      chk(q.size() > 0 && rdata == q[0], "read data order");
      if (q.size() > 0) void'(q.pop_front());
      rd_en <= 1;
    end
  end

  initial begin
    repeat (4) @(posedge wclk);
    wrst = 0; rrst = 0;
    chk(empty && !full, "empty after reset");
    // streaming with both sides active
    wr_budget = 300; wr_active = 1; rd_active = 1;
    wait (wr_budget == 0);
    wait (q.size() == 0);
    repeat (10) @(posedge rclk);
    chk(empty, "empty after stream");
    // fill completely
    rd_active = 0;
    wr_budget = DEPTH + 5;
    repeat (200) @(posedge wclk);
    chk(q.size() == DEPTH, "exactly DEPTH words accepted");
    chk(full && wlevel == CW'(DEPTH), "full flag and level");
    repeat (5) @(posedge rclk);
    chk(rlevel == CW'(DEPTH), "read-side level");
    wr_active = 0;
    // drain
    rd_pct = 100; rd_active = 1;
    wait (q.size() == 0);
    repeat (10) @(posedge wclk);
    chk(empty && !full && wlevel == 0, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
