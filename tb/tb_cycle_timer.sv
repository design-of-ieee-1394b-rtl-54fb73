// tb_cycle_timer: checks the cycle timer rates (offset tick every OFFSET_DIV
// SCLKs, wrap of cycle_offset at 3072 into cycle_count, of cycle_count at 8000
// into second_count), loading from a cycle start packet and from the host,
// the cyc_start pulse and the lost-cycle detection. Every step of the running
// timer is compared with an independent successor function, and the time
// between steps with OFFSET_DIV.
module tb_cycle_timer;
  logic sclk = 0, rst = 1, cyc_start_pkt = 0, load = 0;
  logic [31:0] cyc_time_in = 0, load_value = 0, cycle_time;
  logic cyc_start, cyc_lost;
  int checks = 0, failures = 0;

  cycle_timer #(.OFFSET_DIV(2), .LOST_LIMIT(7000)) dut (.*);

  always #5 sclk = ~sclk;
  initial begin
    repeat (40000) @(posedge sclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t: %08h", what, $time, cycle_time); end
  endtask

  // independent successor of a CYCLE_TIME value after one 24.576 MHz tick
  function automatic logic [31:0] succ(input logic [31:0] t);
    logic [6:0] sec; logic [12:0] cnt; logic [11:0] off;
    {sec, cnt, off} = t;
    if (off == 12'd3071) begin
      off = 0;
      if (cnt == 13'd7999) begin cnt = 0; sec = sec + 7'd1; end
      else cnt = cnt + 13'd1;
    end else off = off + 12'd1;
    return {sec, cnt, off};
  endfunction

  // every change of the timer not caused by a load is one tick, and ticks
  // come every OFFSET_DIV = 2 SCLKs
  logic [31:0] prev_t;
  logic        prev_load = 1;
  int          since_change = 0, n_ticks = 0;
  logic        timed = 0;   // a tick has been seen since the last load
  always @(posedge sclk) begin
    since_change++;
    if (!rst && !prev_load && cycle_time != prev_t) begin
      n_ticks++;
      chk(cycle_time == succ(prev_t), "timer steps by one tick");
      if (timed) chk(since_change == 2, "one tick per two SCLKs");
      since_change = 0;
      timed = 1;
    end
    if (rst || prev_load) timed = 0;
    prev_t    <= cycle_time;
    prev_load <= rst || load || cyc_start_pkt;
  end

  int n_start = 0, n_lost = 0;
  always @(posedge sclk) if (!rst) begin
    if (cyc_start) n_start++;
    if (cyc_lost) n_lost++;
  end

  initial begin
    repeat (3) @(negedge sclk);
    rst = 0;
    chk(cycle_time == 0, "reset value");
    repeat (200) @(negedge sclk);
    chk(cycle_time == {7'd0, 13'd0, 12'd100}, "offset counts SCLK/2");
    // load near the end of a cycle
    load = 1; load_value = {7'd3, 13'd7999, 12'd3070}; @(negedge sclk); load = 0;
    repeat (4) @(negedge sclk);
    chk(cycle_time == {7'd4, 13'd0, 12'd0}, "offset and count wrap into seconds");
    load = 1; load_value = {7'd127, 13'd17, 12'd3071}; @(negedge sclk); load = 0;
    repeat (2) @(negedge sclk);
    chk(cycle_time == {7'd127, 13'd18, 12'd0}, "offset wrap into count");
    // cycle start packet
    cyc_start_pkt = 1; cyc_time_in = {7'd9, 13'd500, 12'd20}; @(negedge sclk); cyc_start_pkt = 0;
    chk(cycle_time == {7'd9, 13'd500, 12'd20}, "loaded from cycle start packet");
    @(negedge sclk);
    chk(n_start == 1, "cyc_start pulse");
    // no cycle start for LOST_LIMIT SCLKs
    repeat (6990) @(negedge sclk);
    chk(n_lost == 0, "not lost yet");
    repeat (20) @(negedge sclk);
    chk(n_lost == 1, "cycle lost");
    repeat (8000) @(negedge sclk);
    chk(n_lost == 1, "lost reported once");
    cyc_start_pkt = 1; @(negedge sclk); cyc_start_pkt = 0;
    repeat (7010) @(negedge sclk);
    chk(n_lost == 2 && n_start == 2, "re-armed by cycle start");
    chk(n_ticks > 10000, "timer kept running");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
