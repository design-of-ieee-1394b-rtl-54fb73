// tb_host_bus_if: drives host read and write bursts of one to four quadlets
// (CS# held low, a new address and data at every BCLK) and checks that every
// BCLK with CS# low gives exactly one BCLK cycle of RD_en or WE_en with CA#
// low, one cycle after the sampling edge, with the address/data of that edge
// latched and, for reads, the register value of that address on DATA while
// CA# is low. Strobe and CA# counts per burst are checked against the burst
// length.
module tb_host_bus_if;
  logic bclk = 0, rst = 1, cs_n = 1, wr_n = 1;
  logic [7:0]  addr = 0;
  logic [31:0] data_i = 0, data_o, rd_data, we_data;
  logic data_oe, ca_n, rd_en, we_en;
  logic [7:0] rd_addr, we_addr;
  int checks = 0, failures = 0;

  host_bus_if dut (.bclk, .rst, .cs_n, .wr_n, .addr, .data_i, .data_o, .data_oe, .ca_n,
                   .rd_en, .rd_addr, .rd_data, .we_en, .we_addr, .we_data);

  // register file model answering reads
  function automatic logic [31:0] model(input logic [7:0] a);
    return {a, ~a, a ^ 8'h5A, 8'hC3};
  endfunction
  assign rd_data = model(rd_addr);

  always #5 bclk = ~bclk;
  initial begin
    repeat (5000) @(posedge bclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int n_rd = 0, n_we = 0, n_ca = 0;
  always @(posedge bclk) if (!rst) begin
    if (rd_en) n_rd++;
    if (we_en) n_we++;
    if (!ca_n) n_ca++;
  end

  initial begin
    repeat (3) @(posedge bclk);
    rst = 0;
    for (int t = 0; t < 60; t++) begin
      logic [7:0] a[4]; logic [31:0] v[4]; int len; int r0, w0, c0; logic wr;
      len = 1 + ($urandom % 4);
      wr = ($urandom % 2 == 1);
      foreach (a[i]) begin a[i] = 8'($urandom); v[i] = $urandom; end
      r0 = n_rd; w0 = n_we; c0 = n_ca;
      @(negedge bclk);
      cs_n = 0; wr_n = !wr; addr = a[0]; data_i = v[0];
      for (int i = 0; i < len; i++) begin
        @(negedge bclk);
        // beat i was sampled at the last edge: its strobe and CA# are active now
        if (wr) begin
          chk(we_en && !rd_en, "WE_en after sampling edge");
          chk(we_addr == a[i] && we_data == v[i], "write address/data of this beat latched");
          chk(!data_oe, "DATA not driven on write");
        end else begin
          chk(rd_en && !we_en, "RD_en after sampling edge");
          chk(rd_addr == a[i], "read address of this beat latched");
          chk(data_oe && data_o == model(a[i]), "read data of this beat on DATA");
        end
        chk(!ca_n, "CA# low for each beat");
        if (i + 1 < len) begin
          addr = a[i + 1]; data_i = v[i + 1];
        end else begin
          cs_n = 1; wr_n = 1; addr = 8'hEE; data_i = 32'hDEAD_BEEF;
        end
      end
      repeat (2) @(negedge bclk);
      if (wr) begin
        chk(n_we - w0 == len && n_rd == r0, "one write strobe per beat");
        chk(we_addr == a[len - 1] && we_data == v[len - 1], "write latch holds after the burst");
      end else begin
        chk(n_rd - r0 == len && n_we == w0, "one read strobe per beat");
      end
      chk(n_ca - c0 == len, "one CA# cycle per beat");
      chk(!data_oe && ca_n, "bus released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
