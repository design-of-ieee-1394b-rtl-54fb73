// tb_central_arbiter: checks the routing of host writes to the AT FIFO, IT
// FIFO and registers, GR FIFO reads with pop, register reads, empty GR FIFO
// reads and the FIFO overflow flags, first directed, then with 500 random
// cycles checked against the address map.
module tb_central_arbiter;
  logic bclk = 0, rst = 1, rd_en = 0, we_en = 0;
  logic [7:0] rd_addr = 0, we_addr = 0;
  logic [31:0] rd_data, we_data = 0, reg_rdata, fifo_wdata, grf_rdata;
  logic reg_we, atf_wr, itf_wr, atf_full = 0, itf_full = 0, grf_rd, grf_empty = 0, ovf_at, ovf_it;
  int checks = 0, failures = 0;

  central_arbiter dut (.*);

  assign reg_rdata = {24'hABCDEF, rd_addr};
  assign grf_rdata = 32'h6000_0001;

  always #5 bclk = ~bclk;
  initial begin
    repeat (3000) @(posedge bclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge bclk);
    rst = 0;
    we_en = 1; we_addr = 8'h20; we_data = 32'h11;
    #1 chk(atf_wr && !itf_wr && !reg_we && fifo_wdata == 32'h11, "write to AT FIFO");
    we_addr = 8'h24;
    #1 chk(!atf_wr && itf_wr && !reg_we, "write to IT FIFO");
    we_addr = 8'h04;
    #1 chk(!atf_wr && !itf_wr && reg_we, "write to register");
    we_en = 0;
    #1 chk(!atf_wr && !itf_wr && !reg_we, "no write without WE_en");
    rd_en = 1; rd_addr = 8'h28;
    #1 chk(grf_rd && rd_data == 32'h6000_0001, "GR FIFO read pops");
    grf_empty = 1;
    #1 chk(!grf_rd && rd_data == 0, "empty GR FIFO reads 0");
    rd_addr = 8'h08;
    #1 chk(!grf_rd && rd_data == 32'hABCDEF08, "register read");
    rd_en = 0; rd_addr = 8'h28; grf_empty = 0;
    #1 chk(!grf_rd, "no pop without RD_en");
    @(negedge bclk);
    atf_full = 1; we_en = 1; we_addr = 8'h20;
    @(negedge bclk);
    chk(ovf_at && !ovf_it, "AT overflow flag");
    atf_full = 0; itf_full = 1; we_addr = 8'h24;
    @(negedge bclk);
    chk(!ovf_at && ovf_it, "IT overflow flag");
    we_en = 0;
    @(negedge bclk);
    chk(!ovf_at && !ovf_it, "flags clear");
    // random sweep: every output against the address map, cycle by cycle
    begin
      logic exp_ovf_at = 0, exp_ovf_it = 0;
      logic [7:0] pick[6] = '{8'h20, 8'h24, 8'h28, 8'h00, 8'h1C, 8'h2C};
      for (int t = 0; t < 500; t++) begin
        we_en = ($urandom % 2 == 1); rd_en = ($urandom % 2 == 1);
        we_addr = ($urandom % 4 == 0) ? 8'($urandom) : pick[$urandom % 6];
        rd_addr = ($urandom % 4 == 0) ? 8'($urandom) : pick[$urandom % 6];
        we_data = $urandom; atf_full = ($urandom % 3 == 0); itf_full = ($urandom % 3 == 0);
        grf_empty = ($urandom % 3 == 0);
        #1;
        chk(atf_wr == (we_en && we_addr == 8'h20) && itf_wr == (we_en && we_addr == 8'h24)
            && reg_we == (we_en && we_addr != 8'h20 && we_addr != 8'h24)
            && fifo_wdata == we_data, "write routing");
        chk(grf_rd == (rd_en && rd_addr == 8'h28 && !grf_empty), "GR FIFO pop");
        chk(rd_data == ((rd_addr == 8'h28) ? (grf_empty ? 32'h0 : 32'h6000_0001) : {24'hABCDEF, rd_addr}),
            "read data select");
        chk(ovf_at == exp_ovf_at && ovf_it == exp_ovf_it, "overflow flags one cycle after the write");
        exp_ovf_at = we_en && we_addr == 8'h20 && atf_full;
        exp_ovf_it = we_en && we_addr == 8'h24 && itf_full;
        @(negedge bclk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
