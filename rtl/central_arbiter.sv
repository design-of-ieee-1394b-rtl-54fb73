// central_arbiter: routes host bus cycles between the internal registers and
// the three FIFOs.
//
// A write cycle (we_en) to address 20 pushes we_data into the AT FIFO, to 24
// into the IT FIFO; any other write goes to the internal registers. A read
// cycle (rd_en) to address 28 returns the oldest GR FIFO quadlet and pops it
// (0 is returned and nothing popped when the GR FIFO is empty); any other
// address returns the internal register value. Reads are combinational on
// rd_addr, so the data is ready in the cycle in which the host bus interface
// drives DATA. A write to a full FIFO is counted as lost and sets ovf_at /
// ovf_it for one cycle.
// The document names the block only; the address map is this design's. Its
// PCI bus-master part is not part of this block.
module central_arbiter (
  input  logic        bclk,
  input  logic        rst,
  input  logic        rd_en,
  input  logic [7:0]  rd_addr,
  output logic [31:0] rd_data,
  input  logic        we_en,
  input  logic [7:0]  we_addr,
  input  logic [31:0] we_data,
  // internal registers
  output logic        reg_we,
  input  logic [31:0] reg_rdata,
  // AT / IT FIFO write sides
  output logic        atf_wr,
  output logic        itf_wr,
  output logic [31:0] fifo_wdata,
  input  logic        atf_full,
  input  logic        itf_full,
  // GR FIFO read side
  output logic        grf_rd,
  input  logic [31:0] grf_rdata,
  input  logic        grf_empty,
  output logic        ovf_at,
  output logic        ovf_it
);
  import lhc_pkg::*;

  assign atf_wr     = we_en && we_addr == A_ATF;
  assign itf_wr     = we_en && we_addr == A_ITF;
  assign fifo_wdata = we_data;
  assign reg_we     = we_en && we_addr != A_ATF && we_addr != A_ITF;
  assign grf_rd     = rd_en && rd_addr == A_GRF && !grf_empty;

  always_comb begin
    if (rd_addr == A_GRF) rd_data = grf_empty ? '0 : grf_rdata;
    else                  rd_data = reg_rdata;
  end

  always_ff @(posedge bclk) begin
    if (rst) begin
      ovf_at <= 1'b0;
      ovf_it <= 1'b0;
    end else begin
      ovf_at <= atf_wr && atf_full;
      ovf_it <= itf_wr && itf_full;
    end
  end
endmodule
