// host_bus_if: target side of the host bus (CS#, WR#, ADDR, DATA, CA#).
//
// Every BCLK edge at which CS# is sampled low is one access. At that edge the
// interface latches the address (and, for a write, the data), raises RD_en or
// WE_en for the following BCLK cycle and pulls CA# low for the same cycle;
// this follows the read and write timing diagrams of the controller's host
// bus. WR# low selects a write, WR# high a read. A host that keeps CS# low
// and presents a new address (and data) at every edge makes a burst: one
// quadlet per BCLK, each answered by its own CA# cycle, as in the document's
// burst writes and reads. During a read cycle the register file or FIFO
// answers combinationally on rd_data and the interface drives it onto DATA
// (data_oe high) while CA# is low, so the host takes the data of the address
// it gave one edge later.
// DATA is split into data_i / data_o / data_oe; a pad or the top level joins
// them. The one-edge pipeline of a burst read is this design's reading of the
// timing diagrams.
module host_bus_if #(
  parameter int AW = 8,
  parameter int DW = 32
) (
  input  logic          bclk,
  input  logic          rst,
  input  logic          cs_n,
  input  logic          wr_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] data_i,
  output logic [DW-1:0] data_o,
  output logic          data_oe,
  output logic          ca_n,
  // toward registers / FIFOs
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [DW-1:0] rd_data,
  output logic          we_en,
  output logic [AW-1:0] we_addr,
  output logic [DW-1:0] we_data
);
  logic start;

  assign start = !cs_n;

  always_ff @(posedge bclk) begin
    if (rst) begin
      rd_en   <= 1'b0;
      we_en   <= 1'b0;
      ca_n    <= 1'b1;
      rd_addr <= '0;
      we_addr <= '0;
      we_data <= '0;
    end else begin
      rd_en   <= start && wr_n;
      we_en   <= start && !wr_n;
      ca_n    <= !start;
      if (start && wr_n) rd_addr <= addr;
      if (start && !wr_n) begin
        we_addr <= addr;
        we_data <= data_i;
      end
    end
  end

  assign data_o  = rd_data;
  assign data_oe = rd_en;

  // a read and a write never overlap, and CA# is low exactly when one is active
  a_one_access: assert property (@(posedge bclk) disable iff (rst) !(rd_en && we_en));
  a_ca_match:   assert property (@(posedge bclk) disable iff (rst) (!ca_n) == (rd_en || we_en));
endmodule
