// crc32_unit: byte-serial CRC-32 generator and checker for IEEE 1394 packet
// header and data CRCs.
//
// The register is preset to all ones by init and takes one byte per clock
// when en is high, most significant bit first, with the polynomial 04C11DB7.
// crc is the one's complement of the register, i.e. the value a transmitter
// appends after the last header or data quadlet and a receiver compares with
// the CRC quadlet it received. init has priority over en. The document only
// says a CRC is generated and checked; the IEEE 1394 CRC-32 is used.
module crc32_unit (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        en,
  input  logic [7:0]  din,
  output logic [31:0] crc
);
  import lhc_pkg::*;
  logic [31:0] r;
  always_ff @(posedge clk) begin
    if (rst || init) r <= '1;
    else if (en)     r <= crc32_byte(r, din);
  end
  assign crc = ~r;
endmodule
