// tb_util_pkg: reference models shared by the testbenches: a bit-serial
// IEEE 1394 CRC-32 over quadlets (written independently of the RTL's
// byte-wise function) and helpers to split quadlets into bytes.
package tb_util_pkg;
  function automatic logic [31:0] crc_quads(input logic [31:0] qs[$]);
    logic [31:0] r;
    logic fb;
    r = 32'hFFFF_FFFF;
    foreach (qs[i]) begin
      for (int b = 31; b >= 0; b--) begin
        fb = r[31] ^ qs[i][b];
        r  = {r[30:0], 1'b0};
        if (fb) r = r ^ 32'h04C1_1DB7;
      end
    end
    return ~r;
  endfunction

  // append the bytes of a quadlet, most significant first
  function automatic void push_bytes(ref logic [7:0] bs[$], input logic [31:0] q);
    for (int i = 3; i >= 0; i--) bs.push_back(q[8*i +: 8]);
  endfunction

  // the bytes of a bus packet: header, header CRC, and if any data, data and data CRC
  function automatic void packet_bytes(ref logic [7:0] bs[$], input logic [31:0] hdr[$],
                                       input logic [31:0] data[$]);
    foreach (hdr[i]) push_bytes(bs, hdr[i]);
    push_bytes(bs, crc_quads(hdr));
    if (data.size() > 0) begin
      foreach (data[i]) push_bytes(bs, data[i]);
      push_bytes(bs, crc_quads(data));
    end
  endfunction
endpackage
