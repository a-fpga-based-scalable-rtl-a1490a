// Destination-address hash of the URL pre-filter.
//
// Computes the standard Ethernet CRC-32 (reflected polynomial 0xEDB88320,
// initial value 0xFFFFFFFF, final inversion) over the four bytes of an IPv4
// address, taken in wire order (most significant octet first), and keeps the
// HASH_W least significant bits of the result. With HASH_W = 26 this maps the
// 2^32 addresses onto the 2^26 bits of the rule memory, so 64 addresses share
// each bit. The use of a 32-bit CRC and of its 26 low bits follows the 10 Gbps
// implementation; the CRC variant (reflection, initial value, inversion) is
// this design's choice.
//
// Purely combinational: hash is valid in the same cycle as ip.
module crc32_hash #(
  parameter int unsigned HASH_W = urlf_pkg::HASH_W
) (
  input  logic [31:0]       ip,     // IPv4 address, ip[31:24] = first octet
  output logic [HASH_W-1:0] hash
);

  localparam logic [31:0] POLY = 32'hEDB8_8320;

  logic [31:0] crc;

  always_comb begin
    crc = 32'hFFFF_FFFF;
    for (int b = 3; b >= 0; b--) begin
      crc = crc ^ {24'd0, ip[8*b +: 8]};
      for (int k = 0; k < 8; k++)
        crc = crc[0] ? ((crc >> 1) ^ POLY) : (crc >> 1);
    end
    crc  = ~crc;
    hash = crc[HASH_W-1:0];
  end

endmodule
