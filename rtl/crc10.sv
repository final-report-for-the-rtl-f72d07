// crc10: CRC-10 of an OAM/resync cell payload.
//
// Computes the ATM OAM CRC-10, generator x^10+x^9+x^5+x^4+x+1, over the first
// 374 bits of a 48-octet payload (everything but the CRC field in the last 10
// bits), most significant bit first, register starting at zero. Purely
// combinational: the whole payload is folded in one cycle, so a resync cell can
// be built or checked within one cell period. The design names CRC-10 for the
// resync cells; the generator polynomial and bit order are those of ATM OAM
// cells.
module crc10 (
  input  logic [373:0] data,
  output logic [9:0]   crc
);
  localparam logic [9:0] POLY = 10'h233;

  always_comb begin
    logic [9:0] r;
    logic       fb;
    r = '0;
    for (int i = 373; i >= 0; i--) begin
      fb = r[9] ^ data[i];
      r  = {r[8:0], 1'b0} ^ (fb ? POLY : 10'h000);
    end
    crc = r;
  end
endmodule
