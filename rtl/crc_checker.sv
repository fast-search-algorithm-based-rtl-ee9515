// crc_checker: CRC verification of one received packet.
//
// It recomputes the CRC-16 of the received packet {status, ID} (generator
// CRC_POLY, preset CRC_INIT, MSB first, in one combinational XOR network) and
// compares it with the received CRC. If they match the status bit is set to
// its original value, zero; otherwise it is set to one. The packet with the
// updated status bit goes on to the status checker. The polynomial and preset
// are those that reproduce the design's example CRC values; computing the CRC
// in parallel rather than with a bit-serial shift register is this design's
// choice, so that all four links are checked in the same clock.
//
// Interface: purely combinational. calc_crc is the recomputed CRC,
// pkt_out = {error, ID}.
module crc_checker
  import anticol_pkg::*;
#(
  parameter int unsigned IDW      = ID_W,
  parameter logic [15:0] POLY     = CRC_POLY,
  parameter logic [15:0] INIT     = CRC_INIT
) (
  input  logic [IDW:0]       pkt,
  input  logic [CRC_W-1:0]   rx_crc,
  output logic [CRC_W-1:0]   calc_crc,
  output logic [IDW:0]       pkt_out
);

  always_comb begin
    calc_crc = crc16_word(64'(pkt), IDW + 1, POLY, INIT);
    pkt_out  = {calc_crc != rx_crc, pkt[IDW-1:0]};
  end

  initial assert (IDW + 1 <= 64) else $error("packet wider than the CRC function supports");

endmodule
