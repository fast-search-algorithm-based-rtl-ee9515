// anticol_pkg: sizes, message layout and the CRC function shared by the
// reader-side RFID anti-collision design.
//
// A received message is {status bit, tag ID, CRC}. With the default 16-bit ID
// and CRC it is 33 bits, e.g. 0_00C8_5844 for tag 00C8. The CRC is CRC-16 with
// generator x^16 + x^12 + x^5 + 1 (0x1021), preset 0, no reflection and no
// final inversion, computed MSB first over the whole packet {status, ID}. This
// is the variant that reproduces the example CRC values quoted for the design
// (00C8 -> 5844, 0005 -> 50A5, 0010 -> 1231, EA60 -> 93DF). The layout of the
// message (status bit on top of the ID, CRC in the low bits) follows those
// examples; the number of slots per read cycle (four) is the design's.
package anticol_pkg;

  localparam int unsigned N_SLOTS  = 4;       // minislots (tags) per read cycle
  localparam int unsigned ID_W     = 16;      // tag ID width
  localparam int unsigned CRC_W    = 16;      // CRC width
  localparam logic [15:0] CRC_POLY = 16'h1021;
  localparam logic [15:0] CRC_INIT = 16'h0000;

  // CRC-16 of a DW-bit word, MSB first, one XOR/shift step per bit: the
  // loop unrolls into a parallel XOR network.
  function automatic logic [15:0] crc16_word(input logic [63:0] data, input int unsigned dw,
                                             input logic [15:0] poly, input logic [15:0] init);
    logic [15:0] c;
    logic        fb;
    c = init;
    for (int i = 63; i >= 0; i--) begin
      if (i < int'(dw)) begin
        fb = c[15] ^ data[i];
        c  = {c[14:0], 1'b0};
        if (fb) c = c ^ poly;
      end
    end
    return c;
  endfunction

endpackage
