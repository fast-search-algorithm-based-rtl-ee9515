// anticol_tb_pkg: reference models used by the testbenches of the RFID
// anti-collision design, written independently of the RTL.
//
// ref_crc computes the CRC as the remainder of the packet times x^16 divided
// by the generator x^16 + x^12 + x^5 + 1 (plain long division over GF(2)),
// which equals the preset-zero shift-register CRC the RTL uses.
// make_msg builds a received message {status, ID, CRC}; ref_order gives the
// slot order the fast search must produce (ascending ID, lower slot first on
// ties), by insertion sort.
package anticol_tb_pkg;

  localparam logic [16:0] GEN = 17'h1_1021;

  function automatic logic [15:0] ref_crc(input logic [16:0] pkt);
    logic [32:0] r;
    r = {pkt, 16'h0000};
    for (int b = 32; b >= 16; b--)
      if (r[b]) r = r ^ (33'(GEN) << (b - 16));
    return r[15:0];
  endfunction

  function automatic logic [32:0] make_msg(input logic [15:0] id);
    return {1'b0, id, ref_crc({1'b0, id})};
  endfunction

  typedef logic [15:0] id4_t [4];
  typedef int          ord4_t [4];

  function automatic ord4_t ref_order(input id4_t ids);
    ord4_t o;
    int    t;
    for (int i = 0; i < 4; i++) o[i] = i;
    for (int i = 1; i < 4; i++)
      for (int j = i; j > 0; j--)
        if (ids[o[j-1]] > ids[o[j]]) begin
          t = o[j]; o[j] = o[j-1]; o[j-1] = t;
        end
    return o;
  endfunction

endpackage
