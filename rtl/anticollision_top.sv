// anticollision_top: reader-side anti-collision system for passive RFID tags.
//
// Each frame slot is split into NS minislots, so in one read cycle (one tag
// clock period) NS tags answer, each on its own link, with a message
// {status bit, ID, CRC-16}. The first subsystem checks every message's CRC and
// keeps the ID of each error-free packet (a failed slot becomes zero). The
// second subsystem identifies the NS IDs at once with the fast-search lookup
// table, smallest first, and sends them out one per system clock together
// with the kill command for that tag.
//
// The tag clock is a tick from tag_clock_gen every TAG_DIV system clocks; the
// read cycle's messages are sampled when it is high (msg_ready) and msg_valid
// says they are present. Pipeline from sampling: active slots after 2 clocks,
// sorted dataout after 3, first tag on tag_out after 4, last after 3+NS.
// TAG_DIV >= NS keeps the serial output of consecutive read cycles apart;
// TAG_DIV = NS (four) is this design's choice and gives back-to-back output.
//
// Interface: clk, rst_n (synchronous, active low); msg[i] of link i; the
// intermediate results (calc_crc, pkt_chk, active, dataout) are brought out
// for observation, as in the design's simulation waveforms.
module anticollision_top
  import anticol_pkg::*;
#(
  parameter int unsigned NS      = N_SLOTS,
  parameter int unsigned IDW     = ID_W,
  parameter int unsigned TAG_DIV = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [IDW+CRC_W:0] msg      [NS],
  input  logic               msg_valid,
  output logic               msg_ready,
  output logic [CRC_W-1:0]   calc_crc [NS],
  output logic [IDW:0]       pkt_chk  [NS],
  output logic [IDW-1:0]     active   [NS],
  output logic [NS-1:0]      active_ok,
  output logic               active_valid,
  output logic [IDW-1:0]     dataout  [NS],
  output logic [NS-1:0]      dataout_ok,
  output logic               dataout_valid,
  output logic               tag_busy,
  output logic [IDW-1:0]     tag_out,
  output logic               tag_out_valid,
  output logic [IDW:0]       tag_kill
);

  logic tick;

  tag_clock_gen #(.TAG_DIV(TAG_DIV)) u_tag_clock (
    .clk, .rst_n, .tick
  );

  assign msg_ready = tick;

  first_subsystem #(.NS(NS), .IDW(IDW)) u_first (
    .clk, .rst_n,
    .capture(tick & msg_valid), .msg,
    .calc_crc, .pkt_chk, .active, .active_ok, .active_valid
  );

  second_subsystem #(.NS(NS), .IDW(IDW)) u_second (
    .clk, .rst_n,
    .active, .active_ok, .active_valid,
    .dataout, .dataout_ok, .dataout_valid,
    .busy(tag_busy), .tag_out, .tag_out_valid, .tag_kill
  );

  initial assert (TAG_DIV >= NS)
    else $error("TAG_DIV must be at least NS so that read cycles do not overlap");

endmodule
