// first_subsystem: error detection for the N_SLOTS links of a read cycle.
//
// Chain per link: crc_remover (input register, packet/CRC split) ->
// crc_checker (CRC recomputation and compare, status bit) -> status_checker
// (slot = ID or zero). The result of the four links is registered as the
// "active" slots handed to the second subsystem, as in the design's block
// diagram. The two register stages are this design's choice.
//
// Interface: capture loads msg. active_valid pulses two clocks later, when
// active/active_ok hold that read cycle's slots. calc_crc and pkt_chk expose
// the recomputed CRCs and the packets with updated status bit for
// observation.
module first_subsystem
  import anticol_pkg::*;
#(
  parameter int unsigned NS  = N_SLOTS,
  parameter int unsigned IDW = ID_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               capture,
  input  logic [IDW+CRC_W:0] msg       [NS],
  output logic [CRC_W-1:0]   calc_crc  [NS],
  output logic [IDW:0]       pkt_chk   [NS],
  output logic [IDW-1:0]     active    [NS],
  output logic [NS-1:0]      active_ok,
  output logic               active_valid
);

  logic [IDW:0]       pkt    [NS];
  logic [CRC_W-1:0]   rx_crc [NS];
  logic               pkt_valid;
  logic [IDW-1:0]     slot   [NS];
  logic [NS-1:0]      slot_ok;

  crc_remover #(.NS(NS), .IDW(IDW)) u_remover (
    .clk, .rst_n, .capture, .msg, .pkt, .rx_crc, .pkt_valid
  );

  for (genvar i = 0; i < NS; i++) begin : g_link
    crc_checker #(.IDW(IDW)) u_checker (
      .pkt(pkt[i]), .rx_crc(rx_crc[i]), .calc_crc(calc_crc[i]), .pkt_out(pkt_chk[i])
    );
    status_checker #(.IDW(IDW)) u_status (
      .pkt(pkt_chk[i]), .slot(slot[i]), .slot_ok(slot_ok[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_valid <= 1'b0;
      active_ok    <= '0;
      for (int i = 0; i < int'(NS); i++) active[i] <= '0;
    end else begin
      active_valid <= pkt_valid;
      if (pkt_valid) begin
        active_ok <= slot_ok;
        for (int i = 0; i < int'(NS); i++) active[i] <= slot[i];
      end
    end
  end

endmodule
