// crc_remover: input register of the first subsystem.
//
// At each capture (a tag clock tick with a read cycle's messages present) it
// loads the received messages of all N_SLOTS links and separates each into the
// received packet {status bit, ID} and the received CRC, which the CRC checker
// then compares. The split (CRC in the low CRC_W bits, status bit on top)
// follows the example messages of the design; registering the messages here,
// so that the rest of the first subsystem sees stable data for a whole read
// cycle, is this design's choice.
//
// Interface: msg[i] is {status, ID, CRC} of link i. pkt_valid pulses for one
// clock in the cycle after capture, when pkt/rx_crc hold the new read cycle.
module crc_remover
  import anticol_pkg::*;
#(
  parameter int unsigned NS  = N_SLOTS,
  parameter int unsigned IDW = ID_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 capture,
  input  logic [IDW+CRC_W:0]   msg    [NS],
  output logic [IDW:0]         pkt    [NS],
  output logic [CRC_W-1:0]     rx_crc [NS],
  output logic                 pkt_valid
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt_valid <= 1'b0;
      for (int i = 0; i < int'(NS); i++) begin
        pkt[i]    <= '0;
        rx_crc[i] <= '0;
      end
    end else begin
      pkt_valid <= capture;
      if (capture) begin
        for (int i = 0; i < int'(NS); i++) begin
          pkt[i]    <= msg[i][IDW+CRC_W -: IDW+1];
          rx_crc[i] <= msg[i][CRC_W-1:0];
        end
      end
    end
  end

endmodule
