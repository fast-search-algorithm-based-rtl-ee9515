// status_checker: last stage of the first subsystem for one link.
//
// It checks the status bit the CRC checker appended. On an error the slot of
// the packet is reset to zero; otherwise the slot is filled with the tag ID.
// The status bit is removed; slot_ok keeps it (inverted) beside the slot so
// that later stages can tell an empty slot from a tag whose ID is zero, which
// is this design's addition.
//
// Interface: purely combinational. pkt = {status, ID}.
module status_checker
  import anticol_pkg::*;
#(
  parameter int unsigned IDW = ID_W
) (
  input  logic [IDW:0]   pkt,
  output logic [IDW-1:0] slot,
  output logic           slot_ok
);

  always_comb begin
    slot_ok = ~pkt[IDW];
    slot    = slot_ok ? pkt[IDW-1:0] : '0;
  end

endmodule
