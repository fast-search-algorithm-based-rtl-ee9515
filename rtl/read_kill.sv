// read_kill: serial output and kill of the identified tags.
//
// It takes the NS sorted IDs of a read cycle at once and sends them out one
// per system clock, smallest first. In the same clock the tag is killed:
// tag_kill = {kill command bit, ID}, with the command bit set when the slot
// held a tag whose CRC checked (a slot emptied by a CRC error is sent as ID
// zero with the bit clear, so no tag is killed for it). The serial order and
// the one-tag-per-clock rate follow the design's description; the kill word
// layout matches its waveform (10005 for tag 0005); the valid flags are this
// design's.
//
// Interface: load (one clock) captures in_id/in_ok; tag_out/tag_kill take the
// NS tags on the clock edge that ends the load cycle and the NS-1 edges after
// it, tag_out_valid high while they are shown. busy is high while tags are
// still waiting, so a new read cycle may be loaded NS clocks after the
// previous one, giving an unbroken stream. A load while busy would drop the
// waiting tags; the read cycle spacing upstream prevents it and an assertion
// checks it.
module read_kill
  import anticol_pkg::*;
#(
  parameter int unsigned NS  = N_SLOTS,
  parameter int unsigned IDW = ID_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [IDW-1:0] in_id [NS],
  input  logic [NS-1:0]  in_ok,
  output logic           busy,
  output logic [IDW-1:0] tag_out,
  output logic           tag_out_valid,
  output logic [IDW:0]   tag_kill
);

  localparam int unsigned CW = $clog2(NS + 1);

  logic [IDW-1:0] buf_id [NS];
  logic [NS-1:0]  buf_ok;
  logic [CW-1:0]  left;        // tags still to send

  assign busy = (left != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left          <= '0;
      buf_ok        <= '0;
      tag_out       <= '0;
      tag_out_valid <= 1'b0;
      tag_kill      <= '0;
      for (int k = 0; k < int'(NS); k++) buf_id[k] <= '0;
    end else if (load) begin
      // The first (smallest) tag goes out at once; the rest wait in buf_id.
      tag_out       <= in_id[0];
      tag_kill      <= {in_ok[0], in_id[0]};
      tag_out_valid <= 1'b1;
      for (int k = 0; k < int'(NS) - 1; k++) buf_id[k] <= in_id[k+1];
      buf_id[NS-1]  <= '0;
      buf_ok        <= in_ok >> 1;
      left          <= CW'(NS - 1);
    end else if (busy) begin
      // buf_id[0] is always the next tag: shift the buffer down by one.
      tag_out       <= buf_id[0];
      tag_kill      <= {buf_ok[0], buf_id[0]};
      tag_out_valid <= 1'b1;
      for (int k = 0; k < int'(NS) - 1; k++) buf_id[k] <= buf_id[k+1];
      buf_id[NS-1]  <= '0;
      buf_ok        <= buf_ok >> 1;
      left          <= left - 1'b1;
    end else begin
      tag_out_valid <= 1'b0;
    end
  end

  property p_no_load_while_busy;
    @(posedge clk) disable iff (!rst_n) load |-> !busy;
  endproperty
  a_no_load_while_busy: assert property (p_no_load_while_busy)
    else $error("read_kill: new read cycle loaded before the previous one was sent");

endmodule
