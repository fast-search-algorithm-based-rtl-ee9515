// second_subsystem: identification of the error-free tags of a read cycle.
//
// fast_search orders the NS active slots, smallest ID first, in one clock;
// read_kill then sends them out serially, one per system clock, and kills
// each identified tag in the same clock.
//
// Interface: active_valid (one clock) presents a read cycle's slots.
// dataout holds them sorted one clock later (dataout_valid pulses), and the
// first tag appears on tag_out one clock after that, the others on the
// following NS-1 clocks. Read cycles must be at least NS clocks apart.
module second_subsystem
  import anticol_pkg::*;
#(
  parameter int unsigned NS  = N_SLOTS,
  parameter int unsigned IDW = ID_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [IDW-1:0] active  [NS],
  input  logic [NS-1:0]  active_ok,
  input  logic           active_valid,
  output logic [IDW-1:0] dataout [NS],
  output logic [NS-1:0]  dataout_ok,
  output logic           dataout_valid,
  output logic           busy,
  output logic [IDW-1:0] tag_out,
  output logic           tag_out_valid,
  output logic [IDW:0]   tag_kill
);

  fast_search #(.NS(NS), .IDW(IDW)) u_fast_search (
    .clk, .rst_n,
    .in_id(active), .in_ok(active_ok), .in_valid(active_valid),
    .dataout, .dataout_ok, .out_valid(dataout_valid)
  );

  read_kill #(.NS(NS), .IDW(IDW)) u_read_kill (
    .clk, .rst_n,
    .load(dataout_valid), .in_id(dataout), .in_ok(dataout_ok),
    .busy, .tag_out, .tag_out_valid, .tag_kill
  );

endmodule
