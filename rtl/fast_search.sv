// fast_search: identifies the NS tag IDs of a read cycle at once, smallest
// first.
//
// The identification is a binary tree with NS leaves resolved in a single
// clock. Each pair of slots (i, j), i < j, is compared by a full-width
// comparator, giving NS*(NS-1)/2 decision bits (six for four slots). The
// decision bits address the fast-search lookup table, whose entry lists the
// slot numbers in ascending order of ID. Word-wide multiplexers then pick
// whole IDs out of the slots, so the ID length does not change the number of
// steps. Equal IDs keep slot order (the lower slot comes first). An emptied
// slot (ID zero) sorts like any other ID of value zero; its valid flag travels
// with it.
//
// The document gives the function (ascending order, lookup table, word-wide
// multiplexing, one read cycle); the comparator/decision-bit addressing of
// the table and its contents are this design's. The table is computed at
// elaboration: entry[code] holds, for rank k, the slot i whose count of slots
// placed before it equals k; codes that no set of IDs can produce hold
// don't-care orders.
//
// Interface: in_valid loads in_id/in_ok; one clock later dataout/dataout_ok
// hold the sorted read cycle and out_valid pulses for one clock.
module fast_search
  import anticol_pkg::*;
#(
  parameter int unsigned NS  = N_SLOTS,
  parameter int unsigned IDW = ID_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [IDW-1:0] in_id   [NS],
  input  logic [NS-1:0]  in_ok,
  input  logic           in_valid,
  output logic [IDW-1:0] dataout [NS],
  output logic [NS-1:0]  dataout_ok,
  output logic           out_valid
);

  localparam int unsigned SW    = (NS > 1) ? $clog2(NS) : 1;   // slot number width
  localparam int unsigned NCMP  = NS * (NS - 1) / 2;          // pairwise decisions
  localparam int unsigned NCODE = 1 << NCMP;                  // table entries
  localparam int unsigned EW    = NS * SW;                    // table entry width

  // Index of the decision bit of pair (i, j), i < j.
  function automatic int unsigned pair_idx(input int unsigned i, input int unsigned j);
    int unsigned p;
    p = 0;
    for (int unsigned a = 0; a < NS; a++)
      for (int unsigned b = a + 1; b < NS; b++) begin
        if (a == i && b == j) return p;
        p++;
      end
    return 0;
  endfunction

  // Decision bit of pair (i, j) set means slot j goes before slot i.
  function automatic logic [NCODE*EW-1:0] build_table();
    logic [NCODE*EW-1:0] t;
    int unsigned         rank;
    t = '0;
    for (int unsigned code = 0; code < NCODE; code++) begin
      for (int unsigned i = 0; i < NS; i++) begin
        rank = 0;
        for (int unsigned j = 0; j < NS; j++) begin
          if (j < i && !code[pair_idx(j, i)]) rank++;   // j before i
          if (j > i &&  code[pair_idx(i, j)]) rank++;   // j before i
        end
        if (rank < NS) t[code*EW + rank*SW +: SW] = SW'(i);
      end
    end
    return t;
  endfunction

  localparam logic [NCODE*EW-1:0] ORDER_TABLE = build_table();

  logic [NCMP-1:0] code;
  logic [EW-1:0]   order;

  always_comb begin
    code = '0;
    for (int unsigned i = 0; i < NS; i++)
      for (int unsigned j = i + 1; j < NS; j++)
        code[pair_idx(i, j)] = (in_id[i] > in_id[j]);
    order = ORDER_TABLE[code*EW +: EW];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      dataout_ok <= '0;
      for (int k = 0; k < int'(NS); k++) dataout[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < int'(NS); k++) begin
          dataout[k]    <= in_id[order[k*SW +: SW]];
          dataout_ok[k] <= in_ok[order[k*SW +: SW]];
        end
      end
    end
  end

  initial assert (NS >= 2 && NS <= 6) else $error("fast_search supports 2 to 6 slots");

endmodule
