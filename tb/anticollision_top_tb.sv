// anticollision_top_tb: end-to-end test of the anti-collision system at its
// default size (four links, 16-bit IDs, tag clock of four system clocks).
//
// The four links present a read cycle's messages, which are taken when
// msg_ready (the tag clock tick) is high. The first two read cycles are the
// design's worked example (tags 00C8, 0005, 0010, EA60, then 00D0, 0006,
// 0014, EA6C); random read cycles follow, with corrupted messages, equal IDs
// and tag clock ticks with no messages. Every read cycle is checked at each
// stage against the reference models: the active slots two clocks after
// msg_ready, the sorted IDs one clock later, and the serial tags with their
// kill words on the four clocks after that, one per clock, smallest first.
// Each mechanism of the design is counted and must occur: CRC error (slot
// emptied), reordering by the fast search, equal IDs, idle read cycle,
// back-to-back read cycles and a tag killed.
module anticollision_top_tb;
  import anticol_tb_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, msg_valid = 1'b0, msg_ready;
  logic [32:0] msg      [4];
  logic [15:0] calc_crc [4];
  logic [16:0] pkt_chk  [4];
  logic [15:0] active   [4];
  logic [3:0]  active_ok, dataout_ok;
  logic        active_valid, dataout_valid, tag_busy, tag_out_valid;
  logic [15:0] dataout  [4];
  logic [15:0] tag_out;
  logic [16:0] tag_kill;

  anticollision_top dut (
    .clk, .rst_n, .msg, .msg_valid, .msg_ready, .calc_crc, .pkt_chk, .active, .active_ok,
    .active_valid, .dataout, .dataout_ok, .dataout_valid, .tag_busy, .tag_out, .tag_out_valid,
    .tag_kill
  );

  typedef struct {
    int          edge_n;     // clock edge at which the messages are sampled
    logic [32:0] m [4];      // the messages as received
    logic [15:0] slot [4];   // expected active slots
    logic [3:0]  ok;
    logic [15:0] sorted [4];
    logic [3:0]  sorted_ok;
  } cyc_t;

  cyc_t exp_active [$], exp_sorted [$];
  int   tag_edge [$];
  logic [16:0] tag_word [$];

  int checks = 0, failures = 0, cyc = 0;
  int n_crc_err = 0, n_reorder = 0, n_tie = 0, n_idle = 0, n_b2b = 0, n_kill = 0, n_example = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- checker
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #1;
    if (rst_n) begin
      if (active_valid) begin
        checks++;
        if (exp_active.size() == 0 || exp_active[0].edge_n + 1 != cyc) begin
          failures++; $display("edge %0d: unexpected active_valid", cyc);
        end else begin
          // the received packets stay registered until the next read cycle
          for (int i = 0; i < 4; i++)
            if (calc_crc[i] !== ref_crc(exp_active[0].m[i][32:16]) ||
                pkt_chk[i] !== {!exp_active[0].ok[i], exp_active[0].m[i][31:16]}) begin
              failures++; $display("edge %0d: calc_crc[%0d] %h pkt_chk %h", cyc, i, calc_crc[i], pkt_chk[i]);
            end
          for (int i = 0; i < 4; i++)
            if (active[i] !== exp_active[0].slot[i] || active_ok[i] !== exp_active[0].ok[i]) begin
              failures++; $display("edge %0d: active[%0d] %h exp %h", cyc, i, active[i], exp_active[0].slot[i]);
            end
          exp_sorted.push_back(exp_active.pop_front());
        end
      end
      if (dataout_valid) begin
        checks++;
        if (exp_sorted.size() == 0 || exp_sorted[0].edge_n + 2 != cyc) begin
          failures++; $display("edge %0d: unexpected dataout_valid", cyc);
        end else begin
          for (int k = 0; k < 4; k++)
            if (dataout[k] !== exp_sorted[0].sorted[k] || dataout_ok[k] !== exp_sorted[0].sorted_ok[k]) begin
              failures++; $display("edge %0d: dataout[%0d] %h exp %h", cyc, k, dataout[k], exp_sorted[0].sorted[k]);
            end
          void'(exp_sorted.pop_front());
        end
      end
      checks++;
      if (tag_edge.size() > 0 && tag_edge[0] == cyc) begin
        if (!tag_out_valid || tag_out !== tag_word[0][15:0] || tag_kill !== tag_word[0]) begin
          failures++; $display("edge %0d: tag %h kill %h, exp %h", cyc, tag_out, tag_kill, tag_word[0]);
        end
        if (tag_kill[16]) n_kill++;
        void'(tag_edge.pop_front()); void'(tag_word.pop_front());
      end else if (tag_out_valid) begin
        failures++; $display("edge %0d: unexpected tag %h", cyc, tag_out);
      end
    end
  end

  // ----------------------------------------------------------------- driver
  initial begin
    logic [15:0] ids [4];
    logic        bad [4];
    id4_t        key;
    ord4_t       o;
    cyc_t        e;
    automatic int   rc = 0;
    automatic logic prev_taken = 1'b0;
    for (int i = 0; i < 4; i++) msg[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // messages are held from one negedge to the next; msg_ready is stable there
    while (rc < 400) begin
      @(negedge clk);
      if (!msg_ready) begin
        // between ticks: present garbage that must not be taken
        msg_valid = 1'($urandom);
        for (int i = 0; i < 4; i++) msg[i] = {1'($urandom), 32'($urandom)};
        continue;
      end
      msg_valid = (rc < 2) || (($urandom % 8) != 0);
      if (!msg_valid) begin
        n_idle++;
        prev_taken = 1'b0;
        for (int i = 0; i < 4; i++) msg[i] = {1'($urandom), 32'($urandom)};
        rc++;
        continue;
      end
      for (int i = 0; i < 4; i++) begin
        ids[i] = (rc % 4 == 3) ? 16'($urandom % 4) : 16'($urandom);
        bad[i] = ($urandom % 6) == 0;
      end
      if (rc == 0) begin ids = '{16'h00C8, 16'h0005, 16'h0010, 16'hEA60}; bad = '{0, 0, 0, 0}; end
      if (rc == 1) begin ids = '{16'h00D0, 16'h0006, 16'h0014, 16'hEA6C}; bad = '{0, 0, 0, 0}; end
      for (int i = 0; i < 4; i++) begin
        msg[i] = make_msg(ids[i]);
        if (bad[i]) msg[i] = msg[i] ^ (33'd1 << ($urandom % 33));
        e.m[i]    = msg[i];
        e.slot[i] = bad[i] ? 16'h0 : ids[i];
        e.ok[i]   = !bad[i];
        key[i]    = e.slot[i];
        if (bad[i]) n_crc_err++;
      end
      if (rc < 2) n_example++;
      if (rc == 0) begin
        // CRCs of the worked example
        checks++;
        if (msg[0][15:0] != 16'h5844 || msg[1][15:0] != 16'h50A5 ||
            msg[2][15:0] != 16'h1231 || msg[3][15:0] != 16'h93DF) begin
          failures++; $display("reference CRC model disagrees with the worked example");
        end
      end
      o = ref_order(key);
      for (int k = 0; k < 4; k++) begin
        e.sorted[k]    = key[o[k]];
        e.sorted_ok[k] = e.ok[o[k]];
      end
      if (o[0] != 0 || o[1] != 1 || o[2] != 2 || o[3] != 3) n_reorder++;
      for (int i = 0; i < 4; i++)
        for (int j = i + 1; j < 4; j++)
          if (key[i] == key[j]) n_tie++;
      if (prev_taken) n_b2b++;
      prev_taken = 1'b1;
      e.edge_n = cyc + 1;
      exp_active.push_back(e);
      for (int k = 0; k < 4; k++) begin
        tag_edge.push_back(e.edge_n + 3 + k);
        tag_word.push_back({e.sorted_ok[k], e.sorted[k]});
      end
      rc++;
    end
    @(negedge clk) msg_valid = 1'b0;
    repeat (12) @(negedge clk);
    checks++;
    if (tag_edge.size() != 0 || exp_active.size() != 0 || exp_sorted.size() != 0) begin
      failures++; $display("read cycles left unfinished");
    end
    $display("mechanisms: example=%0d crc_error=%0d reorder=%0d tie=%0d idle=%0d back_to_back=%0d kill=%0d",
             n_example, n_crc_err, n_reorder, n_tie, n_idle, n_b2b, n_kill);
    checks++; if (n_example != 2) failures++;
    checks++; if (n_crc_err == 0) failures++;
    checks++; if (n_reorder == 0) failures++;
    checks++; if (n_tie == 0) failures++;
    checks++; if (n_idle == 0) failures++;
    checks++; if (n_b2b == 0) failures++;
    checks++; if (n_kill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
