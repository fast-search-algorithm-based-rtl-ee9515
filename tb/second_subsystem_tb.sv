// second_subsystem_tb: read cycles of four active slots every four clocks
// (the design's example first, then random ones with empty slots and ties).
// dataout must hold the sorted slots one clock after active_valid, and
// tag_out must then give them one per clock, smallest first, with the kill
// word {valid, ID}, the first one two clocks after active_valid.
module second_subsystem_tb;
  import anticol_tb_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, active_valid = 1'b0;
  logic [15:0] active  [4];
  logic [3:0]  active_ok;
  logic [15:0] dataout [4];
  logic [3:0]  dataout_ok;
  logic        dataout_valid, busy, tag_out_valid;
  logic [15:0] tag_out;
  logic [16:0] tag_kill;
  int checks = 0, failures = 0;

  logic [15:0] q_id [$];
  logic        q_ok [$];
  logic [15:0] exp_sorted [4];

  second_subsystem dut (.clk, .rst_n, .active, .active_ok, .active_valid, .dataout, .dataout_ok,
                        .dataout_valid, .busy, .tag_out, .tag_out_valid, .tag_kill);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      if (dataout_valid) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (dataout[k] !== exp_sorted[k]) begin failures++; $display("%0t dataout[%0d] %h exp %h", $time, k, dataout[k], exp_sorted[k]); end
        end
      end
      checks++;
      if (q_id.size() > 0) begin
        if (!tag_out_valid || tag_kill !== {q_ok[0], q_id[0]} || tag_out !== q_id[0]) begin
          failures++; $display("%0t tag %h kill %h, exp %h", $time, tag_out, tag_kill, q_id[0]);
        end
        void'(q_id.pop_front()); void'(q_ok.pop_front());
      end else if (tag_out_valid) begin
        failures++; $display("%0t unexpected tag", $time);
      end
    end
  end

  initial begin
    id4_t  ids;
    ord4_t o;
    logic [3:0] ok;
    for (int i = 0; i < 4; i++) active[i] = '0;
    active_ok = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      ok = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        ids[i] = (n % 3 == 2) ? 16'($urandom % 3) : 16'($urandom);
        if (!ok[i]) ids[i] = '0;
      end
      if (n == 0) begin ids = '{16'h00C8, 16'h0005, 16'h0010, 16'hEA60}; ok = 4'hF; end
      if (n == 1) begin ids = '{16'h00D0, 16'h0006, 16'h0014, 16'hEA6C}; ok = 4'hF; end
      o = ref_order(ids);
      @(negedge clk);
      active_valid = 1'b1; active_ok = ok;
      for (int i = 0; i < 4; i++) active[i] = ids[i];
      @(posedge clk);
      for (int k = 0; k < 4; k++) exp_sorted[k] = ids[o[k]];
      @(negedge clk);
      active_valid = 1'b0;
      for (int i = 0; i < 4; i++) active[i] = 16'($urandom);
      @(posedge clk);
      for (int k = 0; k < 4; k++) begin q_id.push_back(ids[o[k]]); q_ok.push_back(ok[o[k]]); end
      repeat ((n % 5 == 4) ? 4 : 2) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks++; if (q_id.size() != 0) begin failures++; $display("tags never sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
