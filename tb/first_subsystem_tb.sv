// first_subsystem_tb: read cycles of four messages, the first two being the
// design's example read cycles, then random ones with some corrupted
// messages. Two clocks after capture, active_valid must pulse and active must
// hold each error-free ID, with zero and active_ok low for corrupted ones;
// the recalculated CRCs are checked too.
module first_subsystem_tb;
  import anticol_tb_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, capture = 1'b0;
  logic [32:0] msg      [4];
  logic [15:0] calc_crc [4];
  logic [16:0] pkt_chk  [4];
  logic [15:0] active   [4];
  logic [3:0]  active_ok;
  logic        active_valid;
  int checks = 0, failures = 0, nerr = 0;

  first_subsystem dut (.clk, .rst_n, .capture, .msg, .calc_crc, .pkt_chk, .active, .active_ok, .active_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] m [4];
    logic        bad [4];
    for (int i = 0; i < 4; i++) msg[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 4; i++) begin
        m[i] = make_msg(16'($urandom));
        bad[i] = ($urandom % 4) == 0;
        if (bad[i]) m[i] = m[i] ^ (33'd1 << ($urandom % 33));
      end
      if (n == 0) begin
        m[0] = 33'h000C85844; m[1] = 33'h0000550A5; m[2] = 33'h000101231; m[3] = 33'h0EA6093DF;
        for (int i = 0; i < 4; i++) bad[i] = 1'b0;
      end
      if (n == 1) begin
        m[0] = 33'h000D0CB7D; m[1] = 33'h0000660C6; m[2] = make_msg(16'h0014); m[3] = 33'h0EA6C5253;
        for (int i = 0; i < 4; i++) bad[i] = 1'b0;
      end
      @(negedge clk);
      capture = 1'b1;
      for (int i = 0; i < 4; i++) msg[i] = m[i];
      @(negedge clk);
      capture = 1'b0;
      for (int i = 0; i < 4; i++) msg[i] = {1'($urandom), 32'($urandom)};
      checks++; if (active_valid) begin failures++; $display("active_valid early"); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (calc_crc[i] !== ref_crc(m[i][32:16]) || pkt_chk[i] !== {bad[i], m[i][31:16]}) begin
          failures++; $display("cycle %0d link %0d: calc %h pkt_chk %h", n, i, calc_crc[i], pkt_chk[i]);
        end
      end
      @(negedge clk);
      checks++; if (!active_valid) begin failures++; $display("active_valid missing"); end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (bad[i]) nerr++;
        if (active[i] !== (bad[i] ? 16'h0 : m[i][31:16]) || active_ok[i] !== !bad[i]) begin
          failures++; $display("cycle %0d link %0d: active %h ok %b", n, i, active[i], active_ok[i]);
        end
      end
      @(negedge clk);
      checks++; if (active_valid) begin failures++; $display("active_valid too long"); end
    end
    checks++; if (nerr == 0) begin failures++; $display("no corrupted message tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
