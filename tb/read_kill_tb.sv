// read_kill_tb: loads of four sorted IDs, either back to back every four
// clocks or with idle gaps. Each tag must appear on tag_out on consecutive
// clocks starting at the edge that ends the load cycle, in slot order, with
// tag_kill = {valid, ID}; tag_out_valid and busy must follow the sequence.
module read_kill_tb;
  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [15:0] in_id [4];
  logic [3:0]  in_ok;
  logic        busy, tag_out_valid;
  logic [15:0] tag_out;
  logic [16:0] tag_kill;
  int checks = 0, failures = 0;

  // expected output stream, filled at each load
  logic [15:0] q_id [$];
  logic        q_ok [$];

  read_kill dut (.clk, .rst_n, .load, .in_id, .in_ok, .busy, .tag_out, .tag_out_valid, .tag_kill);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker: samples just after each rising edge
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (q_id.size() > 0) begin
        if (!tag_out_valid || tag_out !== q_id[0] || tag_kill !== {q_ok[0], q_id[0]}) begin
          failures++;
          $display("%0t: tag_out %h v%b kill %h, exp %h ok %b", $time, tag_out, tag_out_valid, tag_kill, q_id[0], q_ok[0]);
        end
        void'(q_id.pop_front()); void'(q_ok.pop_front());
        checks++;
        if (busy !== (q_id.size() > 0)) begin failures++; $display("%0t: busy %b", $time, busy); end
      end else if (tag_out_valid || busy) begin
        failures++; $display("%0t: output while idle", $time);
      end
    end
  end

  initial begin
    for (int i = 0; i < 4; i++) in_id[i] = '0;
    in_ok = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      load = 1'b1;
      for (int i = 0; i < 4; i++) in_id[i] = 16'($urandom);
      in_ok = 4'($urandom);
      if (n == 0) begin
        in_id = '{16'h0005, 16'h0010, 16'h00C8, 16'hEA60}; in_ok = 4'b1111;
      end
      @(posedge clk);
      for (int i = 0; i < 4; i++) begin q_id.push_back(in_id[i]); q_ok.push_back(in_ok[i]); end
      @(negedge clk);
      load = 1'b0;
      repeat (2 + (($urandom % 2) != 0 ? int'($urandom % 4) : 0)) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
