// fast_search_tb: the design's example (00C8, 0005, 0010, EA60 gives 0005,
// 0010, 00C8, EA60), all 24 orderings of four distinct IDs, IDs with ties and
// random IDs. One clock after in_valid, dataout must hold the IDs in
// ascending order (lower slot first on ties), dataout_ok must follow its
// IDs, and out_valid must pulse for that one clock.
module fast_search_tb;
  import anticol_tb_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [15:0] in_id   [4];
  logic [3:0]  in_ok;
  logic [15:0] dataout [4];
  logic [3:0]  dataout_ok;
  logic        out_valid;
  int checks = 0, failures = 0;

  fast_search dut (.clk, .rst_n, .in_id, .in_ok, .in_valid, .dataout, .dataout_ok, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input id4_t ids, input logic [3:0] ok);
    ord4_t o;
    o = ref_order(ids);
    @(negedge clk);
    in_valid = 1'b1; in_ok = ok;
    for (int i = 0; i < 4; i++) in_id[i] = ids[i];
    @(negedge clk);
    in_valid = 1'b0;
    for (int i = 0; i < 4; i++) in_id[i] = 16'($urandom);
    in_ok = 4'($urandom);
    checks++; if (!out_valid) begin failures++; $display("out_valid missing"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (dataout[k] !== ids[o[k]] || dataout_ok[k] !== ok[o[k]]) begin
        failures++;
        $display("in %h %h %h %h: rank %0d got %h/%b exp %h/%b", ids[0], ids[1], ids[2], ids[3],
                 k, dataout[k], dataout_ok[k], ids[o[k]], ok[o[k]]);
      end
    end
    @(negedge clk);
    checks++; if (out_valid) begin failures++; $display("out_valid too long"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (dataout[k] !== ids[o[k]]) begin failures++; $display("dataout not held"); end
    end
  endtask

  initial begin
    id4_t ids;
    automatic logic [15:0] v [4] = '{16'h0005, 16'h0010, 16'h00C8, 16'hEA60};
    for (int i = 0; i < 4; i++) in_id[i] = '0;
    in_ok = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run('{16'h00C8, 16'h0005, 16'h0010, 16'hEA60}, 4'b1111);
    // all permutations of four distinct values
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++)
            if (a != b && a != c && a != d && b != c && b != d && c != d)
              run('{v[a], v[b], v[c], v[d]}, 4'($urandom));
    // ties and emptied (zero) slots
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 4; i++) ids[i] = 16'($urandom % 4);
      run(ids, 4'($urandom));
    end
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) ids[i] = 16'($urandom);
      run(ids, 4'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
