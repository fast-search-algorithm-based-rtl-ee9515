// tag_clock_gen_tb: checks that the tag clock tick is one system clock wide,
// first rises TAG_DIV-1 clocks after reset and then repeats every TAG_DIV
// clocks, for the default divider of four.
module tag_clock_gen_tb;
  localparam int DIV = 4;   // the default divider of tag_clock_gen
  logic clk = 1'b0, rst_n = 1'b0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, nticks = 0;

  tag_clock_gen dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      cyc++;
      if (tick) begin
        nticks++;
        checks++;
        if (last < 0) begin
          if (cyc != DIV - 1) begin failures++; $display("first tick at %0d", cyc); end
        end else if (cyc - last != DIV) begin
          failures++; $display("tick spacing %0d", cyc - last);
        end
        last = cyc;
      end
    end
    checks++;
    if (nticks != 200 / DIV) begin failures++; $display("ticks %0d", nticks); end
    // reset in the middle restarts the count
    @(negedge clk) rst_n = 1'b0;
    @(posedge clk); #1;
    checks++; if (tick) failures++;
    @(negedge clk) rst_n = 1'b1;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!tick && cyc < 10);
    checks++; if (cyc != DIV - 1) begin failures++; $display("tick after reset at %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
