// tag_clock_gen: derives the tag clock (one read cycle) from the system clock.
//
// A read cycle lasts one tag clock period, and in it the read-kill stage sends
// the four identified tags out one per system clock. The tag clock is therefore
// produced here as a clock-enable tick, high for one system clock every TAG_DIV
// system clocks, rather than as a second clock: the whole design runs on the
// system clock. TAG_DIV = 4 (one system clock per slot) is this design's
// choice; it must be at least the number of slots so that a read cycle's
// serial output ends before the next one starts.
//
// Interface: clk, rst_n (synchronous, active low), tick out.
// Timing: the first tick comes TAG_DIV-1 clocks after reset is released, then
// every TAG_DIV clocks.
module tag_clock_gen #(
  parameter int unsigned TAG_DIV = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);

  localparam int unsigned CW = (TAG_DIV > 2) ? $clog2(TAG_DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(TAG_DIV - 2));
      if (cnt == CW'(TAG_DIV - 1)) cnt <= '0;
      else                         cnt <= cnt + 1'b1;
    end
  end

  initial assert (TAG_DIV >= 2) else $error("TAG_DIV must be at least 2");

endmodule
