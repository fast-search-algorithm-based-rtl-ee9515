// status_checker_tb: a packet with status 0 must give its ID and slot_ok, a
// packet with status 1 a zero slot and slot_ok low.
module status_checker_tb;
  logic [16:0] pkt;
  logic [15:0] slot;
  logic        slot_ok;
  int checks = 0, failures = 0;

  status_checker dut (.pkt, .slot, .slot_ok);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      pkt = 17'($urandom);
      if (n == 0) pkt = 17'h000C8;
      if (n == 1) pkt = 17'h1EA60;
      #1;
      checks++;
      if (pkt[16] ? (slot !== 16'h0 || slot_ok !== 1'b0)
                  : (slot !== pkt[15:0] || slot_ok !== 1'b1)) begin
        failures++;
        $display("pkt %h -> slot %h ok %b", pkt, slot, slot_ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
