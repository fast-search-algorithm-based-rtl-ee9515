// crc_remover_tb: random messages on four links; after each capture the
// packet and CRC halves must appear one clock later with pkt_valid, and stay
// unchanged while capture is low.
module crc_remover_tb;
  logic        clk = 1'b0, rst_n = 1'b0, capture = 1'b0;
  logic [32:0] msg    [4];
  logic [16:0] pkt    [4];
  logic [15:0] rx_crc [4];
  logic        pkt_valid;
  logic [32:0] held   [4];
  int checks = 0, failures = 0;

  crc_remover dut (.clk, .rst_n, .capture, .msg, .pkt, .rx_crc, .pkt_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input logic exp_valid);
    checks++;
    if (pkt_valid !== exp_valid) begin failures++; $display("pkt_valid %b exp %b", pkt_valid, exp_valid); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (pkt[i] !== held[i][32:16] || rx_crc[i] !== held[i][15:0]) begin
        failures++;
        $display("link %0d: pkt %h crc %h, exp %h", i, pkt[i], rx_crc[i], held[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin msg[i] = '0; held[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) check_out(1'b0);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      capture = ($urandom % 3) != 0;
      for (int i = 0; i < 4; i++) msg[i] = {1'($urandom), 32'($urandom)};
      if (n == 0) begin
        capture = 1'b1;
        msg[0] = 33'h000C85844; msg[1] = 33'h0000550A5; msg[2] = 33'h000101231; msg[3] = 33'h0EA6093DF;
      end
      @(posedge clk);
      if (capture) for (int i = 0; i < 4; i++) held[i] = msg[i];
      #1 check_out(capture);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
