// crc_checker_tb: checks the recalculated CRC against the example values of
// the design (00C8 -> 5844, 0005 -> 50A5, 0010 -> 1231, EA60 -> 93DF and the
// second read cycle's 00D0 -> CB7D, 0006 -> 60C6, EA6C -> 5253), against a
// long-division reference for random packets, and that any single flipped
// bit of a message sets the status bit while an intact one clears it.
module crc_checker_tb;
  import anticol_tb_pkg::*;
  logic [16:0] pkt, pkt_out;
  logic [15:0] rx_crc, calc_crc;
  int checks = 0, failures = 0;

  crc_checker dut (.pkt, .rx_crc, .calc_crc, .pkt_out);

  task automatic apply(input logic [32:0] m, input logic exp_err, input logic [15:0] exp_crc);
    pkt = m[32:16]; rx_crc = m[15:0];
    #1;
    checks++;
    if (calc_crc !== exp_crc || pkt_out !== {exp_err, m[31:16]}) begin
      failures++;
      $display("msg %h: calc %h exp %h, pkt_out %h exp err %b", m, calc_crc, exp_crc, pkt_out, exp_err);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [15:0] ex_id  [7] = '{16'h00C8, 16'h0005, 16'h0010, 16'hEA60, 16'h00D0, 16'h0006, 16'hEA6C};
    automatic logic [15:0] ex_crc [7] = '{16'h5844, 16'h50A5, 16'h1231, 16'h93DF, 16'hCB7D, 16'h60C6, 16'h5253};
    logic [32:0] m;
    for (int i = 0; i < 7; i++) apply({1'b0, ex_id[i], ex_crc[i]}, 1'b0, ex_crc[i]);
    for (int n = 0; n < 500; n++) begin
      m = make_msg(16'($urandom));
      apply(m, 1'b0, ref_crc(m[32:16]));
      m = m ^ (33'd1 << ($urandom % 33));
      apply(m, 1'b1, ref_crc(m[32:16]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
