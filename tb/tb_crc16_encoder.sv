// tb_crc16_encoder: self-checking test of crc16_encoder (16-bit message).
//
// The reference is polynomial long division of d(x)*x^16 by 0x11021 on a
// 32-bit integer, a different formulation from the block's shift register.
// It checks the worked example of the design (message 0x5AEA gives checksum
// 0xBD10), walking ones and random messages, and that the frame is the
// message followed by the checksum.
module tb_crc16_encoder;

  logic [15:0] dtr, ctr;
  logic [31:0] ftr;
  int checks = 0, failures = 0;

  crc16_encoder dut (.dtr(dtr), .ctr(ctr), .ftr(ftr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_crc(input logic [15:0] d);
    logic [31:0] r;
    r = {d, 16'h0};
    for (int i = 31; i >= 16; i--) if (r[i]) r ^= 32'h11021 << (i - 16);
    return r[15:0];
  endfunction

  task automatic apply(input logic [15:0] d);
    dtr = d; #1;
    checks++;
    if (ctr !== ref_crc(d)) begin
      failures++;
      $display("FAIL d=%h ctr=%h exp=%h", d, ctr, ref_crc(d));
    end
    checks++;
    if (ftr !== {d, ref_crc(d)}) begin
      failures++;
      $display("FAIL d=%h ftr=%h", d, ftr);
    end
  endtask

  initial begin
    dtr = 16'h5AEA; #1;
    checks++;
    if (ctr !== 16'hBD10) begin
      failures++;
      $display("FAIL example: ctr=%h, expected bd10", ctr);
    end
    apply('0);
    for (int i = 0; i < 16; i++) apply(16'(1) << i);
    for (int i = 0; i < 500; i++) apply(16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
