// tb_crc16_decoder: self-checking test of crc16_decoder (16-bit message,
// 32-bit frame).
//
// Frames are built with an independent long-division reference. Each frame
// is received clean, with every single-bit error, and with random double
// errors. A clean frame must show a zero syndrome; a single error must be
// located (message bit i -> position i, checksum bit j -> position 16+j) and
// the message restored; a double error must be detected, and since CRC-16
// syndromes of single errors are all distinct, a double error is never
// mistaken for a clean frame. The design's worked example is repeated:
// message 0x5AEA, error in message bit 1, syndrome 0x2042, recomputed
// checksum 0x9D52, position 1.
module tb_crc16_decoder;

  logic [31:0] fre;
  logic [15:0] dre, cre, ccal, a, data;
  logic [5:0]  c;
  logic        err, corrected, uncorrectable;
  int checks = 0, failures = 0;

  crc16_decoder dut (.fre(fre), .dre(dre), .cre(cre), .ccal(ccal), .a(a),
                     .c(c), .data(data), .err(err), .corrected(corrected),
                     .uncorrectable(uncorrectable));

  initial begin
    #1000000;
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

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s fre=%h a=%h c=%0d data=%h", what, fre, a, c, data);
    end
  endtask

  initial begin
    logic [15:0] d;
    logic [31:0] t;
    int x, y;
    // worked example
    fre = {16'h5AEA, 16'hBD10} ^ (32'h1 << 17); #1;
    check("example syndrome", a == 16'h2042);
    check("example ccal", ccal == 16'h9D52);
    check("example position", c == 6'd1 && corrected);
    check("example data", data == 16'h5AEA);
    for (int n = 0; n < 60; n++) begin
      d = (n == 0) ? '0 : 16'($urandom);
      t = {d, ref_crc(d)};
      fre = t; #1;
      check("clean", a == 0 && !err && data == d && dre == d && cre == t[15:0]);
      for (int i = 0; i < 32; i++) begin
        fre = t ^ (32'h1 << i); #1;
        check("single located", corrected && !uncorrectable &&
              c == ((i >= 16) ? 6'(i - 16) : 6'(16 + i)));
        check("single data", data == d);
      end
      x = $urandom_range(31, 0);
      y = (x + 1 + $urandom_range(30, 0)) % 32;
      fre = t ^ (32'h1 << x) ^ (32'h1 << y); #1;
      check("double detected", err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
