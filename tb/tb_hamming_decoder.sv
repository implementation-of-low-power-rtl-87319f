// tb_hamming_decoder: self-checking test of hamming_decoder at its default
// width (24 data bits, 29-bit code word).
//
// Code words are built by an independent reference (position-XOR method).
// Each is sent clean, with every possible single-bit error, and with random
// double errors. Clean words must decode unchanged with a zero syndrome; a
// single error at code position p must give syndrome p and the original
// data; a double error must at least raise `err`. One case repeats the
// worked example of the design: a flip of code bit 2 (position 3) must be
// reported as syndrome 00011.
module tb_hamming_decoder;

  localparam int DW = 24;
  localparam int PW = 5;
  localparam int CW = DW + PW;

  logic [CW-1:0] enc, c;
  logic [PW-1:0] red1;
  logic [DW-1:0] out;
  logic          err, uncorrectable;
  int checks = 0, failures = 0;

  hamming_decoder dut (.enc(enc), .red1(red1), .c(c), .out(out), .err(err),
                       .uncorrectable(uncorrectable));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CW-1:0] ref_encode(input logic [DW-1:0] d);
    logic [CW-1:0] cw;
    int k, s;
    cw = '0; k = 0; s = 0;
    for (int p = 1; p <= CW; p++) begin
      if ((p & (p - 1)) != 0) begin
        cw[p-1] = d[k];
        if (d[k]) s ^= p;
        k++;
      end
    end
    for (int j = 0; j < PW; j++) cw[(1 << j) - 1] = s[j];
    return cw;
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s enc=%b red1=%b out=%h", what, enc, red1, out);
    end
  endtask

  initial begin
    logic [DW-1:0] d;
    logic [CW-1:0] cw;
    int a, b;
    for (int n = 0; n < 60; n++) begin
      d  = (n == 0) ? '0 : DW'($urandom);
      cw = ref_encode(d);
      enc = cw; #1;
      check("clean data", out == d);
      check("clean syndrome", red1 == '0 && !err && !uncorrectable);
      for (int p = 1; p <= CW; p++) begin
        enc = cw ^ (CW'(1) << (p - 1)); #1;
        check("single syndrome", red1 == PW'(p));
        check("single data", out == d);
        check("single corrected word", c == cw);
        check("single flags", err && !uncorrectable);
      end
      a = $urandom_range(CW - 1, 0);
      b = (a + 1 + $urandom_range(CW - 2, 0)) % CW;
      enc = cw ^ (CW'(1) << a) ^ (CW'(1) << b); #1;
      check("double detected", err);
    end
    // the design's example: bit 2 of the code word flipped
    d   = 24'h0A1B2C;
    cw  = ref_encode(d);
    enc = cw ^ 29'b100; #1;
    check("example syndrome 00011", red1 == 5'b00011);
    check("example data", out == d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
