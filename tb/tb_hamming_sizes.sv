// tb_hamming_sizes: the Hamming encoder and decoder at three widths.
//
// 4 data bits (the 7-bit, 3-redundant-bit textbook code), 16 data bits (a
// 21-bit word) and 24 data bits (the 29-bit packet code). At each width,
// every single-bit error of random words must be located (syndrome = code
// position) and corrected, and clean words must pass unchanged. The code
// word sizes are checked against 2^n >= m + n + 1.
module tb_hamming_sizes;

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 4 data bits
  logic [3:0]  d4,  o4;
  logic [6:0]  e4,  r4, c4;
  logic [2:0]  p4,  s4;
  logic        err4, unc4;
  hamming_encoder #(.DATA_W(4))  enc4 (.data(d4), .enc(e4), .red(p4));
  hamming_decoder #(.DATA_W(4))  dec4 (.enc(r4), .red1(s4), .c(c4), .out(o4), .err(err4), .uncorrectable(unc4));

  // 16 data bits
  logic [15:0] d16, o16;
  logic [20:0] e16, r16, c16;
  logic [4:0]  p16, s16;
  logic        err16, unc16;
  hamming_encoder #(.DATA_W(16)) enc16 (.data(d16), .enc(e16), .red(p16));
  hamming_decoder #(.DATA_W(16)) dec16 (.enc(r16), .red1(s16), .c(c16), .out(o16), .err(err16), .uncorrectable(unc16));

  // 24 data bits
  logic [23:0] d24, o24;
  logic [28:0] e24, r24, c24;
  logic [4:0]  p24, s24;
  logic        err24, unc24;
  hamming_encoder #(.DATA_W(24)) enc24 (.data(d24), .enc(e24), .red(p24));
  hamming_decoder #(.DATA_W(24)) dec24 (.enc(r24), .red1(s24), .c(c24), .out(o24), .err(err24), .uncorrectable(unc24));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    check("sizes", hamming_pkg::par_bits(4) == 3 && hamming_pkg::par_bits(16) == 5 &&
          hamming_pkg::par_bits(24) == 5 && hamming_pkg::par_bits(11) == 4 &&
          hamming_pkg::par_bits(26) == 5 && hamming_pkg::par_bits(27) == 6);
    // the 4-bit code has exactly 16 words; try all of them
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v); #1; r4 = e4; #1;
      check("4-bit clean", o4 == d4 && s4 == 0);
      // (7,4) code: p1 = d0^d1^d3, p2 = d0^d2^d3, p4 = d1^d2^d3
      check("4-bit parity", p4 == {d4[1]^d4[2]^d4[3], d4[0]^d4[2]^d4[3], d4[0]^d4[1]^d4[3]});
      for (int p = 1; p <= 7; p++) begin
        r4 = e4 ^ (7'(1) << (p - 1)); #1;
        check("4-bit single", s4 == 3'(p) && o4 == d4 && err4);
      end
    end
    for (int n = 0; n < 100; n++) begin
      d16 = 16'($urandom); d24 = 24'($urandom); #1;
      r16 = e16; r24 = e24; #1;
      check("16-bit clean", o16 == d16 && s16 == 0);
      check("24-bit clean", o24 == d24 && s24 == 0);
      for (int p = 1; p <= 29; p++) begin
        if (p <= 21) r16 = e16 ^ (21'(1) << (p - 1));
        r24 = e24 ^ (29'(1) << (p - 1)); #1;
        if (p <= 21) check("16-bit single", s16 == 5'(p) && o16 == d16 && c16 == e16);
        check("24-bit single", s24 == 5'(p) && o24 == d24 && c24 == e24);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
