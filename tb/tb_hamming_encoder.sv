// tb_hamming_encoder: self-checking test of hamming_encoder at its default
// width (24 data bits, 29-bit code word).
//
// The reference is written differently from the block: data bits are placed
// at the non-power-of-two positions, then the XOR of the positions of all
// set data bits is taken; its binary digits are the redundant bits. A valid
// code word must therefore have a zero position-XOR, which is checked too.
// Walking-one, all-zero, all-one and random words are applied.
module tb_hamming_encoder;

  localparam int DW = 24;
  localparam int PW = 5;
  localparam int CW = DW + PW;

  logic [DW-1:0] data;
  logic [CW-1:0] enc;
  logic [PW-1:0] red;
  int checks = 0, failures = 0;

  hamming_encoder dut (.data(data), .enc(enc), .red(red));

  initial begin
    #100000;
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

  task automatic apply(input logic [DW-1:0] d);
    logic [CW-1:0] exp_cw;
    int s;
    data = d;
    #1;
    exp_cw = ref_encode(d);
    checks++;
    if (enc !== exp_cw) begin
      failures++;
      $display("FAIL data=%h enc=%b exp=%b", d, enc, exp_cw);
    end
    checks++;
    if (red !== {exp_cw[15], exp_cw[7], exp_cw[3], exp_cw[1], exp_cw[0]}) begin
      failures++;
      $display("FAIL data=%h red=%b", d, red);
    end
    s = 0;
    for (int p = 1; p <= CW; p++) if (enc[p-1]) s ^= p;
    checks++;
    if (s != 0) begin
      failures++;
      $display("FAIL data=%h code word has non-zero syndrome %0d", d, s);
    end
  endtask

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < DW; i++) apply(DW'(1) << i);
    for (int i = 0; i < 500; i++) apply(DW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
