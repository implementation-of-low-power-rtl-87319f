// crc16_pkg: the CRC-16 checksum function shared by encoder and decoder.
//
// crc(d, w) is the remainder of d(x) * x**16 divided by the generator
// x^16 + x^12 + x^5 + 1 (0x1021, the X.25 / CCITT polynomial) for a w-bit
// message d, with a zero start value and no bit reflection: message bit w-1
// enters first, as in a shift register that XORs the feedback into the
// stages after x^0, x^5 and x^12. With a constant w the loop unrolls into one
// XOR equation per checksum bit, i.e. the parallel form.
package crc16_pkg;

  localparam int unsigned CRC_W  = 16;
  localparam int unsigned MAX_W  = 64;
  localparam logic [15:0] POLY   = 16'h1021;

  function automatic logic [CRC_W-1:0] crc(input logic [MAX_W-1:0] d,
                                           input int unsigned w);
    logic [CRC_W-1:0] r;
    logic             fb;
    r = '0;
    for (int i = MAX_W - 1; i >= 0; i--) begin
      if (i < int'(w)) begin
        fb = r[CRC_W-1] ^ d[i];
        r  = {r[CRC_W-2:0], 1'b0} ^ (fb ? POLY : '0);
      end
    end
    return r;
  endfunction

endpackage
