// crc16_encoder: parallel CRC-16 transmitter.
//
// Computes the 16-bit checksum `ctr` of the DATA_W-bit message `dtr` with
// the generator x^16 + x^12 + x^5 + 1 and forms the transmitted frame
// `ftr` = {dtr, ctr} (data in the upper bits, checksum in the lower ones).
// Combinational: the checksum is a set of XOR equations derived from the
// shift-and-XOR register (see crc16_pkg), evaluated in parallel.
// The polynomial, the 16-bit message, the parallel form and the frame
// T = D & C follow the design; zero start value and MSB-first order are this
// implementation's reading of it.
module crc16_encoder #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0]                    dtr,
  output logic [crc16_pkg::CRC_W-1:0]          ctr,
  output logic [DATA_W+crc16_pkg::CRC_W-1:0]   ftr
);

  always_comb begin
    ctr = crc16_pkg::crc(crc16_pkg::MAX_W'(dtr), DATA_W);
    ftr = {dtr, ctr};
  end

endmodule
