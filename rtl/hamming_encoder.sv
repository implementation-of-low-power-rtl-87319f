// hamming_encoder: even-parity Hamming encoder (single-error correcting).
//
// DATA_W information bits are spread over the non-power-of-two positions of a
// DATA_W+PAR_W bit code word, and each redundant bit r[j], at position 2**j,
// is the XOR of all code positions whose index has bit j set: it is 0 when
// the number of ones it covers is even. `enc[i]` is code position i+1 and
// `red[j]` is r[j]. Purely combinational, a single level of XOR trees.
// The default of 24 data bits and 5 redundant bits (a 29-bit code word) is
// the width of the node's data packet, as the design's encoder simulation
// shows; the code itself scales to any width. The parity placement and even
// parity follow the design.
module hamming_encoder #(
  parameter int unsigned DATA_W = 24,
  parameter int unsigned PAR_W  = hamming_pkg::par_bits(DATA_W),
  parameter int unsigned CW     = DATA_W + PAR_W
) (
  input  logic [DATA_W-1:0] data,
  output logic [CW-1:0]     enc,
  output logic [PAR_W-1:0]  red
);

  always_comb begin
    int unsigned k;
    logic [CW-1:0] cw;
    cw = '0;
    k  = 0;
    // place the data bits
    for (int unsigned p = 1; p <= CW; p++) begin
      if (!hamming_pkg::is_pow2(p)) begin
        cw[p-1] = data[k];
        k++;
      end
    end
    // redundant bits
    for (int unsigned j = 0; j < PAR_W; j++) begin
      red[j] = 1'b0;
      for (int unsigned p = 1; p <= CW; p++) begin
        if (((p >> j) & 1) == 1 && !hamming_pkg::is_pow2(p)) red[j] ^= cw[p-1];
      end
      cw[(1 << j) - 1] = red[j];
    end
    enc = cw;
  end

endmodule
