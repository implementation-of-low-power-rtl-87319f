// hamming_decoder: Hamming checker and single-bit corrector.
//
// The checker recomputes the redundant bits from the data positions of the
// received word `enc` and XORs them with the received redundant bits. The
// result, `red1`, is the code position of a single flipped bit (0 when the
// word is clean). The correction logic toggles that bit, giving `c`, and
// strips the redundant bits to give `out`. A syndrome that points past the
// end of the word can only come from several errors and is flagged
// `uncorrectable`; the word is then passed on unchanged.
// Combinational. Code layout as in hamming_encoder: `enc[i]` is position i+1.
// The checker, XOR syndrome, bit toggle and layout follow the design; the
// `err`/`uncorrectable` flags are this implementation's additions. With no
// overall parity bit, a double error is not told apart from a single one.
module hamming_decoder #(
  parameter int unsigned DATA_W = 24,
  parameter int unsigned PAR_W  = hamming_pkg::par_bits(DATA_W),
  parameter int unsigned CW     = DATA_W + PAR_W
) (
  input  logic [CW-1:0]     enc,
  output logic [PAR_W-1:0]  red1,
  output logic [CW-1:0]     c,
  output logic [DATA_W-1:0] out,
  output logic              err,
  output logic              uncorrectable
);

  always_comb begin
    int unsigned k;
    for (int unsigned j = 0; j < PAR_W; j++) begin
      red1[j] = enc[(1 << j) - 1];
      for (int unsigned p = 1; p <= CW; p++) begin
        if (((p >> j) & 1) == 1 && !hamming_pkg::is_pow2(p)) red1[j] ^= enc[p-1];
      end
    end

    err           = (red1 != '0);
    uncorrectable = (32'(red1) > CW);

    c = enc;
    for (int unsigned p = 1; p <= CW; p++) begin
      if (32'(red1) == p) c[p-1] = ~enc[p-1];
    end

    k   = 0;
    out = '0;
    for (int unsigned p = 1; p <= CW; p++) begin
      if (!hamming_pkg::is_pow2(p)) begin
        out[k] = c[p-1];
        k++;
      end
    end
  end

endmodule
