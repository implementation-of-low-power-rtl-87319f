// crc16_decoder: CRC-16 receiver with single-bit error correction.
//
// The received frame `fre` is split into data `dre` and checksum `cre`. The
// checksum `ccal` of `dre` is recomputed with the transmitter's equations and
// XORed with `cre`, giving the syndrome `a`. A zero syndrome means no error.
// Otherwise `a` is compared with a table of the syndromes of every possible
// single-bit error in the frame (built at elaboration from the polynomial):
// a match gives the position `c` of the bad bit, which is toggled, and the
// corrected message is `data`. Positions 0..DATA_W-1 name message bits,
// DATA_W.. DATA_W+15 name checksum bits (an error there leaves the message
// untouched). A non-zero syndrome that matches no entry is reported as
// `uncorrectable` and the message is passed on unchanged.
// Combinational. The recompute-XOR-look-up-toggle scheme follows the design;
// the position numbering, the 6-bit width of `c` and the flags are this
// implementation's choices.
module crc16_decoder #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned POS_W  = 6
) (
  input  logic [DATA_W+crc16_pkg::CRC_W-1:0] fre,
  output logic [DATA_W-1:0]                  dre,
  output logic [crc16_pkg::CRC_W-1:0]        cre,
  output logic [crc16_pkg::CRC_W-1:0]        ccal,
  output logic [crc16_pkg::CRC_W-1:0]        a,
  output logic [POS_W-1:0]                   c,
  output logic [DATA_W-1:0]                  data,
  output logic                               err,
  output logic                               corrected,
  output logic                               uncorrectable
);

  localparam int unsigned CRC_W = crc16_pkg::CRC_W;
  localparam int unsigned N_POS = DATA_W + CRC_W;

  typedef logic [N_POS-1:0][CRC_W-1:0] syn_table_t;

  // syndrome of a single error at each position
  function automatic syn_table_t build_table();
    syn_table_t t;
    for (int unsigned i = 0; i < N_POS; i++) begin
      if (i < DATA_W) t[i] = crc16_pkg::crc(crc16_pkg::MAX_W'(1) << i, DATA_W);
      else            t[i] = CRC_W'(1) << (i - DATA_W);
    end
    return t;
  endfunction

  localparam syn_table_t SYN_LUT = build_table();

  always_comb begin
    logic found;
    dre  = fre[N_POS-1:CRC_W];
    cre  = fre[CRC_W-1:0];
    ccal = crc16_pkg::crc(crc16_pkg::MAX_W'(dre), DATA_W);
    a    = ccal ^ cre;
    err  = (a != '0);

    found = 1'b0;
    c     = '0;
    for (int unsigned i = 0; i < N_POS; i++) begin
      if (err && !found && a == SYN_LUT[i]) begin
        found = 1'b1;
        c     = POS_W'(i);
      end
    end
    corrected     = found;
    uncorrectable = err && !found;

    data = dre;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      if (found && c == POS_W'(i)) data[i] = ~dre[i];
    end
  end

endmodule
