// crc_cx: CRC Code XOR Logic (CX), the feedback half of the parallel CRC.
//
// Computes Cr = F^w * CRC_Code, the value the CRC register would take after
// w clocks of a serial LFSR fed with zeros.  F^w is built at elaboration from
// the generator polynomial (crc_pkg::cx_matrix); each output bit is the XOR
// of the CRC bits selected by its row, which synthesis maps to an XOR tree of
// ceil(log2 N_j) levels.  This is the path that sets the clock period of the
// pipelined CRC, so it is kept free of anything else.
//
// Interface: purely combinational, crc (current CRC register) -> cr.
// Parameters: N = CRC degree, POLY = generator polynomial without the x^N
// term (bit i = coefficient of x^i), W = input word width.
module crc_cx
  import crc_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter crc_word_t   POLY = crc_word_t'(16'h1021),  // 1 + x^5 + x^12 (+ x^16)
  parameter int unsigned W    = 32
) (
  input  logic [N-1:0] crc,
  output logic [N-1:0] cr
);

  localparam cx_mat_t M = cx_matrix(N, POLY, W);

  always_comb begin
    for (int unsigned j = 0; j < N; j++) cr[j] = ^(crc & M[j][N-1:0]);
  end

endmodule
