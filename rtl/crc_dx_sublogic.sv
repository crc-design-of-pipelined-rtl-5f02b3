// crc_dx_sublogic: DX Sub-Logic(STAGE) of the partitioned Data XOR Logic.
//
// For every CRC output bit j the stage receives S(j,STAGE) bits (a group of
// the flat input vector starting at offset sum_{j'<j} S(j',STAGE)) and XORs
// them in consecutive groups of 2^DL(STAGE), giving S(j,STAGE-1) =
// ceil(S(j,STAGE) / 2^DL(STAGE)) partial sums for the next stage register.
// Sub-Logic(0) XORs all of its S(j,0) inputs into the single bit d_j.  So a
// stage is at most DL(STAGE) XOR levels deep; Sub-Logic(0)'s depth is
// ceil(log2 max_j S(j,0)).  Each output bit has its own network and its own
// register bits (no sharing between outputs), as in the partitioning method.
//
// A run that holds a single input (the last run of a group whose size is
// one more than a multiple of 2^DL) is passed through as a wire, so
// synthesis reports such output bits as connected straight to an input.
//
// Interface: combinational, in_bits (RS(STAGE) bits) -> out_bits
// (RS(STAGE-1) bits, or N bits d_(N-1)..d_0 for STAGE = 0).  The grouping of
// inputs into consecutive runs is this implementation's choice.
module crc_dx_sublogic
  import crc_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter crc_word_t   POLY  = crc_word_t'(16'h1021),
  parameter int unsigned W     = 32,
  parameter int unsigned K     = 2,                 // number of DX sub-logics
  parameter dl_t         DL    = dl_t'(32'h23),     // DL(1) = 2, DL(0) = 3
  parameter int unsigned STAGE = 1
) (
  input  logic [s_offset(size_table(N, POLY, W, K, DL), N, int'(STAGE))-1:0]     in_bits,
  output logic [s_offset(size_table(N, POLY, W, K, DL), N, int'(STAGE) - 1)-1:0] out_bits
);

  localparam sz_t SZ = size_table(N, POLY, W, K, DL);

  for (genvar j = 0; j < int'(N); j++) begin : g_out
    localparam int unsigned SI = int'(SZ[STAGE+1][j]);
    localparam int unsigned SO = int'(SZ[STAGE][j]);
    localparam int unsigned OI = s_offset(SZ, j, int'(STAGE));
    localparam int unsigned OO = s_offset(SZ, j, int'(STAGE) - 1);
    localparam int unsigned CH = (STAGE == 0) ? SI : (1 << DL[STAGE]);
    for (genvar p = 0; p < int'(SO); p++) begin : g_part
      logic acc;
      always_comb begin
        acc = 1'b0;
        for (int unsigned q = p * CH; q < (p + 1) * CH && q < SI; q++)
          acc = acc ^ in_bits[OI+q];
      end
      assign out_bits[OO+p] = acc;
    end
  end

endmodule
