// crc_dx: partitioned, pipelined Data XOR Logic (DX).
//
// Produces Dr = M * Din, the contribution of one w-bit input word to the
// CRC (the CRC of the word when the register starts at zero), split into K
// sub-logics with a register between each two:
//
//   din -> Reg(K-1) -> Sub-Logic(K-1) -> Reg(K-2) -> ... -> Reg(0) -> Sub-Logic(0) -> d
//
// Reg(K-1) is the w-bit input register.  Behind it every output bit j gets
// its own copy of the S(j,K-1) input bits it depends on (pure wiring, no
// gates), and each sub-logic reduces every output's group by a factor of
// 2^DL(i) (see crc_dx_sublogic).  The stage register sizes are RS(i) =
// sum_j S(j,i).  A control word (valid, sop, eop) travels beside the data.
//
// Timing: a word sampled with ctl_i.valid by clock edge t gives d and
// ctl_o (valid) just after edge t+K-1, i.e. K clocks of latency (K
// registers), one word per clock.
// With K = 1 the DX is not partitioned (input register, then the whole XOR
// network).  The input-bit order (din[W-1] is the first bit in serial
// order) follows the data vector of the CRC recursion.
module crc_dx
  import crc_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter crc_word_t   POLY = crc_word_t'(16'h1021),
  parameter int unsigned W    = 32,
  parameter int unsigned K    = auto_k(N, POLY, W),
  parameter dl_t         DL   = auto_dl(N, POLY, W)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  crc_ctl_t     ctl_i,
  output logic [N-1:0] d,
  output crc_ctl_t     ctl_o
);

  localparam sz_t     SZ = size_table(N, POLY, W, K, DL);

  // Bit position of region x (= stage i + 1) in the flat vectors below;
  // region 0 holds the N outputs d_j.
  function automatic int unsigned base(int unsigned x);
    int unsigned b = 0;
    for (int unsigned y = 0; y < x; y++) b += s_offset(SZ, N, int'(y) - 1);
    return b;
  endfunction

  localparam int unsigned TOTAL = base(K + 1);

  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1;

  // Flat vectors holding every stage: region x of stg_out (bits base(x) up)
  // is the output of Sub-Logic(x); region x of stg_in (bits base(x) - N up)
  // is the input of Sub-Logic(x-1).
  logic [TOTAL-N-1:0]   stg_in;
  logic [base(K)-1:0]   stg_out;
  crc_ctl_t         ctl_s [K];  // control beside Reg(i)
  logic [W-1:0]     din_q;

  // Reg(K-1): input register.
  crc_stage_reg #(.WIDTH(W)) u_din_reg (
    .clk, .rst_n, .ctl_i(ctl_i), .d_i(din), .ctl_o(ctl_s[K-1]), .d_o(din_q)
  );

  // Output j's group of input lanes: the S(j,K-1) bits of din it depends on,
  // in ascending bit order.
  for (genvar j = 0; j < int'(N); j++) begin : g_gather
    localparam int unsigned OFF = base(K) - N + s_offset(SZ, j, int'(K) - 1);
    for (genvar q = 0; q < int'(SZ[K][j]); q++) begin : g_lane
      localparam int unsigned SRC = dx_src(N, POLY, W, j, q);
      assign stg_in[OFF + q] = din_q[SRC[IW-1:0]];
    end
  end

  for (genvar i = 0; i < int'(K); i++) begin : g_stage
    localparam int unsigned IN_B  = base(i + 1);
    localparam int unsigned IN_W  = s_offset(SZ, N, i);
    localparam int unsigned OUT_B = base(i);
    localparam int unsigned OUT_W = s_offset(SZ, N, i - 1);

    crc_dx_sublogic #(
      .N(N), .POLY(POLY), .W(W), .K(K), .DL(DL), .STAGE(i)
    ) u_sub (
      .in_bits (stg_in[IN_B - N +: IN_W]),
      .out_bits(stg_out[OUT_B +: OUT_W])
    );

    // Reg(i-1) between Sub-Logic(i) and Sub-Logic(i-1).
    if (i > 0) begin : g_reg
      crc_stage_reg #(.WIDTH(OUT_W)) u_reg (
        .clk, .rst_n,
        .ctl_i(ctl_s[i]), .d_i(stg_out[OUT_B +: OUT_W]),
        .ctl_o(ctl_s[i-1]), .d_o(stg_in[OUT_B - N +: OUT_W])
      );
    end
  end

  assign d     = stg_out[0 +: N];
  assign ctl_o = ctl_s[0];

endmodule
