// crc_pipelined: pipelined parallel CRC circuit (top level).
//
// Folds a w-bit word into an N-bit CRC every clock.  The update
//   CRC(t+1) = F^w * CRC(t)  xor  M * Din(t)
// is split in two: CX (F^w * CRC) sits in the feedback loop, DX (M * Din)
// does not depend on the CRC and is therefore cut into K pipeline stages,
// each no deeper than the DL level chosen for it.  When w > N the DX
// network is much deeper than CX; pipelining it leaves the short CX loop
// as the path that sets the clock, whatever w is.
//
//   din -> [Reg(K-1)] -> Sub-Logic(K-1) -> [Reg(K-2)] ... [Reg(0)] -> Sub-Logic(0) -> d --+
//                                                                                         XOR -> [CRC Reg] -> crc_code
//                                                   crc_code -> CX (F^w) ---------> c  --+
//
// Defaults: ITU-TSS CRC-16 (1 + x^5 + x^12 + x^16) with w = 32.  K and DL
// default to the partitioning rule (crc_pkg::auto_k / auto_dl: Sub-Logic(0)
// below the CX level, the others at most the CX level), which here gives two
// DX sub-logics with DL(1) = 2 and DL(0) = 3 (CX is 4 levels deep at this
// size; DX unpartitioned would be 5).
//
// Interface: din with din_valid, din_sop (first word of a message) and
// din_eop (last word).  A one-word message sets both.  One word per clock,
// no back-pressure; bubbles (din_valid = 0) are allowed anywhere.  Latency
// is K + 1 clocks: when the last word of a message is sampled by edge t, its
// CRC is on crc_code, with crc_done = 1, just after edge t + K.  Bit order:
// din[W-1] is the first bit of the word, crc_code[N-1] the coefficient of
// x^(N-1).  The framing
// signals, INIT and the absence of a final XOR or bit reflection are this
// implementation's choices.
module crc_pipelined
  import crc_pkg::*;
#(
  parameter int unsigned  N    = 16,
  parameter crc_word_t    POLY = crc_word_t'(16'h1021),
  parameter int unsigned  W    = 32,
  parameter int unsigned  K    = auto_k(N, POLY, W),
  parameter dl_t          DL   = auto_dl(N, POLY, W),
  parameter logic [N-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  input  logic         din_valid,
  input  logic         din_sop,
  input  logic         din_eop,
  output logic [N-1:0] crc_code,
  output logic         crc_done
);

  if (N < 2 || N > MAX_N) begin : g_bad_n
    $error("crc_pipelined: N out of range");
  end
  if (W < 1 || W > MAX_W) begin : g_bad_w
    $error("crc_pipelined: W out of range");
  end
  if (K < 1 || K > MAX_K) begin : g_bad_k
    $error("crc_pipelined: K out of range");
  end

  localparam logic [N-1:0] CR_INIT = N'(cx_apply(N, POLY, W, crc_word_t'(INIT)));

  crc_ctl_t     ctl_in, ctl_d;
  logic [N-1:0] d, cr;

  assign ctl_in = '{valid: din_valid, sop: din_sop & din_valid, eop: din_eop & din_valid};

  crc_dx #(.N(N), .POLY(POLY), .W(W), .K(K), .DL(DL)) u_dx (
    .clk, .rst_n, .din, .ctl_i(ctl_in), .d, .ctl_o(ctl_d)
  );

  crc_cx #(.N(N), .POLY(POLY), .W(W)) u_cx (
    .crc(crc_code), .cr
  );

  crc_code_reg #(.N(N), .INIT(INIT), .CR_INIT(CR_INIT)) u_crc_reg (
    .clk, .rst_n, .cr, .d, .ctl(ctl_d), .crc_code, .crc_done
  );

  // Framing rule: sop and eop only mark valid words.
  a_sop_valid: assert property (@(posedge clk) (din_sop || din_eop) |-> din_valid)
    else $error("crc_pipelined: sop/eop without din_valid");

endmodule
