// crc_code_reg: XOR Array and CRC register of the pipelined parallel CRC.
//
// Implements CRC_Code(t+1) = Cr(t) xor Dr(t): the XOR Array adds, bit by
// bit, the CX output c_j and the DX output d_j, and the result is loaded
// into the N-bit CRC register when the word leaving the DX pipeline is
// valid.  The XOR Array is one gate level, so the loop CRC register -> CX ->
// XOR Array -> CRC register is the critical path of the whole circuit.
//
// Message framing is this implementation's own: on the first word of a
// message (ctl.sop) the register starts from INIT, realised by replacing Cr
// with the constant CR_INIT = F^w * INIT rather than by a mux in front of CX.
// crc_done rises for one clock together with the register update of the
// last word (ctl.eop), so crc_code holds the finished CRC while crc_done = 1.
// Reset loads INIT and clears crc_done.
module crc_code_reg
  import crc_pkg::*;
#(
  parameter int unsigned  N       = 16,
  parameter logic [N-1:0] INIT    = '0,
  parameter logic [N-1:0] CR_INIT = '0   // F^w * INIT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] cr,        // from CX
  input  logic [N-1:0] d,         // from DX Sub-Logic(0)
  input  crc_ctl_t     ctl,       // control beside d
  output logic [N-1:0] crc_code,
  output logic         crc_done
);

  logic [N-1:0] c_sel;
  logic [N-1:0] crc_next;

  always_comb begin
    c_sel    = ctl.sop ? CR_INIT : cr;
    crc_next = c_sel ^ d;  // XOR Array
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_code <= INIT;
      crc_done <= 1'b0;
    end else begin
      if (ctl.valid) crc_code <= crc_next;
      crc_done <= ctl.valid & ctl.eop;
    end
  end

endmodule
