// crc_stage_reg: one pipeline register of the data path (the input register
// Din Reg = Reg(K-1), or a stage register Reg(i) between two DX sub-logics).
//
// The data bits are loaded only when the word is valid, so a bubble leaves
// them unchanged; the control word (valid, sop, eop) is loaded every clock
// and cleared by reset, so a bubble travels down the pipeline as valid = 0.
// The data bits are not reset: nothing downstream uses them while valid is 0.
// Latency one clock.  WIDTH is RS(i) of the partitioning (or w for the input
// register); the enable and the control word are this implementation's own.
module crc_stage_reg
  import crc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  crc_ctl_t         ctl_i,
  input  logic [WIDTH-1:0] d_i,
  output crc_ctl_t         ctl_o,
  output logic [WIDTH-1:0] d_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctl_o <= '0;
    else        ctl_o <= ctl_i;
  end

  always_ff @(posedge clk) begin
    if (ctl_i.valid) d_o <= d_i;
  end

endmodule
