// tb_crc_code_reg: checks the XOR Array and CRC register against a
// cycle-level model: on a valid word the register takes Cr xor Dr, or
// CR_INIT xor Dr on the first word of a message; otherwise it holds.
// crc_done follows a valid last word by one clock.  Reset loads INIT.
module tb_crc_code_reg;
  import crc_pkg::*;

  localparam int unsigned  N       = 16;
  localparam logic [N-1:0] INIT    = 16'hFFFF;
  localparam logic [N-1:0] CR_INIT = 16'h1D0F;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [N-1:0] cr, d, crc_code;
  crc_ctl_t     ctl;
  logic         crc_done;

  crc_code_reg #(.N(N), .INIT(INIT), .CR_INIT(CR_INIT)) dut (.*);

  always #5 clk = ~clk;

  int unsigned  checks = 0, failures = 0;
  logic [N-1:0] model;
  logic         model_done;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cr  = '0;
    d   = '0;
    ctl = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (crc_code !== INIT || crc_done !== 1'b0) begin
      failures++;
      $display("FAIL: reset state %h %b", crc_code, crc_done);
    end
    rst_n      = 1'b1;
    model      = INIT;
    model_done = 1'b0;
    for (int t = 0; t < 1000; t++) begin
      cr  = N'($urandom);
      d   = N'($urandom);
      ctl = crc_ctl_t'($urandom_range(7, 0));
      if (ctl.valid) model = (ctl.sop ? CR_INIT : cr) ^ d;
      model_done = ctl.valid & ctl.eop;
      @(posedge clk);
      #1;
      checks++;
      if (crc_code !== model || crc_done !== model_done) begin
        failures++;
        $display("FAIL: crc %h done %b expected %h %b", crc_code, crc_done, model, model_done);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
