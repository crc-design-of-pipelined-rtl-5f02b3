// tb_crc_stage_reg: checks the pipeline register: one clock of latency for
// valid words, data held through bubbles, control cleared by reset and
// passed every clock.
module tb_crc_stage_reg;
  import crc_pkg::*;

  localparam int unsigned WIDTH = 40;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  crc_ctl_t         ctl_i, ctl_o;
  logic [WIDTH-1:0] d_i, d_o;

  crc_stage_reg #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  logic [WIDTH-1:0] last_valid;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctl_i = '{valid: 1'b1, sop: 1'b1, eop: 1'b1};
    d_i   = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (ctl_o !== '0) begin
      failures++;
      $display("FAIL: control not cleared in reset");
    end
    rst_n = 1'b1;
    // Establish a known data value.
    ctl_i = '{valid: 1'b1, sop: 1'b0, eop: 1'b0};
    d_i   = {8'hA5, 32'h12345678};
    @(negedge clk);
    last_valid = d_i;
    for (int t = 0; t < 500; t++) begin
      ctl_i = crc_ctl_t'($urandom_range(7, 0));
      d_i   = {8'($urandom), $urandom};
      @(posedge clk);
      #1;
      checks++;
      if (ctl_o !== ctl_i) begin
        failures++;
        $display("FAIL: ctl %b expected %b", ctl_o, ctl_i);
      end
      if (ctl_i.valid) last_valid = d_i;
      checks++;
      if (d_o !== last_valid) begin
        failures++;
        $display("FAIL: d %h expected %h", d_o, last_valid);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
