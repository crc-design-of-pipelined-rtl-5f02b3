// tb_crc_dx: checks the pipelined Data XOR Logic in two configurations:
// the default (CRC-16 ITU-TSS, w = 32, K = 2) and a three-stage one
// (CRC-16 PCI Express, w = 256, K = 3).  Every word's output must equal the
// CRC of that word alone from a zero register, and must appear exactly K
// clocks after the word, with the control word alongside; bubbles are mixed
// in.
module tb_crc_dx;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;

  // Configuration A: default.
  logic [31:0]  din_a;
  crc_ctl_t     ci_a, co_a;
  logic [15:0]  d_a;
  crc_dx #(.N(16), .POLY(64'h1021), .W(32), .K(2), .DL(dl_t'(32'h23))) dut_a (
    .clk, .rst_n, .din(din_a), .ctl_i(ci_a), .d(d_a), .ctl_o(co_a));

  // Configuration B: three stages, DL(2) = 3, DL(1) = 3, DL(0) = 2.
  logic [255:0] din_b;
  crc_ctl_t     ci_b, co_b;
  logic [15:0]  d_b;
  crc_dx #(.N(16), .POLY(64'h100B), .W(256), .K(3), .DL(dl_t'(32'h332))) dut_b (
    .clk, .rst_n, .din(din_b), .ctl_i(ci_b), .d(d_b), .ctl_o(co_b));

  crc_ctl_t    hist_a [$];
  logic [15:0] exp_a  [$];
  crc_ctl_t    hist_b [$];
  logic [15:0] exp_b  [$];

  function automatic logic [15:0] word_crc(logic [63:0] poly, logic [1023:0] w, int unsigned n);
    msg_t        m;
    logic [63:0] r;
    m = {};
    push_word(m, w, n);
    r = crc_div(16, poly, '0, m);
    return r[15:0];
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1023:0] r;
    ci_a = '0; ci_b = '0; din_a = '0; din_b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      r     = rand_word();
      din_a = r[31:0];
      din_b = r[255:0];
      ci_a  = crc_ctl_t'($urandom_range(7, 0));
      ci_b  = crc_ctl_t'($urandom_range(7, 0));
      hist_a.push_back(ci_a);
      exp_a.push_back(word_crc(64'h1021, r, 32));
      hist_b.push_back(ci_b);
      exp_b.push_back(word_crc(64'h100B, r, 256));
      @(posedge clk);
      #1;
      // The word presented K clocks ago must now be at the output.
      if (hist_a.size() == 2) begin
        crc_ctl_t c;
        logic [15:0] e;
        c = hist_a.pop_front();
        e = exp_a.pop_front();
        checks++;
        if (co_a !== c || (c.valid && d_a !== e)) begin
          failures++;
          $display("FAIL A: ctl %b d %h expected %b %h", co_a, d_a, c, e);
        end
      end
      if (hist_b.size() == 3) begin
        crc_ctl_t c;
        logic [15:0] e;
        c = hist_b.pop_front();
        e = exp_b.pop_front();
        checks++;
        if (co_b !== c || (c.valid && d_b !== e)) begin
          failures++;
          $display("FAIL B: ctl %b d %h expected %b %h", co_b, d_b, c, e);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
