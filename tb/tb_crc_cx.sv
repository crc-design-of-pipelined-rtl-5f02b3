// tb_crc_cx: checks CX (Cr = F^w * CRC) for two configurations, ITU-TSS
// CRC-16 with 32-bit words and CRC-32 with 64-bit words, against the
// reference: a register starting at C and fed w zero bits ends at
// C * x^w mod P.  Walking-one and random CRC values are applied.
// A third instance, CRC-16 ITU-TSS with w = 16, is checked against the
// published XOR table for that case: register bit R_i is the XOR of the
// listed x_k (x_k = c_k xor d_k).  That table numbers registers and inputs
// from the other end, so its R_i and x_k are bits 15-i and 15-k here.
module tb_crc_cx;
  import crc_ref_pkg::*;

  logic [15:0] crc_a, cr_a;
  logic [31:0] crc_b, cr_b;

  crc_cx #(.N(16), .POLY(64'h1021), .W(32)) dut_a (.crc(crc_a), .cr(cr_a));
  crc_cx #(.N(32), .POLY(64'h04C11DB7), .W(64)) dut_b (.crc(crc_b), .cr(cr_b));

  logic [15:0] crc_c, cr_c;
  crc_cx #(.N(16), .POLY(64'h1021), .W(16)) dut_c (.crc(crc_c), .cr(cr_c));

  // XOR table for w = 16: TAB[i] has bit k set when x_k feeds R_i.
  localparam logic [15:0] TAB [16] = '{16'h1130, 16'h2260, 16'h44C0, 16'h8981, 16'h0233, 16'h0466, 16'h08CD, 16'h119B, 16'h2337, 16'h466E, 16'h8CDC, 16'h0889, 16'h1113, 16'h2226, 16'h444C, 16'h8898};

  int unsigned checks = 0, failures = 0;

  function automatic msg_t zeros(int unsigned w);
    msg_t m;
    m = {};
    repeat (w) m.push_back(1'b0);
    return m;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    for (int k = 0; k < 16; k++) begin
      crc_c = 16'(1) << (15 - k);  // x_k
      #1;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (cr_c[15-i] !== TAB[i][k]) begin
          failures++;
          $display("FAIL table: R%0d and x%0d", i, k);
        end
      end
    end
    for (int t = 0; t < 300; t++) begin
      if (t < 32) begin
        crc_a = 16'(64'(1) << (t % 16));
        crc_b = 32'(64'(1) << t);
      end else begin
        crc_a = 16'($urandom);
        crc_b = $urandom;
      end
      #1;
      e = crc_div(16, 64'h1021, 64'(crc_a), zeros(32));
      checks++;
      if (cr_a !== e[15:0]) begin
        failures++;
        $display("FAIL A: crc %h cr %h expected %h", crc_a, cr_a, e[15:0]);
      end
      e = crc_div(32, 64'h04C11DB7, 64'(crc_b), zeros(64));
      checks++;
      if (cr_b !== e[31:0]) begin
        failures++;
        $display("FAIL B: crc %h cr %h expected %h", crc_b, cr_b, e[31:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
