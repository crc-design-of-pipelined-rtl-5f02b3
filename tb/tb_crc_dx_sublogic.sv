// tb_crc_dx_sublogic: checks both DX sub-logics of the default
// configuration (ITU-TSS CRC-16, w = 32, DL(1) = 2).  The register sizes of
// the partitioning are recomputed here from the reference CRC:
// S(j,1) = number of input bits d_j depends on, S(j,0) = ceil(S(j,1) / 4),
// RS(i) = sum_j S(j,i); the port widths must match them.  Then random
// inputs are applied: Sub-Logic(1) must give the XOR of each run of four
// inputs of an output's group, Sub-Logic(0) the XOR of the whole group.
module tb_crc_dx_sublogic;
  import crc_pkg::*;
  import crc_ref_pkg::*;

  localparam int unsigned N    = 16;
  localparam crc_word_t   POLY = crc_word_t'(16'h1021);
  localparam int unsigned W    = 32;
  localparam int unsigned K    = 2;
  localparam dl_t         DL   = dl_t'(32'h23);
  localparam sz_t         SZ   = size_table(N, POLY, W, K, DL);
  localparam int unsigned RS1  = s_offset(SZ, N, 1);
  localparam int unsigned RS0  = s_offset(SZ, N, 0);

  logic [RS1-1:0] in1;
  logic [RS0-1:0] out1, in0;
  logic [N-1:0]   out0;

  crc_dx_sublogic #(.N(N), .POLY(POLY), .W(W), .K(K), .DL(DL), .STAGE(1)) dut1 (
    .in_bits(in1), .out_bits(out1));
  crc_dx_sublogic #(.N(N), .POLY(POLY), .W(W), .K(K), .DL(DL), .STAGE(0)) dut0 (
    .in_bits(in0), .out_bits(out0));

  int unsigned checks = 0, failures = 0;
  int unsigned s1 [N];
  int unsigned s0 [N];

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int unsigned sum1 = 0, sum0 = 0, o1, o0;
    logic        e;
    for (int j = 0; j < int'(N); j++) begin
      s1[j] = ref_fanin_dx(N, 64'(POLY), W, j);
      s0[j] = (s1[j] + 3) / 4;
      sum1 += s1[j];
      sum0 += s0[j];
    end
    $display("RS(1) = %0d, RS(0) = %0d", sum1, sum0);
    checks++;
    if (sum1 != RS1 || sum0 != RS0) begin
      failures++;
      $display("FAIL: register sizes %0d/%0d expected %0d/%0d", RS1, RS0, sum1, sum0);
    end
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < int'(RS1); i++) in1[i] = 1'($urandom);
      for (int i = 0; i < int'(RS0); i++) in0[i] = 1'($urandom);
      #1;
      o1 = 0;
      o0 = 0;
      for (int j = 0; j < int'(N); j++) begin
        for (int p = 0; p < int'(s0[j]); p++) begin
          e = 1'b0;
          for (int q = 4 * p; q < 4 * p + 4 && q < int'(s1[j]); q++) e ^= in1[o1 + q];
          checks++;
          if (out1[o0 + p] !== e) begin
            failures++;
            $display("FAIL: stage 1 output %0d part %0d", j, p);
          end
        end
        e = 1'b0;
        for (int q = 0; q < int'(s0[j]); q++) e ^= in0[o0 + q];
        checks++;
        if (out0[j] !== e) begin
          failures++;
          $display("FAIL: stage 0 output %0d", j);
        end
        o1 += s1[j];
        o0 += s0[j];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
