// tb_crc_workloads: runs the sixteen configurations of the published
// evaluation -- CRC16-A (ITU-TSS), CRC16-B (x^16 + x^15 + x^2 + 1),
// CRC16-C (PCI Express) and CRC32 (Ethernet), each with w = 32, 64, 128 and
// 256 -- with the pipeline depths used there (three DX sub-logics for
// CRC16-A and CRC16-C at w = 256, two elsewhere).  K and DL come from the
// partitioning rule of crc_pkg (auto_k, auto_dl), which must reproduce
// those depths; CRC16-B at w = 128 and 256, where the evaluation used two
// stages although the rule asks for three, are run with K = 2 and levels
// set by hand (DL(1), DL(0) = 4, 3 and 5, 3).  Each
// configuration gets a stream of random messages (half of them with an
// all-ones initial value) and the checks listed in crc_workload_run.
module tb_crc_workloads;
  import crc_pkg::*;

  localparam int NRUN = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        fin [NRUN];
  int unsigned chk [NRUN];
  int unsigned fl  [NRUN];

  crc_workload_run #(.NAME("CRC16-A w=32"), .N(16), .POLY(64'h1021), .W(32),
                     .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(11), .PAPER_NDX(18))
    u_run0 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  crc_workload_run #(.NAME("CRC16-A w=64"), .N(16), .POLY(64'h1021), .W(64),
                     .PAPER_K(2),
                     .INIT('1), .PAPER_NCX(12), .PAPER_NDX(25))
    u_run1 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  crc_workload_run #(.NAME("CRC16-A w=128"), .N(16), .POLY(64'h1021), .W(128),
                     .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(9), .PAPER_NDX(70))
    u_run2 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  crc_workload_run #(.NAME("CRC16-A w=256"), .N(16), .POLY(64'h1021), .W(256),
                     .PAPER_K(3),
                     .INIT('1), .PAPER_NCX(10), .PAPER_NDX(132))
    u_run3 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));
  crc_workload_run #(.NAME("CRC16-B w=32"), .N(16), .POLY(64'h8005), .W(32),
                     .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(14), .PAPER_NDX(29))
    u_run4 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]));
  crc_workload_run #(.NAME("CRC16-B w=64"), .N(16), .POLY(64'h8005), .W(64),
                     .PAPER_K(2),
                     .INIT('1), .PAPER_NCX(12), .PAPER_NDX(56))
    u_run5 (.clk, .rst_n, .finished(fin[5]), .checks(chk[5]), .failures(fl[5]));
  crc_workload_run #(.NAME("CRC16-B w=128"), .N(16), .POLY(64'h8005), .W(128),
                     .K(2), .DL(dl_t'(32'h43)), .AUTO(1'b0), .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(8), .PAPER_NDX(100))
    u_run6 (.clk, .rst_n, .finished(fin[6]), .checks(chk[6]), .failures(fl[6]));
  crc_workload_run #(.NAME("CRC16-B w=256"), .N(16), .POLY(64'h8005), .W(256),
                     .K(2), .DL(dl_t'(32'h53)), .AUTO(1'b0), .PAPER_K(2),
                     .INIT('1), .PAPER_NCX(13), .PAPER_NDX(175))
    u_run7 (.clk, .rst_n, .finished(fin[7]), .checks(chk[7]), .failures(fl[7]));
  crc_workload_run #(.NAME("CRC16-C w=32"), .N(16), .POLY(64'h100B), .W(32),
                     .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(15), .PAPER_NDX(24))
    u_run8 (.clk, .rst_n, .finished(fin[8]), .checks(chk[8]), .failures(fl[8]));
  crc_workload_run #(.NAME("CRC16-C w=64"), .N(16), .POLY(64'h100B), .W(64),
                     .PAPER_K(2),
                     .INIT('1), .PAPER_NCX(12), .PAPER_NDX(47))
    u_run9 (.clk, .rst_n, .finished(fin[9]), .checks(chk[9]), .failures(fl[9]));
  crc_workload_run #(.NAME("CRC16-C w=128"), .N(16), .POLY(64'h100B), .W(128),
                     .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(10), .PAPER_NDX(77))
    u_run10 (.clk, .rst_n, .finished(fin[10]), .checks(chk[10]), .failures(fl[10]));
  crc_workload_run #(.NAME("CRC16-C w=256"), .N(16), .POLY(64'h100B), .W(256),
                     .PAPER_K(3),
                     .INIT('1), .PAPER_NCX(10), .PAPER_NDX(146))
    u_run11 (.clk, .rst_n, .finished(fin[11]), .checks(chk[11]), .failures(fl[11]));
  crc_workload_run #(.NAME("CRC32 w=32"), .N(32), .POLY(64'h04C11DB7), .W(32),
                     .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(17), .PAPER_NDX(17))
    u_run12 (.clk, .rst_n, .finished(fin[12]), .checks(chk[12]), .failures(fl[12]));
  crc_workload_run #(.NAME("CRC32 w=64"), .N(32), .POLY(64'h04C11DB7), .W(64),
                     .PAPER_K(2),
                     .INIT('1), .PAPER_NCX(19), .PAPER_NDX(34))
    u_run13 (.clk, .rst_n, .finished(fin[13]), .checks(chk[13]), .failures(fl[13]));
  crc_workload_run #(.NAME("CRC32 w=128"), .N(32), .POLY(64'h04C11DB7), .W(128),
                     .PAPER_K(2),
                     .INIT('0), .PAPER_NCX(20), .PAPER_NDX(69))
    u_run14 (.clk, .rst_n, .finished(fin[14]), .checks(chk[14]), .failures(fl[14]));
  crc_workload_run #(.NAME("CRC32 w=256"), .N(32), .POLY(64'h04C11DB7), .W(256),
                     .PAPER_K(2),
                     .INIT('1), .PAPER_NCX(20), .PAPER_NDX(138))
    u_run15 (.clk, .rst_n, .finished(fin[15]), .checks(chk[15]), .failures(fl[15]));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int unsigned checks, failures;
    bit          all;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int r = 0; r < NRUN; r++) if (!fin[r]) all = 1'b0;
    end while (!all);
    @(posedge clk);
    checks = 0;
    failures = 0;
    for (int r = 0; r < NRUN; r++) begin
      checks += chk[r];
      failures += fl[r];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
