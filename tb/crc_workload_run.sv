// crc_workload_run: drives one configuration of the pipelined CRC with a
// stream of random messages and checks it (used by tb_crc_workloads).
//
// Checks, per configuration: every message CRC against modulo-2 long
// division; the latency of K + 1 clocks from last word to crc_done; the
// fan-in N of CX and DX (largest number of inputs one output bit depends
// on) computed by the design's package against a count made with the
// reference CRC; and that Sub-Logic(0) needs no more than DL(0) levels.
// When K and DL come from the partitioning rule (AUTO), it also checks that
// K equals the stage count of the published evaluation (PAPER_K) and that
// the levels obey the rule: DL(0) < L_CX, DL(i) <= L_CX for i > 0, and the
// levels add up to L_DX.  The fan-ins are printed next to the published
// figures (PAPER_NCX, PAPER_NDX) for comparison only.
module crc_workload_run
  import crc_pkg::*;
  import crc_ref_pkg::*;
#(
  parameter string        NAME      = "crc",
  parameter int unsigned  N         = 16,
  parameter crc_word_t    POLY      = crc_word_t'(16'h1021),
  parameter int unsigned  W         = 32,
  parameter int unsigned  K         = auto_k(N, POLY, W),
  parameter dl_t          DL        = auto_dl(N, POLY, W),
  parameter bit           AUTO      = 1'b1,  // K and DL left to the partitioning rule
  parameter int unsigned  PAPER_K   = 2,
  parameter logic [N-1:0] INIT      = '0,
  parameter int unsigned  MSGS      = 40,
  parameter int unsigned  PAPER_NCX = 0,
  parameter int unsigned  PAPER_NDX = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures
);

  logic [W-1:0] din = '0;
  logic         din_valid = 1'b0, din_sop = 1'b0, din_eop = 1'b0;
  logic [N-1:0] crc_code;
  logic         crc_done;

  crc_pipelined #(.N(N), .POLY(POLY), .W(W), .K(K), .DL(DL), .INIT(INIT)) dut (
    .clk, .rst_n, .din, .din_valid, .din_sop, .din_eop, .crc_code, .crc_done);

  localparam sz_t         SZ     = size_table(N, POLY, W, K, DL);
  localparam int unsigned NCX    = cx_fanin(N, POLY, W);
  localparam int unsigned NDX    = dx_fanin(N, POLY, W);

  longint unsigned cycle = 0;
  logic [63:0]     exp_crc [$];
  longint unsigned exp_cyc [$];
  int unsigned     n_checks = 0, n_fail = 0;

  assign checks   = n_checks;
  assign failures = n_fail;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && crc_done) begin
      if (exp_crc.size() == 0) begin
        n_fail <= n_fail + 1;
        $display("FAIL %s: unexpected crc_done", NAME);
      end else begin
        logic [63:0]     e;
        longint unsigned t;
        e = exp_crc.pop_front();
        t = exp_cyc.pop_front();
        n_checks <= n_checks + 2;
        if (crc_code !== e[N-1:0] || cycle - t != longint'(K) + 1) begin
          n_fail <= n_fail + 1;
          $display("FAIL %s: crc %h expected %h, latency %0d", NAME, crc_code, e[N-1:0], cycle - t);
        end
      end
    end
  end

  initial begin
    msg_t         msg;
    msg_t         z;
    int unsigned  len, mx, c, s0max, rs;
    logic [W-1:0] w;
    logic [63:0]  r;
    finished = 1'b0;
    // Fan-in of DX and CX counted with the reference.
    mx = 0;
    for (int j = 0; j < int'(N); j++) begin
      c = ref_fanin_dx(N, 64'(POLY), W, j);
      if (c > mx) mx = c;
    end
    z = {};
    repeat (W) z.push_back(1'b0);
    s0max = 0;
    for (int j = 0; j < int'(N); j++) if (int'(SZ[1][j]) > s0max) s0max = int'(SZ[1][j]);
    c = 0;
    for (int j = 0; j < int'(N); j++) begin
      int unsigned cnt;
      cnt = 0;
      for (int k = 0; k < int'(N); k++) begin
        r = crc_div(N, 64'(POLY), 64'(1) << k, z);
        cnt += int'(r[j]);
      end
      if (cnt > c) c = cnt;
    end
    if (AUTO) begin
      int unsigned lsum;
      lsum = 0;
      for (int i = 0; i < int'(K); i++) lsum += int'(DL[i]);
      n_checks = n_checks + 2;
      if (K != PAPER_K) begin
        n_fail = n_fail + 1;
        $display("FAIL %s: rule gives K=%0d, evaluation used %0d", NAME, K, PAPER_K);
      end
      if (int'(DL[0]) >= logic_level(NCX) || lsum != logic_level(NDX)) begin
        n_fail = n_fail + 1;
        $display("FAIL %s: DL(0)=%0d, level sum %0d", NAME, DL[0], lsum);
      end
      for (int i = 1; i < int'(K); i++) begin
        n_checks = n_checks + 1;
        if (int'(DL[i]) > logic_level(NCX)) begin
          n_fail = n_fail + 1;
          $display("FAIL %s: DL(%0d)=%0d deeper than CX", NAME, i, DL[i]);
        end
      end
    end
    $write("%s: w=%0d K=%0d %s DL=",
           NAME, W, K, AUTO ? "(rule)" : "(set)");
    for (int i = int'(K) - 1; i >= 0; i--) $write("%0d%s", DL[i], (i > 0) ? "," : "");
    $write("  CX N=%0d L=%0d (published N %0d)  DX N=%0d L=%0d (published N %0d)  RS =", NCX, logic_level(NCX), PAPER_NCX, NDX, logic_level(NDX), PAPER_NDX);
    for (int i = int'(K) - 2; i >= 0; i--) begin
      rs = s_offset(SZ, N, i);
      $write(" RS(%0d)=%0d", i, rs);
    end
    $display("");
    @(posedge clk);
    n_checks = n_checks + 3;
    if (mx != NDX) begin
      n_fail = n_fail + 1;
      $display("FAIL %s: DX fan-in %0d, reference %0d", NAME, NDX, mx);
    end
    if (c != NCX) begin
      n_fail = n_fail + 1;
      $display("FAIL %s: CX fan-in %0d, reference %0d", NAME, NCX, c);
    end
    if (logic_level(s0max) > DL[0]) begin
      n_fail = n_fail + 1;
      $display("FAIL %s: Sub-Logic(0) needs %0d levels, DL(0) = %0d", NAME, logic_level(s0max), DL[0]);
    end
    wait (rst_n);
    @(negedge clk);
    for (int m = 0; m < int'(MSGS); m++) begin
      if ($urandom_range(1, 0) == 0) begin
        din_valid = 1'b0; din_sop = 1'b0; din_eop = 1'b0;
        @(negedge clk);
      end
      len = $urandom_range(6, 1);
      msg = {};
      for (int i = 0; i < int'(len); i++) begin
        w = W'(rand_word());
        push_word(msg, 1024'(w), W);
        din = w; din_valid = 1'b1; din_sop = (i == 0); din_eop = (i == int'(len) - 1);
        if (din_eop) begin
          exp_crc.push_back(crc_div(N, 64'(POLY), 64'(INIT), msg));
          exp_cyc.push_back(cycle);
        end
        @(negedge clk);
      end
      din_valid = 1'b0; din_sop = 1'b0; din_eop = 1'b0;
    end
    repeat (K + 4) @(negedge clk);
    n_checks = n_checks + 1;
    if (exp_crc.size() != 0) begin
      n_fail = n_fail + 1;
      $display("FAIL %s: %0d CRCs never finished", NAME, exp_crc.size());
    end
    finished = 1'b1;
  end

endmodule
