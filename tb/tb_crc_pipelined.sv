// tb_crc_pipelined: end-to-end test of the pipelined parallel CRC at its
// default parameters (ITU-TSS CRC-16, 32-bit words, two DX sub-logics).
//
// Random messages of 1..12 words are sent with random bubbles, and often
// back to back, so that words of two messages are in the pipeline at once.
// Each finished CRC (crc_done) is compared with a modulo-2 long division of
// the message, and the time from the last word to crc_done is checked
// against the latency of K + 1 clocks.  The test counts how often each
// mechanism occurred (bubble inside a message, back-to-back messages,
// one-word message, a full pipeline) and fails if one never did.
module tb_crc_pipelined;
  import crc_ref_pkg::*;

  // Mirrors of the design's default parameters.
  localparam int unsigned N    = 16;
  localparam logic [63:0] POLY = 64'h1021;
  localparam int unsigned W    = 32;
  localparam int unsigned K    = 2;
  localparam longint unsigned LAT = longint'(K) + 1;  // clocks from last word in to CRC out
  localparam logic [63:0] INIT = '0;
  localparam int unsigned MSGS = 400;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [W-1:0] din = '0;
  logic         din_valid = 1'b0, din_sop = 1'b0, din_eop = 1'b0;
  logic [N-1:0] crc_code;
  logic         crc_done;

  crc_pipelined dut (.*);

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;
  int unsigned n_bubble = 0, n_b2b = 0, n_single = 0, n_full = 0;

  logic [63:0]     exp_crc [$];
  longint unsigned exp_cyc [$];

  always @(posedge clk) cycle <= cycle + 1;

  // Count consecutive valid words: K + 1 of them fill the pipeline.
  int unsigned run = 0;
  always @(posedge clk) begin
    if (din_valid) begin
      run <= run + 1;
      if (run + 1 == int'(K) + 1) n_full++;
    end else run <= 0;
  end

  always @(posedge clk) begin
    if (rst_n && crc_done) begin
      checks++;
      if (exp_crc.size() == 0) begin
        failures++;
        $display("FAIL: crc_done with no message outstanding");
      end else begin
        logic [63:0]     e;
        longint unsigned t;
        e = exp_crc.pop_front();
        t = exp_cyc.pop_front();
        if (crc_code !== e[N-1:0]) begin
          failures++;
          $display("FAIL: crc %h expected %h", crc_code, e[N-1:0]);
        end
        checks++;
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL: latency %0d expected %0d", cycle - t, LAT);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msg_t        msg;
    int unsigned len;
    logic [W-1:0] w;
    bit          prev_ended;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // After reset the CRC register holds INIT and crc_done is low.
    checks++;
    if (crc_code !== INIT[N-1:0] || crc_done !== 1'b0) begin
      failures++;
      $display("FAIL: reset state");
    end
    prev_ended = 1'b0;
    for (int m = 0; m < MSGS; m++) begin
      // Idle gap between messages: none about half of the time.
      if ($urandom_range(1, 0) == 0) begin
        repeat ($urandom_range(3, 1)) begin
          din_valid = 1'b0; din_sop = 1'b0; din_eop = 1'b0; din = W'($urandom);
          @(negedge clk);
        end
      end else if (m > 0) n_b2b++;
      len = ($urandom_range(3, 0) == 0) ? 1 : $urandom_range(12, 2);
      if (len == 1) n_single++;
      msg = {};
      for (int i = 0; i < int'(len); i++) begin
        if (i > 0 && $urandom_range(5, 0) == 0) begin
          n_bubble++;
          din_valid = 1'b0; din_sop = 1'b0; din_eop = 1'b0; din = W'($urandom);
          @(negedge clk);
        end
        w = W'(rand_word());
        push_word(msg, 1024'(w), W);
        din = w; din_valid = 1'b1; din_sop = (i == 0); din_eop = (i == int'(len) - 1);
        if (din_eop) begin
          exp_crc.push_back(crc_div(N, POLY, INIT, msg));
          exp_cyc.push_back(cycle);
        end
        @(negedge clk);
      end
      din_valid = 1'b0; din_sop = 1'b0; din_eop = 1'b0;
    end
    repeat (K + 4) @(negedge clk);
    checks++;
    if (exp_crc.size() != 0) begin
      failures++;
      $display("FAIL: %0d CRCs never finished", exp_crc.size());
    end
    $display("mechanisms: bubbles=%0d back_to_back=%0d single_word=%0d full_pipeline=%0d",
             n_bubble, n_b2b, n_single, n_full);
    checks += 4;
    if (n_bubble == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_single == 0) failures++;
    if (n_full == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
