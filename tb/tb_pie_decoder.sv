// tb_pie_decoder -- self-checking testbench of pie_decoder.
//
// Drives envelopes built from the PIE rules (delimiter, data-0 of one Tari,
// RTcal = data-0 + data-1, optional TRcal, data symbols ending in a low pulse
// of width PW, then continuous wave) with several Tari values, and compares
// the decoded bits, the measured RTcal and TRcal, the frame_start /
// frame_end pulses and the TRcal flag with what was sent.
module tb_pie_decoder;
  import tb_gen2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic env = 1'b1;
  logic frame_start, bit_valid, bit_data, frame_end, trcal_seen;
  logic [15:0] rtcal_cnt, trcal_cnt;
  int checks = 0, failures = 0;

  pie_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  bitq_t got_bits;
  int    starts, ends;
  always @(posedge clk) begin
    if (bit_valid) got_bits.push_back(bit_data);
    if (frame_start) starts++;
    if (frame_end) ends++;
  end

  task automatic symbol(input int len, input int pw);
    env <= 1'b1;
    repeat (len - pw) @(posedge clk);
    env <= 1'b0;
    repeat (pw) @(posedge clk);
  endtask

  task automatic send(input bitq_t bits, input int tari, input int d1, input int trcal,
                      input int pw);
    env <= 1'b0;
    repeat (3 * tari) @(posedge clk);   // delimiter
    symbol(tari, pw);                   // data-0
    symbol(tari + d1, pw);              // RTcal
    if (trcal > 0) symbol(trcal, pw);
    foreach (bits[i]) symbol(bits[i] ? d1 : tari, pw);
    env <= 1'b1;
    repeat (5 * (tari + d1) + 20) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 24; t++) begin
      int tari, d1, trc, pw, n;
      bitq_t bits;
      tari = $urandom_range(8, 40);
      d1   = tari + tari / 2 + $urandom_range(0, tari / 2);     // 1.5 .. 2 Tari
      pw   = $urandom_range(2, tari / 2);
      trc  = (t % 2 == 0) ? 0 : ((tari + d1) * $urandom_range(11, 30)) / 10;
      n    = $urandom_range(1, 60);
      bits = {};
      for (int i = 0; i < n; i++) bits.push_back(1'($urandom));
      got_bits = {}; starts = 0; ends = 0;
      send(bits, tari, d1, trc, pw);
      expect_eq("frame_start pulses", starts, 1);
      expect_eq("frame_end pulses", ends, 1);
      expect_eq("RTcal measured", rtcal_cnt, tari + d1);
      expect_eq("TRcal seen", trcal_seen, trc > 0);
      if (trc > 0) expect_eq("TRcal measured", trcal_cnt, trc);
      expect_eq("bit count", got_bits.size(), n);
      for (int i = 0; i < n && i < got_bits.size(); i++)
        expect_eq($sformatf("bit %0d", i), got_bits[i], bits[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
