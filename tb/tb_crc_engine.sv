// tb_crc_engine -- self-checking testbench of crc_engine.
//
// Feeds the ASCII string "123456789" and compares the complemented CRC-16
// register with D64Eh, the published check value of the Gen2 CRC-16.  Then
// frames with their CRC appended (CRC-16 and CRC-5, computed by the
// reference functions) must give a one-cycle crc_valid pulse, and the same
// frames with one bit flipped must not.
module tb_crc_engine;
  import gen2_pkg::*;
  import tb_gen2_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init = 1'b0, bit_valid = 1'b0, bit_in = 1'b0, check = 1'b0;
  crc_sel_e crc_sel = CRC_NONE;
  logic crc_valid;
  logic [15:0] crc16_q;
  logic [4:0]  crc5_q;
  int checks = 0, failures = 0;

  crc_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic feed(input bitq_t bits);
    @(posedge clk) init <= 1'b1;
    @(posedge clk) init <= 1'b0;
    foreach (bits[i]) begin
      bit_valid <= 1'b1; bit_in <= bits[i];
      @(posedge clk);
    end
    bit_valid <= 1'b0;
  endtask

  // strobe check, return the pulse seen on the next clock and its width
  task automatic do_check(input crc_sel_e s, output bit ok);
    check <= 1'b1; crc_sel <= s;
    @(posedge clk) check <= 1'b0;
    #1 ok = crc_valid;
    @(posedge clk) #1 expect_eq("crc_valid lasts one cycle", crc_valid, 0);
  endtask

  initial begin
    bitq_t b;
    bit ok;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // check value of "123456789"
    b = {};
    for (int i = 1; i <= 9; i++) put(b, 8'h30 + 8'(i), 8);
    feed(b);
    @(posedge clk) #1 expect_eq("CRC-16 check value", 16'(~crc16_q), 16'hD64E);
    expect_eq("reference CRC-16 check value", ref_crc16(b), 16'hD64E);

    for (int t = 0; t < 40; t++) begin
      int n;
      bitq_t f;
      bit [4:0] c;
      n = 8 + $urandom_range(0, 120);
      f = {};
      for (int i = 0; i < n; i++) f.push_back(1'($urandom));
      if (t % 2 == 0) begin
        put_crc16(f);
        feed(f);
        @(posedge clk);
        do_check(CRC_16, ok);
        expect_eq("CRC-16 good frame", ok, 1);
        f[$urandom_range(0, f.size() - 1)] ^= 1'b1;
        feed(f);
        @(posedge clk);
        do_check(CRC_16, ok);
        expect_eq("CRC-16 corrupted frame", ok, 0);
      end else begin
        c = ref_crc5(f);
        put(f, c, 5);
        feed(f);
        @(posedge clk);
        do_check(CRC_5, ok);
        expect_eq("CRC-5 good frame", ok, 1);
        expect_eq("CRC-5 residue", crc5_q, 0);
        f[$urandom_range(0, f.size() - 1)] ^= 1'b1;
        feed(f);
        @(posedge clk);
        do_check(CRC_5, ok);
        expect_eq("CRC-5 corrupted frame", ok, 0);
      end
    end
    // no CRC: always valid
    do_check(CRC_NONE, ok);
    expect_eq("no CRC is valid", ok, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
