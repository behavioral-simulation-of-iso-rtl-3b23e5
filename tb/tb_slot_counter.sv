// tb_slot_counter -- self-checking testbench of slot_counter.
//
// Random Q and RN16: after a load the slot must be RN16 mod 2^Q, then count
// down by one per dec, wrap from 0 to 7FFFh, pulse slot_done for one cycle
// one clock after every update, and raise slot_zero exactly at zero.
module tb_slot_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, dec = 1'b0;
  logic [3:0] q_value_in = 4'd0;
  logic [15:0] rn_16_in = 16'd0;
  logic [15:0] slot_value_out;
  logic slot_done, slot_zero;
  int checks = 0, failures = 0;

  slot_counter dut (.*);

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

  initial begin
    longint exp;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 60; t++) begin
      int qv, rn;
      qv = (t < 16) ? t : $urandom_range(0, 15);
      rn = $urandom_range(0, 65535);
      @(posedge clk) begin load <= 1'b1; q_value_in <= 4'(qv); rn_16_in <= 16'(rn); end
      @(posedge clk) load <= 1'b0;
      #1;
      exp = rn % (1 << qv);
      expect_eq("slot = RN16 mod 2^Q", slot_value_out, exp);
      expect_eq("slot_done after load", slot_done, 1);
      expect_eq("slot_zero", slot_zero, exp == 0);
      for (int d = 0; d < 3; d++) begin
        @(posedge clk) dec <= 1'b1;
        @(posedge clk) dec <= 1'b0;
        #1;
        exp = (exp == 0) ? 16'h7FFF : exp - 1;
        expect_eq("count down", slot_value_out, exp);
        expect_eq("slot_done after dec", slot_done, 1);
        expect_eq("slot_zero after dec", slot_zero, exp == 0);
        @(posedge clk) #1 expect_eq("slot_done is one cycle", slot_done, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
