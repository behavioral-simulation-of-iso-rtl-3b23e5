// tb_input_buffer -- self-checking testbench of input_buffer.
//
// Shifts random frames in (with idle gaps between bits) and compares q and
// bit_len_out with a reference vector; checks clear, and that bits beyond the
// buffer's capacity are dropped and raise overflow.  Uses a 40-bit buffer so
// that the overflow case is short.
module tb_input_buffer;
  localparam int BUF_BITS = 40;
  localparam int LEN_W = $clog2(BUF_BITS + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, bit_valid = 1'b0, bit_data = 1'b0;
  logic [BUF_BITS-1:0] q;
  logic [LEN_W-1:0] bit_len_out;
  logic overflow;
  int checks = 0, failures = 0;

  input_buffer #(.BUF_BITS(BUF_BITS)) dut (.*);

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
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 30; t++) begin
      int n;
      bit [BUF_BITS-1:0] ref_q;
      n = (t == 0) ? BUF_BITS + 5 : $urandom_range(1, BUF_BITS);
      ref_q = '0;
      @(posedge clk) clear <= 1'b1;
      @(posedge clk) clear <= 1'b0;
      for (int i = 0; i < n;) begin
        bit b, v;
        b = 1'($urandom);
        v = ($urandom_range(0, 2) != 0);
        bit_valid <= v; bit_data <= b;
        @(posedge clk);
        if (v) begin
          if (i < BUF_BITS) ref_q = {ref_q[BUF_BITS-2:0], b};
          i++;
        end
      end
      bit_valid <= 1'b0;
      @(posedge clk);
      #1;
      expect_eq("buffer contents", longint'(q), longint'(ref_q));
      expect_eq("bit count", bit_len_out, (n > BUF_BITS) ? BUF_BITS : n);
      expect_eq("overflow", overflow, n > BUF_BITS);
    end
    @(posedge clk) clear <= 1'b1;
    @(posedge clk) clear <= 1'b0;
    #1 expect_eq("clear", {q, bit_len_out, overflow}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
