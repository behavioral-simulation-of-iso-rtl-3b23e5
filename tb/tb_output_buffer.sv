// tb_output_buffer -- self-checking testbench of output_buffer.
//
// Random replies made of 1..16-bit pieces are pushed while the encoder side
// stalls at random (tx_ready).  The bits taken must be the pieces in order,
// followed, when crc_en is set, by the complemented CRC-16 of those bits
// (reference CRC); tx_last must mark the final bit and done must follow.
// With tx_ready held high a 16-bit piece must leave at one bit per clock.
module tb_output_buffer;
  import gen2_pkg::*;
  import tb_gen2_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, crc_en = 1'b0, push_valid = 1'b0, push_last = 1'b0;
  logic [15:0] push_data = '0;
  logic [4:0] push_len = '0;
  logic push_ready, tx_ready = 1'b1, tx_valid, tx_bit, tx_last, busy, done;
  int checks = 0, failures = 0;

  output_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  bitq_t rx;
  int    last_seen, done_seen, first_tx, last_tx, cyc;
  bit    stall;
  always @(posedge clk) begin
    cyc++;
    if (tx_valid && tx_ready) begin
      if (rx.size() == 0) first_tx = cyc;
      last_tx = cyc;
      rx.push_back(tx_bit);
      if (tx_last) last_seen++;
    end
    if (done) done_seen++;
  end
  always @(posedge clk) tx_ready <= stall ? 1'($urandom) : 1'b1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      bitq_t sent;
      int pieces;
      bit use_crc;
      pieces = (t < 2) ? 1 : $urandom_range(1, 9);
      use_crc = (t % 3 != 0);
      stall = (t >= 4) && (t % 2 == 0);
      rx = {}; sent = {}; last_seen = 0; done_seen = 0;
      start <= 1'b1; crc_en <= use_crc;
      @(posedge clk);
      start <= 1'b0;
      for (int p = 0; p < pieces; p++) begin
        int len;
        bit [15:0] d;
        len = (t < 4) ? 16 : $urandom_range(1, 16);
        d = 16'($urandom);
        for (int i = 0; i < len; i++) sent.push_back(d[15 - i]);
        push_valid <= 1'b1; push_data <= d; push_len <= 5'(len);
        push_last <= (p == pieces - 1);
        // accepted at the first rising edge that finds push_ready high
        forever begin
          @(negedge clk);
          if (push_ready) break;
        end
        @(posedge clk);
      end
      push_valid <= 1'b0;
      while (busy) @(posedge clk);
      @(posedge clk);
      if (use_crc) put_crc16(sent);
      expect_eq("reply length", rx.size(), sent.size());
      for (int i = 0; i < sent.size() && i < rx.size(); i++)
        expect_eq($sformatf("reply bit %0d", i), rx[i], sent[i]);
      expect_eq("tx_last once", last_seen, 1);
      expect_eq("done once", done_seen, 1);
      if (t == 1) expect_eq("one bit per clock for one 16-bit piece",
                            last_tx - first_tx + 1, use_crc ? 33 : 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
