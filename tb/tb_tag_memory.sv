// tb_tag_memory -- self-checking testbench of tag_memory.
//
// Checks the programmed contents after reset (passwords, StoredCRC computed
// by the reference CRC over PC and EPC, PC = EPC length, EPC, TID), the
// one-clock read latency, writes and read-back in every bank against a model,
// and the in_range flag at and beyond each bank's end.
module tb_tag_memory;
  import tb_gen2_pkg::*;
  localparam logic [95:0] EPC = 96'h3034_257B_F468_D480_0000_0001;
  localparam logic [63:0] TID = 64'hE200_1234_0000_0001;
  logic clk = 1'b0, rst_n = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [1:0] bank = 2'd0;
  logic [15:0] addr = 16'd0, wr_data = 16'd0;
  logic [15:0] rd_data;
  logic rd_valid, in_range;
  int checks = 0, failures = 0;
  int size [4] = '{4, 8, 4, 16};
  bit [15:0] model [4][16];

  tag_memory #(.KILL_PWD(32'h1111_2222), .ACCESS_PWD(32'h3333_4444)) dut (.*);

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

  task automatic rd(input int b, input int a, output bit [15:0] d);
    @(posedge clk) begin rd_en <= 1'b1; bank <= 2'(b); addr <= 16'(a); end
    @(posedge clk) rd_en <= 1'b0;
    #1 expect_eq("rd_valid one clock after rd_en", rd_valid, 1);
    d = rd_data;
  endtask

  initial begin
    bitq_t pcepc;
    bit [15:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    model[0][0] = 16'h1111; model[0][1] = 16'h2222;
    model[0][2] = 16'h3333; model[0][3] = 16'h4444;
    put(pcepc, 16'h3000, 16);
    for (int w = 0; w < 6; w++) put(pcepc, 32'(EPC[95 - 16*w -: 16]), 16);
    model[1][0] = ref_crc16(pcepc);
    model[1][1] = 16'h3000;
    for (int w = 0; w < 6; w++) model[1][2 + w] = EPC[95 - 16*w -: 16];
    for (int w = 0; w < 4; w++) model[2][w] = TID[63 - 16*w -: 16];
    for (int w = 0; w < 16; w++) model[3][w] = 16'h0000;

    for (int b = 0; b < 4; b++)
      for (int a = 0; a < size[b]; a++) begin
        rd(b, a, d);
        expect_eq($sformatf("default bank %0d word %0d", b, a), d, model[b][a]);
      end

    for (int t = 0; t < 100; t++) begin
      int b, a;
      bit [15:0] v;
      b = $urandom_range(0, 3);
      a = $urandom_range(0, size[b] + 2);
      v = 16'($urandom);
      @(posedge clk) begin wr_en <= 1'b1; bank <= 2'(b); addr <= 16'(a); wr_data <= v; end
      #1 expect_eq("in_range", in_range, a < size[b]);
      @(posedge clk) wr_en <= 1'b0;
      if (a < size[b]) model[b][a] = v;
      b = $urandom_range(0, 3);
      a = $urandom_range(0, size[b] - 1);
      rd(b, a, d);
      expect_eq("read back", d, model[b][a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
