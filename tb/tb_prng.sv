// tb_prng -- self-checking testbench of prng.
//
// Each request must be answered by rn16_done exactly 17 clocks later, with
// lfsr_out equal to a reference Galois LFSR (taps B400h) advanced 16 steps.
// Also checks the parallel load, the zero-seed guard, that requests made
// while busy are ignored, and that the sequence does not repeat within
// 4095 numbers (the register has period 65535).
module tb_prng;
  logic clk = 1'b0, rst_n = 1'b0;
  logic preset = 1'b0, rn16_flag = 1'b0;
  logic [15:0] seed = 16'h0000;
  logic [15:0] lfsr_out;
  logic rn16_done;
  int checks = 0, failures = 0;

  prng #(.SEED(16'hACE1)) dut (.*);

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

  function automatic bit [15:0] ref16(input bit [15:0] s);
    for (int i = 0; i < 16; i++) s = s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
    return s;
  endfunction

  bit [15:0] model;

  task automatic request(input bit extra_req);
    int lat;
    @(posedge clk) rn16_flag <= 1'b1;
    @(posedge clk) rn16_flag <= extra_req;
    lat = 1;
    while (!rn16_done) begin
      @(posedge clk) rn16_flag <= 1'b0;
      #1;
      lat++;
      if (lat > 40) break;
    end
    model = ref16(model);
    expect_eq("request latency", lat, 17);
    expect_eq("RN16 value", lfsr_out, model);
  endtask

  initial begin
    bit seen [bit [15:0]];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    #1 expect_eq("reset value is SEED", lfsr_out, 16'hACE1);
    model = 16'hACE1;
    for (int i = 0; i < 20; i++) request(i % 3 == 0);

    // parallel load
    @(posedge clk) begin preset <= 1'b1; seed <= 16'h1234; end
    @(posedge clk) preset <= 1'b0;
    #1 expect_eq("parallel load", lfsr_out, 16'h1234);
    model = 16'h1234;
    request(1'b0);
    @(posedge clk) begin preset <= 1'b1; seed <= 16'h0000; end
    @(posedge clk) preset <= 1'b0;
    #1 expect_eq("zero seed guard", lfsr_out, 16'h0001);
    model = 16'h0001;

    // no repeat within 4095 numbers
    for (int i = 0; i < 4095; i++) begin
      @(posedge clk) rn16_flag <= 1'b1;
      @(posedge clk) rn16_flag <= 1'b0;
      @(posedge rn16_done);
      #1;
      if (seen.exists(lfsr_out)) break;
      seen[lfsr_out] = 1'b1;
    end
    expect_eq("distinct numbers", seen.num(), 4095);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
