// tb_session_flags -- self-checking testbench of session_flags.
//
// Random Select applications against a model written from the Gen2 action
// table (as strings "match/non-match"), plus flag inversions per session and
// the reserved targets that must change nothing.
module tb_session_flags;
  logic clk = 1'b0, rst_n = 1'b0;
  logic select_apply = 1'b0, match = 1'b0, invert = 1'b0;
  logic [2:0] sel_target = 3'd0, action = 3'd0;
  logic [1:0] inv_session = 2'd0;
  logic [3:0] inv_flag;
  logic sl;
  int checks = 0, failures = 0;

  session_flags dut (.*);

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

  // A = assert (SL=1, flag=A), D = deassert (SL=0, flag=B), N = negate, - = nothing
  string table_m [8] = '{"A", "A", "-", "N", "D", "D", "-", "-"};
  string table_n [8] = '{"D", "-", "D", "-", "A", "-", "A", "N"};

  bit [3:0] m_inv;   // 1 = B
  bit       m_sl;

  function automatic bit apply(input string op, input bit v, input bit is_sl);
    if (op == "A") return is_sl ? 1'b1 : 1'b0;
    if (op == "D") return is_sl ? 1'b0 : 1'b1;
    if (op == "N") return ~v;
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk) #1;
    m_inv = '0; m_sl = 1'b0;
    expect_eq("reset flags", {inv_flag, sl}, 0);
    for (int t = 0; t < 400; t++) begin
      if ($urandom_range(0, 3) == 0) begin
        int s;
        s = $urandom_range(0, 3);
        @(posedge clk) begin invert <= 1'b1; inv_session <= 2'(s); end
        @(posedge clk) invert <= 1'b0;
        m_inv[s] = ~m_inv[s];
      end else begin
        int tg, ac;
        bit mt;
        string op;
        tg = $urandom_range(0, 7);
        ac = $urandom_range(0, 7);
        mt = 1'($urandom);
        @(posedge clk) begin
          select_apply <= 1'b1; sel_target <= 3'(tg); action <= 3'(ac); match <= mt;
        end
        @(posedge clk) select_apply <= 1'b0;
        op = mt ? table_m[ac] : table_n[ac];
        if (tg < 4) m_inv[tg] = apply(op, m_inv[tg], 1'b0);
        else if (tg == 4) m_sl = apply(op, m_sl, 1'b1);
      end
      #1;
      expect_eq("inventoried flags", inv_flag, m_inv);
      expect_eq("SL flag", sl, m_sl);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
