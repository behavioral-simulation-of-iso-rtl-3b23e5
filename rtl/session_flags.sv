// session_flags -- inventoried flags of the four sessions and the SL flag.
//
// Each of the sessions S0..S3 has an inventoried flag that is A (stored as
// 0) or B (stored as 1); the selected flag SL is either asserted (1) or not.
// Keeping one flag per session lets up to four readers inventory the same tag
// population independently.
//
// select_apply (one cycle) applies a Select command: `sel_target` names the
// flag (000..011 inventoried S0..S3, 100 SL, 101..111 reserved: no change),
// `action` the Gen2 action and `match` whether the tag's memory matched the
// mask.  Per action, for a matching / non-matching tag:
//   000 assert / deassert     001 assert / -        010 - / deassert
//   011 negate / -            100 deassert / assert 101 deassert / -
//   110 - / assert            111 - / negate
// where "assert" sets SL or sets the inventoried flag to A, "deassert" clears
// SL or sets the flag to B, and "negate" toggles.
// `invert` (one cycle) toggles the inventoried flag of `inv_session`; the FSM
// uses it when a singulated tag leaves the inventory round.  Select wins if
// both arrive in the same cycle.
//
// The Select field encodings follow the design's Select table and the Gen2
// action table it refers to.  All flags reset to A / deasserted; the flags'
// persistence times after power loss are not modelled.
module session_flags (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       select_apply,
  input  logic [2:0] sel_target,
  input  logic [2:0] action,
  input  logic       match,
  input  logic       invert,
  input  logic [1:0] inv_session,
  output logic [3:0] inv_flag,    // 0 = A, 1 = B, one bit per session
  output logic       sl
);

  typedef enum logic [1:0] {OP_NONE, OP_ASSERT, OP_DEASSERT, OP_NEGATE} op_e;

  op_e op;

  always_comb begin
    op = OP_NONE;
    unique case (action)
      3'b000: op = match ? OP_ASSERT   : OP_DEASSERT;
      3'b001: op = match ? OP_ASSERT   : OP_NONE;
      3'b010: op = match ? OP_NONE     : OP_DEASSERT;
      3'b011: op = match ? OP_NEGATE   : OP_NONE;
      3'b100: op = match ? OP_DEASSERT : OP_ASSERT;
      3'b101: op = match ? OP_DEASSERT : OP_NONE;
      3'b110: op = match ? OP_NONE     : OP_ASSERT;
      3'b111: op = match ? OP_NONE     : OP_NEGATE;
      default: op = OP_NONE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inv_flag <= 4'b0000;
      sl       <= 1'b0;
    end else if (select_apply) begin
      if (sel_target == 3'b100) begin
        unique case (op)
          OP_ASSERT:   sl <= 1'b1;
          OP_DEASSERT: sl <= 1'b0;
          OP_NEGATE:   sl <= ~sl;
          default:     ;
        endcase
      end else if (!sel_target[2]) begin
        unique case (op)
          OP_ASSERT:   inv_flag[sel_target[1:0]] <= 1'b0;
          OP_DEASSERT: inv_flag[sel_target[1:0]] <= 1'b1;
          OP_NEGATE:   inv_flag[sel_target[1:0]] <= ~inv_flag[sel_target[1:0]];
          default:     ;
        endcase
      end
    end else if (invert) begin
      inv_flag[inv_session] <= ~inv_flag[inv_session];
    end
  end

endmodule
