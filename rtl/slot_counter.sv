// slot_counter -- slot counter of the tag's anti-collision logic.
//
// On `load` the counter takes Slot = RN16 mod 2^Q, i.e. the Q low bits of
// rn_16_in, Q being the exponent from Query or QueryAdjust (0..15).  On `dec`
// (a QueryRep of the tag's session) it counts down by one.  Counting down from
// zero wraps to 7FFFh, the value a tag takes when it was allowed to reply but
// was not acknowledged, so that it waits for the next round.  One clock after
// a load or a decrement `slot_done` pulses for one cycle to tell the FSM the
// new value is ready; `slot_zero` is high while the counter is zero (the tag's
// turn to reply).
//
// Equation (1) of the design and the port names come from the design; the
// 7FFFh wrap is the Gen2 rule; the one-cycle done pulse is this design's
// own timing.
module slot_counter (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [3:0]  q_value_in,
  input  logic [15:0] rn_16_in,
  input  logic        dec,
  output logic [15:0] slot_value_out,
  output logic        slot_done,
  output logic        slot_zero
);

  logic [15:0] qmask;
  assign qmask     = 16'((32'd1 << q_value_in) - 32'd1);
  assign slot_zero = (slot_value_out == 16'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot_value_out <= 16'h7FFF;
      slot_done      <= 1'b0;
    end else begin
      slot_done <= 1'b0;
      if (load) begin
        slot_value_out <= rn_16_in & qmask;
        slot_done      <= 1'b1;
      end else if (dec) begin
        slot_value_out <= slot_zero ? 16'h7FFF : slot_value_out - 16'd1;
        slot_done      <= 1'b1;
      end
    end
  end

endmodule
