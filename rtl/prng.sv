// prng -- 16-bit pseudo-random number generator (RN16 source) of the tag.
//
// A 16-bit linear feedback shift register with a clock enable and a parallel
// load, as the design describes.  `preset` loads `seed` in parallel (a zero
// seed, which would lock the register, is replaced by 0001h).  A pulse on
// `rn16_flag` enables the register for 16 clocks, so that every requested
// number is made of 16 fresh bits rather than the previous number shifted by
// one; on the clock after the 16th shift `rn16_done` pulses for one cycle
// and `lfsr_out` holds the new RN16 until the next request.  A request that
// arrives while a number is being made is ignored.
//
// The LFSR, enable and parallel load follow the design; the polynomial
// (x^16+x^14+x^13+x^11+1, a maximal-length one, Galois form) and the 16-step
// request are this design's own choices.
module prng #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        preset,     // parallel load of seed
  input  logic [15:0] seed,
  input  logic        rn16_flag,  // request a new RN16
  output logic [15:0] lfsr_out,   // current RN16
  output logic        rn16_done   // one-cycle pulse: lfsr_out is new
);

  localparam logic [15:0] TAPS = 16'hB400;

  logic [4:0] steps;   // shifts still to do for the current request
  logic       busy;

  function automatic logic [15:0] lfsr_step(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ TAPS) : (s >> 1);
  endfunction

  assign busy = (steps != 5'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr_out  <= (SEED == 16'h0) ? 16'h0001 : SEED;
      steps     <= 5'd0;
      rn16_done <= 1'b0;
    end else begin
      rn16_done <= 1'b0;
      if (preset) begin
        lfsr_out <= (seed == 16'h0) ? 16'h0001 : seed;
        steps    <= 5'd0;
      end else if (busy) begin
        lfsr_out <= lfsr_step(lfsr_out);
        steps    <= steps - 5'd1;
        if (steps == 5'd1) rn16_done <= 1'b1;
      end else if (rn16_flag) begin
        steps <= 5'd16;
      end
    end
  end

endmodule
