// input_buffer -- collects the bits of one reader command.
//
// A BUF_BITS-long serial-in shift register and a bit counter.  `clear`
// (frame start) empties it; every bit_valid shifts bit_data in at the least
// significant end, so after n bits the first bit received (the command code's
// MSB) sits at q[n-1] and the last one at q[0].  bit_len_out counts the bits.
// Bits beyond BUF_BITS are dropped and raise `overflow` until the next clear,
// so a longer frame can be rejected.
//
// The 352-bit register q[351:0] and the 9-bit bit_len_out are the sizes the
// design's command-detection waveforms show; the overflow flag is this
// design's own.  A bit is stored on the clock edge where bit_valid is high.
module input_buffer #(
  parameter int BUF_BITS = 352,
  parameter int LEN_W    = $clog2(BUF_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                bit_valid,
  input  logic                bit_data,
  output logic [BUF_BITS-1:0] q,
  output logic [LEN_W-1:0]    bit_len_out,
  output logic                overflow
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q           <= '0;
      bit_len_out <= '0;
      overflow    <= 1'b0;
    end else if (clear) begin
      q           <= '0;
      bit_len_out <= '0;
      overflow    <= 1'b0;
    end else if (bit_valid) begin
      if (bit_len_out == LEN_W'(BUF_BITS)) overflow <= 1'b1;
      else begin
        q           <= {q[BUF_BITS-2:0], bit_data};
        bit_len_out <= bit_len_out + 1'b1;
      end
    end
  end

endmodule
