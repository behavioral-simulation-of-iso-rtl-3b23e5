// output_buffer -- serializes a tag reply for the physical-layer encoder.
//
// The FSM opens a reply with `start` (crc_en: append a CRC-16), then pushes
// it in pieces of 1 to 16 bits: push_data is left aligned (its MSB leaves
// first) and push_len gives the piece's length; push_last marks the final
// piece.  A piece is accepted when push_valid and push_ready are both high.
// The buffer holds one piece in a holding register and one in the shift
// register, so the FSM can fetch the next memory word while the current one
// is being sent.
//
// One bit leaves per clock, on the rising edge where tx_valid and tx_ready
// are both high: tx_ready lets the encoder, which runs at the backscatter
// link rate, hold the buffer.  With crc_en the transmitted bits also run
// through a CRC engine and, after the last piece, the ones' complement of the
// CRC-16 follows, MSB first (one idle clock between data and CRC).  tx_last
// marks the final bit, and `done` pulses on the clock after it has left.
//
// Bit-by-bit output on each rising clock edge follows the design; the push
// interface, the ready handshake and the CRC append are this design's own.
module output_buffer
  import gen2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        crc_en,
  input  logic        push_valid,
  input  logic [15:0] push_data,
  input  logic [4:0]  push_len,
  input  logic        push_last,
  output logic        push_ready,
  input  logic        tx_ready,
  output logic        tx_valid,
  output logic        tx_bit,
  output logic        tx_last,
  output logic        busy,
  output logic        done
);

  typedef enum logic [1:0] {O_IDLE, O_DATA, O_CRCLOAD, O_CRC} ostate_e;

  ostate_e     state;
  logic        use_crc;
  logic [15:0] hold_data;
  logic [4:0]  hold_len;
  logic        hold_last, hold_full;
  logic [15:0] sh_data;
  logic [4:0]  sh_cnt;
  logic        sh_last;
  logic        fire;
  logic [15:0] crc16_q;
  logic [4:0]  crc5_unused;
  logic        crc_valid_unused;

  assign busy       = (state != O_IDLE);
  assign push_ready = (state == O_DATA) && !hold_full;
  assign tx_valid   = (state == O_DATA || state == O_CRC) && sh_cnt != 5'd0;
  assign tx_bit     = sh_data[15];
  assign tx_last    = tx_valid && sh_cnt == 5'd1 &&
                      (state == O_CRC || (sh_last && !use_crc));
  assign fire       = tx_valid && tx_ready;

  crc_engine u_crc (
    .clk       (clk),
    .rst_n     (rst_n),
    .init      (start),
    .bit_valid (fire && state == O_DATA),
    .bit_in    (tx_bit),
    .check     (1'b0),
    .crc_sel   (CRC_NONE),
    .crc_valid (crc_valid_unused),
    .crc16_q   (crc16_q),
    .crc5_q    (crc5_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= O_IDLE;
      use_crc   <= 1'b0;
      hold_data <= '0;
      hold_len  <= '0;
      hold_last <= 1'b0;
      hold_full <= 1'b0;
      sh_data   <= '0;
      sh_cnt    <= '0;
      sh_last   <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        O_IDLE:
          if (start) begin
            state     <= O_DATA;
            use_crc   <= crc_en;
            hold_full <= 1'b0;
            sh_cnt    <= '0;
            sh_last   <= 1'b0;
          end
        O_DATA: begin
          // shift register: send a bit, or refill it from the holding register
          if (fire) begin
            sh_data <= {sh_data[14:0], 1'b0};
            sh_cnt  <= sh_cnt - 5'd1;
            if (sh_cnt == 5'd1 && sh_last) begin
              if (use_crc) state <= O_CRCLOAD;
              else begin
                state <= O_IDLE;
                done  <= 1'b1;
              end
            end
          end else if (sh_cnt == 5'd0 && hold_full) begin
            sh_data   <= hold_data;
            sh_cnt    <= hold_len;
            sh_last   <= hold_last;
            hold_full <= 1'b0;
          end
          if (push_valid && push_ready) begin
            hold_data <= push_data;
            hold_len  <= (push_len == 5'd0 || push_len > 5'd16) ? 5'd16 : push_len;
            hold_last <= push_last;
            hold_full <= 1'b1;
          end
        end
        O_CRCLOAD: begin
          sh_data <= ~crc16_q;
          sh_cnt  <= 5'd16;
          state   <= O_CRC;
        end
        O_CRC:
          if (fire) begin
            sh_data <= {sh_data[14:0], 1'b0};
            sh_cnt  <= sh_cnt - 5'd1;
            if (sh_cnt == 5'd1) begin
              state <= O_IDLE;
              done  <= 1'b1;
            end
          end
        default: state <= O_IDLE;
      endcase
    end
  end

endmodule
