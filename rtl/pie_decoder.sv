// pie_decoder -- Pulse-Interval-Encoding decoder for the reader-to-tag link.
//
// Input is the demodulated envelope of the reader's carrier (1 = carrier on),
// sampled on the tag clock.  Every PIE symbol is a high interval followed by
// a short low pulse, so the decoder measures each symbol as the number of
// clocks between two rising edges of the envelope.  A frame starts with a
// preamble or frame-sync: delimiter (low), data-0 (one Tari), RTcal and, in
// the preamble of a Query only, TRcal.
//
//   * the rising edge that ends the delimiter starts the frame;
//   * the next symbol is data-0 and is skipped;
//   * the next one is RTcal: its length is stored and halved into the pivot;
//     frame_start pulses here;
//   * the first symbol after RTcal is TRcal if it is longer than RTcal (its
//     length goes to trcal_cnt and trcal_seen is set), otherwise a data bit;
//   * every further symbol is a data bit: 0 if it is no longer than the
//     pivot, 1 if longer; it is output for one clock on bit_valid/bit_data;
//   * the frame ends when the envelope stays high for more than 4 x RTcal
//     after the last rising edge (no symbol is that long, TRcal being at most
//     3 x RTcal): frame_end pulses.  A preamble that stalls just as long is
//     abandoned without frame_end.
//
// The RTcal/2 pivot rule and the preamble layout follow the design; the
// edge-to-edge measurement, the 4 x RTcal end-of-frame timeout, the two-flop
// input synchronizer and the absence of a check on the delimiter's length are
// this design's own choices.  Latency: a bit is output three clocks after the
// rising edge that ends it.  CNT_W bounds the longest symbol, in clocks.
module pie_decoder #(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             env,          // demodulated envelope
  output logic             frame_start,  // RTcal measured, data follows
  output logic             bit_valid,
  output logic             bit_data,
  output logic             frame_end,
  output logic [CNT_W-1:0] rtcal_cnt,
  output logic [CNT_W-1:0] trcal_cnt,
  output logic             trcal_seen
);

  typedef enum logic [2:0] {S_IDLE, S_DATA0, S_RTCAL, S_FIRST, S_DATA} state_e;

  state_e           state;
  logic [2:0]       sync;
  logic             rise;
  logic [CNT_W-1:0] cnt;        // clocks since the last rising edge
  logic [CNT_W+1:0] timeout;

  assign rise    = sync[1] & ~sync[2];
  assign timeout = {2'b00, rtcal_cnt} << 2;

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= 3'b111;
    else        sync <= {sync[1:0], env};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      rtcal_cnt   <= '0;
      trcal_cnt   <= '0;
      trcal_seen  <= 1'b0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      bit_valid   <= 1'b0;
      bit_data    <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
      bit_valid   <= 1'b0;
      if (rise) cnt <= CNT_W'(1);
      else if (cnt != '1) cnt <= cnt + 1'b1;

      unique case (state)
        S_IDLE:
          if (rise) state <= S_DATA0;
        S_DATA0:
          if (rise) state <= S_RTCAL;
          else if (cnt == '1) state <= S_IDLE;
        S_RTCAL:
          if (rise) begin
            rtcal_cnt   <= cnt;
            trcal_seen  <= 1'b0;
            frame_start <= 1'b1;
            state       <= S_FIRST;
          end else if (cnt == '1) state <= S_IDLE;
        S_FIRST, S_DATA:
          if (rise) begin
            if (state == S_FIRST && cnt > rtcal_cnt) begin
              trcal_cnt  <= cnt;
              trcal_seen <= 1'b1;
            end else begin
              bit_valid <= 1'b1;
              bit_data  <= (cnt > (rtcal_cnt >> 1));
            end
            state <= S_DATA;
          end else if ({2'b00, cnt} > timeout || cnt == '1) begin
            if (sync[1]) begin
              frame_end <= (state == S_DATA);
              state     <= S_IDLE;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
