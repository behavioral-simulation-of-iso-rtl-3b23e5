// gen2_tag -- digital identification layer of an EPC Class-1 Gen-2 UHF tag.
//
// Everything between the RF front end and the backscatter encoder:
//
//   env -> pie_decoder -> input_buffer -> cmd_detector --+--> tag_fsm
//                      \-> crc_engine (receive check) ---/      |
//        tag_fsm <-> slot_counter, session_flags, prng, tag_memory
//        tag_fsm -> output_buffer -> tx_bit / tx_valid (to the encoder)
//
// The command detection part (input buffer, CRC engine, command detector)
// turns the bits the PIE decoder recovers into a command record and a CRC
// verdict; the control unit (FSM, slot counter, session flags) runs the Gen2
// inventory and access protocol; the response part (PRNG, memory, output
// buffer) produces the reply, which leaves one bit per clock while the
// encoder holds tx_ready high.
//
// Interface: `env` is the demodulated envelope sampled on `clk`; the PIE
// symbol lengths are measured in `clk` cycles, so clk must be several times
// faster than 1/Tari.  The link parameters the encoder needs (DR, M, TRext
// from the last Query, and the measured RTcal and TRcal in clocks) are
// outputs.  state, handle, slot, the flags and cmd_valid / what_cmd are
// status outputs.  A command's reply starts a few tens of clocks after its
// frame end (plus 17 clocks when a new RN16 is made); the T1 turnaround
// time is left to the encoder.  rst_n is an active-low reset, synchronous in
// every block.
//
// The block structure (command detection, control unit, response module with
// eight sub-modules) follows the design.  The RF front end and the FM0 /
// Miller encoder lie outside this module.
module gen2_tag
  import gen2_pkg::*;
#(
  parameter int               CNT_W      = 16,
  parameter int               BUF_BITS   = 352,
  parameter logic [15:0]      SEED       = 16'hACE1,
  parameter int               RES_WORDS  = 4,
  parameter int               EPC_WORDS  = 6,
  parameter int               TID_WORDS  = 4,
  parameter int               USER_WORDS = 16,
  parameter logic [31:0]      KILL_PWD   = 32'h0000_0000,
  parameter logic [31:0]      ACCESS_PWD = 32'h0000_0000,
  parameter logic [EPC_WORDS*16-1:0] EPC = 96'h3034_257B_F468_D480_0000_0001,
  parameter logic [TID_WORDS*16-1:0] TID = 64'hE200_1234_0000_0001
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             env,
  // to the backscatter encoder
  input  logic             tx_ready,
  output logic             tx_valid,
  output logic             tx_bit,
  output logic             tx_last,
  output logic             tx_done,
  output logic             link_dr,
  output logic [1:0]       link_m,
  output logic             link_trext,
  output logic [CNT_W-1:0] rtcal_cnt,
  output logic [CNT_W-1:0] trcal_cnt,
  // status
  output tag_state_e       state,
  output logic [15:0]      handle,
  output logic [15:0]      slot,
  output logic [3:0]       inv_flag,
  output logic             sl,
  output logic             cmd_valid,
  output cmd_e             what_cmd,
  output logic             crc_ok
);

  localparam int LEN_W = $clog2(BUF_BITS + 1);

  // PIE decoder
  logic frame_start, bit_valid, bit_data, frame_end, trcal_seen;
  // input buffer
  logic [BUF_BITS-1:0] q;
  logic [LEN_W-1:0]    bit_len;
  logic                overflow;
  // command detector / CRC
  crc_sel_e    crc_sel;
  cmd_fields_t fields;
  logic        fields_valid, crc_valid;
  logic [15:0] rx_crc16;
  logic [4:0]  rx_crc5;
  // PRNG / slot counter
  logic        rn16_req, rn16_done;
  logic [15:0] rn16;
  logic        slot_load, slot_dec, slot_zero, slot_done;
  logic [3:0]  slot_q;
  // session flags
  logic        select_apply, sel_match, flag_invert;
  logic [2:0]  sel_target, sel_action;
  logic [1:0]  flag_session;
  // memory
  logic        mem_rd_en, mem_wr_en, mem_rd_valid, mem_in_range;
  logic [1:0]  mem_bank;
  logic [15:0] mem_addr, mem_wr_data, mem_rd_data;
  // output buffer
  logic        ob_start, ob_crc_en, ob_push_valid, ob_push_last, ob_push_ready, ob_busy;
  logic [15:0] ob_push_data;
  logic [4:0]  ob_push_len;

  pie_decoder #(.CNT_W(CNT_W)) u_pie (
    .clk, .rst_n, .env,
    .frame_start, .bit_valid, .bit_data, .frame_end,
    .rtcal_cnt, .trcal_cnt, .trcal_seen
  );

  input_buffer #(.BUF_BITS(BUF_BITS)) u_inbuf (
    .clk, .rst_n,
    .clear       (frame_start),
    .bit_valid, .bit_data,
    .q,
    .bit_len_out (bit_len),
    .overflow
  );

  crc_engine u_rx_crc (
    .clk, .rst_n,
    .init      (frame_start),
    .bit_valid,
    .bit_in    (bit_data),
    .check     (frame_end),
    .crc_sel,
    .crc_valid,
    .crc16_q   (rx_crc16),
    .crc5_q    (rx_crc5)
  );

  cmd_detector #(.BUF_BITS(BUF_BITS)) u_det (
    .clk, .rst_n,
    .decode  (frame_end),
    .q, .bit_len, .overflow,
    .crc_sel, .fields, .fields_valid
  );

  prng #(.SEED(SEED)) u_prng (
    .clk, .rst_n,
    .preset    (1'b0),
    .seed      (SEED),
    .rn16_flag (rn16_req),
    .lfsr_out  (rn16),
    .rn16_done
  );

  slot_counter u_slot (
    .clk, .rst_n,
    .load           (slot_load),
    .q_value_in     (slot_q),
    .rn_16_in       (rn16),
    .dec            (slot_dec),
    .slot_value_out (slot),
    .slot_done,
    .slot_zero
  );

  session_flags u_flags (
    .clk, .rst_n,
    .select_apply,
    .sel_target,
    .action      (sel_action),
    .match       (sel_match),
    .invert      (flag_invert),
    .inv_session (flag_session),
    .inv_flag,
    .sl
  );

  tag_memory #(
    .RES_WORDS (RES_WORDS), .EPC_WORDS (EPC_WORDS), .TID_WORDS (TID_WORDS),
    .USER_WORDS(USER_WORDS), .KILL_PWD (KILL_PWD), .ACCESS_PWD(ACCESS_PWD),
    .EPC       (EPC), .TID (TID)
  ) u_mem (
    .clk, .rst_n,
    .rd_en    (mem_rd_en),
    .wr_en    (mem_wr_en),
    .bank     (mem_bank),
    .addr     (mem_addr),
    .wr_data  (mem_wr_data),
    .rd_data  (mem_rd_data),
    .rd_valid (mem_rd_valid),
    .in_range (mem_in_range)
  );

  output_buffer u_outbuf (
    .clk, .rst_n,
    .start      (ob_start),
    .crc_en     (ob_crc_en),
    .push_valid (ob_push_valid),
    .push_data  (ob_push_data),
    .push_len   (ob_push_len),
    .push_last  (ob_push_last),
    .push_ready (ob_push_ready),
    .tx_ready, .tx_valid, .tx_bit, .tx_last,
    .busy       (ob_busy),
    .done       (tx_done)
  );

  tag_fsm u_fsm (
    .clk, .rst_n,
    .fields, .fields_valid, .crc_valid,
    .rn16_req, .rn16, .rn16_done,
    .slot_load, .slot_dec, .slot_q, .slot_zero, .slot_done,
    .select_apply, .sel_target, .sel_action, .sel_match,
    .flag_invert, .flag_session, .inv_flag, .sl,
    .mem_rd_en, .mem_wr_en, .mem_bank, .mem_addr, .mem_wr_data,
    .mem_rd_data, .mem_rd_valid, .mem_in_range,
    .ob_start, .ob_crc_en, .ob_push_valid, .ob_push_data, .ob_push_len,
    .ob_push_last, .ob_push_ready,
    .state, .handle, .link_dr, .link_m, .link_trext
  );

  assign cmd_valid = fields_valid;
  assign what_cmd  = fields.cmd;
  assign crc_ok    = crc_valid;

endmodule
