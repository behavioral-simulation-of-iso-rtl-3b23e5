// tb_gen2_tag -- end-to-end testbench of the whole tag, default parameters.
//
// A reader model sends PIE-coded commands on the envelope input (Tari = 16
// clocks, data-1 = 28, RTcal = 44, TRcal = 2 x RTcal on Query, PW = 6) and a
// backscatter-encoder model takes the reply bits, sometimes stalling
// (tx_ready low).  The run makes a full inventory and access: Select match
// and mismatch, Query with and without a TRcal, slot count-down with
// QueryRep, QueryAdjust, wrong and right ACK, NAK, Req_RN for the handle and
// for a cover code, Read (normal, whole bank and beyond the bank), Write,
// flag inversion at the end of the round, a truncated EPC reply, a frame
// with a corrupted CRC and one of wrong length.  Every reply is compared bit by bit with one built by
// the reference models, and each of these mechanisms must occur at least
// once.
module tb_gen2_tag;
  import gen2_pkg::*;
  import tb_gen2_pkg::*;
  localparam logic [95:0] EPC = 96'h3034_257B_F468_D480_0000_0001;
  localparam logic [63:0] TID = 64'hE200_1234_0000_0001;
  localparam int TARI = 16, D1 = 28, PW = 6, TRCAL = 88;

  logic clk = 1'b0, rst_n = 1'b0, env = 1'b1, tx_ready = 1'b1;
  logic tx_valid, tx_bit, tx_last, tx_done, link_dr, link_trext, sl, cmd_valid, crc_ok;
  logic [1:0] link_m;
  logic [15:0] rtcal_cnt, trcal_cnt, handle, slot;
  logic [3:0] inv_flag;
  tag_state_e state;
  cmd_e what_cmd;
  int checks = 0, failures = 0;

  gen2_tag dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // encoder model: takes bits, stalls at random when `stall` is set
  bitq_t rx;
  bit    stall = 1'b0;
  int    stalls = 0, bad_crc_frames = 0, bad_len_frames = 0;
  always @(posedge clk) begin
    if (tx_valid && tx_ready) rx.push_back(tx_bit);
    if (tx_valid && !tx_ready) stalls++;
    if (cmd_valid && !crc_ok) bad_crc_frames++;
    if (cmd_valid && what_cmd == CMD_INVALID) bad_len_frames++;
    tx_ready <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  task automatic symbol(input int len);
    env <= 1'b1;
    repeat (len - PW) @(posedge clk);
    env <= 1'b0;
    repeat (PW) @(posedge clk);
  endtask

  // send one command (preamble with TRcal for Query) and wait for the reply
  task automatic send(input bitq_t bits, input bit with_trcal = 1'b0);
    rx = {};
    env <= 1'b0;
    repeat (12) @(posedge clk);            // delimiter
    symbol(TARI);                          // data-0
    symbol(TARI + D1);                     // RTcal
    if (with_trcal) symbol(TRCAL);
    foreach (bits[i]) symbol(bits[i] ? D1 : TARI);
    env <= 1'b1;
    repeat (900) @(posedge clk);           // CW: frame end, then the reply
  endtask

  bit [15:0] lfsr = 16'hACE1;
  function automatic bit [15:0] next_rn();
    for (int i = 0; i < 16; i++) lfsr = lfsr[0] ? ((lfsr >> 1) ^ 16'hB400) : (lfsr >> 1);
    return lfsr;
  endfunction

  task automatic expect_reply(input string what, input bitq_t exp, input bit with_crc);
    if (with_crc) put_crc16(exp);
    expect_eq({what, ": reply length"}, rx.size(), exp.size());
    for (int i = 0; i < exp.size() && i < rx.size(); i++)
      if (rx[i] != exp[i]) begin
        expect_eq({what, ": reply bits"}, i, -1);
        break;
      end
    checks++;
  endtask

  // mechanism counters
  int n_sel_match, n_sel_mismatch, n_query_reply, n_countdown, n_qadj, n_ack,
      n_bad_ack, n_nak, n_handle, n_cover, n_read, n_read_all, n_read_err, n_write,
      n_invert, n_trunc;

  initial begin
    bitq_t e, f;
    bit [15:0] rn, h, cov;
    int reps;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);

    // Select on EPC word 0 of the UII bank: SL flag
    send(f_select(3'b100, 3'b000, 2'b01, 32, 16, 256'h3034, 1'b0));
    expect_eq("Select match", sl, 1); n_sel_match += sl;
    send(f_select(3'b100, 3'b000, 2'b01, 32, 16, 256'h3035, 1'b0));
    expect_eq("Select mismatch", sl, 0); n_sel_mismatch += !sl;
    send(f_select(3'b100, 3'b001, 2'b10, 0, 8, 256'hE2, 1'b0));
    expect_eq("Select on TID class", sl, 1); n_sel_match += sl;
    expect_eq("RTcal measured", rtcal_cnt, TARI + D1);

    // corrupted CRC: the Select is dropped
    f = f_select(3'b100, 3'b000, 2'b01, 32, 16, 256'h3035, 1'b0);
    f[30] ^= 1'b1;   // a mask bit
    send(f);
    expect_eq("corrupted Select ignored", sl, 1);
    // wrong length
    f = f_nak(); f.push_back(1'b1);
    send(f);

    // Query (SL, session 2, target A, Q = 0)
    stall = 1'b1;
    send(f_query(1'b0, 2'b00, 1'b0, 2'b11, 2'd2, 1'b0, 4'd0), 1'b1);
    rn = next_rn();
    expect_eq("TRcal measured", trcal_cnt, TRCAL);
    expect_eq("Query -> Reply", state, ST_REPLY);
    e = {}; put(e, rn, 16);
    expect_reply("RN16", e, 1'b0);
    n_query_reply++;

    send(f_ack(rn ^ 16'h0100));
    expect_eq("wrong ACK -> Arbitrate", state, ST_ARBITRATE); n_bad_ack++;

    // QueryAdjust keeps Q = 0 (UpDn 000): new slot 0, reply
    send(f_queryadj(2'd2, 3'b000));
    rn = next_rn();
    expect_eq("QueryAdjust -> Reply", state, ST_REPLY); n_qadj++;
    e = {}; put(e, rn, 16);
    expect_reply("RN16 after QueryAdjust", e, 1'b0);

    send(f_ack(rn));
    expect_eq("ACK -> Acknowledged", state, ST_ACKED); n_ack++;
    e = {}; put(e, 16'h3000, 16);
    for (int w = 0; w < 6; w++) put(e, 32'(EPC[95 - 16*w -: 16]), 16);
    expect_reply("PC/EPC", e, 1'b1);

    send(f_reqrn(rn));
    h = next_rn();
    expect_eq("Req_RN -> Secured", state, ST_SECURED); n_handle++;
    e = {}; put(e, h, 16);
    expect_reply("handle", e, 1'b1);

    send(f_read(2'b01, 2, 3, h));
    e = {}; put(e, 0, 1);
    for (int w = 0; w < 3; w++) put(e, 32'(EPC[95 - 16*w -: 16]), 16);
    put(e, h, 16);
    expect_reply("Read EPC", e, 1'b1); n_read++;

    send(f_read(2'b10, 0, 0, h));
    e = {}; put(e, 0, 1);
    for (int w = 0; w < 4; w++) put(e, 32'(TID[63 - 16*w -: 16]), 16);
    put(e, h, 16);
    expect_reply("Read TID bank", e, 1'b1); n_read_all++;

    send(f_read(2'b11, 200, 1, h));
    e = {}; put(e, 1, 1); put(e, 8'h03, 8); put(e, h, 16);
    expect_reply("Read overrun", e, 1'b1); n_read_err++;

    send(f_reqrn(h));
    cov = next_rn(); n_cover++;
    e = {}; put(e, cov, 16);
    expect_reply("cover code", e, 1'b1);
    send(f_write(2'b11, 5, 16'hCAFE ^ cov, h));
    e = {}; put(e, 0, 1); put(e, h, 16);
    expect_reply("Write", e, 1'b1); n_write++;
    send(f_read(2'b11, 5, 1, h));
    e = {}; put(e, 0, 1); put(e, 16'hCAFE, 16); put(e, h, 16);
    expect_reply("read back", e, 1'b1);

    // end of round: flag S2 -> B
    send(f_queryrep(2'd2));
    expect_eq("QueryRep -> Ready", state, ST_READY);
    expect_eq("S2 inverted", inv_flag[2], 1); n_invert += inv_flag[2];

    // new round for B tags, Q = 3: count down
    send(f_query(1'b1, 2'b01, 1'b0, 2'b00, 2'd2, 1'b1, 4'd3), 1'b1);
    rn = next_rn();
    expect_eq("slot = RN16 mod 8", slot, rn & 16'h7);
    reps = 0;
    while (state == ST_ARBITRATE && reps < 10) begin
      send(f_queryrep(2'd2));
      reps++;
      n_countdown++;
    end
    expect_eq("QueryReps until the slot", reps, rn & 16'h7);
    expect_eq("Reply at slot 0", state, ST_REPLY);
    if (reps > 0) begin
      rn = next_rn();
      e = {}; put(e, rn, 16);
      expect_reply("RN16 at slot 0", e, 1'b0);
    end else n_countdown++;
    send(f_nak());
    expect_eq("NAK -> Arbitrate", state, ST_ARBITRATE); n_nak++;

    // truncated reply: Select on the first 20 EPC bits with Truncate = 1,
    // Query on SL; the ACK returns 00000b and the remaining 76 EPC bits
    send(f_select(3'b100, 3'b000, 2'b01, 32, 20, 256'h30342, 1'b1));
    expect_eq("Select with truncation", sl, 1);
    send(f_query(1'b0, 2'b00, 1'b0, 2'b11, 2'd3, 1'b0, 4'd0), 1'b1);
    rn = next_rn();
    e = {}; put(e, rn, 16);
    expect_reply("RN16 before truncated reply", e, 1'b0);
    send(f_ack(rn));
    expect_eq("ACK -> Acknowledged (truncated)", state, ST_ACKED);
    e = {}; put(e, 0, 5);
    for (int i = 75; i >= 0; i--) e.push_back(EPC[i]);
    expect_reply("truncated PC/EPC", e, 1'b1); n_trunc++;

    // every mechanism must have happened
    expect_eq("Select match seen", n_sel_match > 0, 1);
    expect_eq("Select mismatch seen", n_sel_mismatch > 0, 1);
    expect_eq("CRC error seen", bad_crc_frames > 0, 1);
    expect_eq("invalid frame seen", bad_len_frames > 0, 1);
    expect_eq("encoder stall seen", stalls > 0, 1);
    expect_eq("count-down seen", n_countdown > 0, 1);
    expect_eq("mechanisms seen", n_query_reply * n_qadj * n_ack * n_bad_ack * n_nak *
              n_handle * n_cover * n_read * n_read_all * n_read_err * n_write * n_invert *
              n_trunc > 0, 1);
    $display("mechanisms: sel_match=%0d sel_mismatch=%0d crc_err=%0d bad_frame=%0d stall=%0d",
             n_sel_match, n_sel_mismatch, bad_crc_frames, bad_len_frames, stalls);
    $display("  query_reply=%0d countdown=%0d qadj=%0d ack=%0d bad_ack=%0d nak=%0d handle=%0d",
             n_query_reply, n_countdown, n_qadj, n_ack, n_bad_ack, n_nak, n_handle);
    $display("  cover=%0d read=%0d read_all=%0d read_err=%0d write=%0d invert=%0d trunc=%0d",
             n_cover, n_read, n_read_all, n_read_err, n_write, n_invert, n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
