// tb_tag_fsm -- self-checking testbench of tag_fsm.
//
// The FSM runs with the real PRNG, slot counter, session flags, memory and
// output buffer around it; decoded commands are applied directly as field
// records.  Reference models: the LFSR (to predict every RN16), the CRC-16,
// the memory contents and the Gen2 state rules.  The test walks a tag
// through Select (match and mismatch), Query with Q=0 and Q=4, QueryRep
// count-down, QueryAdjust, ACK (wrong and right RN16), NAK, Req_RN,
// Read (words, whole bank, beyond the bank), Write with cover coding, flag
// inversion at the end of a round, and a command whose CRC failed.
module tb_tag_fsm;
  import gen2_pkg::*;
  import tb_gen2_pkg::*;
  localparam logic [95:0] EPC = 96'h3034_257B_F468_D480_0000_0001;
  localparam logic [63:0] TID = 64'hE200_1234_0000_0001;

  logic clk = 1'b0, rst_n = 1'b0;
  cmd_fields_t fields = '0;
  logic fields_valid = 1'b0, crc_valid = 1'b0;
  logic rn16_req, rn16_done, slot_load, slot_dec, slot_zero, slot_done;
  logic [15:0] rn16, slot_value;
  logic [3:0] slot_q, inv_flag;
  logic select_apply, sel_match, flag_invert, sl;
  logic [2:0] sel_target, sel_action;
  logic [1:0] flag_session, mem_bank;
  logic mem_rd_en, mem_wr_en, mem_rd_valid, mem_in_range;
  logic [15:0] mem_addr, mem_wr_data, mem_rd_data;
  logic ob_start, ob_crc_en, ob_push_valid, ob_push_last, ob_push_ready;
  logic [15:0] ob_push_data;
  logic [4:0] ob_push_len;
  logic tx_valid, tx_bit, tx_last, ob_busy, tx_done;
  tag_state_e state;
  logic [15:0] handle;
  logic link_dr, link_trext;
  logic [1:0] link_m;
  int checks = 0, failures = 0;

  tag_fsm dut (.*);
  prng #(.SEED(16'hACE1)) u_prng (.clk, .rst_n, .preset(1'b0), .seed(16'h0),
    .rn16_flag(rn16_req), .lfsr_out(rn16), .rn16_done);
  slot_counter u_slot (.clk, .rst_n, .load(slot_load), .q_value_in(slot_q),
    .rn_16_in(rn16), .dec(slot_dec), .slot_value_out(slot_value), .slot_done, .slot_zero);
  session_flags u_flags (.clk, .rst_n, .select_apply, .sel_target, .action(sel_action),
    .match(sel_match), .invert(flag_invert), .inv_session(flag_session), .inv_flag, .sl);
  tag_memory u_mem (.clk, .rst_n, .rd_en(mem_rd_en), .wr_en(mem_wr_en), .bank(mem_bank),
    .addr(mem_addr), .wr_data(mem_wr_data), .rd_data(mem_rd_data), .rd_valid(mem_rd_valid),
    .in_range(mem_in_range));
  output_buffer u_ob (.clk, .rst_n, .start(ob_start), .crc_en(ob_crc_en),
    .push_valid(ob_push_valid), .push_data(ob_push_data), .push_len(ob_push_len),
    .push_last(ob_push_last), .push_ready(ob_push_ready), .tx_ready(1'b1), .tx_valid,
    .tx_bit, .tx_last, .busy(ob_busy), .done(tx_done));

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

  bitq_t rx;
  always @(posedge clk) if (tx_valid) rx.push_back(tx_bit);

  bit [15:0] lfsr = 16'hACE1;
  function automatic bit [15:0] next_rn();
    for (int i = 0; i < 16; i++) lfsr = lfsr[0] ? ((lfsr >> 1) ^ 16'hB400) : (lfsr >> 1);
    return lfsr;
  endfunction

  task automatic issue(input cmd_fields_t f, input bit crc_ok = 1'b1);
    rx = {};
    fields <= f; fields_valid <= 1'b1; crc_valid <= crc_ok;
    @(posedge clk);
    fields_valid <= 1'b0; crc_valid <= 1'b0;
    repeat (700) @(posedge clk);
  endtask

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

  function automatic cmd_fields_t c_query(bit [1:0] sel, bit [1:0] ses, bit tgt, bit [3:0] qv);
    cmd_fields_t f = '0;
    f.cmd = CMD_QUERY; f.sel = sel; f.session = ses; f.target = tgt; f.q = qv;
    f.dr = 1'b1; f.m = 2'b10;
    return f;
  endfunction
  function automatic cmd_fields_t c_simple(cmd_e c, bit [1:0] ses = 0, bit [15:0] rn = 0);
    cmd_fields_t f = '0;
    f.cmd = c; f.session = ses; f.rn = rn;
    return f;
  endfunction
  function automatic cmd_fields_t c_read(bit [1:0] bank, int ptr, int cnt, bit [15:0] rn);
    cmd_fields_t f = '0;
    f.cmd = CMD_READ; f.membank = bank; f.pointer = 24'(ptr); f.length = 8'(cnt); f.rn = rn;
    return f;
  endfunction

  initial begin
    cmd_fields_t f;
    bitq_t e;
    bit [15:0] rn, h, cov;
    int slot, reps;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Select: SL on EPC word 0 (bit address 32 of the UII bank)
    f = '0; f.cmd = CMD_SELECT; f.sel_target = 3'b100; f.action = 3'b000;
    f.membank = BANK_UII; f.pointer = 24'd32; f.length = 8'd16; f.mask = 256'h3034;
    issue(f);
    expect_eq("Select match asserts SL", sl, 1);
    f.mask = 256'h3035;
    issue(f);
    expect_eq("Select mismatch deasserts SL", sl, 0);
    f.pointer = 24'd36; f.length = 8'd12; f.mask = 256'h034;
    issue(f);
    expect_eq("Select unaligned match", sl, 1);
    expect_eq("state after Select", state, ST_READY);

    // Query for SL tags, session 1, target A, Q = 0: reply at once
    issue(c_query(2'b11, 2'd1, 1'b0, 4'd0));
    rn = next_rn();
    expect_eq("Query Q=0 -> Reply", state, ST_REPLY);
    e = {}; put(e, rn, 16);
    expect_reply("RN16 reply", e, 1'b0);
    expect_eq("link DR/M", {link_dr, link_m}, 3'b110);

    // wrong ACK: back to Arbitrate
    issue(c_simple(CMD_ACK, 0, rn ^ 16'h1));
    expect_eq("wrong ACK -> Arbitrate", state, ST_ARBITRATE);
    expect_eq("wrong ACK: no reply", rx.size(), 0);

    // bad CRC is ignored
    issue(c_query(2'b11, 2'd1, 1'b0, 4'd0), 1'b0);
    expect_eq("bad CRC ignored", state, ST_ARBITRATE);

    issue(c_query(2'b11, 2'd1, 1'b0, 4'd0));
    rn = next_rn();
    expect_eq("Query again -> Reply", state, ST_REPLY);

    // right ACK: PC + EPC + CRC
    issue(c_simple(CMD_ACK, 0, rn));
    expect_eq("ACK -> Acknowledged", state, ST_ACKED);
    e = {}; put(e, 16'h3000, 16);
    for (int w = 0; w < 6; w++) put(e, 32'(EPC[95 - 16*w -: 16]), 16);
    expect_reply("PC/EPC reply", e, 1'b1);

    // Req_RN: handle, then Secured (access password 0)
    issue(c_simple(CMD_REQRN, 0, rn));
    h = next_rn();
    expect_eq("Req_RN -> Secured", state, ST_SECURED);
    expect_eq("handle", handle, h);
    e = {}; put(e, h, 16);
    expect_reply("handle reply", e, 1'b1);

    // Read two EPC words
    issue(c_read(BANK_UII, 2, 2, h));
    e = {}; put(e, 0, 1); put(e, 32'(EPC[95 -: 16]), 16); put(e, 32'(EPC[79 -: 16]), 16);
    put(e, h, 16);
    expect_reply("Read reply", e, 1'b1);

    // Read with a wrong handle: ignored
    issue(c_read(BANK_UII, 2, 2, h ^ 16'h8000));
    expect_eq("Read wrong handle: no reply", rx.size(), 0);

    // Read whole TID bank (WordCount 0)
    issue(c_read(BANK_TID, 0, 0, h));
    e = {}; put(e, 0, 1);
    for (int w = 0; w < 4; w++) put(e, 32'(TID[63 - 16*w -: 16]), 16);
    put(e, h, 16);
    expect_reply("Read whole bank", e, 1'b1);

    // Read beyond the bank: error reply
    issue(c_read(BANK_TID, 3, 4, h));
    e = {}; put(e, 1, 1); put(e, ERR_MEM_OVERRUN, 8); put(e, h, 16);
    expect_reply("Read overrun error", e, 1'b1);

    // Req_RN in Secured: cover code; Write user word 3; read it back
    issue(c_simple(CMD_REQRN, 0, h));
    cov = next_rn();
    e = {}; put(e, cov, 16);
    expect_reply("cover-code reply", e, 1'b1);
    f = '0; f.cmd = CMD_WRITE; f.membank = BANK_USER; f.pointer = 24'd3;
    f.data = 16'hBEEF ^ cov; f.rn = h;
    issue(f);
    e = {}; put(e, 0, 1); put(e, h, 16);
    expect_reply("Write reply", e, 1'b1);
    issue(c_read(BANK_USER, 3, 1, h));
    e = {}; put(e, 0, 1); put(e, 16'hBEEF, 16); put(e, h, 16);
    expect_reply("read back written word", e, 1'b1);

    // QueryRep of the session: inventoried flag S1 A->B, Ready
    issue(c_simple(CMD_QUERYREP, 2'd1));
    expect_eq("QueryRep after access -> Ready", state, ST_READY);
    expect_eq("S1 flag inverted to B", inv_flag[1], 1);

    // Query target A no longer matches
    issue(c_query(2'b00, 2'd1, 1'b0, 4'd0));
    expect_eq("inventoried tag ignores target A", state, ST_READY);
    expect_eq("no reply", rx.size(), 0);

    // Query target B with Q = 4: count down with QueryRep
    issue(c_query(2'b00, 2'd1, 1'b1, 4'd4));
    rn = next_rn();
    slot = rn & 16'hF;
    expect_eq("slot = RN16 mod 16", slot_value, slot);
    reps = 0;
    while (state == ST_ARBITRATE && reps < 20) begin
      issue(c_simple(CMD_QUERYREP, 2'd1));
      reps++;
    end
    expect_eq("replies after slot QueryReps", reps, slot);
    rn = next_rn();
    e = {}; put(e, rn, 16);
    expect_reply("RN16 at slot 0", e, 1'b0);
    // QueryRep of another session is ignored
    issue(c_simple(CMD_QUERYREP, 2'd2));
    expect_eq("other session ignored", state, ST_REPLY);
    // NAK -> Arbitrate
    issue(c_simple(CMD_NAK));
    expect_eq("NAK -> Arbitrate", state, ST_ARBITRATE);
    // QueryAdjust up: Q = 5, new slot
    f = c_simple(CMD_QUERYADJ, 2'd1); f.updn = 3'b110;
    issue(f);
    rn = next_rn();
    expect_eq("QueryAdjust slot = RN16 mod 32", slot_value, rn & 16'h1F);
    expect_eq("QueryAdjust state", state, ((rn & 16'h1F) == 0) ? ST_REPLY : ST_ARBITRATE);
    // QueryRep in Reply without ACK: wraps to 7FFF
    f = c_simple(CMD_QUERYADJ, 2'd1); f.updn = 3'b011;
    for (int k = 0; k < 40 && state != ST_REPLY; k++) begin
      issue(f);
      rn = next_rn();
    end
    expect_eq("QueryAdjust down reaches Reply", state, ST_REPLY);
    issue(c_simple(CMD_QUERYREP, 2'd1));
    expect_eq("unanswered Reply -> Arbitrate", state, ST_ARBITRATE);
    expect_eq("slot wraps to 7FFF", slot_value, 16'h7FFF);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
