// tb_anticollision -- inventory of a tag population with interference.
//
// NTAGS tags, each a gen2_tag with its own PRNG seed and EPC, listen to one
// shared PIE envelope.  A reader model inventories them with framed slotted
// ALOHA as Gen2 runs it:
//   * Query (session S1, target A, all tags) opens a frame of 2^Q slots and
//     QueryRep moves to the next slot;
//   * after every slot the reader looks at how many tags backscattered:
//     none is an empty slot, two or more a collision, one a single reply;
//   * a single reply is lost to interference with probability q (the first
//     single reply of a run always is, so the case is covered); otherwise
//     the reader ACKs the RN16 it heard and checks that the tag returns
//     PC, EPC and CRC-16;
//   * the Q algorithm keeps a real-valued Qfp (start 4): + C after a
//     collision, - C after an empty slot, clamped to 0..15; whenever
//     round(Qfp) differs from Q the reader sends QueryAdjust (Q + 1 or
//     Q - 1), which restarts the frame, and when a frame runs out it sends
//     a new Query with Q = round(Qfp).
// Tags that collided or were interfered with stay in the population and try
// again in the next frame; an identified tag leaves when its inventoried flag
// turns to B.  When every tag is read, one more Query must get no answer.
// The inventory is run for q = 1, 2, 15, 30 and 60 %, with a reset (all
// flags back to A) before each run.
//
// Checks: the number of tags that reply in a slot equals the number in state
// Reply; every RN16 reply is 16 bits; every EPC reply matches the tag's EPC
// with a correct CRC; no tag is identified twice; all tags are identified
// and end with flag B; empty, collided, interfered and successful slots each
// occur at least once in each run; q = 60 % needs more slots than q = 1 %.
// The slot counts are printed with the slot-time
// estimate 8 ms per identified tag, 1.9 ms per collided or interfered slot
// and 0.6 ms per empty slot.
module tb_anticollision;
  import gen2_pkg::*;
  import tb_gen2_pkg::*;
  localparam int  NTAGS = 100;
  localparam real C     = 0.3;       // Q-algorithm step
  localparam logic [15:0] EPC_WORDS_PC = 16'h3000;   // PC word: 6 EPC words
  localparam int  TARI = 16, D1 = 28, PW = 6, TRCAL = 88;

  logic clk = 1'b0, rst_n = 1'b0, env = 1'b1;
  logic       tx_valid [NTAGS];
  logic       tx_bit   [NTAGS];
  logic       tx_last  [NTAGS];
  logic       tx_done  [NTAGS];
  tag_state_e state    [NTAGS];
  logic [3:0] inv_flag [NTAGS];
  int checks = 0, failures = 0;

  function automatic logic [95:0] epc_of(int i);
    return {80'h3034_257B_F468_D480_0000, 16'(i + 1)};
  endfunction

  for (genvar i = 0; i < NTAGS; i++) begin : g_tag
    logic        link_dr, link_trext, sl, cmd_valid, crc_ok;
    logic [1:0]  link_m;
    logic [15:0] rtcal_cnt, trcal_cnt, handle, slot;
    cmd_e        what_cmd;
    gen2_tag #(.SEED(16'h1000 + 16'(i) * 16'h2F35), .EPC(epc_of(i))) u_tag (
      .clk, .rst_n, .env,
      .tx_ready (1'b1),
      .tx_valid (tx_valid[i]),
      .tx_bit   (tx_bit[i]),
      .tx_last  (tx_last[i]),
      .tx_done  (tx_done[i]),
      .link_dr, .link_m, .link_trext, .rtcal_cnt, .trcal_cnt,
      .state    (state[i]),
      .handle, .slot,
      .inv_flag (inv_flag[i]),
      .sl, .cmd_valid, .what_cmd, .crc_ok
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
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

  // what each tag backscattered since the last command
  bitq_t rx [NTAGS];
  always @(posedge clk)
    for (int i = 0; i < NTAGS; i++)
      if (tx_valid[i]) rx[i].push_back(tx_bit[i]);

  task automatic symbol(input int len);
    env <= 1'b1;
    repeat (len - PW) @(posedge clk);
    env <= 1'b0;
    repeat (PW) @(posedge clk);
  endtask

  task automatic send(input bitq_t bits, input bit with_trcal = 1'b0);
    for (int i = 0; i < NTAGS; i++) rx[i] = {};
    env <= 1'b0;
    repeat (12) @(posedge clk);
    symbol(TARI);
    symbol(TARI + D1);
    if (with_trcal) symbol(TRCAL);
    foreach (bits[i]) symbol(bits[i] ? D1 : TARI);
    env <= 1'b1;
    repeat (900) @(posedge clk);
  endtask

  function automatic bit [15:0] take16(bitq_t b);
    bit [15:0] v = '0;
    for (int k = 0; k < 16 && k < b.size(); k++) v[15 - k] = b[k];
    return v;
  endfunction

  bit identified [NTAGS];
  int n_ident = 0, n_qadj = 0, n_empty = 0, n_coll = 0, n_interf = 0, n_frames = 0, n_slots = 0;

  // one complete inventory of the population with interference qpct %
  task automatic run_inventory(input int qpct);
    real qfp;
    int  qv, slots_left, who, nrep, inrep;
    bitq_t e;
    bit [15:0] rn;
    bit first_single = 1'b1;
    for (int i = 0; i < NTAGS; i++) identified[i] = 1'b0;
    n_ident = 0; n_qadj = 0; n_empty = 0; n_coll = 0; n_interf = 0;
    n_frames = 0; n_slots = 0;
    qfp = 4.0;
    rst_n <= 1'b0;                         // new population: all flags A
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);

    while (n_ident < NTAGS && n_frames < 200) begin
      qv = int'(qfp + 0.5);
      if (qv > 15) qv = 15;
      n_frames++;
      slots_left = 1 << qv;
      send(f_query(1'b0, 2'b00, 1'b0, 2'b00, 2'd1, 1'b0, 4'(qv)), 1'b1);
      while (slots_left > 0 && n_ident < NTAGS) begin
        n_slots++;
        nrep = 0; inrep = 0; who = -1;
        for (int i = 0; i < NTAGS; i++) begin
          if (rx[i].size() != 0) begin
            nrep++;
            who = i;
            expect_eq("RN16 reply length", rx[i].size(), 16);
          end
          if (state[i] == ST_REPLY) inrep++;
        end
        expect_eq("repliers = tags in Reply", nrep, inrep);
        if (nrep == 0) begin
          n_empty++;
          qfp = (qfp - C < 0.0) ? 0.0 : qfp - C;
        end else if (nrep > 1) begin
          n_coll++;
          qfp = (qfp + C > 15.0) ? 15.0 : qfp + C;
        end else if (first_single || $urandom_range(0, 99) < qpct) begin
          first_single = 1'b0;
          n_interf++;                      // reply garbled: not acknowledged
        end else begin
          rn = take16(rx[who]);
          send(f_ack(rn));
          expect_eq("ACK -> Acknowledged", state[who], ST_ACKED);
          e = {}; put(e, 32'(EPC_WORDS_PC), 16);
          for (int w = 0; w < 6; w++) put(e, 32'(epc_of(who) >> (80 - 16*w)), 16);
          put_crc16(e);
          expect_eq("EPC reply length", rx[who].size(), e.size());
          expect_eq("EPC reply", rx[who] == e, 1);
          expect_eq("identified once", identified[who], 0);
          identified[who] = 1'b1;
          n_ident++;
        end
        // Q follows round(Qfp) through QueryAdjust; otherwise next slot
        if (n_ident < NTAGS && int'(qfp + 0.5) != qv) begin
          n_qadj++;
          if (int'(qfp + 0.5) > qv) begin
            qv++;
            send(f_queryadj(2'd1, 3'b110));
          end else begin
            qv--;
            send(f_queryadj(2'd1, 3'b011));
          end
          slots_left = 1 << qv;
        end else begin
          slots_left--;
          if (slots_left > 0 && n_ident < NTAGS) send(f_queryrep(2'd1));
        end
      end
    end

    // the reader's last frame: nobody may answer, every flag is B
    send(f_query(1'b0, 2'b00, 1'b0, 2'b00, 2'd1, 1'b0, 4'd0), 1'b1);
    for (int i = 0; i < NTAGS; i++) begin
      expect_eq("silent after inventory", rx[i].size(), 0);
      expect_eq("identified", identified[i], 1);
      expect_eq("flag S1 = B", inv_flag[i][1], 1);
    end

    $display("q = %0d%%: %0d tags in %0d slots (%0d Query, %0d QueryAdjust): identified %0d, collided %0d, empty %0d, interfered %0d; estimated time %0.1f ms",
             qpct, NTAGS, n_slots, n_frames, n_qadj, n_ident, n_coll, n_empty, n_interf,
             8.0 * n_ident + 1.9 * (n_coll + n_interf) + 0.6 * n_empty);
    expect_eq("collisions occurred", n_coll > 0, 1);
    expect_eq("empty slots occurred", n_empty > 0, 1);
    expect_eq("interference occurred", n_interf > 0, 1);
    expect_eq("Q adjusted", n_qadj > 0, 1);
    expect_eq("all tags identified", n_ident, NTAGS);
  endtask

  initial begin
    int qlist[5] = '{1, 2, 15, 30, 60};
    int slots_at[5];
    foreach (qlist[k]) begin
      run_inventory(qlist[k]);
      slots_at[k] = n_slots;
    end
    // much more interference must cost more slots (same seeds, same tags)
    expect_eq("q = 60% slower than q = 1%", slots_at[4] > slots_at[0], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
