// tag_fsm -- control unit of the tag: the Gen2 tag state machine.
//
// Takes each decoded command (fields + fields_valid, with crc_valid arriving
// on the same clock) and moves the tag through the Gen2 states Ready,
// Arbitrate, Reply, Acknowledged, Open and Secured, driving the other blocks:
//
//   Select      compares Length mask bits with memory (bit address Pointer
//               of MemBank, one bit per two clocks) and tells the session
//               flags block to apply Action to Target; the tag goes to Ready.
//   Query       if the tag was singulated in the same session, first inverts its
//               inventoried flag; then, if Sel (SL flag) and Target
//               (inventoried flag of Session) match, asks the PRNG for an
//               RN16, loads the slot counter with RN16 mod 2^Q and goes to
//               Reply (slot 0: backscatters that RN16) or Arbitrate.
//   QueryRep    Arbitrate: counts the slot down, at 0 replies with a new RN16.
//               Reply: no ACK came, back to Arbitrate (slot wraps to 7FFFh).
//               Acknowledged/Open/Secured: inverts the flag, goes to Ready.
//   QueryAdjust Arbitrate/Reply: Q+1 (UpDn 110), Q-1 (011) or same (000),
//               then a new slot as for Query.  Singulated: as QueryRep.
//   ACK         with the right RN16: Reply -> Acknowledged, backscatters
//               PC, EPC and CRC-16 (also again from Acknowledged/Open/
//               Secured).  With a wrong RN16: back to Arbitrate.
//               Truncated reply: when the last Select had Truncate = 1 on
//               the UII bank and the Query selected on SL (Sel = 11), the
//               reply is 00000b, the EPC bits that follow the Select mask,
//               and a CRC-16 over those bits.
//   NAK         Reply/Acknowledged/Open/Secured -> Arbitrate.
//   Req_RN      Acknowledged: new RN16 becomes the handle, backscattered with
//               CRC-16; then Secured if the access password is zero, else
//               Open.  Open/Secured: a new RN16 (the cover code for Write).
//   Read        Open/Secured, right handle: header 0, WordCount words from
//               WordPtr of MemBank (0 = to the end of the bank), handle,
//               CRC-16; beyond the bank: header 1, error 03h, handle, CRC-16.
//   Write       Open/Secured, right handle: writes Data XOR cover code, then
//               header 0, handle, CRC-16 (or the error reply).
//
// Commands whose CRC fails, whose session differs from the current round's
// or that do not apply to the present state are ignored.  Replies go to the
// output buffer piece by piece; memory words are fetched while the previous
// piece is being sent.  Session is remembered from the Query that opened the
// round, together with DR, M and TRext, which are offered to the
// physical-layer encoder (link_*).
//
// The states and the inventory commands follow the design and the Gen2
// protocol it implements.  Kill, Lock, Access, BlockWrite and BlockErase,
// the Killed state, the reply timing T1/T2 and the flags'
// persistence are not built; ignoring invalid commands in every state is this
// design's simplification.
module tag_fsm
  import gen2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // command detection
  input  cmd_fields_t fields,
  input  logic        fields_valid,
  input  logic        crc_valid,
  // PRNG
  output logic        rn16_req,
  input  logic [15:0] rn16,
  input  logic        rn16_done,
  // slot counter
  output logic        slot_load,
  output logic        slot_dec,
  output logic [3:0]  slot_q,
  input  logic        slot_zero,
  input  logic        slot_done,
  // session flags
  output logic        select_apply,
  output logic [2:0]  sel_target,
  output logic [2:0]  sel_action,
  output logic        sel_match,
  output logic        flag_invert,
  output logic [1:0]  flag_session,
  input  logic [3:0]  inv_flag,
  input  logic        sl,
  // memory
  output logic        mem_rd_en,
  output logic        mem_wr_en,
  output logic [1:0]  mem_bank,
  output logic [15:0] mem_addr,
  output logic [15:0] mem_wr_data,
  input  logic [15:0] mem_rd_data,
  input  logic        mem_rd_valid,
  input  logic        mem_in_range,
  // output buffer
  output logic        ob_start,
  output logic        ob_crc_en,
  output logic        ob_push_valid,
  output logic [15:0] ob_push_data,
  output logic [4:0]  ob_push_len,
  output logic        ob_push_last,
  input  logic        ob_push_ready,
  // status and link parameters
  output tag_state_e  state,
  output logic [15:0] handle,
  output logic        link_dr,
  output logic [1:0]  link_m,
  output logic        link_trext
);

  typedef enum logic [4:0] {
    PH_IDLE, PH_SEL_RD, PH_SEL_CMP, PH_SEL_APPLY, PH_Q_SYNC, PH_Q_EVAL, PH_RN_WAIT,
    PH_SLOT_WAIT, PH_OB_START, PH_SEQ, PH_PUSH, PH_MEM_RD, PH_MEM_WAIT,
    PH_RD_SIZE, PH_RD_CHECK, PH_WR, PH_PW_RD, PH_PW_WAIT
  } phase_e;

  typedef enum logic [2:0] {R_RN, R_RN_CRC, R_READ, R_WRITE, R_ERR, R_ACK} reply_e;

  // what to do once a new RN16 is there
  typedef enum logic [1:0] {N_SLOT, N_REPLY, N_HANDLE, N_COVER} rnuse_e;

  phase_e      phase;
  cmd_fields_t cmd;
  logic [1:0]  session;
  logic [3:0]  q_cur;
  logic [15:0] cover_rn;
  reply_e      kind;
  rnuse_e      rn_use;
  logic [3:0]  step;
  logic [15:0] words_left;
  logic [15:0] maddr;
  logic [1:0]  mbank;
  logic [7:0]  sel_idx;
  logic        match_r;
  logic [15:0] p_data;
  logic [4:0]  p_len;
  logic        p_last;
  logic        after_pw;     // after the reply: read the access password
  logic        pw_nonzero;
  logic [15:0] reply_rn;
  logic        trunc_sel;    // last Select asked for truncation (UII bank)
  logic [15:0] trunc_bit;    // UII bit address just after that Select's mask
  logic        trunc_act;    // this round's Query selected on SL: truncate
  logic        tr_first;     // next EPC word is the first, partial one

  logic        singulated;
  logic        handle_ok;
  logic [23:0] sel_bit;
  logic        sel_mask_bit;
  logic        q_match;

  assign singulated   = (state == ST_ACKED || state == ST_OPEN || state == ST_SECURED);
  assign handle_ok    = (fields.rn == handle);
  assign sel_bit      = cmd.pointer + 24'(sel_idx);
  assign sel_mask_bit = cmd.mask[cmd.length - 8'd1 - sel_idx];
  assign q_match      = (cmd.sel[1] ? (sl == cmd.sel[0]) : 1'b1) &&
                        (inv_flag[cmd.session] == cmd.target);

  assign sel_target   = cmd.sel_target;
  assign sel_action   = cmd.action;
  assign sel_match    = match_r;
  assign slot_q       = q_cur;
  assign mem_bank     = mbank;
  assign mem_addr     = maddr;
  assign mem_wr_data  = cmd.data ^ cover_rn;
  assign ob_push_data = p_data;
  assign ob_push_len  = p_len;
  assign ob_push_last = p_last;
  assign ob_push_valid = (phase == PH_PUSH);

  always_comb begin
    ob_crc_en = (kind != R_RN);
  end

  // memory strobes and one-cycle requests are combinational on the phase
  always_comb begin
    mem_rd_en    = 1'b0;
    mem_wr_en    = 1'b0;
    select_apply = (phase == PH_SEL_APPLY);
    ob_start     = (phase == PH_OB_START);
    unique case (phase)
      PH_SEL_RD, PH_MEM_RD, PH_PW_RD: mem_rd_en = mem_in_range;
      PH_WR:                          mem_wr_en = mem_in_range;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      state       <= ST_READY;
      cmd         <= '0;
      session     <= 2'd0;
      q_cur       <= 4'd0;
      handle      <= 16'd0;
      cover_rn       <= 16'd0;
      kind        <= R_RN;
      rn_use      <= N_SLOT;
      step        <= 4'd0;
      words_left  <= 16'd0;
      maddr       <= 16'd0;
      mbank       <= 2'd0;
      sel_idx     <= 8'd0;
      match_r     <= 1'b0;
      p_data      <= 16'd0;
      p_len       <= 5'd0;
      p_last      <= 1'b0;
      after_pw    <= 1'b0;
      pw_nonzero  <= 1'b0;
      reply_rn    <= 16'd0;
      trunc_sel   <= 1'b0;
      trunc_bit   <= 16'd0;
      trunc_act   <= 1'b0;
      tr_first    <= 1'b0;
      rn16_req    <= 1'b0;
      slot_load   <= 1'b0;
      slot_dec    <= 1'b0;
      flag_invert <= 1'b0;
      flag_session <= 2'd0;
      link_dr     <= 1'b0;
      link_m      <= 2'd0;
      link_trext  <= 1'b0;
    end else begin
      rn16_req    <= 1'b0;
      slot_load   <= 1'b0;
      slot_dec    <= 1'b0;
      flag_invert <= 1'b0;

      unique case (phase)
        // ------------------------------------------------------------------
        PH_IDLE:
          if (fields_valid && crc_valid) begin
            cmd <= fields;
            unique case (fields.cmd)
              CMD_SELECT: begin
                state     <= ST_READY;
                sel_idx   <= 8'd0;
                mbank     <= fields.membank;
                trunc_sel <= fields.truncate && fields.membank == BANK_UII &&
                             fields.pointer[23:16] == 8'd0;
                trunc_bit <= fields.pointer[15:0] + {8'd0, fields.length};
                if (fields.membank == BANK_RESERVED) phase <= PH_IDLE;
                else if (fields.length == 8'd0) begin
                  match_r <= 1'b1;
                  phase   <= PH_SEL_APPLY;
                end else begin
                  maddr <= 16'(fields.pointer >> 4);
                  phase <= (fields.pointer[23:20] == 4'd0) ? PH_SEL_RD : PH_SEL_APPLY;
                  match_r <= 1'b0;
                end
              end
              CMD_QUERY: begin
                if (singulated && fields.session == session) begin
                  flag_invert  <= 1'b1;
                  flag_session <= session;
                end
                session    <= fields.session;
                trunc_act  <= trunc_sel && fields.sel == 2'b11;
                q_cur      <= fields.q;
                link_dr    <= fields.dr;
                link_m     <= fields.m;
                link_trext <= fields.trext;
                phase      <= PH_Q_SYNC;
              end
              CMD_QUERYREP:
                if (fields.session == session) begin
                  if (state == ST_ARBITRATE) begin
                    slot_dec <= 1'b1;
                    phase    <= PH_SLOT_WAIT;
                  end else if (state == ST_REPLY) begin
                    slot_dec <= 1'b1;
                    state    <= ST_ARBITRATE;
                  end else if (singulated) begin
                    flag_invert  <= 1'b1;
                    flag_session <= session;
                    state        <= ST_READY;
                  end
                end
              CMD_QUERYADJ:
                if (fields.session == session) begin
                  if (state == ST_ARBITRATE || state == ST_REPLY) begin
                    if (fields.updn == 3'b110 || fields.updn == 3'b011 ||
                        fields.updn == 3'b000) begin
                      if (fields.updn == 3'b110 && q_cur != 4'd15) q_cur <= q_cur + 4'd1;
                      if (fields.updn == 3'b011 && q_cur != 4'd0)  q_cur <= q_cur - 4'd1;
                      rn16_req <= 1'b1;
                      rn_use   <= N_SLOT;
                      phase    <= PH_RN_WAIT;
                    end
                  end else if (singulated) begin
                    flag_invert  <= 1'b1;
                    flag_session <= session;
                    state        <= ST_READY;
                  end
                end
              CMD_ACK:
                if (state == ST_REPLY || singulated) begin
                  if (handle_ok) begin
                    if (state == ST_REPLY) state <= ST_ACKED;
                    kind  <= R_ACK;
                    step  <= 4'd0;
                    phase <= PH_OB_START;
                  end else state <= ST_ARBITRATE;
                end
              CMD_NAK:
                if (state == ST_REPLY || singulated) state <= ST_ARBITRATE;
              CMD_REQRN:
                if (state == ST_ACKED) begin
                  if (handle_ok) begin
                    rn16_req <= 1'b1;
                    rn_use   <= N_HANDLE;
                    phase    <= PH_RN_WAIT;
                  end else state <= ST_ARBITRATE;
                end else if ((state == ST_OPEN || state == ST_SECURED) && handle_ok) begin
                  rn16_req <= 1'b1;
                  rn_use   <= N_COVER;
                  phase    <= PH_RN_WAIT;
                end
              CMD_READ:
                if ((state == ST_OPEN || state == ST_SECURED) && handle_ok) begin
                  mbank      <= fields.membank;
                  maddr      <= fields.pointer[15:0];
                  words_left <= {8'd0, fields.length};
                  step       <= 4'd0;
                  if (fields.pointer[23:16] != 8'd0) begin
                    kind  <= R_ERR;
                    phase <= PH_OB_START;
                  end else if (fields.length == 8'd0) phase <= PH_RD_SIZE;
                  else begin
                    // check the last word of the range first
                    maddr <= fields.pointer[15:0] + 16'(fields.length) - 16'd1;
                    phase <= PH_RD_CHECK;
                  end
                end
              CMD_WRITE:
                if ((state == ST_OPEN || state == ST_SECURED) && handle_ok) begin
                  mbank <= fields.membank;
                  maddr <= fields.pointer[15:0];
                  step  <= 4'd0;
                  if (fields.pointer[23:16] != 8'd0) begin
                    kind  <= R_ERR;
                    phase <= PH_OB_START;
                  end else phase <= PH_WR;
                end
              default: ;
            endcase
          end

        // ------------------------------------------------------------------
        // Select: compare mask bit sel_idx with memory bit pointer+sel_idx
        PH_SEL_RD:
          if (!mem_in_range) begin
            match_r <= 1'b0;
            phase   <= PH_SEL_APPLY;
          end else phase <= PH_SEL_CMP;
        PH_SEL_CMP:
          if (mem_rd_valid) begin
            if (mem_rd_data[4'd15 - sel_bit[3:0]] != sel_mask_bit) begin
              match_r <= 1'b0;
              phase   <= PH_SEL_APPLY;
            end else if (sel_idx == cmd.length - 8'd1) begin
              match_r <= 1'b1;
              phase   <= PH_SEL_APPLY;
            end else begin
              sel_idx <= sel_idx + 8'd1;
              maddr   <= 16'((sel_bit + 24'd1) >> 4);
              phase   <= ((sel_bit + 24'd1) >> 20 != 24'd0) ? PH_SEL_APPLY : PH_SEL_RD;
            end
          end
        PH_SEL_APPLY:
          phase <= PH_IDLE;

        // ------------------------------------------------------------------
        // Query: wait for a flag inversion to land, then decide whether the
        // tag takes part in this round
        PH_Q_SYNC:
          phase <= PH_Q_EVAL;
        PH_Q_EVAL:
          if (q_match) begin
            rn16_req <= 1'b1;
            rn_use   <= N_SLOT;
            phase    <= PH_RN_WAIT;
          end else begin
            state <= ST_READY;
            phase <= PH_IDLE;
          end

        PH_RN_WAIT:
          if (rn16_done) begin
            unique case (rn_use)
              N_SLOT: begin
                slot_load <= 1'b1;
                reply_rn  <= rn16;
                phase     <= PH_SLOT_WAIT;
              end
              N_REPLY: begin
                reply_rn <= rn16;
                handle   <= rn16;
                state    <= ST_REPLY;
                kind     <= R_RN;
                phase    <= PH_OB_START;
              end
              N_HANDLE: begin
                reply_rn <= rn16;
                handle   <= rn16;
                kind     <= R_RN_CRC;
                after_pw <= 1'b1;
                phase    <= PH_OB_START;
              end
              default: begin // N_COVER
                reply_rn <= rn16;
                cover_rn    <= rn16;
                kind     <= R_RN_CRC;
                phase    <= PH_OB_START;
              end
            endcase
          end

        // after a slot load (Query / QueryAdjust) or a count-down (QueryRep)
        PH_SLOT_WAIT:
          if (slot_done) begin
            if (!slot_zero) begin
              state <= ST_ARBITRATE;
              phase <= PH_IDLE;
            end else if (cmd.cmd == CMD_QUERYREP) begin
              rn16_req <= 1'b1;
              rn_use   <= N_REPLY;
              phase    <= PH_RN_WAIT;
            end else begin
              handle <= reply_rn;
              state  <= ST_REPLY;
              kind   <= R_RN;
              phase  <= PH_OB_START;
            end
          end

        // ------------------------------------------------------------------
        // Read: find the end of the bank (WordCount 0) or check the range
        PH_RD_SIZE:
          if (mem_in_range) begin
            maddr      <= maddr + 16'd1;
            words_left <= words_left + 16'd1;
          end else begin
            maddr <= cmd.pointer[15:0];
            kind  <= (words_left == 16'd0) ? R_ERR : R_READ;
            phase <= PH_OB_START;
          end
        PH_RD_CHECK: begin
          kind  <= mem_in_range ? R_READ : R_ERR;
          maddr <= cmd.pointer[15:0];
          phase <= PH_OB_START;
        end

        PH_WR: begin
          kind  <= mem_in_range ? R_WRITE : R_ERR;
          phase <= PH_OB_START;
        end

        // ------------------------------------------------------------------
        // Reply sequencer
        PH_OB_START: begin
          step  <= 4'd0;
          phase <= PH_SEQ;
        end

        PH_SEQ: begin
          if (step != 4'hF) step <= step + 4'd1;
          phase <= PH_PUSH;
          unique case (kind)
            R_RN, R_RN_CRC: begin
              p_data <= reply_rn; p_len <= 5'd16; p_last <= 1'b1;
            end
            R_ERR:
              if (step == 4'd0) begin
                p_data <= 16'h8000; p_len <= 5'd1; p_last <= 1'b0;
              end else if (step == 4'd1) begin
                p_data <= {ERR_MEM_OVERRUN, 8'h00}; p_len <= 5'd8; p_last <= 1'b0;
              end else begin
                p_data <= handle; p_len <= 5'd16; p_last <= 1'b1;
              end
            R_WRITE:
              if (step == 4'd0) begin
                p_data <= 16'h0000; p_len <= 5'd1; p_last <= 1'b0;
              end else begin
                p_data <= handle; p_len <= 5'd16; p_last <= 1'b1;
              end
            R_READ:
              if (step == 4'd0) begin
                p_data <= 16'h0000; p_len <= 5'd1; p_last <= 1'b0;
              end else if (words_left != 16'd0) begin
                phase <= PH_MEM_RD;
              end else begin
                p_data <= handle; p_len <= 5'd16; p_last <= 1'b1;
              end
            default: // R_ACK: PC word, then as many EPC words as PC says
              if (step == 4'd0) begin
                mbank <= BANK_UII;
                maddr <= 16'd1;
                phase <= PH_MEM_RD;
              end else if (words_left != 16'd0) begin
                phase <= PH_MEM_RD;
              end else phase <= PH_IDLE;
          endcase
        end

        PH_MEM_RD:
          phase <= PH_MEM_WAIT;
        PH_MEM_WAIT:
          if (mem_rd_valid) begin
            p_data <= mem_rd_data;
            p_len  <= 5'd16;
            maddr  <= maddr + 16'd1;
            phase  <= PH_PUSH;
            if (kind == R_ACK && step == 4'd1 && trunc_act) begin
              // truncated reply: 00000b, then the EPC from trunc_bit on
              tr_first   <= 1'b1;
              maddr      <= trunc_bit >> 4;
              words_left <= (trunc_bit >> 4) < 16'd2 + {11'd0, mem_rd_data[15:11]} ?
                            16'd2 + {11'd0, mem_rd_data[15:11]} - (trunc_bit >> 4) : 16'd0;
              p_data     <= 16'h0000;
              p_len      <= 5'd5;
              p_last     <= (trunc_bit >> 4) >= 16'd2 + {11'd0, mem_rd_data[15:11]};
            end else if (kind == R_ACK && step == 4'd1) begin
              // PC word: its top five bits give the EPC length in words
              words_left <= {11'd0, mem_rd_data[15:11]};
              p_last     <= (mem_rd_data[15:11] == 5'd0);
            end else if (tr_first) begin
              // first truncated word: drop the bits the mask covered
              tr_first   <= 1'b0;
              p_data     <= mem_rd_data << trunc_bit[3:0];
              p_len      <= 5'd16 - {1'b0, trunc_bit[3:0]};
              words_left <= words_left - 16'd1;
              p_last     <= (words_left == 16'd1);
            end else begin
              words_left <= words_left - 16'd1;
              p_last     <= (kind == R_ACK) && (words_left == 16'd1);
            end
          end

        PH_PUSH:
          if (ob_push_ready) begin
            if (p_last) begin
              if (after_pw) begin
                after_pw <= 1'b0;
                mbank    <= BANK_RESERVED;
                maddr    <= 16'd2;
                pw_nonzero <= 1'b0;
                phase    <= PH_PW_RD;
              end else phase <= PH_IDLE;
            end else phase <= PH_SEQ;
          end

        // Req_RN in Acknowledged: Open or Secured, by the access password
        PH_PW_RD:
          phase <= PH_PW_WAIT;
        PH_PW_WAIT:
          if (mem_rd_valid) begin
            if (maddr == 16'd2) begin
              pw_nonzero <= (mem_rd_data != 16'd0);
              maddr      <= 16'd3;
              phase      <= PH_PW_RD;
            end else begin
              state <= (pw_nonzero || mem_rd_data != 16'd0) ? ST_OPEN : ST_SECURED;
              phase <= PH_IDLE;
            end
          end

        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
