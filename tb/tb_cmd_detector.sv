// tb_cmd_detector -- self-checking testbench of cmd_detector.
//
// Builds every supported command with random field values (reference
// builders, EBV pointers of one to three bytes, Select masks of 0 to 255
// bits), loads it into the buffer inputs as the input buffer would hold it,
// pulses decode and compares what_cmd, the CRC selector and every field.
// Frames one bit too long or too short, and unknown codes, must decode as
// CMD_INVALID; an overflowed buffer too.
module tb_cmd_detector;
  import gen2_pkg::*;
  import tb_gen2_pkg::*;
  localparam int BUF_BITS = 352;
  logic clk = 1'b0, rst_n = 1'b0;
  logic decode = 1'b0, overflow = 1'b0;
  logic [BUF_BITS-1:0] q = '0;
  logic [8:0] bit_len = '0;
  crc_sel_e crc_sel;
  cmd_fields_t fields;
  logic fields_valid;
  int checks = 0, failures = 0;

  cmd_detector dut (.*);

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

  crc_sel_e sel_seen;

  task automatic run(input bitq_t f);
    bit [BUF_BITS-1:0] v;
    v = '0;
    foreach (f[i]) v = {v[BUF_BITS-2:0], f[i]};
    q <= v; bit_len <= 9'(f.size()); decode <= 1'b1;
    #1 sel_seen = crc_sel;
    @(posedge clk);
    decode <= 1'b0;
    #1 expect_eq("fields_valid", fields_valid, 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      bit [15:0] rn, data;
      bit [1:0] bank, ses, m, sl;
      bit [2:0] tg, ac, ud;
      bit [3:0] qv;
      bit dr, te, tgt, tr;
      int unsigned ptr;
      int len, which;
      bit [255:0] mask;
      bitq_t f;
      rn = 16'($urandom); data = 16'($urandom);
      bank = 2'($urandom); ses = 2'($urandom); m = 2'($urandom); sl = 2'($urandom);
      tg = 3'($urandom); ac = 3'($urandom); ud = 3'($urandom); qv = 4'($urandom);
      dr = 1'($urandom); te = 1'($urandom); tgt = 1'($urandom); tr = 1'($urandom);
      which = $urandom_range(0, 2);
      ptr = (which == 0) ? $urandom_range(0, 127) :
            (which == 1) ? $urandom_range(128, 16383) : $urandom_range(16384, 2097151);
      len = (t == 0) ? 0 : (t == 1) ? 255 : $urandom_range(1, 255);
      mask = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (len < 256) mask = mask & ((256'd1 << len) - 1);

      run(f_query(dr, m, te, sl, ses, tgt, qv));
      expect_eq("Query cmd", fields.cmd, CMD_QUERY);
      expect_eq("Query crc", sel_seen, CRC_5);
      expect_eq("Query fields", {fields.dr, fields.m, fields.trext, fields.sel,
                fields.session, fields.target, fields.q}, {dr, m, te, sl, ses, tgt, qv});

      run(f_queryrep(ses));
      expect_eq("QueryRep cmd", fields.cmd, CMD_QUERYREP);
      expect_eq("QueryRep session", fields.session, ses);

      run(f_queryadj(ses, ud));
      expect_eq("QueryAdjust cmd", fields.cmd, CMD_QUERYADJ);
      expect_eq("QueryAdjust fields", {fields.session, fields.updn}, {ses, ud});

      run(f_ack(rn));
      expect_eq("ACK cmd", fields.cmd, CMD_ACK);
      expect_eq("ACK rn", fields.rn, rn);

      run(f_nak());
      expect_eq("NAK cmd", fields.cmd, CMD_NAK);

      run(f_reqrn(rn));
      expect_eq("Req_RN cmd", fields.cmd, CMD_REQRN);
      expect_eq("Req_RN crc", sel_seen, CRC_16);
      expect_eq("Req_RN rn", fields.rn, rn);

      run(f_read(bank, ptr, 8'(len), rn));
      expect_eq("Read cmd", fields.cmd, CMD_READ);
      expect_eq("Read fields", {fields.membank, fields.pointer, fields.length, fields.rn},
                {bank, 24'(ptr), 8'(len), rn});

      run(f_write(bank, ptr, data, rn));
      expect_eq("Write cmd", fields.cmd, CMD_WRITE);
      expect_eq("Write fields", {fields.membank, fields.pointer, fields.data, fields.rn},
                {bank, 24'(ptr), data, rn});

      f = f_select(tg, ac, bank, ptr, len, mask, tr);
      if (f.size() <= BUF_BITS) begin
        run(f);
        expect_eq("Select cmd", fields.cmd, CMD_SELECT);
        expect_eq("Select crc", sel_seen, CRC_16);
        expect_eq("Select fields", {fields.sel_target, fields.action, fields.membank,
                  fields.pointer, fields.length, fields.truncate},
                  {tg, ac, bank, 24'(ptr), 8'(len), tr});
        for (int w = 0; w < 4; w++)
          expect_eq("Select mask", fields.mask[64*w +: 64], mask[64*w +: 64]);
      end

      // wrong lengths
      f = f_reqrn(rn); f.push_back(1'b0);
      run(f);
      expect_eq("long frame invalid", fields.cmd, CMD_INVALID);
      f = f_query(dr, m, te, sl, ses, tgt, qv); void'(f.pop_back());
      run(f);
      expect_eq("short frame invalid", fields.cmd, CMD_INVALID);
      f = {}; put(f, 8'hC7, 8);
      run(f);
      expect_eq("unknown code invalid", fields.cmd, CMD_INVALID);
    end
    overflow <= 1'b1;
    run(f_nak());
    expect_eq("overflow invalid", fields.cmd, CMD_INVALID);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
