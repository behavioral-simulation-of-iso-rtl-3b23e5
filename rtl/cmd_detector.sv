// cmd_detector -- identifies a received reader command and extracts its fields.
//
// Works on the contents of the input buffer once the frame has ended.  The
// buffer is first aligned so that the first bit received is the MSB; the
// command code is then read from the leading bits (2, 4 or 8 of them) and the
// fields are cut out at their Gen2 positions:
//
//   QueryRep    00 Session                                   4 bits
//   ACK         01 RN16                                     18 bits
//   Query       1000 DR M TRext Sel Session Target Q CRC-5  22 bits
//   QueryAdjust 1001 Session UpDn                            9 bits
//   Select      1010 Target Action MemBank Pointer(EBV) Length Mask Truncate CRC-16
//   NAK         11000000                                     8 bits
//   Req_RN      11000001 RN16 CRC-16                        40 bits
//   Read        11000010 MemBank WordPtr(EBV) WordCount RN16 CRC-16
//   Write       11000011 MemBank WordPtr(EBV) Data RN16 CRC-16
//
// Pointers are extensible bit vectors (EBV) of one to three bytes, seven
// value bits per byte, whose top bit says another byte follows; the Select
// mask is Length bits long.  A frame whose length does not equal what its
// code and fields imply, that overflowed the buffer or whose code is none of
// the above is reported as CMD_INVALID.
//
// Timing: `decode` (the frame-end pulse) is sampled with the buffer; on the
// next clock `fields` holds the result and fields_valid pulses.  crc_sel is
// combinational, so the CRC engine can take its check strobe in the same
// cycle as `decode` and report on the same clock as fields_valid.
//
// The field layout of Select follows the design's Select table; the other
// layouts are those of the Gen2 protocol the design implements.  Decoding the
// whole frame from the buffer at its end, the length check and the command
// numbering (other than the codes the design shows for Select and Read) are
// this design's own.
module cmd_detector
  import gen2_pkg::*;
#(
  parameter int BUF_BITS = 352,
  parameter int LEN_W    = $clog2(BUF_BITS + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                decode,
  input  logic [BUF_BITS-1:0] q,
  input  logic [LEN_W-1:0]    bit_len,
  input  logic                overflow,
  output crc_sel_e            crc_sel,       // combinational, for the CRC check
  output cmd_fields_t         fields,
  output logic                fields_valid
);

  localparam int B = BUF_BITS;

  typedef struct packed {
    logic        ok;
    logic [1:0]  bytes;
    logic [23:0] value;
  } ebv_t;

  // Decode an EBV whose first byte is the top byte of `v`.
  function automatic ebv_t ebv_decode(input logic [23:0] v);
    ebv_t e;
    e.ok = 1'b1;
    if (!v[23]) begin
      e.bytes = 2'd1; e.value = {17'd0, v[22:16]};
    end else if (!v[15]) begin
      e.bytes = 2'd2; e.value = {10'd0, v[22:16], v[14:8]};
    end else begin
      e.bytes = 2'd3; e.value = {3'd0, v[22:16], v[14:8], v[6:0]};
      e.ok    = !v[7];
    end
    return e;
  endfunction

  logic [B-1:0] a;          // frame, first bit at a[B-1]
  logic [B-1:0] b;          // frame after the EBV of Select / Read / Write
  logic [B-1:0] c;          // Select: frame after the Length field
  ebv_t         ebv;
  int unsigned  head;       // bits ahead of the EBV
  int unsigned  expect_len;
  cmd_fields_t  f;

  always_comb begin
    a          = q << (B - int'(bit_len));
    f          = '0;
    f.cmd      = CMD_INVALID;
    f.crc_sel  = CRC_NONE;
    head       = (a[B-1 -: 4] == 4'b1010) ? 12 : 10;
    ebv        = ebv_decode(a[B-1-head -: 24]);
    b          = a << (head + 8 * int'(ebv.bytes));
    c          = b << 8;
    expect_len = 0;

    if (a[B-1 -: 2] == 2'b00) begin
      f.cmd = CMD_QUERYREP; expect_len = 4;
      f.session = a[B-3 -: 2];
    end else if (a[B-1 -: 2] == 2'b01) begin
      f.cmd = CMD_ACK; expect_len = 18;
      f.rn  = a[B-3 -: 16];
    end else if (a[B-1 -: 4] == 4'b1000) begin
      f.cmd = CMD_QUERY; expect_len = 22; f.crc_sel = CRC_5;
      f.dr      = a[B-5];
      f.m       = a[B-6 -: 2];
      f.trext   = a[B-8];
      f.sel     = a[B-9 -: 2];
      f.session = a[B-11 -: 2];
      f.target  = a[B-13];
      f.q       = a[B-14 -: 4];
    end else if (a[B-1 -: 4] == 4'b1001) begin
      f.cmd = CMD_QUERYADJ; expect_len = 9;
      f.session = a[B-5 -: 2];
      f.updn    = a[B-7 -: 3];
    end else if (a[B-1 -: 4] == 4'b1010) begin
      f.cmd = CMD_SELECT; f.crc_sel = CRC_16;
      f.sel_target = a[B-5 -: 3];
      f.action     = a[B-8 -: 3];
      f.membank    = a[B-11 -: 2];
      f.pointer    = ebv.value;
      f.length     = b[B-1 -: 8];
      f.mask       = MASK_BITS'(c[B-1 -: MASK_BITS] >> (MASK_BITS - int'(f.length)));
      f.truncate   = c[B-1-int'(f.length)];
      expect_len   = 12 + 8 * int'(ebv.bytes) + 8 + int'(f.length) + 1 + 16;
      if (!ebv.ok) expect_len = 0;
    end else if (a[B-1 -: 8] == 8'b1100_0000) begin
      f.cmd = CMD_NAK; expect_len = 8;
    end else if (a[B-1 -: 8] == 8'b1100_0001) begin
      f.cmd = CMD_REQRN; expect_len = 40; f.crc_sel = CRC_16;
      f.rn  = a[B-9 -: 16];
    end else if (a[B-1 -: 8] == 8'b1100_0010) begin
      f.cmd = CMD_READ; f.crc_sel = CRC_16;
      f.membank  = a[B-9 -: 2];
      f.pointer  = ebv.value;
      f.length   = b[B-1 -: 8];
      f.rn       = b[B-9 -: 16];
      expect_len = 10 + 8 * int'(ebv.bytes) + 8 + 16 + 16;
      if (!ebv.ok) expect_len = 0;
    end else if (a[B-1 -: 8] == 8'b1100_0011) begin
      f.cmd = CMD_WRITE; f.crc_sel = CRC_16;
      f.membank  = a[B-9 -: 2];
      f.pointer  = ebv.value;
      f.data     = b[B-1 -: 16];
      f.rn       = b[B-17 -: 16];
      expect_len = 10 + 8 * int'(ebv.bytes) + 16 + 16 + 16;
      if (!ebv.ok) expect_len = 0;
    end

    if (overflow || int'(bit_len) != expect_len) begin
      f.cmd     = CMD_INVALID;
      f.crc_sel = CRC_NONE;
    end
  end

  assign crc_sel = f.crc_sel;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fields       <= '0;
      fields_valid <= 1'b0;
    end else begin
      fields_valid <= decode;
      if (decode) fields <= f;
    end
  end

endmodule
