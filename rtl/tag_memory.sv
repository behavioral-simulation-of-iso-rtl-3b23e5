// tag_memory -- the tag's four memory banks, 16-bit words.
//
//   bank 00 Reserved: kill password (words 0-1), access password (words 2-3)
//   bank 01 UII:      StoredCRC (word 0), PC (word 1), EPC/UII (words 2..)
//   bank 10 TID:      class identifier E2h (8 bits), mask-designer (12 bits),
//                     model number (12 bits), then vendor data
//   bank 11 User:     free user data
//
// A single port serves all banks, so only one client uses the memory at a
// time: rd_en reads word `addr` of `bank`, the word appears on rd_data one
// clock later with rd_valid; wr_en writes wr_data into that word.  Reading
// and writing in the same cycle is a protocol error (asserted).  in_range is
// high, combinationally, when `addr` lies inside `bank`; an access outside is
// ignored (the FSM answers it with a memory-overrun error).
//
// The bank layout and the rd_en / wr_en access follow the design.  Bank
// sizes, the EPC length (96 bits) and all default contents are this design's
// own; at reset the banks take their default contents, which stands in for
// the non-volatile memory's programmed state.  PC and StoredCRC are computed
// from the EPC: PC holds the EPC length in words in its top five bits, and
// StoredCRC is the Gen2 CRC-16 over PC and EPC.  Reset (rst_n, active low) is
// synchronous.
module tag_memory
  import gen2_pkg::*;
#(
  parameter int               RES_WORDS  = 4,
  parameter int               EPC_WORDS  = 6,
  parameter int               TID_WORDS  = 4,
  parameter int               USER_WORDS = 16,
  parameter logic [31:0]      KILL_PWD   = 32'h0000_0000,
  parameter logic [31:0]      ACCESS_PWD = 32'h0000_0000,
  parameter logic [EPC_WORDS*16-1:0] EPC = 96'h3034_257B_F468_D480_0000_0001,
  parameter logic [TID_WORDS*16-1:0] TID = 64'hE200_1234_0000_0001
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rd_en,
  input  logic        wr_en,
  input  logic [1:0]  bank,
  input  logic [15:0] addr,
  input  logic [15:0] wr_data,
  output logic [15:0] rd_data,
  output logic        rd_valid,
  output logic        in_range
);

  localparam int UII_WORDS = EPC_WORDS + 2;
  localparam int BASE_UII  = RES_WORDS;
  localparam int BASE_TID  = BASE_UII + UII_WORDS;
  localparam int BASE_USER = BASE_TID + TID_WORDS;
  localparam int TOTAL     = BASE_USER + USER_WORDS;
  localparam int AW        = $clog2(TOTAL);

  localparam logic [15:0]  PC_WORD  = {5'(EPC_WORDS), 11'h000};
  localparam logic [255:0] EPC_LEFT = 256'(EPC) << (256 - EPC_WORDS*16);
  localparam logic [15:0]  CRC_WORD = stored_crc(PC_WORD, EPC_LEFT, EPC_WORDS);

  logic [15:0] mem [TOTAL];
  logic [15:0] bank_size;
  logic [15:0] base;
  logic [AW-1:0] phys;

  always_comb begin
    unique case (bank)
      BANK_RESERVED: begin bank_size = 16'(RES_WORDS);  base = 16'd0;               end
      BANK_UII:      begin bank_size = 16'(UII_WORDS);  base = 16'(BASE_UII);       end
      BANK_TID:      begin bank_size = 16'(TID_WORDS);  base = 16'(BASE_TID);       end
      default:       begin bank_size = 16'(USER_WORDS); base = 16'(BASE_USER);      end
    endcase
  end

  assign in_range = (addr < bank_size);
  assign phys     = AW'(base + addr);

  // Default (programmed) contents of word i of the whole array.
  function automatic logic [15:0] default_word(input int i);
    logic [63:0] pwds;
    pwds = {KILL_PWD, ACCESS_PWD};
    if (i < BASE_UII)       return (i < 4) ? pwds[63 - 16*i -: 16] : 16'h0000;
    else if (i == BASE_UII)     return CRC_WORD;
    else if (i == BASE_UII + 1) return PC_WORD;
    else if (i < BASE_TID)  return EPC[EPC_WORDS*16 - 1 - 16*(i - BASE_UII - 2) -: 16];
    else if (i < BASE_USER) return TID[TID_WORDS*16 - 1 - 16*(i - BASE_TID) -: 16];
    else                    return 16'h0000;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TOTAL; i++) mem[i] <= default_word(i);
    end else if (wr_en && in_range) begin
      mem[phys] <= wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_data  <= 16'h0000;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_en;
      if (rd_en && in_range) rd_data <= mem[phys];
    end
  end

  a_single_port: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && wr_en))
    else $error("tag_memory: read and write in the same cycle");

endmodule
