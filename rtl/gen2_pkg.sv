// gen2_pkg -- types and constants shared by the blocks of the EPC Class-1
// Gen-2 (ISO 18000-6 Type C) tag identification layer.
//
// Holds the command enumeration, the CRC selector, the tag state enumeration,
// the memory-bank encoding and the record of decoded command fields that the
// command detector hands to the control FSM.  Command codes, field widths,
// the Select field layout and the CRC-5/CRC-16 residues follow the Gen2
// protocol as the design describes it.  The numeric values of the command
// enumeration are this design's own choice, except that Select is 5'b00100
// and Read is 5'b01000, the two codes the design's waveforms show.
package gen2_pkg;

  // Decoded command identifier (5 bits wide, like the detector's what_cmd).
  typedef enum logic [4:0] {
    CMD_NONE     = 5'd0,
    CMD_QUERYREP = 5'd1,
    CMD_ACK      = 5'd2,
    CMD_QUERY    = 5'd3,
    CMD_SELECT   = 5'b00100,
    CMD_QUERYADJ = 5'd5,
    CMD_NAK      = 5'd6,
    CMD_REQRN    = 5'd7,
    CMD_READ     = 5'b01000,
    CMD_WRITE    = 5'd9,
    CMD_INVALID  = 5'd31
  } cmd_e;

  // Which CRC protects the command (crc_flag).
  typedef enum logic [1:0] {
    CRC_NONE = 2'b00,
    CRC_5    = 2'b01,
    CRC_16   = 2'b10
  } crc_sel_e;

  // Tag states of the Gen2 inventory and access state machine.
  typedef enum logic [2:0] {
    ST_READY     = 3'd0,
    ST_ARBITRATE = 3'd1,
    ST_REPLY     = 3'd2,
    ST_ACKED     = 3'd3,
    ST_OPEN      = 3'd4,
    ST_SECURED   = 3'd5
  } tag_state_e;

  // Memory banks.
  localparam logic [1:0] BANK_RESERVED = 2'b00;
  localparam logic [1:0] BANK_UII      = 2'b01;
  localparam logic [1:0] BANK_TID      = 2'b10;
  localparam logic [1:0] BANK_USER     = 2'b11;

  // Residues a correct frame leaves in the receive CRC registers.
  localparam logic [15:0] CRC16_RESIDUE = 16'h1D0F;
  localparam logic [4:0]  CRC5_RESIDUE  = 5'b00000;
  localparam logic [15:0] CRC16_PRESET  = 16'hFFFF;
  localparam logic [4:0]  CRC5_PRESET   = 5'b01001;

  // Error code a tag backscatters for an access beyond the end of a bank.
  localparam logic [7:0] ERR_MEM_OVERRUN = 8'h03;

  // Largest Select mask, in bits (8-bit Length field).
  localparam int MASK_BITS = 256;

  // Fields the command detector extracts from one received command.
  typedef struct packed {
    cmd_e              cmd;        // what_cmd
    crc_sel_e          crc_sel;    // crc_flag
    logic              dr;         // Query: divide ratio
    logic [1:0]        m;          // Query: cycles per symbol
    logic              trext;      // Query: pilot tone
    logic [1:0]        sel;        // Query: Sel
    logic [1:0]        session;    // Query, QueryRep, QueryAdjust
    logic              target;     // Query: inventoried flag to match
    logic [3:0]        q;          // Query: slot-count exponent
    logic [2:0]        updn;       // QueryAdjust
    logic [15:0]       rn;         // ACK, Req_RN, Read, Write: handle
    logic [2:0]        sel_target; // Select: Target
    logic [2:0]        action;     // Select: Action
    logic [1:0]        membank;    // Select, Read, Write
    logic [23:0]       pointer;    // Select (bit address), Read/Write (word address)
    logic [7:0]        length;     // Select: mask length in bits; Read: WordCount
    logic [MASK_BITS-1:0] mask;    // Select: mask, right aligned
    logic              truncate;   // Select
    logic [15:0]       data;       // Write: data word (still cover-coded)
  } cmd_fields_t;

  // One step of the Gen2 CRC-16 (x^16 + x^12 + x^5 + 1), MSB first.
  function automatic logic [15:0] crc16_step(input logic [15:0] c, input logic b);
    logic fb;
    fb = c[15] ^ b;
    return {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction

  // One step of the Gen2 CRC-5 (x^5 + x^3 + 1), MSB first.
  function automatic logic [4:0] crc5_step(input logic [4:0] c, input logic b);
    logic fb;
    fb = c[4] ^ b;
    return {c[3:0], 1'b0} ^ (fb ? 5'b01001 : 5'b00000);
  endfunction

  // CRC-16 that a tag stores ahead of PC and EPC: ones' complement of the
  // register after the PC and the first `words` EPC words, MSB first.
  function automatic logic [15:0] stored_crc(input logic [15:0] pc,
                                             input logic [255:0] epc,
                                             input int words);
    logic [15:0] c;
    c = CRC16_PRESET;
    for (int i = 15; i >= 0; i--) c = crc16_step(c, pc[i]);
    for (int w = 0; w < 16; w++)
      if (w < words)
        for (int i = 15; i >= 0; i--) c = crc16_step(c, epc[255 - 16*w - (15 - i)]);
    return ~c;
  endfunction

endpackage
