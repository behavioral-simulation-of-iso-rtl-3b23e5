// crc_engine -- serial CRC-5 / CRC-16 engine of the tag.
//
// Two linear feedback shift registers run side by side on the same bit
// stream, one bit per clock when bit_valid is high, most significant bit
// first: the Gen2 CRC-16 (x^16+x^12+x^5+1, preset FFFFh) and the Gen2 CRC-5
// (x^5+x^3+1, preset 01001b).  `init` presets both registers.
//
// Checking a received command: feed every bit of the command, CRC included,
// then pulse `check` with `crc_sel` naming the CRC the command carries.  One
// clock later crc_valid is high for exactly one cycle if the register holds
// the residue of an error-free frame: 1D0Fh for CRC-16, 00000b for CRC-5.
// A command without CRC (crc_sel = CRC_NONE) is always reported valid.
//
// Generating a CRC for a reply: feed the reply bits; crc16_q then holds the
// register, and the CRC to transmit is its ones' complement, MSB first.
//
// The polynomials, presets and residues are those of the Gen2 protocol that
// the design follows; the check strobe and the one-cycle pulse timing are
// this design's own interface.
module crc_engine
  import gen2_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,       // preset both registers
  input  logic        bit_valid,  // shift bit_in into both registers
  input  logic        bit_in,
  input  logic        check,      // compare the residue selected by crc_sel
  input  crc_sel_e    crc_sel,
  output logic        crc_valid,  // one-cycle pulse after check, frame is good
  output logic [15:0] crc16_q,
  output logic [4:0]  crc5_q
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      crc16_q <= CRC16_PRESET;
      crc5_q  <= CRC5_PRESET;
    end else if (init) begin
      crc16_q <= CRC16_PRESET;
      crc5_q  <= CRC5_PRESET;
    end else if (bit_valid) begin
      crc16_q <= crc16_step(crc16_q, bit_in);
      crc5_q  <= crc5_step(crc5_q, bit_in);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) crc_valid <= 1'b0;
    else if (check) begin
      unique case (crc_sel)
        CRC_16:  crc_valid <= (crc16_q == CRC16_RESIDUE);
        CRC_5:   crc_valid <= (crc5_q == CRC5_RESIDUE);
        default: crc_valid <= 1'b1;
      endcase
    end else crc_valid <= 1'b0;
  end

endmodule
