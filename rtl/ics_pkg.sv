// ics_pkg: instruction set and I/O map of the ICS control processor.
//
// Every instruction is one 32-bit word:
//   [31:26] opcode  [25:21] rd  [20:16] rs  [15:11] rt  [15:0] imm16
// Register 0 always reads zero.  Branch targets are relative to the word
// after the branch; JMP takes an absolute word address.  PEI carries a PE
// instruction: [25:22] quad mask, [21:20] PE-type mask (bit 0 standard,
// bit 1 accelerator), [18:0] the 19-bit PE instruction.  PEST and PEX use
// imm = {slot[7:6], types[5:4], quads[3:0]} to store into and execute from
// the four instruction registers of each PE.
// Loads and stores use byte address rs + imm16: 0x0000-0x3FFF data memory,
// 0x4000-0x7FFF frame buffer (processor side, words), 0x8000-0xBFFF I/O
// registers (word index in bits 5..2, see IO_*).
// The whole instruction set is a choice of this design.
package ics_pkg;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,   // rd = rs + rt
    OP_SUB   = 6'd2,   // rd = rs - rt
    OP_AND   = 6'd3,
    OP_OR    = 6'd4,
    OP_XOR   = 6'd5,
    OP_ADDI  = 6'd6,   // rd = rs + sext(imm)
    OP_LUI   = 6'd7,   // rd = imm << 16
    OP_LW    = 6'd8,   // rd = mem32[rs + sext(imm)]
    OP_LH    = 6'd9,
    OP_LB    = 6'd10,
    OP_SW    = 6'd11,  // mem32[rs + sext(imm)] = rd
    OP_SH    = 6'd12,
    OP_SB    = 6'd13,
    OP_BEQ   = 6'd14,  // if rd == rs: pc = pc + 1 + sext(imm)
    OP_BNE   = 6'd15,
    OP_JMP   = 6'd16,  // pc = imm
    OP_LOOP  = 6'd17,  // run the next imm[3:0]+1 words rs times via the loop buffer
    OP_PEI   = 6'd18,  // issue a PE instruction
    OP_PEBUS = 6'd19,  // data-bus lanes of quads imm[3:0] = rs[15:0]
    OP_PERD  = 6'd20,  // rd = read-back word of quad imm[1:0]
    OP_SBCFG = 6'd21,  // switch-block config of quads imm[3:0] = rs[4:0]
    OP_HALT  = 6'd22,
    OP_SLL   = 6'd23,  // rd = rs << imm[4:0]
    OP_SRL   = 6'd24,  // rd = rs >> imm[4:0]
    OP_PEST  = 6'd25,  // store rs[18:0] into PE instruction register imm[7:6]
                       // of the PEs of quads imm[3:0], types imm[5:4]
    OP_PEX   = 6'd26   // execute stored instruction imm[7:6] in the same way
  } ics_op_e;

  // I/O register word indices (byte address 0x8000 + 4*index)
  localparam logic [3:0] IO_DMA_SRC  = 4'd0;
  localparam logic [3:0] IO_DMA_DST  = 4'd1;
  localparam logic [3:0] IO_DMA_LEN  = 4'd2;
  localparam logic [3:0] IO_DMA_CTRL = 4'd3;  // wr: bit0 start, bit1 dir; rd: busy
  localparam logic [3:0] IO_FB_SWAP  = 4'd4;  // wr: swap; rd: selected buffer
  localparam logic [3:0] IO_PBANK    = 4'd5;  // program bank for fetch
  localparam logic [3:0] IO_LINK_OUT = 4'd6;  // wr: send word; rd: ready
  localparam logic [3:0] IO_LINK_IN  = 4'd7;  // rd: received word (frees mailbox)
  localparam logic [3:0] IO_LINK_ST  = 4'd8;  // rd: mailbox full
  localparam logic [3:0] IO_ARRAY    = 4'd9;  // [1:0] word-length mode, [5:2] 16-bit shifter per quad

  function automatic logic [31:0] enc_r(input ics_op_e op, input logic [4:0] rd,
                                        input logic [4:0] rs, input logic [4:0] rt);
    return {op, rd, rs, rt, 11'b0};
  endfunction

  function automatic logic [31:0] enc_i(input ics_op_e op, input logic [4:0] rd,
                                        input logic [4:0] rs, input logic [15:0] imm);
    return {op, rd, rs, imm};
  endfunction

  function automatic logic [31:0] enc_pei(input logic [3:0] quads, input logic [1:0] types,
                                          input logic [18:0] pe_instr);
    return {OP_PEI, quads, types, 1'b0, pe_instr};
  endfunction

  function automatic logic [15:0] pe_sel(input logic [3:0] quads, input logic [1:0] types,
                                         input logic [1:0] slot);
    return {8'b0, slot, types, quads};
  endfunction

endpackage
