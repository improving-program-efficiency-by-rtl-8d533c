// misa_decoder: first-half-of-ID decode of one MISA word fetched from the
// instruction store. It decides how many RISA instructions the word stands
// for, which IRF entries supply them, where each one's parameter comes from,
// and, for words that are instructions themselves, rebuilds that
// instruction in plain MIPS form.
//
// MISA word kinds (field layouts from the original design, bit 31 on the left):
//   T-format  opcode[31:26] inst1[25:21] inst2[20:16] inst3[15:11]
//             inst4/param[10:6] s[5] inst5/param[4:0]
//             Up to five IRF references. The opcode gives the count and the
//             slots that take a parameter (see irf_pkg::t_shape). With one
//             parameter it sits in field 5; with two, field 4 feeds the
//             first named slot and field 5 the second. The s bit marks
//             field 5 as a parameter (s = 1) or as the fifth IRF reference
//             (s = 0); a parameter slot whose field-5 parameter is not
//             marked by s falls back to its default immediate.
//   loose R   opcode rs/shamt[25:21] rt[20:16] rd[15:11] funct[10:5] inst[4:0]
//             shamt shares the rs field (used by sll/srl/sra).
//   loose I   opcode rs[25:21] rt[20:16] imm11[15:5] inst[4:0]
//             11-bit immediate, zero-extended for andi/ori/xori and
//             sign-extended otherwise.
//   lui       opcode imm21_hi[25:21] rt[20:16] imm21_lo[15:0]: a 21-bit
//             immediate that lui places in bits 31..11, so that lui plus an
//             11-bit immediate builds any 32-bit constant. Not packable.
//   J         unchanged MIPS j/jal. Not packable.
// A loose word with inst = 0 (the nop entry) holds one instruction; with any
// other inst it holds two, the second being IRF[inst].
//
// The field widths, the loose formats and the padding with nop follow the
// original design. The T-format opcode numbers, the parameter placement rule, the
// meaning of s and the placement of the 21-bit lui immediate are this
// design's reading of the published figures.
//
// Purely combinational.
module misa_decoder
  import irf_pkg::*;
(
  input  logic [31:0] pc,
  input  logic [31:0] word,
  output misa_kind_e  kind,
  output logic [2:0]  ninst,              // RISA instructions in this word, 1..5
  output logic        slot0_from_irf,     // slot 0 is IRF[irf_idx[0]], not the word itself
  output risa_t       own,                // the word's own instruction (slot 0 when !slot0_from_irf)
  output logic [4:0]  irf_idx [MAX_PACK], // IRF index per slot
  output psrc_e       psrc    [MAX_PACK], // parameter source per slot
  output logic [4:0]  f4,                 // field 4 (inst4/param)
  output logic [4:0]  f5                  // field 5 (inst5/param)
);
  logic [5:0]  op;
  tshape_t     sh;
  logic        s_bit;
  logic [4:0]  loose_inst;
  logic [31:0] imm11_ext;
  logic [20:0] imm21;

  assign op         = word[31:26];
  assign sh         = t_shape(op);
  assign s_bit      = word[5];
  assign f4         = word[10:6];
  assign f5         = word[4:0];
  assign loose_inst = word[4:0];
  assign imm11_ext  = is_logical_imm(op) ? {21'h0, word[15:5]} : {{21{word[15]}}, word[15:5]};
  assign imm21      = {word[25:21], word[15:0]};

  always_comb begin
    kind           = MK_LOOSE_I;
    ninst          = 3'd1;
    slot0_from_irf = 1'b0;
    own            = '{pc: pc, inst: NOP_WORD, imm: '0, pos: '0, from_irf: 1'b0, slot: 3'd0};
    for (int k = 0; k < int'(MAX_PACK); k++) begin
      irf_idx[k] = 5'd0;
      psrc[k]    = PSRC_NONE;
    end

    if (sh.is_t) begin
      kind           = MK_TIGHT;
      ninst          = sh.ninst;
      slot0_from_irf = 1'b1;
      irf_idx[0]     = word[25:21];
      irf_idx[1]     = word[20:16];
      irf_idx[2]     = word[15:11];
      irf_idx[3]     = word[10:6];
      irf_idx[4]     = word[4:0];
      if (sh.p4_slot != NO_SLOT) psrc[sh.p4_slot] = PSRC_F4;
      if (sh.p5_slot != NO_SLOT && s_bit) psrc[sh.p5_slot] = PSRC_F5;
    end else if (op == OP_RTYPE) begin
      kind     = MK_LOOSE_R;
      own.inst = is_shift_imm(word[10:5])
                 ? {OP_RTYPE, 5'd0,        word[20:16], word[15:11], word[25:21], word[10:5]}
                 : {OP_RTYPE, word[25:21], word[20:16], word[15:11], 5'd0,        word[10:5]};
      irf_idx[1] = loose_inst;
      ninst      = (loose_inst != 5'd0) ? 3'd2 : 3'd1;
    end else if (op == OP_LUI) begin
      kind     = MK_LUI;
      own.inst = {OP_LUI, 5'd0, word[20:16], imm21[15:0]};
      own.imm  = {imm21, 11'h0};
    end else if (op == OP_J || op == OP_JAL) begin
      kind     = MK_JUMP;
      own.inst = word;
    end else begin
      kind       = MK_LOOSE_I;
      own.inst   = {op, word[25:21], word[20:16], imm11_ext[15:0]};
      own.imm    = imm11_ext;
      irf_idx[1] = loose_inst;
      ninst      = (loose_inst != 5'd0) ? 3'd2 : 3'd1;
    end
  end
endmodule
