// irf_pkg: types, constants and decode helpers shared by the Instruction
// Register File (IRF) fetch front end.
//
// Two instruction sets meet here. MISA words live in instruction memory: they
// are MIPS-like words in which R- and I-type instructions carry a 5-bit index
// of a second instruction in the IRF (loosely packed), plus new T-format
// opcodes whose fields name up to five IRF entries (tightly packed). RISA
// instructions live in the IRF and are plain MIPS words with their 16-bit
// immediate acting as the entry's default immediate.
//
// What an issued instruction looks like (risa_t): the MIPS word as the back
// end decodes it, plus `imm`, the final 32-bit operand already extended
// (and, for lui, already shifted into place). The back end must take I-type
// operands from `imm`, not from the low 16 bits of `inst`.
//
// The field widths of the packed formats (6/5/5/5/5/1/5 for the T-format,
// the 11-bit immediate and 21-bit lui of the loose formats) follow the
// original design. The 6-bit opcode values chosen for the T-format variants are this
// design's own: they reuse MIPS-I opcodes that the supported subset leaves
// free (0x18-0x1F, 0x2C, 0x34-0x37, 0x3C-0x3F).
package irf_pkg;

  localparam int unsigned MAX_PACK  = 5;   // RISA instructions per T-format word
  localparam int unsigned IMM_W     = 16;  // width of an Immediate Table entry

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_REGIMM= 6'h01;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_JAL   = 6'h03;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_BNE   = 6'h05;
  localparam logic [5:0] OP_BLEZ  = 6'h06;
  localparam logic [5:0] OP_BGTZ  = 6'h07;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ADDIU = 6'h09;
  localparam logic [5:0] OP_SLTI  = 6'h0A;
  localparam logic [5:0] OP_SLTIU = 6'h0B;
  localparam logic [5:0] OP_ANDI  = 6'h0C;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_XORI  = 6'h0E;
  localparam logic [5:0] OP_LUI   = 6'h0F;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;

  // T-format opcodes. Name = pack kind, instruction count, and the slots
  // (A = first RISA instruction ... E = fifth) that receive a parameter.
  localparam logic [5:0] OP_TIGHT5    = 6'h18;
  localparam logic [5:0] OP_TIGHT4    = 6'h19;
  localparam logic [5:0] OP_TIGHT3    = 6'h1A;
  localparam logic [5:0] OP_TIGHT2    = 6'h1B;
  localparam logic [5:0] OP_PARAM4_A  = 6'h1C;
  localparam logic [5:0] OP_PARAM4_B  = 6'h1D;
  localparam logic [5:0] OP_PARAM4_C  = 6'h1E;
  localparam logic [5:0] OP_PARAM4_D  = 6'h1F;
  localparam logic [5:0] OP_PARAM3_A  = 6'h34;
  localparam logic [5:0] OP_PARAM3_B  = 6'h35;
  localparam logic [5:0] OP_PARAM3_C  = 6'h36;
  localparam logic [5:0] OP_PARAM3_AB = 6'h37;
  localparam logic [5:0] OP_PARAM3_AC = 6'h3C;
  localparam logic [5:0] OP_PARAM3_BC = 6'h3D;
  localparam logic [5:0] OP_PARAM2_A  = 6'h3E;
  localparam logic [5:0] OP_PARAM2_B  = 6'h3F;
  localparam logic [5:0] OP_PARAM2_AB = 6'h2C;

  localparam logic [31:0] NOP_WORD = 32'h0000_0000;  // sll r0, r0, 0

  // Slot number meaning "this field feeds no slot".
  localparam logic [2:0] NO_SLOT = 3'd7;

  // Shape of a T-format word: how many RISA instructions it holds and which
  // slot the parameter in field 4 (inst4/param) and field 5 (inst5/param)
  // goes to.
  typedef struct packed {
    logic       is_t;
    logic [2:0] ninst;
    logic [2:0] p4_slot;
    logic [2:0] p5_slot;
  } tshape_t;

  // Positional flags of an IRF entry: which register fields hold a
  // positional specifier instead of a register number.
  typedef struct packed {
    logic rs;
    logic rt;
    logic rd;
  } posflags_t;

  // One IRF entry: a RISA instruction in MIPS encoding (its immediate field
  // is the default immediate) plus its positional flags.
  typedef struct packed {
    logic [31:0] inst;
    posflags_t   pos;
  } irf_entry_t;

  // One RISA instruction on its way to the back end.
  typedef struct packed {
    logic [31:0] pc;        // address of the MISA word it came from
    logic [31:0] inst;      // MIPS encoding of the instruction
    logic [31:0] imm;       // final immediate operand (extended / shifted)
    posflags_t   pos;       // register fields still positional
    logic        from_irf;  // fetched from the IRF rather than memory
    logic [2:0]  slot;      // position inside its MISA word (0 = first)
  } risa_t;

  // Where an issued slot's parameter comes from.
  typedef enum logic [1:0] {
    PSRC_NONE = 2'd0,   // use the IRF entry's default immediate
    PSRC_F4   = 2'd1,   // field 4 of the T-format word
    PSRC_F5   = 2'd2    // field 5 of the T-format word
  } psrc_e;

  // Kind of MISA word.
  typedef enum logic [2:0] {
    MK_LOOSE_R = 3'd0,
    MK_LOOSE_I = 3'd1,
    MK_LUI     = 3'd2,
    MK_JUMP    = 3'd3,
    MK_TIGHT   = 3'd4
  } misa_kind_e;

  // --------------------------------------------------------------- helpers
  function automatic tshape_t t_shape(input logic [5:0] op);
    tshape_t s;
    s = '{is_t: 1'b1, ninst: 3'd0, p4_slot: NO_SLOT, p5_slot: NO_SLOT};
    case (op)
      OP_TIGHT5:    s.ninst = 3'd5;
      OP_TIGHT4:    s.ninst = 3'd4;
      OP_TIGHT3:    s.ninst = 3'd3;
      OP_TIGHT2:    s.ninst = 3'd2;
      OP_PARAM4_A:  begin s.ninst = 3'd4; s.p5_slot = 3'd0; end
      OP_PARAM4_B:  begin s.ninst = 3'd4; s.p5_slot = 3'd1; end
      OP_PARAM4_C:  begin s.ninst = 3'd4; s.p5_slot = 3'd2; end
      OP_PARAM4_D:  begin s.ninst = 3'd4; s.p5_slot = 3'd3; end
      OP_PARAM3_A:  begin s.ninst = 3'd3; s.p5_slot = 3'd0; end
      OP_PARAM3_B:  begin s.ninst = 3'd3; s.p5_slot = 3'd1; end
      OP_PARAM3_C:  begin s.ninst = 3'd3; s.p5_slot = 3'd2; end
      OP_PARAM3_AB: begin s.ninst = 3'd3; s.p4_slot = 3'd0; s.p5_slot = 3'd1; end
      OP_PARAM3_AC: begin s.ninst = 3'd3; s.p4_slot = 3'd0; s.p5_slot = 3'd2; end
      OP_PARAM3_BC: begin s.ninst = 3'd3; s.p4_slot = 3'd1; s.p5_slot = 3'd2; end
      OP_PARAM2_A:  begin s.ninst = 3'd2; s.p5_slot = 3'd0; end
      OP_PARAM2_B:  begin s.ninst = 3'd2; s.p5_slot = 3'd1; end
      OP_PARAM2_AB: begin s.ninst = 3'd2; s.p4_slot = 3'd0; s.p5_slot = 3'd1; end
      default:      s.is_t = 1'b0;
    endcase
    return s;
  endfunction

  function automatic logic is_branch(input logic [31:0] i);
    return i[31:26] inside {OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_REGIMM};
  endfunction

  function automatic logic is_logical_imm(input logic [5:0] op);
    return op inside {OP_ANDI, OP_ORI, OP_XORI};
  endfunction

  function automatic logic is_shift_imm(input logic [5:0] fn);
    return fn inside {FN_SLL, FN_SRL, FN_SRA};
  endfunction

  // Extend a 16-bit immediate the way the RISA (plain MIPS) instruction `op`
  // expects: zero for logical ops, shifted for lui, sign otherwise.
  function automatic logic [31:0] ext16(input logic [5:0] op, input logic [15:0] v);
    if (op == OP_LUI)            return {v, 16'h0};
    else if (is_logical_imm(op)) return {16'h0, v};
    else                         return {{16{v[15]}}, v};
  endfunction

  // Destination register of an instruction (0 when it writes none).
  function automatic logic [4:0] dest_reg(input logic [31:0] i);
    logic [5:0] op;
    op = i[31:26];
    if (op == OP_RTYPE)                                   return (i[5:0] == FN_JR) ? 5'd0 : i[15:11];
    else if (op == OP_JAL)                                return 5'd31;
    else if (op inside {[OP_ADDI:OP_LUI], [6'h20:6'h26]}) return i[20:16];
    else                                                  return 5'd0;
  endfunction

  function automatic logic writes_reg(input logic [31:0] i);
    logic [5:0] op;
    op = i[31:26];
    if (op == OP_RTYPE) return i[5:0] != FN_JR;
    return (op == OP_JAL) || (op inside {[OP_ADDI:OP_LUI], [6'h20:6'h26]});
  endfunction

  // Number of source registers an instruction reads: 0, 1 (rs, or rt for an
  // immediate shift) or 2 (rs then rt).
  function automatic logic [1:0] num_uses(input logic [31:0] i);
    logic [5:0] op;
    op = i[31:26];
    if (op == OP_RTYPE) begin
      if (i[5:0] == FN_JR || i[5:0] == FN_JALR) return 2'd1;
      if (is_shift_imm(i[5:0]))                 return 2'd1;
      return 2'd2;
    end
    if (op inside {OP_BEQ, OP_BNE, [6'h28:6'h2E]}) return 2'd2;
    if (op inside {OP_J, OP_JAL, OP_LUI})          return 2'd0;
    return 2'd1;
  endfunction

  // First source register in use order (rt for an immediate shift).
  function automatic logic [4:0] use0_reg(input logic [31:0] i);
    if (i[31:26] == OP_RTYPE && is_shift_imm(i[5:0])) return i[20:16];
    return i[25:21];
  endfunction

endpackage
