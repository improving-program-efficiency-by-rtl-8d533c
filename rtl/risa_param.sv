// risa_param: turns one IRF entry into the RISA instruction that is issued,
// settling its immediate operand (parameterization).
//
// Without a parameter the instruction uses the default immediate kept in
// the entry (its 16-bit immediate field). With a parameter, a branch takes
// the 5-bit parameter itself as a signed word displacement, and any other
// instruction takes the Immediate Table entry the parameter indexes in place
// of its default. Either way the immediate is then extended the way the
// MIPS instruction expects (zero for andi/ori/xori, shifted for lui, sign
// otherwise) and also written back into the instruction's 16-bit field.
//
// The three sources follow the original design ("Parameters can come from
// 32-entry Immediate Table", "Each IRF entry retains a default immediate",
// "Branches use these 5-bits for displacements"). A parameter on an R-type
// instruction is ignored; the original design does not give it a meaning.
//
// Purely combinational.
module risa_param
  import irf_pkg::*;
(
  input  irf_entry_t       entry,
  input  logic             has_param,
  input  logic [4:0]       param,      // raw 5-bit parameter field
  input  logic [IMM_W-1:0] imm_value,  // IMM[param]
  input  logic [31:0]      pc,
  input  logic [2:0]       slot,
  output risa_t            out
);
  logic [5:0]  op;
  logic [31:0] imm;

  assign op = entry.inst[31:26];

  always_comb begin
    if (op == OP_RTYPE || op == OP_J || op == OP_JAL) imm = '0;
    else if (has_param && is_branch(entry.inst))       imm = {{27{param[4]}}, param};
    else if (has_param)                                imm = ext16(op, imm_value);
    else                                               imm = ext16(op, entry.inst[15:0]);

    out          = '{pc: pc, inst: entry.inst, imm: imm, pos: entry.pos, from_irf: 1'b1, slot: slot};
    if (has_param && op != OP_RTYPE && op != OP_J && op != OP_JAL)
      out.inst[15:0] = (op == OP_LUI) ? imm_value : imm[15:0];
  end
endmodule
