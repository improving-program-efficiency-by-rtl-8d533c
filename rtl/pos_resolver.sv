// pos_resolver: resolves positional register specifiers.
//
// An IRF entry may name a register by position in the recent instruction
// stream instead of by number, so that one entry serves many code sequences
// that differ only in register allocation (load r2 / add r2 / store r2 and
// load r3 / add r3 / store r3 both become load / s[0] = s[0] + r5 / store
// s[0]). Two histories are kept, updated as instructions issue:
//   s[i]  the register written by the i-th most recent instruction that
//         wrote one (s[0] = the latest),
//   u[i]  the i-th most recently read source register; an instruction that
//         reads rs and rt records rs, then rt, so afterwards u[0] = rt and
//         u[1] = rs.
// A positional 5-bit field is read as {kind, index[3:0]}: kind 0 selects
// s[index], kind 1 selects u[index]. The IRF entry's flags say which of the
// rs, rt and rd fields are positional. All fields are resolved against the
// history as it stood before the instruction, then the instruction's own
// destination and sources are recorded.
//
// The original design gives the s[]/u[] notation, an example (u[2] there names the
// base register two source reads back), says positional values come from
// the pipeline's register-forwarding logic and that positional state is
// saved and restored on a context switch. The field encoding, the history
// depth and the use order within an instruction are this design's choices,
// picked to reproduce the published example. The whole history can be read
// out (state_*) and loaded back (restore) for a context switch.
//
// Combinational from input to output; the history updates at the clock edge
// in which an instruction is accepted (in_valid && out_ready).
module pos_resolver
  import irf_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  risa_t       in,
  input  logic        out_ready,
  output risa_t       out,
  // context save / restore of the positional state
  output logic [4:0]  state_s [DEPTH],
  output logic [4:0]  state_u [DEPTH],
  input  logic        restore,
  input  logic [4:0]  restore_s [DEPTH],
  input  logic [4:0]  restore_u [DEPTH]
);
  logic [4:0] s_hist [DEPTH];
  logic [4:0] u_hist [DEPTH];
  logic [4:0] s_next [DEPTH];
  logic [4:0] u_next [DEPTH];

  function automatic logic [4:0] lookup(input logic [4:0] spec,
                                        input logic [4:0] sh [DEPTH],
                                        input logic [4:0] uh [DEPTH]);
    logic [4:0] r;
    r = 5'd0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (spec[3:0] == 4'(i)) r = spec[4] ? uh[i] : sh[i];
    end
    return r;
  endfunction

  always_comb begin
    out     = in;
    out.pos = '0;
    if (in.pos.rs) out.inst[25:21] = lookup(in.inst[25:21], s_hist, u_hist);
    if (in.pos.rt) out.inst[20:16] = lookup(in.inst[20:16], s_hist, u_hist);
    if (in.pos.rd) out.inst[15:11] = lookup(in.inst[15:11], s_hist, u_hist);
  end

  // History after recording the resolved instruction.
  always_comb begin
    s_next = s_hist;
    u_next = u_hist;
    if (writes_reg(out.inst)) begin
      for (int i = int'(DEPTH) - 1; i > 0; i--) s_next[i] = s_hist[i-1];
      s_next[0] = dest_reg(out.inst);
    end
    case (num_uses(out.inst))
      2'd1: begin
        for (int i = int'(DEPTH) - 1; i > 0; i--) u_next[i] = u_hist[i-1];
        u_next[0] = use0_reg(out.inst);
      end
      2'd2: begin
        for (int i = int'(DEPTH) - 1; i > 1; i--) u_next[i] = u_hist[i-2];
        if (DEPTH > 1) u_next[1] = out.inst[25:21];
        u_next[0] = out.inst[20:16];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) begin
        s_hist[i] <= '0;
        u_hist[i] <= '0;
      end
    end else if (restore) begin
      s_hist <= restore_s;
      u_hist <= restore_u;
    end else if (in_valid && out_ready) begin
      s_hist <= s_next;
      u_hist <= u_next;
    end
  end

  assign state_s = s_hist;
  assign state_u = u_hist;
endmodule
