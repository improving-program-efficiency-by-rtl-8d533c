// tb_irf_frontend: end-to-end test of the IRF fetch front end at its
// default sizes.
//
// A small loop kernel modelled on the published worked example (load,
// mask, add an Immediate Table constant, add, store through a positional
// register, count down, branch back) plus straight-line code is written
// twice: once as a plain instruction list and once as packed MISA words
// (tight3, tight5, tight2, param4_A, param4_D, param2_B, param3_AC, loosely
// packed R and I words, a 21-bit lui and a jump). The IRF, the Immediate
// Table and the instruction store are loaded through their ports, then the
// front end runs the packed program and an instruction-level model of the
// back end executes what it issues, resolves branches and raises one
// exception inside a packed word, restarting it with the completed-slot
// mask.
//
// Checks:
//   * every issued instruction (address, slot, MIPS word, immediate) equals
//     the one expected for that word and slot, worked out here from the
//     program table;
//   * final registers, data memory and retired count equal those of a
//     reference run of the plain list;
//   * timing: back-to-back issue (one instruction per cycle) within and
//     across words, and the first instruction after a redirect or restart
//     exactly 3 cycles after it;
//   * each mechanism happened at least once: tight and loose packs,
//     Immediate Table parameter, branch-displacement parameter, default
//     immediate, positional register, fetch stall, redirect, restart with
//     skipped slots, 21-bit lui.
module tb_irf_frontend;
  import irf_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic        irf_we;
  logic [4:0]  irf_waddr;
  irf_entry_t  irf_wdata;
  logic        imm_we;
  logic [4:0]  imm_waddr;
  logic [15:0] imm_wdata;
  logic        redirect;
  logic [31:0] redirect_pc;
  logic        restart;
  logic [31:0] restart_pc;
  logic [4:0]  restart_mask;
  logic        out_valid;
  risa_t       out;
  logic        out_ready;
  logic [31:0] word_pc;
  logic [4:0]  done_mask;
  logic [4:0]  pos_state_s [4];
  logic [4:0]  pos_state_u [4];
  logic        pos_restore;
  logic [4:0]  pos_restore_s [4];
  logic [4:0]  pos_restore_u [4];

  irf_frontend dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("tb_irf_frontend: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("tb_irf_frontend: %s", msg);
  endtask

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] r_i(input logic [5:0] op, input int rs, rt, input logic [15:0] im);
    return {op, 5'(rs), 5'(rt), im};
  endfunction
  function automatic logic [31:0] r_r(input int rs, rt, rd, sh, input logic [5:0] fn);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] m_i(input logic [5:0] op, input int rs, rt, input logic [10:0] im, input int inst);
    return {op, 5'(rs), 5'(rt), im, 5'(inst)};
  endfunction
  function automatic logic [31:0] m_r(input int rs, rt, rd, input logic [5:0] fn, input int inst);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), fn, 5'(inst)};
  endfunction
  function automatic logic [31:0] m_t(input logic [5:0] op, input int a, b, c, d, input logic s, input int e);
    return {op, 5'(a), 5'(b), 5'(c), 5'(d), s, 5'(e)};
  endfunction

  localparam logic [5:0] FN_ADDU = 6'h21, FN_SUBU = 6'h23, FN_AND = 6'h24, FN_OR = 6'h25,
                         FN_XOR = 6'h26, FN_SLT = 6'h2A;

  // ------------------------------------------------------------ tables
  irf_entry_t  irf_tab [32];
  logic [15:0] imm_tab [32];

  // plain (reference) program: MIPS word + final operand
  logic [31:0] ref_inst [64];
  logic [31:0] ref_imm  [64];
  int          ref_len;

  // packed program: MISA word and the instructions it must issue
  logic [31:0] p_word [32];
  int          p_n    [32];
  logic [31:0] p_inst [32][5];
  logic [31:0] p_imm  [32][5];
  int          p_len;

  function automatic logic [31:0] sx16(input logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  task automatic ref_add(input logic [31:0] i, input logic [31:0] im);
    ref_inst[ref_len] = i; ref_imm[ref_len] = im; ref_len++;
  endtask

  task automatic p_add(input logic [31:0] w);
    p_word[p_len] = w; p_n[p_len] = 0; p_len++;
  endtask

  task automatic p_exp(input logic [31:0] i, input logic [31:0] im);
    p_inst[p_len-1][p_n[p_len-1]] = i; p_imm[p_len-1][p_n[p_len-1]] = im; p_n[p_len-1]++;
  endtask

  // instruction shorthands (resolved form)
  function automatic logic [31:0] ADDIU(input int rt, rs, input logic [15:0] im); return r_i(OP_ADDIU, rs, rt, im); endfunction

  task automatic build();
    // IRF contents (entry 0 is the fixed nop)
    for (int i = 0; i < 32; i++) irf_tab[i] = '{inst: NOP_WORD, pos: 3'b000};
    irf_tab[1]  = '{inst: ADDIU(5, 3, 16'd1),              pos: 3'b000};
    irf_tab[2]  = '{inst: r_i(OP_BNE, 6, 0, 16'd0),        pos: 3'b000};
    irf_tab[3]  = '{inst: r_r(5, 4, 5, 0, FN_ADDU),        pos: 3'b000};
    irf_tab[4]  = '{inst: r_i(OP_ANDI, 3, 3, 16'd63),      pos: 3'b000};
    irf_tab[5]  = '{inst: ADDIU(29, 29, 16'd4),            pos: 3'b000};
    irf_tab[6]  = '{inst: ADDIU(6, 6, 16'hFFFF),           pos: 3'b000};
    irf_tab[7]  = '{inst: r_i(OP_SW, 29, 5'b00000, 16'd12), pos: 3'b010};   // R[r29+12] = s[0]
    irf_tab[8]  = '{inst: r_r(0, 5, 0, 0, FN_ADDU),        pos: 3'b101};    // s[0] = s[0] + r5
    irf_tab[9]  = '{inst: r_i(OP_SW, 5'b10010, 5'b00000, 16'd4), pos: 3'b110}; // R[u[2]+4] = s[0]
    irf_tab[11] = '{inst: ADDIU(29, 0, 16'd256),           pos: 3'b000};
    irf_tab[12] = '{inst: ADDIU(6, 0, 16'd5),              pos: 3'b000};
    irf_tab[13] = '{inst: ADDIU(4, 0, 16'd7),              pos: 3'b000};
    irf_tab[14] = '{inst: r_r(0, 5, 7, 2, FN_SLL),         pos: 3'b000};
    irf_tab[15] = '{inst: r_r(7, 3, 8, 0, FN_XOR),         pos: 3'b000};
    irf_tab[16] = '{inst: r_r(8, 4, 9, 0, FN_OR),          pos: 3'b000};
    irf_tab[17] = '{inst: r_r(9, 6, 10, 0, FN_SUBU),       pos: 3'b000};
    irf_tab[18] = '{inst: r_r(10, 9, 11, 0, FN_SLT),       pos: 3'b000};
    irf_tab[19] = '{inst: ADDIU(12, 12, 16'd1),            pos: 3'b000};
    for (int i = 0; i < 32; i++) imm_tab[i] = 16'(i * 3 + 1);
    imm_tab[3] = 16'd32;
    imm_tab[4] = 16'd63;
    imm_tab[5] = 16'd1000;

    // plain program
    ref_len = 0;
    ref_add(ADDIU(29, 0, 16'd256), 256);
    ref_add(ADDIU(6, 0, 16'd5), 5);
    ref_add(ADDIU(4, 0, 16'd7), 7);
    ref_add(r_i(OP_LW, 29, 3, 16'd8), 8);             // 3: loop
    ref_add(r_i(OP_ANDI, 3, 3, 16'd63), 63);
    ref_add(ADDIU(5, 3, 16'd32), 32);
    ref_add(r_r(5, 4, 5, 0, FN_ADDU), 0);
    ref_add(r_i(OP_SW, 29, 5, 16'd12), 12);
    ref_add(ADDIU(29, 29, 16'd4), 4);
    ref_add(ADDIU(6, 6, 16'hFFFF), 32'hFFFF_FFFF);
    ref_add(r_i(OP_BNE, 6, 0, 16'hFFF8), 32'hFFFF_FFF8); // back to 3
    ref_add(r_i(OP_LW, 29, 2, 16'd4), 4);
    ref_add(r_r(2, 5, 2, 0, FN_ADDU), 0);
    ref_add(r_i(OP_SW, 29, 2, 16'd4), 4);
    ref_add(r_r(0, 5, 7, 2, FN_SLL), 0);
    ref_add(r_r(0, 5, 7, 2, FN_SLL), 0);
    ref_add(r_r(7, 3, 8, 0, FN_XOR), 0);
    ref_add(r_r(8, 4, 9, 0, FN_OR), 0);
    ref_add(r_r(9, 6, 10, 0, FN_SUBU), 0);
    ref_add(r_r(10, 9, 11, 0, FN_SLT), 0);
    ref_add(r_r(0, 5, 7, 2, FN_SLL), 0);
    ref_add(r_r(7, 3, 8, 0, FN_XOR), 0);
    ref_add(r_r(8, 4, 9, 0, FN_OR), 0);
    ref_add(ADDIU(12, 12, 16'd1000), 1000);
    ref_add({OP_LUI, 5'd0, 5'd13, 16'h2345}, 32'h12345 << 11);
    ref_add(r_r(13, 12, 14, 0, FN_ADDU), 0);
    ref_add(r_r(14, 4, 15, 0, FN_SUBU), 0);
    ref_add(ADDIU(4, 0, 16'd7), 7);
    ref_add(ADDIU(5, 3, 16'd32), 32);
    ref_add(r_r(5, 4, 5, 0, FN_ADDU), 0);
    ref_add(r_i(OP_BNE, 6, 0, 16'hFFF0), 32'hFFFF_FFF0); // not taken
    ref_add(r_i(OP_SW, 29, 15, 16'd0), 0);
    ref_add({OP_J, 26'd32}, 0);                        // halt: jump to itself

    // packed program, one MISA word per line
    p_len = 0;
    p_add(m_t(OP_TIGHT3, 11, 12, 13, 0, 1'b0, 0));                    // 0x00
    p_exp(ADDIU(29, 0, 16'd256), 256); p_exp(ADDIU(6, 0, 16'd5), 5); p_exp(ADDIU(4, 0, 16'd7), 7);
    p_add(m_i(OP_LW, 29, 3, 11'd8, 4));                               // 0x04 loop
    p_exp(r_i(OP_LW, 29, 3, 16'd8), 8); p_exp(r_i(OP_ANDI, 3, 3, 16'd63), 63);
    p_add(m_t(OP_PARAM4_A, 1, 3, 7, 5, 1'b1, 3));                     // 0x08
    p_exp(ADDIU(5, 3, 16'd32), 32); p_exp(r_r(5, 4, 5, 0, FN_ADDU), 0);
    p_exp(r_i(OP_SW, 29, 5, 16'd12), 12); p_exp(ADDIU(29, 29, 16'd4), 4);
    p_add(m_t(OP_PARAM2_B, 6, 2, 0, 0, 1'b1, -3));                    // 0x0C
    p_exp(ADDIU(6, 6, 16'hFFFF), 32'hFFFF_FFFF); p_exp(r_i(OP_BNE, 6, 0, 16'hFFFD), 32'hFFFF_FFFD);
    p_add(m_i(OP_LW, 29, 2, 11'd4, 8));                               // 0x10
    p_exp(r_i(OP_LW, 29, 2, 16'd4), 4); p_exp(r_r(2, 5, 2, 0, FN_ADDU), 0);
    p_add(m_t(OP_TIGHT2, 9, 14, 0, 0, 1'b0, 0));                      // 0x14
    p_exp(r_i(OP_SW, 29, 2, 16'd4), 4); p_exp(r_r(0, 5, 7, 2, FN_SLL), 0);
    p_add(m_t(OP_TIGHT5, 14, 15, 16, 17, 1'b0, 18));                  // 0x18
    p_exp(r_r(0, 5, 7, 2, FN_SLL), 0); p_exp(r_r(7, 3, 8, 0, FN_XOR), 0); p_exp(r_r(8, 4, 9, 0, FN_OR), 0);
    p_exp(r_r(9, 6, 10, 0, FN_SUBU), 0); p_exp(r_r(10, 9, 11, 0, FN_SLT), 0);
    p_add(m_t(OP_PARAM4_D, 14, 15, 16, 19, 1'b1, 5));                 // 0x1C (exception here)
    p_exp(r_r(0, 5, 7, 2, FN_SLL), 0); p_exp(r_r(7, 3, 8, 0, FN_XOR), 0); p_exp(r_r(8, 4, 9, 0, FN_OR), 0);
    p_exp(ADDIU(12, 12, 16'd1000), 1000);
    p_add({OP_LUI, 5'h01, 5'd13, 16'h2345});                          // 0x20
    p_exp({OP_LUI, 5'd0, 5'd13, 16'h2345}, 32'h12345 << 11);
    p_add(m_r(13, 12, 14, FN_ADDU, 0));                               // 0x24
    p_exp(r_r(13, 12, 14, 0, FN_ADDU), 0);
    p_add(m_r(14, 4, 15, FN_SUBU, 13));                               // 0x28
    p_exp(r_r(14, 4, 15, 0, FN_SUBU), 0); p_exp(ADDIU(4, 0, 16'd7), 7);
    p_add(m_t(OP_PARAM3_AC, 1, 3, 2, 3, 1'b1, -5));                   // 0x2C
    p_exp(ADDIU(5, 3, 16'd32), 32); p_exp(r_r(5, 4, 5, 0, FN_ADDU), 0);
    p_exp(r_i(OP_BNE, 6, 0, 16'hFFFB), 32'hFFFF_FFFB);
    p_add(m_i(OP_SW, 29, 15, 11'd0, 0));                              // 0x30
    p_exp(r_i(OP_SW, 29, 15, 16'd0), 0);
    p_add({OP_J, 26'(32'h34 >> 2)});                                  // 0x34 halt
    p_exp({OP_J, 26'(32'h34 >> 2)}, 0);
  endtask

  // ------------------------------------------------------------ executor
  logic [31:0] dmem_init [256];

  // Executes one instruction on the given state; returns 1 if control
  // transfers, with the offset (branch, in words) or absolute target (jump).
  function automatic logic exec(input logic [31:0] i, input logic [31:0] imm,
                                inout logic [31:0] rf [32], inout logic [31:0] dm [256],
                                output logic is_jump, output logic [31:0] tgt);
    logic [31:0] a, b, res;
    logic        wr, taken;
    logic [4:0]  wd;
    a = rf[i[25:21]]; b = rf[i[20:16]];
    wr = 1'b0; wd = 5'd0; res = '0; taken = 1'b0; is_jump = 1'b0; tgt = '0;
    case (i[31:26])
      OP_RTYPE: begin
        wr = 1'b1; wd = i[15:11];
        case (i[5:0])
          FN_SLL:  res = b << i[10:6];
          FN_ADDU: res = a + b;
          FN_SUBU: res = a - b;
          FN_AND:  res = a & b;
          FN_OR:   res = a | b;
          FN_XOR:  res = a ^ b;
          FN_SLT:  res = {31'd0, $signed(a) < $signed(b)};
          default: wr = 1'b0;
        endcase
      end
      OP_ADDIU: begin wr = 1'b1; wd = i[20:16]; res = a + imm; end
      OP_ANDI:  begin wr = 1'b1; wd = i[20:16]; res = a & imm; end
      OP_LUI:   begin wr = 1'b1; wd = i[20:16]; res = imm; end
      OP_LW:    begin wr = 1'b1; wd = i[20:16]; res = dm[8'((a + imm) >> 2)]; end
      OP_SW:    dm[8'((a + imm) >> 2)] = b;
      OP_BNE:   begin taken = (a != b); tgt = imm; end
      OP_BEQ:   begin taken = (a == b); tgt = imm; end
      OP_J:     begin taken = 1'b1; is_jump = 1'b1; tgt = {4'h0, i[25:0], 2'b00}; end
      default: ;
    endcase
    if (wr && wd != 5'd0) rf[wd] = res;
    return taken;
  endfunction

  // reference run of the plain list
  logic [31:0] ref_rf [32];
  logic [31:0] ref_dm [256];
  int          ref_retired;

  task automatic run_reference();
    int          pc;
    logic        t, j;
    logic [31:0] tg;
    for (int r = 0; r < 32; r++) ref_rf[r] = '0;
    ref_dm = dmem_init;
    pc = 0; ref_retired = 0;
    while (1) begin
      t = exec(ref_inst[pc], ref_imm[pc], ref_rf, ref_dm, j, tg);
      ref_retired++;
      if (j) break;               // the only jump is the halt
      pc = t ? pc + 1 + int'($signed(tg)) : pc + 1;
      if (ref_retired > 1000) break;
    end
  endtask

  // ------------------------------------------------------------ back end model
  logic [31:0] rf [32];
  logic [31:0] dm [256];
  int          retired = 0;
  logic        redir_q = 1'b0;
  logic [31:0] redir_pc_q;
  logic        rst_q = 1'b0;
  logic        halted = 1'b0;
  logic        faulted = 1'b0;   // the one exception has been taken
  logic        fault_now;
  logic        running = 1'b0;

  // mechanism counters
  int n_tight = 0, n_loose = 0, n_immparam = 0, n_brparam = 0, n_default = 0;
  int n_pos = 0, n_stall = 0, n_redirect = 0, n_restart = 0, n_skipped = 0, n_lui21 = 0;

  // the exception: third instruction of the word at 0x1C, first time only
  assign fault_now = running && !faulted && out_valid && out.pc == 32'h1C && out.slot == 3'd2;
  assign out_ready = running && !redir_q && !rst_q && !halted && !fault_now;
  assign redirect    = redir_q;
  assign redirect_pc = redir_pc_q;
  assign restart     = rst_q;
  assign restart_pc  = 32'h1C;
  assign restart_mask = 5'b00011;

  int last_issue = -1;
  int last_ctrl  = -1;   // cycle of the last redirect or restart pulse
  int restarted_word = 0;

  always @(posedge clk) begin
    if (running) begin
      if (redir_q || rst_q) last_ctrl = cycle;
      if (dut.ifid_valid && !dut.can_load) n_stall++;
      redir_q <= 1'b0;
      rst_q   <= 1'b0;
      if (fault_now) begin
        checks++;
        if (done_mask !== 5'b00011 || word_pc !== 32'h1C) fail($sformatf("exception: done_mask %b word_pc %h", done_mask, word_pc));
        faulted <= 1'b1;
        rst_q   <= 1'b1;
        n_restart++;
      end
      if (out_valid && out_ready) begin
        int          w, s;
        logic        t, j;
        logic [31:0] tg;
        w = int'(out.pc >> 2);
        s = int'(out.slot);
        // the instruction matches the one expected for this word and slot
        checks++;
        if (w >= p_len || s >= p_n[w] || out.inst !== p_inst[w][s] || out.imm !== p_imm[w][s])
          fail($sformatf("issued pc %h slot %0d inst %h imm %h", out.pc, s, out.inst, out.imm));
        // timing
        checks++;
        if (last_ctrl >= 0 && last_ctrl > last_issue) begin
          if (cycle - last_ctrl != 3) fail($sformatf("first issue %0d cycles after redirect", cycle - last_ctrl));
        end else if (last_issue >= 0 && cycle - last_issue != 1) begin
          fail($sformatf("bubble of %0d cycles before pc %h slot %0d", cycle - last_issue - 1, out.pc, s));
        end
        last_issue = cycle;
        // mechanisms
        if (out.from_irf && w < p_len && p_word[w][31:26] inside {OP_TIGHT5, OP_TIGHT4, OP_TIGHT3, OP_TIGHT2,
             OP_PARAM4_A, OP_PARAM4_B, OP_PARAM4_C, OP_PARAM4_D, OP_PARAM3_A, OP_PARAM3_B, OP_PARAM3_C,
             OP_PARAM3_AB, OP_PARAM3_AC, OP_PARAM3_BC, OP_PARAM2_A, OP_PARAM2_B, OP_PARAM2_AB} && s == 0) n_tight++;
        if (out.from_irf && s == 1 && w < p_len && p_word[w][31:26] inside {OP_RTYPE, OP_LW, OP_SW, OP_ADDIU}) n_loose++;
        if (out.pc == 32'h1C && s == 2) begin restarted_word++; if (faulted) n_skipped++; end
        if (out.pc == 32'h1C && (s == 0 || s == 1) && faulted) fail("completed slot issued again after restart");
        if (out.from_irf && out.inst[31:26] == OP_BNE && out.imm != 0) n_brparam++;
        if (out.from_irf && out.inst[31:26] == OP_ADDIU && (out.imm == 32 || out.imm == 1000)) n_immparam++;
        if (out.from_irf && out.inst[31:26] == OP_ANDI && out.imm == 63) n_default++;
        if (out.from_irf && (out.inst == r_i(OP_SW, 29, 5, 16'd12) || out.inst == r_r(2, 5, 2, 0, FN_ADDU) ||
                             out.inst == r_i(OP_SW, 29, 2, 16'd4))) n_pos++;
        if (!out.from_irf && out.inst[31:26] == OP_LUI) n_lui21++;
        // execute
        t = exec(out.inst, out.imm, rf, dm, j, tg);
        retired++;
        if (j && tg == out.pc) begin
          halted <= 1'b1;
        end else if (t) begin
          redir_q    <= 1'b1;
          redir_pc_q <= j ? tg : out.pc + 32'd4 + (tg << 2);
          n_redirect++;
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    rst_n = 1'b0;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    irf_we = 1'b0; irf_waddr = '0; irf_wdata = '0;
    imm_we = 1'b0; imm_waddr = '0; imm_wdata = '0;
    pos_restore = 1'b0;
    for (int i = 0; i < 4; i++) begin pos_restore_s[i] = '0; pos_restore_u[i] = '0; end
    redir_pc_q = '0;
    for (int r = 0; r < 32; r++) rf[r] = '0;
    for (int a = 0; a < 256; a++) dmem_init[a] = $urandom;
    dm = dmem_init;
    build();
    run_reference();

    // load the instruction store (it has no reset)
    for (int k = 0; k < p_len; k++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 32'(k * 4); imem_wdata = p_word[k];
    end
    @(negedge clk);
    imem_we = 1'b0;
    rst_n = 1'b1;
    // load IRF and Immediate Table while the back end accepts nothing
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      irf_we = 1'b1; irf_waddr = 5'(i); irf_wdata = irf_tab[i];
      imm_we = 1'b1; imm_waddr = 5'(i); imm_wdata = imm_tab[i];
    end
    @(negedge clk);
    irf_we = 1'b0; imm_we = 1'b0;
    // jump to the program start: empties whatever was fetched meanwhile
    redir_pc_q = 32'h0;
    redir_q = 1'b1;
    running = 1'b1;
    wait (halted);
    repeat (2) @(negedge clk);

    // final state against the reference run
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (rf[r] !== ref_rf[r]) fail($sformatf("r%0d = %h, reference %h", r, rf[r], ref_rf[r]));
    end
    for (int a = 0; a < 256; a++) begin
      checks++;
      if (dm[a] !== ref_dm[a]) fail($sformatf("mem[%0d] = %h, reference %h", a, dm[a], ref_dm[a]));
    end
    checks++;
    if (retired != ref_retired) fail($sformatf("retired %0d, reference %0d", retired, ref_retired));

    $display("mechanisms: tight=%0d loose=%0d imm_param=%0d branch_param=%0d default_imm=%0d positional=%0d",
             n_tight, n_loose, n_immparam, n_brparam, n_default, n_pos);
    $display("            fetch_stall_cycles=%0d redirects=%0d restarts=%0d restart_skips=%0d lui21=%0d retired=%0d cycles=%0d",
             n_stall, n_redirect, n_restart, n_skipped, n_lui21, retired, cycle);
    checks++; if (n_tight == 0)    fail("no tightly packed word issued");
    checks++; if (n_loose == 0)    fail("no loosely packed word issued");
    checks++; if (n_immparam == 0) fail("no Immediate Table parameter used");
    checks++; if (n_brparam == 0)  fail("no branch displacement parameter used");
    checks++; if (n_default == 0)  fail("no default immediate used");
    checks++; if (n_pos == 0)      fail("no positional register resolved");
    checks++; if (n_stall == 0)    fail("fetch never stalled");
    checks++; if (n_redirect == 0) fail("no redirect");
    checks++; if (n_restart == 0)  fail("no restart");
    checks++; if (n_skipped == 0 || restarted_word != 1) fail("restart did not resume at the faulting slot");
    checks++; if (n_lui21 == 0)    fail("no 21-bit lui");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
