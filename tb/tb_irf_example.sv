// tb_irf_example: runs the published worked example of instruction packing
// through the full front end at its default sizes.
//
// IRF: 0 nop, 1 addiu r5,r3,1, 2 beq r5,r0,0, 3 addu r5,r5,r4,
//      4 andi r3,r3,63.   Immediate Table: 3 -> 32, 4 -> 63.
// The five-instruction sequence
//      lw r3,8(r29); andi r3,r3,63; addiu r5,r3,32; addu r5,r5,r4; beq r5,r0,L
// is stored as two MISA words:
//      0x14  lw r3, 8(r29) {4}          (loosely packed I-format)
//      0x18  param3_AC {1,3,2} {3,-5}   (tightly packed, s = 1)
// Around it: 0x00 addiu r29,r0,0x100; 0x04 j 0x10; 0x08 j 0x08 (the
// branch target, a halt); 0x10 addiu r4,r0,-42. With M[0x108] = 0x40A the
// sum in r5 is 0, so the branch is taken: 0x18 + 4 - 5*4 = 0x08.
//
// Checks that the issued stream is exactly the expected list of (word
// address, slot, MIPS word, operand), that the five instructions of the two
// packed words issue in five consecutive cycles, that each packed word is
// fetched once, and the final registers of an instruction-level back-end
// model (r3 = 10, r4 = -42, r5 = 0).
module tb_irf_example;
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
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("tb_irf_example: %s", msg);
  endtask

  // program words
  logic [31:0] prog [8];
  // expected issue list
  typedef struct {
    logic [31:0] pc;
    int          slot;
    logic [31:0] inst;
    logic [31:0] imm;
  } exp_t;
  exp_t exp_q [$];

  logic [31:0] rf [32];
  logic [31:0] mem108;
  logic        redir_q = 1'b0;
  logic [31:0] redir_pc_q = '0;
  logic        halted = 1'b0;
  logic        running = 1'b0;
  int          pack_cycles [$];
  int          fetch_14 = 0, fetch_18 = 0;

  assign out_ready    = running && !redir_q && !halted;
  assign redirect     = redir_q;
  assign redirect_pc  = redir_pc_q;
  assign restart      = 1'b0;
  assign restart_pc   = '0;
  assign restart_mask = '0;
  assign pos_restore  = 1'b0;

  always @(posedge clk) begin
    if (running) begin
      redir_q <= 1'b0;
      if (dut.ifid_valid && dut.can_load && dut.ifid_pc == 32'h14) fetch_14++;
      if (dut.ifid_valid && dut.can_load && dut.ifid_pc == 32'h18) fetch_18++;
      if (out_valid && out_ready) begin
        logic [31:0] a, b;
        checks++;
        if (exp_q.size() == 0) fail("more instructions issued than expected");
        else begin
          exp_t e;
          e = exp_q.pop_front();
          if (out.pc !== e.pc || int'(out.slot) != e.slot || out.inst !== e.inst || out.imm !== e.imm)
            fail($sformatf("issued pc %h slot %0d %h imm %h, expected pc %h slot %0d %h imm %h",
                           out.pc, out.slot, out.inst, out.imm, e.pc, e.slot, e.inst, e.imm));
        end
        if (out.pc == 32'h14 || out.pc == 32'h18) pack_cycles.push_back(cycle);
        // execute the small subset used here
        a = rf[out.inst[25:21]]; b = rf[out.inst[20:16]];
        case (out.inst[31:26])
          OP_ADDIU: rf[out.inst[20:16]] = a + out.imm;
          OP_ANDI:  rf[out.inst[20:16]] = a & out.imm;
          OP_LW:    rf[out.inst[20:16]] = (a + out.imm == 32'h108) ? mem108 : 32'hBAD0_BAD0;
          OP_RTYPE: if (out.inst[5:0] == 6'h21 && out.inst[15:11] != 0) rf[out.inst[15:11]] = a + b;
          OP_BEQ:   if (a == b) begin
                      redir_q <= 1'b1; redir_pc_q <= out.pc + 32'd4 + (out.imm << 2);
                    end
          OP_J:     if ({4'h0, out.inst[25:0], 2'b00} == out.pc) halted <= 1'b1;
                    else begin
                      redir_q <= 1'b1; redir_pc_q <= {4'h0, out.inst[25:0], 2'b00};
                    end
          default: ;
        endcase
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    irf_we = 1'b0; irf_waddr = '0; irf_wdata = '0;
    imm_we = 1'b0; imm_waddr = '0; imm_wdata = '0;
    for (int i = 0; i < 4; i++) begin pos_restore_s[i] = '0; pos_restore_u[i] = '0; end
    for (int r = 0; r < 32; r++) rf[r] = '0;
    mem108 = 32'h0000_040A;

    prog[0] = {OP_ADDIU, 5'd0, 5'd29, 11'h100, 5'd0};
    prog[1] = {OP_J, 26'(32'h10 >> 2)};
    prog[2] = {OP_J, 26'(32'h08 >> 2)};
    prog[3] = NOP_WORD;
    prog[4] = {OP_ADDIU, 5'd0, 5'd4, 11'(-42), 5'd0};
    prog[5] = {OP_LW, 5'd29, 5'd3, 11'd8, 5'd4};                                // lw r3,8(r29) {4}
    prog[6] = {OP_PARAM3_AC, 5'd1, 5'd3, 5'd2, 5'd3, 1'b1, 5'(-5)};               // param3_AC {1,3,2} {3,-5}
    prog[7] = {OP_J, 26'(32'h1C >> 2)};

    exp_q.push_back('{32'h00, 0, {OP_ADDIU, 5'd0, 5'd29, 16'h0100}, 32'h100});
    exp_q.push_back('{32'h04, 0, prog[1], 32'h0});
    exp_q.push_back('{32'h10, 0, {OP_ADDIU, 5'd0, 5'd4, 16'(-42)}, 32'(-42)});
    exp_q.push_back('{32'h14, 0, {OP_LW, 5'd29, 5'd3, 16'd8}, 32'd8});
    exp_q.push_back('{32'h14, 1, {OP_ANDI, 5'd3, 5'd3, 16'd63}, 32'd63});
    exp_q.push_back('{32'h18, 0, {OP_ADDIU, 5'd3, 5'd5, 16'd32}, 32'd32});
    exp_q.push_back('{32'h18, 1, {OP_RTYPE, 5'd5, 5'd4, 5'd5, 5'd0, 6'h21}, 32'd0});
    exp_q.push_back('{32'h18, 2, {OP_BEQ, 5'd5, 5'd0, 16'hFFFB}, 32'hFFFF_FFFB});
    exp_q.push_back('{32'h08, 0, prog[2], 32'h0});

    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 32'(k * 4); imem_wdata = prog[k];
    end
    @(negedge clk);
    imem_we = 1'b0;
    rst_n = 1'b1;
    for (int i = 0; i <= 4; i++) begin
      @(negedge clk);
      irf_we = 1'b1; irf_waddr = 5'(i);
      case (i)
        1: irf_wdata = '{inst: {OP_ADDIU, 5'd3, 5'd5, 16'd1}, pos: 3'b000};
        2: irf_wdata = '{inst: {OP_BEQ, 5'd5, 5'd0, 16'd0}, pos: 3'b000};
        3: irf_wdata = '{inst: {OP_RTYPE, 5'd5, 5'd4, 5'd5, 5'd0, 6'h21}, pos: 3'b000};
        4: irf_wdata = '{inst: {OP_ANDI, 5'd3, 5'd3, 16'd63}, pos: 3'b000};
        default: irf_wdata = '{inst: NOP_WORD, pos: 3'b000};
      endcase
      imm_we = (i >= 3); imm_waddr = 5'(i); imm_wdata = (i == 3) ? 16'd32 : 16'd63;
    end
    @(negedge clk);
    irf_we = 1'b0; imm_we = 1'b0;
    redir_pc_q = 32'h0;
    redir_q = 1'b1;
    running = 1'b1;
    wait (halted);
    repeat (2) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) fail($sformatf("%0d expected instructions never issued", exp_q.size()));
    checks++;
    if (pack_cycles.size() != 5 || pack_cycles[4] - pack_cycles[0] != 4)
      fail("the five packed instructions did not issue in five consecutive cycles");
    checks++;
    if (fetch_14 != 1 || fetch_18 != 1) fail($sformatf("packed words fetched %0d and %0d times", fetch_14, fetch_18));
    checks++;
    if (rf[3] !== 32'd10 || rf[4] !== 32'(-42) || rf[5] !== 32'd0)
      fail($sformatf("final r3=%0d r4=%0d r5=%0d", rf[3], $signed(rf[4]), rf[5]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
