// tb_misa_decoder: self-checking test of the MISA word decoder.
// Directed cases: the worked example of a packed loop body, i.e. the loose
// "lw r3, 8(r29) {4}" and the tight word param3_AC {1,3,2} {3,-5}, plus
// tight5, param4, param2_AB, a shift and an add in the loose R format, a
// 21-bit lui and a jump. Then random loose I-format words, checked against
// an independent field extraction written here.
module tb_misa_decoder;
  import irf_pkg::*;
  logic [31:0] pc, word;
  misa_kind_e  kind;
  logic [2:0]  ninst;
  logic        slot0_from_irf;
  risa_t       own;
  logic [4:0]  irf_idx [MAX_PACK];
  psrc_e       psrc    [MAX_PACK];
  logic [4:0]  f4, f5;
  int          checks = 0, failures = 0;

  misa_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("misa_decoder: %s = %h, expected %h (word %h)", what, got, exp, word);
    end
  endtask

  function automatic logic [31:0] tword(input logic [5:0] op, input int i1, i2, i3, i4,
                                        input logic s, input int i5);
    return {op, 5'(i1), 5'(i2), 5'(i3), 5'(i4), s, 5'(i5)};
  endfunction

  initial begin
    pc = 32'h100;
    // lw r3, 8(r29) {4}
    word = {6'h23, 5'd29, 5'd3, 11'd8, 5'd4};
    #1;
    expect_eq("kind", 32'(kind), 32'(MK_LOOSE_I));
    expect_eq("ninst", 32'(ninst), 2);
    expect_eq("slot0_from_irf", 32'(slot0_from_irf), 0);
    expect_eq("own.inst", own.inst, {6'h23, 5'd29, 5'd3, 16'd8});
    expect_eq("own.imm", own.imm, 8);
    expect_eq("own.pc", own.pc, 32'h100);
    expect_eq("irf_idx[1]", 32'(irf_idx[1]), 4);

    // param3_AC {1,3,2} {3,-5}
    word = tword(OP_PARAM3_AC, 1, 3, 2, 3, 1'b1, -5);
    #1;
    expect_eq("kind", 32'(kind), 32'(MK_TIGHT));
    expect_eq("ninst", 32'(ninst), 3);
    expect_eq("slot0_from_irf", 32'(slot0_from_irf), 1);
    expect_eq("idx0", 32'(irf_idx[0]), 1);
    expect_eq("idx1", 32'(irf_idx[1]), 3);
    expect_eq("idx2", 32'(irf_idx[2]), 2);
    expect_eq("psrc0", 32'(psrc[0]), 32'(PSRC_F4));
    expect_eq("psrc1", 32'(psrc[1]), 32'(PSRC_NONE));
    expect_eq("psrc2", 32'(psrc[2]), 32'(PSRC_F5));
    expect_eq("f4", 32'(f4), 3);
    expect_eq("f5", 32'(f5), 32'h1B);

    // same word with s = 0: field 5 is not a parameter
    word = tword(OP_PARAM3_AC, 1, 3, 2, 3, 1'b0, -5);
    #1;
    expect_eq("psrc2 s=0", 32'(psrc[2]), 32'(PSRC_NONE));

    // tight5 {9,8,7,6,5}
    word = tword(OP_TIGHT5, 9, 8, 7, 6, 1'b0, 5);
    #1;
    expect_eq("t5 ninst", 32'(ninst), 5);
    for (int k = 0; k < 5; k++) begin
      expect_eq("t5 idx", 32'(irf_idx[k]), 32'(9 - k));
      expect_eq("t5 psrc", 32'(psrc[k]), 32'(PSRC_NONE));
    end

    // param4_B {1,2,3,4} {17}
    word = tword(OP_PARAM4_B, 1, 2, 3, 4, 1'b1, 17);
    #1;
    expect_eq("p4 ninst", 32'(ninst), 4);
    expect_eq("p4 idx3", 32'(irf_idx[3]), 4);
    expect_eq("p4 psrc1", 32'(psrc[1]), 32'(PSRC_F5));
    expect_eq("p4 psrc0", 32'(psrc[0]), 32'(PSRC_NONE));

    // param2_AB {6,7} {2,3}
    word = tword(OP_PARAM2_AB, 6, 7, 0, 2, 1'b1, 3);
    #1;
    expect_eq("p2 ninst", 32'(ninst), 2);
    expect_eq("p2 psrc0", 32'(psrc[0]), 32'(PSRC_F4));
    expect_eq("p2 psrc1", 32'(psrc[1]), 32'(PSRC_F5));

    // loose R: addu r5, r5, r4 {0}
    word = {6'h00, 5'd5, 5'd4, 5'd5, 6'h21, 5'd0};
    #1;
    expect_eq("R kind", 32'(kind), 32'(MK_LOOSE_R));
    expect_eq("R ninst", 32'(ninst), 1);
    expect_eq("R inst", own.inst, {6'h00, 5'd5, 5'd4, 5'd5, 5'd0, 6'h21});

    // loose R shift: sll r7, r5, 2 {14}: shamt shares the rs field
    word = {6'h00, 5'd2, 5'd5, 5'd7, 6'h00, 5'd14};
    #1;
    expect_eq("sll inst", own.inst, {6'h00, 5'd0, 5'd5, 5'd7, 5'd2, 6'h00});
    expect_eq("sll ninst", 32'(ninst), 2);
    expect_eq("sll idx1", 32'(irf_idx[1]), 14);

    // lui r14 with 21-bit immediate 0x12345
    word = {OP_LUI, 5'h01, 5'd14, 16'h2345};
    #1;
    expect_eq("lui kind", 32'(kind), 32'(MK_LUI));
    expect_eq("lui imm", own.imm, 32'h12345 << 11);
    expect_eq("lui ninst", 32'(ninst), 1);
    expect_eq("lui rt", 32'(own.inst[20:16]), 14);

    // j 0x40
    word = {OP_J, 26'h10};
    #1;
    expect_eq("j kind", 32'(kind), 32'(MK_JUMP));
    expect_eq("j inst", own.inst, word);
    expect_eq("j ninst", 32'(ninst), 1);

    // andi zero-extends its 11-bit immediate, addiu sign-extends
    word = {OP_ANDI, 5'd3, 5'd3, 11'h7FF, 5'd0};
    #1;
    expect_eq("andi imm", own.imm, 32'h7FF);
    word = {OP_ADDIU, 5'd6, 5'd6, 11'h7FF, 5'd0};
    #1;
    expect_eq("addiu imm", own.imm, 32'hFFFF_FFFF);

    // random loose I words against an independent extraction
    for (int r = 0; r < 200; r++) begin
      logic [5:0]  op;
      logic [10:0] im;
      logic [31:0] eimm;
      logic [4:0]  ins;
      op  = 6'($urandom_range(8, 14));          // addi .. xori
      im  = 11'($urandom);
      ins = 5'($urandom);
      word = {op, 5'($urandom), 5'($urandom), im, ins};
      eimm = (op >= 6'hC) ? 32'(im) : 32'($signed(im));
      #1;
      expect_eq("rnd imm", own.imm, eimm);
      expect_eq("rnd rs", 32'(own.inst[25:21]), 32'(word[25:21]));
      expect_eq("rnd ninst", 32'(ninst), (ins == 0) ? 1 : 2);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
