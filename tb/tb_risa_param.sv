// tb_risa_param: self-checking test of parameter application. For each
// case an IRF entry is presented with or without a parameter and the issued
// immediate is compared with a value worked out here: the entry's default
// (sign- or zero-extended), an Immediate Table value replacing the default
// (the worked example: addiu r5, r3, 1 with IMM[3] = 32 gives 32), a 5-bit
// branch displacement (beq with parameter -5), lui and R-type entries.
// Random entries are then checked against the same rules.
module tb_risa_param;
  import irf_pkg::*;
  irf_entry_t  entry;
  logic        has_param;
  logic [4:0]  param;
  logic [15:0] imm_value;
  logic [31:0] pc;
  logic [2:0]  slot;
  risa_t       out;
  int          checks = 0, failures = 0;

  risa_param dut (.*);

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
      $display("risa_param: %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    pc = 32'h200; slot = 3'd2;
    // addiu r5, r3, 1 with default immediate
    entry = '{inst: {OP_ADDIU, 5'd3, 5'd5, 16'd1}, pos: 3'b000};
    has_param = 1'b0; param = 5'd3; imm_value = 16'd32;
    #1;
    expect_eq("default imm", out.imm, 1);
    expect_eq("default inst", out.inst, {OP_ADDIU, 5'd3, 5'd5, 16'd1});
    expect_eq("pc", out.pc, 32'h200);
    expect_eq("slot", 32'(out.slot), 2);
    expect_eq("from_irf", 32'(out.from_irf), 1);
    // ... with IMM[3] = 32
    has_param = 1'b1;
    #1;
    expect_eq("param imm", out.imm, 32);
    expect_eq("param inst", out.inst, {OP_ADDIU, 5'd3, 5'd5, 16'd32});
    // beq r5, r0 with displacement -5
    entry = '{inst: {OP_BEQ, 5'd5, 5'd0, 16'd0}, pos: 3'b000};
    param = 5'h1B; imm_value = 16'h1234;
    #1;
    expect_eq("branch disp", out.imm, 32'hFFFF_FFFB);
    // andi r3, r3, 63 default, zero-extended large immediate from IMM
    entry = '{inst: {OP_ANDI, 5'd3, 5'd3, 16'd63}, pos: 3'b010};
    has_param = 1'b0;
    #1;
    expect_eq("andi default", out.imm, 63);
    expect_eq("pos kept", 32'(out.pos), 32'b010);
    has_param = 1'b1; imm_value = 16'hF000;
    #1;
    expect_eq("andi param", out.imm, 32'h0000_F000);
    // lw with negative offset from IMM
    entry = '{inst: {OP_LW, 5'd29, 5'd2, 16'd4}, pos: 3'b000};
    imm_value = 16'hFFF8;
    #1;
    expect_eq("lw param", out.imm, 32'hFFFF_FFF8);
    // lui default
    entry = '{inst: {OP_LUI, 5'd0, 5'd9, 16'hABCD}, pos: 3'b000};
    has_param = 1'b0;
    #1;
    expect_eq("lui", out.imm, 32'hABCD_0000);
    // R-type: immediate unused
    entry = '{inst: {OP_RTYPE, 5'd5, 5'd4, 5'd5, 5'd0, 6'h21}, pos: 3'b000};
    has_param = 1'b1;
    #1;
    expect_eq("R imm", out.imm, 0);
    expect_eq("R inst", out.inst, {OP_RTYPE, 5'd5, 5'd4, 5'd5, 5'd0, 6'h21});

    for (int r = 0; r < 300; r++) begin
      logic [5:0]  op;
      logic [15:0] dflt;
      logic [15:0] v;
      logic [31:0] e;
      op        = 6'($urandom_range(4, 14));   // beq .. xori
      dflt      = 16'($urandom);
      has_param = 1'($urandom);
      param     = 5'($urandom);
      imm_value = 16'($urandom);
      entry     = '{inst: {op, 5'($urandom), 5'($urandom), dflt}, pos: 3'b000};
      v = has_param ? imm_value : dflt;
      if (has_param && op <= 6'h07)  e = {{27{param[4]}}, param};
      else if (op >= 6'h0C)          e = {16'h0, v};
      else                           e = {{16{v[15]}}, v};
      #1;
      expect_eq("rnd", out.imm, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
