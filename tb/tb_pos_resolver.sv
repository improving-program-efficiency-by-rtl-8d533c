// tb_pos_resolver: self-checking test of positional register resolution.
// 1. The published example: the same three IRF entries
//      r[x]=R[r[29]+4] (plain), s[0]=s[0]+r[5], R[u[2]+4]=s[0]
//    resolve to registers r2 after "lw r2" and to r3 after "lw r3".
// 2. An instruction offered while out_ready is low does not enter the
//    history.
// 3. Context save/restore: the history is read out, disturbed, restored,
//    and resolution continues as before.
// 4. Random instruction mixes with random positional fields, checked
//    against a reference kept here with queues (most recent first).
module tb_pos_resolver;
  import irf_pkg::*;
  localparam int D = 4;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  risa_t      in;
  logic       out_ready;
  risa_t      out;
  logic [4:0] state_s [D];
  logic [4:0] state_u [D];
  logic       restore;
  logic [4:0] restore_s [D];
  logic [4:0] restore_u [D];
  int         checks = 0, failures = 0;
  logic [4:0] sq[$], uq[$];   // reference histories, index 0 = most recent

  pos_resolver #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] LW_R2   = {OP_LW, 5'd29, 5'd2, 16'd4};
  localparam logic [31:0] LW_R3   = {OP_LW, 5'd29, 5'd3, 16'd4};
  // s[0] = s[0] + r[5]
  localparam logic [31:0] ADD_POS = {OP_RTYPE, 5'b00000, 5'd5, 5'b00000, 5'd0, 6'h21};
  // R[u[2] + 4] = s[0]
  localparam logic [31:0] SW_POS  = {OP_SW, 5'b10010, 5'b00000, 16'd4};

  task automatic issue(input logic [31:0] inst, input posflags_t pos, input logic [31:0] exp);
    in = '0; in.inst = inst; in.pos = pos; in_valid = 1'b1; out_ready = 1'b1;
    #1;
    checks++;
    if (out.inst !== exp || out.pos !== 3'b000) begin
      failures++;
      $display("pos_resolver: %h resolved to %h, expected %h", inst, out.inst, exp);
    end
    @(negedge clk);
  endtask

  function automatic logic [4:0] ref_lookup(input logic [4:0] spec);
    if (spec[3:0] >= 4'(D)) return 5'd0;
    return spec[4] ? uq[spec[3:0]] : sq[spec[3:0]];
  endfunction

  // record a resolved instruction in the reference histories
  task automatic ref_record(input logic [31:0] i);
    logic [5:0] op;
    op = i[31:26];
    if (op == OP_RTYPE) begin
      sq.push_front(i[15:11]);
      uq.push_front(i[25:21]);
      uq.push_front(i[20:16]);
    end else if (op == OP_SW || op == OP_BEQ) begin
      uq.push_front(i[25:21]);
      uq.push_front(i[20:16]);
    end else begin  // lw, addiu
      sq.push_front(i[20:16]);
      uq.push_front(i[25:21]);
    end
    while (sq.size() > D) void'(sq.pop_back());
    while (uq.size() > D) void'(uq.pop_back());
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in = '0; out_ready = 1'b0; restore = 1'b0;
    for (int i = 0; i < D; i++) begin restore_s[i] = '0; restore_u[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. the published example
    issue(LW_R2,   3'b000, LW_R2);
    issue(ADD_POS, 3'b101, {OP_RTYPE, 5'd2, 5'd5, 5'd2, 5'd0, 6'h21});
    issue(SW_POS,  3'b110, {OP_SW, 5'd29, 5'd2, 16'd4});
    issue(LW_R3,   3'b000, LW_R3);
    issue(ADD_POS, 3'b101, {OP_RTYPE, 5'd3, 5'd5, 5'd3, 5'd0, 6'h21});

    // 2. not accepted: history must not move
    in = '0; in.inst = {OP_LW, 5'd1, 5'd9, 16'd0}; in_valid = 1'b1; out_ready = 1'b0;
    @(negedge clk);
    issue(SW_POS,  3'b110, {OP_SW, 5'd29, 5'd3, 16'd4});

    // 3. save, disturb, restore
    begin
      logic [4:0] ss [D];
      logic [4:0] su [D];
      ss = state_s; su = state_u;
      issue({OP_LW, 5'd7, 5'd8, 16'd0}, 3'b000, {OP_LW, 5'd7, 5'd8, 16'd0});
      issue({OP_LW, 5'd7, 5'd9, 16'd0}, 3'b000, {OP_LW, 5'd7, 5'd9, 16'd0});
      in_valid = 1'b0; restore = 1'b1; restore_s = ss; restore_u = su;
      @(negedge clk);
      restore = 1'b0;
      // after "sw r3, 4(r29)": s = {r3, r3(add), ...}, u = {r3, r29, r5, r3}
      issue({OP_SW, 5'b10001, 5'b00000, 16'd0}, 3'b110, {OP_SW, 5'd29, 5'd3, 16'd0});
    end

    // 4. random mixes against the reference
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    sq.delete(); uq.delete();
    for (int i = 0; i < D; i++) begin sq.push_back(5'd0); uq.push_back(5'd0); end
    for (int n = 0; n < 400; n++) begin
      logic [31:0] i, e;
      posflags_t   p;
      int          kind;
      kind = $urandom_range(0, 3);
      case (kind)
        0: i = {OP_RTYPE, 5'($urandom), 5'($urandom), 5'($urandom), 5'd0, 6'h21};
        1: i = {OP_LW, 5'($urandom), 5'($urandom), 16'($urandom)};
        2: i = {OP_SW, 5'($urandom), 5'($urandom), 16'($urandom)};
        default: i = {OP_ADDIU, 5'($urandom), 5'($urandom), 16'($urandom)};
      endcase
      p = 3'($urandom);
      if (kind != 0) p.rd = 1'b0;
      // keep positional indices inside the history depth
      if (p.rs) i[24:21] = 4'($urandom_range(0, D - 1));
      if (p.rt) i[19:16] = 4'($urandom_range(0, D - 1));
      if (p.rd) i[14:11] = 4'($urandom_range(0, D - 1));
      e = i;
      if (p.rs) e[25:21] = ref_lookup(i[25:21]);
      if (p.rt) e[20:16] = ref_lookup(i[20:16]);
      if (p.rd) e[15:11] = ref_lookup(i[15:11]);
      issue(i, p, e);
      ref_record(e);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
