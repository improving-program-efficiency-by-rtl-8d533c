// tb_fetch_stage: self-checking test of the PC and IF/ID register. The
// instruction store is modelled as a function of the address
// (word = ~address). The decode side takes the IF/ID word on a random
// subset of cycles; redirects are issued at random. A reference PC kept in
// the testbench predicts every IF/ID (pc, word) pair. Checks the one-cycle
// fetch latency after reset and after a redirect, and that IF/ID holds its
// word while it is not taken (the fetch stall).
module tb_fetch_stage;
  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] imem_addr, imem_data;
  logic        redirect;
  logic [31:0] redirect_pc;
  logic        ifid_valid;
  logic [31:0] ifid_pc, ifid_word;
  logic        take;
  int          checks = 0, failures = 0;
  int          stalls = 0, redirects = 0;
  logic [31:0] exp_pc;     // address of the next word to appear in IF/ID
  logic        exp_valid;

  fetch_stage #(.RESET_PC(32'h40)) dut (.*);

  assign imem_data = ~imem_addr;

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; redirect = 1'b0; redirect_pc = '0; take = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_pc = 32'h40; exp_valid = 1'b0;
    @(negedge clk);
    // first word one cycle after reset
    checks++;
    if (!ifid_valid || ifid_pc !== 32'h40 || ifid_word !== ~32'h40) begin
      failures++;
      $display("fetch: first word wrong %b %h %h", ifid_valid, ifid_pc, ifid_word);
    end
    exp_valid = 1'b1;
    for (int c = 0; c < 400; c++) begin
      take        = ($urandom_range(0, 3) != 0);
      redirect    = ($urandom_range(0, 15) == 0);
      redirect_pc = {$urandom_range(0, 255), 2'b00};
      #1;
      checks++;
      if (ifid_valid !== exp_valid || (exp_valid && (ifid_pc !== exp_pc || ifid_word !== ~exp_pc))) begin
        failures++;
        $display("fetch: cycle %0d IF/ID %b %h %h expected %b %h", c, ifid_valid, ifid_pc, ifid_word, exp_valid, exp_pc);
      end
      @(negedge clk);
      // reference update
      if (redirect) begin
        redirects++;
        exp_pc    = redirect_pc;
        exp_valid = 1'b0;
      end else if (!exp_valid) begin
        exp_valid = 1'b1;
      end else if (take) begin
        exp_pc = exp_pc + 32'd4;
      end else begin
        stalls++;
      end
    end
    checks++;
    if (stalls == 0 || redirects == 0) begin
      failures++;
      $display("fetch: stall or redirect never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
