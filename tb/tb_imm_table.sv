// tb_imm_table: self-checking test of the Immediate Table. Loads all 32
// entries with random 16-bit values (including the published example
// values 32 at index 3 and 63 at index 4), then reads random pairs through
// the two read ports and compares with a copy kept in the testbench. Also
// checks that reset clears the table.
module tb_imm_table;
  import irf_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        we;
  logic [4:0]  waddr, raddr_a, raddr_b;
  logic [15:0] wdata, rdata_a, rdata_b;
  logic [15:0] model [32];
  int          checks = 0, failures = 0;

  imm_table #(.ENTRIES(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0; raddr_a = 5'd7; raddr_b = 5'd31;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (rdata_a !== 16'h0 || rdata_b !== 16'h0) begin
      failures++;
      $display("imm_table: not cleared by reset");
    end
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 5'(i);
      wdata = (i == 3) ? 16'd32 : (i == 4) ? 16'd63 : 16'($urandom);
      model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    raddr_a = 5'd3; raddr_b = 5'd4;
    #1;
    checks++;
    if (rdata_a !== 16'd32 || rdata_b !== 16'd63) begin
      failures++;
      $display("imm_table: example entries read %0d %0d", rdata_a, rdata_b);
    end
    for (int r = 0; r < 50; r++) begin
      raddr_a = 5'($urandom); raddr_b = 5'($urandom);
      #1;
      checks++;
      if (rdata_a !== model[raddr_a] || rdata_b !== model[raddr_b]) begin
        failures++;
        $display("imm_table: read %h/%h expected %h/%h", rdata_a, rdata_b, model[raddr_a], model[raddr_b]);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
