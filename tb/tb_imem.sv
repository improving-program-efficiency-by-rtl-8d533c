// tb_imem: self-checking test of the instruction store. Writes a pattern
// of words through the load port, then reads every written address back
// through the asynchronous read port and compares with the pattern
// (word = address * 0x9E3779B1 + 7). Also checks that the byte-offset bits
// of the address are ignored and that a write is visible in the next cycle.
module tb_imem;
  localparam int unsigned WORDS = 64;
  logic        clk = 1'b0;
  logic        we;
  logic [31:0] wr_addr, wr_data, rd_addr, rd_data;
  int          checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(input int a);
    return 32'(a) * 32'h9E37_79B1 + 32'd7;
  endfunction

  initial begin
    we = 1'b0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    for (int a = 0; a < int'(WORDS); a++) begin
      @(negedge clk);
      we = 1'b1; wr_addr = 32'(a * 4); wr_data = pat(a);
    end
    @(negedge clk);
    we = 1'b0;
    for (int a = 0; a < int'(WORDS); a++) begin
      rd_addr = 32'(a * 4) + 32'(a % 4);
      #1;
      checks++;
      if (rd_data !== pat(a)) begin
        failures++;
        $display("imem: addr %0d read %h expected %h", a, rd_data, pat(a));
      end
    end
    // write then read in the following cycle
    @(negedge clk);
    we = 1'b1; wr_addr = 32'd20; wr_data = 32'hDEAD_BEEF; rd_addr = 32'd20;
    @(negedge clk);
    we = 1'b0;
    checks++;
    if (rd_data !== 32'hDEAD_BEEF) begin
      failures++;
      $display("imem: write not visible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
