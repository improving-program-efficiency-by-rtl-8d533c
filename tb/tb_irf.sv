// tb_irf: self-checking test of the Instruction Register File. Fills every
// entry through the write port with a distinct instruction and positional
// flag pattern, then reads all entries through each of the five read ports
// at once (each port a different entry) and compares with a copy kept in
// the testbench. Checks that entry 0 reads as a nop after reset and stays a
// nop when written.
module tb_irf;
  import irf_pkg::*;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       we;
  logic [4:0] waddr;
  irf_entry_t wdata;
  logic [4:0] raddr [5];
  irf_entry_t rdata [5];
  irf_entry_t model [32];
  int         checks = 0, failures = 0;

  irf #(.ENTRIES(32), .PORTS(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; waddr = '0; wdata = '0;
    for (int p = 0; p < 5; p++) raddr[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 5; p++) raddr[p] = 5'(p * 3);
    #1;
    for (int p = 0; p < 5; p++) begin
      checks++;
      if (rdata[p].inst !== 32'h0 || rdata[p].pos !== 3'b000) begin
        failures++;
        $display("irf: entry %0d not nop after reset", p * 3);
      end
    end
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 5'(i);
      wdata = '{inst: $urandom, pos: 3'($urandom)};
      model[i] = (i == 0) ? '{inst: 32'h0, pos: 3'b000} : wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int r = 0; r < 40; r++) begin
      for (int p = 0; p < 5; p++) raddr[p] = 5'($urandom_range(0, 31));
      if (r == 0) raddr[2] = 5'd0;
      #1;
      for (int p = 0; p < 5; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          $display("irf: port %0d entry %0d read %h expected %h", p, raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
