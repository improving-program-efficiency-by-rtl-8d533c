// imm_table: the Immediate Table (IMM). Parameterized RISA instructions take
// their immediate from here: a T-format word carries a 5-bit index in a
// parameter field and the instruction uses IMM[index] in place of the
// default immediate stored with it in the IRF.
//
// 32 entries follow the original design. Entries are 16 bits wide, the width of a
// MIPS immediate (the published examples hold small constants such as 32
// and 63; the width is this design's choice). Two asynchronous read ports
// serve the two parameter fields of a T-format word; one synchronous write
// port loads the table. Reset clears every entry.
module imm_table
  import irf_pkg::*;
#(
  parameter int unsigned ENTRIES = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  logic [IMM_W-1:0]           wdata,
  input  logic [$clog2(ENTRIES)-1:0] raddr_a,
  output logic [IMM_W-1:0]           rdata_a,
  input  logic [$clog2(ENTRIES)-1:0] raddr_b,
  output logic [IMM_W-1:0]           rdata_b
);
  logic [IMM_W-1:0] tab [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) tab[i] <= '0;
    end else if (we) begin
      tab[waddr] <= wdata;
    end
  end

  assign rdata_a = tab[raddr_a];
  assign rdata_b = tab[raddr_b];
endmodule
