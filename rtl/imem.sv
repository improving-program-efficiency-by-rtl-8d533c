// imem: the instruction store that the PC reads in the IF stage (the "ROM or
// L1 IC" of the fetch path). It holds MISA words, one 32-bit word per
// address, and is read combinationally by word address so that the IF/ID
// register can capture the fetched word at the end of the IF cycle.
//
// The original design names this store but does not design it: a cache would sit
// here in a real system. This model is a plain word array with one
// synchronous write port, used to load a program, and one asynchronous read
// port. Its size is this design's choice.
//
// Interface: rd_addr is a byte address (bits [1:0] ignored); rd_data is the
// word at that address in the same cycle. A write (we, wr_addr, wr_data)
// takes effect at the rising clock edge.
module imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data,
  input  logic [31:0] rd_addr,
  output logic [31:0] rd_data
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr[AW+1:2]] <= wr_data;
  end

  assign rd_data = mem[rd_addr[AW+1:2]];
endmodule
