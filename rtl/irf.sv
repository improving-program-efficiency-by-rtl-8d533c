// irf: the Instruction Register File. It keeps the instructions the compiler
// promoted as most frequently executed, so that a packed MISA word can name
// them with 5-bit indices instead of fetching them from the instruction
// store.
//
// Each entry is a RISA instruction in MIPS encoding whose 16-bit immediate
// is the entry's default immediate, plus three flags telling which register
// fields (rs, rt, rd) hold positional specifiers. Entry 0 always reads as a
// nop and cannot be written: the published selection algorithm always
// places nop there, and packs pad unused fields with it.
//
// Five asynchronous read ports feed the five instruction-buffer entries, as
// in the published fetch figure (port 0 reaches the buffer through the
// mux that can instead pass the fetched word itself). One synchronous write
// port loads the file; the original design has a per-process routine load it and
// never saves it. 32 entries and 5 ports follow the original design; the
// write-port interface is this design's choice.
module irf
  import irf_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned PORTS   = 5
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] waddr,
  input  irf_entry_t                 wdata,
  input  logic [$clog2(ENTRIES)-1:0] raddr [PORTS],
  output irf_entry_t                 rdata [PORTS]
);
  localparam int unsigned AW = $clog2(ENTRIES);

  irf_entry_t regs [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) regs[i] <= '{inst: NOP_WORD, pos: '0};
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < int'(PORTS); p++) begin
      rdata[p] = (raddr[p] == AW'(0)) ? '{inst: NOP_WORD, pos: '0} : regs[raddr[p]];
    end
  end
endmodule
