// irf_frontend: fetch and first half of decode of a MIPS pipeline that has
// an Instruction Register File (IRF).
//
// Frequently executed instructions are kept in a small register file of
// instructions, the IRF, so that one 32-bit word fetched from the
// instruction store can stand for several instructions. The path is the one
// of the published fetch figure:
//
//   PC -> instruction store -> IF/ID -> misa_decoder -+-> IRF (5 read ports) -> risa_param x5 -+
//                                                     +-> Immediate Table (2 read ports) ------+
//                                 (slot 0: fetched word itself or IRF port 0) -> instruction buffer
//   instruction buffer -> pos_resolver -> back end, one RISA instruction per cycle
//
// A plain or loosely packed word gives one or two instructions, a tightly
// packed word two to five. While the buffer still holds more than the
// instruction being issued, IF/ID and the PC are held (fetch stalls), so a
// word of N instructions costs one store access and N issue cycles.
//
// Back-end interface: out_valid/out/out_ready hand over RISA instructions
// (see irf_pkg::risa_t; I-type operands are in out.imm). Taken branches and
// jumps are resolved by the back end, which pulses `redirect` with the new
// PC; this empties IF/ID and the buffer, and the first instruction from the
// new PC is offered two cycles later. For an exception inside a packed word
// the back end pulses `restart` with the word's address and the mask of
// slots already completed (word_pc and done_mask report the word being
// issued); the refetched word then skips those slots. The IRF, the
// Immediate Table and the instruction store are loaded through their write
// ports, and the positional history can be read and restored, as a context
// switch needs.
//
// The structure, the 32-entry IRF and Immediate Table, the five-wide
// buffer, the packed formats and the restart bitmask follow the original design.
// The handshakes, the redirect protocol, the store size and the positional
// history depth are this design's choices.
module irf_frontend
  import irf_pkg::*;
#(
  parameter int unsigned IRF_ENTRIES = 32,
  parameter int unsigned IMM_ENTRIES = 32,
  parameter int unsigned IMEM_WORDS  = 1024,
  parameter int unsigned POS_DEPTH   = 4,
  parameter logic [31:0] RESET_PC    = 32'h0
) (
  input  logic                clk,
  input  logic                rst_n,
  // instruction store load port
  input  logic                imem_we,
  input  logic [31:0]         imem_waddr,
  input  logic [31:0]         imem_wdata,
  // IRF and Immediate Table load ports
  input  logic                irf_we,
  input  logic [4:0]          irf_waddr,
  input  irf_entry_t          irf_wdata,
  input  logic                imm_we,
  input  logic [4:0]          imm_waddr,
  input  logic [IMM_W-1:0]    imm_wdata,
  // control transfer from the back end
  input  logic                redirect,
  input  logic [31:0]         redirect_pc,
  input  logic                restart,
  input  logic [31:0]         restart_pc,
  input  logic [MAX_PACK-1:0] restart_mask,
  // RISA instructions to the back end
  output logic                out_valid,
  output risa_t               out,
  input  logic                out_ready,
  // word being issued, for exception handling
  output logic [31:0]         word_pc,
  output logic [MAX_PACK-1:0] done_mask,
  // positional state, for context switches
  output logic [4:0]          pos_state_s [POS_DEPTH],
  output logic [4:0]          pos_state_u [POS_DEPTH],
  input  logic                pos_restore,
  input  logic [4:0]          pos_restore_s [POS_DEPTH],
  input  logic [4:0]          pos_restore_u [POS_DEPTH]
);
  // The T-format fields are 5 bits wide, so the tables hold at most 32
  // entries.
  localparam int unsigned IRF_AW = $clog2(IRF_ENTRIES);
  localparam int unsigned IMM_AW = $clog2(IMM_ENTRIES);

  if (IRF_ENTRIES > 32 || IMM_ENTRIES > 32 || IRF_ENTRIES < 2 || IMM_ENTRIES < 2) begin : g_size_check
    $error("irf_frontend: 5-bit reference fields address 2 to 32 table entries");
  end

  logic        any_redirect;
  logic [31:0] target_pc;
  logic [31:0] imem_raddr, imem_rdata;
  logic        ifid_valid;
  logic [31:0] ifid_pc, ifid_word;
  logic        can_load;

  misa_kind_e  kind;
  logic [2:0]  ninst;
  logic        slot0_from_irf;
  risa_t       own;
  logic [4:0]  irf_idx [MAX_PACK];
  psrc_e       psrc    [MAX_PACK];
  logic [4:0]  f4, f5;

  logic [IRF_AW-1:0] irf_raddr [MAX_PACK];
  irf_entry_t        irf_rdata [MAX_PACK];
  logic [IMM_W-1:0]  imm_a, imm_b;
  risa_t             expanded [MAX_PACK];
  risa_t             slot_in  [MAX_PACK];

  logic              buf_valid;
  risa_t             buf_out;

  assign any_redirect = redirect || restart;
  assign target_pc    = restart ? restart_pc : redirect_pc;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk     (clk),
    .we      (imem_we),
    .wr_addr (imem_waddr),
    .wr_data (imem_wdata),
    .rd_addr (imem_raddr),
    .rd_data (imem_rdata)
  );

  fetch_stage #(.RESET_PC(RESET_PC)) u_fetch (
    .clk         (clk),
    .rst_n       (rst_n),
    .imem_addr   (imem_raddr),
    .imem_data   (imem_rdata),
    .redirect    (any_redirect),
    .redirect_pc (target_pc),
    .ifid_valid  (ifid_valid),
    .ifid_pc     (ifid_pc),
    .ifid_word   (ifid_word),
    .take        (ifid_valid && can_load)
  );

  misa_decoder u_dec (
    .pc             (ifid_pc),
    .word           (ifid_word),
    .kind           (kind),
    .ninst          (ninst),
    .slot0_from_irf (slot0_from_irf),
    .own            (own),
    .irf_idx        (irf_idx),
    .psrc           (psrc),
    .f4             (f4),
    .f5             (f5)
  );

  always_comb begin
    for (int k = 0; k < int'(MAX_PACK); k++) irf_raddr[k] = IRF_AW'(irf_idx[k]);
  end

  irf #(.ENTRIES(IRF_ENTRIES), .PORTS(MAX_PACK)) u_irf (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (irf_we),
    .waddr (IRF_AW'(irf_waddr)),
    .wdata (irf_wdata),
    .raddr (irf_raddr),
    .rdata (irf_rdata)
  );

  imm_table #(.ENTRIES(IMM_ENTRIES)) u_imm (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (imm_we),
    .waddr   (IMM_AW'(imm_waddr)),
    .wdata   (imm_wdata),
    .raddr_a (IMM_AW'(f4)),
    .rdata_a (imm_a),
    .raddr_b (IMM_AW'(f5)),
    .rdata_b (imm_b)
  );

  for (genvar k = 0; k < int'(MAX_PACK); k++) begin : g_slot
    risa_param u_param (
      .entry     (irf_rdata[k]),
      .has_param (psrc[k] != PSRC_NONE),
      .param     ((psrc[k] == PSRC_F4) ? f4 : f5),
      .imm_value ((psrc[k] == PSRC_F4) ? imm_a : imm_b),
      .pc        (ifid_pc),
      .slot      (3'(k)),
      .out       (expanded[k])
    );
  end

  // The mux in front of buffer entry 0: the fetched word itself, or IRF[inst1].
  always_comb begin
    slot_in    = expanded;
    slot_in[0] = slot0_from_irf ? expanded[0] : own;
  end

  inst_buffer u_buf (
    .clk          (clk),
    .rst_n        (rst_n),
    .flush        (any_redirect),
    .restart      (restart),
    .restart_mask (restart_mask),
    .load         (ifid_valid),
    .ninst        (ninst),
    .slot_in      (slot_in),
    .can_load     (can_load),
    .out_valid    (buf_valid),
    .out          (buf_out),
    .out_ready    (out_ready),
    .word_pc      (word_pc),
    .done_mask    (done_mask)
  );

  pos_resolver #(.DEPTH(POS_DEPTH)) u_pos (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (buf_valid),
    .in        (buf_out),
    .out_ready (out_ready),
    .out       (out),
    .state_s   (pos_state_s),
    .state_u   (pos_state_u),
    .restore   (pos_restore),
    .restore_s (pos_restore_s),
    .restore_u (pos_restore_u)
  );

  assign out_valid = buf_valid;
endmodule
