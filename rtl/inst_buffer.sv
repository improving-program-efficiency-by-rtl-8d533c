// inst_buffer: the instruction buffer at the end of the first half of ID.
// It receives all RISA instructions of one MISA word at once (up to five,
// one per entry, from the IRF read ports and the fetched-word mux) and
// issues them to the rest of the pipeline one per cycle, oldest slot first.
//
// While more than one instruction is left, `can_load` stays low, which
// holds the IF/ID register and so stalls fetch: a tightly packed word of N
// instructions takes N issue cycles for one instruction-store access. When
// the last instruction of a word issues, a new word may be loaded in the
// same edge, so single-instruction words stream at one per cycle.
//
// Exceptions: the buffer keeps a bitmask of the slots of the current word
// that have completed (issued, or skipped on restart). To restart a packed
// word after an exception the back end pulses `restart` with the mask of
// slots already completed; the next word loaded (the refetched word) then
// skips those slots. This follows the original design's "store a bitmask of
// completed instructions for improved restart"; the port protocol is this
// design's choice. `flush` (taken branch, restart) empties the buffer.
//
// Handshake: out_valid/out_ready; an instruction is issued in a cycle where
// both are high. Load and issue may happen in the same cycle.
module inst_buffer
  import irf_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  input  logic                restart,
  input  logic [MAX_PACK-1:0] restart_mask,
  // load side
  input  logic                load,
  input  logic [2:0]          ninst,
  input  risa_t               slot_in [MAX_PACK],
  output logic                can_load,
  // issue side
  output logic                out_valid,
  output risa_t               out,
  input  logic                out_ready,
  // state of the word being issued, for exception handling
  output logic [31:0]         word_pc,
  output logic [MAX_PACK-1:0] done_mask
);
  risa_t               ent [MAX_PACK];
  logic [MAX_PACK-1:0] valid;
  logic [MAX_PACK-1:0] head_oh;
  logic [MAX_PACK-1:0] remaining;
  logic [MAX_PACK-1:0] skip_mask;
  logic                skip_pending;
  logic [MAX_PACK-1:0] fill;
  logic                issue;

  // oldest valid slot
  assign head_oh = valid & (~valid + MAX_PACK'(1));

  always_comb begin
    out = ent[0];
    for (int k = 0; k < int'(MAX_PACK); k++) if (head_oh[k]) out = ent[k];
  end

  assign out_valid = |valid;
  assign issue     = out_valid && out_ready;
  assign remaining = valid & ~(issue ? head_oh : '0);
  assign can_load  = (remaining == '0) && !flush;

  always_comb begin
    for (int k = 0; k < int'(MAX_PACK); k++) fill[k] = (k < int'(ninst));
    if (skip_pending) fill = fill & ~skip_mask;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid        <= '0;
      done_mask    <= '0;
      skip_pending <= 1'b0;
      skip_mask    <= '0;
      word_pc      <= '0;
      for (int k = 0; k < int'(MAX_PACK); k++) ent[k] <= '0;
    end else begin
      if (flush) begin
        valid <= '0;
      end else if (load && can_load) begin
        valid     <= fill;
        done_mask <= skip_pending ? skip_mask : '0;
        word_pc   <= slot_in[0].pc;
        for (int k = 0; k < int'(MAX_PACK); k++) ent[k] <= slot_in[k];
        skip_pending <= 1'b0;
      end else begin
        valid <= remaining;
        if (issue) done_mask <= done_mask | head_oh;
      end
      if (restart) begin
        skip_pending <= 1'b1;
        skip_mask    <= restart_mask;
      end
    end
  end

  // A word is only loaded when the buffer will be empty.
  a_load_when_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                      (load && can_load) |-> (remaining == '0));
endmodule
