// fetch_stage: the PC and the IF/ID pipeline register of the IRF fetch path.
//
// Each cycle the PC addresses the instruction store; the word that comes
// back is captured in IF/ID together with its address. IF/ID holds its word
// until the decode side takes it (take = 1): while a tightly packed word is
// being issued from the instruction buffer, fetch therefore stalls. A
// redirect (taken branch, jump or exception restart from the back end)
// loads the PC with the new address and empties IF/ID in the same edge.
//
// Following the published fetch figure: PC -> ROM or L1 IC -> IF/ID. Sequential
// fetch steps by one word (4 bytes) because every MISA word is 32 bits. The
// reset address, the stall and the redirect handshake are this design's
// choices.
//
// Timing: a word fetched at PC in cycle t is valid in IF/ID in cycle t+1.
module fetch_stage #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction store
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_data,
  // redirect from the back end
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  // IF/ID register towards decode
  output logic        ifid_valid,
  output logic [31:0] ifid_pc,
  output logic [31:0] ifid_word,
  input  logic        take
);
  logic [31:0] pc;
  logic        advance;

  assign imem_addr = pc;
  // IF/ID may load a new word when it is empty or its word is being taken.
  assign advance   = !ifid_valid || take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= RESET_PC;
      ifid_valid <= 1'b0;
      ifid_pc    <= '0;
      ifid_word  <= '0;
    end else if (redirect) begin
      pc         <= redirect_pc;
      ifid_valid <= 1'b0;
    end else if (advance) begin
      pc         <= pc + 32'd4;
      ifid_valid <= 1'b1;
      ifid_pc    <= pc;
      ifid_word  <= imem_data;
    end
  end
endmodule
