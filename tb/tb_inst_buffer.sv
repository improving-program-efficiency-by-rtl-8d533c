// tb_inst_buffer: self-checking test of the instruction buffer.
// 1. Random traffic: words of 1..5 instructions are offered every cycle
//    with random out_ready; a queue of expected instructions, filled when a
//    load is accepted, must match every issued instruction in order.
// 2. Rate: with out_ready high, words of 5,1,1,3,2 instructions issue at
//    exactly one instruction per cycle and a word of N instructions holds
//    off the next load for N cycles.
// 3. Restart: a 5-instruction word is flushed after two issues; restart
//    with mask 00011 makes the reloaded word issue only slots 2,3,4, and
//    done_mask tracks the completed slots.
module tb_inst_buffer;
  import irf_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n;
  logic        flush, restart;
  logic [4:0]  restart_mask;
  logic        load;
  logic [2:0]  ninst;
  risa_t       slot_in [MAX_PACK];
  logic        can_load;
  logic        out_valid;
  risa_t       out;
  logic        out_ready;
  logic [31:0] word_pc;
  logic [4:0]  done_mask;
  int          checks = 0, failures = 0;
  logic [31:0] q[$];
  int          word_id = 0;
  int          issued = 0;
  logic        loaded;   // the last step accepted a load

  inst_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("inst_buffer: %s", msg);
  endtask

  // Fill slot_in with tags {word_id, slot}.
  task automatic offer(input int n);
    ninst = 3'(n);
    for (int k = 0; k < 5; k++) begin
      slot_in[k]      = '0;
      slot_in[k].inst = 32'(word_id * 16 + k);
      slot_in[k].pc   = 32'(word_id * 4);
      slot_in[k].slot = 3'(k);
    end
  endtask

  // Sample just before the edge, update the reference.
  task automatic step();
    #4;
    loaded = load && can_load && !flush;
    if (out_valid && out_ready) begin
      checks++;
      issued++;
      if (q.size() == 0) fail("issued with nothing expected");
      else begin
        logic [31:0] e;
        e = q.pop_front();
        if (out.inst !== e) fail($sformatf("issued %h expected %h", out.inst, e));
      end
    end
    if (load && can_load && !flush) begin
      for (int k = 0; k < int'(ninst); k++) q.push_back(32'(word_id * 16 + k));
      word_id++;
    end
    @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; flush = 1'b0; restart = 1'b0; restart_mask = '0; load = 1'b0;
    out_ready = 1'b0; offer(1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // 1. random traffic
    for (int c = 0; c < 600; c++) begin
      load      = ($urandom_range(0, 9) < 7);
      out_ready = ($urandom_range(0, 9) < 7);
      offer($urandom_range(1, 5));
      step();
    end
    load = 1'b0; out_ready = 1'b1;
    while (q.size() != 0) step();
    checks++;
    if (out_valid) fail("buffer not empty after drain");

    // 2. rate
    begin
      int sizes[5] = '{5, 1, 1, 3, 2};
      int w = 0;
      int total = 0;
      int start_issued;
      int cycles = 0;
      int loads_at[5];
      foreach (sizes[i]) total += sizes[i];
      start_issued = issued;
      out_ready = 1'b1;
      while (issued - start_issued < total) begin
        load = (w < 5);
        if (w < 5) offer(sizes[w]);
        step();
        if (loaded) begin
          loads_at[w] = cycles;
          w++;
        end
        cycles++;
      end
      // one cycle from load to first issue, then one instruction per cycle
      checks++;
      if (cycles != total + 1) fail($sformatf("rate: %0d instructions took %0d cycles", total, cycles));
      for (int i = 1; i < 5; i++) begin
        checks++;
        if (loads_at[i] - loads_at[i-1] != sizes[i-1])
          fail($sformatf("rate: word %0d loaded %0d cycles after previous (size %0d)", i, loads_at[i] - loads_at[i-1], sizes[i-1]));
      end
      load = 1'b0;
    end

    // 3. restart with completed-slot mask
    out_ready = 1'b0;
    load = 1'b1; offer(5);
    step();
    load = 1'b0; out_ready = 1'b1;
    step();
    step();
    checks++;
    if (done_mask !== 5'b00011) fail($sformatf("done_mask %b after two issues", done_mask));
    checks++;
    if (word_pc !== 32'((word_id - 1) * 4)) fail("word_pc");
    // exception on slot 2: flush and restart, slots 0 and 1 completed
    out_ready = 1'b0; flush = 1'b1; restart = 1'b1; restart_mask = 5'b00011;
    q.delete();
    step();
    flush = 1'b0; restart = 1'b0;
    checks++;
    if (out_valid) fail("flush left instructions");
    // refetched word
    load = 1'b1; offer(5);
    #4;
    q.push_back(32'(word_id * 16 + 2));
    q.push_back(32'(word_id * 16 + 3));
    q.push_back(32'(word_id * 16 + 4));
    word_id++;
    @(negedge clk);
    load = 1'b0; out_ready = 1'b1;
    checks++;
    if (done_mask !== 5'b00011) fail($sformatf("done_mask %b after restart load", done_mask));
    step(); step(); step();
    checks++;
    if (q.size() != 0 || out_valid) fail("restart: wrong number of slots issued");
    checks++;
    if (done_mask !== 5'b11111) fail($sformatf("done_mask %b at end", done_mask));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
