// tb_cc_replacement -- self-checking test of the replacement logic.
// For each strategy and associativity a sequence of accesses is applied,
// the per-set word is kept in the testbench as the replacement BRAM would
// keep it, and the victim is compared with a reference:
//   LRU     a recency list of ways kept by the testbench;
//   PLRU    the never-most-recent property plus a recursive tree model;
//   FIFO    the round-robin order of fills;
//   PRANDOM the global counter modulo the associativity;
//   RANDOM  range, and that it does not stay constant.
module tb_cc_replacement;
  import rca_pkg::*;
  logic clk = 0, rst = 1;
  repl_e strategy;
  logic [ALOG_W-1:0] assoc_log2;
  repl_word_t state_in, state_out;
  way_t victim, acc_way;
  logic acc_fill, fill_pulse;
  int checks = 0, failures = 0;

  cc_replacement dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // testbench PLRU model: tree bits in heap order, walk by recursion
  function automatic int plru_victim(logic [6:0] t, int levels, int node);
    if (levels == 0) return 0;
    return (int'(t[node]) << (levels - 1)) +
           plru_victim(t, levels - 1, 2 * node + 1 + int'(t[node]));
  endfunction
  function automatic logic [6:0] plru_touch(logic [6:0] t, int levels, int way);
    int node = 0;
    for (int l = levels - 1; l >= 0; l--) begin
      t[node] = !way[l];
      node = 2 * node + 1 + way[l];
    end
    return t;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    strategy = REPL_LRU; assoc_log2 = 0; state_in = '0; acc_way = '0;
    acc_fill = 0; fill_pulse = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // ---------------- LRU ----------------
    for (int al = 0; al <= 3; al++) begin
      automatic int n = 1 << al;
      automatic int order[$];          // front = least recently used
      strategy = REPL_LRU; assoc_log2 = 3'(al); state_in = '0;
      for (int w = 0; w < n; w++) order.push_back(w);   // zero state: 0 oldest
      for (int k = 0; k < 200; k++) begin
        automatic int w;
        #1;
        check($sformatf("LRU%0d victim", n), int'(victim), order[0]);
        w = (k % 3 == 0) ? int'(victim) : int'($urandom_range(n - 1));
        acc_way = way_t'(w); acc_fill = (k % 3 == 0);
        #1;
        state_in = state_out;
        foreach (order[i]) if (order[i] == w) begin order.delete(i); break; end
        order.push_back(w);
      end
    end

    // ---------------- PLRU ----------------
    for (int al = 1; al <= 3; al++) begin
      automatic logic [6:0] t = '0;
      strategy = REPL_PLRU; assoc_log2 = 3'(al); state_in = '0;
      for (int k = 0; k < 200; k++) begin
        automatic int w;
        #1;
        check($sformatf("PLRU%0d victim", 1 << al), int'(victim), plru_victim(t, al, 0));
        w = int'($urandom_range((1 << al) - 1));
        acc_way = way_t'(w); acc_fill = 0;
        #1;
        state_in = state_out;
        t = plru_touch(t, al, w);
        #1;
        checks++;
        if (int'(victim) == w) begin
          failures++;
          $display("FAIL PLRU victim is the way just used");
        end
      end
    end
    // 4 ways, accesses 0,1,2,3: tree points back to way 0
    strategy = REPL_PLRU; assoc_log2 = 2; state_in = '0;
    for (int w = 0; w < 4; w++) begin acc_way = way_t'(w); #1; state_in = state_out; end
    #1 check("PLRU4 after 0..3", int'(victim), 0);

    // ---------------- FIFO ----------------
    for (int al = 0; al <= 4; al++) begin
      automatic int n = 1 << al;
      strategy = REPL_FIFO; assoc_log2 = 3'(al); state_in = '0;
      for (int k = 0; k < 3 * n + 2; k++) begin
        #1;
        check($sformatf("FIFO%0d victim", n), int'(victim), (k + 1) % n);
        // hits do not move the FIFO pointer
        acc_way = way_t'($urandom_range(n - 1)); acc_fill = 0;
        #1;
        check("FIFO hit keeps state", int'(state_out), int'(state_in));
        acc_way = victim; acc_fill = 1;
        #1;
        state_in = state_out;
      end
    end

    // ---------------- PRANDOM ----------------
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    strategy = REPL_PRANDOM; assoc_log2 = 4;
    for (int k = 0; k < 40; k++) begin
      #1 check("PRANDOM victim", int'(victim), k % 16);
      fill_pulse = 1; @(negedge clk); fill_pulse = 0;
    end
    assoc_log2 = 2;
    #1 check("PRANDOM masked", int'(victim), 40 % 4);

    // ---------------- RANDOM ----------------
    begin
      automatic int seen[16];
      strategy = REPL_RANDOM; assoc_log2 = 3;
      foreach (seen[i]) seen[i] = 0;
      for (int k = 0; k < 200; k++) begin
        @(negedge clk);
        seen[victim]++;
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (seen[i] == 0) begin failures++; $display("FAIL RANDOM never chose way %0d", i); end
      end
      check("RANDOM range", seen[8] + seen[15], 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
