// tb_reconfiguration -- self-checking test of the reconfiguration unit.
//
// The cache memories are loaded directly with a random, consistent cache
// state (random valid lines, byte-valid masks and dirty bits) for a given
// associativity; the unit is then asked to double or halve it. Checked
// afterwards:
//  * every valid line sits in the set its address selects under the new
//    associativity, each address at most once, with its data, byte-valid
//    mask and Modified bit unchanged;
//  * every line of the front half survives a doubling;
//  * every dirty line that left the cache is in the memory model;
//  * the cycle count equals the paper's schedule, computed here from the
//    loaded state: 2 + rear lines (2 clean, 3 + memory write dirty) + 1 +
//    front lines (3 each, plus a memory write for a dropped dirty line on
//    halving) + 2; sets + 3 for a replacement change; 4 for a write-policy
//    change; a 1024-line instance gives exactly 2565 cycles when clean.
module tb_reconfiguration;
  import rca_pkg::*;
  localparam int N = 64;
  localparam int LAW = $clog2(N);
  localparam int LAT = 7;
  localparam int WB_CYC = LAT + 2;

  logic clk = 0, rst = 1;
  logic en = 0;
  cfg_t new_cfg, active_cfg;
  logic busy, done;
  logic ctrl_en, ctrl_we, data_en, data_we, repl_en, repl_we;
  logic [LAW-1:0] ctrl_addr, data_addr, repl_addr;
  ctrl_t ctrl_wdata, ctrl_rdata;
  data_t data_wdata, data_rdata;
  repl_word_t repl_wdata, repl_rdata;
  logic mem_req, mem_ack;
  line_addr_t mem_addr;
  be_t mem_be;
  data_t mem_wdata, mem_rdata;

  reconfiguration #(.NUM_LINES(N)) dut (.*);
  sp_bram #(.DEPTH(N), .WIDTH(CTRL_W)) u_ctrl (.clk, .en(ctrl_en), .we(ctrl_we), .addr(ctrl_addr),
                                                .wdata(ctrl_wdata), .rdata(ctrl_rdata));
  sp_bram #(.DEPTH(N), .WIDTH(DATA_W)) u_data (.clk, .en(data_en), .we(data_we), .addr(data_addr),
                                                .wdata(data_wdata), .rdata(data_rdata));
  sp_bram #(.DEPTH(N), .WIDTH(REPL_W)) u_repl (.clk, .en(repl_en), .we(repl_we), .addr(repl_addr),
                                                .wdata(repl_wdata), .rdata(repl_rdata));
  ddr_mem_model #(.LAT(LAT)) u_mem (.clk, .mem_req, .mem_we(1'b1), .mem_addr, .mem_be, .mem_wdata,
                                    .mem_ack, .mem_rdata);

  // a second, 1024-line instance for the paper's cycle figure
  logic big_en = 0, big_busy, big_done, big_ctrl_en, big_ctrl_we, big_data_en, big_data_we;
  logic big_repl_en, big_repl_we, big_mem_req;
  logic [9:0] big_ctrl_addr, big_data_addr, big_repl_addr;
  ctrl_t big_ctrl_wdata, big_ctrl_rdata;
  data_t big_data_wdata, big_data_rdata, big_mem_wdata;
  repl_word_t big_repl_wdata;
  line_addr_t big_mem_addr;
  be_t big_mem_be;
  cfg_t big_cfg, big_new;
  reconfiguration #(.NUM_LINES(1024)) u_big (
    .clk, .rst, .en(big_en), .new_cfg(big_new), .active_cfg(big_cfg), .busy(big_busy), .done(big_done),
    .ctrl_en(big_ctrl_en), .ctrl_we(big_ctrl_we), .ctrl_addr(big_ctrl_addr),
    .ctrl_wdata(big_ctrl_wdata), .ctrl_rdata(big_ctrl_rdata),
    .data_en(big_data_en), .data_we(big_data_we), .data_addr(big_data_addr),
    .data_wdata(big_data_wdata), .data_rdata(big_data_rdata),
    .repl_en(big_repl_en), .repl_we(big_repl_we), .repl_addr(big_repl_addr),
    .repl_wdata(big_repl_wdata), .repl_rdata('0),
    .mem_req(big_mem_req), .mem_addr(big_mem_addr), .mem_be(big_mem_be),
    .mem_wdata(big_mem_wdata), .mem_ack(1'b0));
  assign big_ctrl_rdata = '0;   // an empty cache: every line invalid
  assign big_data_rdata = '0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  typedef struct { ctrl_t c; data_t d; int pos; } line_t;
  line_t orig [line_addr_t];

  // load a random consistent state for 2**k ways
  task automatic load(int k, int L = N);
    int n = 1 << k, sets = L >> k;
    orig.delete();
    for (int i = 0; i < N; i++) begin u_ctrl.mem[i] = '0; u_data.mem[i] = '0; end
    for (int s = 0; s < sets; s++) begin
      for (int w = 0; w < n; w++) begin
        if ($urandom_range(9) < 8) begin
          line_addr_t la;
          ctrl_t c;
          do la = line_addr_t'(s + sets * $urandom_range(40)); while (orig.exists(la));
          c.laddr = la;
          c.bvalid = ($urandom_range(3) == 0) ? be_t'($urandom_range(1, 255)) : '1;
          c.modified = 1'($urandom);
          u_ctrl.mem[s * n + w] = c;
          u_data.mem[s * n + w] = {$urandom, $urandom};
          orig[la] = '{c: c, d: u_data.mem[s * n + w], pos: s * n + w};
        end
      end
    end
  endtask

  // expected cycles of one step from 2**k ways
  function automatic longint expect_step(int k, bit inc);
    longint cyc = 2 + 1 + 2;
    int n = 1 << k, sets = N >> k;
    for (int i = N / 2; i < N; i++) begin
      ctrl_t c = u_ctrl.mem[i];
      cyc += ((|c.bvalid) && c.modified) ? 3 + WB_CYC : 2;
    end
    if (inc) cyc += 3 * (N / 2);
    else begin
      for (int j = 0; j < sets / 2; j++) begin
        int cnt [2] = '{0, 0};
        for (int w = 0; w < n; w++) begin
          ctrl_t c = u_ctrl.mem[j * n + w];
          cyc += 3;
          if (|c.bvalid) begin
            int b = int'(c.laddr[$clog2(sets)]);
            if (cnt[b] < n / 2) cnt[b]++;
            else if (c.modified) cyc += WB_CYC;
          end
        end
      end
    end
    return cyc;
  endfunction

  task automatic run(cfg_t c, output longint cyc);
    cyc = 0;
    @(negedge clk); new_cfg = c; en = 1;
    @(negedge clk); en = 0;
    while (busy) begin
      cyc++;
      @(negedge clk);
    end
  endtask

  // check the state after a change to 2**k ways
  task automatic verify(int k, bit front_kept, int L = N);
    int n = 1 << k, sets = L >> k;
    bit seen [line_addr_t];
    int kept = 0, lost_dirty_bad = 0;
    for (int p = 0; p < N; p++) begin
      ctrl_t c = u_ctrl.mem[p];
      if (|c.bvalid) begin
        checks++;
        if (int'(c.laddr) % sets != p / n || p >= L || seen.exists(c.laddr) || !orig.exists(c.laddr)) begin
          failures++;
          $display("FAIL line %h misplaced at %0d (%0d ways)", c.laddr, p, n);
        end else begin
          seen[c.laddr] = 1;
          check("line kept intact", {c, u_data.mem[p]} == {orig[c.laddr].c, orig[c.laddr].d}, 1);
        end
      end
    end
    foreach (orig[la]) begin
      if (!seen.exists(la)) begin
        if (front_kept && orig[la].pos < N / 2) begin
          failures++; $display("FAIL front line %h lost", la);
        end
        if (orig[la].c.modified) begin
          data_t m = u_mem.peek(la);
          for (int b = 0; b < BE_W; b++)
            if (orig[la].c.bvalid[b] && m[8*b +: 8] != orig[la].d[8*b +: 8]) lost_dirty_bad++;
        end
      end
    end
    check("dirty lines that left were written back", lost_dirty_bad, 0);
  endtask

  function automatic cfg_t mk(int alog, repl_e r, bit wb);
    return '{size_log2: SIZE_W'(LAW), assoc_log2: 3'(alog), repl: r, write_back: wb, write_alloc: 1'b1, mon_mode: MON_OFF};
  endfunction

  initial begin
    #50ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint cyc, exp;
    new_cfg = mk(0, REPL_RANDOM, 1);
    repeat (3) @(negedge clk); rst = 0;

    // the paper's figure: 1024 lines, clean, 1 -> 2 ways
    big_new = mk(1, REPL_RANDOM, 1);
    big_new.size_log2 = 10;
    @(negedge clk); big_en = 1; @(negedge clk); big_en = 0;
    cyc = 0;
    while (big_busy) begin cyc++; @(negedge clk); end
    check("1024 lines, doubling, clean: 2565 cycles", cyc, 2565);

    // write policy only: 4 cycles
    run(mk(0, REPL_RANDOM, 0), cyc);
    check("write-policy change cycles", cyc, 4);
    check("write policy applied", active_cfg.write_back, 0);

    // doubling and halving from random states, repeated
    for (int rep = 0; rep < 6; rep++) begin
      for (int k = 0; k < 4; k++) begin
        load(k);
        exp = expect_step(k, 1);
        run(mk(k + 1, REPL_RANDOM, 0), cyc);
        check($sformatf("doubling from %0d ways: cycles", 1 << k), cyc, exp);
        check("associativity after doubling", active_cfg.assoc_log2, k + 1);
        verify(k + 1, 1);
      end
      for (int k = 4; k > 0; k--) begin
        load(k);
        exp = expect_step(k, 0);
        run(mk(k - 1, REPL_RANDOM, 0), cyc);
        check($sformatf("halving from %0d ways: cycles", 1 << k), cyc, exp);
        check("associativity after halving", active_cfg.assoc_log2, k - 1);
        verify(k - 1, 0);
      end
    end

    // number of lines at constant associativity: shrink, then grow back
    for (int rep = 0; rep < 4; rep++) begin
      for (int k = 0; k <= 4; k++) begin
        automatic longint rear = 0;
        load(k);
        for (int i = N / 2; i < N; i++) begin
          automatic ctrl_t c = u_ctrl.mem[i];
          rear += ((|c.bvalid) && c.modified) ? 3 + WB_CYC : 2;
        end
        run('{size_log2: SIZE_W'(LAW - 1), assoc_log2: 3'(k), repl: REPL_RANDOM,
              write_back: 1'b0, write_alloc: 1'b1, mon_mode: MON_OFF}, cyc);
        check($sformatf("halving the lines at %0d ways: cycles", 1 << k), cyc, 2 + rear + 2);
        check("size after halving", active_cfg.size_log2, LAW - 1);
        verify(k, 1, N / 2);
        load(k, N / 2);
        run(mk(k, REPL_RANDOM, 0), cyc);
        check($sformatf("doubling the lines at %0d ways: cycles", 1 << k), cyc, 2 + 3 * N / 2 + 2);
        check("size after doubling", active_cfg.size_log2, LAW);
        verify(k, 1);
        if (k < 4) begin
          load(k);
          run(mk(k + 1, REPL_RANDOM, 0), cyc);
          verify(k + 1, 1);
        end
      end
      run(mk(0, REPL_RANDOM, 0), cyc);
    end

    // number of lines at constant number of sets: lines and ways together
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < 4; k++) begin
        automatic cfg_t half_cfg = mk(k, REPL_RANDOM, 0);
        automatic longint shrink_exp = 4;
        half_cfg.size_log2 = SIZE_W'(LAW - 1);
        run(half_cfg, cyc);
        load(k, N / 2);
        run(mk(k + 1, REPL_RANDOM, 0), cyc);
        check($sformatf("lines and ways doubled from %0d ways: cycles", 1 << k), cyc, 2 + 3 * N / 2 + 2);
        check("size after doubling lines and ways", active_cfg.size_log2, LAW);
        check("ways after doubling lines and ways", active_cfg.assoc_log2, k + 1);
        verify(k + 1, 1);
        load(k + 1);
        for (int j = 0; j < (N >> (k + 1)); j++) begin
          automatic int kept = 0;
          for (int w = 0; w < (2 << k); w++) begin
            automatic ctrl_t c = u_ctrl.mem[j * (2 << k) + w];
            shrink_exp += 3;
            if (|c.bvalid) begin
              if (kept < (1 << k)) kept++;
              else if (c.modified) shrink_exp += WB_CYC;
            end
          end
        end
        run(half_cfg, cyc);
        check($sformatf("lines and ways halved from %0d ways: cycles", 2 << k), cyc, shrink_exp);
        check("size after halving lines and ways", active_cfg.size_log2, LAW - 1);
        check("ways after halving lines and ways", active_cfg.assoc_log2, k);
        verify(k, 0, N / 2);
        run(mk(0, REPL_RANDOM, 0), cyc);
      end
    end

    // halving lines and ways under LRU keeps the more recently used half
    for (int rep = 0; rep < 3; rep++) begin
      for (int k = 0; k < 3; k++) begin
        automatic int n = 2 << k;
        automatic cfg_t half_cfg = mk(k, REPL_LRU, 0);
        automatic longint shrink_exp = 4;
        automatic bit keep [line_addr_t];
        half_cfg.size_log2 = SIZE_W'(LAW - 1);
        run(mk(k + 1, REPL_LRU, 0), cyc);
        load(k + 1);
        for (int j = 0; j < (N / n); j++) begin
          // a random use order of the ways: ord[0] most recent
          automatic int ord [8];
          automatic int pos [8];
          automatic repl_word_t word = '0;
          for (int w = 0; w < n; w++) ord[w] = w;
          for (int w = n - 1; w > 0; w--) begin
            automatic int x = $urandom_range(w);
            automatic int t = ord[w];
            ord[w] = ord[x]; ord[x] = t;
          end
          for (int r = 0; r < n; r++) pos[ord[r]] = r;
          for (int a = 0; a < n; a++)
            for (int b = a + 1; b < n; b++)
              if (pos[a] < pos[b]) word[(a * (15 - a)) / 2 + (b - a - 1)] = 1'b1;
          u_repl.mem[j] = word;
          for (int w = 0; w < n; w++) begin
            automatic ctrl_t c = u_ctrl.mem[j * n + w];
            shrink_exp += 3;
            if (|c.bvalid) begin
              if (pos[w] < n / 2) keep[c.laddr] = 1;
              else if (c.modified) shrink_exp += WB_CYC;
            end
          end
        end
        run(half_cfg, cyc);
        check($sformatf("LRU: lines and ways halved from %0d ways: cycles", n), cyc, shrink_exp);
        verify(k, 0, N / 2);
        begin
          automatic int wrong = 0;
          automatic bit there [line_addr_t];
          for (int p = 0; p < N / 2; p++) begin
            automatic ctrl_t c = u_ctrl.mem[p];
            if (|c.bvalid) there[c.laddr] = 1;
          end
          foreach (orig[la]) if (there.exists(la) != keep.exists(la)) wrong++;
          check("LRU: exactly the recently used lines kept", wrong, 0);
        end
        run(mk(0, REPL_RANDOM, 0), cyc);
      end
    end

    // two steps at once on an empty cache
    load(0);
    for (int i = 0; i < N; i++) u_ctrl.mem[i] = '0;
    run(mk(2, REPL_RANDOM, 0), cyc);
    check("1 -> 4 ways in two clean steps", cyc, 2 * (2 + N + 1 + 3 * N / 2 + 2));

    // replacement change: one cycle per set, plus 3
    for (int i = 0; i < N; i++) u_repl.mem[i] = '1;
    run(mk(2, REPL_PLRU, 0), cyc);
    check("replacement change cycles", cyc, N / 4 + 3);
    check("replacement applied", active_cfg.repl, REPL_PLRU);
    begin
      int nz = 0;
      for (int s = 0; s < N / 4; s++) if (u_repl.mem[s] != '0) nz++;
      check("replacement words cleared", nz, 0);
    end

    // LRU and pLRU are limited to 8 ways
    run(mk(4, REPL_LRU, 0), cyc);
    check("LRU request lowered to 8 ways", active_cfg.assoc_log2, 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
