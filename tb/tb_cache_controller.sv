// tb_cache_controller -- self-checking test of the cache request state
// machine with its replacement logic, three BRAMs and a memory model.
//
// The testbench also plays the reconfiguration unit: when the controller
// hands over (reconf_en, reconf_active) it writes every dirty line back into
// the memory model, empties the control BRAM, applies the new
// configuration and answers with reconf_done. Checked:
//  * the sequential way search: a read hit in way w is acknowledged w+2
//    cycles after the request is presented;
//  * FIFO and LRU victim choice on a full 4-way set;
//  * write-through reaches memory at once, no-write-allocate leaves the
//    cache untouched, a partial line reads as a miss;
//  * random traffic in every associativity and strategy against a
//    reference image of memory;
//  * the hand-over: a reconfiguration request waits while a processor
//    request is pending, cc_done follows reconf_done.
module tb_cache_controller;
  import rca_pkg::*;
  localparam int N = 256;
  localparam int LAW = $clog2(N);

  logic clk = 0, rst = 1;
  cfg_t cfg;
  logic req_valid = 0, req_we = 0, req_ack;
  logic [ADDR_W-1:0] req_addr = '0;
  be_t req_be = '0;
  data_t req_wdata = '0, rsp_rdata;
  logic values_received = 0, reconf_en, reconf_active, reconf_done = 0, cc_done;
  logic ctrl_en, ctrl_we, data_en, data_we, repl_en, repl_we;
  logic [LAW-1:0] ctrl_addr, data_addr, repl_addr;
  ctrl_t ctrl_wdata, ctrl_rdata;
  data_t data_wdata, data_rdata;
  repl_word_t repl_wdata, repl_rdata;
  logic mem_req, mem_we, mem_ack;
  line_addr_t mem_addr;
  be_t mem_be;
  data_t mem_wdata, mem_rdata;
  logic ev_valid, ev_write, ev_hit;
  way_t ev_way;
  logic [3:0] ev_byte;
  logic [29:0] ev_addr;

  cache_controller #(.NUM_LINES(N)) dut (.*);
  sp_bram #(.DEPTH(N), .WIDTH(CTRL_W)) u_ctrl (.clk, .en(ctrl_en), .we(ctrl_we), .addr(ctrl_addr),
                                                .wdata(ctrl_wdata), .rdata(ctrl_rdata));
  sp_bram #(.DEPTH(N), .WIDTH(DATA_W)) u_data (.clk, .en(data_en), .we(data_we), .addr(data_addr),
                                                .wdata(data_wdata), .rdata(data_rdata));
  sp_bram #(.DEPTH(N), .WIDTH(REPL_W)) u_repl (.clk, .en(repl_en), .we(repl_we), .addr(repl_addr),
                                                .wdata(repl_wdata), .rdata(repl_rdata));
  ddr_mem_model #(.LAT(2)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  data_t gold [line_addr_t];
  function automatic data_t gold_word(line_addr_t a);
    return gold.exists(a) ? gold[a] : u_mem.init_word(a);
  endfunction

  // last acknowledged request as the monitor port reported it
  way_t last_way;
  logic last_hit;
  int   last_cycles;
  always @(posedge clk) if (ev_valid) begin last_way = ev_way; last_hit = ev_hit; end

  task automatic cpu_access(logic we, line_addr_t la, be_t be, data_t wd, output data_t rd);
    int n = 0;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = {la, 3'b000}; req_be = be; req_wdata = wd;
    do begin @(negedge clk); n++; end while (!req_ack);
    rd = rsp_rdata;
    last_cycles = n;
    @(posedge clk);
    #1 req_valid = 0;
  endtask
  task automatic cpu_write(line_addr_t la, be_t be, data_t wd);
    data_t dummy, g;
    cpu_access(1'b1, la, be, wd, dummy);
    g = gold_word(la);
    for (int i = 0; i < BE_W; i++) if (be[i]) g[8*i +: 8] = wd[8*i +: 8];
    gold[la] = g;
  endtask
  task automatic cpu_read(line_addr_t la, be_t be);
    data_t rd, g;
    cpu_access(1'b0, la, be, '0, rd);
    g = gold_word(la);
    checks++;
    for (int i = 0; i < BE_W; i++) if (be[i] && rd[8*i +: 8] != g[8*i +: 8]) begin
      failures++;
      $display("FAIL read %h: got %h expected %h (cfg %p)", la, rd, g, cfg);
      break;
    end
  endtask

  // reconfiguration stand-in: flush everything, then switch
  task automatic switch_cfg(cfg_t c);
    @(negedge clk); values_received = 1; @(negedge clk); values_received = 0;
    while (!reconf_active) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      ctrl_t cw = u_ctrl.mem[i];
      if ((|cw.bvalid) && cw.modified) begin
        data_t w = u_mem.peek(cw.laddr);
        for (int b = 0; b < BE_W; b++) if (cw.bvalid[b]) w[8*b +: 8] = u_data.mem[i][8*b +: 8];
        u_mem.mem[cw.laddr] = w;
      end
      u_ctrl.mem[i] = '0;
    end
    for (int i = 0; i < N; i++) u_repl.mem[i] = '0;
    cfg = c;
    reconf_done = 1; @(negedge clk); reconf_done = 0;
    check("cc_done follows reconf_done", cc_done, 1);
    @(negedge clk);
    check("controller serves again", reconf_active, 0);
  endtask

  function automatic cfg_t mk(int alog, repl_e r, bit wb, bit wa);
    return '{size_log2: SIZE_W'(LAW), assoc_log2: 3'(alog), repl: r, write_back: wb, write_alloc: wa, mon_mode: MON_OFF};
  endfunction

  task automatic traffic(int nops, int sets);
    for (int i = 0; i < nops; i++) begin
      line_addr_t la;
      be_t be;
      int r = $urandom_range(99);
      la = line_addr_t'($urandom_range(3) + $urandom_range(2 * (1 << cfg.assoc_log2) + 1) * sets);
      be = be_t'($urandom_range(1, 255));
      if (r < 45)      cpu_read(la, '1);
      else if (r < 55) cpu_read(la, be);
      else             cpu_write(la, be, {$urandom, $urandom});
    end
  endtask

  initial begin
    #20ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    data_t rd;
    int sets;
    cfg = mk(2, REPL_FIFO, 1, 1);
    repeat (3) @(negedge clk); rst = 0;
    sets = N / 4;

    // ---- sequential way search and FIFO ----
    for (int w = 0; w < 4; w++) cpu_write(line_addr_t'(5 + w * sets), '1, 64'(w + 100));
    for (int w = 0; w < 4; w++) begin
      cpu_read(line_addr_t'(5 + w * sets), '1);
      check($sformatf("hit in way %0d", w), last_hit, 1);
      check($sformatf("way %0d reported", w), last_way, w);
      check($sformatf("hit latency way %0d", w), last_cycles, w + 2);
    end
    cpu_write(line_addr_t'(5 + 4 * sets), '1, 64'(104));
    check("FIFO evicts way 0 first", last_way, 0);
    check("write miss reported", last_hit, 0);
    cpu_write(line_addr_t'(5 + 5 * sets), '1, 64'(105));
    check("FIFO evicts way 1 next", last_way, 1);
    cpu_read(line_addr_t'(5), '1);
    check("evicted line misses", last_hit, 0);
    check("dirty victim written back", u_mem.peek(line_addr_t'(5 + sets)), 101);

    // ---- LRU ----
    switch_cfg(mk(2, REPL_LRU, 1, 1));
    for (int w = 0; w < 4; w++) cpu_write(line_addr_t'(9 + w * sets), '1, 64'(w));
    cpu_read(line_addr_t'(9), '1);
    cpu_read(line_addr_t'(9 + 2 * sets), '1);
    cpu_write(line_addr_t'(9 + 7 * sets), '1, 64'(7));
    check("LRU evicts least recently used way 1", last_way, 1);
    cpu_write(line_addr_t'(9 + 8 * sets), '1, 64'(8));
    check("LRU then evicts way 3", last_way, 3);

    // ---- write-through, no-allocate, partial line ----
    switch_cfg(mk(0, REPL_RANDOM, 0, 0));
    cpu_write(line_addr_t'(40), 8'h0F, 64'h1111_2222_3333_4444);
    check("no-allocate write miss", last_hit, 0);
    check("no-allocate write reaches memory", u_mem.peek(line_addr_t'(40)), gold_word(line_addr_t'(40)));
    cpu_read(line_addr_t'(40), '1);
    check("no-allocate left the line out", last_hit, 0);
    cpu_write(line_addr_t'(40), 8'hF0, 64'h5555_6666_7777_8888);
    check("write-through hit", last_hit, 1);
    check("write-through reaches memory", u_mem.peek(line_addr_t'(40)), gold_word(line_addr_t'(40)));
    switch_cfg(mk(0, REPL_RANDOM, 1, 1));
    cpu_write(line_addr_t'(41), 8'h03, 64'hABCD);
    cpu_read(line_addr_t'(41), 8'h01);
    check("read of valid byte hits", last_hit, 1);
    cpu_read(line_addr_t'(41), 8'h0F);
    check("read of invalid byte misses", last_hit, 0);
    cpu_read(line_addr_t'(41), '1);
    check("merged line now hits", last_hit, 1);

    // ---- hand-over waits for a pending request ----
    fork
      cpu_read(line_addr_t'(77), '1);
      begin
        @(negedge clk); @(negedge clk);
        values_received = 1; @(negedge clk); values_received = 0;
      end
    join
    check("request finished before hand-over", req_valid, 0);
    while (!reconf_active) @(negedge clk);
    check("hand-over after the request", reconf_active, 1);
    cfg = mk(1, REPL_PLRU, 1, 1);
    reconf_done = 1; @(negedge clk); reconf_done = 0;
    @(negedge clk);

    // ---- random traffic in every configuration ----
    for (int al = 0; al <= 4; al++) begin
      for (int r = 0; r <= 4; r++) begin
        cfg_t c;
        if (r >= 3 && al > 3) continue;
        c = mk(al, repl_e'(r), 1'($urandom), 1'($urandom));
        c.size_log2 = SIZE_W'($urandom_range(LAW, (al > 2) ? al : 2));
        switch_cfg(c);
        traffic(150, (1 << c.size_log2) >> al);
      end
    end
    foreach (gold[a]) cpu_read(a, '1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
