// tb_plb_ddr_cc -- end-to-end test of the reconfigurable cache at its
// default size (4096 lines, up to 16 ways).
//
// The testbench plays the processor: it reconfigures the cache over the
// DCR bus and issues random reads and writes (full and partial words)
// whose addresses are chosen to collide in a few sets, so that every
// configuration evicts. Every read is compared with a reference image of
// memory kept by the testbench. The reconfigurations walk through all
// associativities from 1 to 16 ways and all replacement strategies, both
// write policies and both allocation policies, and the number of lines in
// use is halved twice (4096 -> 1024) and restored; data are checked to
// survive each change.
//
// Cycle counts are checked against the schedule of the reconfiguration
// unit: a doubling of the associativity costs 2 + (N/2)*2 + 1 + (N/2)*3 + 2
// cycles on a clean cache and 2 + (N/2)*12 + 1 + (N/2)*3 + 2 when every
// rear-half line is dirty (9-cycle memory write); a change of replacement
// strategy costs sets + 3; a change of write policy alone costs 4; growing
// from 1024 to 4096 lines costs 2 + 3*L + 2 per doubling (L = old lines),
// and so does doubling lines and ways together at a constant number of
// sets, which is also tested with its inverse.
// Each mechanism (hits, misses, partial-byte misses, write-through,
// no-allocate writes, dirty evictions, evictions under each strategy,
// stalled requests, rear-half write-back, lines dropped on halving,
// monitor records in both modes) is counted and must occur.
module tb_plb_ddr_cc;
  import rca_pkg::*;

  localparam int N        = 4096;   // default size of plb_ddr_cc
  localparam int H        = N / 2;
  localparam int LAT      = 7;      // memory write occupies 9 cycles
  localparam logic [9:0] BASE = 10'h080;

  logic              clk = 0, rst = 1;
  logic              req_valid = 0, req_we = 0;
  logic [ADDR_W-1:0] req_addr = '0;
  be_t               req_be = '0;
  data_t             req_wdata = '0;
  logic              req_ack;
  data_t             rsp_rdata;
  logic [9:0]        dcr_abus = '0;
  logic [31:0]       dcr_dbus_in = '0;
  logic              dcr_read = 0, dcr_write = 0;
  logic              dcr_ack;
  logic [31:0]       dcr_dbus_out;
  logic              mem_req, mem_we, mem_ack;
  line_addr_t        mem_addr;
  be_t               mem_be;
  data_t             mem_wdata, mem_rdata;
  mon_rec_t          mon_rec;
  logic [31:0]       mon_count;
  cfg_t              active_cfg;
  logic              reconf_busy;

  plb_ddr_cc dut (.*);

  ddr_mem_model #(.LAT(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (%h) expected %0d (%h)", what, got, got, exp, exp);
    end
  endtask

  // ---------------------------------------------------------------
  // reference image of memory as the processor sees it
  // ---------------------------------------------------------------
  data_t gold [line_addr_t];
  function automatic data_t gold_word(line_addr_t a);
    return gold.exists(a) ? gold[a] : u_mem.init_word(a);
  endfunction

  // ---------------------------------------------------------------
  // mechanism counters
  // ---------------------------------------------------------------
  int n_rd_hit, n_rd_miss, n_partial, n_wr_hit_wb, n_wr_hit_wt, n_wr_alloc,
      n_wr_noalloc, n_victim_wb, n_stall, n_rear_wb, n_drop, n_inc, n_dec,
      n_clr, n_reg, n_grow, n_shrink, n_wgrow, n_wshrink, n_mon1, n_mon2, n_mon_bad;
  int next_size = $clog2(N);
  int n_evict [5];
  longint busy_cycles;

  always @(posedge clk) if (!rst) begin
    if (dut.ev_valid) begin
      if (!dut.ev_write &&  dut.ev_hit) n_rd_hit++;
      if (!dut.ev_write && !dut.ev_hit) n_rd_miss++;
      if (!dut.ev_write &&  dut.u_cc.r_merge) n_partial++;
      if ( dut.ev_write &&  dut.ev_hit &&  active_cfg.write_back) n_wr_hit_wb++;
      if ( dut.ev_write &&  dut.ev_hit && !active_cfg.write_back) n_wr_hit_wt++;
      if ( dut.ev_write && !dut.ev_hit &&  active_cfg.write_alloc) n_wr_alloc++;
      if ( dut.ev_write && !dut.ev_hit && !active_cfg.write_alloc) n_wr_noalloc++;
    end
    if (!dut.reconf_active && mem_req && mem_we && mem_ack && mem_addr != dut.u_cc.r_la)
      n_victim_wb++;
    // a full set: the replacement logic picks the victim
    if (dut.u_cc.state == 4'd3 && dut.u_cc.last_probe && !dut.u_cc.tag_hit &&
        dut.u_cc.line_valid && !dut.u_cc.inv_found && !(dut.u_cc.r_we && !active_cfg.write_alloc))
      n_evict[active_cfg.repl]++;
    if (req_valid && dut.reconf_active) n_stall++;
    if (dut.reconf_active && mem_req && mem_ack && dut.u_reconf.st == 4'd5) n_rear_wb++;
    if (dut.u_reconf.st == 4'd9 && dut.u_reconf.ph == 3'd1 && (|dut.ctrl_rdata.bvalid) &&
        dut.u_reconf.dec_cnt >= dut.u_reconf.new_ways) n_drop++;
    if (dut.u_reconf.st == 4'd2) begin
      case (dut.u_reconf.ph)
        3'd0: n_inc++;
        3'd1: n_dec++;
        3'd2: n_clr++;
        3'd4: n_grow++;
        3'd5: n_shrink++;
        3'd6: n_wgrow++;
        3'd7: n_wshrink++;
        default: n_reg++;
      endcase
    end
    if (reconf_busy) busy_cycles++;
  end

  // monitor: every record must describe the request acknowledged one
  // cycle before it
  logic        q_we;
  line_addr_t  q_la;
  be_t         q_be;
  always @(posedge clk) if (!rst) begin
    if (mon_rec.valid) begin
      int fb;
      fb = 0;
      for (int i = BE_W - 1; i >= 0; i--) if (q_be[i]) fb = i;
      if (mon_rec.write != q_we || int'(mon_rec.byte_sel) != fb) n_mon_bad++;
      if (active_cfg.mon_mode == MON_ADDR) begin
        n_mon2++;
        if (mon_rec.addr != {q_la, 1'(fb >> 2)}) n_mon_bad++;
      end else begin
        n_mon1++;
        if (mon_rec.addr != '0) n_mon_bad++;
      end
    end
    if (req_ack) begin
      q_we = req_we;
      q_la = req_addr[ADDR_W-1:OFFS_W];
      q_be = req_be;
    end
  end

  // ---------------------------------------------------------------
  // processor-side accesses
  // ---------------------------------------------------------------
  task automatic cpu_access(logic we, line_addr_t la, be_t be, data_t wd, output data_t rd);
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = {la, 3'b000}; req_be = be; req_wdata = wd;
    do @(negedge clk); while (!req_ack);
    rd = rsp_rdata;
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
      $display("FAIL read %h be %b: got %h expected %h (cfg %p)", la, be, rd, g, active_cfg);
      break;
    end
  endtask

  // ---------------------------------------------------------------
  // DCR accesses and reconfiguration
  // ---------------------------------------------------------------
  task automatic dcr_wr(int off, logic [31:0] v);
    @(negedge clk);
    dcr_abus = BASE + 10'(off); dcr_dbus_in = v; dcr_write = 1;
    do @(negedge clk); while (!dcr_ack);
    @(posedge clk);
    #1 dcr_write = 0; dcr_dbus_in = '0;
  endtask

  task automatic dcr_rd(int off, output logic [31:0] v);
    @(negedge clk);
    dcr_abus = BASE + 10'(off); dcr_read = 1;
    do @(negedge clk); while (!dcr_ack);
    v = dcr_dbus_out;
    @(posedge clk);
    #1 dcr_read = 0;
  endtask

  task automatic reconfigure(int alog, repl_e repl, bit wb, bit wa, mon_mode_e mm,
                             longint exp_cycles, bit with_request);
    logic [31:0] st;
    dcr_wr(1, 32'(next_size));
    dcr_wr(3, 32'(alog));
    dcr_wr(4, 32'(repl));
    dcr_wr(5, 32'(wb));
    dcr_wr(6, 32'(wa));
    dcr_wr(7, 32'(mm));
    busy_cycles = 0;
    dcr_wr(0, 32'd1);
    if (with_request) begin
      // a request arriving during the reconfiguration must wait
      repeat (4) @(negedge clk);
      cpu_read(line_addr_t'(3), '1);
    end
    do dcr_rd(0, st); while (st[1] != 1'b1);
    check("status busy cleared", st[0], 0);
    check("active size", active_cfg.size_log2, next_size);
    check("active associativity", active_cfg.assoc_log2, alog);
    check("active replacement", active_cfg.repl, repl);
    check("active write policy", active_cfg.write_back, wb);
    check("active allocation", active_cfg.write_alloc, wa);
    check("active monitor mode", active_cfg.mon_mode, mm);
    if (exp_cycles >= 0) check($sformatf("reconfiguration cycles (%0d ways)", 1 << alog),
                               busy_cycles, exp_cycles);
    $display("reconfigured to %0d lines %0d ways %s wb=%0d wa=%0d in %0d cycles",
             1 << next_size, 1 << alog, repl.name(), wb, wa, busy_cycles);
  endtask

  // random traffic that collides in a few sets in every configuration
  task automatic traffic(int nops);
    for (int i = 0; i < nops; i++) begin
      line_addr_t la;
      be_t be;
      int r = $urandom_range(99);
      int kind = $urandom_range(2);
      case (kind)
        0: la = line_addr_t'($urandom_range(7) + $urandom_range(19) * N);
        1: la = line_addr_t'($urandom_range(7) + $urandom_range(19) * (N / 16));
        default: la = line_addr_t'($urandom_range(8 * N - 1));
      endcase
      be = be_t'($urandom_range(255));
      if (be == '0) be = 8'h0F;
      if (r < 45)      cpu_read(la, '1);
      else if (r < 55) cpu_read(la, be);
      else if (r < 90) cpu_write(la, be, {$urandom, $urandom});
      else             cpu_write(la, '1, {$urandom, $urandom});
    end
  endtask

  task automatic check_all();
    foreach (gold[a]) cpu_read(a, '1);
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    longint clean_step, dirty_step;
    clean_step = 2 + H * 2 + 1 + H * 3 + 2;
    dirty_step = 2 + H * (3 + LAT + 2) + 1 + H * 3 + 2;
    foreach (n_evict[i]) n_evict[i] = 0;
    repeat (5) @(negedge clk);
    rst = 0;

    // geometry registers
    dcr_rd(1, v); check("size register", v, $clog2(N));
    dcr_rd(2, v); check("line size register", v, 3);

    // associativity changes on an empty cache: the clean schedule
    reconfigure(1, REPL_RANDOM, 1, 1, MON_OFF, clean_step, 0);
    reconfigure(0, REPL_RANDOM, 1, 1, MON_OFF, clean_step, 0);
    // only a register value changes: 4 cycles
    reconfigure(0, REPL_RANDOM, 1, 1, MON_LINE, 4, 0);

    // direct-mapped, write-back: make every rear-half line dirty
    traffic(300);
    for (int la = H; la < N; la++) cpu_write(line_addr_t'(la), '1, {32'(la), 32'hD1D1_0000 | 32'(la)});
    repeat (2) @(negedge clk);
    check("monitor records in mode 1", mon_count, longint'(n_mon1));
    // doubling with a fully dirty rear half: the worst-case schedule
    reconfigure(1, REPL_RANDOM, 1, 1, MON_ADDR, dirty_step, 0);
    begin
      int bad = 0;
      for (int la = H; la < N; la++)
        if (u_mem.peek(line_addr_t'(la)) != gold_word(line_addr_t'(la))) bad++;
      check("rear half written back", bad, 0);
    end
    check_all();

    // replacement change only: one cycle per set plus 3
    reconfigure(1, REPL_PLRU, 1, 1, MON_ADDR, N / 2 + 3, 0);
    traffic(600);
    reconfigure(2, REPL_FIFO, 1, 1, MON_ADDR, -1, 1);
    traffic(600);
    reconfigure(3, REPL_LRU, 1, 1, MON_ADDR, -1, 0);
    traffic(600);
    reconfigure(4, REPL_PRANDOM, 0, 1, MON_ADDR, -1, 0);     // 16 ways, write-through
    traffic(600);
    check_all();
    reconfigure(4, REPL_FIFO, 0, 0, MON_LINE, -1, 0);        // no-write-allocate
    traffic(600);
    reconfigure(2, REPL_RANDOM, 1, 1, MON_LINE, -1, 0);      // halving twice
    traffic(600);
    reconfigure(1, REPL_LRU, 1, 1, MON_LINE, -1, 1);
    traffic(400);
    // fill 2-way sets with lines that all land in one half when halved
    for (int s = 0; s < 8; s++) begin
      cpu_write(line_addr_t'(s), '1, {$urandom, $urandom});
      cpu_write(line_addr_t'(s + N), '1, {$urandom, $urandom});
    end
    reconfigure(0, REPL_RANDOM, 1, 1, MON_LINE, -1, 0);
    check_all();
    // fewer lines at constant associativity, then all lines again
    traffic(300);
    next_size = $clog2(N) - 2;
    reconfigure(1, REPL_FIFO, 1, 1, MON_LINE, -1, 0);
    traffic(400);
    check_all();
    next_size = $clog2(N);
    reconfigure(1, REPL_FIFO, 1, 1, MON_LINE, 2 + 3 * N / 4 + 2 + 2 + 3 * N / 2 + 2, 1);
    traffic(300);
    check_all();
    // lines and ways halved together (sets stay), then doubled again
    next_size = $clog2(N) - 1;
    reconfigure(0, REPL_FIFO, 1, 1, MON_LINE, -1, 0);
    traffic(300);
    check_all();
    next_size = $clog2(N);
    reconfigure(1, REPL_FIFO, 1, 1, MON_LINE, 2 + 3 * N / 2 + 2, 1);
    traffic(300);
    check_all();
    // a request for LRU at 16 ways is lowered to 8 ways
    reconfigure(3, REPL_LRU, 1, 1, MON_LINE, -1, 0);
    dcr_wr(3, 32'd4);
    dcr_wr(0, 32'd1);
    do dcr_rd(0, v); while (v[1] != 1'b1);
    check("LRU limits associativity to 8", active_cfg.assoc_log2, 3);
    traffic(300);
    check_all();

    check("monitor record contents", n_mon_bad, 0);
    $display("read hits %0d, read misses %0d, partial-byte misses %0d", n_rd_hit, n_rd_miss, n_partial);
    $display("write hits wb %0d wt %0d, write misses alloc %0d no-alloc %0d",
             n_wr_hit_wb, n_wr_hit_wt, n_wr_alloc, n_wr_noalloc);
    $display("dirty evictions %0d, stalled cycles %0d, rear write-backs %0d, dropped lines %0d",
             n_victim_wb, n_stall, n_rear_wb, n_drop);
    $display("phases: increase %0d decrease %0d clear %0d register %0d grow %0d shrink %0d",
             n_inc, n_dec, n_clr, n_reg, n_grow, n_shrink);
    $display("phases: lines and ways doubled %0d, halved %0d", n_wgrow, n_wshrink);
    $display("evictions random %0d prandom %0d fifo %0d plru %0d lru %0d",
             n_evict[0], n_evict[1], n_evict[2], n_evict[3], n_evict[4]);
    $display("monitor records mode1 %0d mode2 %0d", n_mon1, n_mon2);
    begin
      int seen [string];
      seen["read hit"] = n_rd_hit;          seen["read miss"] = n_rd_miss;
      seen["partial-byte miss"] = n_partial; seen["write hit, write-back"] = n_wr_hit_wb;
      seen["write hit, write-through"] = n_wr_hit_wt; seen["write miss, allocate"] = n_wr_alloc;
      seen["write miss, no allocate"] = n_wr_noalloc; seen["dirty eviction"] = n_victim_wb;
      seen["stalled request"] = n_stall;    seen["rear-half write-back"] = n_rear_wb;
      seen["line dropped on halving"] = n_drop; seen["associativity doubled"] = n_inc;
      seen["associativity halved"] = n_dec; seen["replacement cleared"] = n_clr;
      seen["register-only change"] = n_reg;
      seen["lines doubled"] = n_grow;      seen["lines halved"] = n_shrink;
      seen["lines and ways doubled"] = n_wgrow; seen["lines and ways halved"] = n_wshrink; seen["monitor mode 1"] = n_mon1;
      seen["monitor mode 2"] = n_mon2;
      seen["eviction random"] = n_evict[0]; seen["eviction pseudo-random"] = n_evict[1];
      seen["eviction FIFO"] = n_evict[2];   seen["eviction pLRU"] = n_evict[3];
      seen["eviction LRU"] = n_evict[4];
      foreach (seen[k]) begin
        checks++;
        if (seen[k] == 0) begin failures++; $display("FAIL mechanism never seen: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
