// tb_rca_table1 -- functional test program run under twelve cache
// configurations, on the top at its default size (4096 lines).
//
// The configurations are the ones the original evaluation used (one to
// sixteen ways; write-through or write-back; write-allocate or not;
// pseudo-LRU, FIFO, LRU or pseudo-random replacement). The cache is
// reconfigured over the DCR bus from one to the next without a reset, so
// every row also exercises the reconfiguration unit with data in the
// cache. For each configuration the same short program runs, made of the
// access kinds that evaluation describes, on 16 sets of its own:
//   P1  first writes of 16 lines (group 1)
//   P2  overwrites of the same lines
//   P3  writes of 16 lines with another tag into the same sets (group 2),
//       which replace group 1 in a direct-mapped cache
//   P4  reads of group 1 and group 2
//   P5  byte-partial writes to a third group, then full reads of it:
//       misses caused by byte-valid bits, not by the tag
//   P6  reads of a fourth, never written group: tag misses
//   P7  the same reads again
// Every read is compared with a reference image of memory. The number of
// hits (from the monitor stream) and of memory writes in each phase is
// checked against values worked out from the configuration alone. Set
// indices of different rows never overlap at any associativity up to 16,
// so lines left from earlier rows do not disturb a row's counts.
// The cycle count of each row is printed. The source's absolute run times
// depend on its processor and test program, which are not modelled here;
// what is checked is the cost of the way-by-way search: P6 misses (less
// the time of any victim write-back) take longer at each higher
// associativity, because every way of the set is probed before the miss
// is known.
module tb_rca_table1;
  import rca_pkg::*;

  localparam int LAT = 7;
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
  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  data_t gold [line_addr_t];
  function automatic data_t gold_word(line_addr_t a);
    return gold.exists(a) ? gold[a] : u_mem.init_word(a);
  endfunction

  // hits and memory writes seen since the counters were last cleared
  int hits, mwrites;
  longint cycles;
  always @(posedge clk) begin
    if (mon_rec.valid && mon_rec.hit) hits++;
    if (mem_req && mem_we && mem_ack) mwrites++;
    cycles++;
  end

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

  task automatic cpu_read(line_addr_t la);
    data_t rd;
    cpu_access(1'b0, la, '1, '0, rd);
    checks++;
    if (rd != gold_word(la)) begin
      failures++;
      $display("FAIL read %h: got %h expected %h (cfg %p)", la, rd, gold_word(la), active_cfg);
    end
  endtask

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

  // the configurations: log2 ways, write-allocate, write-back, strategy
  typedef struct {int alog; bit wa; bit wb; repl_e repl;} row_t;
  row_t rows [12] = '{
    '{0, 1, 0, REPL_RANDOM}, '{0, 0, 0, REPL_RANDOM},
    '{0, 1, 1, REPL_RANDOM}, '{0, 0, 1, REPL_RANDOM},
    '{1, 1, 1, REPL_PLRU},   '{2, 1, 1, REPL_PLRU},
    '{2, 1, 1, REPL_FIFO},   '{2, 1, 1, REPL_LRU},
    '{2, 1, 1, REPL_PRANDOM},'{3, 1, 1, REPL_PLRU},
    '{4, 1, 1, REPL_FIFO},   '{4, 1, 1, REPL_PRANDOM}};

  // line address of line i of group g in the sets of row r
  function automatic line_addr_t la_of(int r, int g, int i);
    return line_addr_t'((g << 12) | (r * 16 + i));
  endfunction

  task automatic phase_start();
    @(negedge clk);
    hits = 0; mwrites = 0; cycles = 0;
  endtask

  task automatic phase_end(string what, int r, int exp_hits, int exp_writes);
    repeat (2) @(negedge clk);
    check($sformatf("row %0d %s hits", r + 1, what), hits, exp_hits);
    if (exp_writes >= 0)
      check($sformatf("row %0d %s memory writes", r + 1, what), mwrites, exp_writes);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] st;
    longint total, p6 [12];
    repeat (5) @(negedge clk);
    rst = 0;
    $display("row ways alloc policy replacement | reconf cycles | program cycles");
    for (int r = 0; r < 12; r++) begin
      int w;
      bit wa, wb;
      longint rc;
      w  = 1 << rows[r].alog;
      wa = rows[r].wa;
      wb = rows[r].wb;
      // reconfigure over the DCR bus
      dcr_wr(3, 32'(rows[r].alog));
      dcr_wr(4, 32'(rows[r].repl));
      dcr_wr(5, 32'(wb));
      dcr_wr(6, 32'(wa));
      dcr_wr(7, 32'(MON_LINE));
      phase_start();
      dcr_wr(0, 32'd1);
      do dcr_rd(0, st); while (st[1] != 1'b1);
      rc = cycles;
      check($sformatf("row %0d associativity", r + 1), int'(active_cfg.assoc_log2), rows[r].alog);
      check($sformatf("row %0d replacement", r + 1), int'(active_cfg.repl), int'(rows[r].repl));
      total = 0;

      // P1 first writes
      phase_start();
      for (int i = 0; i < 16; i++) cpu_write(la_of(r, 1, i), '1, {32'(r), 32'(i) ^ 32'hA1A1_0000});
      total += cycles;
      phase_end("P1", r, 0, (!wb || !wa) ? 16 : 0);
      // P2 overwrites
      phase_start();
      for (int i = 0; i < 16; i++) cpu_write(la_of(r, 1, i), '1, {32'(r), 32'(i) ^ 32'hB2B2_0000});
      total += cycles;
      phase_end("P2", r, wa ? 16 : 0, (!wb || !wa) ? 16 : 0);
      // P3 same sets, other tag
      phase_start();
      for (int i = 0; i < 16; i++) cpu_write(la_of(r, 2, i), '1, {32'(r), 32'(i) ^ 32'hC3C3_0000});
      total += cycles;
      phase_end("P3", r, 0, (!wb || !wa) ? 16 : (w == 1 ? 16 : 0));
      // P4 reads of both groups
      phase_start();
      for (int i = 0; i < 16; i++) cpu_read(la_of(r, 1, i));
      for (int i = 0; i < 16; i++) cpu_read(la_of(r, 2, i));
      total += cycles;
      phase_end("P4", r, (wa && w >= 2) ? 32 : 0, (wa && wb && w == 1) ? 16 : 0);
      // P5 byte-partial writes, then full reads
      phase_start();
      for (int i = 0; i < 16; i++) cpu_write(la_of(r, 3, i), 8'h0F, {32'hDEAD_0000, 32'(i)});
      for (int i = 0; i < 16; i++) cpu_read(la_of(r, 3, i));
      total += cycles;
      phase_end("P5", r, 0, -1);
      // P6 tag misses on lines never written
      phase_start();
      for (int i = 0; i < 16; i++) cpu_read(la_of(r, 4, i));
      total += cycles;
      p6[r] = cycles - longint'(mwrites) * (longint'(LAT) + 2);
      phase_end("P6", r, 0, -1);
      // P7 the same lines again: hits
      phase_start();
      for (int i = 0; i < 16; i++) cpu_read(la_of(r, 4, i));
      total += cycles;
      phase_end("P7", r, 16, 0);
      $display("%3d %4d %5s %6s %-11s | %13d | %0d", r + 1, w, wa ? "yes" : "no",
               wb ? "WB" : "WT", rows[r].repl.name(), rc, total);
    end
    // cost of the sequential search: the fetched line sits in the first
    // free way, and higher associativity means a longer search on a miss
    for (int r = 1; r < 12; r++)
      if (rows[r].alog > rows[r-1].alog) begin
        checks++;
        if (p6[r] <= p6[r-1]) begin
          failures++;
          $display("FAIL tag misses of row %0d (%0d cycles) not slower than row %0d (%0d)",
                   r + 1, p6[r], r, p6[r-1]);
        end
      end
    // all data still correct at the end
    foreach (gold[a]) cpu_read(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
