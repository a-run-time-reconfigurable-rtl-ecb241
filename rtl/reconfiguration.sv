// reconfiguration -- run-time reconfiguration unit of the cache.
//
// Holds the active configuration and changes it on request while keeping
// the cached data correct. Started by `en` (one cycle) from the cache
// controller, which has stopped serving requests and handed over the three
// BRAM ports and the memory port; `done` is high in the last busy cycle.
// L below is the number of lines in use, 2**size_log2.
//
// A change of associativity at constant L is made one doubling or halving
// at a time (several steps for a larger change), following the paper:
//
//   increase 2**k -> 2**(k+1) ways, sets halve:
//     2 setup cycles;
//     every line of the rear half (lines L/2..L-1, the old sets whose top
//     set-index bit is 1) is checked, written back if modified, and
//     cleared: 2 cycles, or 3 plus the memory write;
//     1 synchronisation cycle;
//     every line of the front half is moved to its place in the doubled
//     set (old set j way w -> line j*2**(k+1)+w), 3 cycles each, highest
//     line first so that no line is overwritten before it has moved;
//     2 final cycles.
//   For L = 1024 and a clean cache this is 2+512*2+1+512*3+2 = 2565 cycles,
//   the paper's figure; with a 9-cycle memory write per dirty line a dirty
//   line costs 12 cycles and the total is the paper's 7685.
//
//   decrease 2**k -> 2**(k-1) ways, sets double: the same rear-half flush,
//   then each front line goes to new set j or j+S (S = old number of sets)
//   according to the address bit that joins the set index; a new set takes
//   at most 2**(k-1) lines, a line beyond that is written back if modified
//   and dropped. 3 cycles per line plus any write-back. The paper proposes
//   this flush-and-split trade-off without giving a schedule; the order
//   (lowest line first) and the drop rule are this design's.
//
// A change of the number of lines at constant associativity, also one
// doubling or halving at a time:
//   grow L -> 2L, sets double: each line whose address bit that joins the
//   set index is 1 moves from set j to the new set j+S in the added rear
//   half, same way; the others stay. 2 setup, 3 per old line, 2 final.
//   shrink L -> L/2: the rear half is flushed as above; the front lines stay
//   where they are. 2 setup, rear flush, 2 final.
// The paper describes both moves; their cycle schedule is this design's.
//
// A change of the number of lines at constant number of sets doubles or
// halves lines and ways together:
//   grow: every line moves from old set j way w to line j*2**(k+1)+w, the
//   lower half of its doubled set, highest line first; nothing is written
//   back. 2 setup, 3 per old line, 2 final.
//   shrink: each set keeps at most 2**(k-1) valid lines, packed to the
//   front of the halved set; the others are written back if modified and
//   dropped. Under LRU, as the paper suggests, only lines among the
//   2**(k-1) most recently used ways are kept (the set's replacement word is
//   read alongside each line, at no extra cycle); under the other
//   strategies the lowest valid ways are kept. 2 setup, 3 per old line plus
//   write-backs, 2 final.
//
// A change of replacement strategy clears the per-set replacement words:
// 2 setup cycles, one cycle per set, 1 final cycle (1027 cycles for 1024
// sets, as in the paper); no old information is reused. A change of only
// the write strategies or the monitor mode takes 4 cycles. Stored control
// words hold the whole line address, so no tag needs rewriting.
//
// Order of steps: lines and ways together, grow, then associativity, then
// shrink, then the replacement clear. Limits fixed before synthesis: NUM_LINES,
// MAX_ASSOC_LOG2 and MAX_REPL. Requests above them are lowered to them,
// PLRU/LRU limit the associativity to 8, and the size is raised to at least
// one set.
module reconfiguration
  import rca_pkg::*;
#(
  parameter int unsigned NUM_LINES      = 4096,
  parameter int unsigned MAX_ASSOC_LOG2 = 4,
  parameter repl_e       MAX_REPL       = REPL_LRU,
  parameter cfg_t        RESET_CFG      = '{size_log2: '0, assoc_log2: '0,
                                            repl: REPL_RANDOM, write_back: 1'b1,
                                            write_alloc: 1'b1, mon_mode: MON_OFF},
  localparam int unsigned LAW = $clog2(NUM_LINES)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  cfg_t           new_cfg,
  output cfg_t           active_cfg,   // size_log2 resets to log2(NUM_LINES)
  output logic           busy,
  output logic           done,
  // control BRAM
  output logic           ctrl_en,
  output logic           ctrl_we,
  output logic [LAW-1:0] ctrl_addr,
  output ctrl_t          ctrl_wdata,
  input  ctrl_t          ctrl_rdata,
  // cache data BRAM
  output logic           data_en,
  output logic           data_we,
  output logic [LAW-1:0] data_addr,
  output data_t          data_wdata,
  input  data_t          data_rdata,
  // replacement BRAM
  output logic           repl_en,
  output logic           repl_we,
  output logic [LAW-1:0] repl_addr,
  output repl_word_t     repl_wdata,   // always zero: words are only cleared
  input  repl_word_t     repl_rdata,
  // main memory, write-back only
  output logic           mem_req,
  output line_addr_t     mem_addr,
  output be_t            mem_be,
  output data_t          mem_wdata,
  input  logic           mem_ack
);

  typedef enum logic [3:0] {
    R_IDLE, R_SETUP1, R_SETUP2,
    R_RRD, R_RCHK, R_RWB, R_RCLR, R_SYNC,
    R_MRD, R_MWR, R_MWB, R_MINV,
    R_CLR, R_REG, R_FIN1, R_FIN2
  } rstate_e;

  typedef enum logic [2:0] {
    PH_INC, PH_DEC, PH_CLR, PH_REG, PH_GROW, PH_SHRINK, PH_WGROW, PH_WSHRINK
  } phase_e;

  rstate_e        st;
  phase_e         ph;
  cfg_t           tgt;        // clamped target configuration
  logic [LAW-1:0] li;         // line (or set) index being processed
  ctrl_t          c_q;        // control word being written back
  data_t          d_q;
  logic [LAW:0]   cnt0, cnt1; // lines placed in the two new sets (decrease)
  logic           keep_src;   // line stayed in place

  // clamp a request to what was synthesised
  function automatic cfg_t clamp(cfg_t c);
    cfg_t r = c;
    if (r.repl > MAX_REPL) r.repl = MAX_REPL;
    if (r.repl > REPL_LRU) r.repl = REPL_LRU;
    if (r.assoc_log2 > ALOG_W'(MAX_ASSOC_LOG2)) r.assoc_log2 = ALOG_W'(MAX_ASSOC_LOG2);
    if ((r.repl == REPL_PLRU || r.repl == REPL_LRU) && r.assoc_log2 > 3) r.assoc_log2 = 3;
    if (r.assoc_log2 > ALOG_W'(LAW)) r.assoc_log2 = ALOG_W'(LAW);
    if (r.size_log2 > SIZE_W'(LAW)) r.size_log2 = SIZE_W'(LAW);
    if (r.size_log2 < SIZE_W'(r.assoc_log2)) r.size_log2 = SIZE_W'(r.assoc_log2);
    if (r.mon_mode > MON_ADDR) r.mon_mode = MON_OFF;
    return r;
  endfunction

  // geometry of the step in progress
  logic [ALOG_W-1:0] k;          // current log2(ways)
  logic [SIZE_W-1:0] sl;         // current log2(lines)
  logic [LAW-1:0]    last_idx;   // L - 1
  logic [LAW-1:0]    half;       // L / 2
  logic [LAW-1:0]    ways_m1;    // current ways - 1
  logic [LAW-1:0]    set_j;      // current set of line li
  logic [LAW-1:0]    way_w;      // current way of line li
  logic [LAW-1:0]    old_sets;   // current number of sets
  logic              split_bit;  // address bit that joins the set index
  logic              line_ok;    // control word on ctrl_rdata is valid
  logic [LAW-1:0]    inc_dst;    // destination when doubling the ways
  logic [LAW:0]      new_ways;   // ways after halving
  logic [LAW:0]      dec_cnt;
  logic [LAW-1:0]    dec_dst;    // destination when halving the ways
  logic [LAW-1:0]    grow_dst;   // destination when doubling the lines
  logic [LAW-1:0]    wsh_dst;    // destination when halving lines and ways
  logic [LAW-1:0]    n_sets_m1;  // sets of the target configuration - 1
  always_comb begin
    k         = active_cfg.assoc_log2;
    sl        = active_cfg.size_log2;
    last_idx  = LAW'((1 << sl) - 1);
    half      = LAW'(1 << sl >> 1);
    ways_m1   = LAW'((1 << k) - 1);
    set_j     = li >> k;
    way_w     = li & ways_m1;
    old_sets  = LAW'(1 << (sl - SIZE_W'(k)));
    split_bit = ctrl_rdata.laddr[32'(sl) - 32'(k)];
    line_ok   = |ctrl_rdata.bvalid;
    inc_dst   = (set_j << (k + 1)) | way_w;
    new_ways  = (LAW + 1)'(1) << (k - 1);
    dec_cnt   = split_bit ? cnt1 : cnt0;
    dec_dst   = ((set_j + (split_bit ? old_sets : '0)) << (k - 1)) | LAW'(dec_cnt);
    grow_dst  = ((set_j + old_sets) << k) | way_w;
    wsh_dst   = (set_j << (k - 1)) | LAW'(cnt0);
    n_sets_m1 = LAW'((1 << (tgt.size_log2 - SIZE_W'(tgt.assoc_log2))) - 1);
  end

  // LRU matrix: bit midx(i,j), i<j, is 1 when way i was used after way j
  function automatic int unsigned midx(int unsigned i, int unsigned j);
    return (i * (15 - i)) / 2 + (j - i - 1);
  endfunction

  // under LRU, is way_w among the more recently used half of its set?
  logic lru_keep;
  always_comb begin
    int unsigned newer;
    newer = 0;
    for (int unsigned o = 0; o < 8; o++) begin
      if (o < (32'd1 << k) && o < 32'(way_w) && repl_rdata[midx(o, 32'(way_w))])  newer++;
      if (o < (32'd1 << k) && o > 32'(way_w) && !repl_rdata[midx(32'(way_w), o)]) newer++;
    end
    lru_keep = (active_cfg.repl != REPL_LRU) || (newer < (32'd1 << k >> 1));
  end

  logic last_line;
  always_comb begin
    unique case (ph)
      PH_INC, PH_WGROW:     last_line = (li == '0);
      PH_GROW, PH_WSHRINK:  last_line = (li == last_idx);
      default: last_line = (li == half - 1'b1);
    endcase
  end

  // does the step just finished leave more to do?
  logic more;
  assign more = (tgt.size_log2 != active_cfg.size_log2) ||
                (tgt.assoc_log2 != active_cfg.assoc_log2) ||
                (ph != PH_CLR && ph != PH_REG && tgt.repl != active_cfg.repl);

  always_comb begin
    ctrl_en = 1'b0; ctrl_we = 1'b0; ctrl_addr = li; ctrl_wdata = '0;
    data_en = 1'b0; data_we = 1'b0; data_addr = li; data_wdata = '0;
    repl_en = 1'b0; repl_we = 1'b0; repl_addr = li; repl_wdata = '0;
    mem_req = 1'b0; mem_addr = c_q.laddr; mem_be = c_q.bvalid; mem_wdata = d_q;
    busy    = (st != R_IDLE);
    done    = 1'b0;
    unique case (st)
      R_RRD: begin ctrl_en = 1'b1; data_en = 1'b1; end
      R_MRD: begin
        ctrl_en = 1'b1; data_en = 1'b1;
        if (ph == PH_WSHRINK) begin repl_en = 1'b1; repl_addr = set_j; end
      end
      R_RCHK: begin
        if (!(line_ok && ctrl_rdata.modified)) begin
          ctrl_en = 1'b1; ctrl_we = 1'b1; data_en = 1'b1; data_we = 1'b1;
        end
      end
      R_RWB, R_MWB: mem_req = 1'b1;
      R_RCLR: begin ctrl_en = 1'b1; ctrl_we = 1'b1; data_en = 1'b1; data_we = 1'b1; end
      R_MWR: begin
        ctrl_wdata = ctrl_rdata;
        data_wdata = data_rdata;
        if (ph == PH_INC || ph == PH_WGROW) begin
          ctrl_en = 1'b1; ctrl_we = 1'b1; ctrl_addr = inc_dst;
          data_en = 1'b1; data_we = 1'b1; data_addr = inc_dst;
        end else if (ph == PH_WSHRINK) begin
          if (line_ok && lru_keep && (LAW + 1)'(cnt0) < new_ways) begin
            ctrl_en = 1'b1; ctrl_we = 1'b1; ctrl_addr = wsh_dst;
            data_en = 1'b1; data_we = 1'b1; data_addr = wsh_dst;
          end
        end else if (ph == PH_GROW) begin
          if (line_ok && split_bit) begin
            ctrl_en = 1'b1; ctrl_we = 1'b1; ctrl_addr = grow_dst;
            data_en = 1'b1; data_we = 1'b1; data_addr = grow_dst;
          end
        end else if (line_ok && dec_cnt < new_ways) begin
          ctrl_en = 1'b1; ctrl_we = 1'b1; ctrl_addr = dec_dst;
          data_en = 1'b1; data_we = 1'b1; data_addr = dec_dst;
        end
      end
      R_MINV: begin
        if (!keep_src) begin
          ctrl_en = 1'b1; ctrl_we = 1'b1; data_en = 1'b1; data_we = 1'b1;
        end
      end
      R_CLR: begin repl_en = 1'b1; repl_we = 1'b1; end
      R_FIN2: done = !more;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= R_IDLE; ph <= PH_REG;
      tgt <= RESET_CFG;        tgt.size_log2        <= SIZE_W'(LAW);
      active_cfg <= RESET_CFG; active_cfg.size_log2 <= SIZE_W'(LAW);
      li <= '0; c_q <= '0; d_q <= '0;
      cnt0 <= '0; cnt1 <= '0; keep_src <= 1'b0;
    end else begin
      unique case (st)
        R_IDLE: if (en) begin
          tgt <= clamp(new_cfg);
          st  <= R_SETUP1;
        end
        R_SETUP1: begin
          // choose the next step
          if (tgt.size_log2 > active_cfg.size_log2 &&
              tgt.assoc_log2 > active_cfg.assoc_log2)      ph <= PH_WGROW;
          else if (tgt.size_log2 < active_cfg.size_log2 &&
                   tgt.assoc_log2 < active_cfg.assoc_log2) ph <= PH_WSHRINK;
          else if (tgt.size_log2 > active_cfg.size_log2)   ph <= PH_GROW;
          else if (tgt.assoc_log2 > active_cfg.assoc_log2) ph <= PH_INC;
          else if (tgt.assoc_log2 < active_cfg.assoc_log2) ph <= PH_DEC;
          else if (tgt.size_log2 < active_cfg.size_log2)   ph <= PH_SHRINK;
          else if (tgt.repl != active_cfg.repl)            ph <= PH_CLR;
          else                                             ph <= PH_REG;
          st <= R_SETUP2;
        end
        R_SETUP2: begin
          unique case (ph)
            PH_INC, PH_DEC, PH_SHRINK: begin li <= half; st <= R_RRD; end
            PH_GROW:                   begin li <= '0;   st <= R_MRD; end
            PH_WGROW:                  begin li <= last_idx; st <= R_MRD; end
            PH_WSHRINK: begin
              li <= '0; cnt0 <= '0; cnt1 <= '0; st <= R_MRD;
            end
            PH_CLR:                    begin li <= '0;   st <= R_CLR; end
            default:                   st <= R_REG;
          endcase
        end
        // ---------------- rear-half flush ----------------
        R_RRD: st <= R_RCHK;
        R_RCHK: begin
          c_q <= ctrl_rdata;
          d_q <= data_rdata;
          if (line_ok && ctrl_rdata.modified) st <= R_RWB;
          else if (li == last_idx) st <= (ph == PH_SHRINK) ? R_FIN1 : R_SYNC;
          else begin li <= li + 1'b1; st <= R_RRD; end
        end
        R_RWB: if (mem_ack) st <= R_RCLR;
        R_RCLR: begin
          if (li == last_idx) st <= (ph == PH_SHRINK) ? R_FIN1 : R_SYNC;
          else begin li <= li + 1'b1; st <= R_RRD; end
        end
        R_SYNC: begin
          li   <= (ph == PH_INC) ? half - 1'b1 : '0;
          cnt0 <= '0;
          cnt1 <= '0;
          st   <= R_MRD;
        end
        // ---------------- line moves ----------------
        R_MRD: st <= R_MWR;
        R_MWR: begin
          c_q <= ctrl_rdata;
          d_q <= data_rdata;
          st  <= R_MINV;
          if (ph == PH_INC || ph == PH_WGROW) begin
            keep_src <= (inc_dst == li);
          end else if (ph == PH_WSHRINK) begin
            keep_src <= 1'b0;
            if (line_ok && lru_keep && (LAW + 1)'(cnt0) < new_ways) begin
              keep_src <= (wsh_dst == li);
              cnt0     <= cnt0 + 1'b1;
            end else if (line_ok && ctrl_rdata.modified) begin
              st <= R_MWB;
            end
          end else if (ph == PH_GROW) begin
            keep_src <= !(line_ok && split_bit);
          end else if (!line_ok) begin
            keep_src <= 1'b0;
          end else if (dec_cnt < new_ways) begin
            keep_src <= (dec_dst == li);
            if (split_bit) cnt1 <= cnt1 + 1'b1;
            else           cnt0 <= cnt0 + 1'b1;
          end else begin
            // no room left in the new set: drop the line
            keep_src <= 1'b0;
            if (ctrl_rdata.modified) st <= R_MWB;
          end
        end
        R_MWB: if (mem_ack) st <= R_MINV;
        R_MINV: begin
          if (last_line) begin
            st <= R_FIN1;
          end else begin
            if (ph == PH_INC || ph == PH_WGROW) li <= li - 1'b1;
            else begin
              li <= li + 1'b1;
              if ((li & ways_m1) == ways_m1) begin cnt0 <= '0; cnt1 <= '0; end
            end
            st <= R_MRD;
          end
        end
        // ---------------- replacement information ----------------
        R_CLR: begin
          if (li == n_sets_m1) st <= R_FIN2;
          else li <= li + 1'b1;
        end
        R_REG: st <= R_FIN2;
        // ---------------- end of a step ----------------
        R_FIN1: begin
          unique case (ph)
            PH_INC:    active_cfg.assoc_log2 <= active_cfg.assoc_log2 + 1'b1;
            PH_DEC:    active_cfg.assoc_log2 <= active_cfg.assoc_log2 - 1'b1;
            PH_GROW:   active_cfg.size_log2  <= active_cfg.size_log2 + 1'b1;
            PH_WGROW: begin
              active_cfg.size_log2  <= active_cfg.size_log2 + 1'b1;
              active_cfg.assoc_log2 <= active_cfg.assoc_log2 + 1'b1;
            end
            PH_WSHRINK: begin
              active_cfg.size_log2  <= active_cfg.size_log2 - 1'b1;
              active_cfg.assoc_log2 <= active_cfg.assoc_log2 - 1'b1;
            end
            default:   active_cfg.size_log2  <= active_cfg.size_log2 - 1'b1;
          endcase
          st <= R_FIN2;
        end
        R_FIN2: begin
          if (ph == PH_CLR) active_cfg.repl <= tgt.repl;
          if (done) begin
            active_cfg <= tgt;
            st         <= R_IDLE;
          end else begin
            st <= R_SETUP1;
          end
        end
        default: st <= R_IDLE;
      endcase
    end
  end

  // the memory port is only used for write-backs and is held until acked
  a_mem_hold: assert property (@(posedge clk) disable iff (rst)
    (mem_req && !mem_ack) |=> mem_req)
    else $error("write-back request dropped before acknowledge");

endmodule
