// cache_controller -- request state machine of the reconfigurable cache.
//
// Serves the processor's read and write requests from three block RAMs
// (line data, per-line control word, per-set replacement word) and a
// line-wide main-memory port, under the run-time configuration `cfg`
// (associativity, replacement strategy, write-back or write-through,
// write-allocate or not). It also decides when the reconfiguration unit
// may run: only from the idle state with no request waiting, so every
// memory write of the cache has finished by then, as the paper requires.
//
// Organisation: 2**cfg.size_log2 lines in use (at most NUM_LINES) of one
// 64-bit word each. With 2**k ways there are 2**(size_log2-k) sets; set s holds physical lines s*2**k ..
// s*2**k + 2**k-1, so the set index is the low bits of the line address.
// The ways of a set are searched one after another, one way per cycle,
// which is the paper's non-parallel way implementation: a lookup takes
// 1 + (ways searched) cycles, so higher associativity costs time.
//
// Policies (this design's reading where the paper is brief):
//  * read hit: all requested bytes valid in the matching line;
//  * read with matching line but a requested byte not valid: miss, the
//    word is fetched and merged under the bytes the cache already holds;
//  * read miss: victim is the first invalid way, else the replacement
//    logic's choice; a modified victim is written back first, then the
//    word is fetched;
//  * write hit: bytes merged, "Modified" set under write-back; under
//    write-through the bytes also go to memory. The Modified bit is always
//    honoured on eviction, so dirty lines survive a change of write policy;
//  * write miss, write-allocate: a line is allocated without fetching and
//    only the written bytes are marked valid;
//  * write miss, no-write-allocate: the write goes to memory only.
//
// Interfaces:
//  request  req_valid/req_we/req_addr/req_be/req_wdata are held until
//           req_ack (one cycle); read data is on rsp_rdata with req_ack.
//  memory   mem_req/mem_we/mem_addr(line)/mem_be/mem_wdata held until
//           mem_ack (one cycle); read data on mem_rdata with mem_ack.
//  reconfig values_received (pulse) asks for a reconfiguration; the
//           controller answers with reconf_en (pulse) and reconf_active
//           (BRAM and memory ports belong to the reconfiguration unit)
//           until reconf_done, then pulses cc_done.
//  monitor  one event per completed request, valid with req_ack.
module cache_controller
  import rca_pkg::*;
#(
  parameter int unsigned NUM_LINES = 4096,
  localparam int unsigned LAW = $clog2(NUM_LINES)
) (
  input  logic              clk,
  input  logic              rst,
  input  cfg_t              cfg,
  // processor side (PLB IPIF)
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  be_t               req_be,
  input  data_t             req_wdata,
  output logic              req_ack,
  output data_t             rsp_rdata,
  // reconfiguration handshake
  input  logic              values_received,
  output logic              reconf_en,
  output logic              reconf_active,
  input  logic              reconf_done,
  output logic              cc_done,
  // control BRAM
  output logic              ctrl_en,
  output logic              ctrl_we,
  output logic [LAW-1:0]    ctrl_addr,
  output ctrl_t             ctrl_wdata,
  input  ctrl_t             ctrl_rdata,
  // cache data BRAM
  output logic              data_en,
  output logic              data_we,
  output logic [LAW-1:0]    data_addr,
  output data_t             data_wdata,
  input  data_t             data_rdata,
  // replacement BRAM
  output logic              repl_en,
  output logic              repl_we,
  output logic [LAW-1:0]    repl_addr,
  output repl_word_t        repl_wdata,
  input  repl_word_t        repl_rdata,
  // main memory (DDR controller)
  output logic              mem_req,
  output logic              mem_we,
  output line_addr_t        mem_addr,
  output be_t               mem_be,
  output data_t             mem_wdata,
  input  logic              mem_ack,
  input  data_t             mem_rdata,
  // monitor events
  output logic              ev_valid,
  output way_t              ev_way,
  output logic              ev_write,
  output logic              ev_hit,
  output logic [3:0]        ev_byte,
  output logic [29:0]       ev_addr
);

  typedef enum logic [3:0] {
    S_IDLE, S_RECONF, S_LOOKUP, S_CHECK, S_HIT_WR, S_MEMW,
    S_VIC_RD, S_VIC_CHK, S_WB, S_FILL, S_FILL_WR, S_ALLOC_WR
  } state_e;

  state_e state;

  // latched request
  logic       r_we;
  line_addr_t r_la;
  be_t        r_be;
  data_t      r_wdata;
  logic       r_hit;      // outcome reported to the monitor
  logic       r_merge;    // fill merges into a partially valid line
  way_t       probe;      // way under lookup
  way_t       lway;       // way of the line being hit, filled or allocated
  logic       inv_found;
  way_t       inv_way;
  ctrl_t      l_ctrl;     // control word of the matching line / victim
  data_t      l_data;     // its data
  data_t      f_data;     // word fetched from memory
  logic       reconf_pending;

  // geometry under the current associativity
  logic [LAW-1:0] set_idx, base;
  way_t           way_last;
  always_comb begin
    set_idx  = LAW'(r_la) & LAW'((1 << (cfg.size_log2 - SIZE_W'(cfg.assoc_log2))) - 1);
    base     = set_idx << cfg.assoc_log2;
    way_last = way_t'((1 << cfg.assoc_log2) - 1);
  end

  // lookup result for the way whose control word is on ctrl_rdata
  logic line_valid, tag_hit, bytes_ok, last_probe;
  always_comb begin
    line_valid = |ctrl_rdata.bvalid;
    tag_hit    = line_valid && (ctrl_rdata.laddr == r_la);
    bytes_ok   = (r_be & ~ctrl_rdata.bvalid) == '0;
    last_probe = (probe == way_last);
  end

  // replacement logic
  way_t       victim;
  repl_word_t repl_next;
  way_t       acc_way;
  logic       acc_fill;
  logic       fill_pulse;

  cc_replacement u_repl (
    .clk       (clk),
    .rst       (rst),
    .strategy  (cfg.repl),
    .assoc_log2(cfg.assoc_log2),
    .state_in  (repl_rdata),
    .victim    (victim),
    .acc_way   (acc_way),
    .acc_fill  (acc_fill),
    .state_out (repl_next),
    .fill_pulse(fill_pulse)
  );

  function automatic data_t merge_bytes(data_t keep, data_t upd, be_t sel);
    data_t r = keep;
    for (int i = 0; i < BE_W; i++) if (sel[i]) r[8*i +: 8] = upd[8*i +: 8];
    return r;
  endfunction

  logic [3:0] first_byte;
  always_comb begin
    first_byte = '0;
    for (int i = BE_W - 1; i >= 0; i--) if (r_be[i]) first_byte = 4'(i);
  end

  // ------------------------------------------------------------------
  // outputs of the current state
  // ------------------------------------------------------------------
  always_comb begin
    ctrl_en = 1'b0; ctrl_we = 1'b0; ctrl_addr = base | LAW'(probe); ctrl_wdata = '0;
    data_en = 1'b0; data_we = 1'b0; data_addr = base | LAW'(probe); data_wdata = '0;
    repl_en = 1'b0; repl_we = 1'b0; repl_addr = set_idx; repl_wdata = repl_next;
    mem_req = 1'b0; mem_we = 1'b0; mem_addr = r_la; mem_be = r_be; mem_wdata = r_wdata;
    req_ack = 1'b0; rsp_rdata = data_rdata;
    acc_way = lway; acc_fill = 1'b0; fill_pulse = 1'b0;
    reconf_en = 1'b0; reconf_active = 1'b0;
    ev_way = lway;
    unique case (state)
      S_IDLE: reconf_en = reconf_pending && !req_valid;
      S_RECONF: reconf_active = 1'b1;
      S_LOOKUP: begin
        ctrl_en = 1'b1; data_en = 1'b1; repl_en = 1'b1;
      end
      S_CHECK: begin
        ev_way = probe;
        if (tag_hit && !r_we && bytes_ok) begin
          // read hit: answer now, record the access
          req_ack = 1'b1;
          repl_en = 1'b1; repl_we = 1'b1; acc_way = probe;
        end else if (!tag_hit && !last_probe) begin
          ctrl_en = 1'b1; data_en = 1'b1;
          ctrl_addr = base | LAW'(probe + 1'b1);
          data_addr = base | LAW'(probe + 1'b1);
        end
      end
      S_HIT_WR: begin
        ctrl_en = 1'b1; ctrl_we = 1'b1; ctrl_addr = base | LAW'(lway);
        ctrl_wdata = '{bvalid: l_ctrl.bvalid | r_be,
                       modified: l_ctrl.modified | cfg.write_back, laddr: r_la};
        data_en = 1'b1; data_we = 1'b1; data_addr = base | LAW'(lway);
        data_wdata = merge_bytes(l_data, r_wdata, r_be);
        repl_en = 1'b1; repl_we = 1'b1;
        req_ack = cfg.write_back;
      end
      S_MEMW: begin
        mem_req = 1'b1; mem_we = 1'b1;
        req_ack = mem_ack;
      end
      S_VIC_RD: begin
        ctrl_en = 1'b1; data_en = 1'b1;
        ctrl_addr = base | LAW'(lway); data_addr = base | LAW'(lway);
      end
      S_WB: begin
        mem_req = 1'b1; mem_we = 1'b1; mem_addr = l_ctrl.laddr;
        mem_be = l_ctrl.bvalid; mem_wdata = l_data;
      end
      S_FILL: begin
        mem_req = 1'b1; mem_we = 1'b0; mem_be = '1;
      end
      S_FILL_WR: begin
        ctrl_en = 1'b1; ctrl_we = 1'b1; ctrl_addr = base | LAW'(lway);
        ctrl_wdata = '{bvalid: '1, modified: r_merge && l_ctrl.modified, laddr: r_la};
        data_en = 1'b1; data_we = 1'b1; data_addr = base | LAW'(lway);
        data_wdata = r_merge ? merge_bytes(f_data, l_data, l_ctrl.bvalid) : f_data;
        repl_en = 1'b1; repl_we = 1'b1; acc_fill = !r_merge; fill_pulse = !r_merge;
        req_ack = 1'b1; rsp_rdata = data_wdata;
      end
      S_ALLOC_WR: begin
        ctrl_en = 1'b1; ctrl_we = 1'b1; ctrl_addr = base | LAW'(lway);
        ctrl_wdata = '{bvalid: r_be, modified: cfg.write_back, laddr: r_la};
        data_en = 1'b1; data_we = 1'b1; data_addr = base | LAW'(lway);
        data_wdata = merge_bytes('0, r_wdata, r_be);
        repl_en = 1'b1; repl_we = 1'b1; acc_fill = 1'b1; fill_pulse = 1'b1;
        req_ack = cfg.write_back;
      end
      default: ;
    endcase
  end

  // monitor event: one per completed request
  always_comb begin
    ev_valid = req_ack;
    ev_write = r_we;
    ev_hit   = (state == S_CHECK) ? 1'b1 : r_hit;
    ev_byte  = first_byte;
    ev_addr  = {r_la, first_byte[2]};
  end

  // ------------------------------------------------------------------
  // state register
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      reconf_pending <= 1'b0;
      cc_done        <= 1'b0;
      r_we <= 1'b0; r_la <= '0; r_be <= '0; r_wdata <= '0;
      r_hit <= 1'b0; r_merge <= 1'b0; probe <= '0; lway <= '0;
      inv_found <= 1'b0; inv_way <= '0; l_ctrl <= '0; l_data <= '0; f_data <= '0;
    end else begin
      cc_done <= 1'b0;
      if (values_received) reconf_pending <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (reconf_en) begin
            reconf_pending <= 1'b0;
            state          <= S_RECONF;
          end else if (req_valid) begin
            r_we      <= req_we;
            r_la      <= req_addr[ADDR_W-1:OFFS_W];
            r_be      <= req_be;
            r_wdata   <= req_wdata;
            r_merge   <= 1'b0;
            probe     <= '0;
            inv_found <= 1'b0;
            state     <= S_LOOKUP;
          end
        end
        S_RECONF: begin
          if (reconf_done) begin
            cc_done <= 1'b1;
            state   <= S_IDLE;
          end
        end
        S_LOOKUP: state <= S_CHECK;
        S_CHECK: begin
          if (!line_valid && !inv_found) begin
            inv_found <= 1'b1;
            inv_way   <= probe;
          end
          if (tag_hit) begin
            lway   <= probe;
            l_ctrl <= ctrl_rdata;
            l_data <= data_rdata;
            if (r_we) begin
              r_hit <= 1'b1;
              state <= S_HIT_WR;
            end else if (bytes_ok) begin
              state <= S_IDLE;
            end else begin
              // line present but a requested byte is missing
              r_hit   <= 1'b0;
              r_merge <= 1'b1;
              state   <= S_FILL;
            end
          end else if (last_probe) begin
            r_hit <= 1'b0;
            if (r_we && !cfg.write_alloc) begin
              lway  <= '0;
              state <= S_MEMW;
            end else begin
              if (inv_found)       lway <= inv_way;
              else if (!line_valid) lway <= probe;
              else                  lway <= victim;
              state <= S_VIC_RD;
            end
          end else begin
            probe <= probe + 1'b1;
          end
        end
        S_HIT_WR: state <= cfg.write_back ? S_IDLE : S_MEMW;
        S_MEMW:   if (mem_ack) state <= S_IDLE;
        S_VIC_RD: state <= S_VIC_CHK;
        S_VIC_CHK: begin
          l_ctrl <= ctrl_rdata;
          l_data <= data_rdata;
          if ((|ctrl_rdata.bvalid) && ctrl_rdata.modified) state <= S_WB;
          else state <= r_we ? S_ALLOC_WR : S_FILL;
        end
        S_WB:     if (mem_ack) state <= r_we ? S_ALLOC_WR : S_FILL;
        S_FILL: begin
          if (mem_ack) begin
            f_data <= mem_rdata;
            state  <= S_FILL_WR;
          end
        end
        S_FILL_WR:  state <= S_IDLE;
        S_ALLOC_WR: state <= cfg.write_back ? S_IDLE : S_MEMW;
        default:    state <= S_IDLE;
      endcase
    end
  end

  // request rules of the processor-side port
  property p_req_stable;
    @(posedge clk) disable iff (rst)
      (req_valid && !req_ack) |=> (req_valid && $stable(req_addr) && $stable(req_we));
  endproperty
  a_req_stable: assert property (p_req_stable)
    else $error("request changed before it was acknowledged");

  a_no_ack_without_req: assert property (@(posedge clk) disable iff (rst)
    req_ack |-> req_valid)
    else $error("acknowledge without a request");

endmodule
