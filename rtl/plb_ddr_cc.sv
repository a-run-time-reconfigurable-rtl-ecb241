// plb_ddr_cc -- run-time reconfigurable cache controller (top level).
//
// A cache placed between a processor bus and DDR main memory whose
// number of lines in use, associativity, replacement strategy, write
// policy and write-allocation can be changed while software runs, without
// flushing the whole cache.
// It consists of
//   cache_controller  request state machine with the replacement logic;
//   reconfiguration   the unit that changes the configuration in place;
//   dcr_ctrl          control/status and configuration registers (DCR);
//   monitor           stream of one record per access;
//   three sp_bram     cache data, control words, replacement words,
//                     kept as separate memories as the paper prescribes.
// The processor-bus attachment (PLB IPIF) and the DDR SDRAM controller are
// vendor cores in the paper's system; their cache-side ports are brought
// out here: a request port with one 64-bit beat per request, and a
// line-wide memory port.
//
// While the cache controller serves requests it owns the BRAM and memory
// ports; during a reconfiguration (reconf_active) the reconfiguration
// unit owns them. Sizes: NUM_LINES lines of 8 bytes (default 4096, the
// size of the paper's simulations), up to 2**MAX_ASSOC_LOG2 = 16 ways.
//
// Timing: see cache_controller for requests and reconfiguration for the
// cycle cost of each change; DCR accesses are acknowledged one cycle
// after the request. The reset configuration uses all lines, direct-mapped,
// write-back, write-allocate, random replacement, monitor off.
module plb_ddr_cc
  import rca_pkg::*;
#(
  parameter int unsigned NUM_LINES      = 4096,
  parameter int unsigned MAX_ASSOC_LOG2 = 4,
  parameter repl_e       MAX_REPL       = REPL_LRU,
  parameter logic [9:0]  DCR_BASE       = 10'h080,
  localparam int unsigned LAW = $clog2(NUM_LINES)
) (
  input  logic              clk,
  input  logic              rst,
  // processor side (PLB IPIF)
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [ADDR_W-1:0] req_addr,
  input  be_t               req_be,
  input  data_t             req_wdata,
  output logic              req_ack,
  output data_t             rsp_rdata,
  // DCR bus
  input  logic [9:0]        dcr_abus,
  input  logic [31:0]       dcr_dbus_in,
  input  logic              dcr_read,
  input  logic              dcr_write,
  output logic              dcr_ack,
  output logic [31:0]       dcr_dbus_out,
  // main memory (DDR controller)
  output logic              mem_req,
  output logic              mem_we,
  output line_addr_t        mem_addr,
  output be_t               mem_be,
  output data_t             mem_wdata,
  input  logic              mem_ack,
  input  data_t             mem_rdata,
  // monitor interface and status
  output mon_rec_t          mon_rec,
  output logic [31:0]       mon_count,
  output cfg_t              active_cfg,
  output logic              reconf_busy
);

  localparam cfg_t RESET_CFG = '{size_log2: SIZE_W'(LAW), assoc_log2: '0, repl: REPL_RANDOM,
                                 write_back: 1'b1, write_alloc: 1'b1, mon_mode: MON_OFF};

  // BRAM ports
  logic           ctrl_en, ctrl_we, data_en, data_we, repl_en, repl_we;
  logic [LAW-1:0] ctrl_addr, data_addr, repl_addr;
  ctrl_t          ctrl_wdata, ctrl_rdata;
  data_t          data_wdata, data_rdata;
  repl_word_t     repl_wdata, repl_rdata;

  // cache controller side
  logic           cc_ctrl_en, cc_ctrl_we, cc_data_en, cc_data_we, cc_repl_en, cc_repl_we;
  logic [LAW-1:0] cc_ctrl_addr, cc_data_addr, cc_repl_addr;
  ctrl_t          cc_ctrl_wdata;
  data_t          cc_data_wdata;
  repl_word_t     cc_repl_wdata;
  logic           cc_mem_req, cc_mem_we;
  line_addr_t     cc_mem_addr;
  be_t            cc_mem_be;
  data_t          cc_mem_wdata;

  // reconfiguration side
  logic           rc_ctrl_en, rc_ctrl_we, rc_data_en, rc_data_we, rc_repl_en, rc_repl_we;
  logic [LAW-1:0] rc_ctrl_addr, rc_data_addr, rc_repl_addr;
  ctrl_t          rc_ctrl_wdata;
  data_t          rc_data_wdata;
  repl_word_t     rc_repl_wdata;
  logic           rc_mem_req;
  line_addr_t     rc_mem_addr;
  be_t            rc_mem_be;
  data_t          rc_mem_wdata;

  // handshakes
  cfg_t        req_cfg;
  logic        values_received, reconf_en, reconf_active, reconf_done, cc_done;
  logic        ev_valid, ev_write, ev_hit;
  way_t        ev_way;
  logic [3:0]  ev_byte;
  logic [29:0] ev_addr;

  dcr_ctrl #(
    .BASE_ADDR(DCR_BASE), .NUM_LINES(NUM_LINES), .RESET_CFG(RESET_CFG)
  ) u_dcr (
    .clk, .rst, .dcr_abus, .dcr_dbus_in, .dcr_read, .dcr_write, .dcr_ack, .dcr_dbus_out,
    .req_cfg, .values_received, .cc_done
  );

  cache_controller #(.NUM_LINES(NUM_LINES)) u_cc (
    .clk, .rst, .cfg(active_cfg),
    .req_valid, .req_we, .req_addr, .req_be, .req_wdata, .req_ack, .rsp_rdata,
    .values_received, .reconf_en, .reconf_active, .reconf_done, .cc_done,
    .ctrl_en(cc_ctrl_en), .ctrl_we(cc_ctrl_we), .ctrl_addr(cc_ctrl_addr),
    .ctrl_wdata(cc_ctrl_wdata), .ctrl_rdata,
    .data_en(cc_data_en), .data_we(cc_data_we), .data_addr(cc_data_addr),
    .data_wdata(cc_data_wdata), .data_rdata,
    .repl_en(cc_repl_en), .repl_we(cc_repl_we), .repl_addr(cc_repl_addr),
    .repl_wdata(cc_repl_wdata), .repl_rdata,
    .mem_req(cc_mem_req), .mem_we(cc_mem_we), .mem_addr(cc_mem_addr), .mem_be(cc_mem_be),
    .mem_wdata(cc_mem_wdata), .mem_ack, .mem_rdata,
    .ev_valid, .ev_way, .ev_write, .ev_hit, .ev_byte, .ev_addr
  );

  reconfiguration #(
    .NUM_LINES(NUM_LINES), .MAX_ASSOC_LOG2(MAX_ASSOC_LOG2), .MAX_REPL(MAX_REPL),
    .RESET_CFG(RESET_CFG)
  ) u_reconf (
    .clk, .rst, .en(reconf_en), .new_cfg(req_cfg), .active_cfg, .busy(reconf_busy),
    .done(reconf_done),
    .ctrl_en(rc_ctrl_en), .ctrl_we(rc_ctrl_we), .ctrl_addr(rc_ctrl_addr),
    .ctrl_wdata(rc_ctrl_wdata), .ctrl_rdata,
    .data_en(rc_data_en), .data_we(rc_data_we), .data_addr(rc_data_addr),
    .data_wdata(rc_data_wdata), .data_rdata,
    .repl_en(rc_repl_en), .repl_we(rc_repl_we), .repl_addr(rc_repl_addr),
    .repl_wdata(rc_repl_wdata), .repl_rdata,
    .mem_req(rc_mem_req), .mem_addr(rc_mem_addr), .mem_be(rc_mem_be),
    .mem_wdata(rc_mem_wdata), .mem_ack
  );

  monitor u_mon (
    .clk, .rst, .mode(active_cfg.mon_mode),
    .ev_valid, .ev_way, .ev_write, .ev_hit, .ev_byte, .ev_addr, .mon_rec, .mon_count
  );

  // port ownership: the reconfiguration unit while reconfiguring
  always_comb begin
    if (reconf_active) begin
      ctrl_en = rc_ctrl_en; ctrl_we = rc_ctrl_we; ctrl_addr = rc_ctrl_addr; ctrl_wdata = rc_ctrl_wdata;
      data_en = rc_data_en; data_we = rc_data_we; data_addr = rc_data_addr; data_wdata = rc_data_wdata;
      repl_en = rc_repl_en; repl_we = rc_repl_we; repl_addr = rc_repl_addr; repl_wdata = rc_repl_wdata;
      mem_req = rc_mem_req; mem_we = 1'b1; mem_addr = rc_mem_addr; mem_be = rc_mem_be;
      mem_wdata = rc_mem_wdata;
    end else begin
      ctrl_en = cc_ctrl_en; ctrl_we = cc_ctrl_we; ctrl_addr = cc_ctrl_addr; ctrl_wdata = cc_ctrl_wdata;
      data_en = cc_data_en; data_we = cc_data_we; data_addr = cc_data_addr; data_wdata = cc_data_wdata;
      repl_en = cc_repl_en; repl_we = cc_repl_we; repl_addr = cc_repl_addr; repl_wdata = cc_repl_wdata;
      mem_req = cc_mem_req; mem_we = cc_mem_we; mem_addr = cc_mem_addr; mem_be = cc_mem_be;
      mem_wdata = cc_mem_wdata;
    end
  end

  sp_bram #(.DEPTH(NUM_LINES), .WIDTH(CTRL_W)) u_control_bram (
    .clk, .en(ctrl_en), .we(ctrl_we), .addr(ctrl_addr), .wdata(ctrl_wdata), .rdata(ctrl_rdata)
  );
  sp_bram #(.DEPTH(NUM_LINES), .WIDTH(DATA_W)) u_cache_bram (
    .clk, .en(data_en), .we(data_we), .addr(data_addr), .wdata(data_wdata), .rdata(data_rdata)
  );
  sp_bram #(.DEPTH(NUM_LINES), .WIDTH(REPL_W)) u_replacement_bram (
    .clk, .en(repl_en), .we(repl_we), .addr(repl_addr), .wdata(repl_wdata), .rdata(repl_rdata)
  );

endmodule
