// dcr_ctrl -- device-control-register interface of the cache.
//
// The processor reconfigures the cache through a small register file on
// the DCR bus: one control/status register and seven configuration
// registers, one per configurable value. It writes the new values, then
// writes the "Done" command into the control/status register; the block
// then reports "values received" to the cache controller, shows "busy",
// and shows "finished" once the controller signals that the
// reconfiguration has ended.
//
// Register map (offset from BASE_ADDR; the paper gives the register count,
// the map and the encodings are this design's):
//   0 CSR            write: bit0 = 1 "Done" (start reconfiguration)
//                    read : bit0 busy, bit1 finished
//   1 cache size     log2(number of lines in use), up to log2(NUM_LINES)
//   2 line size      read only: log2(bytes per line) = 3
//   3 associativity  log2(ways), 0..4
//   4 replacement    0 random, 1 pseudo-random, 2 FIFO, 3 pLRU, 4 LRU
//   5 write policy   1 write-back, 0 write-through
//   6 write alloc    1 write-allocate, 0 no-write-allocate
//   7 monitor mode   0 off, 1 line record, 2 record with address
// The line size is fixed by the 64-bit bus; it is kept as a register so
// that software can read the geometry. Values are stored as written; the
// reconfiguration unit lowers those the hardware cannot take.
//
// DCR timing: the master holds dcr_read or dcr_write with the address
// (and write data) until dcr_ack; this slave acknowledges in the cycle
// after it sees the request, and returns read data with the acknowledge.
// When not addressed it passes dcr_dbus_in through to dcr_dbus_out, as DCR
// slaves on a daisy chain do. A "Done" write while busy is ignored.
module dcr_ctrl
  import rca_pkg::*;
#(
  parameter logic [9:0]  BASE_ADDR = 10'h080,
  parameter int unsigned NUM_LINES = 4096,
  parameter cfg_t        RESET_CFG = '{size_log2: '0, assoc_log2: '0, repl: REPL_RANDOM,
                                       write_back: 1'b1, write_alloc: 1'b1,
                                       mon_mode: MON_OFF}
) (
  input  logic        clk,
  input  logic        rst,
  // DCR bus
  input  logic [9:0]  dcr_abus,
  input  logic [31:0] dcr_dbus_in,
  input  logic        dcr_read,
  input  logic        dcr_write,
  output logic        dcr_ack,
  output logic [31:0] dcr_dbus_out,
  // towards the cache
  output cfg_t        req_cfg,
  output logic        values_received,
  input  logic        cc_done
);

  logic        sel;
  logic [2:0]  offs;
  logic        busy, finished;
  logic [31:0] rd_q;

  assign sel  = (dcr_abus[9:3] == BASE_ADDR[9:3]) && (dcr_read || dcr_write);
  assign offs = dcr_abus[2:0];

  function automatic logic [31:0] reg_value(logic [2:0] o);
    unique case (o)
      3'd0: return {30'd0, finished, busy};
      3'd1: return 32'(req_cfg.size_log2);
      3'd2: return 32'(OFFS_W);
      3'd3: return 32'(req_cfg.assoc_log2);
      3'd4: return 32'(req_cfg.repl);
      3'd5: return 32'(req_cfg.write_back);
      3'd6: return 32'(req_cfg.write_alloc);
      default: return 32'(req_cfg.mon_mode);
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      dcr_ack         <= 1'b0;
      rd_q            <= '0;
      req_cfg         <= RESET_CFG;
      req_cfg.size_log2 <= SIZE_W'($clog2(NUM_LINES));
      busy            <= 1'b0;
      finished        <= 1'b0;
      values_received <= 1'b0;
    end else begin
      values_received <= 1'b0;
      dcr_ack         <= sel && !dcr_ack;
      if (sel && !dcr_ack) begin
        if (dcr_read) rd_q <= reg_value(offs);
        if (dcr_write) begin
          unique case (offs)
            3'd0: if (dcr_dbus_in[0] && !busy) begin
              busy            <= 1'b1;
              finished        <= 1'b0;
              values_received <= 1'b1;
            end
            3'd1: req_cfg.size_log2   <= dcr_dbus_in[SIZE_W-1:0];
            3'd3: req_cfg.assoc_log2  <= dcr_dbus_in[ALOG_W-1:0];
            3'd4: req_cfg.repl        <= repl_e'(dcr_dbus_in[2:0]);
            3'd5: req_cfg.write_back  <= dcr_dbus_in[0];
            3'd6: req_cfg.write_alloc <= dcr_dbus_in[0];
            3'd7: req_cfg.mon_mode    <= mon_mode_e'(dcr_dbus_in[1:0]);
            default: ;  // read-only registers
          endcase
        end
      end
      if (cc_done) begin
        busy     <= 1'b0;
        finished <= 1'b1;
      end
    end
  end

  assign dcr_dbus_out = (dcr_ack && dcr_read && dcr_abus[9:3] == BASE_ADDR[9:3]) ? rd_q
                                                                                 : dcr_dbus_in;

endmodule
