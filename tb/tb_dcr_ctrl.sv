// tb_dcr_ctrl -- self-checking test of the DCR register interface.
// Checks write/read-back of the five writable configuration registers, the
// read-only geometry registers, the "Done" command and its status bits,
// the one-cycle values_received pulse, that "Done" is ignored while busy,
// that the acknowledge comes one cycle after the request, and the
// daisy-chain pass-through when another address is used.
module tb_dcr_ctrl;
  import rca_pkg::*;
  localparam logic [9:0] BASE = 10'h080;
  logic clk = 0, rst = 1;
  logic [9:0] dcr_abus = '0;
  logic [31:0] dcr_dbus_in = '0, dcr_dbus_out;
  logic dcr_read = 0, dcr_write = 0, dcr_ack;
  cfg_t req_cfg;
  logic values_received, cc_done = 0;
  int checks = 0, failures = 0, vr_pulses = 0;

  dcr_ctrl #(.BASE_ADDR(BASE), .NUM_LINES(1024)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && values_received) vr_pulses++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  task automatic dcr_wr(logic [9:0] a, logic [31:0] v);
    int n = 0;
    @(negedge clk); dcr_abus = a; dcr_dbus_in = v; dcr_write = 1;
    do begin @(negedge clk); n++; end while (!dcr_ack);
    check("write acknowledge after one cycle", n, 1);
    @(posedge clk); #1 dcr_write = 0;
  endtask
  task automatic dcr_rd(logic [9:0] a, output logic [31:0] v);
    int n = 0;
    @(negedge clk); dcr_abus = a; dcr_read = 1; dcr_dbus_in = 32'hDEAD_BEEF;
    do begin @(negedge clk); n++; end while (!dcr_ack);
    check("read acknowledge after one cycle", n, 1);
    v = dcr_dbus_out;
    @(posedge clk); #1 dcr_read = 0; dcr_dbus_in = '0;
  endtask

  initial begin
    #100us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (3) @(negedge clk); rst = 0;
    dcr_rd(BASE + 0, v); check("CSR after reset", v, 0);
    dcr_rd(BASE + 1, v); check("size register", v, 10);
    dcr_rd(BASE + 2, v); check("line size register", v, 3);
    dcr_rd(BASE + 3, v); check("reset associativity", v, 0);
    dcr_rd(BASE + 5, v); check("reset write-back", v, 1);
    // write and read back
    dcr_wr(BASE + 3, 32'd3); dcr_wr(BASE + 4, 32'd4); dcr_wr(BASE + 5, 32'd0);
    dcr_wr(BASE + 6, 32'd0); dcr_wr(BASE + 7, 32'd2);
    dcr_wr(BASE + 2, 32'd5);   // read-only: ignored
    dcr_wr(BASE + 1, 32'd8);
    dcr_rd(BASE + 3, v); check("assoc readback", v, 3);
    dcr_rd(BASE + 4, v); check("repl readback", v, 4);
    dcr_rd(BASE + 5, v); check("wb readback", v, 0);
    dcr_rd(BASE + 6, v); check("wa readback", v, 0);
    dcr_rd(BASE + 7, v); check("monitor readback", v, 2);
    dcr_rd(BASE + 1, v); check("size readback", v, 8);
    dcr_rd(BASE + 2, v); check("line size stays read-only", v, 3);
    check("req_cfg.size", req_cfg.size_log2, 8);
    check("req_cfg.assoc", req_cfg.assoc_log2, 3);
    check("req_cfg.repl", req_cfg.repl, REPL_LRU);
    check("req_cfg.wb", req_cfg.write_back, 0);
    check("req_cfg.wa", req_cfg.write_alloc, 0);
    check("req_cfg.mon", req_cfg.mon_mode, MON_ADDR);
    check("no values_received yet", vr_pulses, 0);
    // Done command
    dcr_wr(BASE + 0, 32'd1);
    repeat (2) @(negedge clk);
    check("values_received pulsed once", vr_pulses, 1);
    dcr_rd(BASE + 0, v); check("CSR busy", v, 1);
    dcr_wr(BASE + 0, 32'd1);   // while busy: ignored
    repeat (2) @(negedge clk);
    check("Done ignored while busy", vr_pulses, 1);
    @(negedge clk); cc_done = 1; @(negedge clk); cc_done = 0;
    dcr_rd(BASE + 0, v); check("CSR finished", v, 2);
    dcr_wr(BASE + 0, 32'd1);
    dcr_rd(BASE + 0, v); check("CSR busy again, finished cleared", v, 1);
    check("second values_received", vr_pulses, 2);
    // other addresses: no acknowledge, data passed through
    @(negedge clk); dcr_abus = 10'h100; dcr_read = 1; dcr_dbus_in = 32'h1234_5678;
    repeat (3) begin
      @(negedge clk);
      check("no ack for another slave", dcr_ack, 0);
      check("daisy-chain pass-through", dcr_dbus_out, 32'h1234_5678);
    end
    dcr_read = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
