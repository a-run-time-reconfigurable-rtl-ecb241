// tb_monitor -- self-checking test of the monitor output register.
// Random events are applied in all three modes; each record must appear
// one cycle after its event with the right fields, the address field only
// in the second mode, a one-cycle valid bit, and nothing in mode 0.
module tb_monitor;
  import rca_pkg::*;
  logic clk = 0, rst = 1;
  mon_mode_e mode = MON_OFF;
  logic ev_valid = 0, ev_write = 0, ev_hit = 0;
  way_t ev_way = '0;
  logic [3:0] ev_byte = '0;
  logic [29:0] ev_addr = '0;
  mon_rec_t mon_rec;
  logic [31:0] mon_count;
  int checks = 0, failures = 0, expected_count = 0;

  monitor dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0h expected %0h", what, got, exp); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 600; i++) begin
      mon_rec_t exp;
      mode     = mon_mode_e'(i / 200);
      ev_valid = ($urandom_range(3) != 0);
      ev_write = 1'($urandom); ev_hit = 1'($urandom);
      ev_way   = way_t'($urandom); ev_byte = 4'($urandom_range(7)); ev_addr = 30'($urandom);
      exp = '{addr: (mode == MON_ADDR) ? ev_addr : '0, way: ev_way, write: ev_write,
              hit: ev_hit, byte_sel: ev_byte, valid: 1'b1};
      @(negedge clk);
      if (ev_valid && mode != MON_OFF) begin
        expected_count++;
        check("record", mon_rec, exp);
      end else begin
        check("no record", mon_rec.valid, 0);
      end
      ev_valid = 0;
      check("record count", mon_count, expected_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
