// tb_sp_bram -- self-checking test of the single-port block RAM.
// Writes a pseudo-random pattern, reads it back with one cycle of read
// latency, checks that writes leave the read register alone and that the
// initial contents are zero.
module tb_sp_bram;
  localparam int DEPTH = 256, WIDTH = 40;
  logic clk = 0, en = 0, we = 0;
  logic [7:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  sp_bram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] pat(int i);
    return {i[7:0], 32'(i * 32'h9E37_79B9)};
  endfunction

  task automatic check(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initial contents
    for (int i = 0; i < DEPTH; i += 17) begin
      @(negedge clk); en = 1; we = 0; addr = 8'(i);
      @(negedge clk); en = 0;
      check("initial zero", rdata, '0);
    end
    // write everything
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(i); wdata = pat(i); model[i] = pat(i);
    end
    @(negedge clk); en = 0; we = 0;
    // read back in a scrambled order, one read per cycle
    for (int i = 0; i < DEPTH; i++) begin
      automatic int a;
      a = (i * 37 + 11) % DEPTH;
      @(negedge clk); en = 1; we = 0; addr = 8'(a);
      @(negedge clk); en = 0;
      check("readback", rdata, model[a]);
      // a write must not disturb the read register
      en = 1; we = 1; addr = 8'((a + 1) % DEPTH); wdata = ~pat(a); model[(a+1)%DEPTH] = ~pat(a);
      @(negedge clk); en = 0; we = 0;
      check("hold on write", rdata, model[a]);
    end
    // en low: no change
    @(negedge clk); en = 0; we = 1; addr = 8'd3; wdata = '1;
    @(negedge clk); we = 0; en = 1; addr = 8'd3;
    @(negedge clk); en = 0;
    check("no write when disabled", rdata, model[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
