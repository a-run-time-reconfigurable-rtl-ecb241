// sp_bram -- single-port synchronous block RAM.
//
// Models one FPGA BlockRAM chunk of the cache. The cache keeps data,
// control words and replacement information in three physically separate
// chunks of this kind, each with its own port, so that a lookup can read a
// line's control word and its data in the same cycle.
//
// Interface and timing: when `en` is high at a rising clock edge, a write
// (`we` high) stores `wdata` at `addr`, and a read (`we` low) presents the
// word at `addr` on `rdata` after that edge. `rdata` holds its value until
// the next read. The contents start at zero, as the configuration of an
// FPGA leaves them; this initial value is part of this design, the paper
// only states that BlockRAM holds the cache and its housekeeping data.
module sp_bram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 64,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
