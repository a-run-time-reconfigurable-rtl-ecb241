// monitor -- monitor output register of the cache.
//
// Turns every completed cache access into one record and places it in the
// monitor output register, giving a continuous stream that a monitoring
// handler can store (for example in a BlockRAM area of its own). Each
// record holds, as the paper lists them, the way of the line within its
// set, the transfer mode (read or write), hit or miss, four bits locating
// the accessed byte in the line, and a valid bit. In the second mode 30
// address bits (31:2) are added; in the first they read as zero. Mode 0
// stops the stream.
//
// Interface and timing: an event (ev_valid high for one cycle) appears in
// the register mon_rec after the next clock edge, with mon_rec.valid high
// for exactly one cycle; `mon_count` counts the records issued. The bit
// layout of the record (address 40:11, way 10:7, write 6, hit 5, byte 4:1,
// valid 0) is this design's choice.
module monitor
  import rca_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  mon_mode_e   mode,
  input  logic        ev_valid,
  input  way_t        ev_way,
  input  logic        ev_write,
  input  logic        ev_hit,
  input  logic [3:0]  ev_byte,
  input  logic [29:0] ev_addr,
  output mon_rec_t    mon_rec,
  output logic [31:0] mon_count
);

  always_ff @(posedge clk) begin
    if (rst) begin
      mon_rec   <= '0;
      mon_count <= '0;
    end else if (ev_valid && mode != MON_OFF) begin
      mon_rec.addr     <= (mode == MON_ADDR) ? ev_addr : '0;
      mon_rec.way      <= ev_way;
      mon_rec.write    <= ev_write;
      mon_rec.hit      <= ev_hit;
      mon_rec.byte_sel <= ev_byte;
      mon_rec.valid    <= 1'b1;
      mon_count        <= mon_count + 1'b1;
    end else begin
      mon_rec.valid <= 1'b0;
    end
  end

endmodule
