// ddr_mem_model -- behavioural model of the DDR controller and SDRAM.
//
// Stands in for the vendor DDR controller and the memory chips behind the
// cache's line-wide memory port. A request (mem_req with address, byte
// enables and data) is acknowledged LAT+1 cycles after the cycle it is first
// seen in, so a request occupies the port for LAT+2 cycles. Memory never
// written reads as init_word(address), a pattern the testbenches also use
// to compute expected values. Counts reads and writes for the testbench.
module ddr_mem_model
  import rca_pkg::*;
#(
  parameter int unsigned LAT = 7
) (
  input  logic       clk,
  input  logic       mem_req,
  input  logic       mem_we,
  input  line_addr_t mem_addr,
  input  be_t        mem_be,
  input  data_t      mem_wdata,
  output logic       mem_ack,
  output data_t      mem_rdata
);
  data_t mem [line_addr_t];
  int unsigned cnt = 0;
  int unsigned n_reads = 0, n_writes = 0;

  initial begin
    mem_ack   = 1'b0;
    mem_rdata = '0;
  end

  function automatic data_t init_word(line_addr_t a);
    return {3'b101, a, ~a[28:0], 3'b011} ^ 64'h0123_4567_89AB_CDEF;
  endfunction

  function automatic data_t peek(line_addr_t a);
    return mem.exists(a) ? mem[a] : init_word(a);
  endfunction

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (cnt >= LAT) begin
        data_t w;
        cnt = 0;
        w = peek(mem_addr);
        if (mem_we) begin
          for (int i = 0; i < BE_W; i++) if (mem_be[i]) w[8*i +: 8] = mem_wdata[8*i +: 8];
          mem[mem_addr] = w;
          n_writes++;
        end else begin
          n_reads++;
        end
        mem_rdata <= w;
        mem_ack   <= 1'b1;
      end else begin
        cnt++;
      end
    end
  end
endmodule
