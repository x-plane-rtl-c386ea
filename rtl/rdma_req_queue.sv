// rdma_req_queue: ordered queue of RDMA requests from the pipeline to the
// DRAM server's queue pair.
//
// One event of the pipeline can issue up to two requests in the same cycle
// (a writeback or a flow rule insertion, then the packet's own request), so
// the queue takes two pushes per cycle, in0 ahead of in1, and sends one per
// cycle on a valid/ready link. RDMA keeps requests of a queue pair in order,
// and the consistency of the local state tables relies on it: a writeback
// always reaches DRAM before any read issued after it. space2 tells the
// pipeline there is room for two more, which it checks before taking an
// event. Memory written as an array; DEPTH must be a power of two.
module rdma_req_queue
  import xp_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in0_valid,
  input  rdma_req_t in0,
  input  logic      in1_valid,
  input  rdma_req_t in1,
  output logic      space2,
  output logic      out_valid,
  output rdma_req_t out,
  input  logic      out_ready
);
  localparam int AW = $clog2(DEPTH);

  rdma_req_t     mem [DEPTH];
  logic [AW:0]   count;
  logic [AW-1:0] rd, wr;
  logic          pop;
  logic [1:0]    npush;

  assign out_valid = count != '0;
  assign out       = mem[rd];
  assign pop       = out_valid && out_ready;
  assign space2    = count <= (AW+1)'(DEPTH - 2);
  assign npush     = 2'(in0_valid) + 2'(in1_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      rd    <= '0;
      wr    <= '0;
    end else begin
      if (in0_valid && in1_valid) begin
        mem[wr]        <= in0;
        mem[wr + 1'b1] <= in1;
      end else if (in0_valid) begin
        mem[wr] <= in0;
      end else if (in1_valid) begin
        mem[wr] <= in1;
      end
      wr    <= wr + AW'(npush);
      rd    <= rd + AW'(pop);
      count <= count + (AW+1)'(npush) - (AW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (count + (AW+1)'(npush) - (AW+1)'(pop)) <= (AW+1)'(DEPTH));
endmodule
