// fast_table_generator: turns the outcome of a slow-path PDR search into a
// flow table rule, generated inside the data plane.
//
// Once a PDR matched, the 5-tuple of the packet, the PDR's action data and
// the UE's buffer index form an exact-match flow table entry, written to
// DRAM at the CRC hash of the 5-tuple with one RDMA write. The entry's state
// field is left alone; the flow's state reaches it through the local state
// table's writeback. Later packets of the flow then hit in the flow table and
// skip the UE table. Combinational, no latency.
module fast_table_generator
  import xp_pkg::*;
#(
  parameter int FT_AW = 26
) (
  input  pkt_t        pkt,
  input  meta_t       meta,
  input  rule_t       rule,            // action of the matched PDR
  output rdma_req_t   req              // OP_FT_INSERT
);
  logic [FT_AW-1:0] h;
  crc_hash #(.IN_W($bits(five_tuple_t)), .OUT_W(FT_AW)) u_hash (.key(pkt.tuple), .hash(h));

  always_comb begin
    req            = '0;
    req.op         = OP_FT_INSERT;
    req.addr       = 32'(h);
    req.pkt        = pkt;
    req.meta       = meta;
    req.meta.rule  = rule;
    req.ft.valid   = 1'b1;
    req.ft.key     = pkt.tuple;
    req.ft.rule    = rule;
    req.ft.buf_idx = meta.buf_idx;
  end
endmodule
