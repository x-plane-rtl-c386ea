// fast_table_handler: the exact-match flow table path.
//
// For an arriving packet it forms the flow table read: the entry index is a
// CRC hash of the packet's 5-tuple, and the packet rides in the read request.
// For the read response it compares the stored key with the packet's
// 5-tuple: a hit means the footprint of an earlier packet of the flow gives
// the action; an empty slot is a miss and sends the packet to the slow (UE)
// table; a slot holding another flow is a hash collision, which the design
// hands to the CPU. Combinational, no latency; FT_AW sets the table size
// (2**FT_AW entries in DRAM).
module fast_table_handler
  import xp_pkg::*;
#(
  parameter int FT_AW = 26
) (
  input  pkt_t        in_pkt,          // arriving packet
  output logic [31:0] rd_addr,         // flow table index to read

  input  pkt_t        rsp_pkt,         // packet returned with the response
  input  ft_entry_t   rsp_ft,          // entry read
  output logic        hit,
  output logic        miss,
  output logic        collide
);
  logic [FT_AW-1:0] h;
  crc_hash #(.IN_W($bits(five_tuple_t)), .OUT_W(FT_AW)) u_hash (.key(in_pkt.tuple), .hash(h));
  assign rd_addr = 32'(h);

  always_comb begin
    hit     = rsp_ft.valid && rsp_ft.key == rsp_pkt.tuple;
    miss    = !rsp_ft.valid;
    collide = rsp_ft.valid && rsp_ft.key != rsp_pkt.tuple;
  end
endmodule
