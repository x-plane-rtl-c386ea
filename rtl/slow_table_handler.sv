// slow_table_handler: the UE table path taken by the first packet of a flow.
//
// Step 1, after a flow table miss: the UE key is formed (uplink: TEID, UE
// source IP and QFI; downlink: UE destination IP) and its CRC hash gives the
// UE table index to read.
// Step 2, on the UE table response: the stored key is checked. A match yields
// the UE's PDR list (first block index, number of blocks) and buffer index,
// and the first PDR block is read. An empty slot means no session (drop); a
// different key is a hash collision (CPU).
// Step 3, on each PDR block response: the block is matched in priority order;
// on a hit the matched rule is returned, otherwise the next block is read
// while blocks remain, and the packet is dropped when none is left.
// Combinational, no latency; one step is evaluated per event. UE_AW sets the
// UE table size (2**UE_AW entries in DRAM).
module slow_table_handler
  import xp_pkg::*;
#(
  parameter int UE_AW = 23
) (
  input  pkt_t        pkt,
  input  meta_t       meta,
  // step 1
  output ue_key_t     ue_key,
  output logic [31:0] ue_addr,
  // step 2
  input  ue_entry_t   ue_rsp,
  output logic        ue_hit,
  output logic        ue_absent,
  output logic        ue_collide,
  output meta_t       ue_meta,         // metadata for the first PDR block read
  // step 3
  input  pdr_block_t  pdr_rsp,
  output logic        pdr_hit,
  output rule_t       pdr_rule,
  output logic        pdr_more,        // read another block
  output logic        pdr_none,        // list exhausted
  output meta_t       pdr_meta,        // metadata for the next block read
  output logic [31:0] ue_pdr_addr,     // first block to read (step 2)
  output logic [31:0] pdr_addr         // next block to read (step 3)
);
  logic [UE_AW-1:0] h;
  logic [2:0]       hit_idx;
  logic             blk_hit;
  rule_t            blk_rule;

  always_comb begin
    ue_key       = '0;
    ue_key.dir   = pkt.dir;
    if (pkt.dir == DIR_UL) begin
      ue_key.teid  = pkt.teid;
      ue_key.ue_ip = pkt.tuple.src_ip;
      ue_key.qfi   = pkt.qfi;
    end else begin
      ue_key.ue_ip = pkt.tuple.dst_ip;
    end
  end

  crc_hash #(.IN_W($bits(ue_key_t)), .OUT_W(UE_AW)) u_hash (.key(ue_key), .hash(h));
  assign ue_addr = 32'(h);

  pdr_block_matcher u_match (.pkt(pkt), .pdrs(pdr_rsp), .hit(blk_hit), .idx(hit_idx), .rule(blk_rule));

  always_comb begin
    ue_hit     = ue_rsp.valid && ue_rsp.key == ue_key && ue_rsp.nblk != '0;
    ue_absent  = !ue_rsp.valid || (ue_rsp.key == ue_key && ue_rsp.nblk == '0);
    ue_collide = ue_rsp.valid && ue_rsp.key != ue_key;
    ue_meta          = meta;
    ue_meta.pdr_base = ue_rsp.pdr_base;
    ue_meta.nblk     = (ue_rsp.nblk > 4'(MAX_PDR_BLOCKS)) ? 4'(MAX_PDR_BLOCKS) : ue_rsp.nblk;
    ue_meta.blk      = '0;
    ue_meta.buf_idx  = ue_rsp.buf_idx;

    pdr_hit  = blk_hit;
    pdr_rule = blk_rule;
    pdr_more = !blk_hit && (meta.blk + 4'd1) < meta.nblk;
    pdr_none = !blk_hit && !pdr_more;
    pdr_meta     = meta;
    pdr_meta.blk = meta.blk + 4'd1;

    ue_pdr_addr = ue_rsp.pdr_base;
    pdr_addr    = meta.pdr_base + 32'(pdr_meta.blk);
  end
endmodule
