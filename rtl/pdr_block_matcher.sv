// pdr_block_matcher: matches one packet against a block of PDRs fetched by
// a single RDMA read, in priority order.
//
// A UE's PDRs are stored highest priority first and split into blocks small
// enough for the switch's packet header vector (five 28-byte PDRs). This
// unit checks all PDRs of a block in parallel and picks the first that
// matches; the slow table handler fetches the next block when none does.
// A PDR matches when it is valid and every filter holds:
//   - remote IP within remote_ip/remote_plen (plen 0 matches any address),
//   - remote and UE ports within their ranges,
//   - protocol equal, unless proto_any,
//   - for uplink packets, QFI equal unless qfi_any.
// The remote side is the destination of an uplink packet and the source of a
// downlink packet. The block structure and sizes follow the design; the
// filter fields are this design's choice of PDR contents.
// Combinational, no latency.
module pdr_block_matcher
  import xp_pkg::*;
(
  input  pkt_t       pkt,
  input  pdr_block_t pdrs,
  output logic       hit,
  output logic [2:0] idx,
  output rule_t      rule
);
  logic [31:0] r_ip;
  logic [15:0] r_port, l_port;
  logic [PDRS_PER_BLOCK-1:0] m;

  // a PDR occupies PDR_BYTES bytes of the block fetched from DRAM
  if ($bits(pdr_t) != PDR_BYTES * 8) begin : g_size_check
    $error("pdr_t must be %0d bytes", PDR_BYTES);
  end

  function automatic logic [31:0] prefix_mask(input logic [5:0] plen);
    if (plen == 6'd0)       return 32'h0;
    else if (plen >= 6'd32) return 32'hFFFF_FFFF;
    else                    return ~(32'hFFFF_FFFF >> plen);
  endfunction

  always_comb begin
    if (pkt.dir == DIR_UL) begin
      r_ip   = pkt.tuple.dst_ip;
      r_port = pkt.tuple.dst_port;
      l_port = pkt.tuple.src_port;
    end else begin
      r_ip   = pkt.tuple.src_ip;
      r_port = pkt.tuple.src_port;
      l_port = pkt.tuple.dst_port;
    end

    for (int i = 0; i < PDRS_PER_BLOCK; i++) begin
      m[i] = pdrs[i].valid
          && ((r_ip & prefix_mask(pdrs[i].remote_plen)) ==
              (pdrs[i].remote_ip & prefix_mask(pdrs[i].remote_plen)))
          && r_port >= pdrs[i].rport_lo && r_port <= pdrs[i].rport_hi
          && l_port >= pdrs[i].lport_lo && l_port <= pdrs[i].lport_hi
          && (pdrs[i].proto_any || pdrs[i].proto == pkt.tuple.proto)
          && (pkt.dir == DIR_DL || pdrs[i].qfi_any || pdrs[i].qfi == pkt.qfi);
    end

    hit  = 1'b0;
    idx  = '0;
    rule = '0;
    for (int i = PDRS_PER_BLOCK - 1; i >= 0; i--) begin
      if (m[i]) begin
        hit  = 1'b1;
        idx  = 3'(i);
        rule = pdrs[i].rule;
      end
    end
  end
endmodule
