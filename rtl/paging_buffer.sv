// paging_buffer: in-order packet buffer for disconnected UEs, spread over the
// switch, the RDMA queue pair and a ring of packet slots in DRAM, with the
// buffer packets read loop that empties it on reconnection.
//
// Each UE owns a ring of 2**SLOT_AW slots in DRAM and a pointer pair in DRAM:
// p_in (tail, next slot to fill) and p_out (head, next slot to release).
// Storing and releasing both read the pointers, so they are kept consistent
// with a local state table keyed by UE, exactly like flow counters: the first
// pointer read of a busy period loads them, later ones use the local copy,
// and they are written back once when no pointer access is left in flight.
//
// Enqueue (a downlink packet for a UE whose buffering bit is set): the packet
// rides in a pointer read; on its response it is written to slot p_in
// together with the address of the following slot, and p_in advances. A
// full ring drops the packet. If the buffering bit was cleared in between,
// the ring is empty and the packet leaves directly instead.
//
// Release (control plane notification that the UE is back): a pointer read
// is sent; its response starts the read loop at p_out. Every buffered packet
// that comes back is sent to the UE and carries the address of its successor,
// from which the next read is built, so the loop runs on its own responses
// without any ingress traffic. The loop keeps the pointer entry in flight
// while it runs, so enqueues in the meantime see the live p_in and packets
// that arrive during the release queue behind the buffered ones. The loop
// ends when the successor equals p_in (ring empty: the buffering bit is
// cleared, new packets bypass the ring again) or when the UE went idle again.
// A draining flag in the local pointer copy marks a running loop, so a
// repeated reconnection notification during the drain starts no second loop;
// the flag is cleared when the loop ends, before the pointers are written
// back. The flag is this design's addition.
//
// One operation per cycle; outputs are combinational, state changes at the
// next clock edge. The ring-per-UE layout, ring size and full-ring drop are
// this design's choices; the pointer pair, their LST management, the stored
// next-address and the self-triggered read loop follow the UPF design.
module paging_buffer
  import xp_pkg::*;
#(
  parameter int SLOT_AW = 8,           // 256 slots per UE, 255 packets
  parameter int PTR_AW  = 8            // pointer LST entries
) (
  input  logic        clk,
  input  logic        rst_n,

  input  logic        enq_valid,       // buffer pkt for UE ue
  input  logic        rel_valid,       // start releasing UE ue
  input  logic        ptr_rsp_valid,   // OP_PTR_READ response
  input  logic        buf_rsp_valid,   // OP_BUF_READ response
  input  logic        ack_valid,       // OP_PTR_WB response
  input  logic [31:0] ue,
  input  pkt_t        pkt,
  input  meta_t       meta,
  input  ptr_t        rsp_ptr,
  input  logic [31:0] rsp_next,
  input  logic        ue_idle,
  input  logic        ue_buffering,

  output logic        accept,          // enq/rel may go ahead (no pointer-table collision)
  output logic        req_valid,
  output rdma_req_t   req,
  output logic        eg_valid,
  output egress_t     eg,
  output logic        full_drop,
  output logic        clr_buf,
  output logic        stored,          // a packet is written to the ring
  output logic        wb_valid,
  output rdma_req_t   wb_req
);
  localparam int SLOTS = 1 << SLOT_AW;

  logic   lst_rsp_hit, lst_loaded, rsp_dec, upd_en;
  ptr_t   cur, upd, wb_state;
  logic [31:0] wb_key;
  logic [PTR_AW:0] occ;

  local_state_table #(.KEY_W(32), .STATE_W($bits(ptr_t)), .AW(PTR_AW)) u_lst (
    .clk, .rst_n,
    .req_valid (enq_valid || rel_valid),
    .req_key   (ue),
    .req_ok    (accept),
    .rsp_valid (ptr_rsp_valid || buf_rsp_valid),
    .rsp_key   (ue),
    .rsp_state (rsp_ptr),
    .rsp_dec   (rsp_dec),
    .rsp_hit   (lst_rsp_hit),
    .cur_state (cur),
    .cur_loaded(lst_loaded),
    .upd_en    (upd_en),
    .upd_state (upd),
    .ack_valid (ack_valid),
    .ack_key   (ue),
    .wb_valid  (wb_valid),
    .wb_key    (wb_key),
    .wb_state  (wb_state),
    .occupancy (occ)
  );

  function automatic logic [31:0] slot_inc(input logic [31:0] p);
    return 32'((p + 32'd1) & 32'(SLOTS - 1));
  endfunction

  function automatic logic [31:0] slot_addr(input logic [31:0] u, input logic [31:0] p);
    return (u << SLOT_AW) | (p & 32'(SLOTS - 1));
  endfunction

  always_comb begin
    req       = '0;
    req_valid = 1'b0;
    eg        = '0;
    eg_valid  = 1'b0;
    full_drop = 1'b0;
    clr_buf   = 1'b0;
    stored    = 1'b0;
    rsp_dec   = 1'b1;
    upd_en    = 1'b0;
    upd       = cur;

    req.pkt  = pkt;
    req.meta = meta;
    req.meta.buf_idx = ue;

    if ((enq_valid || rel_valid) && accept) begin
      req_valid     = 1'b1;
      req.op        = OP_PTR_READ;
      req.addr      = ue;
      req.meta.rel  = rel_valid;
      if (rel_valid) req.pkt = '0;
    end else if (ptr_rsp_valid && !meta.rel) begin
      upd_en = 1'b1;
      if (!ue_buffering) begin
        eg_valid = 1'b1;
        eg.pkt   = pkt;
        eg.rule  = meta.rule;
      end else if (slot_inc(cur.p_in) == (cur.p_out & 32'(SLOTS - 1))) begin
        full_drop = 1'b1;
      end else begin
        req_valid = 1'b1;
        stored    = 1'b1;
        req.op    = OP_BUF_WRITE;
        req.addr  = slot_addr(ue, cur.p_in);
        req.next  = slot_inc(cur.p_in);
        upd.p_in  = slot_inc(cur.p_in);
      end
    end else if (ptr_rsp_valid && meta.rel) begin
      upd_en = 1'b1;
      if (cur.draining) begin
        // repeated notification: the running loop already drains the ring
      end else if (cur.p_out == cur.p_in || ue_idle) begin
        clr_buf = !ue_idle;
      end else begin
        rsp_dec      = 1'b0;             // the loop keeps the entry in flight
        upd.draining = 1'b1;
        req_valid    = 1'b1;
        req.op       = OP_BUF_READ;
        req.addr     = slot_addr(ue, cur.p_out);
        req.pkt      = '0;
        req.meta.rel = 1'b1;
      end
    end else if (buf_rsp_valid) begin
      upd_en    = 1'b1;
      upd.p_out = rsp_next;
      eg_valid       = 1'b1;
      eg.pkt         = pkt;
      eg.rule        = meta.rule;
      eg.from_buffer = 1'b1;
      if (rsp_next == cur.p_in || ue_idle) begin
        clr_buf      = !ue_idle;
        upd.draining = 1'b0;
      end else begin
        rsp_dec      = 1'b0;
        req_valid    = 1'b1;
        req.op       = OP_BUF_READ;
        req.addr     = slot_addr(ue, rsp_next);
        req.pkt      = '0;
        req.meta.rel = 1'b1;
      end
    end

    wb_req      = '0;
    wb_req.op   = OP_PTR_WB;
    wb_req.addr = wb_key;
    wb_req.ptr  = wb_state;
    wb_req.meta.buf_idx = wb_key;
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({enq_valid, rel_valid, ptr_rsp_valid, buf_rsp_valid, ack_valid}));
  a_loop_loaded: assert property (@(posedge clk) disable iff (!rst_n)
    buf_rsp_valid |-> lst_loaded);
endmodule
