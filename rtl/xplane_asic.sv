// xplane_asic: data plane of a 5G User Plane Function built from a switch
// pipeline and tables held in external DRAM reached over RDMA.
//
// The switch keeps no packet while waiting for DRAM: every lookup is one RDMA
// request that carries the packet and its metadata, and the response brings
// both back together with the entry read. The pipeline is therefore driven by
// events, one per cycle: an RDMA response (first, so responses never back up),
// a control-plane notification, or an ingress packet. Each event is handled
// completely in its cycle and issues at most two RDMA requests, an egress
// packet or a CPU redirect.
//
// Packet walk:
//   ingress      -> local state table (LST) request, flow table read
//   flow table   hit: count and meter (state data handler, on the LST's local
//                copy when the flow is busy), then forward, drop, or queue
//                behind a paging buffer; miss: count, then UE table read;
//                collision: CPU
//   UE table     hit: read the UE's first PDR block; no session: drop;
//                collision: CPU
//   PDR block    match: write the flow table rule (fast table generator) and
//                forward / queue; no match: next block, or drop at the end
//   write acks   state writeback ack ends the LST entry's busy period
//   control      UE idle: buffer its downlink traffic; reconnect: start the
//                buffer read loop, which then runs on its own responses
// When a busy flow's last read response is processed, the LST issues one
// collapsed writeback of the flow's state into its flow table entry.
//
// Interfaces: in/ctrl/rsp are valid-ready inputs, req a valid-ready output
// through an ordered request queue; eg and cpu are registered one-cycle
// pulses without backpressure; stats counts what happened. The first packet
// of a flow is counted but not metered, because its rule is found later on
// the slow path. Ingress waits for init_done (the UE state sweep).
//
// The flow/UE/PDR table structure, key choices, PDR blocks of five, the LST
// with collapsed writeback, the paging buffer and its read loop and the CPU
// redirect on hash collisions follow the UPF design; the single-cycle event
// pipeline, message formats and queue sizes are this design's choices.
// A few sub-block outputs (the UE key, the LST hit flag and occupancy) and
// some response fields are not needed here and stay unconnected internally;
// lint reports them as unused signals.
module xplane_asic
  import xp_pkg::*;
#(
  parameter int FT_AW   = 26,          // flow table: 64M entries in DRAM
  parameter int UET_AW  = 23,          // UE table: 8M entries in DRAM
  parameter int UE_AW   = 20,          // UEs with on-chip paging state: 1M
  parameter int LST_AW  = 11,          // flow LST entries: 2048
  parameter int PTR_AW  = 8,           // pointer LST entries: 256
  parameter int SLOT_AW = 8,           // paging buffer slots per UE: 256
  parameter int QDEPTH  = 16           // RDMA request queue
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] now_us,
  output logic        init_done,

  input  logic        in_valid,
  output logic        in_ready,
  input  pkt_t        in_pkt,

  input  logic        ctrl_valid,
  output logic        ctrl_ready,
  input  ctrl_t       ctrl,

  output logic        req_valid,
  input  logic        req_ready,
  output rdma_req_t   req,

  input  logic        rsp_valid,
  output logic        rsp_ready,
  input  rdma_rsp_t   rsp,

  output logic        eg_valid,
  output egress_t     eg,
  output logic        cpu_valid,
  output pkt_t        cpu_pkt,
  output stats_t      stats
);
  // ---------------------------------------------------------------- events
  logic can, sel_ctrl, ctrl_go, take_rsp, take_ctrl, take_in;
  logic q_space2;

  // ------------------------------------------------------------ sub-blocks
  // flow table handler
  logic [31:0] ft_rd_addr;
  logic        ft_hit, ft_miss, ft_collide;
  fast_table_handler #(.FT_AW(FT_AW)) u_fth (
    .in_pkt(in_pkt), .rd_addr(ft_rd_addr),
    .rsp_pkt(rsp.pkt), .rsp_ft(rsp.ft),
    .hit(ft_hit), .miss(ft_miss), .collide(ft_collide));

  // slow table handler
  ue_key_t     ue_key;
  logic [31:0] ue_addr, ue_pdr_addr, pdr_addr;
  logic        ue_hit, ue_absent, ue_collide, pdr_hit, pdr_more, pdr_none;
  meta_t       ue_meta, pdr_meta;
  rule_t       pdr_rule;
  slow_table_handler #(.UE_AW(UET_AW)) u_sth (
    .pkt(rsp.pkt), .meta(rsp.meta),
    .ue_key(ue_key), .ue_addr(ue_addr),
    .ue_rsp(rsp.ue), .ue_hit(ue_hit), .ue_absent(ue_absent), .ue_collide(ue_collide),
    .ue_meta(ue_meta),
    .pdr_rsp(rsp.pdrs), .pdr_hit(pdr_hit), .pdr_rule(pdr_rule), .pdr_more(pdr_more),
    .pdr_none(pdr_none), .pdr_meta(pdr_meta), .ue_pdr_addr(ue_pdr_addr), .pdr_addr(pdr_addr));

  // fast table generator
  rdma_req_t ins_req;
  fast_table_generator #(.FT_AW(FT_AW)) u_ftg (
    .pkt(rsp.pkt), .meta(rsp.meta), .rule(pdr_rule), .req(ins_req));

  // flow local state table + state data handler
  logic        lst_req_ok, lst_rsp_valid, lst_hit, lst_loaded, lst_upd_en, lst_ack_valid;
  state_t      lst_cur, sdh_nxt, lst_wb_state;
  logic        lst_wb_valid, conform;
  five_tuple_t lst_wb_key;
  logic [LST_AW:0] lst_occ;

  local_state_table #(.KEY_W($bits(five_tuple_t)), .STATE_W($bits(state_t)), .AW(LST_AW)) u_lst (
    .clk, .rst_n,
    .req_valid(take_in), .req_key(in_pkt.tuple), .req_ok(lst_req_ok),
    .rsp_valid(lst_rsp_valid), .rsp_key(rsp.pkt.tuple), .rsp_state(rsp.ft.st),
    .rsp_dec(1'b1), .rsp_hit(lst_hit), .cur_state(lst_cur), .cur_loaded(lst_loaded),
    .upd_en(lst_upd_en), .upd_state(sdh_nxt),
    .ack_valid(lst_ack_valid), .ack_key(rsp.ft.key),
    .wb_valid(lst_wb_valid), .wb_key(lst_wb_key), .wb_state(lst_wb_state),
    .occupancy(lst_occ));

  state_data_handler u_sdh (
    .cur(lst_cur), .fresh(!lst_loaded && rsp.ft.key != rsp.pkt.tuple),
    .rule(rsp.ft.rule), .meter_en(ft_hit),
    .len(rsp.pkt.len), .now_us(now_us), .nxt(sdh_nxt), .conform(conform));

  logic [FT_AW-1:0] wb_hash;
  crc_hash #(.IN_W($bits(five_tuple_t)), .OUT_W(FT_AW)) u_wbh (.key(lst_wb_key), .hash(wb_hash));

  // paging buffer signals
  logic      pb_enq, pb_rel, pb_ptr_rsp, pb_buf_rsp, pb_ack, pb_accept;
  logic      pb_req_valid, pb_eg_valid, pb_full_drop, pb_clr_buf, pb_stored, pb_wb_valid;
  meta_t     pb_meta;
  rdma_req_t pb_req, pb_wb_req;
  egress_t   pb_eg;

  // UE paging state
  logic [31:0] ue_sel;
  logic        ue_idle, ue_buffering, ust_set_idle, ust_set_awake;
  ue_state_table #(.UE_AW(UE_AW)) u_ust (
    .clk, .rst_n, .init_done(init_done),
    .rd_idx(UE_AW'(ue_sel)), .rd_idle(ue_idle), .rd_buffering(ue_buffering),
    .set_idle(ust_set_idle), .set_awake(ust_set_awake), .clr_buf(pb_clr_buf),
    .wr_idx(UE_AW'(ue_sel)));

  // paging buffer
  paging_buffer #(.SLOT_AW(SLOT_AW), .PTR_AW(PTR_AW)) u_pb (
    .clk, .rst_n,
    .enq_valid(pb_enq), .rel_valid(pb_rel), .ptr_rsp_valid(pb_ptr_rsp),
    .buf_rsp_valid(pb_buf_rsp), .ack_valid(pb_ack),
    .ue(ue_sel), .pkt(rsp.pkt), .meta(pb_meta), .rsp_ptr(rsp.ptr), .rsp_next(rsp.next),
    .ue_idle(ue_idle), .ue_buffering(ue_buffering),
    .accept(pb_accept), .req_valid(pb_req_valid), .req(pb_req),
    .eg_valid(pb_eg_valid), .eg(pb_eg), .full_drop(pb_full_drop), .clr_buf(pb_clr_buf),
    .stored(pb_stored), .wb_valid(pb_wb_valid), .wb_req(pb_wb_req));

  // request queue
  logic      q0_valid, q1_valid;
  rdma_req_t q0, q1;
  rdma_req_queue #(.DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .in0_valid(q0_valid), .in0(q0), .in1_valid(q1_valid), .in1(q1),
    .space2(q_space2), .out_valid(req_valid), .out(req), .out_ready(req_ready));

  // ------------------------------------------------------- event selection
  assign can       = init_done && q_space2;
  assign sel_ctrl  = !rsp_valid && ctrl_valid;
  // a reconnect of an idle UE needs a free pointer-table slot
  assign ctrl_go   = ctrl.op != CTRL_RECONNECT || !ue_idle || pb_accept;
  assign take_rsp  = rsp_valid && can;
  assign take_ctrl = sel_ctrl && ctrl_go && can;
  assign take_in   = !rsp_valid && !(sel_ctrl && ctrl_go) && in_valid && can;

  assign rsp_ready  = can;
  assign ctrl_ready = take_ctrl;
  assign in_ready   = take_in;

  // UE index the event is about
  always_comb begin
    if (sel_ctrl)                  ue_sel = ctrl.ue;
    else if (rsp.op == OP_FT_READ) ue_sel = rsp.ft.buf_idx;
    else                           ue_sel = rsp.meta.buf_idx;
  end

  // ---------------------------------------------------------- event logic
  typedef enum logic [1:0] {OUT_NONE, OUT_EGRESS, OUT_QUEUE, OUT_CPU} pkt_dst_e;

  logic     ev_fast_hit, ev_slow, ev_pdr_blk, ev_insert, ev_merge, ev_cpu;
  logic     ev_meter_drop, ev_rule_drop;
  logic     e_valid, c_valid;
  egress_t  e_out;
  rule_t    act_rule;
  pkt_dst_e dst;

  always_comb begin
    q0_valid = 1'b0; q0 = '0;
    q1_valid = 1'b0; q1 = '0;
    e_valid  = 1'b0; e_out = '0;
    c_valid  = 1'b0;
    lst_rsp_valid = 1'b0; lst_upd_en = 1'b0; lst_ack_valid = 1'b0;
    ust_set_idle = 1'b0; ust_set_awake = 1'b0;
    pb_enq = 1'b0; pb_rel = 1'b0; pb_ptr_rsp = 1'b0; pb_buf_rsp = 1'b0; pb_ack = 1'b0;
    pb_meta = rsp.meta;
    ev_fast_hit = 1'b0; ev_slow = 1'b0; ev_pdr_blk = 1'b0; ev_insert = 1'b0;
    ev_merge = 1'b0; ev_cpu = 1'b0; ev_meter_drop = 1'b0; ev_rule_drop = 1'b0;
    act_rule = '0;
    dst = OUT_NONE;

    if (take_in) begin
      if (lst_req_ok) begin
        q1_valid   = 1'b1;
        q1.op      = OP_FT_READ;
        q1.addr    = ft_rd_addr;
        q1.pkt     = in_pkt;
      end else begin
        c_valid = 1'b1;                  // local state table collision
      end
    end else if (take_ctrl) begin
      if (ctrl.op == CTRL_IDLE) begin
        ust_set_idle = 1'b1;
      end else if (ue_idle) begin
        ust_set_awake = 1'b1;
        pb_rel        = 1'b1;
      end
    end else if (take_rsp) begin
      unique case (rsp.op)
        OP_FT_READ: begin
          lst_rsp_valid = 1'b1;
          lst_upd_en    = !ft_collide;
          ev_merge      = lst_loaded;
          if (ft_hit) begin
            ev_fast_hit = 1'b1;
            act_rule    = rsp.ft.rule;
            pb_meta         = rsp.meta;
            pb_meta.rule    = rsp.ft.rule;
            pb_meta.buf_idx = rsp.ft.buf_idx;
            if (!conform) ev_meter_drop = 1'b1;
            else          dst = OUT_QUEUE;   // resolved below
          end else if (ft_miss) begin
            ev_slow  = 1'b1;
            q1_valid = 1'b1;
            q1.op    = OP_UE_READ;
            q1.addr  = ue_addr;
            q1.pkt   = rsp.pkt;
            q1.meta  = '0;
          end else begin
            c_valid = 1'b1;
          end
          if (lst_wb_valid) begin
            q0_valid = 1'b1;
            q0.op    = OP_STATE_WB;
            q0.addr  = 32'(wb_hash);
            q0.ft.key = lst_wb_key;
            q0.st    = lst_wb_state;
          end
        end
        OP_UE_READ: begin
          if (ue_hit) begin
            ev_pdr_blk = 1'b1;
            q1_valid   = 1'b1;
            q1.op      = OP_PDR_READ;
            q1.addr    = ue_pdr_addr;
            q1.pkt     = rsp.pkt;
            q1.meta    = ue_meta;
          end else if (ue_absent) begin
            ev_rule_drop = 1'b1;
          end else if (ue_collide) begin
            c_valid = 1'b1;              // UE table collision
          end
        end
        OP_PDR_READ: begin
          if (pdr_hit) begin
            ev_insert = 1'b1;
            q0_valid  = 1'b1;
            q0        = ins_req;
            act_rule  = pdr_rule;
            pb_meta      = rsp.meta;
            pb_meta.rule = pdr_rule;
            dst = OUT_QUEUE;
          end else if (pdr_more) begin
            ev_pdr_blk = 1'b1;
            q1_valid   = 1'b1;
            q1.op      = OP_PDR_READ;
            q1.addr    = pdr_addr;
            q1.pkt     = rsp.pkt;
            q1.meta    = pdr_meta;
          end else if (pdr_none) begin
            ev_rule_drop = 1'b1;         // no PDR of the UE matched
          end
        end
        OP_STATE_WB: lst_ack_valid = 1'b1;
        OP_PTR_READ: pb_ptr_rsp    = 1'b1;
        OP_BUF_READ: pb_buf_rsp    = 1'b1;
        OP_PTR_WB:   pb_ack        = 1'b1;
        default: ;                       // insert and buffer write acks
      endcase

      // a packet whose action is known: drop, forward or queue behind the buffer
      if (dst == OUT_QUEUE) begin
        if (act_rule.action == ACT_DROP) begin
          ev_rule_drop = 1'b1;
        end else if (rsp.pkt.dir == DIR_DL && ue_buffering) begin
          if (pb_accept) pb_enq  = 1'b1;
          else           c_valid = 1'b1;
        end else begin
          e_valid    = 1'b1;
          e_out.pkt  = rsp.pkt;
          e_out.rule = act_rule;
        end
      end

      // paging buffer traffic
      if (pb_req_valid) begin
        q1_valid = 1'b1;
        q1       = pb_req;
      end
      if (pb_wb_valid) begin
        q0_valid = 1'b1;
        q0       = pb_wb_req;
      end
      if (pb_eg_valid) begin
        e_valid = 1'b1;
        e_out   = pb_eg;
      end
    end

    // the release notification issues its pointer read
    if (take_ctrl && pb_req_valid) begin
      q1_valid = 1'b1;
      q1       = pb_req;
    end
    ev_cpu = c_valid;
  end

  // ---------------------------------------------------- registered outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eg_valid  <= 1'b0;
      eg        <= '0;
      cpu_valid <= 1'b0;
      cpu_pkt   <= '0;
      stats     <= '0;
    end else begin
      eg_valid  <= e_valid;
      if (e_valid) eg <= e_out;
      cpu_valid <= c_valid;
      if (c_valid) cpu_pkt <= take_in ? in_pkt : rsp.pkt;

      stats.fast_hits      <= stats.fast_hits      + 32'(ev_fast_hit);
      stats.slow_lookups   <= stats.slow_lookups   + 32'(ev_slow);
      stats.pdr_blocks     <= stats.pdr_blocks     + 32'(ev_pdr_blk);
      stats.ft_inserts     <= stats.ft_inserts     + 32'(ev_insert);
      stats.state_wbs      <= stats.state_wbs      + 32'(take_rsp && rsp.op == OP_FT_READ && lst_wb_valid);
      stats.lst_merges     <= stats.lst_merges     + 32'(ev_merge);
      stats.cpu_redirects  <= stats.cpu_redirects  + 32'(ev_cpu);
      stats.meter_drops    <= stats.meter_drops    + 32'(ev_meter_drop);
      stats.rule_drops     <= stats.rule_drops     + 32'(ev_rule_drop);
      stats.buffered       <= stats.buffered       + 32'(take_rsp && pb_stored);
      stats.released       <= stats.released       + 32'(take_rsp && pb_eg_valid && pb_eg.from_buffer);
      stats.buf_full_drops <= stats.buf_full_drops + 32'(take_rsp && pb_full_drop);
      stats.stalls         <= stats.stalls         + 32'((rsp_valid || ctrl_valid || in_valid) && !can);
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid && !req_ready |=> req_valid);
endmodule
