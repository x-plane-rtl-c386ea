// tb_xplane_asic: end-to-end run of the UPF data plane against the DRAM
// server model, at reduced table sizes.
//
// Eight UEs are installed (uplink and downlink UE table entries, two PDR
// blocks per downlink list); UE 7 has no session. After one warm-up packet
// per flow (slow path, flow rule generation) UEs 3 and 4 go idle and a few
// hundred packets of random length arrive back to back while the request
// link stalls at random; UE 3 reconnects halfway, UE 4 only at the end, after
// its ring overflowed. Two flows share a flow table slot (hash collision).
// Checked:
//   - every packet leaves with the action its PDR gives (reference policy),
//   - clean flows deliver every packet; UE 3's flows stay in order,
//   - after the run the byte count in each clean flow's DRAM entry equals the
//     bytes sent (the collapsed writeback lost no update),
//   - isolated fast-path and slow-path latencies (1 and 3 DRAM round trips)
//     and the release loop's one packet per round trip,
//   - each mechanism happened at least once: fast hit, slow lookup, multi-block
//     PDR search, rule insertion, stale response merged in the local state
//     table, collapsed writeback, CPU redirect, meter drop, rule drop,
//     buffering, release, ring overflow, request queue stall.
module tb_xplane_asic;
  import xp_pkg::*;
  import xp_tb_pkg::*;

  localparam int FT_AW = 12, UET_AW = 10, UE_AW = 6, LST_AW = 8, PTR_AW = 4, SLOT_AW = 6;
  localparam int LAT = 20;
  localparam int RTT = LAT + 1;            // request issue to response use, in cycles
  localparam int NUE = 8;
  localparam int NMAIN = 600;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] now_us;
  assign now_us = 32'(cyc / 4);

  logic      init_done, in_valid = 0, in_ready, ctrl_valid = 0, ctrl_ready;
  pkt_t      in_pkt = '0;
  ctrl_t     ctrl = '0;
  logic      req_valid, req_ready, rsp_valid, rsp_ready, eg_valid, cpu_valid;
  rdma_req_t req;
  rdma_rsp_t rsp;
  egress_t   eg;
  pkt_t      cpu_pkt;
  stats_t    stats;
  logic      bp = 1;

  xplane_asic #(.FT_AW(FT_AW), .UET_AW(UET_AW), .UE_AW(UE_AW), .LST_AW(LST_AW),
                .PTR_AW(PTR_AW), .SLOT_AW(SLOT_AW), .QDEPTH(8)) dut (
    .clk, .rst_n, .now_us, .init_done,
    .in_valid, .in_ready, .in_pkt, .ctrl_valid, .ctrl_ready, .ctrl,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .eg_valid, .eg, .cpu_valid, .cpu_pkt, .stats);

  assign req_ready = bp;
  logic m_ready;
  dram_server_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid(req_valid && bp), .req_ready(m_ready),
    .req, .rsp_valid, .rsp_ready, .rsp);

  // ------------------------------------------------------------ reference
  function automatic logic [31:0] ue_ip(input int u);
    return 32'h0A00_0001 + 32'(u);
  endfunction

  typedef struct {
    pkt_t  base;
    int    ue;
    int    sent, delivered, cpu;
    longint bytes;
    int    last_id;
    logic  order_ok;
  } flow_t;
  flow_t flows [$];

  function automatic rule_t exp_rule(input int f);
    pkt_t p;
    int   u, port;
    p = flows[f].base; u = flows[f].ue;
    if (p.dir == DIR_UL) return mk_rule(ACT_FORWARD);
    port = int'(p.tuple.src_port);
    if (u == 2 && port == 666) return mk_rule(ACT_DROP);
    if (port >= 1 && port <= 5 && !(u == 2 && port == 5)) return mk_rule(ACT_ENCAP, 32'(u * 100 + port));
    if (u == 1) return mk_rule(ACT_ENCAP, 32'(u * 100 + 99), 16'd2, 16'd1, 16'd0);
    return mk_rule(ACT_ENCAP, 32'(u * 100 + 99));
  endfunction

  function automatic int flow_of(input five_tuple_t t);
    foreach (flows[i]) if (flows[i].base.tuple == t) return i;
    return -1;
  endfunction

  task automatic install();
    ue_entry_t  e;
    pdr_block_t b;
    logic [31:0] used [logic [31:0]];
    for (int u = 0; u < NUE - 1; u++) begin
      for (int d = 0; d < 2; d++) begin
        pkt_t p;
        p = mk_pkt(0, d ? DIR_DL : DIR_UL, ue_ip(u), ue_ip(u), 0, 0, 6, 0, 32'(1000 + u), 6'd1);
        e = '0;
        e.valid = 1; e.key = ue_key_of(p); e.buf_idx = 32'(u);
        e.pdr_base = 32'(u * 8 + d * 4); e.nblk = d ? 4'd2 : 4'd1;
        check(!used.exists(ue_hash(e.key, UET_AW)), "UE table slots distinct");
        used[ue_hash(e.key, UET_AW)] = 1;
        u_mem.install_ue(ue_hash(e.key, UET_AW), e);
      end
      // uplink list: forward everything
      b = '0; b[0] = mk_pdr_any(mk_rule(ACT_FORWARD));
      u_mem.install_pdr(32'(u * 8), b);
      // downlink list: block 0 per-port rules, block 1 default
      b = '0;
      for (int k = 0; k < 5; k++) b[k] = mk_pdr_port(16'(k + 1), mk_rule(ACT_ENCAP, 32'(u * 100 + k + 1)));
      if (u == 2) begin
        for (int k = 4; k > 0; k--) b[k] = b[k-1];
        b[0] = mk_pdr_port(16'd666, mk_rule(ACT_DROP));
      end
      u_mem.install_pdr(32'(u * 8 + 4), b);
      b = '0;
      b[2] = mk_pdr_any(u == 1 ? mk_rule(ACT_ENCAP, 32'(u * 100 + 99), 16'd2, 16'd1, 16'd0)
                               : mk_rule(ACT_ENCAP, 32'(u * 100 + 99)));
      u_mem.install_pdr(32'(u * 8 + 5), b);
    end
  endtask

  task automatic add_flow(input pkt_t p, input int u);
    flow_t f;
    f.base = p; f.ue = u; f.sent = 0; f.delivered = 0; f.cpu = 0; f.bytes = 0;
    f.last_id = -1; f.order_ok = 1;
    flows.push_back(f);
  endtask

  task automatic make_flows();
    int ports [4] = '{1, 3, 5, 80};
    pkt_t p;
    for (int u = 0; u < NUE; u++) begin
      foreach (ports[k]) begin
        p = mk_pkt(0, DIR_DL, 32'h0800_0000 + 32'(k * 7 + u), ue_ip(u), 16'(ports[k]), 16'd5000 + 16'(k), 8'd6, 0);
        add_flow(p, u);
      end
      p = mk_pkt(0, DIR_UL, ue_ip(u), 32'h0808_0808, 16'd6000 + 16'(u), 16'd443, 8'd17, 0, 32'(1000 + u), 6'd1);
      if (u < NUE - 1) add_flow(p, u);
    end
    p = mk_pkt(0, DIR_DL, 32'h0909_0909, ue_ip(2), 16'd666, 16'd7000, 8'd6, 0);
    add_flow(p, 2);
    // a flow sharing the flow table slot of flow 0
    p = flows[0].base;
    do p.tuple.dst_port = 16'($urandom); while (tuple_hash(p.tuple, FT_AW) != tuple_hash(flows[0].base.tuple, FT_AW)
                                               || p.tuple == flows[0].base.tuple);
    add_flow(p, 0);
  endtask

  // ------------------------------------------------------------ stimulus
  int next_id = 1;
  longint t_in [int];
  longint lat [int];

  task automatic send(input int f, input int len);
    pkt_t p;
    p = flows[f].base;
    p.id = 32'(next_id); p.len = 16'(len);
    @(negedge clk);
    in_valid = 1; in_pkt = p;
    do @(posedge clk); while (!in_ready);
    t_in[next_id] = cyc;
    flows[f].sent++;
    flows[f].bytes += len;
    next_id++;
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic notify(input ctrl_op_e op, input int u);
    @(negedge clk);
    ctrl_valid = 1; ctrl.op = op; ctrl.ue = 32'(u);
    do @(posedge clk); while (!ctrl_ready);
    @(negedge clk);
    ctrl_valid = 0;
  endtask

  // ------------------------------------------------------------ monitors
  longint rel4 [$];
  int     next_blk_reads = 0;
  always @(posedge clk) if (rst_n && req_valid && req_ready && req.op == OP_PDR_READ && req.meta.blk != 0)
    next_blk_reads++;
  always @(posedge clk) if (rst_n) begin
    if (eg_valid) begin
      int f;
      f = flow_of(eg.pkt.tuple);
      check(f >= 0, "egress of a known flow");
      if (f >= 0) begin
        check(eg.rule == exp_rule(f), $sformatf("action of flow %0d (teid %0d)", f, eg.rule.teid));
        flows[f].delivered++;
        if (int'(eg.pkt.id) < flows[f].last_id) flows[f].order_ok = 0;
        flows[f].last_id = int'(eg.pkt.id);
        if (flows[f].ue == 4 && eg.from_buffer) rel4.push_back(cyc);
      end
      lat[int'(eg.pkt.id)] = cyc - t_in[int'(eg.pkt.id)];
    end
    if (cpu_valid) begin
      int f;
      f = flow_of(cpu_pkt.tuple);
      if (f >= 0) flows[f].cpu++;
    end
  end

  // ------------------------------------------------------------ sequence
  int fast_lat, slow_lat, f_clean, n_clean;
  longint wait0;
  initial begin
    make_flows();
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    install();

    // isolated slow path (first packet, 1 PDR block) then fast path
    send(4 * 5 + 4, 100);                   // uplink flow of UE 4
    repeat (200) @(negedge clk);
    slow_lat = int'(lat[next_id - 1]);
    send(4 * 5 + 4, 100);
    repeat (200) @(negedge clk);
    fast_lat = int'(lat[next_id - 1]);
    check(fast_lat == RTT + 1, $sformatf("fast path latency %0d cycles", fast_lat));
    check(slow_lat == 3 * RTT + 2, $sformatf("slow path latency %0d cycles", slow_lat));

    // warm-up: one packet per flow
    foreach (flows[i]) send(i, 64 + i);
    repeat (600) @(negedge clk);

    notify(CTRL_IDLE, 3);
    notify(CTRL_IDLE, 4);
    fork
      forever begin @(negedge clk); bp = ($urandom % 4) != 0; end
    join_none
    for (int n = 0; n < NMAIN; n++) begin
      int f;
      f = $urandom % flows.size();
      if (n < 10 || n % 9 == 0) f = 3 * 5 + (n % 4);   // keep UE 3 busy
      if (n % 7 == 0) f = 4 * 5 + 3;                   // UE 4: overflow its ring
      send(f, 64 + ($urandom % 1437));
      if (n == NMAIN / 2) notify(CTRL_RECONNECT, 3);
    end
    disable fork;
    bp = 1;
    repeat (3000) @(negedge clk);
    notify(CTRL_RECONNECT, 4);
    repeat (3000) @(negedge clk);

    // delivery, order and state
    n_clean = 0;
    foreach (flows[i]) begin
      logic clean;
      ft_entry_t e;
      clean = flows[i].cpu == 0 && flows[i].ue != 1 && flows[i].ue != 4 && flows[i].ue != 7
              && exp_rule(i).action != ACT_DROP;
      if (flows[i].ue == 3) check(flows[i].order_ok, $sformatf("UE 3 flow %0d in order", i));
      if (clean) begin
        n_clean++;
        check(flows[i].delivered == flows[i].sent,
              $sformatf("flow %0d delivered %0d of %0d", i, flows[i].delivered, flows[i].sent));
        e = u_mem.get_ft(tuple_hash(flows[i].base.tuple, FT_AW));
        check(e.valid && e.key == flows[i].base.tuple, $sformatf("flow %0d rule generated", i));
        check(longint'(e.st.bytes) == flows[i].bytes,
              $sformatf("flow %0d byte count %0d expected %0d", i, e.st.bytes, flows[i].bytes));
      end
    end
    check(n_clean >= 20, $sformatf("%0d clean flows checked", n_clean));
    check(flows[flows.size() - 1].cpu == flows[flows.size() - 1].sent, "colliding flow goes to the CPU");
    check(dut.u_lst.occupancy == 0, "local state table empty at the end");

    // release loop pace: one packet per round trip
    check(rel4.size() > 3, "UE 4 released");
    for (int i = 1; i < rel4.size(); i++)
      check(rel4[i] - rel4[i-1] == RTT, $sformatf("release gap %0d", rel4[i] - rel4[i-1]));

    // every mechanism happened
    check(stats.fast_hits > 0, "fast hits");
    check(stats.slow_lookups > 0, "slow lookups");
    check(next_blk_reads > 0, $sformatf("multi-block PDR search (%0d second-block reads)", next_blk_reads));
    check(stats.ft_inserts > 0, "flow rules generated");
    check(stats.lst_merges > 0, "stale responses merged");
    check(stats.state_wbs > 0, "collapsed writebacks");
    check(stats.cpu_redirects > 0, "CPU redirects");
    check(stats.meter_drops > 0, "meter drops");
    check(stats.rule_drops > 0, "rule drops");
    check(stats.buffered > 0, "packets buffered");
    check(stats.released > 0, "packets released");
    check(stats.buf_full_drops > 0, "ring overflow");
    check(stats.stalls > 0, "request queue stalls");
    $display("fast=%0d slow=%0d blocks=%0d ins=%0d merges=%0d wbs=%0d cpu=%0d meter=%0d rule=%0d buf=%0d rel=%0d full=%0d stalls=%0d",
      stats.fast_hits, stats.slow_lookups, stats.pdr_blocks, stats.ft_inserts, stats.lst_merges,
      stats.state_wbs, stats.cpu_redirects, stats.meter_drops, stats.rule_drops, stats.buffered,
      stats.released, stats.buf_full_drops, stats.stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
