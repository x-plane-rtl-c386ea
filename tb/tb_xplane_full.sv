// tb_xplane_full: one complete operation of the UPF data plane at its full
// default sizes (64M-entry flow table, 8M-entry UE table, 1M UEs, 2048-entry
// local state table, 256-slot paging rings) against the DRAM server model.
// After the 1M-cycle UE state sweep, an uplink flow takes the slow path once
// and then the fast path; a downlink flow is learnt, its UE goes idle, four
// packets are buffered, the UE reconnects while two more arrive, and all six
// must reach the UE in order with the PDR's GTP TEID. At the end both flows'
// byte counts in DRAM must equal the bytes sent.
module tb_xplane_full;
  import xp_pkg::*;
  import xp_tb_pkg::*;
  localparam int LAT = 20;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic      init_done, in_valid = 0, in_ready, ctrl_valid = 0, ctrl_ready;
  pkt_t      in_pkt = '0;
  ctrl_t     ctrl = '0;
  logic      req_valid, req_ready, rsp_valid, rsp_ready, eg_valid, cpu_valid;
  rdma_req_t req;
  rdma_rsp_t rsp;
  egress_t   eg;
  pkt_t      cpu_pkt;
  stats_t    stats;

  xplane_asic dut (
    .clk, .rst_n, .now_us(32'(cyc / 4)), .init_done,
    .in_valid, .in_ready, .in_pkt, .ctrl_valid, .ctrl_ready, .ctrl,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .eg_valid, .eg, .cpu_valid, .cpu_pkt, .stats);

  dram_server_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_ready, .rsp);

  pkt_t   ul, dl;
  int     next_id = 1;
  longint ul_bytes = 0, dl_bytes = 0;
  int     ul_got = 0, dl_ids [$];
  logic   dl_rule_ok = 1, ul_rule_ok = 1;

  task automatic send(input pkt_t p, input int len);
    @(negedge clk);
    in_valid = 1; in_pkt = p; in_pkt.id = 32'(next_id); in_pkt.len = 16'(len);
    do @(posedge clk); while (!in_ready);
    next_id++;
    if (p.dir == DIR_UL) ul_bytes += len; else dl_bytes += len;
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

  always @(posedge clk) if (rst_n && eg_valid) begin
    if (eg.pkt.dir == DIR_UL) begin
      ul_got++;
      if (eg.rule.action != ACT_FORWARD) ul_rule_ok = 0;
    end else begin
      dl_ids.push_back(int'(eg.pkt.id));
      if (eg.rule.action != ACT_ENCAP || eg.rule.teid != 32'd555) dl_rule_ok = 0;
    end
  end

  initial begin
    ue_entry_t  e;
    pdr_block_t b;
    ft_entry_t  f;
    ul = mk_pkt(0, DIR_UL, 32'h0A00_0005, 32'h0808_0808, 16'd4000, 16'd443, 8'd6, 0, 32'd77, 6'd1);
    dl = mk_pkt(0, DIR_DL, 32'h0808_0808, 32'h0A00_0005, 16'd443, 16'd4000, 8'd6, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    check(cyc >= (1 << 20), "UE state sweep covers 1M UEs");

    e = '0; e.valid = 1; e.key = ue_key_of(ul); e.pdr_base = 100; e.nblk = 1; e.buf_idx = 5;
    u_mem.install_ue(ue_hash(e.key, 23), e);
    e.key = ue_key_of(dl); e.pdr_base = 200; e.nblk = 2;
    u_mem.install_ue(ue_hash(e.key, 23), e);
    b = '0; b[0] = mk_pdr_any(mk_rule(ACT_FORWARD));
    u_mem.install_pdr(100, b);
    b = '0; b[0] = mk_pdr_port(16'd53, mk_rule(ACT_DROP));
    u_mem.install_pdr(200, b);
    b = '0; b[1] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'd555));
    u_mem.install_pdr(201, b);

    for (int i = 0; i < 3; i++) begin send(ul, 200 + i); repeat (100) @(negedge clk); end
    check(ul_got == 3 && ul_rule_ok, "uplink flow forwarded");
    check(stats.slow_lookups == 1 && stats.fast_hits == 2, "one slow lookup, then fast hits");

    send(dl, 300);
    repeat (150) @(negedge clk);
    notify(CTRL_IDLE, 5);
    for (int i = 0; i < 4; i++) send(dl, 400 + i);
    repeat (200) @(negedge clk);
    check(dl_ids.size() == 1, "nothing leaves while idle");
    notify(CTRL_RECONNECT, 5);
    send(dl, 500); send(dl, 501);
    repeat (500) @(negedge clk);
    check(dl_ids.size() == 7 && dl_rule_ok, $sformatf("downlink delivered with TEID (%0d)", dl_ids.size()));
    for (int i = 1; i < dl_ids.size(); i++) check(dl_ids[i] > dl_ids[i-1], "downlink order");
    check(stats.buffered >= 4 && stats.released == stats.buffered, "buffered and released");

    f = u_mem.get_ft(tuple_hash(ul.tuple, 26));
    check(f.valid && longint'(f.st.bytes) == ul_bytes, $sformatf("uplink bytes %0d", f.st.bytes));
    f = u_mem.get_ft(tuple_hash(dl.tuple, 26));
    check(f.valid && longint'(f.st.bytes) == dl_bytes, $sformatf("downlink bytes %0d", f.st.bytes));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
