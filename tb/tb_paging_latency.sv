// tb_paging_latency: extra latency that the paging buffer adds to a packet
// arriving right after its UE reconnects, for 2 to 128 buffered packets.
//
// For each ring size N (2, 4, 8, 16, 32, 64, 96, 128) a fresh UE learns its
// downlink flow, the fast-path latency of one packet is measured, the UE goes
// idle, N packets are buffered, the UE reconnects and one more packet is sent
// at once. That packet must wait behind the N buffered ones, which the read
// loop releases one per DRAM round trip, so its extra latency over the fast
// path must grow by one round trip per buffered packet (linear in N). All
// N + 1 packets must leave in order, with the PDR's TEID, flagged as coming
// from the buffer.
//
// The DRAM model answers after LAT cycles; with a round trip taken as 5 us
// the printed latencies are comparable with a measured system. Reduced
// tables, default paging ring (256 slots).
module tb_paging_latency;
  import xp_pkg::*;
  import xp_tb_pkg::*;

  localparam int FT_AW = 12, UET_AW = 10, UE_AW = 6, LST_AW = 8, PTR_AW = 4;
  localparam int LAT = 20;
  localparam int RTT = LAT + 1;
  localparam int NRUN = 8;
  localparam int SIZES [NRUN] = '{2, 4, 8, 16, 32, 64, 96, 128};

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

  xplane_asic #(.FT_AW(FT_AW), .UET_AW(UET_AW), .UE_AW(UE_AW), .LST_AW(LST_AW),
                .PTR_AW(PTR_AW)) dut (
    .clk, .rst_n, .now_us(32'(cyc / 4)), .init_done,
    .in_valid, .in_ready, .in_pkt, .ctrl_valid, .ctrl_ready, .ctrl,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .eg_valid, .eg, .cpu_valid, .cpu_pkt, .stats);

  dram_server_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_ready, .rsp);

  int     next_id = 1;
  longint sent_at [int];                    // packet id -> cycle it was accepted
  longint left_at [int];                    // packet id -> cycle it left
  int     out_ids [$];
  logic   out_buf [$];
  logic   rule_ok = 1;
  logic [31:0] want_teid;

  always @(posedge clk) if (rst_n && eg_valid) begin
    left_at[int'(eg.pkt.id)] = cyc;
    out_ids.push_back(int'(eg.pkt.id));
    out_buf.push_back(eg.from_buffer);
    if (eg.rule.action != ACT_ENCAP || eg.rule.teid != want_teid) rule_ok = 0;
  end

  always @(posedge clk) if (rst_n && cpu_valid) begin
    failures++;
    $display("FAIL: packet %0d sent to the CPU", cpu_pkt.id);
  end

  task automatic send(input pkt_t p, output int id);
    @(negedge clk);
    in_valid = 1; in_pkt = p; in_pkt.id = 32'(next_id); in_pkt.len = 16'd690;
    do @(posedge clk); while (!in_ready);
    id = next_id;
    sent_at[id] = cyc;
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

  longint extra [NRUN];

  initial begin
    ue_entry_t  e;
    pdr_block_t b;
    pkt_t       p;
    int         id, probe, first_id;
    longint     base;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);

    for (int r = 0; r < NRUN; r++) begin
      automatic int n = SIZES[r];
      p = mk_pkt(0, DIR_DL, 32'h0808_0808, 32'h0A00_0001 + 32'(r), 16'd80, 16'd6000, 8'd6, 0);
      e = '0; e.valid = 1; e.key = ue_key_of(p); e.pdr_base = 32'(r); e.nblk = 1;
      e.buf_idx = 32'(r);
      u_mem.install_ue(ue_hash(e.key, UET_AW), e);
      b = '0; b[0] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'(700 + r)));
      u_mem.install_pdr(32'(r), b);
      want_teid = 32'(700 + r);

      send(p, id);                          // learn the flow (slow path)
      repeat (200) @(negedge clk);
      send(p, id);                          // fast-path reference
      repeat (100) @(negedge clk);
      base = left_at[id] - sent_at[id];
      check(base == RTT + 1, $sformatf("fast path %0d cycles", base));

      notify(CTRL_IDLE, r);
      out_ids.delete(); out_buf.delete();
      first_id = next_id;
      for (int i = 0; i < n; i++) send(p, id);
      repeat (n * 4 + 200) @(negedge clk);
      check(out_ids.size() == 0, "nothing leaves while idle");

      notify(CTRL_RECONNECT, r);
      send(p, probe);
      repeat ((n + 10) * RTT + 100) @(negedge clk);

      check(out_ids.size() == n + 1 && rule_ok, $sformatf("N=%0d: %0d of %0d delivered",
            n, out_ids.size(), n + 1));
      for (int i = 0; i < out_ids.size(); i++) begin
        check(out_ids[i] == first_id + i, $sformatf("N=%0d: order at %0d", n, i));
        check(out_buf[i], "released from the buffer");
      end
      extra[r] = left_at.exists(probe) ? left_at[probe] - sent_at[probe] - base : -1;
      $display("N=%0d buffered: extra latency %0d cycles = %0d.%0d round trips (%0d us at 5 us per round trip)",
               n, extra[r], extra[r] / RTT, (extra[r] % RTT) * 10 / RTT, extra[r] * 5 / RTT);
      check(extra[r] >= longint'(n * RTT) && extra[r] <= longint'((n + 4) * RTT),
            $sformatf("N=%0d: extra latency within N to N+4 round trips", n));
    end

    // linear: one round trip per extra buffered packet
    for (int r = 1; r < NRUN; r++)
      check(extra[r] - extra[0] == longint'((SIZES[r] - SIZES[0]) * RTT),
            $sformatf("slope at N=%0d", SIZES[r]));
    check(stats.buf_full_drops == 0, "no ring overflow up to 128 packets");
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
