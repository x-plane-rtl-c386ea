// tb_slow_path_mix: traffic with 0%, 4.8% and 25% of its packets on the slow
// path (the U, E and H mixes), packet sizes spread over 64 to 1518 bytes.
//
// For each mix 32 downlink flows of one UE are installed first by sending one
// packet each. Then 2000 packets are offered back to back: packet i starts a
// new flow when the running share of new flows falls below the mix's ratio,
// otherwise it belongs to a random flow whose rule was generated at least 200
// packets earlier, so that it takes the fast path. The UE has one PDR block.
// The pipeline takes one event per cycle; the testbench counts the events
// (ingress packets and RDMA responses) and checks:
//   - every packet leaves exactly once, either to the network or, for a flow
//     table hash collision, to the CPU,
//   - one rule per new flow, and no slow path at all in the 0% mix,
//   - for every flow the byte count in DRAM equals the bytes it sent,
//   - the pipeline stays busy: the cycles from the first packet in to the
//     last event are at most 3% more than the events handled,
//   - the packet rate falls as the slow path share grows.
// The packet rate is printed per mix. Reduced flow table (2^16 entries).
module tb_slow_path_mix;
  import xp_pkg::*;
  import xp_tb_pkg::*;

  localparam int FT_AW = 16, UET_AW = 10, UE_AW = 6;
  localparam int LAT = 20;
  localparam int NPKT = 2000;
  localparam int NWARM = 32;
  localparam int MAXF = NWARM + NPKT;
  localparam int NRUN = 3;
  localparam int PERMILLE [NRUN] = '{0, 48, 250};

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

  xplane_asic #(.FT_AW(FT_AW), .UET_AW(UET_AW), .UE_AW(UE_AW)) dut (
    .clk, .rst_n, .now_us(32'(cyc / 4)), .init_done,
    .in_valid, .in_ready, .in_pkt, .ctrl_valid, .ctrl_ready, .ctrl,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .eg_valid, .eg, .cpu_valid, .cpu_pkt, .stats);

  dram_server_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_ready, .rsp);

  // per-packet and per-flow bookkeeping
  int     seen [NPKT];
  int     n_eg = 0, n_cpu = 0, n_in = 0, n_rsp = 0;
  longint first_in = 0, last_ev = 0;
  logic   measuring = 0;
  always @(posedge clk) if (rst_n) begin
    if (eg_valid && eg.pkt.id >= 32'(MAXF)) begin
      seen[eg.pkt.id - 32'(MAXF)]++;
      n_eg++;
    end
    if (cpu_valid && cpu_pkt.id >= 32'(MAXF)) begin
      seen[cpu_pkt.id - 32'(MAXF)]++;
      n_cpu++;
    end
    if (measuring && in_valid && in_ready) begin
      if (n_in == 0) first_in = cyc;
      n_in++;
      last_ev = cyc;
    end
    if (measuring && rsp_valid && rsp_ready) begin
      n_rsp++;
      last_ev = cyc;
    end
  end

  function automatic pkt_t flow_pkt(input int r, input int f, input int id, input int len);
    return mk_pkt(32'(id), DIR_DL, 32'h0B0B_0000 + 32'(f), 32'h0A03_0000 + 32'(r),
                  16'(4000 + f % 1000), 16'(80 + f / 1000), 8'd6, 16'(len));
  endfunction

  task automatic send(input pkt_t p);
    in_valid = 1; in_pkt = p;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 0;
  endtask

  real rate [NRUN];

  initial begin
    ue_entry_t  e;
    pdr_block_t b;
    pkt_t       p;
    ft_entry_t  fe;
    int         nf, nnew, f, len, ok_seen, ok_bytes, ins0, slow0;
    longint     nev;
    int         intro [MAXF];
    longint     sent  [MAXF];
    longint     span;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    @(negedge clk);

    for (int r = 0; r < NRUN; r++) begin
      p = flow_pkt(r, 0, 0, 64);
      e = '0; e.valid = 1; e.key = ue_key_of(p); e.pdr_base = 32'(16 * r);
      e.nblk = 4'd1; e.buf_idx = 32'(r);
      u_mem.install_ue(ue_hash(e.key, UET_AW), e);
      for (int i = 0; i < PDRS_PER_BLOCK; i++) b[i] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'(70 + r)));
      u_mem.install_pdr(32'(16 * r), b);
      for (int i = 0; i < MAXF; i++) begin sent[i] = 0; intro[i] = -1000; end

      // warm-up: one packet per flow, rules generated
      for (int i = 0; i < NWARM; i++) begin
        len = 64 + $urandom_range(0, 1454);
        send(flow_pkt(r, i, i, len));
        sent[i] += longint'(len);
      end
      nf = NWARM;
      repeat (10 * (LAT + 1)) @(negedge clk);
      ins0 = int'(stats.ft_inserts);
      slow0 = int'(stats.slow_lookups);

      // measured mix
      for (int i = 0; i < NPKT; i++) seen[i] = 0;
      n_eg = 0; n_cpu = 0; n_in = 0; n_rsp = 0; nnew = 0;
      measuring = 1;
      for (int i = 0; i < NPKT; i++) begin
        len = 64 + $urandom_range(0, 1454);
        if (nnew * 1000 < (i + 1) * PERMILLE[r]) begin
          f = nf; intro[nf] = i; nf++; nnew++;
        end else begin
          do f = $urandom_range(0, nf - 1); while (intro[f] > i - 200);
        end
        send(flow_pkt(r, f, MAXF + i, len));
        sent[f] += longint'(len);
      end
      repeat (10 * (LAT + 1)) @(negedge clk);
      measuring = 0;

      span = last_ev - first_in + 1;
      nev = longint'(n_in) + longint'(n_rsp);
      rate[r] = real'(NPKT) / real'(span);
      $display("%0d/1000 slow path: %0d packets, %0d new flows, %0d events in %0d cycles, %0.3f packets per cycle, %0d to CPU",
               PERMILLE[r], NPKT, nnew, nev, span, rate[r], n_cpu);

      ok_seen = 0;
      for (int i = 0; i < NPKT; i++) if (seen[i] == 1) ok_seen++;
      check(ok_seen == NPKT && n_eg + n_cpu == NPKT,
            $sformatf("mix %0d: every packet left once (%0d of %0d)", r, ok_seen, NPKT));
      check(int'(stats.ft_inserts) - ins0 + n_cpu >= nnew && int'(stats.ft_inserts) - ins0 <= nnew,
            $sformatf("mix %0d: one rule per new flow (%0d for %0d)", r, int'(stats.ft_inserts) - ins0, nnew));
      if (PERMILLE[r] == 0)
        check(int'(stats.slow_lookups) == slow0 && n_cpu == 0, "0% mix: no slow path");
      ok_bytes = 0;
      for (int i = 0; i < nf; i++) begin
        p = flow_pkt(r, i, 0, 0);
        fe = u_mem.get_ft(tuple_hash(p.tuple, FT_AW));
        if (fe.valid && fe.key == p.tuple && 64'(fe.st.bytes) == sent[i]) ok_bytes++;
      end
      check(ok_bytes + n_cpu >= nf && ok_bytes >= nf - nf / 16,
            $sformatf("mix %0d: byte counts in DRAM right for %0d of %0d flows", r, ok_bytes, nf));
      check(span >= nev && span <= nev * 103 / 100,
            $sformatf("mix %0d: one event per cycle, %0d events in %0d cycles", r, nev, span));
      if (r > 0) check(rate[r] < rate[r-1], "more slow path, fewer packets per cycle");
    end
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
