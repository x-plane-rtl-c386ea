// tb_rate_limit: the quota-based rate limiting case study, scaled in time.
//
// Three UEs each receive one downlink flow of 1000-byte packets offered at
// 200 B/us (1.6 Gb/s), more than their PDR allows. The PDR meters every UE at
// 125 B/us (1 Gb/s). UE 0 has a quota of 8 x 64 KiB and UE 1 one of
// 12 x 64 KiB; once their byte counts pass it they are held to 32 B/us
// (256 Mb/s) and 64 B/us (512 Mb/s). UE 2 has no quota. The token buckets
// and byte counts live in the flow table entries in DRAM and are updated
// through the local state table, so this also exercises the concurrent state
// access under steady load.
//
// Time: 10 clock cycles per microsecond, 12 ms of traffic. The forwarded
// bytes of each UE are summed over steady windows before and after its quota
// switch and must match the metered rate within 1% plus one packet. The
// byte counts in DRAM at the end must equal the bytes forwarded.
module tb_rate_limit;
  import xp_pkg::*;
  import xp_tb_pkg::*;

  localparam int FT_AW = 12, UET_AW = 10, UE_AW = 6, LST_AW = 8, PTR_AW = 4, SLOT_AW = 6;
  localparam int LAT = 20;
  localparam int CYC_PER_US = 10;
  localparam int RUN_US = 12000;
  localparam int PKT = 1000;
  localparam int GAP_US = 5;               // one packet per UE every 5 us

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
  assign now_us = 32'(cyc / CYC_PER_US);

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
                .PTR_AW(PTR_AW), .SLOT_AW(SLOT_AW), .QDEPTH(8)) dut (
    .clk, .rst_n, .now_us, .init_done,
    .in_valid, .in_ready, .in_pkt, .ctrl_valid, .ctrl_ready, .ctrl,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .eg_valid, .eg, .cpu_valid, .cpu_pkt, .stats);

  dram_server_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_ready, .rsp);

  // UE u: IP 10.0.0.(u+1), rate 125 B/us, over-quota rate and quota below
  localparam logic [15:0] LOW   [3] = '{16'd32, 16'd64, 16'd0};
  localparam logic [15:0] QUOTA [3] = '{16'd8, 16'd12, 16'd0};

  pkt_t   flow [3];
  longint fwd_bytes [3];
  longint win_bytes [3][2];                 // [ue][0: before quota, 1: after]
  int     win_lo [3][2], win_hi [3][2];
  int     next_id = 1;

  function automatic int ue_of(input logic [31:0] ip);
    return int'(ip - 32'h0A00_0001);
  endfunction

  always @(posedge clk) if (rst_n && eg_valid && eg.pkt.dir == DIR_DL) begin
    automatic int u = ue_of(eg.pkt.tuple.dst_ip);
    automatic int t = int'(now_us);
    fwd_bytes[u] += longint'(eg.pkt.len);
    for (int w = 0; w < 2; w++)
      if (t >= win_lo[u][w] && t < win_hi[u][w]) win_bytes[u][w] += longint'(eg.pkt.len);
  end

  always @(posedge clk) if (rst_n && cpu_valid) begin
    failures++;
    $display("FAIL: packet %0d sent to the CPU", cpu_pkt.id);
  end

  task automatic send(input pkt_t p);
    @(negedge clk);
    in_valid = 1; in_pkt = p; in_pkt.id = 32'(next_id); in_pkt.len = 16'(PKT);
    do @(posedge clk); while (!in_ready);
    next_id++;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    ue_entry_t  e;
    pdr_block_t b;
    ft_entry_t  f;
    longint     expect_b, tol;
    // steady windows, in us: all UEs at 1 Gb/s early on; UE 0 and UE 1 after
    // their quota switch (about 4.2 ms and 6.3 ms at 125 B/us)
    win_lo = '{'{500, 5000}, '{500, 7500}, '{500, 500}};
    win_hi = '{'{3500, RUN_US}, '{5500, RUN_US}, '{RUN_US, RUN_US}};
    for (int u = 0; u < 3; u++) begin
      fwd_bytes[u] = 0; win_bytes[u][0] = 0; win_bytes[u][1] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);

    for (int u = 0; u < 3; u++) begin
      flow[u] = mk_pkt(0, DIR_DL, 32'h0808_0808, 32'h0A00_0001 + 32'(u), 16'd443,
                       16'd5000, 8'd17, 0);
      e = '0; e.valid = 1; e.key = ue_key_of(flow[u]); e.pdr_base = 32'(10 * u);
      e.nblk = 1; e.buf_idx = 32'(u);
      u_mem.install_ue(ue_hash(e.key, UET_AW), e);
      b = '0;
      b[0] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'(100 + u), 16'd125, LOW[u], QUOTA[u]));
      u_mem.install_pdr(32'(10 * u), b);
    end

    while (int'(now_us) < RUN_US) begin
      automatic int t0 = int'(now_us);
      for (int u = 0; u < 3; u++) send(flow[u]);
      wait (int'(now_us) >= t0 + GAP_US);
    end
    repeat (200) @(negedge clk);

    for (int u = 0; u < 3; u++) begin
      for (int w = 0; w < 2; w++) begin
        automatic longint rate = (w == 0 || QUOTA[u] == 0) ? 125 : longint'(LOW[u]);
        automatic longint span = longint'(win_hi[u][w] - win_lo[u][w]);
        expect_b = rate * span;
        tol = expect_b / 100 + PKT;
        $display("UE-%0d window %0d..%0d us: %0d bytes, %0d Mb/s (metered %0d Mb/s)",
                 u, win_lo[u][w], win_hi[u][w], win_bytes[u][w],
                 win_bytes[u][w] * 8 / span, rate * 8);
        check(win_bytes[u][w] >= expect_b - tol && win_bytes[u][w] <= expect_b + tol,
              $sformatf("UE-%0d window %0d rate", u, w));
      end
      f = u_mem.get_ft(tuple_hash(flow[u].tuple, FT_AW));
      check(f.valid && longint'(f.st.bytes) == fwd_bytes[u],
            $sformatf("UE-%0d DRAM byte count %0d, forwarded %0d", u, f.st.bytes, fwd_bytes[u]));
    end
    check(stats.meter_drops > 0, "meter drops happened");
    check(stats.lst_merges == 0 && stats.state_wbs > 0, "one writeback per packet at this spacing");
    $display("stats: fast=%0d slow=%0d meter_drops=%0d wbs=%0d", stats.fast_hits,
             stats.slow_lookups, stats.meter_drops, stats.state_wbs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((RUN_US + 100) * CYC_PER_US) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
