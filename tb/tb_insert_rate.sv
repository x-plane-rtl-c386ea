// tb_insert_rate: flow rule generation speed with every packet on the slow
// path, for 5, 10, 20 and 40 PDRs searched.
//
// For each search depth k blocks (k = 1, 2, 4, 8) a UE is installed whose
// only matching PDR is the last one of its list, and 256 packets of 256 new
// downlink flows to that UE are offered back to back. The pipeline handles
// one event per cycle, and each new flow costs k + 5 of them: its ingress,
// the flow table, UE table and k PDR block responses, and the acks of the
// rule insert and of the state writeback (k + 4 requests on the link, one
// per cycle, are fewer). Generation is therefore bounded by one rule every
// k + 5 cycles. The testbench counts rule inserts on the request link from
// the first to the last and checks:
//   - every flow got exactly one rule, and the rules land in DRAM,
//   - the rate is within 5% of one rule per k + 5 cycles,
//   - the rate falls as the search gets deeper.
// Default local state table (2048 entries) and paging sizes; a 2^16-entry
// flow table keeps hash collisions rare, and a collided flow is simply not
// counted.
module tb_insert_rate;
  import xp_pkg::*;
  import xp_tb_pkg::*;

  localparam int FT_AW = 16, UET_AW = 10, UE_AW = 6;
  localparam int LAT = 20;
  localparam int NFLOW = 256;
  localparam int NRUN = 4;
  localparam int DEPTH [NRUN] = '{1, 2, 4, 8};

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

  // inserts seen on the request link
  int     n_ins = 0, n_cpu = 0, n_eg = 0;
  longint first_ins = 0, last_ins = 0;
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready && req.op == OP_FT_INSERT) begin
      if (n_ins == 0) first_ins = cyc;
      n_ins++;
      last_ins = cyc;
    end
    if (cpu_valid) n_cpu++;
    if (eg_valid) n_eg++;
  end

  function automatic pkt_t flow_pkt(input int r, input int i);
    return mk_pkt(32'(i), DIR_DL, 32'h0909_0000 + 32'(i), 32'h0A02_0000 + 32'(r),
                  16'(2000 + i), 16'(3000 + r), 8'd17, 16'd128);
  endfunction

  real rate [NRUN];

  initial begin
    ue_entry_t  e;
    pdr_block_t b;
    pkt_t       p;
    longint     span;
    int         clean;
    ft_entry_t  f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);

    for (int r = 0; r < NRUN; r++) begin
      automatic int k = DEPTH[r];
      p = flow_pkt(r, 0);
      e = '0; e.valid = 1; e.key = ue_key_of(p); e.pdr_base = 32'(16 * r);
      e.nblk = 4'(k); e.buf_idx = 32'(r);
      u_mem.install_ue(ue_hash(e.key, UET_AW), e);
      for (int j = 0; j < k; j++) begin
        for (int i = 0; i < PDRS_PER_BLOCK; i++)
          b[i] = mk_pdr_port(16'd1, mk_rule(ACT_DROP));      // port 1 is never used
        if (j == k - 1) b[PDRS_PER_BLOCK-1] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'(50 + r)));
        u_mem.install_pdr(32'(16 * r + j), b);
      end

      n_ins = 0; n_cpu = 0; n_eg = 0;
      @(negedge clk);
      for (int i = 0; i < NFLOW; i++) begin
        in_valid = 1; in_pkt = flow_pkt(r, i);
        do @(posedge clk); while (!in_ready);
        @(negedge clk);
      end
      in_valid = 0;
      repeat ((k + 6) * (LAT + 1) + 200) @(negedge clk);

      span = last_ins - first_ins;
      rate[r] = real'(n_ins - 1) / real'(span);
      $display("%0d PDRs searched: %0d rules, %0d cycles from first to last, %0.4f per cycle (bound 1/%0d = %0.4f), %0d to CPU, %0d stall cycles",
               PDRS_PER_BLOCK * k, n_ins, span, rate[r], k + 5, 1.0 / (k + 5), n_cpu, stats.stalls);
      check(n_ins + n_cpu == NFLOW && n_eg == n_ins, $sformatf("%0d blocks: every flow got a rule or went to the CPU", k));
      check(n_cpu <= NFLOW / 16, $sformatf("%0d blocks: few collisions (%0d)", k, n_cpu));
      check(rate[r] >= 0.95 / real'(k + 5) && rate[r] <= 1.0 / real'(k + 5),
            $sformatf("%0d blocks: one rule per %0d cycles", k, k + 5));
      clean = 0;
      for (int i = 0; i < NFLOW; i++) begin
        p = flow_pkt(r, i);
        f = u_mem.get_ft(tuple_hash(p.tuple, FT_AW));
        if (f.valid && f.key == p.tuple && f.rule.teid == 32'(50 + r)) clean++;
      end
      check(clean >= n_ins - NFLOW / 16, $sformatf("%0d blocks: %0d rules in DRAM", k, clean));
      if (r > 0) check(rate[r] < rate[r-1], "deeper search, fewer rules per second");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
