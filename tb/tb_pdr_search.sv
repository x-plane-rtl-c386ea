// tb_pdr_search: slow-path latency against the depth of the PDR search, for
// UEs whose matching PDR is the last of 5, 10, ... 40 PDRs.
//
// UE k (k = 1..8) has k PDR blocks of five PDRs. Every PDR but the last
// matches only a port the flow does not use, so the search reads all k
// blocks. The first packet of the flow takes the slow path: flow table read,
// UE table read, then one read per PDR block, and must leave after
// (k + 2) round trips plus 2 cycles with the last PDR's TEID. The second
// packet hits the generated flow table rule and must leave after one round
// trip plus one cycle. The PDR block counter must grow by k per UE.
// Reduced tables.
module tb_pdr_search;
  import xp_pkg::*;
  import xp_tb_pkg::*;

  localparam int FT_AW = 12, UET_AW = 10, UE_AW = 6, LST_AW = 8, PTR_AW = 4, SLOT_AW = 6;
  localparam int LAT = 20;
  localparam int RTT = LAT + 1;

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
                .PTR_AW(PTR_AW), .SLOT_AW(SLOT_AW), .QDEPTH(8)) dut (
    .clk, .rst_n, .now_us(32'(cyc / 4)), .init_done,
    .in_valid, .in_ready, .in_pkt, .ctrl_valid, .ctrl_ready, .ctrl,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_ready, .rsp,
    .eg_valid, .eg, .cpu_valid, .cpu_pkt, .stats);

  dram_server_model #(.LAT(LAT)) u_mem (.clk, .rst_n, .req_valid, .req_ready, .req,
    .rsp_valid, .rsp_ready, .rsp);

  longint    sent_at, left_at;
  egress_t   last_eg;
  int        n_eg = 0;

  always @(posedge clk) if (rst_n && eg_valid) begin
    left_at = cyc;
    last_eg = eg;
    n_eg++;
  end

  always @(posedge clk) if (rst_n && cpu_valid) begin
    failures++;
    $display("FAIL: packet %0d sent to the CPU", cpu_pkt.id);
  end

  task automatic send(input pkt_t p);
    @(negedge clk);
    in_valid = 1; in_pkt = p; in_pkt.len = 16'd690;
    do @(posedge clk); while (!in_ready);
    sent_at = cyc;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    ue_entry_t   e;
    pdr_block_t  b;
    pkt_t        p;
    logic [31:0] blocks_before;
    longint      lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);

    for (int k = 1; k <= MAX_PDR_BLOCKS; k++) begin
      // uplink flow of UE k: TEID k, UE 10.1.0.k, QFI 9
      p = mk_pkt(32'(k), DIR_UL, 32'h0A01_0000 + 32'(k), 32'h0808_0404, 16'd7000,
                 16'd443, 8'd6, 0, 32'(k), 6'd9);
      e = '0; e.valid = 1; e.key = ue_key_of(p); e.pdr_base = 32'(16 * k);
      e.nblk = 4'(k); e.buf_idx = 32'(k);
      u_mem.install_ue(ue_hash(e.key, UET_AW), e);
      for (int j = 0; j < k; j++) begin
        for (int i = 0; i < PDRS_PER_BLOCK; i++)
          b[i] = mk_pdr_port(16'(1000 + PDRS_PER_BLOCK * j + i),
                             mk_rule(ACT_DROP, 32'(PDRS_PER_BLOCK * j + i)));
        if (j == k - 1) b[PDRS_PER_BLOCK-1] = mk_pdr_any(mk_rule(ACT_FORWARD, 32'(900 + k)));
        u_mem.install_pdr(32'(16 * k + j), b);
      end

      blocks_before = stats.pdr_blocks;
      n_eg = 0;
      send(p);
      repeat ((k + 4) * RTT) @(negedge clk);
      lat = left_at - sent_at;
      $display("%0d PDRs searched: slow path %0d cycles = %0d round trips + %0d",
               PDRS_PER_BLOCK * k, lat, lat / RTT, lat % RTT);
      check(n_eg == 1 && last_eg.rule.action == ACT_FORWARD && last_eg.rule.teid == 32'(900 + k),
            $sformatf("%0d blocks: last PDR applied", k));
      check(lat == longint'((k + 2) * RTT + 2), $sformatf("%0d blocks: slow path latency %0d", k, lat));
      check(stats.pdr_blocks - blocks_before == 32'(k), $sformatf("%0d blocks read", k));

      n_eg = 0;
      p.id = p.id + 100;
      send(p);
      repeat (3 * RTT) @(negedge clk);
      lat = left_at - sent_at;
      check(n_eg == 1 && last_eg.pkt.id == p.id && lat == longint'(RTT + 1),
            $sformatf("%0d blocks: fast path %0d cycles after the rule was generated", k, lat));
    end
    check(stats.ft_inserts == 32'(MAX_PDR_BLOCKS), "one rule generated per flow");
    check(stats.rule_drops == 0, "no drop rule applied");
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
