// tb_paging_buffer: runs the paging buffer against the DRAM server model.
// UE 3 goes idle and ten downlink packets are buffered; the UE reconnects
// and ten more packets arrive while the read loop drains the ring. All
// twenty must reach the UE in arrival order, the loop must end on its own,
// the pointers written back to DRAM must describe an empty ring, and later
// packets must bypass the ring. UE 5 is sent more packets than its ring
// holds and the excess must be dropped; it is then released twice, the
// second notification arriving while the loop runs, and each kept packet
// must still leave exactly once. The harness plays the role of the
// surrounding pipeline: one event per cycle, responses first.
module tb_paging_buffer;
  import xp_pkg::*;
  import xp_tb_pkg::*;
  localparam int SLOT_AW = 4;              // 16 slots, 15 usable
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // paging buffer
  logic        enq_valid, rel_valid, ptr_rsp_valid, buf_rsp_valid, ack_valid;
  logic [31:0] ue;
  pkt_t        pkt;
  meta_t       meta;
  logic        accept, req_valid, eg_valid, full_drop, clr_buf, stored, wb_valid;
  rdma_req_t   req, wb_req;
  egress_t     eg;
  logic        idle [8], bufg [8];

  paging_buffer #(.SLOT_AW(SLOT_AW), .PTR_AW(4)) dut (
    .clk, .rst_n, .enq_valid, .rel_valid, .ptr_rsp_valid, .buf_rsp_valid, .ack_valid,
    .ue, .pkt, .meta, .rsp_ptr(rsp.ptr), .rsp_next(rsp.next),
    .ue_idle(idle[ue[2:0]]), .ue_buffering(bufg[ue[2:0]]),
    .accept, .req_valid, .req, .eg_valid, .eg, .full_drop, .clr_buf, .stored, .wb_valid, .wb_req);

  // request queue and DRAM
  logic      q_space2, m_req_valid, m_req_ready, m_rsp_valid, m_rsp_ready;
  rdma_req_t m_req;
  rdma_rsp_t rsp;
  rdma_req_queue #(.DEPTH(8)) u_q (.clk, .rst_n, .in0_valid(wb_valid), .in0(wb_req),
    .in1_valid(req_valid), .in1(req), .space2(q_space2),
    .out_valid(m_req_valid), .out(m_req), .out_ready(m_req_ready));
  dram_server_model #(.LAT(10)) u_mem (.clk, .rst_n, .req_valid(m_req_valid), .req_ready(m_req_ready),
    .req(m_req), .rsp_valid(m_rsp_valid), .rsp_ready(m_rsp_ready), .rsp(rsp));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pending work of the harness
  typedef struct packed { logic rel; logic [31:0] ue; pkt_t pkt; } op_t;
  op_t ops [$];
  logic take_rsp, take_op;

  assign take_rsp    = m_rsp_valid && q_space2;
  assign m_rsp_ready = q_space2;
  assign take_op     = !m_rsp_valid && q_space2 && ops.size() > 0;

  always_comb begin
    enq_valid = 0; rel_valid = 0; ptr_rsp_valid = 0; buf_rsp_valid = 0; ack_valid = 0;
    ue = '0; pkt = '0; meta = '0;
    if (take_rsp) begin
      ue = rsp.meta.buf_idx; pkt = rsp.pkt; meta = rsp.meta;
      ptr_rsp_valid = rsp.op == OP_PTR_READ;
      buf_rsp_valid = rsp.op == OP_BUF_READ;
      ack_valid     = rsp.op == OP_PTR_WB;
    end else if (take_op) begin
      ue = ops[0].ue; pkt = ops[0].pkt;
      meta.buf_idx = ops[0].ue;
      meta.rule = mk_rule(ACT_ENCAP, 32'(ops[0].ue));
      enq_valid = !ops[0].rel;
      rel_valid = ops[0].rel;
    end
  end

  int got3 [$], got5 [$], bypass3, drops;
  logic fb3 [int];
  always @(posedge clk) if (rst_n) begin
    if (take_op && accept) void'(ops.pop_front());
    if (clr_buf) bufg[ue[2:0]] <= 1'b0;
    if (full_drop) drops++;
    if (eg_valid) begin
      if (eg.rule.teid == 3) begin
        got3.push_back(int'(eg.pkt.id));
        fb3[int'(eg.pkt.id)] = eg.from_buffer;
        if (!eg.from_buffer) bypass3++;
      end else got5.push_back(int'(eg.pkt.id));
    end
  end

  task automatic send(input int u, input int id);
    op_t o;
    o.rel = 0; o.ue = 32'(u);
    o.pkt = mk_pkt(32'(id), DIR_DL, 32'h0808_0808, 32'h1400_0000 + 32'(u), 16'd443, 16'd5000, 8'd6, 16'd500);
    ops.push_back(o);
  endtask

  task automatic release_ue(input int u);
    op_t o;
    o = '0; o.rel = 1; o.ue = 32'(u);
    idle[u] = 1'b0;
    ops.push_back(o);
  endtask

  ptr_t p;
  initial begin
    for (int i = 0; i < 8; i++) begin idle[i] = 0; bufg[i] = 0; end
    drops = 0; bypass3 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    idle[3] = 1; bufg[3] = 1;
    idle[5] = 1; bufg[5] = 1;
    for (int i = 1; i <= 10; i++) begin send(3, i); repeat (3) @(negedge clk); end
    for (int i = 101; i <= 120; i++) send(5, i);
    repeat (400) @(negedge clk);
    check(got3.size() == 0 && got5.size() == 0, "nothing leaves while the UEs are idle");
    check(drops == 5, $sformatf("ring of 15 drops 5 of 20 (%0d)", drops));

    release_ue(3);
    for (int i = 11; i <= 20; i++) begin repeat (25) @(negedge clk); send(3, i); end
    repeat (600) @(negedge clk);
    check(got3.size() == 20, $sformatf("all 20 packets reach UE 3 (%0d)", got3.size()));
    for (int i = 0; i < got3.size(); i++) check(got3[i] == i + 1, $sformatf("order at %0d: %0d", i, got3[i]));
    check(!bufg[3], "loop ended and cleared buffering");
    p = u_mem.get_ptr(3);
    check(p.p_in == p.p_out && p.p_in != 0, $sformatf("pointers written back (%0d,%0d)", p.p_in, p.p_out));
    check(fb3[11], "a packet arriving during the release queues behind the buffer");

    for (int i = 21; i <= 23; i++) begin send(3, i); repeat (5) @(negedge clk); end
    repeat (100) @(negedge clk);
    check(got3.size() == 23 && !fb3[21] && !fb3[22] && !fb3[23], "later packets bypass the ring");

    release_ue(5);
    repeat (60) @(negedge clk);
    release_ue(5);                         // repeated notification during the drain
    repeat (600) @(negedge clk);
    check(got5.size() == 15, $sformatf("UE 5 releases the 15 kept packets once (%0d)", got5.size()));
    for (int i = 0; i < got5.size(); i++) check(got5[i] == 101 + i, "UE 5 order");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
