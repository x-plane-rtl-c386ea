// tb_local_state_table: replays the busy-period example of the collapsed
// writeback (six packets of 100..600 bytes, the stored count starting at
// 100) and checks the local byte count after every response (200, 400, 700,
// 1100, 1600), the in-flight count after every event, the single writeback of
// 1600 when the busy period ends, the next busy period reusing the local copy,
// and entry removal on the write response. Then checks hash-collision refusal
// and that an entry whose responses were all rejected is freed at once.
module tb_local_state_table;
  import xp_tb_pkg::*;
  localparam int AW = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         req_valid = 0, rsp_valid = 0, ack_valid = 0, rsp_dec = 1, upd_en = 0;
  logic [103:0] req_key = '0, rsp_key = '0, ack_key = '0;
  logic [31:0]  rsp_state = '0, upd_state, cur_state, wb_state;
  logic [103:0] wb_key;
  logic         req_ok, rsp_hit, cur_loaded, wb_valid;
  logic [AW:0]  occ;

  local_state_table #(.KEY_W(104), .STATE_W(32), .AW(AW)) dut (
    .clk, .rst_n, .req_valid, .req_key, .req_ok,
    .rsp_valid, .rsp_key, .rsp_state, .rsp_dec, .rsp_hit, .cur_state, .cur_loaded,
    .upd_en, .upd_state, .ack_valid, .ack_key, .wb_valid, .wb_key, .wb_state, .occupancy(occ));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int slot(input logic [103:0] k);
    return int'(crc32_ref(1024'(k), 104) & ((1 << AW) - 1));
  endfunction

  logic [31:0] last_wb;
  int          n_wb;
  logic        pkt_size_add;
  logic [31:0] add_bytes;
  assign upd_state = cur_state + add_bytes;

  always @(posedge clk) if (wb_valid) begin last_wb <= wb_state; n_wb <= n_wb + 1; end

  task automatic do_req(input logic [103:0] k, input logic expect_ok);
    @(negedge clk);
    req_valid = 1; req_key = k;
    #1 check(req_ok == expect_ok, "req_ok");
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic do_rsp(input logic [103:0] k, input logic [31:0] dram, input logic [31:0] bytes,
                        input logic en, output logic wb);
    @(negedge clk);
    rsp_valid = 1; rsp_key = k; rsp_state = dram; add_bytes = bytes; upd_en = en;
    #1 wb = wb_valid;
    @(negedge clk);
    rsp_valid = 0; upd_en = 0;
  endtask

  task automatic do_ack(input logic [103:0] k);
    @(negedge clk);
    ack_valid = 1; ack_key = k;
    @(negedge clk);
    ack_valid = 0;
  endtask

  logic [103:0] fk, other;
  int           s;
  logic         wb;
  int           sizes [6] = '{100, 200, 300, 400, 500, 600};

  initial begin
    n_wb = 0; last_wb = 0; add_bytes = 0;
    fk = {32'h0102_0304, 32'h1516_1718, 16'd1234, 16'd8080, 8'd6};
    s  = slot(fk);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // t1, t2
    do_req(fk, 1); check(dut.inflight[s] == 1, "in-flight after t1");
    do_req(fk, 1); check(dut.inflight[s] == 2, "in-flight after t2");
    // s1: loads 100 from DRAM, adds 100
    do_rsp(fk, 100, sizes[0], 1, wb);
    check(dut.lstate[s] == 200 && dut.inflight[s] == 1 && !wb, "LBC after s1");
    do_req(fk, 1); do_req(fk, 1);
    check(dut.inflight[s] == 3, "in-flight after t4");
    do_rsp(fk, 100, sizes[1], 1, wb);     // stale 100 dropped
    check(dut.lstate[s] == 400 && dut.inflight[s] == 2, "LBC after s2");
    do_req(fk, 1);
    check(dut.inflight[s] == 3, "in-flight after t5");
    do_rsp(fk, 100, sizes[2], 1, wb);
    check(dut.lstate[s] == 700 && dut.inflight[s] == 2, "LBC after s3");
    do_rsp(fk, 100, sizes[3], 1, wb);
    check(dut.lstate[s] == 1100 && dut.inflight[s] == 1 && !wb, "LBC after s4");
    do_rsp(fk, 100, sizes[4], 1, wb);
    check(dut.lstate[s] == 1600 && dut.inflight[s] == 0, "LBC after s5");
    check(wb && n_wb == 1 && last_wb == 1600, "single writeback of 1600 at s5");
    check(occ == 1, "entry kept until the write response");
    // t6 before the write response: the entry is retained
    do_req(fk, 1);
    do_ack(fk);
    check(occ == 1 && dut.inflight[s] == 1, "entry retained on ack with a packet in flight");
    do_rsp(fk, 1600, sizes[5], 1, wb);
    check(wb && n_wb == 2 && last_wb == 2200, "second busy period writes 2200");
    do_ack(fk);
    check(occ == 0, "entry removed on ack with nothing in flight");

    // collision: find another key on the same slot
    do_req(fk, 1);
    other = fk;
    do begin other[15:0] = 16'($urandom); end while (slot(other) != s || other == fk);
    do_req(other, 0);
    check(dut.inflight[s] == 1, "refused request does not count");
    // the response was rejected by the caller: entry freed without writeback
    do_rsp(fk, 0, 0, 0, wb);
    check(!wb && occ == 0, "never-loaded entry freed at once");
    do_req(other, 1);
    check(occ == 1, "slot reusable");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
