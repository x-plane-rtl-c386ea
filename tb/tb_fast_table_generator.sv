// tb_fast_table_generator: checks the flow rule written for a matched PDR:
// write op, index = CRC of the 5-tuple, valid key, rule and buffer index.
module tb_fast_table_generator;
  import xp_pkg::*;
  import xp_tb_pkg::*;
  localparam int AW = 10;
  int checks = 0, failures = 0;

  pkt_t      pkt;
  meta_t     meta;
  rule_t     rule;
  rdma_req_t req;

  fast_table_generator #(.FT_AW(AW)) dut (.pkt, .meta, .rule, .req);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 30; i++) begin
      pkt  = mk_pkt($urandom, DIR_UL, $urandom, $urandom, 16'($urandom), 16'($urandom), 8'd17, 16'd64);
      meta = '0; meta.buf_idx = $urandom & 32'hFFFF;
      rule = mk_rule(ACT_FORWARD, $urandom, 16'($urandom), 16'($urandom), 16'($urandom));
      #1;
      check(req.op == OP_FT_INSERT, "op");
      check(req.addr == tuple_hash(pkt.tuple, AW), "index");
      check(req.ft.valid && req.ft.key == pkt.tuple, "key");
      check(req.ft.rule == rule && req.ft.buf_idx == meta.buf_idx, "rule and buffer index");
      check(req.ft.st == '0, "state field untouched");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
