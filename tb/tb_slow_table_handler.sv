// tb_slow_table_handler: checks the UE key for uplink and downlink packets
// and its table index, the UE entry verdicts (hit, no session, collision),
// the first PDR block address, and PDR block iteration up to the last block.
module tb_slow_table_handler;
  import xp_pkg::*;
  import xp_tb_pkg::*;
  localparam int AW = 9;
  int checks = 0, failures = 0;

  pkt_t        pkt;
  meta_t       meta, ue_meta, pdr_meta;
  ue_key_t     ue_key;
  logic [31:0] ue_addr, ue_pdr_addr, pdr_addr;
  ue_entry_t   ue_rsp;
  pdr_block_t  pdr_rsp;
  logic        ue_hit, ue_absent, ue_collide, pdr_hit, pdr_more, pdr_none;
  rule_t       pdr_rule;

  slow_table_handler #(.UE_AW(AW)) dut (.pkt, .meta, .ue_key, .ue_addr, .ue_rsp, .ue_hit,
    .ue_absent, .ue_collide, .ue_meta, .pdr_rsp, .pdr_hit, .pdr_rule, .pdr_more, .pdr_none,
    .pdr_meta, .ue_pdr_addr, .pdr_addr);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // uplink key: TEID, UE source IP, QFI
    pkt = mk_pkt(1, DIR_UL, 32'h1400_0017, 32'h0808_0808, 16'd5000, 16'd443, 8'd6, 100, 32'd777, 6'd3);
    meta = '0;
    #1 check(ue_key.teid == 777 && ue_key.ue_ip == 32'h1400_0017 && ue_key.qfi == 3 && ue_key.dir == DIR_UL, "uplink key");
    check(ue_addr == ue_hash(ue_key_of(pkt), AW), "uplink index");
    // downlink key: UE destination IP only
    pkt = mk_pkt(2, DIR_DL, 32'h0808_0808, 32'h1400_0017, 16'd443, 16'd5000, 8'd6, 100, 32'd777, 6'd3);
    #1 check(ue_key.teid == 0 && ue_key.qfi == 0 && ue_key.ue_ip == 32'h1400_0017, "downlink key");
    check(ue_addr == ue_hash(ue_key_of(pkt), AW), "downlink index");

    ue_rsp = '0;
    #1 check(ue_absent && !ue_hit && !ue_collide, "empty UE slot");
    ue_rsp.valid = 1; ue_rsp.key = ue_key_of(pkt); ue_rsp.pdr_base = 40; ue_rsp.nblk = 3; ue_rsp.buf_idx = 12;
    #1 check(ue_hit && ue_pdr_addr == 40 && ue_meta.blk == 0 && ue_meta.nblk == 3 && ue_meta.buf_idx == 12, "UE hit");
    ue_rsp.nblk = 12;
    #1 check(ue_meta.nblk == 8, "PDR list capped at 8 blocks");
    ue_rsp.key.ue_ip = 32'h1400_0018;
    #1 check(ue_collide && !ue_hit, "UE collision");

    // PDR iteration: nothing matches in blocks 0..2 of 3
    pdr_rsp = '0;
    meta = '0; meta.pdr_base = 40; meta.nblk = 3;
    for (int b = 0; b < 3; b++) begin
      meta.blk = 4'(b);
      #1;
      if (b < 2) check(pdr_more && !pdr_none && pdr_addr == 32'(40 + b + 1) && pdr_meta.blk == 4'(b + 1), "next block");
      else       check(pdr_none && !pdr_more, "list exhausted");
    end
    pdr_rsp[3] = mk_pdr_any(mk_rule(ACT_ENCAP, 32'd4242));
    #1 check(pdr_hit && pdr_rule.teid == 4242 && !pdr_more && !pdr_none, "match in last block");

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
