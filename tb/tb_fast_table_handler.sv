// tb_fast_table_handler: checks the flow table read index (CRC of the
// 5-tuple, FT_AW bits) and the hit, miss and collision verdicts.
module tb_fast_table_handler;
  import xp_pkg::*;
  import xp_tb_pkg::*;
  localparam int AW = 12;
  int checks = 0, failures = 0;

  pkt_t        in_pkt, rsp_pkt;
  ft_entry_t   rsp_ft;
  logic [31:0] rd_addr;
  logic        hit, miss, collide;

  fast_table_handler #(.FT_AW(AW)) dut (.in_pkt, .rd_addr, .rsp_pkt, .rsp_ft, .hit, .miss, .collide);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 50; i++) begin
      in_pkt = mk_pkt($urandom, DIR_DL, $urandom, $urandom, 16'($urandom), 16'($urandom), 8'($urandom), 16'($urandom));
      rsp_pkt = in_pkt;
      rsp_ft = '0;
      #1 check(rd_addr == tuple_hash(in_pkt.tuple, AW), "read index");
      check(miss && !hit && !collide, "empty slot is a miss");
      rsp_ft.valid = 1; rsp_ft.key = in_pkt.tuple;
      #1 check(hit && !miss && !collide, "hit");
      rsp_ft.key.dst_port = rsp_ft.key.dst_port ^ 16'h1;
      #1 check(collide && !hit && !miss, "collision");
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
