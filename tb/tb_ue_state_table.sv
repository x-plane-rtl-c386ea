// tb_ue_state_table: checks the clearing sweep after reset (init_done after
// 2**UE_AW cycles, every entry clear), idle marking, reconnection keeping the
// buffering bit, its clearing, and that entries do not disturb each other.
module tb_ue_state_table;
  localparam int AW = 6;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          init_done, rd_idle, rd_buffering;
  logic          set_idle = 0, set_awake = 0, clr_buf = 0;
  logic [AW-1:0] rd_idx = '0, wr_idx = '0;
  int            cyc;

  ue_state_table #(.UE_AW(AW)) dut (.clk, .rst_n, .init_done, .rd_idx, .rd_idle, .rd_buffering,
    .set_idle, .set_awake, .clr_buf, .wr_idx);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int op, input int idx);
    @(negedge clk);
    wr_idx = AW'(idx);
    set_idle = op == 0; set_awake = op == 1; clr_buf = op == 2;
    @(negedge clk);
    set_idle = 0; set_awake = 0; clr_buf = 0;
  endtask

  task automatic rd(input int idx, input logic idle, input logic bufg, input string what);
    rd_idx = AW'(idx);
    #1 check(rd_idle == idle && rd_buffering == bufg, what);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!init_done) begin @(negedge clk); cyc++; end
    check(cyc == (1 << AW), $sformatf("sweep length %0d", cyc));
    for (int i = 0; i < (1 << AW); i++) rd(i, 0, 0, "clear after sweep");
    wr(0, 5);
    rd(5, 1, 1, "idle sets both bits");
    rd(4, 0, 0, "neighbour untouched");
    wr(1, 5);
    rd(5, 0, 1, "reconnect keeps buffering");
    wr(2, 5);
    rd(5, 0, 0, "buffering cleared");
    wr(0, 63); wr(0, 0);
    rd(63, 1, 1, "last entry"); rd(0, 1, 1, "first entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
