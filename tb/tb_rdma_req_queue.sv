// tb_rdma_req_queue: pushes numbered requests one or two per cycle against
// a randomly stalling consumer and checks that they leave in push order
// (in0 ahead of in1), that nothing is lost, and that space2 holds the
// producer off before the queue overflows.
module tb_rdma_req_queue;
  import xp_pkg::*;
  localparam int N = 400;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in0_valid = 0, in1_valid = 0, space2, out_valid, out_ready = 0;
  rdma_req_t in0 = '0, in1 = '0, out;
  int        sent = 0, got = 0, full_seen = 0;

  rdma_req_queue #(.DEPTH(8)) dut (.clk, .rst_n, .in0_valid, .in0, .in1_valid, .in1, .space2,
    .out_valid, .out, .out_ready);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom % 3) == 0;
    in0_valid = 0; in1_valid = 0;
    if (!space2) full_seen++;
    if (space2 && sent < N) begin
      case ($urandom % 3)
        0: ;
        1: begin in0_valid = 1; in0.addr = sent; sent++; end
        default: begin
          in0_valid = 1; in0.addr = sent; in1_valid = 1; in1.addr = sent + 1; sent += 2;
        end
      endcase
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    check(out.addr == 32'(got), $sformatf("order: got %0d expected %0d", out.addr, got));
    got++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (got == N);
    check(full_seen > 0, "queue filled at least once");
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
