// ue_state_table: small on-chip memory holding each UE's paging state.
//
// Two bits per UE, indexed by the UE's buffer index:
//   idle      - the UE is disconnected; its downlink traffic is buffered.
//   buffering - the UE's paging buffer may hold packets, so new downlink
//               packets must queue behind them to keep their order. Set
//               when the UE goes idle, cleared by the read loop when it finds
//               the buffer empty while the UE is connected.
// After reset a sweep clears one entry per cycle; init_done rises when all
// 2**UE_AW entries are clear. Reads are combinational, writes take effect at
// the next clock edge, one write per cycle.
// Keeping the idle state in a small on-chip memory follows the design; the
// second bit and the sweep are this design's choices.
module ue_state_table #(
  parameter int UE_AW = 20             // 2**20 = 1M UEs
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             init_done,

  input  logic [UE_AW-1:0] rd_idx,
  output logic             rd_idle,
  output logic             rd_buffering,

  input  logic             set_idle,   // idle <= 1, buffering <= 1
  input  logic             set_awake,  // idle <= 0
  input  logic             clr_buf,    // buffering <= 0
  input  logic [UE_AW-1:0] wr_idx
);
  localparam int UES = 1 << UE_AW;

  logic [1:0]       st [UES];          // {idle, buffering}
  logic [UE_AW-1:0] sweep;

  assign rd_idle      = st[rd_idx][1];
  assign rd_buffering = st[rd_idx][0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep     <= '0;
      init_done <= 1'b0;
    end else if (!init_done) begin
      st[sweep] <= 2'b00;
      sweep     <= sweep + 1'b1;
      if (sweep == UE_AW'(UES - 1)) init_done <= 1'b1;
    end else if (set_idle) begin
      st[wr_idx] <= 2'b11;
    end else if (set_awake) begin
      st[wr_idx][1] <= 1'b0;
    end else if (clr_buf) begin
      st[wr_idx][0] <= 1'b0;
    end
  end

  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({set_idle, set_awake, clr_buf}));
endmodule
