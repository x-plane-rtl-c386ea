// local_state_table: on-chip Local State Table (LST) that keeps state held in
// external DRAM consistent while several reads of it are in flight.
//
// A flow's busy period is the time during which it has at least one read of
// its external state outstanding. The first read request of a busy period
// allocates an entry (key, in-flight counter = 1, not loaded); each further
// request increments the counter. Each read response decrements it. The
// first response of the period loads the state from DRAM; later responses
// carry stale values, which are dropped, and the update is applied to the
// local copy instead. When the counter returns to zero the local state is
// written back once (collapsed writeback). The entry stays until the write
// response returns and is then removed if no new read is in flight; a new
// busy period that starts meanwhile keeps using the local copy. An entry that
// never loaded (all its responses were rejected) is freed at once.
//
// Entries are indexed by a CRC hash of the key. A request whose slot holds a
// different key is refused (req_ok = 0); the caller sends that packet to the
// CPU. The table thus follows the design's register-array LST with a
// collision check; its depth is a parameter.
//
// Interface, one operation per cycle at most, all outputs combinational:
//   req  - a read request for req_key is about to be sent (req_ok says if it may)
//   rsp  - a read response for rsp_key arrived carrying rsp_state.
//          cur_state is the value to update: rsp_state if the entry has not
//          loaded yet, else the local copy. The caller returns upd_state with
//          upd_en=1 to store it; rsp_dec=0 keeps the in-flight count (used
//          when the response itself issues the next read).
//          wb_valid/wb_key/wb_state show the writeback due in the same cycle.
//   ack  - the write response for ack_key arrived.
// Updates take effect at the next clock edge.
module local_state_table #(
  parameter int KEY_W   = 104,
  parameter int STATE_W = 96,
  parameter int AW      = 11,          // 2**AW entries
  parameter int CNT_W   = 32           // in-flight counter, 4 bytes
) (
  input  logic               clk,
  input  logic               rst_n,

  input  logic               req_valid,
  input  logic [KEY_W-1:0]   req_key,
  output logic               req_ok,

  input  logic               rsp_valid,
  input  logic [KEY_W-1:0]   rsp_key,
  input  logic [STATE_W-1:0] rsp_state,
  input  logic               rsp_dec,
  output logic               rsp_hit,
  output logic [STATE_W-1:0] cur_state,
  output logic               cur_loaded,
  input  logic               upd_en,
  input  logic [STATE_W-1:0] upd_state,

  input  logic               ack_valid,
  input  logic [KEY_W-1:0]   ack_key,

  output logic               wb_valid,
  output logic [KEY_W-1:0]   wb_key,
  output logic [STATE_W-1:0] wb_state,

  output logic [AW:0]        occupancy
);
  localparam int DEPTH = 1 << AW;

  logic [DEPTH-1:0]   valid;
  logic [KEY_W-1:0]   keys     [DEPTH];
  logic [CNT_W-1:0]   inflight [DEPTH];
  logic               loaded   [DEPTH];
  logic [STATE_W-1:0] lstate   [DEPTH];

  logic [AW-1:0] req_idx, rsp_idx, ack_idx;
  crc_hash #(.IN_W(KEY_W), .OUT_W(AW)) u_hreq (.key(req_key), .hash(req_idx));
  crc_hash #(.IN_W(KEY_W), .OUT_W(AW)) u_hrsp (.key(rsp_key), .hash(rsp_idx));
  crc_hash #(.IN_W(KEY_W), .OUT_W(AW)) u_hack (.key(ack_key), .hash(ack_idx));

  logic req_same, req_free, ack_hit;
  logic [CNT_W-1:0] rsp_if_next;
  logic             rsp_loaded_next;

  always_comb begin
    req_free  = !valid[req_idx];
    req_same  = valid[req_idx] && keys[req_idx] == req_key;
    req_ok    = req_free || req_same;

    rsp_hit    = valid[rsp_idx] && keys[rsp_idx] == rsp_key;
    cur_loaded = rsp_hit && loaded[rsp_idx];
    cur_state  = cur_loaded ? lstate[rsp_idx] : rsp_state;

    rsp_if_next     = inflight[rsp_idx] - (rsp_dec ? CNT_W'(1) : CNT_W'(0));
    rsp_loaded_next = cur_loaded || upd_en;

    wb_valid = rsp_valid && rsp_hit && rsp_if_next == '0 && rsp_loaded_next;
    wb_key   = rsp_key;
    wb_state = upd_en ? upd_state : lstate[rsp_idx];

    ack_hit  = valid[ack_idx] && keys[ack_idx] == ack_key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= '0;
      occupancy <= '0;
    end else if (req_valid && req_ok) begin
      if (req_free) begin
        valid[req_idx]    <= 1'b1;
        keys[req_idx]     <= req_key;
        inflight[req_idx] <= CNT_W'(1);
        loaded[req_idx]   <= 1'b0;
        occupancy         <= occupancy + 1'b1;
      end else begin
        inflight[req_idx] <= inflight[req_idx] + CNT_W'(1);
      end
    end else if (rsp_valid && rsp_hit) begin
      inflight[rsp_idx] <= rsp_if_next;
      if (upd_en) begin
        lstate[rsp_idx] <= upd_state;
        loaded[rsp_idx] <= 1'b1;
      end
      if (rsp_if_next == '0 && !rsp_loaded_next) begin
        valid[rsp_idx] <= 1'b0;
        occupancy      <= occupancy - 1'b1;
      end
    end else if (ack_valid && ack_hit && inflight[ack_idx] == '0) begin
      valid[ack_idx] <= 1'b0;
      occupancy      <= occupancy - 1'b1;
    end
  end

  // One operation per cycle; a response must find its entry.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({req_valid, rsp_valid, ack_valid}));
  a_rsp_has_entry: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> rsp_hit);
endmodule
