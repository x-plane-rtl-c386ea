// xp_pkg: types and constants shared by the UPF data-plane blocks.
//
// The data plane is event driven: every ingress packet, control notification
// and RDMA response is one event, and the packet itself rides inside each
// RDMA request and comes back in the matching response (the external entry
// keeps a slot for the packet, so the ASIC never holds it while waiting).
// Everything the pipeline learns about a packet travels with it as metadata
// (meta_t), the way a switch carries bridged metadata across recirculations.
//
// Sizes that follow the UPF design: the 13-byte flow 5-tuple, the 4-byte
// local byte counter and in-flight counter, 28-byte PDRs grouped five to a
// block, up to 8 blocks (40 PDRs) per UE. Field layouts inside the PDR and
// the table entries, the action encoding and the meter units are this
// design's own choices.
package xp_pkg;

  // ---- sizes --------------------------------------------------------------
  localparam int PDRS_PER_BLOCK = 5;    // PDRs fetched by one RDMA read
  localparam int PDR_BYTES      = 28;   // one PDR
  localparam int MAX_PDR_BLOCKS = 8;    // blocks per UE (40 PDRs)
  localparam int BUCKET_US      = 64;   // token bucket depth, in microseconds of rate

  // ---- packet -------------------------------------------------------------
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } five_tuple_t;                       // 104 bits = 13 bytes

  typedef enum logic {DIR_UL = 1'b0, DIR_DL = 1'b1} dir_e;

  // Packet descriptor: header fields the pipeline looks at plus a tag that
  // stands for the payload.
  typedef struct packed {
    logic [31:0] id;                    // payload tag, opaque to the pipeline
    logic [15:0] len;                   // bytes
    dir_e        dir;                   // uplink (from base station) or downlink
    logic [31:0] teid;                  // GTP-U TEID of an uplink packet
    logic [5:0]  qfi;                   // QoS flow identifier of an uplink packet
    five_tuple_t tuple;                 // inner 5-tuple
  } pkt_t;

  // ---- actions --------------------------------------------------------------
  typedef enum logic [1:0] {
    ACT_DROP    = 2'd0,
    ACT_FORWARD = 2'd1,                 // plain IP forwarding (uplink to the Internet)
    ACT_ENCAP   = 2'd2                  // GTP-U encapsulation with rule.teid (downlink)
  } action_e;

  // Action data of a PDR, copied into the flow table as the "footprint".
  typedef struct packed {
    action_e     action;
    logic [31:0] teid;                  // outer TEID for ACT_ENCAP
    logic [15:0] rate;                  // meter rate, bytes per microsecond, 0 = no meter
    logic [15:0] rate_over_quota;       // meter rate once the byte count passed the quota
    logic [15:0] quota_64k;             // usage quota in 64 KiB units, 0 = none
  } rule_t;                             // 82 bits

  // Packet detection rule: 28 bytes = 224 bits.
  typedef struct packed {
    logic        valid;
    logic [5:0]  qfi;
    logic        qfi_any;
    logic [31:0] remote_ip;             // peer on the Internet side
    logic [5:0]  remote_plen;           // prefix length 0..32, 0 = any
    logic [15:0] rport_lo;              // peer port range
    logic [15:0] rport_hi;
    logic [15:0] lport_lo;              // UE port range
    logic [15:0] lport_hi;
    logic [7:0]  proto;
    logic        proto_any;
    rule_t       rule;
    logic [22:0] rsvd;
  } pdr_t;

  typedef pdr_t [PDRS_PER_BLOCK-1:0] pdr_block_t;

  // ---- state data -----------------------------------------------------------
  typedef struct packed {
    logic [31:0] bytes;                 // cumulative byte count (traffic accounting)
    logic [31:0] tokens;                // meter bucket, bytes
    logic [31:0] last_us;               // time of the last bucket refill
  } state_t;

  typedef struct packed {
    logic [31:0] p_in;                  // tail: next slot to write
    logic [31:0] p_out;                 // head: next slot to release
    logic        draining;              // a read loop runs (only while the entry is in flight)
  } ptr_t;

  // ---- external tables -------------------------------------------------------
  typedef struct packed {
    dir_e        dir;
    logic [31:0] teid;                  // uplink only, else 0
    logic [31:0] ue_ip;                 // UE source (uplink) or destination (downlink) IP
    logic [5:0]  qfi;                   // uplink only, else 0
  } ue_key_t;

  typedef struct packed {
    logic        valid;
    ue_key_t     key;
    logic [31:0] pdr_base;              // index of the UE's first PDR block
    logic [3:0]  nblk;                  // PDR blocks in use, 1..8
    logic [31:0] buf_idx;               // the UE's paging buffer / on-chip UE state index
  } ue_entry_t;

  typedef struct packed {
    logic        valid;
    five_tuple_t key;
    rule_t       rule;
    logic [31:0] buf_idx;
    state_t      st;
  } ft_entry_t;

  // ---- metadata carried with a packet ------------------------------------
  typedef struct packed {
    rule_t       rule;                  // action learnt so far
    logic [31:0] buf_idx;               // UE index
    logic [31:0] pdr_base;
    logic [3:0]  blk;                   // PDR block being fetched
    logic [3:0]  nblk;
    logic        rel;                   // pointer read issued by a release notification
  } meta_t;

  // ---- RDMA link to the DRAM servers -------------------------------------
  typedef enum logic [3:0] {
    OP_FT_READ   = 4'd0,                // flow table entry read (carries the packet)
    OP_FT_INSERT = 4'd1,                // flow table entry write: valid, key, rule, buf_idx
    OP_STATE_WB  = 4'd2,                // flow table state field write (collapsed writeback)
    OP_UE_READ   = 4'd3,                // UE table entry read
    OP_PDR_READ  = 4'd4,                // PDR block read
    OP_PTR_READ  = 4'd5,                // paging buffer pointer read
    OP_PTR_WB    = 4'd6,                // paging buffer pointer write
    OP_BUF_WRITE = 4'd7,                // store a packet and its successor address
    OP_BUF_READ  = 4'd8                 // fetch a buffered packet and its successor address
  } rdma_op_e;

  typedef struct packed {
    rdma_op_e    op;
    logic [31:0] addr;                  // entry index in the table the op names
    pkt_t        pkt;
    meta_t       meta;
    ft_entry_t   ft;                    // OP_FT_INSERT payload
    state_t      st;                    // OP_STATE_WB payload
    ptr_t        ptr;                   // OP_PTR_WB payload
    logic [31:0] next;                  // OP_BUF_WRITE successor slot
  } rdma_req_t;

  typedef struct packed {
    rdma_op_e    op;
    logic [31:0] addr;
    pkt_t        pkt;
    meta_t       meta;
    ft_entry_t   ft;                    // OP_FT_READ
    ue_entry_t   ue;                    // OP_UE_READ
    pdr_block_t  pdrs;                  // OP_PDR_READ
    ptr_t        ptr;                   // OP_PTR_READ
    logic [31:0] next;                  // OP_BUF_READ
  } rdma_rsp_t;

  // ---- control plane notifications ----------------------------------------
  typedef enum logic [1:0] {
    CTRL_IDLE      = 2'd0,              // UE went idle: buffer its downlink traffic
    CTRL_RECONNECT = 2'd1               // UE is back: release its buffer in order
  } ctrl_op_e;

  typedef struct packed {
    ctrl_op_e    op;
    logic [31:0] ue;
  } ctrl_t;

  // ---- outputs --------------------------------------------------------------
  typedef struct packed {
    pkt_t        pkt;
    rule_t       rule;                  // action applied on the way out
    logic        from_buffer;           // released from the paging buffer
  } egress_t;

  typedef struct packed {
    logic [31:0] fast_hits;             // flow table hits
    logic [31:0] slow_lookups;          // UE table lookups (flow table misses)
    logic [31:0] pdr_blocks;            // PDR blocks examined
    logic [31:0] ft_inserts;            // flow table rules generated
    logic [31:0] state_wbs;             // collapsed writebacks issued
    logic [31:0] lst_merges;            // responses served from local state (stale value dropped)
    logic [31:0] cpu_redirects;         // hash collisions sent to the CPU
    logic [31:0] meter_drops;           // packets over their rate
    logic [31:0] rule_drops;            // drop action, no session or no PDR matched
    logic [31:0] buffered;              // packets written to a paging buffer
    logic [31:0] released;              // packets released by the read loop
    logic [31:0] buf_full_drops;        // packets lost to a full paging buffer
    logic [31:0] stalls;                // cycles an event waited for the request queue
  } stats_t;

endpackage
