// dram_server_model: behavioural model of the DRAM server and its RDMA NIC
// that hold the UE table, the PDR blocks, the flow table and the paging
// buffers (behavioural model, not synthesizable).
//
// Requests are accepted one per cycle and executed in arrival order, as an
// RDMA queue pair does; each response leaves LAT cycles later, in order.
// Reads return the entry together with the packet and metadata the request
// carried; the flow table insert writes key, rule and buffer index, the state
// writeback writes the key and state fields, buffer writes store the packet, its
// metadata and the successor address, buffer reads return them. Every write
// is answered with an acknowledgement that echoes the request.
// Tasks let a testbench install UE entries and PDR blocks (the control
// software's job) and inspect flow state.
module dram_server_model
  import xp_pkg::*;
#(
  parameter int LAT = 20
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  rdma_req_t req,
  output logic      rsp_valid,
  input  logic      rsp_ready,
  output rdma_rsp_t rsp
);
  typedef struct packed {
    pkt_t        pkt;
    meta_t       meta;
    logic [31:0] next;
  } slot_t;

  ft_entry_t  ft   [logic [31:0]];
  ue_entry_t  ue   [logic [31:0]];
  pdr_block_t pdr  [logic [31:0]];
  ptr_t       ptr  [logic [31:0]];
  slot_t      bufm [logic [31:0]];

  rdma_rsp_t   q_rsp [$];
  longint      q_due [$];
  longint      cyc;
  int unsigned n_req;

  assign req_ready = 1'b1;
  assign rsp_valid = q_rsp.size() > 0 && q_due[0] <= cyc;
  assign rsp       = q_rsp.size() > 0 ? q_rsp[0] : '0;

  task automatic install_ue(input logic [31:0] addr, input ue_entry_t e);
    ue[addr] = e;
  endtask
  task automatic install_pdr(input logic [31:0] addr, input pdr_block_t b);
    pdr[addr] = b;
  endtask
  task automatic install_ft(input logic [31:0] addr, input ft_entry_t e);
    ft[addr] = e;
  endtask
  function automatic ft_entry_t get_ft(input logic [31:0] addr);
    return ft.exists(addr) ? ft[addr] : '0;
  endfunction
  function automatic ptr_t get_ptr(input logic [31:0] addr);
    return ptr.exists(addr) ? ptr[addr] : '0;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
      n_req <= 0;
    end else begin
      cyc <= cyc + 1;
      if (rsp_valid && rsp_ready) begin
        void'(q_rsp.pop_front());
        void'(q_due.pop_front());
      end
      if (req_valid) begin
        rdma_rsp_t r;
        r      = '0;
        r.op   = req.op;
        r.addr = req.addr;
        r.pkt  = req.pkt;
        r.meta = req.meta;
        n_req <= n_req + 1;
        case (req.op)
          OP_FT_READ:   r.ft = ft.exists(req.addr) ? ft[req.addr] : '0;
          OP_FT_INSERT: begin
            ft_entry_t e;
            e = ft.exists(req.addr) ? ft[req.addr] : '0;
            e.valid = req.ft.valid; e.key = req.ft.key; e.rule = req.ft.rule;
            e.buf_idx = req.ft.buf_idx;
            ft[req.addr] = e;
            r.ft = req.ft;
          end
          OP_STATE_WB: begin
            ft_entry_t e;
            e = ft.exists(req.addr) ? ft[req.addr] : '0;
            e.key = req.ft.key; e.st = req.st;
            ft[req.addr] = e;
            r.ft = req.ft;
          end
          OP_UE_READ:   r.ue   = ue.exists(req.addr) ? ue[req.addr] : '0;
          OP_PDR_READ:  r.pdrs = pdr.exists(req.addr) ? pdr[req.addr] : '0;
          OP_PTR_READ:  r.ptr  = ptr.exists(req.addr) ? ptr[req.addr] : '0;
          OP_PTR_WB:    begin ptr[req.addr] = req.ptr; r.ptr = req.ptr; end
          OP_BUF_WRITE: bufm[req.addr] = '{pkt: req.pkt, meta: req.meta, next: req.next};
          OP_BUF_READ:  begin
            slot_t s;
            s = bufm.exists(req.addr) ? bufm[req.addr] : '0;
            r.pkt = s.pkt; r.meta = s.meta; r.next = s.next;
          end
          default: ;
        endcase
        q_rsp.push_back(r);
        q_due.push_back(cyc + longint'(LAT));
      end
    end
  end
endmodule
