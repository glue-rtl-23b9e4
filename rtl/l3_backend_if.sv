// l3_backend_if: main-memory side of the L3.
//
// Memory requests come from the directory FSM (line fills and write-backs)
// and from the serializer's non-cacheable path, each through its own FIFO,
// and are merged onto the memory request port, FSM first; omem_room2 tells
// the FSM that a write-back and a fill can both be queued. Read responses
// from memory enter a two-entry FIFO and are put into the common message
// form: a response whose tag has bit 3 set is a non-cacheable read and
// becomes NC_DATA addressed to the L2 named by tag bits 2:0; any other is a
// line fill and becomes DATA for the FSM. Memory answers reads in the order
// it receives requests, so a fill always sees an earlier write-back. The
// tagging scheme and depths are this design's choices.
module l3_backend_if
  import glue_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  output logic     mem_rsp_ready,
  input  mem_rsp_t mem_rsp,
  // towards the serializer
  output logic     be_valid,
  output msg_t     be_msg,
  input  logic     be_ready,
  // from the FSM and serializer
  input  logic     omem_valid,
  input  mem_req_t omem_req,
  output logic     omem_room2,
  input  logic     nc_mem_valid,
  input  mem_req_t nc_mem_req,
  output logic     nc_mem_ready
);
  logic [1:0] f0, f2;
  logic [2:0] f1;
  logic       unused_r;
  mem_rsp_t   r;

  glue_fifo #(.T(mem_rsp_t), .DEPTH(2)) u_rsp (
    .clk, .rst_n, .in_valid(mem_rsp_valid), .in_ready(mem_rsp_ready), .in_data(mem_rsp),
    .out_valid(be_valid), .out_ready(be_ready), .out_data(r), .free(f0));

  always_comb begin
    be_msg       = '0;
    be_msg.mtype = r.tag[3] ? M_NC_DATA : M_DATA;
    be_msg.src   = L3_ID;
    be_msg.dst   = r.tag[3] ? node_t'(r.tag[2:0]) : L3_ID;
    be_msg.addr  = r.addr;
    be_msg.data  = r.data;
    be_msg.wmask = '1;
  end

  logic a_v, b_v, a_pop, b_pop;
  mem_req_t a_d, b_d;

  glue_fifo #(.T(mem_req_t), .DEPTH(4)) u_fsm (
    .clk, .rst_n, .in_valid(omem_valid), .in_ready(unused_r), .in_data(omem_req),
    .out_valid(a_v), .out_ready(a_pop), .out_data(a_d), .free(f1));

  glue_fifo #(.T(mem_req_t), .DEPTH(2)) u_nc (
    .clk, .rst_n, .in_valid(nc_mem_valid), .in_ready(nc_mem_ready), .in_data(nc_mem_req),
    .out_valid(b_v), .out_ready(b_pop), .out_data(b_d), .free(f2));

  assign omem_room2    = (f1 >= 3'd2);
  assign mem_req_valid = a_v || b_v;
  assign mem_req       = a_v ? a_d : b_d;
  assign a_pop         = mem_req_ready && a_v;
  assign b_pop         = mem_req_ready && !a_v && b_v;
endmodule
