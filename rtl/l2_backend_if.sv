// l2_backend_if: network side of an L2 cache.
//
// Incoming forward-plane and response-plane messages each have their own
// two-entry FIFO, so a forward message the FSM has to hold back never blocks
// the data it is waiting for; the serializer reads both heads. Outgoing
// messages have three FIFOs: coherence requests from the FSM, non-cacheable
// requests from the serializer (both merged onto the request plane, FSM
// first) and FSM responses on the response plane. orsp_room2 says the
// response FIFO can take the two messages that a forwarded read produces.
// Separate planes, and a forward-plane buffer that keeps further forward
// messages waiting, follow the document; depths and arbitration are chosen
// here.
module l2_backend_if
  import glue_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // network, in
  input  logic noc_fwd_valid,
  output logic noc_fwd_ready,
  input  msg_t noc_fwd,
  input  logic noc_rsp_in_valid,
  output logic noc_rsp_in_ready,
  input  msg_t noc_rsp_in,
  // network, out
  output logic noc_req_valid,
  input  logic noc_req_ready,
  output msg_t noc_req,
  output logic noc_rsp_out_valid,
  input  logic noc_rsp_out_ready,
  output msg_t noc_rsp_out,
  // towards the serializer
  output logic be_fwd_valid,
  output msg_t be_fwd,
  input  logic be_fwd_ready,
  output logic be_rsp_valid,
  output msg_t be_rsp,
  input  logic be_rsp_ready,
  // from the FSM and serializer
  input  logic oreq_valid,
  input  msg_t oreq_msg,
  output logic oreq_room,
  input  logic nc_req_valid,
  input  msg_t nc_req_msg,
  output logic nc_req_ready,
  input  logic orsp_valid,
  input  msg_t orsp_msg,
  output logic orsp_room2
);
  logic [1:0] f0, f1, f2, f3;
  logic [2:0] f4;
  logic unused_r;

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_fwd (
    .clk, .rst_n, .in_valid(noc_fwd_valid), .in_ready(noc_fwd_ready), .in_data(noc_fwd),
    .out_valid(be_fwd_valid), .out_ready(be_fwd_ready), .out_data(be_fwd), .free(f0));

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_rsp_in (
    .clk, .rst_n, .in_valid(noc_rsp_in_valid), .in_ready(noc_rsp_in_ready), .in_data(noc_rsp_in),
    .out_valid(be_rsp_valid), .out_ready(be_rsp_ready), .out_data(be_rsp), .free(f1));

  logic a_v, b_v, a_pop, b_pop;
  msg_t a_d, b_d;

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_req_fsm (
    .clk, .rst_n, .in_valid(oreq_valid), .in_ready(oreq_room), .in_data(oreq_msg),
    .out_valid(a_v), .out_ready(a_pop), .out_data(a_d), .free(f2));

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_req_nc (
    .clk, .rst_n, .in_valid(nc_req_valid), .in_ready(nc_req_ready), .in_data(nc_req_msg),
    .out_valid(b_v), .out_ready(b_pop), .out_data(b_d), .free(f3));

  assign noc_req_valid = a_v || b_v;
  assign noc_req       = a_v ? a_d : b_d;
  assign a_pop         = noc_req_ready && a_v;
  assign b_pop         = noc_req_ready && !a_v && b_v;

  glue_fifo #(.T(msg_t), .DEPTH(4)) u_rsp_out (
    .clk, .rst_n, .in_valid(orsp_valid), .in_ready(unused_r), .in_data(orsp_msg),
    .out_valid(noc_rsp_out_valid), .out_ready(noc_rsp_out_ready), .out_data(noc_rsp_out), .free(f4));

  assign orsp_room2 = (f4 >= 3'd2);
endmodule
