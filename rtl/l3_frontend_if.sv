// l3_frontend_if: network side of the L3 (its "frontend": the L2 caches).
//
// Incoming request-plane and response-plane messages each wait in their own
// two-entry FIFO for the serializer. Outgoing forward-plane messages (FWD,
// INV, PUT_ACK) come from the directory FSM; outgoing response-plane
// messages come from the FSM (DATA) and from the serializer's non-cacheable
// path (NC_DATA), each in its own FIFO, merged onto the plane with the FSM
// first. The document gives the block's role only; depths and merge order
// are chosen here.
module l3_frontend_if
  import glue_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic noc_req_valid,
  output logic noc_req_ready,
  input  msg_t noc_req,
  input  logic noc_rsp_in_valid,
  output logic noc_rsp_in_ready,
  input  msg_t noc_rsp_in,
  output logic noc_fwd_valid,
  input  logic noc_fwd_ready,
  output msg_t noc_fwd,
  output logic noc_rsp_out_valid,
  input  logic noc_rsp_out_ready,
  output msg_t noc_rsp_out,
  // towards the serializer
  output logic fe_req_valid,
  output msg_t fe_req,
  input  logic fe_req_ready,
  output logic fe_rsp_valid,
  output msg_t fe_rsp,
  input  logic fe_rsp_ready,
  // from the FSM and serializer
  input  logic ofwd_valid,
  input  msg_t ofwd_msg,
  output logic ofwd_room,
  input  logic orsp_valid,
  input  msg_t orsp_msg,
  output logic orsp_room,
  input  logic nc_rsp_valid,
  input  msg_t nc_rsp_msg,
  output logic nc_rsp_ready
);
  logic [1:0] f0, f1, f2, f3, f4;

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_req (
    .clk, .rst_n, .in_valid(noc_req_valid), .in_ready(noc_req_ready), .in_data(noc_req),
    .out_valid(fe_req_valid), .out_ready(fe_req_ready), .out_data(fe_req), .free(f0));

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_rsp_in (
    .clk, .rst_n, .in_valid(noc_rsp_in_valid), .in_ready(noc_rsp_in_ready), .in_data(noc_rsp_in),
    .out_valid(fe_rsp_valid), .out_ready(fe_rsp_ready), .out_data(fe_rsp), .free(f1));

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_fwd (
    .clk, .rst_n, .in_valid(ofwd_valid), .in_ready(ofwd_room), .in_data(ofwd_msg),
    .out_valid(noc_fwd_valid), .out_ready(noc_fwd_ready), .out_data(noc_fwd), .free(f2));

  logic a_v, b_v, a_pop, b_pop;
  msg_t a_d, b_d;

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_rsp_fsm (
    .clk, .rst_n, .in_valid(orsp_valid), .in_ready(orsp_room), .in_data(orsp_msg),
    .out_valid(a_v), .out_ready(a_pop), .out_data(a_d), .free(f3));

  glue_fifo #(.T(msg_t), .DEPTH(2)) u_rsp_nc (
    .clk, .rst_n, .in_valid(nc_rsp_valid), .in_ready(nc_rsp_ready), .in_data(nc_rsp_msg),
    .out_valid(b_v), .out_ready(b_pop), .out_data(b_d), .free(f4));

  assign noc_rsp_out_valid = a_v || b_v;
  assign noc_rsp_out       = a_v ? a_d : b_d;
  assign a_pop             = noc_rsp_out_ready && a_v;
  assign b_pop             = noc_rsp_out_ready && !a_v && b_v;
endmodule
