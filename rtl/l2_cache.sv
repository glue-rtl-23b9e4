// l2_cache: private, unified, write-back L2 cache of one processor.
//
// It sits between the processor's split write-through L1 and the shared L3
// directory and keeps its lines coherent with the MESI protocol. Structure:
//   frontend interface  - processor requests in, responses out
//   invalidate interface - line invalidations out to the L1
//   backend interface   - network planes in and out
//   serializer          - picks the next message for the FSM, routes
//                         non-cacheable traffic around it
//   coherence FSM       - one non-blocking action per message
//   tag bank            - state and tag per (set, way), eviction and flush planes
//   data bank           - line storage, read and written by the FSM directly
// Processor interface: cpu_req (read/write one word, or flush the whole cache)
// with valid/ready, and cpu_rsp with valid/ready; reads return the whole
// line. Writes are answered as soon as they are buffered, reads when the data
// is there. Network interface: request plane out, forward plane in, response
// plane in and out, each valid/ready with msg_t. A read hit is answered four
// cycles after the request is accepted, a write hit likewise (see the
// testbench). The breakdown into these blocks follows the document; every
// size except the eight ways is this design's choice.
module l2_cache
  import glue_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID = '0,
  parameter int unsigned SETS  = L2_SETS,
  parameter int unsigned WAYS  = L2_WAYS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  cpu_req_t          cpu_req,
  output logic              cpu_rsp_valid,
  input  logic              cpu_rsp_ready,
  output cpu_rsp_t          cpu_rsp,
  output logic              l1_inv_valid,
  input  logic              l1_inv_ready,
  output logic [ADDR_W-1:0] l1_inv_addr,
  output logic              noc_req_valid,
  input  logic              noc_req_ready,
  output msg_t              noc_req,
  input  logic              noc_fwd_valid,
  output logic              noc_fwd_ready,
  input  msg_t              noc_fwd,
  input  logic              noc_rsp_in_valid,
  output logic              noc_rsp_in_ready,
  input  msg_t              noc_rsp_in,
  output logic              noc_rsp_out_valid,
  input  logic              noc_rsp_out_ready,
  output msg_t              noc_rsp_out,
  output logic              ev_evict,
  output logic              ev_fwd_stall,
  output logic              ev_wb_stall,
  output logic              ev_flush_line
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = LADDR_W - SET_W;

  // frontend <-> serializer / FSM
  logic fe_valid, fe_cacheable, fe_ready;
  msg_t fe_msg;
  logic fsm_rsp_valid, fsm_rsp_room, nc_rsp_valid, nc_rsp_ready;
  cpu_rsp_t fsm_rsp, nc_rsp;
  // backend <-> serializer / FSM
  logic be_fwd_valid, be_fwd_ready, be_rsp_valid, be_rsp_ready;
  msg_t be_fwd, be_rsp;
  logic oreq_valid, oreq_room, nc_req_valid, nc_req_ready, orsp_valid, orsp_room2;
  msg_t oreq_msg, nc_req_msg, orsp_msg;
  // serializer <-> FSM
  logic s_valid, s_ready, fe_block, fwd_block;
  msg_t s_msg;
  // invalidations
  logic inv_valid, inv_room;
  laddr_t inv_addr;
  // tag bank
  logic             tb_req_valid, tb_req_write, tb_rsp_valid, tb_rsp_hit, tb_rsp_free;
  logic [SET_W-1:0] tb_req_set, tb_flush_set;
  logic [TAG_W-1:0] tb_req_tag, tb_evict_tag, tb_flush_tag;
  logic [WAY_W-1:0] tb_req_way, tb_rsp_way, tb_evict_way, tb_flush_way;
  l2_state_t        tb_req_state, tb_rsp_state, tb_evict_state, tb_flush_state;
  logic             tb_evict_valid, tb_flush_in, tb_flush_valid, tb_flush_ready;
  logic             tb_flush_done, tb_flush_done_ack;
  // data bank
  logic [SET_W-1:0] db_rd_set, db_wr_set;
  logic [WAY_W-1:0] db_rd_way, db_wr_way;
  line_t            db_rd_data, db_wr_data;
  logic             db_wr_en;
  logic [LINE_WORDS-1:0] db_wr_mask;

  l2_frontend_if #(.MY_ID(MY_ID)) u_fe (
    .clk, .rst_n, .cpu_req_valid, .cpu_req_ready, .cpu_req, .cpu_rsp_valid, .cpu_rsp_ready, .cpu_rsp,
    .fe_valid, .fe_msg, .fe_cacheable, .fe_ready,
    .fsm_rsp_valid, .fsm_rsp, .fsm_rsp_room, .nc_rsp_valid, .nc_rsp, .nc_rsp_ready);

  l2_invalidate_if u_inv (
    .clk, .rst_n, .inv_valid, .inv_addr, .inv_room, .l1_inv_valid, .l1_inv_ready, .l1_inv_addr);

  l2_backend_if u_be (
    .clk, .rst_n, .noc_fwd_valid, .noc_fwd_ready, .noc_fwd, .noc_rsp_in_valid, .noc_rsp_in_ready,
    .noc_rsp_in, .noc_req_valid, .noc_req_ready, .noc_req, .noc_rsp_out_valid, .noc_rsp_out_ready,
    .noc_rsp_out, .be_fwd_valid, .be_fwd, .be_fwd_ready, .be_rsp_valid, .be_rsp, .be_rsp_ready,
    .oreq_valid, .oreq_msg, .oreq_room, .nc_req_valid, .nc_req_msg, .nc_req_ready,
    .orsp_valid, .orsp_msg, .orsp_room2);

  l2_serializer #(.MY_ID(MY_ID)) u_ser (
    .fe_valid, .fe_msg, .fe_cacheable, .fe_ready, .be_fwd_valid, .be_fwd, .be_fwd_ready,
    .be_rsp_valid, .be_rsp, .be_rsp_ready, .fsm_valid(s_valid), .fsm_msg(s_msg), .fsm_ready(s_ready),
    .fe_block, .fwd_block, .nc_req_valid, .nc_req_msg, .nc_req_ready, .nc_rsp_valid, .nc_rsp,
    .nc_rsp_ready);

  l2_fsm #(.MY_ID(MY_ID), .SETS(SETS), .WAYS(WAYS)) u_fsm (
    .clk, .rst_n, .in_valid(s_valid), .in_msg(s_msg), .in_ready(s_ready), .fe_block, .fwd_block,
    .tb_req_valid, .tb_req_write, .tb_req_set, .tb_req_tag, .tb_req_way, .tb_req_state,
    .tb_rsp_valid, .tb_rsp_hit, .tb_rsp_free, .tb_rsp_way, .tb_rsp_state,
    .tb_evict_valid, .tb_evict_tag, .tb_evict_state,
    .tb_flush_in, .tb_flush_valid, .tb_flush_ready, .tb_flush_set, .tb_flush_way, .tb_flush_tag,
    .tb_flush_state, .tb_flush_done, .tb_flush_done_ack,
    .db_rd_set, .db_rd_way, .db_rd_data, .db_wr_en, .db_wr_set, .db_wr_way, .db_wr_mask, .db_wr_data,
    .oreq_valid, .oreq_msg, .oreq_room, .orsp_valid, .orsp_msg, .orsp_room2,
    .cpu_rsp_valid(fsm_rsp_valid), .cpu_rsp(fsm_rsp), .cpu_rsp_room(fsm_rsp_room),
    .inv_valid, .inv_addr, .inv_room, .ev_evict, .ev_fwd_stall, .ev_wb_stall, .ev_flush_line);

  l2_tag_bank #(.SETS(SETS), .WAYS(WAYS)) u_tag (
    .clk, .rst_n, .req_valid(tb_req_valid), .req_write(tb_req_write), .req_set(tb_req_set),
    .req_tag(tb_req_tag), .req_way(tb_req_way), .req_state(tb_req_state),
    .rsp_valid(tb_rsp_valid), .rsp_hit(tb_rsp_hit), .rsp_free(tb_rsp_free), .rsp_way(tb_rsp_way),
    .rsp_state(tb_rsp_state), .evict_valid(tb_evict_valid), .evict_way(tb_evict_way),
    .evict_tag(tb_evict_tag), .evict_state(tb_evict_state),
    .flush_in(tb_flush_in), .flush_valid(tb_flush_valid), .flush_ready(tb_flush_ready),
    .flush_set(tb_flush_set), .flush_way(tb_flush_way), .flush_tag(tb_flush_tag),
    .flush_state(tb_flush_state), .flush_done(tb_flush_done), .flush_done_ack(tb_flush_done_ack));

  cache_data_bank #(.SETS(SETS), .WAYS(WAYS)) u_data (
    .clk, .rd_set(db_rd_set), .rd_way(db_rd_way), .rd_data(db_rd_data), .wr_en(db_wr_en),
    .wr_set(db_wr_set), .wr_way(db_wr_way), .wr_mask(db_wr_mask), .wr_data(db_wr_data));
endmodule
