// l3_cache: shared, inclusive, write-back last-level cache holding the MESI
// directory for all L2 caches.
//
// Same structure as an L2: frontend interface (here the network towards the
// L2s), backend interface (main memory), serializer, directory FSM, tag bank
// (with owner and sharer list per line) and data bank. It has as many sets as
// an L2 and NUM_L2 x L2 ways, so it can always hold every line the L2s hold
// and never recalls a line from an L2. Modified data returned by an L2 stays
// here, marked dirty, until the line is evicted from the L3.
// Interfaces: request plane in, forward plane out, response plane in and out
// (msg_t, valid/ready); memory request out (mem_req_t) and read response in
// (mem_rsp_t), valid/ready. The structure follows the document; the sizes
// other than "more ways than an L2" are this design's choices.
module l3_cache
  import glue_pkg::*;
#(
  parameter int unsigned SETS = L2_SETS,
  parameter int unsigned WAYS = L3_WAYS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     noc_req_valid,
  output logic     noc_req_ready,
  input  msg_t     noc_req,
  input  logic     noc_rsp_in_valid,
  output logic     noc_rsp_in_ready,
  input  msg_t     noc_rsp_in,
  output logic     noc_fwd_valid,
  input  logic     noc_fwd_ready,
  output msg_t     noc_fwd,
  output logic     noc_rsp_out_valid,
  input  logic     noc_rsp_out_ready,
  output msg_t     noc_rsp_out,
  output logic     mem_req_valid,
  input  logic     mem_req_ready,
  output mem_req_t mem_req,
  input  logic     mem_rsp_valid,
  output logic     mem_rsp_ready,
  input  mem_rsp_t mem_rsp,
  output logic     ev_mem_fill,
  output logic     ev_writeback,
  output logic     ev_inv,
  output logic     ev_fwd,
  output logic     ev_replay
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = LADDR_W - SET_W;

  logic fe_req_valid, fe_req_ready, fe_rsp_valid, fe_rsp_ready, be_valid, be_ready;
  msg_t fe_req, fe_rsp, be_msg;
  logic ofwd_valid, ofwd_room, orsp_valid, orsp_room, nc_rsp_valid, nc_rsp_ready;
  msg_t ofwd_msg, orsp_msg, nc_rsp_msg;
  logic omem_valid, omem_room2, nc_mem_valid, nc_mem_ready;
  mem_req_t omem_req, nc_mem_req;
  logic s_valid, s_ready, req_block;
  msg_t s_msg;

  logic             tb_req_valid, tb_req_write, tb_rsp_valid, tb_rsp_hit, tb_rsp_free, tb_evict_valid;
  logic [SET_W-1:0] tb_req_set;
  logic [TAG_W-1:0] tb_req_tag, tb_evict_tag;
  logic [WAY_W-1:0] tb_req_way, tb_rsp_way, tb_evict_way;
  l3_meta_t         tb_req_meta, tb_rsp_meta, tb_evict_meta;
  logic [SET_W-1:0] db_rd_set, db_wr_set;
  logic [WAY_W-1:0] db_rd_way, db_wr_way;
  line_t            db_rd_data, db_wr_data;
  logic             db_wr_en;

  l3_frontend_if u_fe (
    .clk, .rst_n, .noc_req_valid, .noc_req_ready, .noc_req, .noc_rsp_in_valid, .noc_rsp_in_ready,
    .noc_rsp_in, .noc_fwd_valid, .noc_fwd_ready, .noc_fwd, .noc_rsp_out_valid, .noc_rsp_out_ready,
    .noc_rsp_out, .fe_req_valid, .fe_req, .fe_req_ready, .fe_rsp_valid, .fe_rsp, .fe_rsp_ready,
    .ofwd_valid, .ofwd_msg, .ofwd_room, .orsp_valid, .orsp_msg, .orsp_room,
    .nc_rsp_valid, .nc_rsp_msg, .nc_rsp_ready);

  l3_backend_if u_be (
    .clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_ready, .mem_rsp,
    .be_valid, .be_msg, .be_ready, .omem_valid, .omem_req, .omem_room2,
    .nc_mem_valid, .nc_mem_req, .nc_mem_ready);

  l3_serializer u_ser (
    .fe_req_valid, .fe_req, .fe_req_ready, .fe_rsp_valid, .fe_rsp, .fe_rsp_ready,
    .be_valid, .be_msg, .be_ready, .fsm_valid(s_valid), .fsm_msg(s_msg), .fsm_ready(s_ready),
    .req_block, .nc_mem_valid, .nc_mem_req, .nc_mem_ready, .nc_rsp_valid, .nc_rsp_msg, .nc_rsp_ready);

  l3_fsm #(.SETS(SETS), .WAYS(WAYS)) u_fsm (
    .clk, .rst_n, .in_valid(s_valid), .in_msg(s_msg), .in_ready(s_ready), .req_block,
    .tb_req_valid, .tb_req_write, .tb_req_set, .tb_req_tag, .tb_req_way, .tb_req_meta,
    .tb_rsp_valid, .tb_rsp_hit, .tb_rsp_free, .tb_rsp_way, .tb_rsp_meta,
    .tb_evict_valid, .tb_evict_tag, .tb_evict_meta,
    .db_rd_set, .db_rd_way, .db_rd_data, .db_wr_en, .db_wr_set, .db_wr_way, .db_wr_data,
    .ofwd_valid, .ofwd_msg, .ofwd_room, .orsp_valid, .orsp_msg, .orsp_room,
    .omem_valid, .omem_req, .omem_room2,
    .ev_mem_fill, .ev_writeback, .ev_inv, .ev_fwd, .ev_replay);

  l3_tag_bank #(.SETS(SETS), .WAYS(WAYS)) u_tag (
    .clk, .rst_n, .req_valid(tb_req_valid), .req_write(tb_req_write), .req_set(tb_req_set),
    .req_tag(tb_req_tag), .req_way(tb_req_way), .req_meta(tb_req_meta),
    .rsp_valid(tb_rsp_valid), .rsp_hit(tb_rsp_hit), .rsp_free(tb_rsp_free), .rsp_way(tb_rsp_way),
    .rsp_meta(tb_rsp_meta), .evict_valid(tb_evict_valid), .evict_way(tb_evict_way),
    .evict_tag(tb_evict_tag), .evict_meta(tb_evict_meta));

  cache_data_bank #(.SETS(SETS), .WAYS(WAYS)) u_data (
    .clk, .rd_set(db_rd_set), .rd_way(db_rd_way), .rd_data(db_rd_data), .wr_en(db_wr_en),
    .wr_set(db_wr_set), .wr_way(db_wr_way), .wr_mask('1), .wr_data(db_wr_data));
endmodule
