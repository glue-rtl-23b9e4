// glue_top: the coherent memory hierarchy of a four-processor tile array.
//
// NUM_L2 private L2 caches, one per processor, connect through the
// three-plane network (glue_noc) to one shared L3 that keeps the MESI
// directory and fronts main memory. The processors with their L1 caches and
// the memory controller are outside this module: each processor's L2 request
// and response ports and its L1 invalidation port are brought out as arrays,
// and so is the L3's memory port. The ev_* outputs pulse when a mechanism
// fires (L2 eviction, forward-plane stall, write-buffer stall, flushed line,
// L3 fill, write-back to memory, invalidation, forward, parked request), so a
// testbench or a performance counter can see them. Network node numbers:
// L2 i is node i, the L3 is node NUM_L2. The arrangement follows the
// document; the sizes other than four processors and eight L2 ways are this
// design's choices (see glue_pkg).
module glue_top
  import glue_pkg::*;
#(
  parameter int unsigned N       = NUM_L2,
  parameter int unsigned SETS    = L2_SETS,
  parameter int unsigned L2_W    = L2_WAYS,
  parameter int unsigned L3_W    = N * L2_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors
  input  logic [N-1:0]      cpu_req_valid,
  output logic [N-1:0]      cpu_req_ready,
  input  cpu_req_t          cpu_req [N],
  output logic [N-1:0]      cpu_rsp_valid,
  input  logic [N-1:0]      cpu_rsp_ready,
  output cpu_rsp_t          cpu_rsp [N],
  output logic [N-1:0]      l1_inv_valid,
  input  logic [N-1:0]      l1_inv_ready,
  output logic [ADDR_W-1:0] l1_inv_addr [N],
  // main memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  input  logic              mem_rsp_valid,
  output logic              mem_rsp_ready,
  input  mem_rsp_t          mem_rsp,
  // activity
  output logic [N-1:0]      ev_l2_evict,
  output logic [N-1:0]      ev_l2_fwd_stall,
  output logic [N-1:0]      ev_l2_wb_stall,
  output logic [N-1:0]      ev_l2_flush_line,
  output logic              ev_l3_mem_fill,
  output logic              ev_l3_writeback,
  output logic              ev_l3_inv,
  output logic              ev_l3_fwd,
  output logic              ev_l3_replay
);
  logic [N-1:0] req_v, req_r, fwd_v, fwd_r, rso_v, rso_r, rsi_v, rsi_r;
  msg_t         req_m [N];
  msg_t         fwd_m [N];
  msg_t         rso_m [N];
  msg_t         rsi_m [N];
  logic         l3_req_v, l3_req_r, l3_fwd_v, l3_fwd_r, l3_rso_v, l3_rso_r, l3_rsi_v, l3_rsi_r;
  msg_t         l3_req_m, l3_fwd_m, l3_rso_m, l3_rsi_m;

  for (genvar i = 0; i < N; i++) begin : g_l2
    l2_cache #(.MY_ID(node_t'(i)), .SETS(SETS), .WAYS(L2_W)) u_l2 (
      .clk, .rst_n,
      .cpu_req_valid(cpu_req_valid[i]), .cpu_req_ready(cpu_req_ready[i]), .cpu_req(cpu_req[i]),
      .cpu_rsp_valid(cpu_rsp_valid[i]), .cpu_rsp_ready(cpu_rsp_ready[i]), .cpu_rsp(cpu_rsp[i]),
      .l1_inv_valid(l1_inv_valid[i]), .l1_inv_ready(l1_inv_ready[i]), .l1_inv_addr(l1_inv_addr[i]),
      .noc_req_valid(req_v[i]), .noc_req_ready(req_r[i]), .noc_req(req_m[i]),
      .noc_fwd_valid(fwd_v[i]), .noc_fwd_ready(fwd_r[i]), .noc_fwd(fwd_m[i]),
      .noc_rsp_in_valid(rsi_v[i]), .noc_rsp_in_ready(rsi_r[i]), .noc_rsp_in(rsi_m[i]),
      .noc_rsp_out_valid(rso_v[i]), .noc_rsp_out_ready(rso_r[i]), .noc_rsp_out(rso_m[i]),
      .ev_evict(ev_l2_evict[i]), .ev_fwd_stall(ev_l2_fwd_stall[i]),
      .ev_wb_stall(ev_l2_wb_stall[i]), .ev_flush_line(ev_l2_flush_line[i]));
  end

  glue_noc #(.N(N)) u_noc (
    .clk, .rst_n,
    .l2_req_valid(req_v), .l2_req_ready(req_r), .l2_req(req_m),
    .l2_fwd_valid(fwd_v), .l2_fwd_ready(fwd_r), .l2_fwd(fwd_m),
    .l2_rsp_out_valid(rso_v), .l2_rsp_out_ready(rso_r), .l2_rsp_out(rso_m),
    .l2_rsp_in_valid(rsi_v), .l2_rsp_in_ready(rsi_r), .l2_rsp_in(rsi_m),
    .l3_req_valid(l3_req_v), .l3_req_ready(l3_req_r), .l3_req(l3_req_m),
    .l3_fwd_valid(l3_fwd_v), .l3_fwd_ready(l3_fwd_r), .l3_fwd(l3_fwd_m),
    .l3_rsp_out_valid(l3_rso_v), .l3_rsp_out_ready(l3_rso_r), .l3_rsp_out(l3_rso_m),
    .l3_rsp_in_valid(l3_rsi_v), .l3_rsp_in_ready(l3_rsi_r), .l3_rsp_in(l3_rsi_m));

  l3_cache #(.SETS(SETS), .WAYS(L3_W)) u_l3 (
    .clk, .rst_n,
    .noc_req_valid(l3_req_v), .noc_req_ready(l3_req_r), .noc_req(l3_req_m),
    .noc_rsp_in_valid(l3_rsi_v), .noc_rsp_in_ready(l3_rsi_r), .noc_rsp_in(l3_rsi_m),
    .noc_fwd_valid(l3_fwd_v), .noc_fwd_ready(l3_fwd_r), .noc_fwd(l3_fwd_m),
    .noc_rsp_out_valid(l3_rso_v), .noc_rsp_out_ready(l3_rso_r), .noc_rsp_out(l3_rso_m),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_rsp_valid, .mem_rsp_ready, .mem_rsp,
    .ev_mem_fill(ev_l3_mem_fill), .ev_writeback(ev_l3_writeback), .ev_inv(ev_l3_inv),
    .ev_fwd(ev_l3_fwd), .ev_replay(ev_l3_replay));
endmodule
