// l3_serializer: orders the messages that reach the L3 directory FSM.
//
// Sources, in priority order: line fills from memory, L2 responses (DATA_DIR,
// INV_ACK), and L2 requests. Requests are held back while the FSM has a
// request parked for a transient line (req_block); fills and responses are
// never held, which is what lets parked requests make progress.
// Non-cacheable requests bypass the FSM: NC_RD becomes a memory read tagged
// with the requesting L2 (tag = {1, src}), NC_WR a memory word write, and
// NC_DATA coming back from memory goes straight to the response plane.
// Selection is combinational. The bypass follows the document (the L3
// mirrors the L2's structure); the priorities are chosen here.
module l3_serializer
  import glue_pkg::*;
(
  input  logic     fe_req_valid,
  input  msg_t     fe_req,
  output logic     fe_req_ready,
  input  logic     fe_rsp_valid,
  input  msg_t     fe_rsp,
  output logic     fe_rsp_ready,
  input  logic     be_valid,
  input  msg_t     be_msg,
  output logic     be_ready,
  output logic     fsm_valid,
  output msg_t     fsm_msg,
  input  logic     fsm_ready,
  input  logic     req_block,
  output logic     nc_mem_valid,
  output mem_req_t nc_mem_req,
  input  logic     nc_mem_ready,
  output logic     nc_rsp_valid,
  output msg_t     nc_rsp_msg,
  input  logic     nc_rsp_ready
);
  logic be_nc, be_c, rsp_c, req_nc, req_c;

  assign be_nc  = be_valid && (be_msg.mtype == M_NC_DATA);
  assign be_c   = be_valid && !be_nc;
  assign rsp_c  = fe_rsp_valid;
  assign req_nc = fe_req_valid && (fe_req.mtype inside {M_NC_RD, M_NC_WR});
  assign req_c  = fe_req_valid && !req_nc && !req_block;

  assign fsm_valid = be_c || rsp_c || req_c;
  assign fsm_msg   = be_c ? be_msg : rsp_c ? fe_rsp : fe_req;

  assign nc_rsp_valid = be_nc;
  assign nc_rsp_msg   = be_msg;

  always_comb begin
    nc_mem_valid     = req_nc;
    nc_mem_req.write = (fe_req.mtype == M_NC_WR);
    nc_mem_req.addr  = fe_req.addr;
    nc_mem_req.data  = fe_req.data;
    nc_mem_req.wmask = fe_req.wmask;
    nc_mem_req.tag   = {1'b1, fe_req.src};
  end

  assign be_ready     = be_nc ? nc_rsp_ready : (be_c && fsm_ready);
  assign fe_rsp_ready = !be_c && rsp_c && fsm_ready;
  assign fe_req_ready = req_nc ? nc_mem_ready : (!be_c && !rsp_c && req_c && fsm_ready);
endmodule
