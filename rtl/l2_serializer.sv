// l2_serializer: orders the messages that reach the L2 coherence FSM.
//
// Three sources compete: the backend response plane, the backend forward
// plane and the frontend. Cacheable messages are offered to the FSM one at a
// time, responses first, then forward messages (unless the FSM's forward
// buffer is full, fwd_block), then processor requests (unless the FSM has
// blocked the frontend, fe_block). Responses go first because they are what
// lets waiting lines and buffers drain.
// Non-cacheable traffic never reaches the FSM: a non-cacheable read or write
// from the processor is turned into NC_RD/NC_WR on the request plane (a
// write is acknowledged to the processor at once), and NC_DATA arriving on
// the response plane is handed straight back to the processor. Sending both
// kinds of request down the same path avoids races between two data paths.
// The selection is combinational: a message offered in a cycle is taken the
// same cycle. Routing of non-cacheable traffic follows the document; the
// priority order is chosen here.
module l2_serializer
  import glue_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID = '0
) (
  // frontend
  input  logic     fe_valid,
  input  msg_t     fe_msg,
  input  logic     fe_cacheable,
  output logic     fe_ready,
  // backend
  input  logic     be_fwd_valid,
  input  msg_t     be_fwd,
  output logic     be_fwd_ready,
  input  logic     be_rsp_valid,
  input  msg_t     be_rsp,
  output logic     be_rsp_ready,
  // FSM
  output logic     fsm_valid,
  output msg_t     fsm_msg,
  input  logic     fsm_ready,
  input  logic     fe_block,
  input  logic     fwd_block,
  // non-cacheable path
  output logic     nc_req_valid,
  output msg_t     nc_req_msg,
  input  logic     nc_req_ready,
  output logic     nc_rsp_valid,
  output cpu_rsp_t nc_rsp,
  input  logic     nc_rsp_ready
);
  logic rsp_nc, fe_nc, rsp_c, fwd_c, fe_c;
  logic fe_nc_go, rsp_nc_go;

  assign rsp_nc = be_rsp_valid && (be_rsp.mtype == M_NC_DATA);
  assign fe_nc  = fe_valid && !fe_cacheable;
  assign rsp_c  = be_rsp_valid && !rsp_nc;
  assign fwd_c  = be_fwd_valid && !fwd_block;
  assign fe_c   = fe_valid && fe_cacheable && !fe_block;

  // cacheable: one message to the FSM
  always_comb begin
    fsm_valid = rsp_c || fwd_c || fe_c;
    fsm_msg   = rsp_c ? be_rsp : fwd_c ? be_fwd : fe_msg;
  end

  // non-cacheable frontend request: NC_WR also needs room for its ack
  logic fe_nc_wr;
  assign fe_nc_wr = (fe_msg.mtype == M_CPU_WR);
  assign fe_nc_go = fe_nc && nc_req_ready && (!fe_nc_wr || !rsp_nc) && (!fe_nc_wr || nc_rsp_ready);
  assign rsp_nc_go = rsp_nc && nc_rsp_ready;

  always_comb begin
    nc_req_msg       = fe_msg;
    nc_req_msg.mtype = fe_nc_wr ? M_NC_WR : M_NC_RD;
    nc_req_msg.src   = MY_ID;
    nc_req_msg.dst   = L3_ID;
    nc_req_valid     = fe_nc_go;
    nc_rsp_valid     = rsp_nc_go || (fe_nc_go && fe_nc_wr);
    nc_rsp.op        = rsp_nc_go ? CPU_READ : CPU_WRITE;
    nc_rsp.data      = be_rsp.data;
  end

  assign be_rsp_ready = rsp_c ? fsm_ready : rsp_nc_go;
  assign be_fwd_ready = !rsp_c && fwd_c && fsm_ready;
  assign fe_ready     = fe_nc ? fe_nc_go : (!rsp_c && !fwd_c && fe_c && fsm_ready);
endmodule
