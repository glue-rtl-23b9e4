// l2_frontend_if: processor (L1) side of an L2 cache.
//
// Requests from the processor (read, write, flush; cacheable or not) enter a
// two-entry FIFO and leave it in the common message form: the byte address
// becomes a line address, a written word is placed at its position in the
// line with a one-hot word mask. Responses come from two producers, the
// coherence FSM and the serializer's non-cacheable path, each with its own
// two-entry FIFO, and are merged onto the single response port, FSM first.
// A request takes one cycle through the FIFO. The document gives this block
// only its function; buffer depths and the merge order are chosen here.
module l2_frontend_if
  import glue_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  // processor side
  input  logic     cpu_req_valid,
  output logic     cpu_req_ready,
  input  cpu_req_t cpu_req,
  output logic     cpu_rsp_valid,
  input  logic     cpu_rsp_ready,
  output cpu_rsp_t cpu_rsp,
  // towards the serializer
  output logic     fe_valid,
  output msg_t     fe_msg,
  output logic     fe_cacheable,
  input  logic     fe_ready,
  // responses from the FSM and from the non-cacheable path
  input  logic     fsm_rsp_valid,
  input  cpu_rsp_t fsm_rsp,
  output logic     fsm_rsp_room,
  input  logic     nc_rsp_valid,
  input  cpu_rsp_t nc_rsp,
  output logic     nc_rsp_ready
);
  cpu_req_t q;
  logic [1:0] unused_free0, free_fsm, unused_free2;

  glue_fifo #(.T(cpu_req_t), .DEPTH(2)) u_req (
    .clk, .rst_n,
    .in_valid(cpu_req_valid), .in_ready(cpu_req_ready), .in_data(cpu_req),
    .out_valid(fe_valid), .out_ready(fe_ready), .out_data(q), .free(unused_free0));

  logic [$clog2(LINE_WORDS)-1:0] widx;
  assign widx = q.addr[OFF_W-1 -: $clog2(LINE_WORDS)];

  always_comb begin
    fe_msg       = '0;
    fe_msg.src   = MY_ID;
    fe_msg.dst   = MY_ID;
    fe_msg.addr  = q.addr[ADDR_W-1:OFF_W];
    fe_msg.data  = {LINE_WORDS{q.wdata}};
    fe_msg.wmask = LINE_WORDS'(1) << widx;
    unique case (q.op)
      CPU_READ:  fe_msg.mtype = M_CPU_RD;
      CPU_WRITE: fe_msg.mtype = M_CPU_WR;
      default:   fe_msg.mtype = M_CPU_FLUSH;
    endcase
  end
  assign fe_cacheable = q.cacheable || (q.op == CPU_FLUSH);

  // two response queues merged onto one port
  logic     f_v, n_v, f_pop, n_pop;
  cpu_rsp_t f_d, n_d;

  glue_fifo #(.T(cpu_rsp_t), .DEPTH(2)) u_fsm_rsp (
    .clk, .rst_n,
    .in_valid(fsm_rsp_valid), .in_ready(fsm_rsp_room), .in_data(fsm_rsp),
    .out_valid(f_v), .out_ready(f_pop), .out_data(f_d), .free(free_fsm));

  glue_fifo #(.T(cpu_rsp_t), .DEPTH(2)) u_nc_rsp (
    .clk, .rst_n,
    .in_valid(nc_rsp_valid), .in_ready(nc_rsp_ready), .in_data(nc_rsp),
    .out_valid(n_v), .out_ready(n_pop), .out_data(n_d), .free(unused_free2));

  assign cpu_rsp_valid = f_v || n_v;
  assign cpu_rsp       = f_v ? f_d : n_d;
  assign f_pop         = cpu_rsp_ready && f_v;
  assign n_pop         = cpu_rsp_ready && !f_v && n_v;
endmodule
