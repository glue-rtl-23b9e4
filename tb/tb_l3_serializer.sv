// tb_l3_serializer: drives every combination of waiting sources and
// readiness and checks the L3 serializer against a reference written here:
// memory fills first, then L2 responses, then L2 requests (held while
// req_block); non-cacheable requests go to memory tagged {1, requester},
// NC_DATA from memory goes to the response plane; only chosen sources pop.
`timescale 1ns/1ps
module tb_l3_serializer;
  import glue_pkg::*;
  logic fe_req_valid, fe_req_ready, fe_rsp_valid, fe_rsp_ready, be_valid, be_ready;
  msg_t fe_req, fe_rsp, be_msg, fsm_msg, nc_rsp_msg;
  logic fsm_valid, fsm_ready, req_block, nc_mem_valid, nc_mem_ready, nc_rsp_valid, nc_rsp_ready;
  mem_req_t nc_mem_req;

  l3_serializer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      bit bnc, rqnc, e_be, e_rsp, e_req;
      msg_type_t rt;
      fe_req_valid = $urandom_range(0, 1) == 1; fe_rsp_valid = $urandom_range(0, 1) == 1;
      be_valid = $urandom_range(0, 1) == 1;
      case ($urandom_range(0, 3))
        0: rt = M_GETS; 1: rt = M_PUTM; 2: rt = M_NC_RD; default: rt = M_NC_WR;
      endcase
      fe_req = '0; fe_req.mtype = rt; fe_req.src = 3'($urandom_range(0, 3));
      fe_req.addr = laddr_t'($urandom()); fe_req.data = {4{$urandom()}}; fe_req.wmask = 4'($urandom());
      fe_rsp = '0; fe_rsp.mtype = M_INV_ACK; fe_rsp.addr = laddr_t'($urandom());
      be_msg = '0; be_msg.mtype = $urandom_range(0, 1) ? M_NC_DATA : M_DATA; be_msg.addr = laddr_t'($urandom());
      fsm_ready = $urandom_range(0, 1) == 1; req_block = $urandom_range(0, 1) == 1;
      nc_mem_ready = $urandom_range(0, 1) == 1; nc_rsp_ready = $urandom_range(0, 1) == 1;
      #1;
      bnc  = be_valid && be_msg.mtype == M_NC_DATA;
      rqnc = fe_req_valid && rt inside {M_NC_RD, M_NC_WR};
      e_be = be_valid && !bnc; e_rsp = fe_rsp_valid; e_req = fe_req_valid && !rqnc && !req_block;
      check(fsm_valid == (e_be || e_rsp || e_req), "fsm_valid");
      if (e_be) check(fsm_msg == be_msg, "fill first");
      else if (e_rsp) check(fsm_msg == fe_rsp, "response second");
      else if (e_req) check(fsm_msg == fe_req, "request last");
      check(be_ready == (bnc ? nc_rsp_ready : (e_be && fsm_ready)), "memory-side pop");
      check(fe_rsp_ready == (!e_be && e_rsp && fsm_ready), "response pop");
      check(fe_req_ready == (rqnc ? nc_mem_ready : (!e_be && !e_rsp && e_req && fsm_ready)), "request pop");
      check(nc_mem_valid == rqnc, "nc memory request");
      if (rqnc) check(nc_mem_req.write == (rt == M_NC_WR) && nc_mem_req.addr == fe_req.addr
                      && nc_mem_req.tag == {1'b1, fe_req.src} && nc_mem_req.wmask == fe_req.wmask, "nc fields");
      check(nc_rsp_valid == bnc && (!bnc || nc_rsp_msg == be_msg), "NC_DATA routed");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
