// tb_l2_serializer: drives every combination of waiting sources, message
// kinds, FSM blocks and readiness, and compares the serializer's choices with
// a reference written here: cacheable responses before forward messages
// before processor requests; forward messages held while fwd_block,
// processor requests while fe_block; non-cacheable requests sent to the
// network (writes also acknowledged), NC_DATA returned to the processor, and
// exactly the chosen sources popped.
`timescale 1ns/1ps
module tb_l2_serializer;
  import glue_pkg::*;
  logic fe_valid, fe_cacheable, fe_ready, be_fwd_valid, be_fwd_ready, be_rsp_valid, be_rsp_ready;
  msg_t fe_msg, be_fwd, be_rsp, fsm_msg, nc_req_msg;
  logic fsm_valid, fsm_ready, fe_block, fwd_block, nc_req_valid, nc_req_ready;
  logic nc_rsp_valid, nc_rsp_ready;
  cpu_rsp_t nc_rsp;

  l2_serializer #(.MY_ID(3'd1)) dut (.*);

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
      bit rnc, fnc, fwr, e_rsp_c, e_fwd_c, e_fe_c, e_fenc_go, e_rspnc_go;
      fe_valid = $urandom_range(0, 1) == 1; be_fwd_valid = $urandom_range(0, 1) == 1;
      be_rsp_valid = $urandom_range(0, 1) == 1;
      fe_cacheable = $urandom_range(0, 1) == 1;
      fe_msg = '0; fe_msg.mtype = $urandom_range(0, 1) ? M_CPU_WR : M_CPU_RD; fe_msg.addr = laddr_t'($urandom());
      be_fwd = '0; be_fwd.mtype = M_FWD_GETS; be_fwd.addr = laddr_t'($urandom());
      be_rsp = '0; be_rsp.mtype = $urandom_range(0, 1) ? M_NC_DATA : M_DATA; be_rsp.data = {4{$urandom()}};
      fsm_ready = $urandom_range(0, 1) == 1; fe_block = $urandom_range(0, 1) == 1;
      fwd_block = $urandom_range(0, 1) == 1; nc_req_ready = $urandom_range(0, 1) == 1;
      nc_rsp_ready = $urandom_range(0, 1) == 1;
      #1;
      rnc = be_rsp_valid && be_rsp.mtype == M_NC_DATA;
      fnc = fe_valid && !fe_cacheable;
      fwr = fe_msg.mtype == M_CPU_WR;
      e_rsp_c = be_rsp_valid && !rnc;
      e_fwd_c = be_fwd_valid && !fwd_block;
      e_fe_c  = fe_valid && fe_cacheable && !fe_block;
      e_rspnc_go = rnc && nc_rsp_ready;
      e_fenc_go = fnc && nc_req_ready && (!fwr || (nc_rsp_ready && !rnc));
      check(fsm_valid == (e_rsp_c || e_fwd_c || e_fe_c), "fsm_valid");
      if (e_rsp_c) check(fsm_msg == be_rsp, "response first");
      else if (e_fwd_c) check(fsm_msg == be_fwd, "forward second");
      else if (e_fe_c) check(fsm_msg == fe_msg, "frontend last");
      check(be_rsp_ready == (e_rsp_c ? fsm_ready : e_rspnc_go), "response pop");
      check(be_fwd_ready == (!e_rsp_c && e_fwd_c && fsm_ready), "forward pop");
      check(fe_ready == (fnc ? e_fenc_go : (!e_rsp_c && !e_fwd_c && e_fe_c && fsm_ready)), "frontend pop");
      check(nc_req_valid == e_fenc_go, "nc request");
      if (nc_req_valid) check(nc_req_msg.mtype == (fwr ? M_NC_WR : M_NC_RD) && nc_req_msg.dst == L3_ID
                              && nc_req_msg.src == 3'd1 && nc_req_msg.addr == fe_msg.addr, "nc request fields");
      check(nc_rsp_valid == (e_rspnc_go || (e_fenc_go && fwr)), "nc response");
      if (e_rspnc_go) check(nc_rsp.op == CPU_READ && nc_rsp.data == be_rsp.data, "NC_DATA to processor");
      else if (nc_rsp_valid) check(nc_rsp.op == CPU_WRITE, "NC write acknowledged");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
