// tb_l2_backend_if: random traffic through all five queues of the L2's
// network side with random readiness on both ends. Checks that forward and
// response messages reach the serializer in order, that FSM and
// non-cacheable requests each keep their order on the request plane and that
// an FSM request goes first when both wait, that responses leave in order,
// and that orsp_room2 is low whenever fewer than two slots are free.
`timescale 1ns/1ps
module tb_l2_backend_if;
  import glue_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic noc_fwd_valid = 0, noc_fwd_ready, noc_rsp_in_valid = 0, noc_rsp_in_ready;
  msg_t noc_fwd = '0, noc_rsp_in = '0;
  logic noc_req_valid, noc_req_ready = 0, noc_rsp_out_valid, noc_rsp_out_ready = 0;
  msg_t noc_req, noc_rsp_out;
  logic be_fwd_valid, be_fwd_ready = 0, be_rsp_valid, be_rsp_ready = 0;
  msg_t be_fwd, be_rsp;
  logic oreq_valid = 0, oreq_room, nc_req_valid = 0, nc_req_ready, orsp_valid = 0, orsp_room2;
  msg_t oreq_msg = '0, nc_req_msg = '0, orsp_msg = '0;

  l2_backend_if dut (.*);

  msg_t qf [$], qr [$], qa [$], qb [$], qo [$];
  int checks = 0, failures = 0, moved = 0, out_cnt = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic msg_t rnd(msg_type_t t);
    msg_t m;
    m = '0; m.mtype = t; m.addr = laddr_t'($urandom()); m.data = {4{$urandom()}};
    return m;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (noc_fwd_valid && noc_fwd_ready) qf.push_back(noc_fwd);
    if (noc_rsp_in_valid && noc_rsp_in_ready) qr.push_back(noc_rsp_in);
    if (oreq_valid && oreq_room) qa.push_back(oreq_msg);
    if (nc_req_valid && nc_req_ready) qb.push_back(nc_req_msg);
    if (orsp_valid) begin check(out_cnt <= 2, "room2 honoured"); qo.push_back(orsp_msg); end
    if (be_fwd_valid && be_fwd_ready) begin check(be_fwd == qf.pop_front(), "forward order"); moved++; end
    if (be_rsp_valid && be_rsp_ready) begin check(be_rsp == qr.pop_front(), "response-in order"); moved++; end
    if (noc_req_valid && noc_req_ready) begin
      if (qa.size() > 0 && noc_req == qa[0]) void'(qa.pop_front());
      else begin
        check(qb.size() > 0 && noc_req == qb[0], "request order");
        check(!dut.a_v, "FSM request first");
        void'(qb.pop_front());
      end
      moved++;
    end
    if (noc_rsp_out_valid && noc_rsp_out_ready) begin
      check(noc_rsp_out == qo.pop_front(), "response-out order"); moved++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      noc_fwd_valid = $urandom_range(0, 1) == 1; noc_fwd = rnd(M_INV);
      noc_rsp_in_valid = $urandom_range(0, 1) == 1; noc_rsp_in = rnd(M_DATA);
      oreq_valid = $urandom_range(0, 2) == 0; oreq_msg = rnd(M_GETS);
      nc_req_valid = $urandom_range(0, 2) == 0; nc_req_msg = rnd(M_NC_RD);
      orsp_valid = orsp_room2 && ($urandom_range(0, 2) == 0); orsp_msg = rnd(M_INV_ACK);
      out_cnt = 4 - int'(dut.f4);
      be_fwd_ready = $urandom_range(0, 1) == 1;
      be_rsp_ready = $urandom_range(0, 1) == 1;
      noc_req_ready = $urandom_range(0, 1) == 1;
      noc_rsp_out_ready = $urandom_range(0, 2) == 0;
      #1 check(orsp_room2 == (dut.f4 >= 2), "room2 flag");
    end
    noc_fwd_valid = 0; noc_rsp_in_valid = 0; oreq_valid = 0; nc_req_valid = 0; orsp_valid = 0;
    be_fwd_ready = 1; be_rsp_ready = 1; noc_req_ready = 1; noc_rsp_out_ready = 1;
    repeat (10) @(negedge clk);
    check(qf.size() + qr.size() + qa.size() + qb.size() + qo.size() == 0, "all delivered");
    check(moved > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
