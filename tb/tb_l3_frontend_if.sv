// tb_l3_frontend_if: random traffic through the L3's network-side queues
// with random readiness. Requests and responses from the L2s must reach the
// serializer in order; forward messages must leave in order; FSM and
// non-cacheable responses must each keep their order on the response plane,
// the FSM's going first when both wait.
`timescale 1ns/1ps
module tb_l3_frontend_if;
  import glue_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic noc_req_valid = 0, noc_req_ready, noc_rsp_in_valid = 0, noc_rsp_in_ready;
  msg_t noc_req = '0, noc_rsp_in = '0;
  logic noc_fwd_valid, noc_fwd_ready = 0, noc_rsp_out_valid, noc_rsp_out_ready = 0;
  msg_t noc_fwd, noc_rsp_out;
  logic fe_req_valid, fe_req_ready = 0, fe_rsp_valid, fe_rsp_ready = 0;
  msg_t fe_req, fe_rsp;
  logic ofwd_valid = 0, ofwd_room, orsp_valid = 0, orsp_room, nc_rsp_valid = 0, nc_rsp_ready;
  msg_t ofwd_msg = '0, orsp_msg = '0, nc_rsp_msg = '0;

  l3_frontend_if dut (.*);

  msg_t q1 [$], q2 [$], q3 [$], q4 [$], q5 [$];
  int checks = 0, failures = 0, moved = 0;
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
    if (noc_req_valid && noc_req_ready) q1.push_back(noc_req);
    if (noc_rsp_in_valid && noc_rsp_in_ready) q2.push_back(noc_rsp_in);
    if (ofwd_valid && ofwd_room) q3.push_back(ofwd_msg);
    if (orsp_valid && orsp_room) q4.push_back(orsp_msg);
    if (nc_rsp_valid && nc_rsp_ready) q5.push_back(nc_rsp_msg);
    if (fe_req_valid && fe_req_ready) begin check(fe_req == q1.pop_front(), "request order"); moved++; end
    if (fe_rsp_valid && fe_rsp_ready) begin check(fe_rsp == q2.pop_front(), "response-in order"); moved++; end
    if (noc_fwd_valid && noc_fwd_ready) begin check(noc_fwd == q3.pop_front(), "forward order"); moved++; end
    if (noc_rsp_out_valid && noc_rsp_out_ready) begin
      if (q4.size() > 0 && noc_rsp_out == q4[0]) void'(q4.pop_front());
      else begin
        check(q5.size() > 0 && noc_rsp_out == q5[0], "response-out order");
        check(!dut.a_v, "FSM response first");
        void'(q5.pop_front());
      end
      moved++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      noc_req_valid = $urandom_range(0, 1) == 1; noc_req = rnd(M_GETS);
      noc_rsp_in_valid = $urandom_range(0, 1) == 1; noc_rsp_in = rnd(M_INV_ACK);
      ofwd_valid = $urandom_range(0, 2) == 0; ofwd_msg = rnd(M_INV);
      orsp_valid = $urandom_range(0, 2) == 0; orsp_msg = rnd(M_DATA);
      nc_rsp_valid = $urandom_range(0, 2) == 0; nc_rsp_msg = rnd(M_NC_DATA);
      fe_req_ready = $urandom_range(0, 1) == 1; fe_rsp_ready = $urandom_range(0, 1) == 1;
      noc_fwd_ready = $urandom_range(0, 1) == 1; noc_rsp_out_ready = $urandom_range(0, 1) == 1;
    end
    noc_req_valid = 0; noc_rsp_in_valid = 0; ofwd_valid = 0; orsp_valid = 0; nc_rsp_valid = 0;
    fe_req_ready = 1; fe_rsp_ready = 1; noc_fwd_ready = 1; noc_rsp_out_ready = 1;
    repeat (10) @(negedge clk);
    check(q1.size() + q2.size() + q3.size() + q4.size() + q5.size() == 0, "all delivered");
    check(moved > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
