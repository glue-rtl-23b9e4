// tb_l3_backend_if: random memory traffic through the L3's memory side.
// Requests from the FSM and from the non-cacheable path must each keep their
// order on the memory port, the FSM's first when both wait; omem_room2 must
// reflect two free slots. Memory responses must come out in order in the
// common form: tag bit 3 set gives NC_DATA addressed to the L2 in tag bits
// 2:0, otherwise a DATA fill for the FSM, with address and data kept.
`timescale 1ns/1ps
module tb_l3_backend_if;
  import glue_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mem_req_valid, mem_req_ready = 0, mem_rsp_valid = 0, mem_rsp_ready;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp = '0;
  logic be_valid, be_ready = 0, omem_valid = 0, omem_room2, nc_mem_valid = 0, nc_mem_ready;
  msg_t be_msg;
  mem_req_t omem_req = '0, nc_mem_req = '0;

  l3_backend_if dut (.*);

  mem_req_t qa [$], qb [$];
  mem_rsp_t qr [$];
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

  always @(posedge clk) if (rst_n) begin
    if (omem_valid) qa.push_back(omem_req);
    if (nc_mem_valid && nc_mem_ready) qb.push_back(nc_mem_req);
    if (mem_rsp_valid && mem_rsp_ready) qr.push_back(mem_rsp);
    if (mem_req_valid && mem_req_ready) begin
      if (qa.size() > 0 && mem_req == qa[0]) void'(qa.pop_front());
      else begin
        check(qb.size() > 0 && mem_req == qb[0], "memory request order");
        check(!dut.a_v, "FSM request first");
        void'(qb.pop_front());
      end
      moved++;
    end
    if (be_valid && be_ready) begin
      mem_rsp_t r;
      r = qr.pop_front();
      check(be_msg.addr == r.addr && be_msg.data == r.data, "response payload");
      check(be_msg.mtype == (r.tag[3] ? M_NC_DATA : M_DATA), "response kind");
      if (r.tag[3]) check(be_msg.dst == node_t'(r.tag[2:0]), "NC_DATA destination");
      moved++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      #1 check(omem_room2 == (dut.f1 >= 2), "room2 flag");
      omem_valid = omem_room2 && ($urandom_range(0, 2) == 0);
      omem_req = '{write: 1'($urandom()), addr: laddr_t'($urandom()), data: {4{$urandom()}}, wmask: '1, tag: '0};
      nc_mem_valid = $urandom_range(0, 2) == 0;
      nc_mem_req = '{write: 1'($urandom()), addr: laddr_t'($urandom()), data: {4{$urandom()}}, wmask: 4'($urandom()), tag: 4'($urandom())};
      mem_rsp_valid = $urandom_range(0, 1) == 1;
      mem_rsp = '{addr: laddr_t'($urandom()), data: {4{$urandom()}}, tag: 4'($urandom_range(0, 15))};
      mem_req_ready = $urandom_range(0, 1) == 1; be_ready = $urandom_range(0, 1) == 1;
    end
    omem_valid = 0; nc_mem_valid = 0; mem_rsp_valid = 0; mem_req_ready = 1; be_ready = 1;
    repeat (10) @(negedge clk);
    check(qa.size() + qb.size() + qr.size() == 0, "all delivered");
    check(moved > 1000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
