// tb_l2_frontend_if: sends random processor requests and checks their
// common-form conversion at the serializer side (message kind, line address,
// word placed at its slot with a one-hot mask, flushes always treated as
// cacheable) and their order. Feeds responses from both producers and checks
// each reaches the processor once, FSM responses ahead of non-cacheable ones
// when both wait.
`timescale 1ns/1ps
module tb_l2_frontend_if;
  import glue_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid = 0, cpu_req_ready, cpu_rsp_valid, cpu_rsp_ready = 0;
  cpu_req_t cpu_req = '0;
  cpu_rsp_t cpu_rsp;
  logic fe_valid, fe_cacheable, fe_ready = 0;
  msg_t fe_msg;
  logic fsm_rsp_valid = 0, fsm_rsp_room, nc_rsp_valid = 0, nc_rsp_ready;
  cpu_rsp_t fsm_rsp = '0, nc_rsp = '0;

  l2_frontend_if #(.MY_ID(3'd2)) dut (.*);

  cpu_req_t req_q [$];
  int checks = 0, failures = 0, nreq = 0, nrsp = 0;
  line_t fsm_q [$], nc_q [$];

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
    if (cpu_req_valid && cpu_req_ready) req_q.push_back(cpu_req);
    if (fe_valid && fe_ready) begin
      cpu_req_t r;
      int w;
      r = req_q.pop_front();
      w = int'(r.addr[OFF_W-1:2]);
      check(fe_msg.addr == r.addr[ADDR_W-1:OFF_W], "line address");
      check(fe_msg.mtype == (r.op == CPU_READ ? M_CPU_RD : r.op == CPU_WRITE ? M_CPU_WR : M_CPU_FLUSH), "kind");
      check(fe_msg.wmask == (LINE_WORDS'(1) << w), "word mask");
      check(fe_msg.data[w*WORD_W +: WORD_W] == r.wdata, "word placement");
      check(fe_cacheable == (r.cacheable || r.op == CPU_FLUSH), "cacheable flag");
      check(fe_msg.src == 3'd2, "source id");
      nreq++;
    end
    if (fsm_rsp_valid && fsm_rsp_room) fsm_q.push_back(fsm_rsp.data);
    if (nc_rsp_valid && nc_rsp_ready) nc_q.push_back(nc_rsp.data);
    if (cpu_rsp_valid && cpu_rsp_ready) begin
      if (fsm_q.size() > 0 && cpu_rsp.data == fsm_q[0]) void'(fsm_q.pop_front());
      else if (nc_q.size() > 0 && cpu_rsp.data == nc_q[0]) begin
        check(fsm_q.size() == 0 || dut.f_v == 1'b0, "FSM response first");
        void'(nc_q.pop_front());
      end else check(0, "unexpected response");
      nrsp++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      cpu_req_valid = $urandom_range(0, 1) == 1;
      cpu_req.op = cpu_op_t'($urandom_range(0, 2));
      cpu_req.cacheable = $urandom_range(0, 1) == 1;
      cpu_req.addr = $urandom();
      cpu_req.wdata = $urandom();
      fe_ready = $urandom_range(0, 1) == 1;
      fsm_rsp_valid = $urandom_range(0, 2) == 0;
      fsm_rsp.data = {$urandom(), $urandom(), $urandom(), $urandom()};
      nc_rsp_valid = $urandom_range(0, 2) == 0;
      nc_rsp.data = {$urandom(), $urandom(), $urandom(), $urandom()};
      cpu_rsp_ready = $urandom_range(0, 3) != 0;
    end
    cpu_req_valid = 0; fsm_rsp_valid = 0; nc_rsp_valid = 0; fe_ready = 1; cpu_rsp_ready = 1;
    repeat (10) @(negedge clk);
    check(req_q.size() == 0 && fsm_q.size() == 0 && nc_q.size() == 0, "everything delivered");
    check(nreq > 200 && nrsp > 200, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
