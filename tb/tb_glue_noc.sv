// tb_glue_noc: random traffic on all three planes of a four-L2 network with
// random readiness at every receiver. Every message must arrive exactly once,
// at the node named in its dst field, and messages from one source to one
// destination on one plane must arrive in the order they were sent. Also
// checks that a waiting request from every L2 is eventually granted
// (round-robin fairness) by counting grants per L2.
`timescale 1ns/1ps
module tb_glue_noc;
  import glue_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] l2_req_valid, l2_req_ready, l2_fwd_valid, l2_fwd_ready;
  logic [N-1:0] l2_rsp_out_valid, l2_rsp_out_ready, l2_rsp_in_valid, l2_rsp_in_ready;
  msg_t l2_req [N], l2_fwd [N], l2_rsp_out [N], l2_rsp_in [N];
  logic l3_req_valid, l3_req_ready, l3_fwd_valid, l3_fwd_ready, l3_rsp_out_valid, l3_rsp_out_ready;
  logic l3_rsp_in_valid, l3_rsp_in_ready;
  msg_t l3_req, l3_fwd, l3_rsp_out, l3_rsp_in;

  glue_noc #(.N(N)) dut (.*);

  // expected per (plane, src, dst)
  msg_t exp_q [3][N+1][N+1][$];
  int checks = 0, failures = 0, delivered = 0;
  int grants [N];
  int sq = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic msg_t mk(int src, int dst);
    msg_t m;
    m = '0; m.mtype = M_DATA; m.src = node_t'(src); m.dst = node_t'(dst);
    m.addr = laddr_t'($urandom()); m.data = {4{$urandom()}};
    return m;
  endfunction

  task automatic got(int plane, msg_t m, int at);
    check(int'(m.dst) == at, "delivered to its destination");
    check(exp_q[plane][m.src][at].size() > 0 && exp_q[plane][m.src][at][0] == m, "in order, once");
    if (exp_q[plane][m.src][at].size() > 0) void'(exp_q[plane][m.src][at].pop_front());
    delivered++;
  endtask

  initial begin
    for (int i = 0; i < N; i++) grants[i] = 0;
    l2_req_valid = '0; l2_rsp_out_valid = '0; l3_fwd_valid = 0; l3_rsp_out_valid = 0;
    l2_fwd_ready = '0; l2_rsp_in_ready = '0; l3_req_ready = 0; l3_rsp_in_ready = 0;
    for (int i = 0; i < N; i++) begin l2_req[i] = '0; l2_rsp_out[i] = '0; end
    l3_fwd = '0; l3_rsp_out = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      // keep offered messages until taken (valid/ready rule)
      for (int i = 0; i < N; i++) begin
        if (!l2_req_valid[i] || l2_req_ready[i]) begin
          l2_req_valid[i] = $urandom_range(0, 1) == 1; l2_req[i] = mk(i, N);
        end
        if (!l2_rsp_out_valid[i] || l2_rsp_out_ready[i]) begin
          int d;
          d = int'($urandom_range(0, N));
          l2_rsp_out_valid[i] = $urandom_range(0, 2) == 0 && d != i; l2_rsp_out[i] = mk(i, d);
        end
      end
      if (!l3_fwd_valid || l3_fwd_ready) begin
        l3_fwd_valid = $urandom_range(0, 1) == 1; l3_fwd = mk(N, int'($urandom_range(0, N-1)));
      end
      if (!l3_rsp_out_valid || l3_rsp_out_ready) begin
        l3_rsp_out_valid = $urandom_range(0, 1) == 1; l3_rsp_out = mk(N, int'($urandom_range(0, N-1)));
      end
      l2_fwd_ready = 4'($urandom()); l2_rsp_in_ready = 4'($urandom());
      l3_req_ready = $urandom_range(0, 1) == 1; l3_rsp_in_ready = $urandom_range(0, 1) == 1;
      #1;
      // deliveries happening at the coming edge; sends of this edge are
      // recorded at the edge itself, so check against queue plus this cycle
      for (int i = 0; i < N; i++) begin
        if (l2_req_valid[i] && l2_req_ready[i]) begin exp_q[0][i][N].push_back(l2_req[i]); grants[i]++; end
        if (l2_rsp_out_valid[i] && l2_rsp_out_ready[i]) exp_q[2][i][l2_rsp_out[i].dst].push_back(l2_rsp_out[i]);
      end
      if (l3_fwd_valid && l3_fwd_ready) exp_q[1][N][l3_fwd.dst].push_back(l3_fwd);
      if (l3_rsp_out_valid && l3_rsp_out_ready) exp_q[2][N][l3_rsp_out.dst].push_back(l3_rsp_out);
      if (l3_req_valid && l3_req_ready) got(0, l3_req, N);
      if (l3_rsp_in_valid && l3_rsp_in_ready) got(2, l3_rsp_in, N);
      for (int i = 0; i < N; i++) begin
        if (l2_fwd_valid[i] && l2_fwd_ready[i]) got(1, l2_fwd[i], i);
        if (l2_rsp_in_valid[i] && l2_rsp_in_ready[i]) got(2, l2_rsp_in[i], i);
      end
    end
    for (int i = 0; i < N; i++) check(grants[i] > 50, $sformatf("L2 %0d granted %0d times", i, grants[i]));
    check(delivered > 2000, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
