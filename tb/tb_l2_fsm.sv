// tb_l2_fsm: directed test of the L2 coherence controller together with its
// tag bank and data bank (2 ways, 4 sets so sets fill quickly). The test
// plays the serializer and the directory: it hands messages to the FSM and
// checks every message, processor answer and L1 invalidation it produces.
// Covered: read miss to E, silent E->M write, read hit, FWD_GETS from M
// (data to the requester plus dirty copy to the directory), write to S
// (acknowledged at once, GETM sent), INV while the upgrade is pending
// (answered at once), merge of the buffered write into the arriving data,
// a shared fill needing GETM before it can be written, eviction of a full
// set (PUTM with the line's data, request replayed
// after PUT_ACK), the forward-plane stall (FWD_GETM for a line still waiting
// for data is held, answered after the data), an INV taken while the
// request output is full, and a flush that writes back every line before it
// is answered.
`timescale 1ns/1ps
module tb_l2_fsm;
  import glue_pkg::*;
  localparam int SETS = 4, WAYS = 2;
  localparam int SET_W = 2, WAY_W = 1, TAG_W = LADDR_W - SET_W;
  localparam logic [ID_W-1:0] ME = 3'd1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, fe_block, fwd_block;
  msg_t in_msg = '0;
  logic tb_req_valid, tb_req_write, tb_rsp_valid, tb_rsp_hit, tb_rsp_free, tb_evict_valid;
  logic [SET_W-1:0] tb_req_set, tb_flush_set;
  logic [TAG_W-1:0] tb_req_tag, tb_evict_tag, tb_flush_tag;
  logic [WAY_W-1:0] tb_req_way, tb_rsp_way, tb_evict_way, tb_flush_way;
  l2_state_t tb_req_state, tb_rsp_state, tb_evict_state, tb_flush_state;
  logic tb_flush_in, tb_flush_valid, tb_flush_ready, tb_flush_done, tb_flush_done_ack;
  logic [SET_W-1:0] db_rd_set, db_wr_set;
  logic [WAY_W-1:0] db_rd_way, db_wr_way;
  line_t db_rd_data, db_wr_data;
  logic db_wr_en;
  logic [LINE_WORDS-1:0] db_wr_mask;
  logic oreq_valid, orsp_valid, cpu_rsp_valid, inv_valid;
  logic oreq_room = 1, orsp_room2 = 1, cpu_rsp_room = 1, inv_room = 1;
  msg_t oreq_msg, orsp_msg;
  cpu_rsp_t cpu_rsp;
  laddr_t inv_addr;
  logic ev_evict, ev_fwd_stall, ev_wb_stall, ev_flush_line;

  l2_fsm #(.MY_ID(ME), .SETS(SETS), .WAYS(WAYS)) dut (.*);

  l2_tag_bank #(.SETS(SETS), .WAYS(WAYS)) u_tag (
    .clk, .rst_n, .req_valid(tb_req_valid), .req_write(tb_req_write), .req_set(tb_req_set),
    .req_tag(tb_req_tag), .req_way(tb_req_way), .req_state(tb_req_state),
    .rsp_valid(tb_rsp_valid), .rsp_hit(tb_rsp_hit), .rsp_free(tb_rsp_free), .rsp_way(tb_rsp_way),
    .rsp_state(tb_rsp_state), .evict_valid(tb_evict_valid), .evict_way(tb_evict_way),
    .evict_tag(tb_evict_tag), .evict_state(tb_evict_state),
    .flush_in(tb_flush_in), .flush_valid(tb_flush_valid), .flush_ready(tb_flush_ready),
    .flush_set(tb_flush_set), .flush_way(tb_flush_way), .flush_tag(tb_flush_tag),
    .flush_state(tb_flush_state), .flush_done(tb_flush_done), .flush_done_ack(tb_flush_done_ack));

  cache_data_bank #(.SETS(SETS), .WAYS(WAYS)) u_data (
    .clk, .rd_set(db_rd_set), .rd_way(db_rd_way), .rd_data(db_rd_data), .wr_en(db_wr_en),
    .wr_set(db_wr_set), .wr_way(db_wr_way), .wr_mask(db_wr_mask), .wr_data(db_wr_data));

  msg_t qreq [$], qrsp [$];
  cpu_rsp_t qcpu [$];
  laddr_t qinv [$];
  int n_stall = 0, n_evict = 0;
  always @(posedge clk) if (rst_n) begin
    if (oreq_valid) qreq.push_back(oreq_msg);
    if (orsp_valid) qrsp.push_back(orsp_msg);
    if (cpu_rsp_valid) qcpu.push_back(cpu_rsp);
    if (inv_valid) qinv.push_back(inv_addr);
    n_stall += int'(ev_fwd_stall);
    n_evict += int'(ev_evict);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic put(msg_type_t t, laddr_t a, line_t d = '0, logic [3:0] m = '0,
                     logic [ID_W-1:0] src = L3_ID, logic excl = 0);
    @(negedge clk);
    in_msg = '0; in_msg.mtype = t; in_msg.addr = a; in_msg.data = d; in_msg.wmask = m;
    in_msg.src = src; in_msg.dst = ME; in_msg.excl = excl;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic settle(int n = 6);
    repeat (n) @(negedge clk);
  endtask

  function automatic line_t L(int s);
    return {32'(s * 4 + 3), 32'(s * 4 + 2), 32'(s * 4 + 1), 32'(s * 4)};
  endfunction

  task automatic want_req(msg_type_t t, laddr_t a, string what);
    settle();
    check(qreq.size() == 1 && qreq[0].mtype == t && qreq[0].addr == a && qreq[0].dst == L3_ID
          && qreq[0].src == ME, what);
    qreq.delete();
  endtask

  task automatic want_cpu(cpu_op_t op, line_t d, bit cmp_data, string what);
    settle();
    check(qcpu.size() == 1 && qcpu[0].op == op && (!cmp_data || qcpu[0].data == d), what);
    qcpu.delete();
  endtask

  task automatic none(string what);
    settle();
    check(qreq.size() == 0 && qrsp.size() == 0 && qcpu.size() == 0, what);
  endtask

  // line addresses: set is the low two bits
  localparam laddr_t A = 28'h100, B = 28'h200, C = 28'h300, D = 28'h101, E = 28'h102;

  line_t la, exp_a, exp_b;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    settle(3);

    // read miss -> GETS, exclusive data -> E, line returned
    put(M_CPU_RD, A);
    want_req(M_GETS, A, "read miss sends GETS");
    check(qcpu.size() == 0, "read miss not answered before data");
    put(M_DATA, A, L(1), '0, L3_ID, 1);
    want_cpu(CPU_READ, L(1), 1, "read miss answered with the line");

    // write hit in E: answered, no network traffic (E -> M)
    put(M_CPU_WR, A, {4{32'hCAFE0001}}, 4'b0010);
    want_cpu(CPU_WRITE, '0, 0, "write hit answered");
    check(qreq.size() == 0, "E->M upgrade is silent");
    exp_a = merge_words(L(1), {4{32'hCAFE0001}}, 4'b0010);
    put(M_CPU_RD, A);
    want_cpu(CPU_READ, exp_a, 1, "read hit sees the write");

    // FWD_GETS from node 2: data to node 2, dirty copy to the directory, line becomes S
    put(M_FWD_GETS, A, '0, '0, 3'd2);
    settle();
    check(qrsp.size() == 2, "FWD_GETS gives two responses");
    if (qrsp.size() == 2) begin
      check(qrsp[0].mtype == M_DATA && qrsp[0].dst == 3'd2 && qrsp[0].data == exp_a, "data to requester");
      check(qrsp[1].mtype == M_DATA_DIR && qrsp[1].dst == L3_ID && qrsp[1].dirty && qrsp[1].data == exp_a,
            "dirty copy to directory");
    end
    qrsp.delete();

    // write to S: acknowledged at once, GETM sent; INV meanwhile answered at once
    put(M_CPU_WR, A, {4{32'hCAFE0002}}, 4'b0100);
    want_cpu(CPU_WRITE, '0, 0, "write to S acknowledged at once");
    want_req(M_GETM, A, "write to S sends GETM");
    put(M_INV, A);
    settle();
    check(qrsp.size() == 1 && qrsp[0].mtype == M_INV_ACK && qrsp[0].dst == L3_ID, "INV during upgrade acked");
    check(qinv.size() == 1 && qinv[0] == A, "L1 invalidated");
    qrsp.delete(); qinv.delete();
    put(M_DATA, A, L(2), '0, L3_ID, 0);
    none("GETM data needs no answer");
    exp_a = merge_words(L(2), {4{32'hCAFE0002}}, 4'b0100);
    put(M_CPU_RD, A);
    want_cpu(CPU_READ, exp_a, 1, "buffered write merged into data");

    // second line in set 0, shared
    put(M_CPU_RD, B);
    want_req(M_GETS, B, "second read miss");
    put(M_DATA, B, L(3), '0, L3_ID, 0);
    want_cpu(CPU_READ, L(3), 1, "shared fill");
    // a shared fill is not writable: the write needs GETM
    put(M_CPU_WR, B, {4{32'hBEEF0003}}, 4'b0001);
    want_cpu(CPU_WRITE, '0, 0, "write to shared fill acknowledged");
    want_req(M_GETM, B, "write to a shared fill sends GETM");
    put(M_DATA, B, L(3), '0, L3_ID, 0);
    exp_b = merge_words(L(3), {4{32'hBEEF0003}}, 4'b0001);

    // third line in set 0: a victim must go first
    put(M_CPU_RD, C);
    settle();
    check(n_evict == 1, "eviction started");
    check(qreq.size() == 1 && qcpu.size() == 0, "one PUT, request waits");
    if (qreq.size() == 1) begin
      if (qreq[0].addr == A) check(qreq[0].mtype == M_PUTM && qreq[0].data == exp_a, "PUTM carries the line");
      else check(qreq[0].addr == B && qreq[0].mtype == M_PUTM && qreq[0].data == exp_b, "PUTM carries the merged line");
      la = qreq[0].addr;
    end
    qreq.delete();
    put(M_PUT_ACK, la);
    want_req(M_GETS, C, "request replayed after PUT_ACK");
    put(M_DATA, C, L(4), '0, L3_ID, 1);
    want_cpu(CPU_READ, L(4), 1, "replayed read answered");

    // forward-plane stall: FWD_GETM for a line still waiting for its data
    put(M_CPU_RD, D);
    want_req(M_GETS, D, "read miss D");
    put(M_FWD_GETM, D, '0, '0, 3'd3);
    settle();
    check(n_stall == 1 && fwd_block && qrsp.size() == 0, "forward held while data pending");
    put(M_DATA, D, L(5), '0, L3_ID, 1);
    settle();
    check(qcpu.size() == 1 && qcpu[0].data == L(5), "read answered first");
    check(qrsp.size() == 1 && qrsp[0].mtype == M_DATA && qrsp[0].dst == 3'd3 && qrsp[0].data == L(5),
          "held forward answered after the data");
    check(!fwd_block, "forward buffer empty again");
    qcpu.delete(); qrsp.delete(); qinv.delete();

    // INV accepted while the request output has no room
    put(M_CPU_RD, E);
    want_req(M_GETS, E, "read miss E");
    put(M_DATA, E, L(6), '0, L3_ID, 0);
    want_cpu(CPU_READ, L(6), 1, "E shared");
    oreq_room = 0;
    put(M_INV, E);
    settle();
    check(qrsp.size() == 1 && qrsp[0].mtype == M_INV_ACK, "INV taken with request output full");
    qrsp.delete(); qinv.delete();
    oreq_room = 1;

    // flush: every valid line written back, then answered
    put(M_CPU_FLUSH, '0);
    for (int k = 0; k < 8; k++) begin
      settle(8);
      while (qreq.size() > 0) begin
        msg_t m;
        m = qreq.pop_front();
        check(m.mtype inside {M_PUTS, M_PUTM}, "flush sends PUTs");
        if (m.addr == C) check(m.mtype == M_PUTS || m.data == L(4), "flush data of C");
        put(M_PUT_ACK, m.addr);
      end
    end
    settle(10);
    check(qcpu.size() == 1 && qcpu[0].op == CPU_FLUSH, "flush answered");
    check(!fe_block, "frontend free after flush");
    qcpu.delete();
    // after the flush every line misses
    put(M_CPU_RD, C);
    want_req(M_GETS, C, "miss after flush");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
