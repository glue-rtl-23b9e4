// tb_l3_cache: one complete L3 (4 sets x 2 ways here, so evictions come
// quickly) with a behavioural memory behind it, the test playing the four
// L2s on the network planes. Checks, through the interfaces, serializer, FSM
// and banks: a read miss fetched from memory and granted exclusive; a write
// to an owned line forwarded (FWD_GETM naming the requester); PUTM data kept
// and served to the next reader; FWD_GETS to an exclusive owner with the
// owner's copy absorbed; a write to a shared line invalidating both sharers
// and answered after both acknowledgements, two reads arriving meanwhile held
// until then, one forwarded to the new owner, one served afterwards; non-cacheable writes and reads
// sent to memory and answered with NC_DATA to the right L2; and dirty lines
// written back to memory when evicted, readable again afterwards.
`timescale 1ns/1ps
module tb_l3_cache;
  import glue_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic noc_req_valid = 0, noc_req_ready, noc_rsp_in_valid = 0, noc_rsp_in_ready;
  msg_t noc_req = '0, noc_rsp_in = '0;
  logic noc_fwd_valid, noc_fwd_ready = 1, noc_rsp_out_valid, noc_rsp_out_ready = 1;
  msg_t noc_fwd, noc_rsp_out;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t mem_req;
  mem_rsp_t mem_rsp;
  logic ev_mem_fill, ev_writeback, ev_inv, ev_fwd, ev_replay;
  int n_rd, n_wr;

  l3_cache #(.SETS(4), .WAYS(2)) dut (.*);

  glue_mem_model #(.LAT(5)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp(mem_rsp),
    .n_reads(n_rd), .n_writes(n_wr));

  msg_t qf [$], qr [$];
  int n_wb = 0, n_fill = 0;
  always @(posedge clk) if (rst_n) begin
    if (noc_fwd_valid && noc_fwd_ready) qf.push_back(noc_fwd);
    if (noc_rsp_out_valid && noc_rsp_out_ready) qr.push_back(noc_rsp_out);
    n_wb += int'(ev_writeback);
    n_fill += int'(ev_mem_fill);
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

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < LINE_WORDS; w++) l[w*WORD_W +: WORD_W] = {4'hA, a[23:0], 4'(w)};
    return l;
  endfunction
  function automatic line_t L(int s);
    return {32'(s * 4 + 3), 32'(s * 4 + 2), 32'(s * 4 + 1), 32'(s * 4)};
  endfunction

  task automatic req(msg_type_t t, laddr_t a, int src, line_t d = '0, logic dirty = 0, logic [3:0] m = '1);
    @(negedge clk);
    noc_req = '0; noc_req.mtype = t; noc_req.src = node_t'(src); noc_req.dst = L3_ID;
    noc_req.addr = a; noc_req.data = d; noc_req.dirty = dirty; noc_req.wmask = m;
    noc_req_valid = 1;
    @(posedge clk);
    while (!noc_req_ready) @(posedge clk);
    @(negedge clk);
    noc_req_valid = 0;
  endtask

  task automatic rsp(msg_type_t t, laddr_t a, int src, line_t d = '0, logic dirty = 0);
    @(negedge clk);
    noc_rsp_in = '0; noc_rsp_in.mtype = t; noc_rsp_in.src = node_t'(src); noc_rsp_in.dst = L3_ID;
    noc_rsp_in.addr = a; noc_rsp_in.data = d; noc_rsp_in.dirty = dirty;
    noc_rsp_in_valid = 1;
    @(posedge clk);
    while (!noc_rsp_in_ready) @(posedge clk);
    @(negedge clk);
    noc_rsp_in_valid = 0;
  endtask

  task automatic settle(int n = 30);
    repeat (n) @(negedge clk);
  endtask

  task automatic want_data(int dst, laddr_t a, line_t d, bit excl, string what);
    settle();
    check(qr.size() == 1 && qr[0].mtype == M_DATA && int'(qr[0].dst) == dst && qr[0].addr == a
          && qr[0].data == d && qr[0].excl == excl, what);
    qr.delete();
  endtask

  localparam laddr_t A = 28'h0000100, B = 28'h0000204, C = 28'h0000308, D = 28'h000040C;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    settle(3);

    req(M_GETS, A, 0);
    want_data(0, A, init_line(A), 1, "read miss filled from memory, exclusive");
    check(n_fill == 1, "memory fill counted");

    req(M_GETM, A, 1);
    settle();
    check(qf.size() == 1 && qf[0].mtype == M_FWD_GETM && qf[0].dst == 3'd0 && qf[0].src == 3'd1,
          "write to an owned line forwarded to the owner");
    check(qr.size() == 0, "directory sends no data itself");
    qf.delete();

    req(M_PUTM, A, 1, L(1), 1);
    settle();
    check(qf.size() == 1 && qf[0].mtype == M_PUT_ACK && qf[0].dst == 3'd1, "PUTM acknowledged");
    qf.delete();
    req(M_GETS, A, 2);
    want_data(2, A, L(1), 1, "written-back data served, exclusive");

    req(M_GETS, A, 3);
    settle();
    check(qf.size() == 1 && qf[0].mtype == M_FWD_GETS && qf[0].dst == 3'd2 && qf[0].src == 3'd3,
          "read of an exclusive line forwarded");
    qf.delete();
    rsp(M_DATA_DIR, A, 2, L(1), 0);

    req(M_GETM, A, 0);
    settle();
    check(qf.size() == 2 && qf[0].mtype == M_INV && qf[1].mtype == M_INV, "both sharers invalidated");
    check(qr.size() == 0, "no data before the acknowledgements");
    qf.delete();
    // a read of the line while acknowledgements are outstanding waits
    req(M_GETS, A, 1);
    fork req(M_GETS, A, 2); join_none
    settle();
    check(qr.size() == 0 && qf.size() == 0, "reads of a transient line held");
    rsp(M_INV_ACK, A, 2);
    rsp(M_INV_ACK, A, 3);
    want_data(0, A, L(1), 1, "data after both acknowledgements");
    check(qf.size() == 1 && qf[0].mtype == M_FWD_GETS && qf[0].dst == 3'd0 && qf[0].src == 3'd1,
          "parked read forwarded to the new owner");
    qf.delete();
    rsp(M_DATA_DIR, A, 0, L(1), 0);
    want_data(2, A, L(1), 0, "second held read served shared afterwards");
    req(M_PUTS, A, 1);
    req(M_PUTS, A, 2);
    settle(); qf.delete();
    req(M_GETM, A, 0);
    want_data(0, A, L(1), 1, "upgrade by the only sharer");

    // non-cacheable: write from 1, read from 3
    req(M_NC_WR, 28'h0F00000, 1, {4{32'h600DF00D}}, 0, 4'b0001);
    settle();
    req(M_NC_RD, 28'h0F00000, 3);
    settle();
    check(qr.size() == 1 && qr[0].mtype == M_NC_DATA && qr[0].dst == 3'd3
          && qr[0].data[31:0] == 32'h600DF00D, "non-cacheable read answered to its requester");
    qr.delete();

    // owner 0 gives A back modified; B, C, D map to the same set as A
    req(M_PUTM, A, 0, L(2), 1);
    settle(); qf.delete();
    req(M_GETS, B, 1);
    want_data(1, B, init_line(B), 1, "B filled");
    req(M_PUTS, B, 1);
    settle(); qf.delete();
    req(M_GETS, C, 1);
    want_data(1, C, init_line(C), 1, "C filled, a victim evicted");
    req(M_PUTS, C, 1);
    settle(); qf.delete();
    req(M_GETS, D, 2);
    want_data(2, D, init_line(D), 1, "D filled, another victim evicted");
    check(n_wb >= 1 && n_wr >= 2, "dirty line written back to memory");
    req(M_PUTS, D, 2);
    settle(); qf.delete();
    req(M_GETS, A, 3);
    want_data(3, A, L(2), 1, "written-back line read back from memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
