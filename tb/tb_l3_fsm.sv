// tb_l3_fsm: directed test of the L3 directory controller together with its
// tag bank and data bank (2 ways, 4 sets). The test plays the serializer, the
// four L2s and memory, hands messages to the FSM and checks every forward,
// response and memory request it produces. Covered: read miss fetched from
// memory and granted exclusive; read of an owned line forwarded to the owner
// (FWD_GETS naming the requester) and the owner's copy absorbed; write to a
// shared line invalidating every other sharer and answering only after all
// acknowledgements; a request for a transient line parked (req_block) and
// replayed; PUTS and a stale PUTM acknowledged; a PUTM writing back dirty
// data; eviction of a dirty way written to memory before the new fill; and a
// later miss evicting a line that was made dirty by an owner's copy.
`timescale 1ns/1ps
module tb_l3_fsm;
  import glue_pkg::*;
  localparam int SETS = 4, WAYS = 2;
  localparam int SET_W = 2, WAY_W = 1, TAG_W = LADDR_W - SET_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, req_block;
  msg_t in_msg = '0;
  logic tb_req_valid, tb_req_write, tb_rsp_valid, tb_rsp_hit, tb_rsp_free, tb_evict_valid;
  logic [SET_W-1:0] tb_req_set;
  logic [TAG_W-1:0] tb_req_tag, tb_evict_tag;
  logic [WAY_W-1:0] tb_req_way, tb_rsp_way, tb_evict_way;
  l3_meta_t tb_req_meta, tb_rsp_meta, tb_evict_meta;
  logic [SET_W-1:0] db_rd_set, db_wr_set;
  logic [WAY_W-1:0] db_rd_way, db_wr_way;
  line_t db_rd_data, db_wr_data;
  logic db_wr_en;
  logic ofwd_valid, orsp_valid, omem_valid;
  logic ofwd_room = 1, orsp_room = 1, omem_room2 = 1;
  msg_t ofwd_msg, orsp_msg;
  mem_req_t omem_req;
  logic ev_mem_fill, ev_writeback, ev_inv, ev_fwd, ev_replay;

  l3_fsm #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  l3_tag_bank #(.SETS(SETS), .WAYS(WAYS)) u_tag (
    .clk, .rst_n, .req_valid(tb_req_valid), .req_write(tb_req_write), .req_set(tb_req_set),
    .req_tag(tb_req_tag), .req_way(tb_req_way), .req_meta(tb_req_meta),
    .rsp_valid(tb_rsp_valid), .rsp_hit(tb_rsp_hit), .rsp_free(tb_rsp_free), .rsp_way(tb_rsp_way),
    .rsp_meta(tb_rsp_meta), .evict_valid(tb_evict_valid), .evict_way(tb_evict_way),
    .evict_tag(tb_evict_tag), .evict_meta(tb_evict_meta));

  cache_data_bank #(.SETS(SETS), .WAYS(WAYS)) u_data (
    .clk, .rd_set(db_rd_set), .rd_way(db_rd_way), .rd_data(db_rd_data), .wr_en(db_wr_en),
    .wr_set(db_wr_set), .wr_way(db_wr_way), .wr_mask('1), .wr_data(db_wr_data));

  msg_t qfwd [$], qrsp [$];
  mem_req_t qmem [$];
  int n_replay = 0, n_wb = 0;
  always @(posedge clk) if (rst_n) begin
    if (ofwd_valid) qfwd.push_back(ofwd_msg);
    if (orsp_valid) qrsp.push_back(orsp_msg);
    if (omem_valid) qmem.push_back(omem_req);
    n_replay += int'(ev_replay);
    n_wb += int'(ev_writeback);
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

  task automatic put(msg_type_t t, laddr_t a, int src, line_t d = '0, logic dirty = 0);
    @(negedge clk);
    in_msg = '0; in_msg.mtype = t; in_msg.addr = a; in_msg.data = d; in_msg.wmask = '1;
    in_msg.src = node_t'(src); in_msg.dst = L3_ID; in_msg.dirty = dirty;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic settle(int n = 8);
    repeat (n) @(negedge clk);
  endtask

  function automatic line_t L(int s);
    return {32'(s * 4 + 3), 32'(s * 4 + 2), 32'(s * 4 + 1), 32'(s * 4)};
  endfunction

  task automatic want_data(int dst, laddr_t a, line_t d, bit excl, string what);
    settle();
    check(qrsp.size() == 1 && qrsp[0].mtype == M_DATA && int'(qrsp[0].dst) == dst && qrsp[0].addr == a
          && qrsp[0].data == d && qrsp[0].excl == excl, what);
    qrsp.delete();
  endtask

  task automatic want_fwd(msg_type_t t, int dst, laddr_t a, int req, string what);
    settle();
    check(qfwd.size() == 1 && qfwd[0].mtype == t && int'(qfwd[0].dst) == dst && qfwd[0].addr == a
          && int'(qfwd[0].src) == req, what);
    qfwd.delete();
  endtask

  task automatic want_mem_rd(laddr_t a, string what);
    settle();
    check(qmem.size() == 1 && !qmem[0].write && qmem[0].addr == a && qmem[0].tag == '0, what);
    qmem.delete();
  endtask

  localparam laddr_t A = 28'h100, B = 28'h200, C = 28'h300;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    settle(3);

    // read miss: memory fetch, then exclusive grant
    put(M_GETS, A, 0);
    want_mem_rd(A, "read miss fetches from memory");
    check(qrsp.size() == 0, "no answer before the fill");
    put(M_DATA, A, L3_ID, L(1));
    want_data(0, A, L(1), 1, "fill granted exclusive");

    // read of an owned line: forwarded to the owner
    put(M_GETS, A, 1);
    want_fwd(M_FWD_GETS, 0, A, 1, "FWD_GETS to the owner names the requester");
    check(qrsp.size() == 0 && qmem.size() == 0, "directory sends no data itself");
    put(M_DATA_DIR, A, 0, L(2), 1);
    settle();
    check(qrsp.size() == 0 && qfwd.size() == 0, "owner copy absorbed silently");

    // write to a shared line: invalidate both sharers, answer after both acks
    put(M_GETM, A, 2);
    settle();
    check(qfwd.size() == 2, "two invalidations");
    if (qfwd.size() == 2)
      check(qfwd[0].mtype == M_INV && qfwd[1].mtype == M_INV && qfwd[0].dst != qfwd[1].dst
            && qfwd[0].dst inside {3'd0, 3'd1} && qfwd[1].dst inside {3'd0, 3'd1}, "INV to each sharer");
    qfwd.delete();
    // another request for the transient line is parked
    put(M_GETS, A, 3);
    settle();
    check(req_block && n_replay == 1, "request for a transient line parked");
    put(M_INV_ACK, A, 0);
    settle();
    check(qrsp.size() == 0, "no data after one of two acks");
    put(M_INV_ACK, A, 1);
    want_data(2, A, L(2), 1, "data after the last ack carries the owner's copy");
    want_fwd(M_FWD_GETS, 2, A, 3, "parked read replayed against the new owner");
    check(!req_block, "request plane free again");
    put(M_DATA_DIR, A, 2, L(3), 1);
    settle();

    // PUTS from a sharer, stale PUTM from a cache that lost the line
    put(M_PUTS, A, 3);
    want_fwd(M_PUT_ACK, 3, A, L3_ID, "PUTS acknowledged");
    put(M_PUTM, A, 0, L(9), 1);
    want_fwd(M_PUT_ACK, 0, A, L3_ID, "stale PUTM acknowledged");
    check(qmem.size() == 0, "no memory traffic for PUTs");

    // B: owned by 0, written back dirty by PUTM
    put(M_GETM, B, 0);
    want_mem_rd(B, "write miss fetches");
    put(M_DATA, B, L3_ID, L(4));
    want_data(0, B, L(4), 1, "write miss granted");
    put(M_PUTM, B, 0, L(5), 1);
    want_fwd(M_PUT_ACK, 0, B, L3_ID, "PUTM acknowledged");
    // the stale PUTM must not have changed A: read A by 1 goes to sharer set
    put(M_GETS, A, 1);
    want_data(1, A, L(3), 0, "A keeps the owner's data, granted shared");

    // C in the same set: B (no L2 holds it, dirty) is evicted and written back
    put(M_GETS, C, 1);
    settle();
    check(n_wb == 1, "write-back counted");
    check(qmem.size() == 2 && qmem[0].write && qmem[0].addr == B && qmem[0].data == L(5)
          && qmem[1].addr == C && !qmem[1].write, "dirty victim written before the fetch");
    qmem.delete();
    put(M_DATA, C, L3_ID, L(6));
    want_data(1, C, L(6), 1, "C granted exclusive");

    // A dropped by both sharers; B again: gone from the L3, A (dirty since
    // the owner's copy came back modified) is written back, B is fetched
    put(M_PUTS, A, 1);
    put(M_PUTS, A, 2);
    settle();
    qfwd.delete();
    put(M_GETS, B, 3);
    settle();
    check(qmem.size() == 2 && qmem[0].write && qmem[0].addr == A && qmem[0].data == L(3)
          && !qmem[1].write && qmem[1].addr == B, "dirty shared victim written, evicted line fetched again");
    check(n_wb == 2, "second write-back counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
