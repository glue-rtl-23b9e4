// tb_l2_tag_bank: checks the L2 tag bank's three planes on a small 4-set,
// 4-way instance. Nominal plane: a lookup answers one cycle later (the read-
// hit bound of 3 cycles is checked), misses report an empty way while one
// exists, writes are seen by the next lookup. Eviction plane: a miss in a
// full set names a stable victim, skips transient ways, and names none when
// every way is transient; the victim's state is left unchanged. Flush plane:
// every valid stable entry is offered exactly once, offers pause while a
// nominal request is present, transient entries are waited for, and
// flush_done rises only when every entry is invalid.
`timescale 1ns/1ps
module tb_l2_tag_bank;
  import glue_pkg::*;
  localparam int SETS = 4, WAYS = 4, SET_W = 2, WAY_W = 2, TAG_W = LADDR_W - SET_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_write = 0;
  logic [SET_W-1:0] req_set = '0;
  logic [TAG_W-1:0] req_tag = '0;
  logic [WAY_W-1:0] req_way = '0;
  l2_state_t req_state = L2_I;
  logic rsp_valid, rsp_hit, rsp_free, evict_valid;
  logic [WAY_W-1:0] rsp_way, evict_way, flush_way;
  l2_state_t rsp_state, evict_state, flush_state;
  logic [TAG_W-1:0] evict_tag, flush_tag;
  logic flush_in = 0, flush_valid, flush_ready = 0, flush_done, flush_done_ack = 0;
  logic [SET_W-1:0] flush_set;

  l2_tag_bank #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write one entry
  task automatic wr(int s, int w, int t, l2_state_t st);
    @(negedge clk);
    req_valid = 1; req_write = 1; req_set = SET_W'(s); req_way = WAY_W'(w);
    req_tag = TAG_W'(t); req_state = st;
    @(negedge clk);
    req_valid = 0; req_write = 0;
  endtask

  // lookup; results sampled when rsp_valid, latency counted in cycles
  task automatic lk(int s, int t, output bit hit, output bit free, output bit ev,
                    output int way, output l2_state_t st, output int lat);
    @(negedge clk);
    req_valid = 1; req_write = 0; req_set = SET_W'(s); req_tag = TAG_W'(t);
    lat = 0;
    @(negedge clk);
    req_valid = 0;
    lat = 1;
    while (!rsp_valid) begin @(negedge clk); lat++; end
    hit = rsp_hit; free = rsp_free; ev = evict_valid; way = int'(rsp_way);
    st = ev ? evict_state : rsp_state;
  endtask

  bit hit, free, ev;
  int way, lat;
  l2_state_t st;
  int offered [SETS][WAYS];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // empty bank: miss with a free way
    lk(1, 'h55, hit, free, ev, way, st, lat);
    check(!hit && free && !ev, "cold lookup misses with a free way");
    // fill set 1
    wr(1, 0, 'h10, L2_S);
    wr(1, 1, 'h11, L2_E);
    wr(1, 2, 'h12, L2_M);
    lk(1, 'h11, hit, free, ev, way, st, lat);
    check(hit && way == 1 && st == L2_E, "hit finds way 1 in E");
    check(lat <= 3, $sformatf("read-hit lookup latency %0d <= 3", lat));
    check(lat == 1, "lookup answers in one cycle");
    lk(1, 'h13, hit, free, ev, way, st, lat);
    check(!hit && free && way == 3, "miss reports the last empty way");
    wr(1, 3, 'h13, L2_IS_D);
    // set full: eviction plane
    lk(1, 'h20, hit, free, ev, way, st, lat);
    check(!hit && !free && ev && way != 3 && st inside {L2_S, L2_E, L2_M}, "full set names a stable victim");
    begin
      int v1;
      v1 = way;
      lk(1, 'h20, hit, free, ev, way, st, lat);
      check(ev && way != 3, "second victim is stable too");
      check(way != v1, "rotating pointer moves the victim");
    end
    lk(1, 'h10, hit, free, ev, way, st, lat);
    check(hit && st == L2_S, "naming a victim does not change its state");
    // all transient: no victim
    wr(1, 0, 'h10, L2_MI_A); wr(1, 1, 'h11, L2_SI_A); wr(1, 2, 'h12, L2_IM_D);
    lk(1, 'h20, hit, free, ev, way, st, lat);
    check(!hit && !free && !ev, "all-transient set names no victim");

    // ---- flush ----
    wr(1, 0, 'h10, L2_S); wr(1, 1, 'h11, L2_I); wr(1, 2, 'h12, L2_M); wr(1, 3, 'h13, L2_I);
    wr(3, 2, 'h32, L2_E);
    wr(0, 1, 'h01, L2_SI_A);           // transient: must be waited for
    foreach (offered[s, w]) offered[s][w] = 0;
    @(negedge clk); flush_in = 1; @(negedge clk); flush_in = 0;
    for (int c = 0; c < 400 && !flush_done; c++) begin
      // every fifth cycle a nominal request competes: no offer then
      if (c % 5 == 4) begin
        req_valid = 1; req_write = 0; req_set = 2; req_tag = 'h99;
        #1 check(!flush_valid, "flush plane yields to a nominal request");
        @(negedge clk); req_valid = 0;
        continue;
      end
      if (c == 40) begin         // the transient entry settles
        req_valid = 1; req_write = 1; req_set = 0; req_way = 1; req_tag = 'h01; req_state = L2_I;
        @(negedge clk); req_valid = 0; req_write = 0;
        continue;
      end
      if (flush_valid) begin
        logic [SET_W-1:0] fs;
        logic [WAY_W-1:0] fw;
        logic [TAG_W-1:0] ft;
        fs = flush_set; fw = flush_way; ft = flush_tag;
        offered[fs][fw]++;
        check(flush_state inside {L2_S, L2_E, L2_M}, "flush offers only stable valid entries");
        // the FSM takes it and, the cycle after, the entry becomes invalid
        flush_ready = 1;
        @(negedge clk);
        flush_ready = 0;
        req_valid = 1; req_write = 1; req_set = fs; req_way = fw; req_state = L2_I;
        req_tag = ft;
        @(negedge clk);
        req_valid = 0; req_write = 0;
      end else @(negedge clk);
    end
    check(flush_done, "flush completes");
    check(offered[1][0] == 1 && offered[1][2] == 1 && offered[3][2] == 1, "each valid entry offered once");
    check(offered[1][1] == 0 && offered[0][1] == 0, "invalid and transient entries not offered");
    @(negedge clk); flush_done_ack = 1; @(negedge clk); flush_done_ack = 0;
    @(negedge clk);
    check(!flush_done, "flush_done drops after acknowledgement");
    lk(1, 'h10, hit, free, ev, way, st, lat);
    check(!hit && free, "flushed line is gone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
