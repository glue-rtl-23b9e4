// tb_l3_tag_bank: random writes and lookups on a 4-set, 4-way L3 tag bank,
// checked against a reference copy of every entry kept here. Each lookup
// must answer exactly one cycle later; a hit must give the way holding the
// tag and its stored metadata (state, dirty, owner, sharers); a miss must
// give an empty way when the set has one, otherwise a victim way in state
// D_I (no L2 holds it) with its metadata unchanged, otherwise neither. The
// rotating victim pointer must not always name the same way.
`timescale 1ns/1ps
module tb_l3_tag_bank;
  import glue_pkg::*;
  localparam int SETS = 4, WAYS = 4, SET_W = 2, WAY_W = 2, TAG_W = LADDR_W - SET_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid = 0, req_write = 0;
  logic [SET_W-1:0] req_set = '0;
  logic [TAG_W-1:0] req_tag = '0;
  logic [WAY_W-1:0] req_way = '0;
  l3_meta_t req_meta = '0;
  logic rsp_valid, rsp_hit, rsp_free, evict_valid;
  logic [WAY_W-1:0] rsp_way, evict_way;
  l3_meta_t rsp_meta, evict_meta;
  logic [TAG_W-1:0] evict_tag;

  l3_tag_bank #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  l3_meta_t         rmd [SETS][WAYS];
  logic [TAG_W-1:0] rtg [SETS][WAYS];
  int checks = 0, failures = 0;
  int victims [WAYS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic l3_meta_t rmeta();
    l3_meta_t m;
    l3_state_t sts [5] = '{D_NP, D_I, D_S, D_EM, D_IS_D};
    m = '0;
    m.state = sts[$urandom_range(0, 4)];
    m.dirty = 1'($urandom()); m.owner = 3'($urandom_range(0, 3));
    m.sharers = NUM_L2'($urandom());
    return m;
  endfunction

  function automatic int ref_hit(int s, logic [TAG_W-1:0] t);
    for (int w = 0; w < WAYS; w++) if (rmd[s][w].state != D_NP && rtg[s][w] == t) return w;
    return -1;
  endfunction

  initial begin
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin
      rmd[s][w] = '0; rmd[s][w].state = D_NP; rtg[s][w] = '0;
    end
    for (int w = 0; w < WAYS; w++) victims[w] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      int s, h;
      logic [TAG_W-1:0] t;
      @(negedge clk);
      s = $urandom_range(0, SETS-1);
      t = TAG_W'($urandom_range(0, 7));
      h = ref_hit(s, t);
      req_valid = 1; req_set = SET_W'(s); req_tag = t;
      if ($urandom_range(0, 1) == 1) begin
        int w;
        w = (h >= 0) ? h : int'($urandom_range(0, WAYS-1));
        req_write = 1; req_way = WAY_W'(w); req_meta = rmeta();
        @(negedge clk);
        req_valid = 0; req_write = 0;
        rmd[s][w] = req_meta; rtg[s][w] = t;
      end else begin
        bit fr, ev;
        req_write = 0;
        @(posedge clk); #1;
        req_valid = 0;
        check(rsp_valid, "answer one cycle after the lookup");
        fr = 0; ev = 0;
        for (int w = 0; w < WAYS; w++) begin
          if (rmd[s][w].state == D_NP) fr = 1;
          if (rmd[s][w].state == D_I) ev = 1;
        end
        if (h >= 0) begin
          check(rsp_hit && int'(rsp_way) == h && rsp_meta == rmd[s][h], "hit way and metadata");
          check(!evict_valid && !rsp_free, "no victim on a hit");
        end else if (fr) begin
          check(!rsp_hit && rsp_free && rmd[s][rsp_way].state == D_NP && !evict_valid, "empty way on a miss");
        end else if (ev) begin
          check(!rsp_hit && !rsp_free && evict_valid && rmd[s][evict_way].state == D_I, "victim not held by an L2");
          check(evict_meta == rmd[s][evict_way] && evict_tag == rtg[s][evict_way], "victim metadata");
          victims[evict_way]++;
        end else begin
          check(!rsp_hit && !rsp_free && !evict_valid, "no way available");
        end
      end
    end
    begin
      int used;
      used = 0;
      for (int w = 0; w < WAYS; w++) if (victims[w] > 0) used++;
      check(used > 1, "victim pointer rotates");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
