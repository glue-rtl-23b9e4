// l3_tag_bank: tag and directory metadata of every (set, way) of the L3.
//
// Same organisation as the L2 tag bank, with a richer entry: besides the tag
// it holds the directory state, the dirty bit, the owner and the list of
// sharing L2s (l3_meta_t). Nominal plane: a lookup (req_valid, req_write low)
// compares the tag with all ways of the set at once and answers one cycle
// later with hit, way and metadata; on a miss rsp_way is an empty way if there
// is one (rsp_free). A write stores req_tag and req_meta at (req_set,
// req_way). Eviction plane: a miss in a full set names, on evict_valid, a
// victim way that no L2 holds (state D_I), chosen by a rotating pointer; its
// metadata is not changed. Because the L3 has as many ways as all L2s
// together, such a way always exists once the requesting L2 has made room,
// so the L3 never has to recall a line from an L2. If none exists (all ways
// busy or held) neither rsp_free nor evict_valid is set and the FSM retries.
// Whole-cache flushing is not part of the L3. The structure follows the
// document; the victim policy is this design's choice.
module l3_tag_bank
  import glue_pkg::*;
#(
  parameter int unsigned SETS  = L2_SETS,
  parameter int unsigned WAYS  = L3_WAYS,
  parameter int unsigned SET_W = $clog2(SETS),
  parameter int unsigned WAY_W = $clog2(WAYS),
  parameter int unsigned TAG_W = LADDR_W - SET_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  input  logic             req_write,
  input  logic [SET_W-1:0] req_set,
  input  logic [TAG_W-1:0] req_tag,
  input  logic [WAY_W-1:0] req_way,
  input  l3_meta_t         req_meta,
  output logic             rsp_valid,
  output logic             rsp_hit,
  output logic             rsp_free,
  output logic [WAY_W-1:0] rsp_way,
  output l3_meta_t         rsp_meta,
  output logic             evict_valid,
  output logic [WAY_W-1:0] evict_way,
  output logic [TAG_W-1:0] evict_tag,
  output l3_meta_t         evict_meta
);
  l3_meta_t         md [SETS][WAYS];
  logic [TAG_W-1:0] tg [SETS][WAYS];

  logic             hit_c, free_c, ev_c;
  logic [WAY_W-1:0] hit_way_c, free_way_c, ev_way_c, rr_ptr;

  always_comb begin
    hit_c = 1'b0; hit_way_c = '0;
    free_c = 1'b0; free_way_c = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (md[req_set][w].state != D_NP && tg[req_set][w] == req_tag) begin
        hit_c = 1'b1; hit_way_c = WAY_W'(w);
      end
      if (md[req_set][w].state == D_NP) begin
        free_c = 1'b1; free_way_c = WAY_W'(w);
      end
    end
    ev_c = 1'b0; ev_way_c = '0;
    for (int k = WAYS-1; k >= 0; k--) begin
      logic [WAY_W-1:0] w;
      w = rr_ptr + WAY_W'(k);
      if (md[req_set][w].state == D_I) begin
        ev_c = 1'b1; ev_way_c = w;
      end
    end
  end

  logic             lk_q, hit_q, free_q, ev_q;
  logic [SET_W-1:0] set_q;
  logic [WAY_W-1:0] way_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      lk_q <= 1'b0; hit_q <= 1'b0; free_q <= 1'b0; ev_q <= 1'b0;
      set_q <= '0; way_q <= '0; rr_ptr <= '0;
    end else begin
      rsp_valid <= req_valid;
      lk_q      <= req_valid && !req_write;
      set_q     <= req_set;
      hit_q     <= hit_c;
      free_q    <= !hit_c && free_c;
      ev_q      <= !hit_c && !free_c && ev_c;
      way_q     <= req_write ? req_way : hit_c ? hit_way_c : free_c ? free_way_c : ev_way_c;
      if (req_valid && !req_write && !hit_c && !free_c && ev_c) rr_ptr <= rr_ptr + 1'b1;
    end
  end

  assign rsp_hit     = lk_q && hit_q;
  assign rsp_free    = lk_q && free_q;
  assign rsp_way     = way_q;
  assign rsp_meta    = md[set_q][way_q];
  assign evict_valid = lk_q && ev_q;
  assign evict_way   = way_q;
  assign evict_tag   = tg[set_q][way_q];
  assign evict_meta  = md[set_q][way_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          md[s][w] <= '{state: D_NP, dirty: 1'b0, owner: '0, sharers: '0, acks: '0};
    end else if (req_valid && req_write) begin
      md[req_set][req_way] <= req_meta;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_write) tg[req_set][req_way] <= req_tag;
  end
endmodule
