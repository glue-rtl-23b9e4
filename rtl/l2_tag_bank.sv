// l2_tag_bank: coherence state and tag of every (set, way) of an L2 cache.
//
// It has one input plane and three output planes.
//  * Nominal plane: the FSM presents a set and tag (req_valid). With
//    req_write low this is a lookup: one cycle later rsp_valid carries the
//    hit flag and way, found by comparing the tag against all ways of the set
//    at once (a one-cycle CAM lookup with one read port per way). On a miss
//    rsp_way is an empty way when one exists (rsp_free). With req_write high
//    the entry (req_set, req_way) takes req_state and req_tag at the clock
//    edge; rsp_valid is raised the next cycle as an acknowledgement.
//  * Eviction plane: when a lookup misses and the set has no empty way,
//    evict_valid is raised together with rsp_valid and names a victim way in a
//    stable state (S, E or M), chosen by a rotating pointer. If every way is
//    in a transient state neither rsp_free nor evict_valid is set and the FSM
//    must retry later. Naming a victim does not change its state: only the
//    FSM changes coherence state.
//  * Flush plane: a pulse on flush_in starts a scan of every entry. Each
//    entry that is valid and stable is offered on flush_valid until the FSM
//    takes it (flush_ready). The scan only moves in cycles without a nominal
//    request, so nominal lookups keep priority. A pass that meets transient
//    entries is repeated; when a whole pass finds every entry invalid,
//    flush_done is raised and held until flush_done_ack.
// Lookup latency is one cycle. The three planes, the one-cycle CAM lookup,
// flushing in the background and "the tag bank never changes state on its
// own" follow the document; the victim policy and the repeat-pass rule are
// this design's choices.
// The reset also disables the assertion below; lint reports that as rst_n
// being used both asynchronously and synchronously, but the assertion makes
// no logic, so the warning stands.
module l2_tag_bank
  import glue_pkg::*;
#(
  parameter int unsigned SETS  = L2_SETS,
  parameter int unsigned WAYS  = L2_WAYS,
  parameter int unsigned SET_W = $clog2(SETS),
  parameter int unsigned WAY_W = $clog2(WAYS),
  parameter int unsigned TAG_W = LADDR_W - SET_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // nominal plane
  input  logic             req_valid,
  input  logic             req_write,
  input  logic [SET_W-1:0] req_set,
  input  logic [TAG_W-1:0] req_tag,
  input  logic [WAY_W-1:0] req_way,
  input  l2_state_t        req_state,
  output logic             rsp_valid,
  output logic             rsp_hit,
  output logic             rsp_free,
  output logic [WAY_W-1:0] rsp_way,
  output l2_state_t        rsp_state,
  // eviction plane
  output logic             evict_valid,
  output logic [WAY_W-1:0] evict_way,
  output logic [TAG_W-1:0] evict_tag,
  output l2_state_t        evict_state,
  // flush plane
  input  logic             flush_in,
  output logic             flush_valid,
  input  logic             flush_ready,
  output logic [SET_W-1:0] flush_set,
  output logic [WAY_W-1:0] flush_way,
  output logic [TAG_W-1:0] flush_tag,
  output l2_state_t        flush_state,
  output logic             flush_done,
  input  logic             flush_done_ack
);
  l2_state_t        st [SETS][WAYS];
  logic [TAG_W-1:0] tg [SETS][WAYS];

  // ---- one-cycle CAM lookup ----
  logic             hit_c, free_c, ev_c;
  logic [WAY_W-1:0] hit_way_c, free_way_c, ev_way_c;
  logic [WAY_W-1:0] rr_ptr;

  always_comb begin
    hit_c = 1'b0; hit_way_c = '0;
    free_c = 1'b0; free_way_c = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (st[req_set][w] != L2_I && tg[req_set][w] == req_tag) begin
        hit_c = 1'b1; hit_way_c = WAY_W'(w);
      end
      if (st[req_set][w] == L2_I) begin
        free_c = 1'b1; free_way_c = WAY_W'(w);
      end
    end
    ev_c = 1'b0; ev_way_c = '0;
    for (int k = WAYS-1; k >= 0; k--) begin
      logic [WAY_W-1:0] w;
      w = rr_ptr + WAY_W'(k);
      if (st[req_set][w] inside {L2_S, L2_E, L2_M}) begin
        ev_c = 1'b1; ev_way_c = w;
      end
    end
  end

  logic             lk_q;         // last request was a lookup
  logic [SET_W-1:0] set_q;
  logic [WAY_W-1:0] way_q;
  logic             hit_q, free_q, ev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      lk_q      <= 1'b0;
      hit_q     <= 1'b0;
      free_q    <= 1'b0;
      ev_q      <= 1'b0;
      set_q     <= '0;
      way_q     <= '0;
      rr_ptr    <= '0;
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
  assign rsp_state   = st[set_q][way_q];
  assign evict_valid = lk_q && ev_q;
  assign evict_way   = way_q;
  assign evict_tag   = tg[set_q][way_q];
  assign evict_state = st[set_q][way_q];

  // ---- flush scan ----
  typedef enum logic [1:0] {FL_IDLE, FL_SCAN, FL_DONE} fl_t;
  fl_t              fl;
  logic [SET_W-1:0] fset;
  logic [WAY_W-1:0] fway;
  logic             pass_busy;     // this pass met a non-invalid entry
  logic             last_entry;
  l2_state_t        fst;

  assign fst         = st[fset][fway];
  assign last_entry  = (fset == SET_W'(SETS-1)) && (fway == WAY_W'(WAYS-1));
  assign flush_set   = fset;
  assign flush_way   = fway;
  assign flush_tag   = tg[fset][fway];
  assign flush_state = fst;
  assign flush_valid = (fl == FL_SCAN) && !req_valid && (fst inside {L2_S, L2_E, L2_M});
  assign flush_done  = (fl == FL_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fl        <= FL_IDLE;
      fset      <= '0;
      fway      <= '0;
      pass_busy <= 1'b0;
    end else begin
      unique case (fl)
        FL_IDLE: if (flush_in) begin
          fl <= FL_SCAN; fset <= '0; fway <= '0; pass_busy <= 1'b0;
        end
        FL_SCAN: if (!req_valid) begin
          // advance past invalid or transient entries, or a taken offer
          if (fst == L2_I || !l2_stable(fst) || flush_ready) begin
            if (fst != L2_I) pass_busy <= 1'b1;
            if (last_entry) begin
              fset <= '0; fway <= '0;
              pass_busy <= 1'b0;
              if (!pass_busy && fst == L2_I) fl <= FL_DONE;
            end else if (fway == WAY_W'(WAYS-1)) begin
              fway <= '0; fset <= fset + 1'b1;
            end else begin
              fway <= fway + 1'b1;
            end
          end
        end
        FL_DONE: if (flush_done_ack) fl <= FL_IDLE;
        default: fl <= FL_IDLE;
      endcase
    end
  end

  // ---- state and tag storage ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          st[s][w] <= L2_I;
    end else if (req_valid && req_write) begin
      st[req_set][req_way] <= req_state;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_write) tg[req_set][req_way] <= req_tag;
  end

  assert property (@(posedge clk) disable iff (!rst_n) flush_valid |-> l2_stable(flush_state) && flush_state != L2_I);
endmodule
