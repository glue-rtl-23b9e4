// l3_fsm: MESI directory controller of the shared L3.
//
// Each message from the serializer (an L2 request, an L2 response, or a line
// arriving from memory) is paired with its line's directory entry by a tag
// lookup, and the FSM performs one non-blocking action:
//   GETS  line absent: fetch from memory (D_IS_D); no copies (D_I): send the
//         line with exclusive permission (E); shared: send it, add the sharer;
//         owned: FWD_GETS to the owner, who sends the line to the requester
//         and a copy back here (D_EM_D until it arrives, then D_S).
//   GETM  absent: fetch (D_IM_D); no other copies: send the line exclusive;
//         shared: send INV to every other sharer, one per cycle, and collect
//         their INV_ACKs (D_S_A) before sending the line; owned: FWD_GETM to
//         the owner, who hands the line over, and record the new owner.
//   PUTS/PUTM  remove the sender's copy; a PUTM from the owner writes the
//         line back here and sets the dirty bit if it was modified. A PUT
//         from a cache that has already lost the line is only acknowledged.
//   Every PUT is answered with PUT_ACK on the forward plane.
// A request for a line in a transient state is parked in a one-entry replay
// register and the request plane is held (req_block) until a response has
// been handled; responses keep flowing on their own planes, so this cannot
// deadlock. A miss in a full set evicts a way no L2 holds; if it is dirty it
// is written back to memory first (write back only on eviction, as the
// dirty bit intends). Memory requests carry a tag; fills use tag 0.
// The directory role, non-blocking actions, intermediary states and dirty
// bit follow the document. Accumulating several waiting requesters on one
// transient line (the document's reads-then-writes ordering) is replaced by
// holding further requests until the line is stable again; invalidation
// acknowledgements are collected here rather than at the requester.
// The reset also disables the assertion below; lint reports that as rst_n
// being used both asynchronously and synchronously, but the assertion makes
// no logic, so the warning stands.
module l3_fsm
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
  input  logic             in_valid,
  input  msg_t             in_msg,
  output logic             in_ready,
  output logic             req_block,
  // tag bank
  output logic             tb_req_valid,
  output logic             tb_req_write,
  output logic [SET_W-1:0] tb_req_set,
  output logic [TAG_W-1:0] tb_req_tag,
  output logic [WAY_W-1:0] tb_req_way,
  output l3_meta_t         tb_req_meta,
  input  logic             tb_rsp_valid,
  input  logic             tb_rsp_hit,
  input  logic             tb_rsp_free,
  input  logic [WAY_W-1:0] tb_rsp_way,
  input  l3_meta_t         tb_rsp_meta,
  input  logic             tb_evict_valid,
  input  logic [TAG_W-1:0] tb_evict_tag,
  input  l3_meta_t         tb_evict_meta,
  // data bank
  output logic [SET_W-1:0] db_rd_set,
  output logic [WAY_W-1:0] db_rd_way,
  input  line_t            db_rd_data,
  output logic             db_wr_en,
  output logic [SET_W-1:0] db_wr_set,
  output logic [WAY_W-1:0] db_wr_way,
  output line_t            db_wr_data,
  // network out
  output logic             ofwd_valid,
  output msg_t             ofwd_msg,
  input  logic             ofwd_room,
  output logic             orsp_valid,
  output msg_t             orsp_msg,
  input  logic             orsp_room,
  // memory out
  output logic             omem_valid,
  output mem_req_t         omem_req,
  input  logic             omem_room2,
  // activity, for monitoring
  output logic             ev_mem_fill,
  output logic             ev_writeback,
  output logic             ev_inv,
  output logic             ev_fwd,
  output logic             ev_replay
);
  typedef enum logic [1:0] {S_IDLE, S_ACT, S_INV, S_FILL} st_t;
  st_t st;

  msg_t              cur;
  logic              rp_valid, rp_retry;
  msg_t              rp;
  logic [NUM_L2-1:0] inv_left;
  laddr_t            inv_line;
  node_t             inv_req;
  laddr_t            fill_line;

  logic room;
  assign room = ofwd_room && orsp_room && omem_room2;

  logic take_in, take_rp;
  assign take_in  = (st == S_IDLE) && room && in_valid;
  assign take_rp  = (st == S_IDLE) && room && !in_valid && rp_valid && rp_retry;
  assign in_ready = take_in;
  assign req_block = rp_valid;

  msg_t nxt;
  assign nxt = take_rp ? rp : in_msg;

  function automatic logic [SET_W-1:0] set_of(laddr_t a);
    return a[SET_W-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(laddr_t a);
    return a[LADDR_W-1:SET_W];
  endfunction
  function automatic msg_t mk(msg_type_t t, node_t src, node_t dst, laddr_t a, line_t d, logic ex);
    msg_t m;
    m = '0;
    m.mtype = t; m.src = src; m.dst = dst; m.addr = a; m.data = d; m.wmask = '1; m.excl = ex;
    return m;
  endfunction
  function automatic logic [2:0] popc(logic [NUM_L2-1:0] v);
    logic [2:0] c;
    c = '0;
    for (int i = 0; i < NUM_L2; i++) c += 3'(v[i]);
    return c;
  endfunction

  l3_meta_t m;      // metadata of cur's line
  l3_state_t s;
  logic [NUM_L2-1:0] rbit, others;
  assign m      = tb_rsp_meta;
  assign s      = tb_rsp_hit ? m.state : D_NP;
  assign rbit   = NUM_L2'(1) << cur.src;
  assign others = m.sharers & ~rbit;

  // action outputs
  logic     a_tag_wr, a_db_wr, a_fwd, a_rsp, a_mem, a_fill, a_replay, a_progress, a_inv;
  l3_meta_t a_meta;
  msg_t     a_fwd_msg, a_rsp_msg;
  mem_req_t a_mem_req;

  always_comb begin
    a_tag_wr = 1'b0; a_db_wr = 1'b0; a_fwd = 1'b0; a_rsp = 1'b0; a_mem = 1'b0; a_fill = 1'b0;
    a_replay = 1'b0; a_progress = 1'b0; a_inv = 1'b0;
    a_meta = m;
    a_fwd_msg = '0; a_rsp_msg = '0; a_mem_req = '0;
    if (st == S_ACT) begin
      unique case (cur.mtype)
        M_GETS, M_GETM: begin
          if (tb_rsp_hit && !l3_stable(s)) a_replay = 1'b1;
          else if (s == D_I || (s == D_S && (cur.mtype == M_GETS || others == '0))) begin
            a_rsp = 1'b1;
            a_tag_wr = 1'b1;
            if (s == D_S && cur.mtype == M_GETS) begin
              a_rsp_msg = mk(M_DATA, L3_ID, cur.src, cur.addr, db_rd_data, 1'b0);
              a_meta.sharers = m.sharers | rbit;
            end else begin
              a_rsp_msg = mk(M_DATA, L3_ID, cur.src, cur.addr, db_rd_data, 1'b1);
              a_meta.state = D_EM; a_meta.owner = cur.src; a_meta.sharers = '0;
            end
          end else if (s == D_S) begin                      // GETM, other sharers
            a_inv = 1'b1;
            a_tag_wr = 1'b1;
            a_meta.state = D_S_A; a_meta.owner = cur.src; a_meta.acks = popc(others);
            a_meta.sharers = '0;
          end else if (s == D_EM) begin
            a_fwd = 1'b1;
            a_tag_wr = 1'b1;
            if (cur.mtype == M_GETS) begin
              a_fwd_msg = mk(M_FWD_GETS, cur.src, m.owner, cur.addr, '0, 1'b0);
              a_meta.state = D_EM_D;
              a_meta.sharers = rbit | (NUM_L2'(1) << m.owner);
            end else begin
              a_fwd_msg = mk(M_FWD_GETM, cur.src, m.owner, cur.addr, '0, 1'b0);
              a_meta.owner = cur.src;
            end
          end else if (tb_rsp_free || tb_evict_valid) begin  // absent: fetch
            a_tag_wr = 1'b1;
            a_meta = '{state: (cur.mtype == M_GETS) ? D_IS_D : D_IM_D, dirty: 1'b0,
                       owner: cur.src, sharers: '0, acks: '0};
            a_fill = 1'b1;
            if (tb_evict_valid && tb_evict_meta.dirty) begin
              a_mem = 1'b1;
              a_mem_req = '{write: 1'b1, addr: {tb_evict_tag, set_of(cur.addr)}, data: db_rd_data,
                            wmask: '1, tag: '0};
            end
          end else a_replay = 1'b1;
        end
        M_PUTS, M_PUTM: begin
          if (tb_rsp_hit && !l3_stable(s)) a_replay = 1'b1;
          else begin
            a_fwd = 1'b1;
            a_fwd_msg = mk(M_PUT_ACK, L3_ID, cur.src, cur.addr, '0, 1'b0);
            if (s == D_EM && m.owner == cur.src) begin
              if (cur.mtype == M_PUTM && cur.dirty) begin
                a_db_wr = 1'b1; a_meta.dirty = 1'b1;
              end
              a_tag_wr = 1'b1; a_meta.state = D_I;
            end else if (s == D_S) begin
              a_tag_wr = 1'b1;
              a_meta.sharers = others;
              if (others == '0) a_meta.state = D_I;
            end
          end
        end
        M_DATA_DIR: begin
          a_progress = 1'b1;
          if (s == D_EM_D) begin
            a_db_wr = 1'b1;
            a_tag_wr = 1'b1; a_meta.state = D_S; a_meta.dirty = m.dirty | cur.dirty;
          end
        end
        M_INV_ACK: begin
          a_progress = 1'b1;
          if (s == D_S_A) begin
            a_tag_wr = 1'b1; a_meta.acks = m.acks - 3'd1;
            if (m.acks == 3'd1) begin
              a_meta.state = D_EM;
              a_rsp = 1'b1; a_rsp_msg = mk(M_DATA, L3_ID, m.owner, cur.addr, db_rd_data, 1'b1);
            end
          end
        end
        M_DATA: begin                                       // fill from memory
          a_progress = 1'b1;
          if (s inside {D_IS_D, D_IM_D}) begin
            a_db_wr = 1'b1;
            a_tag_wr = 1'b1; a_meta.state = D_EM; a_meta.dirty = 1'b0;
            a_rsp = 1'b1; a_rsp_msg = mk(M_DATA, L3_ID, m.owner, cur.addr, cur.data, 1'b1);
          end
        end
        default: ;
      endcase
    end
  end

  // ---- tag and data bank drive ----
  always_comb begin
    tb_req_valid = 1'b0; tb_req_write = 1'b0;
    tb_req_set = set_of(nxt.addr); tb_req_tag = tag_of(nxt.addr);
    tb_req_way = tb_rsp_way; tb_req_meta = a_meta;
    if (take_in || take_rp) tb_req_valid = 1'b1;
    else if (a_tag_wr) begin
      tb_req_valid = 1'b1; tb_req_write = 1'b1;
      tb_req_set = set_of(cur.addr); tb_req_tag = tag_of(cur.addr);
    end
  end

  assign db_rd_set  = set_of(cur.addr);
  assign db_rd_way  = tb_rsp_way;
  assign db_wr_en   = a_db_wr;
  assign db_wr_set  = set_of(cur.addr);
  assign db_wr_way  = tb_rsp_way;
  assign db_wr_data = cur.data;

  // ---- outputs ----
  always_comb begin
    ofwd_valid = a_fwd; ofwd_msg = a_fwd_msg;
    if (st == S_INV) begin
      ofwd_valid = ofwd_room;
      ofwd_msg = '0;
      ofwd_msg.mtype = M_INV; ofwd_msg.src = inv_req; ofwd_msg.addr = inv_line;
      for (int i = NUM_L2-1; i >= 0; i--) if (inv_left[i]) ofwd_msg.dst = node_t'(i);
    end
    orsp_valid = a_rsp; orsp_msg = a_rsp_msg;
    omem_valid = a_mem; omem_req = a_mem_req;
    if (st == S_FILL) begin
      omem_valid = 1'b1;
      omem_req = '{write: 1'b0, addr: fill_line, data: '0, wmask: '0, tag: '0};
    end
  end

  assign ev_mem_fill  = (st == S_FILL);
  assign ev_writeback = a_mem;
  assign ev_inv       = (st == S_INV) && ofwd_valid;
  assign ev_fwd       = a_fwd && (a_fwd_msg.mtype inside {M_FWD_GETS, M_FWD_GETM});
  assign ev_replay    = a_replay;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cur <= '0;
      rp_valid <= 1'b0; rp_retry <= 1'b0; rp <= '0;
      inv_left <= '0; inv_line <= '0; inv_req <= '0; fill_line <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (take_in || take_rp) begin
          cur <= nxt;
          if (take_rp) begin rp_valid <= 1'b0; rp_retry <= 1'b0; end
          st <= S_ACT;
        end
        S_ACT: begin
          st <= S_IDLE;
          if (a_replay) begin rp_valid <= 1'b1; rp <= cur; rp_retry <= 1'b0; end
          if (a_progress && rp_valid) rp_retry <= 1'b1;
          if (a_inv) begin
            st <= S_INV; inv_left <= others; inv_line <= cur.addr; inv_req <= cur.src;
          end
          if (a_fill) begin st <= S_FILL; fill_line <= cur.addr; end
        end
        S_INV: if (ofwd_valid) begin
          inv_left <= inv_left & ~(NUM_L2'(1) << ofwd_msg.dst);
          if ((inv_left & ~(NUM_L2'(1) << ofwd_msg.dst)) == '0) st <= S_IDLE;
        end
        S_FILL: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (st == S_ACT) |-> tb_rsp_valid);
endmodule
