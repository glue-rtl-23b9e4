// l2_fsm: coherence controller of a private L2 cache (MESI, directory based).
//
// Every message the serializer hands over (a processor request, a network
// forward request or a network response) is paired with the state of its line
// by a tag-bank lookup, and the FSM then performs one non-blocking action:
// it may answer the processor, write the data bank, update the tag bank and
// send network messages, but it never waits for the network. Whatever has to
// wait is parked in a transient line state or in one of these buffers:
//  * read buffer (rd_pending): a read miss is outstanding; the processor
//    blocks on reads, so one flag suffices and the line is returned when its
//    DATA arrives.
//  * write buffer (one entry): a write that misses or hits a Shared line is
//    acknowledged at once, its word is held here while GETM is outstanding,
//    and it is merged into the line when DATA arrives. A second such write,
//    or a read of the buffered line, waits (replay) until the buffer empties;
//    reads of other lines go ahead.
//  * forward buffer (one entry): a forward-plane message (FWD_GETS, FWD_GETM,
//    or INV) for a line that is still waiting for its own data is held here;
//    while it is full the serializer passes no more forward-plane messages.
//    It is retried after the next DATA. INV for a line being upgraded from S
//    (SM_D) is answered at once, because the directory may be waiting on
//    that acknowledgement before it can serve this cache's own GETM.
//  * replay register: a processor request that cannot be served now (line in
//    a transient state, write buffer busy, or a victim being evicted). The
//    frontend is blocked while it is full; it is retried after the next
//    network message has been handled.
// Eviction (a miss in a full set) follows the tag bank's eviction plane: the
// victim is written back (PUTM) or dropped (PUTS), put in a transient state,
// and the original request waits in the replay register until PUT_ACK frees
// the way. A flush request starts the tag bank's flush scan; entries on the
// flush plane are written back the same way, but only in cycles where no
// other message is waiting, and the processor gets its FLUSH answer once the
// tag bank reports that every line is invalid.
// Timing: a hit takes two cycles in this module (lookup, then action); a
// message is taken only when the output buffers its action can write to have
// room for everything it can emit. Invalidations (INV, FWD_GETM) are passed on to the L1.
// The action structure, the buffers, their size of one, the forward-plane
// stall and the flush scheduling follow the document; message encodings, the
// replay retry rule and the exact transient states are this design's.
// The reset also disables the assertions below; lint reports that as rst_n
// being used both asynchronously and synchronously, but the assertions make
// no logic, so the warning stands.
module l2_fsm
  import glue_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID = '0,
  parameter int unsigned SETS  = L2_SETS,
  parameter int unsigned WAYS  = L2_WAYS,
  parameter int unsigned SET_W = $clog2(SETS),
  parameter int unsigned WAY_W = $clog2(WAYS),
  parameter int unsigned TAG_W = LADDR_W - SET_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the serializer
  input  logic             in_valid,
  input  msg_t             in_msg,
  output logic             in_ready,
  output logic             fe_block,
  output logic             fwd_block,
  // tag bank
  output logic             tb_req_valid,
  output logic             tb_req_write,
  output logic [SET_W-1:0] tb_req_set,
  output logic [TAG_W-1:0] tb_req_tag,
  output logic [WAY_W-1:0] tb_req_way,
  output l2_state_t        tb_req_state,
  input  logic             tb_rsp_valid,
  input  logic             tb_rsp_hit,
  input  logic             tb_rsp_free,
  input  logic [WAY_W-1:0] tb_rsp_way,
  input  l2_state_t        tb_rsp_state,
  input  logic             tb_evict_valid,
  input  logic [TAG_W-1:0] tb_evict_tag,
  input  l2_state_t        tb_evict_state,
  output logic             tb_flush_in,
  input  logic             tb_flush_valid,
  output logic             tb_flush_ready,
  input  logic [SET_W-1:0] tb_flush_set,
  input  logic [WAY_W-1:0] tb_flush_way,
  input  logic [TAG_W-1:0] tb_flush_tag,
  input  l2_state_t        tb_flush_state,
  input  logic             tb_flush_done,
  output logic             tb_flush_done_ack,
  // data bank
  output logic [SET_W-1:0] db_rd_set,
  output logic [WAY_W-1:0] db_rd_way,
  input  line_t            db_rd_data,
  output logic             db_wr_en,
  output logic [SET_W-1:0] db_wr_set,
  output logic [WAY_W-1:0] db_wr_way,
  output logic [LINE_WORDS-1:0] db_wr_mask,
  output line_t            db_wr_data,
  // to the backend: request and response planes
  output logic             oreq_valid,
  output msg_t             oreq_msg,
  input  logic             oreq_room,
  output logic             orsp_valid,
  output msg_t             orsp_msg,
  input  logic             orsp_room2,   // room for two messages
  // to the frontend: processor responses and L1 invalidations
  output logic             cpu_rsp_valid,
  output cpu_rsp_t         cpu_rsp,
  input  logic             cpu_rsp_room,
  output logic             inv_valid,
  output laddr_t           inv_addr,
  input  logic             inv_room,
  // activity, for monitoring
  output logic             ev_evict,
  output logic             ev_fwd_stall,
  output logic             ev_wb_stall,
  output logic             ev_flush_line
);
  typedef enum logic [2:0] {S_IDLE, S_ACT, S_FLUSH, S_SEND2} st_t;
  st_t st;

  msg_t   cur;
  logic   rd_pending;
  logic   wb_valid;
  msg_t   wb;
  logic   fwd_valid, fwd_retry;
  msg_t   fwd_buf;
  logic   rp_valid, rp_retry;
  msg_t   rp;
  logic   flushing;
  msg_t   send2;

  // flush entry latched for S_FLUSH
  logic [SET_W-1:0] fl_set;
  logic [WAY_W-1:0] fl_way;
  logic [TAG_W-1:0] fl_tag;
  l2_state_t        fl_state;

  // Room is checked per message kind, for what its action can emit: a
  // processor request may send a request-plane message, a forward-plane
  // message may send responses and an L1 invalidation. Forward-plane messages
  // must not wait for request-plane room, or a directory waiting on an
  // INV_ACK while holding requests back would never get it.
  function automatic logic room_for(msg_type_t t);
    unique case (t)
      M_CPU_RD, M_CPU_WR, M_CPU_FLUSH: return oreq_room && cpu_rsp_room;
      M_FWD_GETS, M_FWD_GETM, M_INV:   return orsp_room2 && inv_room;
      M_DATA:                          return cpu_rsp_room;
      default:                         return 1'b1;
    endcase
  endfunction

  // ---- source selection in S_IDLE ----
  logic take_fwd, take_in, take_rp, take_fl, take_fdone;
  always_comb begin
    take_fwd = 1'b0; take_in = 1'b0; take_rp = 1'b0; take_fl = 1'b0; take_fdone = 1'b0;
    if (st == S_IDLE) begin
      if (fwd_valid && fwd_retry)          take_fwd   = room_for(fwd_buf.mtype);
      else if (in_valid)                   take_in    = room_for(in_msg.mtype);
      else if (rp_valid && rp_retry)       take_rp    = room_for(rp.mtype);
      else if (flushing && tb_flush_done)  take_fdone = cpu_rsp_room;
      else if (flushing && tb_flush_valid) take_fl    = oreq_room;
    end
  end

  msg_t nxt;
  always_comb begin
    nxt = in_msg;
    if (take_fwd) nxt = fwd_buf;
    else if (take_rp) nxt = rp;
  end

  assign in_ready  = take_in;
  assign fe_block  = rp_valid || flushing || rd_pending;
  assign fwd_block = fwd_valid;

  function automatic logic [SET_W-1:0] set_of(laddr_t a);
    return a[SET_W-1:0];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(laddr_t a);
    return a[LADDR_W-1:SET_W];
  endfunction

  // ---- action decode (S_ACT) ----
  l2_state_t s;        // state of cur's line (I on a miss)
  logic      wb_same;
  assign s       = tb_rsp_hit ? tb_rsp_state : L2_I;
  assign wb_same = wb_valid && (wb.addr == cur.addr);

  // action outputs
  logic      a_tag_wr;  l2_state_t a_tag_st;  logic a_tag_victim;
  logic      a_db_wr;   logic [LINE_WORDS-1:0] a_db_mask; line_t a_db_data;
  logic      a_req;     msg_t a_req_msg;
  logic      a_rsp;     msg_t a_rsp_msg;
  logic      a_send2;   msg_t a_send2_msg;
  logic      a_cpu;     cpu_rsp_t a_cpu_rsp;
  logic      a_inv;
  logic      a_replay, a_fwd_stall, a_wb_fill, a_wb_clear, a_rd_set, a_rd_clear;
  logic      a_flush_start, a_progress;

  function automatic msg_t mk(msg_type_t t, node_t dst, laddr_t a, line_t d, logic ex, logic dy);
    msg_t m;
    m = '0;
    m.mtype = t; m.src = MY_ID; m.dst = dst; m.addr = a; m.data = d;
    m.wmask = '1; m.excl = ex; m.dirty = dy;
    return m;
  endfunction

  always_comb begin
    a_tag_wr = 1'b0; a_tag_st = L2_I; a_tag_victim = 1'b0;
    a_db_wr = 1'b0; a_db_mask = '1; a_db_data = cur.data;
    a_req = 1'b0; a_req_msg = '0;
    a_rsp = 1'b0; a_rsp_msg = '0;
    a_send2 = 1'b0; a_send2_msg = '0;
    a_cpu = 1'b0; a_cpu_rsp = '0;
    a_inv = 1'b0;
    a_replay = 1'b0; a_fwd_stall = 1'b0; a_wb_fill = 1'b0; a_wb_clear = 1'b0;
    a_rd_set = 1'b0; a_rd_clear = 1'b0; a_flush_start = 1'b0; a_progress = 1'b0;
    if (st == S_ACT) begin
      unique case (cur.mtype)
        M_CPU_RD: begin
          if (wb_same) a_replay = 1'b1;
          else if (s inside {L2_S, L2_E, L2_M}) begin
            a_cpu = 1'b1; a_cpu_rsp.op = CPU_READ; a_cpu_rsp.data = db_rd_data;
          end else if (tb_rsp_hit) a_replay = 1'b1;           // transient line
          else if (tb_rsp_free) begin
            a_tag_wr = 1'b1; a_tag_st = L2_IS_D;
            a_req = 1'b1; a_req_msg = mk(M_GETS, L3_ID, cur.addr, '0, 1'b0, 1'b0);
            a_rd_set = 1'b1;
          end else if (tb_evict_valid) begin
            a_tag_victim = 1'b1; a_replay = 1'b1;
          end else a_replay = 1'b1;
        end
        M_CPU_WR: begin
          if (s inside {L2_E, L2_M}) begin
            a_db_wr = 1'b1; a_db_mask = cur.wmask;
            a_tag_wr = (s == L2_E); a_tag_st = L2_M;
            a_cpu = 1'b1; a_cpu_rsp.op = CPU_WRITE;
          end else if (wb_valid) a_replay = 1'b1;
          else if (s == L2_S) begin
            a_tag_wr = 1'b1; a_tag_st = L2_SM_D;
            a_req = 1'b1; a_req_msg = mk(M_GETM, L3_ID, cur.addr, '0, 1'b0, 1'b0);
            a_wb_fill = 1'b1;
            a_cpu = 1'b1; a_cpu_rsp.op = CPU_WRITE;
          end else if (tb_rsp_hit) a_replay = 1'b1;
          else if (tb_rsp_free) begin
            a_tag_wr = 1'b1; a_tag_st = L2_IM_D;
            a_req = 1'b1; a_req_msg = mk(M_GETM, L3_ID, cur.addr, '0, 1'b0, 1'b0);
            a_wb_fill = 1'b1;
            a_cpu = 1'b1; a_cpu_rsp.op = CPU_WRITE;
          end else if (tb_evict_valid) begin
            a_tag_victim = 1'b1; a_replay = 1'b1;
          end else a_replay = 1'b1;
        end
        M_CPU_FLUSH: begin
          if (wb_valid) a_replay = 1'b1;
          else a_flush_start = 1'b1;
        end
        M_DATA: begin
          a_progress = 1'b1;
          if (s == L2_IS_D) begin
            a_db_wr = 1'b1;
            a_tag_wr = 1'b1; a_tag_st = cur.excl ? L2_E : L2_S;
            a_cpu = 1'b1; a_cpu_rsp.op = CPU_READ; a_cpu_rsp.data = cur.data;
            a_rd_clear = 1'b1;
          end else if (s inside {L2_IM_D, L2_SM_D}) begin
            a_db_wr = 1'b1;
            a_db_data = merge_words(cur.data, wb.data, wb_same ? wb.wmask : '0);
            a_tag_wr = 1'b1; a_tag_st = L2_M;
            a_wb_clear = wb_same;
          end
        end
        M_FWD_GETS: begin
          a_progress = 1'b1;
          if (s inside {L2_E, L2_M, L2_MI_A}) begin
            a_rsp = 1'b1; a_rsp_msg = mk(M_DATA, cur.src, cur.addr, db_rd_data, 1'b0, 1'b0);
            a_send2 = 1'b1;
            a_send2_msg = mk(M_DATA_DIR, L3_ID, cur.addr, db_rd_data, 1'b0, s != L2_E);
            a_tag_wr = 1'b1; a_tag_st = (s == L2_MI_A) ? L2_SI_A : L2_S;
          end else if (l2_waits_data(s)) a_fwd_stall = 1'b1;
        end
        M_FWD_GETM: begin
          a_progress = 1'b1;
          if (s inside {L2_E, L2_M, L2_MI_A}) begin
            a_rsp = 1'b1; a_rsp_msg = mk(M_DATA, cur.src, cur.addr, db_rd_data, 1'b1, 1'b0);
            a_tag_wr = 1'b1; a_tag_st = (s == L2_MI_A) ? L2_II_A : L2_I;
            a_inv = 1'b1;
          end else if (l2_waits_data(s)) a_fwd_stall = 1'b1;
        end
        M_INV: begin
          a_progress = 1'b1;
          if (s == L2_IS_D) a_fwd_stall = 1'b1;
          else begin
            a_rsp = 1'b1; a_rsp_msg = mk(M_INV_ACK, L3_ID, cur.addr, '0, 1'b0, 1'b0);
            a_inv = 1'b1;
            if (s == L2_S)        begin a_tag_wr = 1'b1; a_tag_st = L2_I;    end
            else if (s == L2_SM_D) begin a_tag_wr = 1'b1; a_tag_st = L2_IM_D; end
            else if (s == L2_SI_A) begin a_tag_wr = 1'b1; a_tag_st = L2_II_A; end
          end
        end
        M_PUT_ACK: begin
          a_progress = 1'b1;
          if (s inside {L2_MI_A, L2_SI_A, L2_II_A}) begin
            a_tag_wr = 1'b1; a_tag_st = L2_I;
          end
        end
        default: ;
      endcase
    end
  end

  // eviction of the victim named on the eviction plane
  logic   ev_dirty;
  laddr_t ev_addr;
  assign ev_dirty = (tb_evict_state == L2_M);
  assign ev_addr  = {tb_evict_tag, set_of(cur.addr)};

  // ---- tag bank and data bank drive ----
  always_comb begin
    tb_req_valid = 1'b0; tb_req_write = 1'b0;
    tb_req_set = set_of(nxt.addr); tb_req_tag = tag_of(nxt.addr);
    tb_req_way = tb_rsp_way; tb_req_state = a_tag_st;
    if (take_fwd || take_in || take_rp) begin
      tb_req_valid = 1'b1;
    end else if (st == S_ACT && (a_tag_wr || a_tag_victim)) begin
      tb_req_valid = 1'b1; tb_req_write = 1'b1;
      tb_req_set = set_of(cur.addr);
      tb_req_tag = a_tag_victim ? tb_evict_tag : tag_of(cur.addr);
      tb_req_state = a_tag_victim ? (tb_evict_state == L2_S ? L2_SI_A : L2_MI_A) : a_tag_st;
    end else if (st == S_FLUSH) begin
      tb_req_valid = 1'b1; tb_req_write = 1'b1;
      tb_req_set = fl_set; tb_req_tag = fl_tag; tb_req_way = fl_way;
      tb_req_state = (fl_state == L2_S) ? L2_SI_A : L2_MI_A;
    end
  end

  assign tb_flush_ready    = take_fl;
  assign tb_flush_in       = a_flush_start;
  assign tb_flush_done_ack = take_fdone;

  assign db_rd_set  = (st == S_FLUSH) ? fl_set : set_of(cur.addr);
  assign db_rd_way  = (st == S_FLUSH) ? fl_way : tb_rsp_way;
  assign db_wr_en   = a_db_wr;
  assign db_wr_set  = set_of(cur.addr);
  assign db_wr_way  = tb_rsp_way;
  assign db_wr_mask = a_db_mask;
  assign db_wr_data = a_db_data;

  // ---- outputs to the interfaces ----
  always_comb begin
    oreq_valid = 1'b0; oreq_msg = a_req_msg;
    orsp_valid = 1'b0; orsp_msg = a_rsp_msg;
    if (st == S_ACT) begin
      oreq_valid = a_req || a_tag_victim;
      if (a_tag_victim)
        oreq_msg = mk(tb_evict_state == L2_S ? M_PUTS : M_PUTM, L3_ID, ev_addr, db_rd_data, 1'b0, ev_dirty);
      orsp_valid = a_rsp;
    end else if (st == S_FLUSH) begin
      oreq_valid = 1'b1;
      oreq_msg = mk(fl_state == L2_S ? M_PUTS : M_PUTM, L3_ID, {fl_tag, fl_set}, db_rd_data,
                    1'b0, fl_state == L2_M);
    end else if (st == S_SEND2) begin
      orsp_valid = 1'b1; orsp_msg = send2;
    end
  end

  always_comb begin
    cpu_rsp_valid = a_cpu || take_fdone;
    cpu_rsp       = a_cpu_rsp;
    if (take_fdone) begin
      cpu_rsp.op = CPU_FLUSH; cpu_rsp.data = '0;
    end
  end
  assign inv_valid = a_inv;
  assign inv_addr  = cur.addr;

  assign ev_evict      = a_tag_victim;
  assign ev_fwd_stall  = a_fwd_stall;
  assign ev_wb_stall   = a_replay && wb_valid;
  assign ev_flush_line = (st == S_FLUSH);

  // ---- sequential state ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      cur <= '0;
      rd_pending <= 1'b0;
      wb_valid <= 1'b0; wb <= '0;
      fwd_valid <= 1'b0; fwd_retry <= 1'b0; fwd_buf <= '0;
      rp_valid <= 1'b0; rp_retry <= 1'b0; rp <= '0;
      flushing <= 1'b0;
      send2 <= '0;
      fl_set <= '0; fl_way <= '0; fl_tag <= '0; fl_state <= L2_I;
    end else begin
      unique case (st)
        S_IDLE: begin
          if (take_fwd || take_in || take_rp) begin
            cur <= nxt;
            if (take_fwd) begin fwd_valid <= 1'b0; fwd_retry <= 1'b0; end
            if (take_rp)  begin rp_valid <= 1'b0; rp_retry <= 1'b0; end
            st <= S_ACT;
          end else if (take_fl) begin
            fl_set <= tb_flush_set; fl_way <= tb_flush_way;
            fl_tag <= tb_flush_tag; fl_state <= tb_flush_state;
            st <= S_FLUSH;
          end else if (take_fdone) begin
            flushing <= 1'b0;
          end
        end
        S_ACT: begin
          st <= a_send2 ? S_SEND2 : S_IDLE;
          send2 <= a_send2_msg;
          if (a_replay) begin rp_valid <= 1'b1; rp <= cur; rp_retry <= 1'b0; end
          if (a_fwd_stall) begin fwd_valid <= 1'b1; fwd_buf <= cur; fwd_retry <= 1'b0; end
          if (a_wb_fill) begin wb_valid <= 1'b1; wb <= cur; end
          if (a_wb_clear) wb_valid <= 1'b0;
          if (a_rd_set) rd_pending <= 1'b1;
          if (a_rd_clear) rd_pending <= 1'b0;
          if (a_flush_start) flushing <= 1'b1;
          if (a_progress) begin
            if (rp_valid && !a_replay) rp_retry <= 1'b1;
            if (cur.mtype == M_DATA && fwd_valid) fwd_retry <= 1'b1;
          end
        end
        S_FLUSH: st <= S_IDLE;
        S_SEND2: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // The lookup issued in S_IDLE is answered when S_ACT begins.
  assert property (@(posedge clk) disable iff (!rst_n) (st == S_ACT) |-> tb_rsp_valid);
  // Only one write may wait for its line.
  assert property (@(posedge clk) disable iff (!rst_n) a_wb_fill |-> !wb_valid);
endmodule
