// tb_l2_cache: one complete L2 cache, driven on its processor port, with the
// test answering on the network planes the way the directory would, at once.
// Checks, end to end through the interfaces, serializer, FSM and banks:
// read miss (GETS out, line back) and write miss (acknowledged, GETM out)
// within the design's miss-latency bounds (46 cycles for a read miss, 40 for
// a write miss, measured from the request being accepted to the answer, with
// the directory answering as soon as the request appears); read and write
// hits within 12 and 4 cycles; write data merged and returned; a forward
// from another cache answered with the current data and passed to the L1 as
// an invalidation; eviction when more lines map to a set than it has ways;
// non-cacheable reads and writes sent as NC_RD/NC_WR with the answer
// returned; and a flush that writes back every modified line before it is
// answered. Every line value read must match a reference memory kept here.
`timescale 1ns/1ps
module tb_l2_cache;
  import glue_pkg::*;
  localparam logic [ID_W-1:0] ME = 3'd2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req_valid = 0, cpu_req_ready, cpu_rsp_valid, cpu_rsp_ready = 1;
  cpu_req_t cpu_req = '0;
  cpu_rsp_t cpu_rsp;
  logic l1_inv_valid, l1_inv_ready = 1;
  logic [ADDR_W-1:0] l1_inv_addr;
  logic noc_req_valid, noc_req_ready = 1, noc_fwd_valid = 0, noc_fwd_ready;
  logic noc_rsp_in_valid = 0, noc_rsp_in_ready, noc_rsp_out_valid, noc_rsp_out_ready = 1;
  msg_t noc_req, noc_fwd = '0, noc_rsp_in = '0, noc_rsp_out;
  logic ev_evict, ev_fwd_stall, ev_wb_stall, ev_flush_line;

  l2_cache #(.MY_ID(ME)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_evict = 0, n_l1inv = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_evict += int'(ev_evict);
      n_l1inv += int'(l1_inv_valid);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---- directory model: memory plus the set of lines this L2 holds ----
  line_t mem [laddr_t];
  bit    held [laddr_t];
  int    n_gets = 0, n_getm = 0, n_putm = 0, n_nc = 0;

  function automatic line_t init_line(laddr_t a);
    return {4{4'h5, a[27:0]}} ^ 128'h00000003_00000002_00000001_00000000;
  endfunction
  function automatic line_t rd_mem(laddr_t a);
    return mem.exists(a) ? mem[a] : init_line(a);
  endfunction

  // responses to send back, one per cycle
  msg_t rsp_q [$];
  always @(negedge clk) if (rst_n) begin
    if (noc_rsp_in_valid && noc_rsp_in_ready) begin
      void'(rsp_q.pop_front());
      noc_rsp_in_valid = 0;
    end
    if (!noc_rsp_in_valid && rsp_q.size() > 0) begin
      noc_rsp_in = rsp_q[0]; noc_rsp_in_valid = 1;
    end
  end
  // forward-plane messages: PUT_ACKs and test-injected forwards
  msg_t fwd_q [$];
  always @(negedge clk) if (rst_n) begin
    if (noc_fwd_valid && noc_fwd_ready) begin
      void'(fwd_q.pop_front());
      noc_fwd_valid = 0;
    end
    if (!noc_fwd_valid && fwd_q.size() > 0) begin
      noc_fwd = fwd_q[0]; noc_fwd_valid = 1;
    end
  end

  function automatic msg_t mk(msg_type_t t, laddr_t a, line_t d, logic ex);
    msg_t m;
    m = '0; m.mtype = t; m.src = L3_ID; m.dst = ME; m.addr = a; m.data = d; m.excl = ex;
    return m;
  endfunction

  line_t nc_mem [laddr_t];
  always @(posedge clk) if (rst_n && noc_req_valid && noc_req_ready) begin
    msg_t r;
    r = noc_req;
    check(r.src == ME && r.dst == L3_ID, "request addressed to the directory");
    unique case (r.mtype)
      M_GETS: begin n_gets++; held[r.addr] = 1; rsp_q.push_back(mk(M_DATA, r.addr, rd_mem(r.addr), 1)); end
      M_GETM: begin n_getm++; held[r.addr] = 1; rsp_q.push_back(mk(M_DATA, r.addr, rd_mem(r.addr), 1)); end
      M_PUTS: begin held.delete(r.addr); fwd_q.push_back(mk(M_PUT_ACK, r.addr, '0, 0)); end
      M_PUTM: begin
        n_putm++;
        if (held.exists(r.addr) && r.dirty) mem[r.addr] = r.data;
        held.delete(r.addr);
        fwd_q.push_back(mk(M_PUT_ACK, r.addr, '0, 0));
      end
      M_NC_RD: begin n_nc++; rsp_q.push_back(mk(M_NC_DATA, r.addr, nc_mem.exists(r.addr) ? nc_mem[r.addr] : '0, 0)); end
      M_NC_WR: begin
        line_t o;
        n_nc++;
        o = nc_mem.exists(r.addr) ? nc_mem[r.addr] : '0;
        nc_mem[r.addr] = merge_words(o, r.data, r.wmask);
      end
      default: check(0, "unexpected request type");
    endcase
  end
  // responses from this L2 to other caches (after a forward)
  msg_t out_q [$];
  always @(posedge clk) if (rst_n && noc_rsp_out_valid && noc_rsp_out_ready) out_q.push_back(noc_rsp_out);

  // ---- processor side ----
  line_t ref_l [laddr_t];
  function automatic line_t ref_rd(laddr_t a);
    return ref_l.exists(a) ? ref_l[a] : init_line(a);
  endfunction

  task automatic access(cpu_op_t op, laddr_t a, int w, logic [WORD_W-1:0] wd, bit cacheable,
                        output line_t rd, output int lat);
    int t0;
    @(negedge clk);
    cpu_req = '{op: op, cacheable: cacheable, addr: {a, 4'(w * 4)}, wdata: wd};
    cpu_req_valid = 1;
    @(posedge clk);
    while (!cpu_req_ready) @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    cpu_req_valid = 0;
    while (!cpu_rsp_valid) @(negedge clk);
    lat = cyc - t0;
    rd = cpu_rsp.data;
    check(cpu_rsp.op == op, "answer kind");
  endtask

  task automatic rd(laddr_t a, int bound, string what);
    line_t d;
    int lat;
    access(CPU_READ, a, 0, '0, 1, d, lat);
    check(d == ref_rd(a), $sformatf("%s: line %h", what, a));
    check(lat <= bound, $sformatf("%s: %0d cycles > %0d", what, lat, bound));
  endtask

  task automatic wr(laddr_t a, int w, logic [WORD_W-1:0] v, int bound, string what);
    line_t d;
    int lat;
    access(CPU_WRITE, a, w, v, 1, d, lat);
    ref_l[a] = merge_words(ref_rd(a), {4{v}}, 4'(1 << w));
    check(lat <= bound, $sformatf("%s: %0d cycles > %0d", what, lat, bound));
  endtask

  initial begin
    line_t d;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    rd(28'h0000040, 46, "read miss");
    rd(28'h0000040, 12, "read hit");
    wr(28'h0000040, 1, 32'h11111111, 4, "write hit");
    rd(28'h0000040, 12, "read after write");
    wr(28'h0000081, 2, 32'h22222222, 40, "write miss");
    repeat (10) @(negedge clk);
    rd(28'h0000081, 12, "read of written line");

    // forward from node 0 for the modified line: current data sent, L1 invalidated
    begin
      msg_t f;
      f = mk(M_FWD_GETM, 28'h0000081, '0, 0); f.src = 3'd0;
      fwd_q.push_back(f);
      repeat (15) @(negedge clk);
      check(out_q.size() == 1 && out_q[0].mtype == M_DATA && out_q[0].dst == 3'd0
            && out_q[0].data == ref_rd(28'h0000081), "forwarded line carries the write");
      check(n_l1inv >= 1, "L1 invalidated");
      mem[28'h0000081] = out_q[0].data;
      held.delete(28'h0000081);
      out_q.delete();
    end
    rd(28'h0000081, 46, "line fetched again after losing it");

    // eviction: more lines in set 0 than ways, each written
    for (int k = 0; k < 12; k++) wr(laddr_t'(k * 64), k % 4, 32'(32'hE0000000 + k), 40, "set-filling write");
    repeat (20) @(negedge clk);
    check(n_evict >= 4, "lines evicted");
    check(n_putm >= 4, "modified victims written back");
    for (int k = 0; k < 12; k++) rd(laddr_t'(k * 64), 46, "line after eviction");

    // non-cacheable
    access(CPU_WRITE, 28'h0F00000, 3, 32'hABCD0123, 0, d, lat);
    repeat (10) @(negedge clk);
    access(CPU_READ, 28'h0F00000, 0, '0, 0, d, lat);
    check(d[127:96] == 32'hABCD0123, "non-cacheable read returns the written word");
    check(n_nc == 2, "both bypassed the coherence FSM");

    // flush: every modified line is written back, then nothing is held
    access(CPU_FLUSH, '0, 0, '0, 1, d, lat);
    repeat (10) @(negedge clk);
    check(held.size() == 0, "nothing held after the flush");
    foreach (ref_l[a]) check(rd_mem(a) == ref_l[a], $sformatf("line %h written back", a));
    rd(28'h0000040, 46, "read after flush misses and sees the data");
    check(n_gets > 0 && n_getm > 0, "both request kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
