// tb_glue_top: end-to-end test of the four-processor coherent hierarchy at
// its default sizes (4 L2s of 64 sets x 8 ways, a 64-set x 32-way L3).
//
// Four processor models drive the L2 request ports; a behavioural memory
// sits behind the L3. Phases:
//  1. the two-processor read/write alternation of the protocol's basic test
//     (P0 read, P1 write, P0 read, P0 write, P1 read), values checked;
//  2. hit latencies against the bounds the design targets (read hit within
//     12 cycles, write hit within 4, request accepted to answer seen);
//  3. non-cacheable writes and reads, which bypass the coherence FSMs;
//  4. all four processors at once issuing random reads, writes, flushes and
//     non-cacheable accesses over a few lines that all four share word-wise
//     (processor p only writes word p of a line) and over more lines in one
//     set than an L2 or the L3 has ways, so lines are evicted, forwarded,
//     invalidated and written back. Each read is checked: the reader's own
//     word must be its last write; another processor's word must be a value
//     that processor wrote, never older than one the reader saw before;
//  5. every processor flushes its L2, and one processor reads every line
//     back: each word must hold its writer's last value.
// Every mechanism (L2 eviction, forward-plane stall, write-buffer stall,
// flush, L3 fill, write-back, invalidation, forward, parked request, L1
// invalidation, non-cacheable access) is counted and must happen at least
// once. A watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_glue_top;
  import glue_pkg::*;

  localparam int N = NUM_L2;
  localparam int NPOOL = 44;     // shared lines in the random phase
  localparam int OPS   = 3000;    // random operations per processor

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      cpu_req_valid, cpu_req_ready, cpu_rsp_valid, cpu_rsp_ready;
  cpu_req_t          cpu_req [N];
  cpu_rsp_t          cpu_rsp [N];
  logic [N-1:0]      l1_inv_valid, l1_inv_ready;
  logic [ADDR_W-1:0] l1_inv_addr [N];
  logic              mem_req_valid, mem_req_ready, mem_rsp_valid, mem_rsp_ready;
  mem_req_t          mem_req;
  mem_rsp_t          mem_rsp;
  logic [N-1:0]      ev_l2_evict, ev_l2_fwd_stall, ev_l2_wb_stall, ev_l2_flush_line;
  logic              ev_l3_mem_fill, ev_l3_writeback, ev_l3_inv, ev_l3_fwd, ev_l3_replay;
  int                n_mem_rd, n_mem_wr;

  glue_top dut (.*);

  glue_mem_model #(.LAT(8)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp(mem_rsp),
    .n_reads(n_mem_rd), .n_writes(n_mem_wr));

  assign cpu_rsp_ready = '1;
  assign l1_inv_ready  = '1;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int c_evict, c_fstall, c_wbstall, c_flush, c_fill, c_wback, c_inv, c_fwd, c_replay, c_l1inv, c_nc;
  always @(posedge clk) if (rst_n) begin
    c_evict   += $countones(ev_l2_evict);
    c_fstall  += $countones(ev_l2_fwd_stall);
    c_wbstall += $countones(ev_l2_wb_stall);
    c_flush   += $countones(ev_l2_flush_line);
    c_fill    += int'(ev_l3_mem_fill);
    c_wback   += int'(ev_l3_writeback);
    c_inv     += int'(ev_l3_inv);
    c_fwd     += int'(ev_l3_fwd);
    c_replay  += int'(ev_l3_replay);
    c_l1inv   += $countones(l1_inv_valid & l1_inv_ready);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  function automatic logic [WORD_W-1:0] init_word(laddr_t a, int w);
    return {4'hA, a[23:0], 4'(w)};
  endfunction

  function automatic logic [WORD_W-1:0] word_of(line_t l, int w);
    return l[w*WORD_W +: WORD_W];
  endfunction

  // one request from processor p; returns the response and its latency
  task automatic access(int p, cpu_op_t op, logic [ADDR_W-1:0] addr, logic [WORD_W-1:0] wd,
                        bit cacheable, output line_t rd, output int lat);
    int t0;
    @(negedge clk);
    cpu_req[p] = '{op: op, cacheable: cacheable, addr: addr, wdata: wd};
    cpu_req_valid[p] = 1'b1;
    while (!cpu_req_ready[p]) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    cpu_req_valid[p] = 1'b0;
    while (!cpu_rsp_valid[p]) @(negedge clk);
    lat = cyc - t0;
    rd = cpu_rsp[p].data;
    check(cpu_rsp[p].op == op, $sformatf("P%0d response kind", p));
    @(negedge clk);
  endtask

  function automatic logic [ADDR_W-1:0] byte_addr(laddr_t l, int w);
    return {l, 4'(w * 4)};
  endfunction

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  // ---- random phase bookkeeping ----
  laddr_t              pool [NPOOL];
  logic [WORD_W-1:0]   lastw [N][NPOOL];   // last value processor p wrote to word p
  bit                  wrote [N][NPOOL];
  int                  seen  [N][N][NPOOL]; // highest sequence p saw in word j
  int                  seqn  [N];
  int                  nc_seq;

  function automatic logic [WORD_W-1:0] wval(int p, int li, int s);
    return {4'(p), 12'(li), 16'(s)};
  endfunction

  task automatic check_line(int p, int li, line_t d);
    for (int j = 0; j < N; j++) begin
      logic [WORD_W-1:0] v;
      v = word_of(d, j);
      if (j == p) begin
        check(v == (wrote[p][li] ? lastw[p][li] : init_word(pool[li], j)),
              $sformatf("P%0d own word, line %0d: %h", p, li, v));
      end else if (v != init_word(pool[li], j)) begin
        int s;
        s = int'(v[15:0]);
        check(v[31:28] == 4'(j) && v[27:16] == 12'(li) && s >= seen[p][j][li]
              && s <= seqn[j], $sformatf("P%0d word %0d of line %0d stale/bogus: %h", p, j, li, v));
        seen[p][j][li] = s;
      end else begin
        check(seen[p][j][li] == 0, $sformatf("P%0d saw word %0d of line %0d go back to memory value", p, j, li));
      end
    end
  endtask

  task automatic worker(int p);
    line_t d;
    int lat;
    for (int k = 0; k < OPS; k++) begin
      int r, li;
      r  = int'($urandom_range(0, 99));
      // half the traffic goes to two hot lines, to provoke races
      li = ($urandom_range(0, 1) == 0) ? int'($urandom_range(0, 1)) : int'($urandom_range(0, NPOOL-1));
      if (r < 45) begin
        access(p, CPU_READ, byte_addr(pool[li], 0), '0, 1'b1, d, lat);
        check_line(p, li, d);
      end else if (r < 93) begin
        seqn[p]++;
        lastw[p][li] = wval(p, li, seqn[p]);
        wrote[p][li] = 1'b1;
        access(p, CPU_WRITE, byte_addr(pool[li], p), lastw[p][li], 1'b1, d, lat);
      end else if (r < 95) begin
        access(p, CPU_FLUSH, '0, '0, 1'b1, d, lat);
      end else begin
        // non-cacheable word in a region no cacheable access touches
        logic [ADDR_W-1:0] a;
        logic [WORD_W-1:0] v;
        a = 32'h8000_0000 + 32'(p * 64);
        v = 32'hC000_0000 | 32'(p << 16) | 32'(k);
        access(p, CPU_WRITE, a, v, 1'b0, d, lat);
        access(p, CPU_READ, a, '0, 1'b0, d, lat);
        check(word_of(d, 0) == v, $sformatf("P%0d non-cacheable read back", p));
        c_nc++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t d;
    int lat;
    laddr_t A, B, C;
    cpu_req_valid = '0;
    for (int p = 0; p < N; p++) cpu_req[p] = '0;
    c_evict = 0; c_fstall = 0; c_wbstall = 0; c_flush = 0; c_fill = 0; c_wback = 0;
    c_inv = 0; c_fwd = 0; c_replay = 0; c_l1inv = 0; c_nc = 0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // ---- 1. basic two-processor alternation ----
    A = 28'h0000_100;
    access(0, CPU_READ, byte_addr(A, 0), '0, 1'b1, d, lat);
    check(word_of(d, 1) == init_word(A, 1), "P0 first read of A");
    access(1, CPU_WRITE, byte_addr(A, 1), 32'h1111_0001, 1'b1, d, lat);
    idle(60);
    access(0, CPU_READ, byte_addr(A, 0), '0, 1'b1, d, lat);
    check(word_of(d, 1) == 32'h1111_0001, "P0 sees P1's store");
    access(0, CPU_WRITE, byte_addr(A, 0), 32'h0000_0002, 1'b1, d, lat);
    idle(60);
    access(1, CPU_READ, byte_addr(A, 0), '0, 1'b1, d, lat);
    check(word_of(d, 0) == 32'h0000_0002 && word_of(d, 1) == 32'h1111_0001, "P1 sees both stores");

    // ---- 2. hit latency ----
    B = 28'h0000_241;
    access(2, CPU_READ, byte_addr(B, 0), '0, 1'b1, d, lat);
    access(2, CPU_READ, byte_addr(B, 0), '0, 1'b1, d, lat);
    check(lat <= 12, $sformatf("read hit latency %0d <= 12", lat));
    $display("read hit latency: %0d cycles", lat);
    access(2, CPU_WRITE, byte_addr(B, 3), 32'h2222_0003, 1'b1, d, lat);
    check(lat <= 4, $sformatf("write hit latency %0d <= 4", lat));
    $display("write hit latency: %0d cycles", lat);
    access(2, CPU_READ, byte_addr(B, 0), '0, 1'b1, d, lat);
    check(word_of(d, 3) == 32'h2222_0003 && word_of(d, 0) == init_word(B, 0), "P2 reads its write");

    // ---- 3. non-cacheable ----
    C = 28'h0F00_000;
    access(3, CPU_WRITE, byte_addr(C, 2), 32'h3333_3333, 1'b0, d, lat);
    access(3, CPU_READ, byte_addr(C, 2), '0, 1'b0, d, lat);
    check(word_of(d, 2) == 32'h3333_3333 && word_of(d, 1) == init_word(C, 1), "non-cacheable write/read");
    c_nc++;

    // ---- 4. random concurrent phase ----
    for (int i = 0; i < NPOOL; i++) begin
      // lines 0..3: spread over sets; the rest all in set 9 (more than 32)
      pool[i] = (i < 4) ? laddr_t'(28'h0004_000 + i * 7) : laddr_t'(28'h0010_009 + (i << 6));
      for (int p = 0; p < N; p++) begin
        wrote[p][i] = 1'b0; lastw[p][i] = '0;
        for (int j = 0; j < N; j++) seen[p][j][i] = 0;
      end
    end
    for (int p = 0; p < N; p++) seqn[p] = 0;
    fork
      worker(0);
      worker(1);
      worker(2);
      worker(3);
    join

    // ---- 5. flush everything, read back ----
    idle(200);
    for (int p = 0; p < N; p++) access(p, CPU_FLUSH, '0, '0, 1'b1, d, lat);
    for (int li = 0; li < NPOOL; li++) begin
      access(0, CPU_READ, byte_addr(pool[li], 0), '0, 1'b1, d, lat);
      for (int j = 0; j < N; j++)
        check(word_of(d, j) == (wrote[j][li] ? lastw[j][li] : init_word(pool[li], j)),
              $sformatf("final value, line %0d word %0d", li, j));
    end

    $display("mechanisms: l2_evict=%0d fwd_stall=%0d wb_stall=%0d flush_lines=%0d l3_fill=%0d writeback=%0d inv=%0d fwd=%0d l3_parked=%0d l1_inv=%0d nc=%0d mem_rd=%0d mem_wr=%0d",
             c_evict, c_fstall, c_wbstall, c_flush, c_fill, c_wback, c_inv, c_fwd, c_replay, c_l1inv, c_nc, n_mem_rd, n_mem_wr);
    check(c_evict > 0,   "L2 eviction happened");
    check(c_fstall > 0,  "forward-plane stall happened");
    check(c_wbstall > 0, "write-buffer stall happened");
    check(c_flush > 0,   "flush wrote lines back");
    check(c_fill > 0,    "L3 fill happened");
    check(c_wback > 0,   "L3 write-back to memory happened");
    check(c_inv > 0,     "invalidation happened");
    check(c_fwd > 0,     "forward happened");
    check(c_replay > 0,  "L3 parked a request");
    check(c_l1inv > 0,   "L1 invalidation happened");
    check(c_nc > 0,      "non-cacheable access happened");
    $display("finished at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
