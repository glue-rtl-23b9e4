// glue_mem_model: behavioural main memory for simulation (not synthesizable).
//
// Stands in for the memory controller behind the L3. Requests are always
// accepted. A write merges its words (wmask) into the stored line at once; a
// read is answered LAT cycles later, in request order, echoing the request's
// tag. A line never written reads as init_line(addr), a pattern computed from
// its address, so a testbench can predict it. n_reads/n_writes count traffic.
module glue_mem_model
  import glue_pkg::*;
#(
  parameter int unsigned LAT = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  input  logic     rsp_ready,
  output mem_rsp_t rsp,
  output int       n_reads,
  output int       n_writes
);
  line_t    store [laddr_t];
  mem_rsp_t q [$];
  int       due [$];
  int       cyc;

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < LINE_WORDS; w++) l[w*WORD_W +: WORD_W] = {4'hA, a[23:0], 4'(w)};
    return l;
  endfunction

  function automatic line_t peek(laddr_t a);
    return store.exists(a) ? store[a] : init_line(a);
  endfunction

  assign req_ready = 1'b1;
  assign rsp_valid = (q.size() > 0) && (due[0] <= cyc);
  assign rsp       = (q.size() > 0) ? q[0] : '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc <= 0; n_reads <= 0; n_writes <= 0;
      q.delete(); due.delete();
    end else begin
      cyc <= cyc + 1;
      if (rsp_valid && rsp_ready) begin
        void'(q.pop_front()); void'(due.pop_front());
      end
      if (req_valid) begin
        if (req.write) begin
          store[req.addr] = merge_words(peek(req.addr), req.data, req.wmask);
          n_writes <= n_writes + 1;
        end else begin
          q.push_back('{addr: req.addr, data: peek(req.addr), tag: req.tag});
          due.push_back(cyc + int'(LAT));
          n_reads <= n_reads + 1;
        end
      end
    end
  end
endmodule
