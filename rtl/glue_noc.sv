// glue_noc: the three-plane interconnect between the L2 caches and the L3.
//
// Request plane: every L2 to the L3, one message per cycle chosen by a
// round-robin arbiter. Forward plane: the L3 to the L2 named in msg.dst.
// Response plane: any node (L2s 0..N-1, L3 = N) to any node, with one
// round-robin arbiter per destination. A message is delivered in the cycle it
// is granted (combinational crossbar, no buffering inside); per source and
// destination, messages on one plane stay in order, which the protocol
// relies on (a PUT from an L2 reaches the L3 before that L2's next GET).
// The document only names this network (the platform's NoC, modelled simply
// for testing); everything here is this design's own stand-in for it.
module glue_noc
  import glue_pkg::*;
#(
  parameter int unsigned N = NUM_L2
) (
  input  logic         clk,
  input  logic         rst_n,
  // L2 side
  input  logic [N-1:0] l2_req_valid,
  output logic [N-1:0] l2_req_ready,
  input  msg_t         l2_req [N],
  output logic [N-1:0] l2_fwd_valid,
  input  logic [N-1:0] l2_fwd_ready,
  output msg_t         l2_fwd [N],
  input  logic [N-1:0] l2_rsp_out_valid,
  output logic [N-1:0] l2_rsp_out_ready,
  input  msg_t         l2_rsp_out [N],
  output logic [N-1:0] l2_rsp_in_valid,
  input  logic [N-1:0] l2_rsp_in_ready,
  output msg_t         l2_rsp_in [N],
  // L3 side
  output logic         l3_req_valid,
  input  logic         l3_req_ready,
  output msg_t         l3_req,
  input  logic         l3_fwd_valid,
  output logic         l3_fwd_ready,
  input  msg_t         l3_fwd,
  input  logic         l3_rsp_out_valid,
  output logic         l3_rsp_out_ready,
  input  msg_t         l3_rsp_out,
  output logic         l3_rsp_in_valid,
  input  logic         l3_rsp_in_ready,
  output msg_t         l3_rsp_in
);
  localparam int unsigned NW = $clog2(N+1);

  // ---- request plane: N -> 1 ----
  logic [NW-1:0] req_ptr;
  logic [NW-1:0] req_sel;
  logic          req_any;
  always_comb begin
    req_any = 1'b0; req_sel = '0;
    for (int k = N-1; k >= 0; k--) begin
      int i;
      i = (int'(req_ptr) + k) % N;
      if (l2_req_valid[i]) begin req_any = 1'b1; req_sel = NW'(i); end
    end
    l3_req_valid = req_any;
    l3_req       = l2_req[0];
    l2_req_ready = '0;
    for (int i = 0; i < N; i++) begin
      if (req_sel == NW'(i)) begin
        l3_req = l2_req[i];
        l2_req_ready[i] = req_any && l3_req_ready;
      end
    end
  end

  // ---- forward plane: 1 -> N ----
  always_comb begin
    l2_fwd_valid = '0;
    l3_fwd_ready = 1'b0;
    for (int i = 0; i < N; i++) begin
      l2_fwd[i] = l3_fwd;
      if (l3_fwd_valid && l3_fwd.dst == node_t'(i)) begin
        l2_fwd_valid[i] = 1'b1;
        l3_fwd_ready    = l2_fwd_ready[i];
      end
    end
  end

  // ---- response plane: N+1 -> N+1 ----
  logic [N:0] src_v;
  msg_t       src_m [N+1];
  logic [N:0] src_r;
  logic [N:0] dst_v;
  msg_t       dst_m [N+1];
  logic [N:0] dst_r;
  logic [NW-1:0] rsp_ptr [N+1];
  logic [NW-1:0] gsel [N+1];
  logic [N:0]    gany;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      src_v[i] = l2_rsp_out_valid[i];
      src_m[i] = l2_rsp_out[i];
    end
    src_v[N] = l3_rsp_out_valid;
    src_m[N] = l3_rsp_out;
    for (int i = 0; i < N; i++) dst_r[i] = l2_rsp_in_ready[i];
    dst_r[N] = l3_rsp_in_ready;

    src_r = '0;
    for (int d = 0; d <= N; d++) begin
      gany[d] = 1'b0; gsel[d] = '0;
      for (int k = N; k >= 0; k--) begin
        int sidx;
        sidx = (int'(rsp_ptr[d]) + k) % (N+1);
        if (src_v[sidx] && src_m[sidx].dst == node_t'(d)) begin
          gany[d] = 1'b1; gsel[d] = NW'(sidx);
        end
      end
      dst_v[d] = gany[d];
      dst_m[d] = src_m[gsel[d]];
      if (gany[d]) src_r[gsel[d]] = dst_r[d];
    end

    for (int i = 0; i < N; i++) begin
      l2_rsp_in_valid[i]  = dst_v[i];
      l2_rsp_in[i]        = dst_m[i];
      l2_rsp_out_ready[i] = src_r[i];
    end
    l3_rsp_in_valid  = dst_v[N];
    l3_rsp_in        = dst_m[N];
    l3_rsp_out_ready = src_r[N];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_ptr <= '0;
      for (int d = 0; d <= N; d++) rsp_ptr[d] <= '0;
    end else begin
      if (req_any && l3_req_ready)
        req_ptr <= (req_sel == NW'(N-1)) ? '0 : req_sel + 1'b1;
      for (int d = 0; d <= N; d++)
        if (gany[d] && dst_r[d])
          rsp_ptr[d] <= (gsel[d] == NW'(N)) ? '0 : gsel[d] + 1'b1;
    end
  end
endmodule
