// l2_invalidate_if: invalidation plane from an L2 cache to its L1.
//
// When the L2 loses a line to another cache (INV or FWD_GETM from the
// directory) the L1, which may hold a copy, must drop it too. The FSM pushes
// the line address here; a two-entry FIFO holds it until the L1 takes it
// (l1_inv_valid/l1_inv_ready), presented as the byte address of the line's
// first byte. The L1 needs no answer: if it wants the data again it asks the
// L2, which applies the coherence protocol. The plane itself follows the
// document; the FIFO depth and address form are chosen here.
module l2_invalidate_if
  import glue_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              inv_valid,
  input  laddr_t            inv_addr,
  output logic              inv_room,
  output logic              l1_inv_valid,
  input  logic              l1_inv_ready,
  output logic [ADDR_W-1:0] l1_inv_addr
);
  laddr_t     head;
  logic [1:0] unused_free;

  glue_fifo #(.T(laddr_t), .DEPTH(2)) u_q (
    .clk, .rst_n,
    .in_valid(inv_valid), .in_ready(inv_room), .in_data(inv_addr),
    .out_valid(l1_inv_valid), .out_ready(l1_inv_ready), .out_data(head), .free(unused_free));

  assign l1_inv_addr = {head, {OFF_W{1'b0}}};
endmodule
