// glue_fifo: small synchronous FIFO with valid/ready on both sides, used as
// the plane buffers in the cache interfaces. A word is accepted when
// in_valid && in_ready and leaves when out_valid && out_ready. out_data is
// the head entry (registered storage, read combinationally). in_ready depends
// only on the fill level, out_valid only on the fill level, so no
// combinational path runs from one side to the other. `free` counts empty
// slots so a producer can reserve room for several words.
// The reset also disables the assertion below; lint reports that as rst_n
// being used both asynchronously and synchronously, but the assertion makes
// no logic, so the warning stands.
module glue_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T               mem [DEPTH];
  logic [PW-1:0]  rd_ptr, wr_ptr;
  logic [CW-1:0]  count;
  logic           do_push, do_pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign free      = CW'(DEPTH) - count;
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= nxt(wr_ptr);
      if (do_pop)  rd_ptr <= nxt(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));
endmodule
