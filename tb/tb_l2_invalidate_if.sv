// tb_l2_invalidate_if: pushes random line addresses while the L1 accepts at
// random; checks every address reaches the L1 once, in order, as the byte
// address of the line, and that the plane refuses pushes when its two
// entries are full.
`timescale 1ns/1ps
module tb_l2_invalidate_if;
  import glue_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inv_valid = 0, inv_room, l1_inv_valid, l1_inv_ready = 0;
  laddr_t inv_addr = '0;
  logic [ADDR_W-1:0] l1_inv_addr;

  l2_invalidate_if dut (.*);

  laddr_t exp_q [$];
  int checks = 0, failures = 0, sent = 0, got = 0, full_seen = 0;

  initial begin
    repeat (50000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (l1_inv_valid && l1_inv_ready) begin
      laddr_t e;
      e = exp_q.pop_front();
      checks++;
      if (l1_inv_addr !== {e, {OFF_W{1'b0}}}) begin
        failures++; $display("FAIL: got %h expected %h", l1_inv_addr, {e, {OFF_W{1'b0}}});
      end
      got++;
    end
    if (inv_valid && inv_room) begin exp_q.push_back(inv_addr); sent++; end
    if (!inv_room) full_seen++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill without draining: room must drop after two
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); inv_valid = 1; inv_addr = laddr_t'($urandom());
    end
    @(negedge clk); inv_valid = 0;
    checks++;
    if (inv_room || exp_q.size() != 2) begin failures++; $display("FAIL: depth"); end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      inv_valid = $urandom_range(0, 1) == 1;
      inv_addr = laddr_t'($urandom());
      l1_inv_ready = $urandom_range(0, 2) != 0;
    end
    inv_valid = 0; l1_inv_ready = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (got != sent || got < 100) begin failures++; $display("FAIL: sent %0d got %0d", sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
