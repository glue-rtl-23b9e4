// tb_cache_data_bank: writes random lines with random word masks into a
// small data bank and checks every read against a reference copy kept in
// the testbench; reads are combinational, writes land at the clock edge.
`timescale 1ns/1ps
module tb_cache_data_bank;
  import glue_pkg::*;
  localparam int SETS = 8, WAYS = 4;

  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] rd_set = 0, wr_set = 0;
  logic [1:0] rd_way = 0, wr_way = 0;
  line_t rd_data, wr_data = '0;
  logic wr_en = 0;
  logic [LINE_WORDS-1:0] wr_mask = '0;

  cache_data_bank #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  line_t ref_m [SETS*WAYS];
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // initialise every line
    for (int i = 0; i < SETS*WAYS; i++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 3'(i / WAYS); wr_way = 2'(i % WAYS); wr_mask = '1;
      wr_data = {4{$urandom()}} ^ line_t'(i);
      ref_m[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 2000; k++) begin
      int i, j;
      @(negedge clk);
      i = int'($urandom_range(0, SETS*WAYS-1));
      wr_en = $urandom_range(0, 1) == 1;
      wr_set = 3'(i / WAYS); wr_way = 2'(i % WAYS);
      wr_mask = LINE_WORDS'($urandom());
      wr_data = {$urandom(), $urandom(), $urandom(), $urandom()};
      j = int'($urandom_range(0, SETS*WAYS-1));
      rd_set = 3'(j / WAYS); rd_way = 2'(j % WAYS);
      #1;
      checks++;
      if (rd_data !== ref_m[j]) begin
        failures++;
        if (failures < 10) $display("FAIL: line %0d read %h expected %h", j, rd_data, ref_m[j]);
      end
      if (wr_en) ref_m[i] = merge_words(ref_m[i], wr_data, wr_mask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
