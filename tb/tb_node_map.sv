// tb_node_map: fills the map with random nodes, then reads it at random
// positions (including negative ones and ones past the end, which must
// clamp to the first and last cell) and compares with a copy of the table.
module tb_node_map;
  import milling_pkg::*;
  import milling_ref_pkg::*;
  localparam int CELLS = 64, NODES = 16;
  logic clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0] wr_cell;
  logic [3:0] wr_node, node;
  fix_t pos;
  int model [CELLS];
  int checks = 0, failures = 0;

  node_map #(.CELLS(CELLS), .NODES(NODES)) dut (.clk, .wr_en, .wr_cell, .wr_node,
                                                 .rd_en, .pos, .node);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pos = '0; wr_cell = '0; wr_node = '0;
    for (int c = 0; c < CELLS; c++) begin
      @(negedge clk);
      model[c] = $urandom % NODES;
      wr_en = 1'b1; wr_cell = 6'(c); wr_node = 4'(model[c]);
    end
    @(negedge clk); wr_en = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      real p;
      int  ci;
      p = real'(int'($urandom % 8000)) / 100.0 - 5.0;   // -5 .. 75
      ci = $rtoi(p < 0 ? -1.0 : p);
      if (p < 0) ci = 0;
      if (ci > CELLS - 1) ci = CELLS - 1;
      @(negedge clk);
      pos = r2fx(p); rd_en = 1'b1;
      @(negedge clk);
      rd_en = 1'b0;
      checks++;
      if (int'(node) != model[ci]) begin
        failures++;
        if (failures < 5) $display("pos %f node %0d expected %0d", p, node, model[ci]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
