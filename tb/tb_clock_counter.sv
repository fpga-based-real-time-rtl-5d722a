// tb_clock_counter: checks the 64-bit cycle counter against a counting model
// under a random clock enable, then its synchronous reset.
module tb_clock_counter;
  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic [63:0] q;
  longint unsigned model;
  int checks = 0, failures = 0;

  clock_counter #(.WIDTH(64)) dut (.clk, .rst_n, .ce, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    checks++; if (q != 0) failures++;
    for (int n = 0; n < 2000; n++) begin
      ce <= ($urandom % 4) != 0;
      @(posedge clk);
      #1;
      if (ce) model++;
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 5) $display("count %0d expected %0d", q, model);
      end
    end
    // synchronous reset clears
    rst_n <= 1'b0; ce <= 1'b1;
    @(posedge clk); #1;
    checks++; if (q != 0) failures++;
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    #1;
    checks++; if (q != 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
