// tb_axis_reg_slice: random source valid and sink ready; every beat that
// leaves must be the next beat that entered (scoreboard queue), none may be
// lost or duplicated, and a valid output must hold while it is stalled.
// Also checks the one-cycle latency through an empty slice.
module tb_axis_reg_slice;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic s_valid, s_ready, m_valid, m_ready;
  logic [W-1:0] s_data, m_data;
  logic [W-1:0] sb [$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  axis_reg_slice #(.DATA_W(W)) dut (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard on the clock edge
  always @(posedge clk) if (rst_n) begin
    if (s_valid && s_ready) begin sb.push_back(s_data); sent++; end
    if (m_valid && m_ready) begin
      checks++;
      if (sb.size() == 0 || sb[0] != m_data) begin
        failures++;
        $display("beat %h unexpected", m_data);
      end
      if (sb.size() != 0) void'(sb.pop_front());
      got++;
    end
  end

  initial begin
    s_valid = 0; m_ready = 0; s_data = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // latency: one beat into an empty slice appears one cycle later
    @(negedge clk);
    s_valid = 1; s_data = 32'hCAFE0001;
    @(negedge clk);
    s_valid = 0;
    checks++; if (!(m_valid && m_data == 32'hCAFE0001)) failures++;
    m_ready = 1;
    @(negedge clk);
    m_ready = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (!(s_valid && !s_ready)) begin     // a stalled beat holds
        s_valid = ($urandom % 3) != 0;
        s_data  = $urandom;
      end
      m_ready = ($urandom % 2) != 0;
    end
    @(negedge clk); s_valid = 0; m_ready = 1;
    repeat (4) @(negedge clk);
    checks++; if (sent != got || sb.size() != 0) begin
      failures++; $display("sent %0d got %0d", sent, got);
    end
    checks++; if (got < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
