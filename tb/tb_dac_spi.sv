// tb_dac_spi: streams random 16-bit samples into the DAC driver (stream clock
// 100 MHz, SPI clock 33 MHz) and decodes the SPI pins like the DAC does:
// DIN sampled on SCLK rising edges while CS is low, exactly 16 bits per
// frame, and an LDAC low pulse after CS has returned high. Each decoded word
// must equal the sample sent, in order. Also checks SCLK = spiclk / 2 and
// that a new sample is not accepted while a frame is in flight.
module tb_dac_spi;
  logic aclk = 1'b0, spiclk = 1'b0, aresetn = 1'b0, spiresetn = 1'b0;
  logic s_valid = 1'b0, s_ready;
  logic [15:0] s_data = '0;
  logic cs, din, ldac, sclk;
  logic [15:0] sent [$];
  int checks = 0, failures = 0, frames = 0;

  dac_spi dut (.aclk, .aresetn, .s_axis_tvalid(s_valid), .s_axis_tready(s_ready),
               .s_axis_tdata(s_data), .spiclk, .spiresetn,
               .da3_cs(cs), .da3_din(din), .da3_ldac(ldac), .da3_sclk(sclk));
  always #5  aclk   = ~aclk;
  always #15 spiclk = ~spiclk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DAC-side decoder
  logic [15:0] word;
  int nbits;
  logic frame_done;
  realtime t_rise, t_prev_rise;
  always @(negedge cs) begin nbits = 0; word = '0; t_prev_rise = 0; end
  always @(posedge sclk) begin
    if (cs) begin checks++; failures++; $display("SCLK edge with CS high"); end
    word = {word[14:0], din};
    nbits++;
    t_rise = $realtime;
    if (t_prev_rise != 0) begin
      checks++;
      if (t_rise - t_prev_rise != 60.0) begin
        failures++; $display("SCLK period %0t", t_rise - t_prev_rise);
      end
    end
    t_prev_rise = t_rise;
  end
  always @(posedge cs) begin
    checks++;
    if (nbits != 16) begin failures++; $display("frame of %0d bits", nbits); end
    frame_done = 1'b1;
  end
  always @(negedge ldac) begin
    checks++;
    if (!cs || !frame_done) begin failures++; $display("LDAC outside frame end"); end
    frame_done = 1'b0;
    checks++;
    if (sent.size() == 0 || sent[0] != word) begin
      failures++;
      $display("DAC word %h expected %h", word, sent.size() ? sent[0] : 16'h0);
    end
    if (sent.size()) void'(sent.pop_front());
    frames++;
  end

  initial begin
    frame_done = 1'b0;
    repeat (4) @(posedge aclk);
    aresetn <= 1'b1; spiresetn <= 1'b1;
    for (int n = 0; n < 40; n++) begin
      @(negedge aclk);
      s_valid = 1'b1; s_data = (n == 0) ? 16'hA5C3 : 16'($urandom);
      do @(posedge aclk); while (!s_ready);
      sent.push_back(s_data);
      @(negedge aclk);
      s_valid = 1'b0;
      // busy until the frame is acknowledged
      checks++; if (s_ready) begin failures++; $display("ready during frame"); end
      repeat ($urandom % 50) @(negedge aclk);
    end
    wait (sent.size() == 0);
    repeat (100) @(posedge aclk);
    checks++; if (frames != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
