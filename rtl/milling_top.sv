// milling_top: fabric part of the hardware-in-the-loop face-milling
// simulator.
//
// The whole real-time loop (aloop) runs in the fabric. Around it sit the
// platform blocks it needs to keep real time and talk to the outside world:
//   - a 64-bit clock counter, read through a 64-bit AXI4-Stream register
//     slice (the loop's time base);
//   - a 32-bit discrete input word, read through a second register slice:
//     bits 29..0 are zero, bit 30 is the digital STOP input DIG_0 and bit 31
//     the board switch SW14 (both passed through a two-flop synchroniser);
//   - the DAC driver for the 16-bit AD5541A that publishes the simulated
//     displacement as an analog voltage.
// LED_0 and LED_1 show SW14 and DIG_0. The processor system, which loads
// the model through cfg_*, starts the loop and collects the per-step results
// from res_*, and the clock and reset generators are outside this module:
// clk is the 100 MHz fabric clock, spiclk the DAC interface clock, and each
// has its own synchronous active-low reset. Parameters are those of aloop.
module milling_top
  import milling_pkg::*;
#(
  parameter int unsigned N           = N_MODES_DEF,
  parameter int unsigned EDGES       = N_EDGES_DEF,
  parameter int unsigned NODES       = 64,
  parameter int unsigned CELLS       = 1024,
  parameter int unsigned ANG_BITS    = 8,
  parameter int unsigned DELAY_DEPTH = 256,
  parameter int unsigned DT_CYCLES   = DT_CYCLES_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spiclk,
  input  logic        spi_rst_n,
  // host side
  input  logic        cfg_we,
  input  logic [19:0] cfg_addr,
  input  logic [63:0] cfg_data,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [31:0] steps,
  output logic [31:0] overruns,
  output logic [31:0] max_tc,
  output logic        stopped,
  output logic        singular,
  output logic        res_valid,
  output logic [31:0] res_idx,
  output fix_t        res_data,
  output logic [63:0] clk_count,
  // board pins
  input  logic        sw14,
  input  logic        dig_0,
  output logic        led_0,
  output logic        led_1,
  output logic        da3_cs_pin,
  output logic        da3_din_pin,
  output logic        da3_ldac_pin,
  output logic        da3_sclk_pin
);
  // time base
  clock_counter #(.WIDTH(64)) u_counter (
    .clk, .rst_n, .ce(1'b1), .q(clk_count)
  );

  logic        t_valid, t_ready;
  logic [63:0] t_data;
  logic        unused_t_sready, unused_i_sready;
  axis_reg_slice #(.DATA_W(64)) u_counter_register (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_tvalid(1'b1), .s_axis_tready(unused_t_sready), .s_axis_tdata(clk_count),
    .m_axis_tvalid(t_valid), .m_axis_tready(t_ready), .m_axis_tdata(t_data)
  );

  // discrete inputs
  logic [1:0] sw_sync, dig_sync;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_sync <= '0; dig_sync <= '0;
    end else begin
      sw_sync  <= {sw_sync[0], sw14};
      dig_sync <= {dig_sync[0], dig_0};
    end
  end
  assign led_0 = sw14;
  assign led_1 = dig_0;

  logic        i_valid, i_ready;
  logic [31:0] i_data;
  axis_reg_slice #(.DATA_W(32)) u_input_register (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_tvalid(1'b1), .s_axis_tready(unused_i_sready),
    .s_axis_tdata({sw_sync[1], dig_sync[1], 30'd0}),
    .m_axis_tvalid(i_valid), .m_axis_tready(i_ready), .m_axis_tdata(i_data)
  );

  // real-time loop
  logic        d_valid, d_ready;
  logic [15:0] d_data;
  aloop #(
    .N(N), .EDGES(EDGES), .NODES(NODES), .CELLS(CELLS), .ANG_BITS(ANG_BITS),
    .DELAY_DEPTH(DELAY_DEPTH), .DT_CYCLES(DT_CYCLES), .STOP_BIT(30)
  ) u_aloop (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_data,
    .start, .busy, .done, .steps, .overruns, .max_tc, .stopped, .singular,
    .time_tvalid(t_valid), .time_tready(t_ready), .time_tdata(t_data),
    .in_tvalid(i_valid), .in_tready(i_ready), .in_tdata(i_data),
    .dac_tvalid(d_valid), .dac_tready(d_ready), .dac_tdata(d_data),
    .res_valid, .res_idx, .res_data
  );

  // analog output
  dac_spi u_dac (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_tvalid(d_valid), .s_axis_tready(d_ready), .s_axis_tdata(d_data),
    .spiclk, .spiresetn(spi_rst_n),
    .da3_cs(da3_cs_pin), .da3_din(da3_din_pin),
    .da3_ldac(da3_ldac_pin), .da3_sclk(da3_sclk_pin)
  );

  logic unused_ok;
  assign unused_ok = ^{unused_t_sready, unused_i_sready};
endmodule
