// dac_spi: drives a 16-bit AD5541A voltage-output DAC (the Pmod DA3 module)
// from an AXI4-Stream of samples.
//
// The stream side runs on aclk: a beat is taken when the converter is idle,
// its 16 low bits are held and a request toggle is passed to the SPI side.
// The SPI side runs on its own clock spiclk (two-flop synchroniser on the
// request, another on the acknowledge back to aclk). One SPI frame is:
// CS low; 16 data bits MSB first, DIN changing while SCLK is low and the DAC
// sampling it on the SCLK rising edge, SCLK = spiclk / 2; CS high; then a
// LDAC low pulse of two spiclk cycles that moves the word to the DAC output.
// A frame takes 2 + 32 + 1 + 2 = 37 spiclk cycles plus synchroniser delays;
// s_axis_tready stays low until it has been acknowledged. The sample is
// straight binary (0 = lowest output voltage). The frame format follows the
// DAC's serial interface; the clock-domain crossing is this design's choice.
module dac_spi
  import milling_pkg::*;
(
  input  logic        aclk,
  input  logic        aresetn,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic [15:0] s_axis_tdata,
  input  logic        spiclk,
  input  logic        spiresetn,
  output logic        da3_cs,
  output logic        da3_din,
  output logic        da3_ldac,
  output logic        da3_sclk
);
  // ---------------- stream side (aclk) ----------------
  logic [15:0] hold;
  logic        req_t, busy;
  logic [1:0]  ack_sync;
  logic        ack_t;          // SPI side: toggles when a frame is done

  assign s_axis_tready = !busy;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      hold <= '0; req_t <= 1'b0; busy <= 1'b0; ack_sync <= '0;
    end else begin
      ack_sync <= {ack_sync[0], ack_t};
      if (s_axis_tvalid && s_axis_tready) begin
        hold  <= s_axis_tdata;
        req_t <= ~req_t;
        busy  <= 1'b1;
      end else if (busy && ack_sync[1] == req_t) begin
        busy <= 1'b0;
      end
    end
  end

  // ---------------- SPI side (spiclk) ----------------
  typedef enum logic [2:0] {P_IDLE, P_CS, P_LOW, P_HIGH, P_END, P_LDAC} phase_t;
  phase_t      ph;
  logic [2:0]  req_sync;       // [2] is the last seen value
  logic [15:0] sh;
  logic [4:0]  nbit;
  logic        ldac_cnt;

  always_ff @(posedge spiclk) begin
    if (!spiresetn) begin
      ph <= P_IDLE; req_sync <= '0; ack_t <= 1'b0; sh <= '0; nbit <= '0;
      ldac_cnt <= 1'b0;
      da3_cs <= 1'b1; da3_din <= 1'b0; da3_ldac <= 1'b1; da3_sclk <= 1'b0;
    end else begin
      req_sync[1:0] <= {req_sync[0], req_t};
      unique case (ph)
        P_IDLE: if (req_sync[1] != req_sync[2]) begin
          req_sync[2] <= req_sync[1];
          sh          <= hold;      // stable since the toggle, two syncs ago
          da3_cs      <= 1'b0;
          ph          <= P_CS;
        end
        P_CS: begin
          nbit    <= 5'd16;
          da3_din <= sh[15];
          ph      <= P_LOW;
        end
        P_LOW: begin                // SCLK rises: DAC samples DIN
          da3_sclk <= 1'b1;
          nbit     <= nbit - 1'b1;
          ph       <= P_HIGH;
        end
        P_HIGH: begin               // SCLK falls, next bit
          da3_sclk <= 1'b0;
          sh       <= {sh[14:0], 1'b0};
          da3_din  <= sh[14];
          ph       <= (nbit == '0) ? P_END : P_LOW;
        end
        P_END: begin
          da3_cs   <= 1'b1;
          da3_din  <= 1'b0;
          da3_ldac <= 1'b0;
          ldac_cnt <= 1'b0;
          ph       <= P_LDAC;
        end
        P_LDAC: begin
          ldac_cnt <= 1'b1;
          if (ldac_cnt) begin
            da3_ldac <= 1'b1;
            ack_t    <= req_sync[2];
            ph       <= P_IDLE;
          end
        end
        default: ph <= P_IDLE;
      endcase
    end
  end
endmodule
