// axis_reg_slice: one-stage AXI4-Stream register slice.
//
// The platform uses two of them: one registers the 64-bit clock count and one
// the 32-bit discrete input word, so that the real-time loop reads both
// through a stream port. A beat is accepted when the slice is empty or its
// held beat leaves in the same cycle (s_tready = !m_tvalid || m_tready), so a
// continuously valid source refreshes the register every time the consumer
// takes a value and the consumer sees data at most one cycle old.
// Latency: one cycle from s_* to m_*. Synchronous active-low reset.
module axis_reg_slice #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic [DATA_W-1:0] s_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic [DATA_W-1:0] m_axis_tdata
);
  assign s_axis_tready = !m_axis_tvalid || m_axis_tready;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
    end else if (s_axis_tready) begin
      m_axis_tvalid <= s_axis_tvalid;
      if (s_axis_tvalid) m_axis_tdata <= s_axis_tdata;
    end
  end

  // AXI4-Stream rule: a valid beat holds until it is taken.
  property p_hold;
    @(posedge aclk) disable iff (!aresetn)
      m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata);
  endproperty
  a_hold: assert property (p_hold);
endmodule
