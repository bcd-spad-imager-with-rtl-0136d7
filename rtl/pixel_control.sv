// pixel_control: per-macropixel gate sequencing.
//
// GATE is synchronous to the reference clock. On the first clock edge that
// samples GATE low after it was high (the "gate end" edge) the control logic
// strobes the storage logic, if the TDC was stopped during the gate, and
// advances the gate counter. From the following edge the TDC (and the WHO
// register) is held in reset, and it is released on the first edge that
// samples GATE high again, so each gate window gives at most one conversion.
// The frame reset also resets the TDC directly (see pixel_tdc).
//
// The source only shows GATE entering the control logic and a TDC reset
// leaving it; this timing is the design's choice. The STOP flag is sampled
// without a synchronizer: soft gating closed the STOP path one full clock
// period before the gate-end edge, so it is stable there.
`timescale 1ps/1ps
module pixel_control (
  input  logic ref_clk,
  input  logic frame_rst,  // async
  input  logic gate,
  input  logic stopped,
  output logic store,      // combinational strobe, valid at the gate-end edge
  output logic gate_inc,
  output logic tdc_rst
);
  logic gate_d, rst_q;

  always_ff @(posedge ref_clk or posedge frame_rst)
    if (frame_rst) begin
      gate_d  <= 1'b0;
      rst_q   <= 1'b1;
    end else begin
      gate_d  <= gate;
      rst_q   <= !gate && !gate_d;
    end

  assign tdc_rst  = rst_q;
  assign gate_inc = gate_d && !gate;
  assign store    = gate_inc && stopped;
endmodule
