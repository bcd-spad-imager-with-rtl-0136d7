// tdc_start_unit: global START side of the TDCs.
//
// The START latch is set by the START pulse and reset while the gate is
// closed (same reset timing as the pixels' TDCs). Its output `start_q` lets
// every pixel's coarse counter run. When it sets, a global FINE interpolator
// latches the 16 clock phases; the encoded 5-bit START phase is written at
// the end of each gate into the START conversion memory, one entry per gate
// of the frame (64 x 5 bits), addressed by the gate index that the pixels use
// to tag their stops. The memory is read asynchronously through mem_addr.
//
// The latch, interpolator, encoder and per-gate memory come from the source
// architecture; reset timing, memory organisation and the value 0 for a gate
// without START are this design's choices.
// Timing: `gate` is synchronous to ref_clk; the write happens on the first
// ref_clk edge that samples gate low after it was high. The START latch and
// the interpolator share one asynchronous clear, the OR of that gate reset
// and frame_rst.
`timescale 1ps/1ps
module tdc_start_unit
  import spad_pkg::*;
#(
  parameter int N_PH = N_PHASE,
  parameter int DEPTH = 2**GATE_W
) (
  input  logic                     ref_clk,
  input  logic                     frame_rst,  // async
  input  logic                     gate,
  input  logic                     start,
  input  logic [N_PH-1:0]          ck_phase,
  output logic                     start_q,
  output logic [FINE_W-1:0]        start_fine,  // current START phase
  output logic [GATE_W-1:0]        gate_cnt,    // index of the current gate
  input  logic [$clog2(DEPTH)-1:0] mem_addr,
  output logic [FINE_W-1:0]        mem_data
);
  logic              gate_d, rst_q, gate_end, clr;
  logic [N_PH-1:0]   therm;
  logic [FINE_W-1:0] mem [DEPTH];

  assign gate_end = gate_d && !gate;

  always_ff @(posedge ref_clk or posedge frame_rst)
    if (frame_rst) begin
      gate_d <= 1'b0;
      rst_q  <= 1'b1;
    end else begin
      gate_d <= gate;
      rst_q  <= !gate && !gate_d;
    end

  // One clear net for the START latch and its interpolator.
  assign clr = rst_q | frame_rst;

  // START latch.
  always_ff @(posedge start or posedge clr)
    if (clr) start_q <= 1'b0;
    else     start_q <= 1'b1;

  // START fine interpolator.
  always_ff @(posedge start_q or posedge clr)
    if (clr) therm <= '0;
    else     therm <= ck_phase;

  thermo_to_bin #(.N_PHASE(N_PH), .BIN_W(FINE_W)) u_enc (
    .therm(therm), .bin(start_fine));

  always_ff @(posedge ref_clk or posedge frame_rst)
    if (frame_rst)     gate_cnt <= '0;
    else if (gate_end) gate_cnt <= gate_cnt + 1'b1;

  // START conversion memory.
  always_ff @(posedge ref_clk)
    if (gate_end) mem[gate_cnt[$clog2(DEPTH)-1:0]] <= start_q ? start_fine : '0;

  assign mem_data = mem[mem_addr];
endmodule
