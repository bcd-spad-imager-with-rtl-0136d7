// storage_logic: the four timestamp registers (STORE_A..D) of a macropixel.
//
// Single-photon mode: each SPAD owns one register. On a store strobe the TDC
// word goes into the register of the SPAD named by WHO, if that register is
// still empty in this frame, so every SPAD keeps its first timestamp while
// the four SPADs share one TDC. Double-photon mode: coincidence timestamps
// fill registers A, B, C, D in order (the first four events of the frame).
// `first_who` names the register holding the frame's first stored event.
// Empty registers read all ones. Cleared by the frame reset.
//
// One register per SPAD and "first 4 events" in double mode come from the
// source; the keep-first policy and the empty value are design choices.
// Timing: stores on the ref_clk edge where `store` is high.
`timescale 1ps/1ps
module storage_logic
  import spad_pkg::*;
(
  input  logic                     ref_clk,
  input  logic                     frame_rst,  // async
  input  logic                     store,
  input  logic                     double_mode,
  input  tdc_word_t                tdc,
  input  logic [1:0]               who,
  output tdc_word_t [N_SPAD-1:0]   bank,
  output logic [N_SPAD-1:0]        filled,
  output logic [1:0]               first_who,
  output logic                     first_valid
);
  logic [1:0] next_idx;   // double mode: next register to fill
  logic [1:0] sel;
  logic       do_store;

  always_comb begin
    if (double_mode) begin
      sel      = next_idx;
      do_store = store && !(&filled);
    end else begin
      sel      = who;
      do_store = store && !filled[who];
    end
  end

  always_ff @(posedge ref_clk or posedge frame_rst)
    if (frame_rst) begin
      bank        <= {N_SPAD{TS_EMPTY}};
      filled      <= '0;
      next_idx    <= '0;
      first_who   <= '0;
      first_valid <= 1'b0;
    end else if (do_store) begin
      bank[sel]   <= tdc;
      filled[sel] <= 1'b1;
      next_idx    <= next_idx + 1'b1;
      if (!first_valid) begin
        first_who   <= sel;
        first_valid <= 1'b1;
      end
    end
endmodule
