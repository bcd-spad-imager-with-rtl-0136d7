// tb_pixel_tdc: checks the in-pixel TDC against the timing reference model.
// Each trial resets the TDC, raises START at a random instant and STOP at a
// later random instant (both in the middle of a 75 ps bin), and expects the
// coarse count of reference edges between them and the fine bin of STOP.
// It also checks that a second STOP changes nothing, that a STOP during
// reset is ignored, that the coarse counter saturates at 127 and that the
// gate counter follows the gate_inc strobes.
`timescale 1ps/1ps
module tb_pixel_tdc;
  import spad_pkg::*;
  import tb_util_pkg::*;
  logic        ref_clk = 1'b0;
  logic        tdc_rst = 1'b0, frame_rst = 1'b0, start_q = 1'b0, stop = 1'b0;
  logic        gate_inc = 1'b0;
  logic [15:0] ck_phase;
  logic        stopped;
  tdc_word_t   tdc;
  int checks = 0, failures = 0;

  multiphase_clock_gen u_ck (.ref_clk, .cal_trim({32{3'd4}}), .tree_trim({16{3'd4}}), .ck_phase);  // mid-scale trims
  pixel_tdc dut (.ref_clk, .tdc_rst, .frame_rst, .start_q, .stop, .ck_phase,
                 .gate_inc, .stopped, .tdc);

  always #(HALF_PS) ref_clk = ~ref_clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic trial(longint span_periods, bit fixed = 0);
    longint p0, t0, t1;
    int c, f;
    tdc_rst = 1'b1; start_q = 1'b0; stop = 1'b0;
    #(3*CLK_PS);
    p0 = ($time / CLK_PS) + 2;
    t0 = mid_bin(p0, int'($urandom_range(31)));
    t1 = mid_bin(p0 + (fixed ? span_periods : longint'($urandom_range(int'(span_periods)))),
                 int'($urandom_range(31)));
    if (t1 <= t0) t1 = t0 + 75;
    #(t0 - 1000 - $time);
    tdc_rst = 1'b0;
    #(t0 - $time);  start_q = 1'b1;
    #(t1 - $time);  stop = 1'b1;
    #300 stop = 1'b0;
    c = exp_coarse(t0, t1);
    f = exp_bin(t1);
    #(2*CLK_PS);
    check("stopped", int'(stopped), 1);
    check("coarse", int'(tdc.coarse), c);
    check("fine", int'(tdc.fine), f);
    // A later STOP must not disturb the result.
    stop = 1'b1; #500 stop = 1'b0;
    #(3*CLK_PS + 1100);
    check("coarse after 2nd stop", int'(tdc.coarse), c);
    check("fine after 2nd stop", int'(tdc.fine), f);
  endtask

  initial begin
    #1 frame_rst = 1'b1;
    #(5*CLK_PS) frame_rst = 1'b0;
    for (int i = 0; i < 30; i++) trial(40);
    trial(0);
    trial(1);
    // Overflow: STOP after more than 128 periods.
    trial(140, 1);
    check("saturated", int'(tdc.coarse), 127);
    // STOP while in reset is ignored.
    tdc_rst = 1'b1; #(CLK_PS) stop = 1'b1; #300 stop = 1'b0; #(CLK_PS);
    check("stop during reset", int'(stopped), 0);
    // Gate counter.
    for (int g = 1; g <= 70; g++) begin
      @(negedge ref_clk) gate_inc = 1'b1;
      @(negedge ref_clk) gate_inc = 1'b0;
      check("gate id", int'(tdc.gate_id), g % 64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
