// tb_pixel_control: drives random gate windows (lengths 1..6 clocks, gaps
// 1..4 clocks) with and without a STOP and compares store, gate_inc and
// tdc_rst every cycle with a cycle-level reference: store and gate_inc pulse
// in the first cycle with GATE low after GATE high (store only if stopped);
// tdc_rst is high from the second low cycle until one cycle after GATE rises.
`timescale 1ps/1ps
module tb_pixel_control;
  logic ref_clk = 1'b0, frame_rst = 1'b0, gate = 1'b0, stopped = 1'b0;
  logic store, gate_inc, tdc_rst;
  int checks = 0, failures = 0;
  int n_store = 0, n_gate = 0;

  pixel_control dut (.ref_clk, .frame_rst, .gate, .stopped, .store, .gate_inc, .tdc_rst);

  always #1200 ref_clk = ~ref_clk;

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

  // Reference: previous sampled gate and reset register.
  logic g_prev = 1'b0, r_exp = 1'b1;

  initial begin
    #1 frame_rst = 1'b1;
    repeat (3) @(posedge ref_clk);
    #100 frame_rst = 1'b0;
    check("reset after frame_rst", int'(tdc_rst), 1);
    for (int w = 0; w < 60; w++) begin
      int len, gap;
      bit hit;
      len = int'($urandom_range(1, 6));
      gap = int'($urandom_range(1, 4));
      hit = ($urandom_range(1) == 1);
      for (int c = 0; c < len + gap; c++) begin
        @(posedge ref_clk);
        // update reference at the edge with values sampled just before it
        r_exp  = !gate && !g_prev;
        g_prev = gate;
        #100;
        gate    = (c < len);
        stopped = hit && (c >= 1) && (c < len + 1) ? 1'b1 : (c == 0 ? 1'b0 : stopped);
        #10;
        check("tdc_rst", int'(tdc_rst), int'(r_exp));
        check("gate_inc", int'(gate_inc), int'(g_prev && !gate));
        check("store", int'(store), int'(g_prev && !gate && stopped));
        if (store) n_store++;
        if (gate_inc) n_gate++;
      end
    end
    check("gates seen", int'(n_gate > 50), 1);
    $display("stores %0d gate ends %0d", n_store, n_gate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
