// tb_tdc_start_unit: runs a frame of gate windows through the global START
// unit. In each gate START arrives at a random instant (in the middle of a
// 75 ps bin); some gates have no START. Checks: start_q rises at START and
// is cleared between gates, the current START phase, the gate counter, and
// afterwards every START conversion memory entry (phase, or 0 without START).
`timescale 1ps/1ps
module tb_tdc_start_unit;
  import spad_pkg::*;
  import tb_util_pkg::*;
  logic        ref_clk = 1'b0, frame_rst = 1'b0, gate = 1'b1, start = 1'b0;  // gate starts high so the clear sees an edge
  logic [15:0] ck_phase;
  logic        start_q;
  logic [4:0]  start_fine, mem_data;
  logic [5:0]  gate_cnt, mem_addr = '0;
  int          exp_mem [64];
  int checks = 0, failures = 0;
  localparam int NG = 20;

  multiphase_clock_gen u_ck (.ref_clk, .cal_trim({32{3'd4}}), .tree_trim({16{3'd4}}), .ck_phase);  // mid-scale trims
  tdc_start_unit dut (.ref_clk, .frame_rst, .gate, .start, .ck_phase, .start_q,
                      .start_fine, .gate_cnt, .mem_addr, .mem_data);

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

  initial begin
    longint t;
    bit     has_start;
    @(posedge ref_clk) #100 frame_rst = 1'b1; gate = 1'b0;
    #(4*CLK_PS + 100) frame_rst = 1'b0;
    for (int g = 0; g < NG; g++) begin
      has_start = (g % 5 != 3);
      @(posedge ref_clk) #100 gate = 1'b1;
      check("gate count", int'(gate_cnt), g);
      repeat (2) @(posedge ref_clk);
      t = mid_bin($time / CLK_PS + 1, int'($urandom_range(31)));
      if (has_start) begin
        #(t - $time) start = 1'b1;
        #400 start = 1'b0;
        check("start_q set", int'(start_q), 1);
        check("start fine", int'(start_fine), exp_bin(t));
        exp_mem[g] = exp_bin(t);
      end else begin
        exp_mem[g] = 0;
      end
      repeat (5) @(posedge ref_clk);
      #100 gate = 1'b0;
      repeat (3) @(posedge ref_clk);
      #10 check("start_q cleared", int'(start_q), 0);
    end
    for (int g = 0; g < NG; g++) begin
      mem_addr = 6'(g);
      #10 check("memory", int'(mem_data), exp_mem[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
