// tb_multiphase_clock_gen: checks the 16 phase lines of the clock generator
// model.
//  1. All trims at mid-scale: in the middle of every 75 ps bin of several
//     periods, line k must be high exactly when the bin index lies in
//     [k, k+16) mod 32, and the encoded pattern must give the bin back.
//  2. Random trims: the rising edge of line k must sit at
//     k*75 + (cal_trim[k] + tree_trim[k] - 8)*5 ps after a reference rising
//     edge, and its falling edge at
//     (k+16)*75 + (cal_trim[k+16] + tree_trim[k] - 8)*5 ps (modulo 2400 ps).
`timescale 1ps/1ps
module tb_multiphase_clock_gen;
  import tb_util_pkg::*;
  localparam int STEP = 5, MID = 4;
  logic             ref_clk = 1'b0;
  logic [31:0][2:0] cal_trim = {32{3'(MID)}};
  logic [15:0][2:0] tree_trim = {16{3'(MID)}};
  logic [15:0]      ck_phase;
  logic [4:0]       bin;
  longint           t_rise [16], t_fall [16];
  int checks = 0, failures = 0;

  multiphase_clock_gen dut (.ref_clk, .cal_trim, .tree_trim, .ck_phase);
  thermo_to_bin u_enc (.therm(ck_phase), .bin);

  always #(HALF_PS) ref_clk = ~ref_clk;

  for (genvar k = 0; k < 16; k++) begin : g_mon
    always @(posedge ck_phase[k]) t_rise[k] = $time;
    always @(negedge ck_phase[k]) t_fall[k] = $time;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap(longint t);
    return ((t % CLK_PS) + CLK_PS) % CLK_PS;
  endfunction

  task automatic check_edges();
    longint er, ef;
    for (int k = 0; k < 16; k++) begin
      er = k * BIN + (int'(cal_trim[k]) + int'(tree_trim[k]) - 2 * MID) * STEP;
      ef = (k + 16) * BIN + (int'(cal_trim[k + 16]) + int'(tree_trim[k]) - 2 * MID) * STEP;
      checks += 2;
      if (wrap(t_rise[k] - RISE0) != wrap(er)) begin
        failures++;
        $display("FAIL line %0d rise at %0d, expected %0d", k, wrap(t_rise[k] - RISE0), wrap(er));
      end
      if (wrap(t_fall[k] - RISE0) != wrap(ef)) begin
        failures++;
        $display("FAIL line %0d fall at %0d, expected %0d", k, wrap(t_fall[k] - RISE0), wrap(ef));
      end
    end
  endtask

  initial begin
    logic [15:0] exp_ph;
    for (int p = 3; p < 7; p++)
      for (int b = 0; b < 32; b++) begin
        #(mid_bin(p, b) - $time);
        for (int k = 0; k < 16; k++) exp_ph[k] = (((b - k + 32) % 32) < 16);
        checks++;
        if (ck_phase !== exp_ph || bin !== 5'(exp_bin($time))) begin
          failures++;
          $display("FAIL t=%0t bin %0d: phases %b exp %b enc %0d", $time, b, ck_phase, exp_ph, bin);
        end
      end
    check_edges();
    for (int s = 0; s < 8; s++) begin
      for (int j = 0; j < 32; j++) cal_trim[j] = 3'($urandom_range(7));
      for (int k = 0; k < 16; k++) tree_trim[k] = 3'($urandom_range(7));
      #(4 * CLK_PS);
      check_edges();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
