// tb_macropixel: one macropixel through whole frames. Each frame picks a
// mode (single or double photon, and one of the readout modes), resets, runs
// several gate windows with random START instants and random photon pulses
// (coincident pairs are frequent), then reads the macropixel out by passing
// the token and compares every bus word with the reference model.
`timescale 1ps/1ps
module tb_macropixel;
  import spad_pkg::*;
  import tb_util_pkg::*;
  import tb_mp_model_pkg::*;

  logic        ref_clk = 1'b0, frame_rst = 1'b0, gate = 1'b1, start_q = 1'b0;  // gate starts high so the clear sees an edge
  logic [15:0] ck_phase;
  logic [3:0]  spad_event = '0;
  pix_cfg_t    cfg = '0;
  logic        rd_clk = 1'b0, rd_rst = 1'b0, shift = 1'b0, token_in = 1'b0, token_out;
  logic [22:0] bus_word;
  int checks = 0, failures = 0;

  multiphase_clock_gen u_ck (.ref_clk, .cal_trim({32{3'd4}}), .tree_trim({16{3'd4}}), .ck_phase);  // mid-scale trims
  macropixel dut (.ref_clk, .frame_rst, .gate, .start_q, .ck_phase, .spad_event,
                  .cfg, .rd_clk, .rd_rst, .shift, .token_in, .token_out, .bus_word);

  always #(HALF_PS) ref_clk = ~ref_clk;
  always #5000 rd_clk = ~rd_clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic drive_pulse(pulse_t p);
    fork
      begin
        #(p.t - $time) spad_event[p.spad] = 1'b1;
        #(p.w) spad_event[p.spad] = 1'b0;
      end
    join_none
  endtask

  MpModel m = new();
  logic [3:0] modes [6] = '{4'b0000, 4'b0100, 4'b0001, 4'b0010, 4'b1000, 4'b1001};

  initial begin
    pulse_t       q [$];
    pulse_t       p;
    logic [22:0]  ew [$];
    longint       t_start, t_end;
    int           ng, win, np;
    bit           has_start;
    int           spads [4];
    for (int f = 0; f < 24; f++) begin
      cfg = pix_cfg_t'(modes[f % 6]);
      m.new_frame(cfg.double_mode);
      @(posedge ref_clk) #100 frame_rst = 1'b1; gate = 1'b0;
      @(posedge ref_clk) #100 frame_rst = 1'b0;
      ng = (f == 5) ? 8 : int'($urandom_range(1, 6));
      for (int g = 0; g < ng; g++) begin
        @(posedge ref_clk) #100 gate = 1'b1;
        has_start = ($urandom_range(9) != 0);
        t_start = mid_bin($time / CLK_PS + 3, int'($urandom_range(31)));
        if (has_start) fork begin #(t_start - $time) start_q = 1'b1; end join_none
        win = (($urandom_range(19) == 0) ? 140 : ($urandom_range(1) ? 1 : 6));
        np  = int'($urandom_range(0, 4));
        spads = '{0, 1, 2, 3};
        spads.shuffle();
        q.delete();
        t_end = t_start;
        for (int i = 0; i < np; i++) begin
          p.spad = spads[i];
          p.t = mid_bin(t_start / CLK_PS + 1 + longint'($urandom_range(win - 1)), int'($urandom_range(31)));
          p.w = 75 * longint'($urandom_range(5, 18));
          q.push_back(p);
          drive_pulse(p);
          if (p.t + p.w > t_end) t_end = p.t + p.w;
        end
        m.gate_window(g, has_start, t_start, q);
        #(t_end - $time + 2 * CLK_PS);
        @(posedge ref_clk) #100 gate = 1'b0;
        repeat (2) @(posedge ref_clk);
        #100 start_q = 1'b0;
      end
      // Extra ungated pulses between frames' gates count in the counters.
      if (f % 4 == 1) begin
        for (int i = 0; i < 35; i++) begin
          #300 spad_event[1] = 1'b1; #300 spad_event[1] = 1'b0;
        end
        m.cnt[1] += 35;
      end
      // Readout.
      m.words(4'(cfg), ew);
      @(negedge rd_clk) rd_rst = 1'b1;
      @(negedge rd_clk) rd_rst = 1'b0;
      shift = 1'b1; token_in = 1'b1;
      @(negedge rd_clk) token_in = 1'b0;
      foreach (ew[i]) begin
        check($sformatf("frame %0d cfg %b word %0d", f, cfg, i), int'(bus_word), int'(ew[i]));
        check("token_out", int'(token_out), int'(i == ew.size() - 1));
        @(negedge rd_clk);
      end
      check("bus idle", int'(bus_word), 0);
      shift = 1'b0;
    end
    $display("single stops %0d double stops %0d no-coinc %0d who!=0 %0d reg-drop %0d bank-drop %0d cnt-sat %0d coarse-sat %0d",
             n_single_stop, n_double_stop, n_no_coinc, n_who_nonzero, n_reg_full_drop,
             n_bank_full_drop, n_cnt_sat, n_coarse_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
