// Shared body of the imager testbenches (tb_spad_imager_top at reduced size,
// tb_spad_imager_full at the default 16x16 size). The including module
// declares ROWS, COLS, NFRAMES and instantiates the imager as `dut`.
//
// Each frame selects a mode, resets the frame, runs several gate windows
// with a global START (sometimes missing) and random photon pulses in every
// macropixel, then reads the whole array and compares every word, its
// row/column/word position and the scan length with per-macropixel
// reference models. It also reads back the START conversion memory.
// Every mechanism (single and double stops, rejected lone photons, WHO,
// dropped hits, counter and coarse saturation, empty registers, gates
// without START, multi-gate tagging and each readout mode) must occur at
// least once, otherwise a failure is counted.
// `gate` starts high so that the internal gate resets are low when the
// first frame_rst rises: the shared asynchronous clears then see a real
// rising edge even with random initial register values.

  logic        ref_clk = 1'b0, frame_rst = 1'b0, gate = 1'b1, start = 1'b0;
  // Clock-generator calibration at mid-scale: nominal 75 ps phases.
  logic [2*N_PHASE-1:0][TRIM_W-1:0] cal_trim  = {2*N_PHASE{TRIM_W'(2**(TRIM_W-1))}};
  logic [N_PHASE-1:0][TRIM_W-1:0]   tree_trim = {N_PHASE{TRIM_W'(2**(TRIM_W-1))}};
  logic [ROWS-1:0][COLS-1:0][3:0] spad_event = '0;
  pix_cfg_t    cfg = '0;
  logic        rd_clk = 1'b0, rd_rst = 1'b0, rd_start = 1'b0;
  logic [22:0] rd_data;
  logic        rd_valid, rd_busy, rd_done;
  logic [$clog2(ROWS+1)-1:0] rd_row;
  logic [$clog2(COLS+1)-1:0] rd_col;
  logic [1:0]  rd_word;
  logic [5:0]  gate_cnt, start_mem_addr = '0;
  logic [4:0]  start_mem_data;
  int checks = 0, failures = 0;
  int n_mode [6];
  int n_nostart = 0, n_tagged = 0;

  always #(HALF_PS) ref_clk = ~ref_clk;
  always #5000 rd_clk = ~rd_clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic drive_pulse(int r, int c, pulse_t p);
    fork
      begin
        #(p.t - $time) spad_event[r][c][p.spad] = 1'b1;
        #(p.w) spad_event[r][c][p.spad] = 1'b0;
      end
    join_none
  endtask

  MpModel m [ROWS][COLS];
  logic [3:0] modes [6] = '{4'b0000, 4'b0100, 4'b0001, 4'b0010, 4'b1000, 4'b1001};

  initial begin
    pulse_t       q [$];
    pulse_t       p;
    logic [22:0]  ew [ROWS][COLS][$];
    longint       t_start, t_end;
    int           ng, win, np, k, nw, cyc;
    bit           has_start;
    int           spads [4];
    int           exp_start [64];
    foreach (m[r, c]) m[r][c] = new();
    #1 rd_rst = 1'b1;
    #10 rd_rst = 1'b0;
    for (int f = 0; f < NFRAMES; f++) begin
      cfg = pix_cfg_t'(modes[f % 6]);
      n_mode[f % 6]++;
      foreach (m[r, c]) m[r][c].new_frame(cfg.double_mode);
      @(posedge ref_clk) #100 frame_rst = 1'b1; gate = 1'b0;
      @(posedge ref_clk) #100 frame_rst = 1'b0;
      ng = cfg.double_mode ? 8 : (f % 3 == 0) ? 6 : 3;
      for (int g = 0; g < ng; g++) begin
        @(posedge ref_clk) #100 gate = 1'b1;
        has_start = !(g == 1 && f % 2 == 1);
        if (!has_start) n_nostart++;
        t_start = mid_bin($time / CLK_PS + 3, int'($urandom_range(31)));
        exp_start[g] = has_start ? exp_bin(t_start) : 0;
        if (has_start) fork begin
          #(t_start - $time) start = 1'b1;
          #500 start = 1'b0;
        end join_none
        win = (f == 2 && g == 0) ? 140 : (g % 3 == 2) ? 6 : 1;
        t_end = t_start;
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            np = int'($urandom_range((r == 0 && c == 0) ? 1 : 0, 4));
            spads = '{0, 1, 2, 3};
            spads.shuffle();
            q.delete();
            for (int i = 0; i < np; i++) begin
              p.spad = spads[i];
              if (win == 140)  // beyond the 128-period coarse range
                p.t = mid_bin(t_start / CLK_PS + 130 + longint'($urandom_range(8)),
                              int'($urandom_range(31)));
              else
                p.t = mid_bin(t_start / CLK_PS + 1 + longint'($urandom_range(win - 1)),
                              int'($urandom_range(31)));
              p.w = 75 * longint'($urandom_range(5, 18));
              q.push_back(p);
              drive_pulse(r, c, p);
              if (p.t + p.w > t_end) t_end = p.t + p.w;
            end
            m[r][c].gate_window(g, has_start, t_start, q);
            if (g > 0 && np > 0) n_tagged++;
          end
        #(t_end - $time + 2 * CLK_PS);
        @(posedge ref_clk) #100 gate = 1'b0;
        repeat (2) @(posedge ref_clk);
        #100 check("gate counter", gate_cnt, g + 1);
      end
      // Out-of-gate pulses on SPAD B of every macropixel saturate its counter.
      if (f % 6 == 3) begin
        for (int i = 0; i < 33; i++) begin
          #300 for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) spad_event[r][c][1] = 1'b1;
          #300 for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) spad_event[r][c][1] = 1'b0;
        end
        foreach (m[r, c]) m[r][c].cnt[1] += 33;
      end
      // START conversion memory.
      for (int g = 0; g < ng; g++) begin
        start_mem_addr = 6'(g);
        #10 check($sformatf("start memory %0d", g), start_mem_data, exp_start[g]);
      end
      // Array readout.
      foreach (m[r, c]) m[r][c].words(4'(cfg), ew[r][c]);
      k = ew[0][0].size();
      @(negedge rd_clk) rd_start = 1'b1;
      @(negedge rd_clk) rd_start = 1'b0;
      nw = 0; cyc = 0;
      while (cyc < ROWS*COLS*4 + 10) begin
        if (rd_valid) begin
          int r, c, w;
          r = nw % ROWS;
          w = (nw / ROWS) % k;
          c = nw / (ROWS * k);
          check($sformatf("frame %0d word r%0d c%0d w%0d", f, r, c, w), rd_data, ew[r][c][w]);
          check("rd_row", rd_row, r);
          check("rd_col", rd_col, c);
          check("rd_word", rd_word, w);
          nw++;
        end
        if (rd_done) break;
        @(negedge rd_clk); cyc++;
      end
      check("readout words", nw, ROWS*COLS*k);
      check("readout cycles", cyc, ROWS*COLS*k + 1);
    end
    $display("mechanisms: single stops %0d, double stops %0d, lone photons rejected %0d, WHO!=A %0d, register-full drops %0d, bank-full drops %0d",
             n_single_stop, n_double_stop, n_no_coinc, n_who_nonzero, n_reg_full_drop, n_bank_full_drop);
    $display("mechanisms: counter saturations %0d, coarse saturations %0d, empty registers %0d, gates without START %0d, hits after gate 0 %0d",
             n_cnt_sat, n_coarse_sat, n_empty_reg, n_nostart, n_tagged);
    $display("readout modes: normal %0d fast %0d first %0d count %0d double %0d double-first %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_mode[5]);
    check("seen single stop", n_single_stop > 0, 1);
    check("seen double stop", n_double_stop > 0, 1);
    check("seen lone photon rejected", n_no_coinc > 0, 1);
    check("seen WHO != A", n_who_nonzero > 0, 1);
    check("seen register-full drop", n_reg_full_drop > 0, 1);
    check("seen bank-full drop", n_bank_full_drop > 0, 1);
    check("seen counter saturation", n_cnt_sat > 0, 1);
    check("seen coarse saturation", n_coarse_sat > 0, 1);
    check("seen empty register", n_empty_reg > 0, 1);
    check("seen gate without START", n_nostart > 0, 1);
    check("seen multi-gate tagging", n_tagged > 0, 1);
    foreach (n_mode[i]) check($sformatf("seen readout mode %0d", i), n_mode[i] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
