// tb_mp_model_pkg: reference model of one macropixel for the macropixel and
// imager testbenches, written from the intended behaviour, not from the RTL.
//
// Per gate window the testbench tells the model the START instant and the
// event pulses (SPAD, rise time, width) it drives; all pulses lie inside the
// gate, after START. The model derives the STOP instant (first pulse, or the
// first instant two pulses overlap in double-photon mode), the TDC word
// {gate, coarse, fine} from the timing model of tb_util_pkg, the register
// updates, the counters and finally the words expected on the row bus.
`timescale 1ps/1ps
package tb_mp_model_pkg;
  import tb_util_pkg::*;

  typedef struct {
    int     spad;
    longint t;
    longint w;
  } pulse_t;

  // Mechanism counters shared by all models of a run.
  int unsigned n_single_stop, n_double_stop, n_no_coinc, n_who_nonzero,
               n_reg_full_drop, n_bank_full_drop, n_cnt_sat, n_coarse_sat,
               n_empty_reg, n_no_stop;

  class MpModel;
    bit          double_mode;
    logic [17:0] bank [4];
    bit          filled [4];
    int          nxt;
    bit          first_valid;
    int          first_who;
    int          cnt [4];

    function void new_frame(bit dbl);
      double_mode = dbl;
      foreach (bank[i]) begin bank[i] = '1; filled[i] = 0; cnt[i] = 0; end
      nxt = 0; first_valid = 0; first_who = 0;
    endfunction

    // Number of pulses high at instant t (rise inclusive, fall exclusive).
    static function int level(pulse_t p [$], longint t);
      int n = 0;
      foreach (p[i]) if (p[i].t <= t && t < p[i].t + p[i].w) n++;
      return n;
    endfunction

    function void gate_window(int g, bit has_start, longint t_start, pulse_t p [$]);
      longint t_stop = -1;
      int     who = 0, ncoinc = 0;
      bit     prev;
      longint ts [$];
      // counters B..D (and A in single mode) count every pulse
      foreach (p[i]) if (!(double_mode && p[i].spad == 0)) cnt[p[i].spad]++;
      if (!double_mode) begin
        // earliest pulse; equal times resolve to the lowest SPAD index
        foreach (p[i])
          if (t_stop < 0 || p[i].t < t_stop || (p[i].t == t_stop && p[i].spad < who)) begin
            t_stop = p[i].t; who = p[i].spad;
          end
      end else begin
        // sweep all pulse boundaries for rising edges of "two or more high"
        foreach (p[i]) begin ts.push_back(p[i].t); ts.push_back(p[i].t + p[i].w); end
        ts.sort();
        prev = 0;
        foreach (ts[i]) begin
          bit now = (level(p, ts[i]) >= 2);
          if (now && !prev) begin
            ncoinc++;
            if (t_stop < 0) t_stop = ts[i];
          end
          prev = now;
        end
        cnt[0] += ncoinc;
        if (ncoinc == 0 && p.size() > 0) n_no_coinc++;
      end
      if (t_stop < 0) begin n_no_stop++; return; end
      if (double_mode) n_double_stop++; else n_single_stop++;
      if (!double_mode && who != 0) n_who_nonzero++;
      begin
        int c, f, sel;
        logic [17:0] word;
        c = has_start ? exp_coarse(t_start, t_stop) : 0;
        if (c == 127) n_coarse_sat++;
        f = exp_bin(t_stop);
        word = {6'(g), 7'(c), 5'(f)};
        if (double_mode) begin
          if (nxt >= 4) begin n_bank_full_drop++; return; end
          sel = nxt; nxt++;
        end else begin
          if (filled[who]) begin n_reg_full_drop++; return; end
          sel = who;
        end
        bank[sel] = word; filled[sel] = 1;
        if (!first_valid) begin first_valid = 1; first_who = sel; end
      end
    endfunction

    // Expected bus words for cfg = {double, fast, count, first_only}.
    function void words(logic [3:0] cfg, output logic [22:0] w [$]);
      int          c [4];
      logic [19:0] cn;
      logic [17:0] fts;
      bit fast = cfg[2], count = cfg[1], first_only = cfg[0];
      foreach (c[i]) begin
        c[i] = (cnt[i] > 31) ? 31 : cnt[i];
        if (cnt[i] > 31) n_cnt_sat++;
      end
      foreach (filled[i]) if (!filled[i]) n_empty_reg++;
      cn  = {5'(c[3]), 5'(c[2]), 5'(c[1]), 5'(c[0])};
      fts = double_mode ? bank[0] : bank[first_who];
      w.delete();
      if (count) w.push_back({3'b000, cn});
      else if (first_only)
        w.push_back(double_mode ? {fts, 5'(c[0])} : {fts, 2'(first_who), 3'b000});
      else if (fast && !double_mode) begin
        w.push_back({fts, 2'(first_who), 3'b000});
        w.push_back({3'b000, cn});
      end else
        for (int i = 0; i < 4; i++) w.push_back({bank[i], 5'(c[i])});
    endfunction
  endclass
endpackage
