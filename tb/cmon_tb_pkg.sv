// cmon_tb_pkg: reference model of one cache monitor, for the testbenches.
//
// The model is told, cycle by cycle, which bus accesses the monitor should
// count and when the monitor's interrupt fires. It reproduces the monitor's
// two-cycle path (an access is applied two cycles after it was driven, and
// one that is still in flight when an interval ends belongs to the next
// interval), keeps saturating per-(thread, super set) counts, and when an
// interval closes computes the expected usage levels in closed form,
// min(LEVELS-1, floor(count*LEVELS / (2*cutoff))), and the expected 32-bit
// register words of the activity vector. It also counts the events a test
// must exercise: closed intervals, saturated counters, accesses in flight at
// an interval boundary and each usage level seen.
package cmon_tb_pkg;

  class cmon_model;
    int unsigned threads, n_ss, ss_lsb, lvl_w, levels, words;
    longint unsigned cnt_max;
    longint unsigned cnt[];
    bit p1_v, p2_v;
    int p1_i, p2_i;
    int unsigned exp_words[$];  // words of closed intervals, oldest first
    int closes, saturations, collisions;
    int level_seen[];

    function new(int unsigned threads_, int unsigned n_ss_, int unsigned line_bits,
                 int unsigned set_bits, int unsigned cnt_w, int unsigned levels_);
      threads = threads_;
      n_ss    = n_ss_;
      levels  = levels_;
      lvl_w   = $clog2(levels_);
      ss_lsb  = line_bits + set_bits - $clog2(n_ss_);
      cnt_max = (64'd1 << cnt_w) - 1;
      words   = (n_ss * lvl_w + 31) / 32;
      cnt     = new[threads * n_ss];
      level_seen = new[levels];
      foreach (cnt[i]) cnt[i] = 0;
      foreach (level_seen[i]) level_seen[i] = 0;
      p1_v = 0; p2_v = 0; p1_i = 0; p2_i = 0;
      closes = 0; saturations = 0; collisions = 0;
    endfunction

    function int unsigned ss_of(logic [31:0] addr);
      return (addr >> ss_lsb) & (n_ss - 1);
    endfunction

    // an access the monitor must count, driven in the current cycle
    function void access(logic [31:0] addr, int unsigned tid);
      p1_v = 1;
      p1_i = int'(tid * n_ss + ss_of(addr));
    endfunction

    function int unsigned level_of(longint unsigned c, longint unsigned k);
      longint unsigned q;
      if (k == 0) return levels - 1;
      q = (c * levels) / (2 * k);
      return (q > levels - 1) ? levels - 1 : int'(q);
    endfunction

    // once per cycle, before access(): irq as seen in this cycle and the
    // cutoff that was in force in the previous cycle
    function void observe(bit irq, longint unsigned cutoff_prev);
      if (irq) begin
        for (int t = 0; t < int'(threads); t++) begin
          logic [1023:0] bits;
          bits = '0;
          for (int s = 0; s < int'(n_ss); s++) begin
            int unsigned lv;
            lv = level_of(cnt[t * n_ss + s], cutoff_prev);
            level_seen[lv]++;
            for (int b = 0; b < int'(lvl_w); b++) bits[s * lvl_w + b] = lv[b];
          end
          for (int w = 0; w < int'(words); w++) exp_words.push_back(bits[32 * w +: 32]);
        end
        foreach (cnt[i]) cnt[i] = 0;
        closes++;
        if (p2_v) collisions++;
      end
      if (p2_v) begin
        if (cnt[p2_i] == cnt_max) saturations++;
        else cnt[p2_i]++;
      end
      p2_v = p1_v; p2_i = p1_i;
      p1_v = 0;
    endfunction
  endclass

endpackage
