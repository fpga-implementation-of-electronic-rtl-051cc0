// tb_evm_model_pkg: cycle reference model of the EVM for the top-level tests.
//
// The class evm_model mirrors, at the level of one rising clock edge, what
// the machine must do with the vo_en and vo_sw it sampled: count a new
// one-hot code as a vote unless its count is full, light that option's LED
// for `hold` clocks, darken the LEDs and raise `invalid` for a bad code or a
// refused vote, and track Dout. With `single` set, a vote opens nothing
// more until vo_en drops: a further new code in the window is a repeated
// vote, refused and flagged like a bad code. The election setup (voter limit
// and number of contesting parties) refuses votes the same way. It is written from the behaviour, with
// population counts and plain integers, and shares no code with the design.
// It also counts how often each mechanism occurred, so that a test can show
// that it exercised all of them.
package tb_evm_model_pkg;

  localparam int N_OPT = 5;

  class evm_model;
    int hold;
    int maxv;
    bit single;
    bit voted;
    int limit;
    int parties;
    int cnt [N_OPT];
    int prev;
    int led;
    int left;
    bit invalid;
    // Mechanism counters.
    int n_vote, n_held, n_bad, n_full, n_timeout, n_led_clear, n_disabled, n_repeat,
        n_deny_party, n_deny_limit;

    function new(int hold_cycles, int max_count, bit single_vote = 1'b0);
      hold = hold_cycles;
      maxv = max_count;
      single = single_vote;
      reset();
      n_vote = 0; n_held = 0; n_bad = 0; n_full = 0;
      n_timeout = 0; n_led_clear = 0; n_disabled = 0; n_repeat = 0;
      n_deny_party = 0; n_deny_limit = 0;
    endfunction

    function void reset();
      foreach (cnt[i]) cnt[i] = 0;
      prev = 0; led = 0; left = 0; invalid = 0; voted = 0;
      limit = 2047; parties = 4;
    endfunction

    // One rising edge with the given inputs.
    function void step(bit en, int sw);
      bit one, newc, castv, bad, full, rej, rep, contest, done, den;
      int idx;
      one   = ($countones(sw) == 1);
      newc  = en && one && (sw != prev);
      castv = newc && !voted;
      rep   = newc && voted;
      bad   = en && (sw != 0) && !one;
      idx   = 0;
      for (int i = 0; i < N_OPT; i++) if (sw == (1 << i)) idx = i;
      contest = (idx == 4) || (idx < parties);
      done  = total() >= limit;
      den   = castv && !(contest && !done);
      full  = castv && !den && (cnt[idx] == maxv);
      rej   = full || den;
      if (castv && !contest) n_deny_party++;
      if (castv && contest && done) n_deny_limit++;
      if (en && one && sw == prev) n_held++;
      if (!en && sw != 0 && sw != prev) n_disabled++;
      if (castv && !rej) begin
        cnt[idx]++;
        led  = 1 << idx;
        left = hold;
        n_vote++;
      end else if (bad || rej || rep) begin
        if (led != 0) n_led_clear++;
        led  = 0;
        left = 0;
      end else if (left > 0) begin
        left--;
        if (left == 0) begin
          led = 0;
          n_timeout++;
        end
      end
      if (bad) n_bad++;
      if (full) n_full++;
      if (rep) n_repeat++;
      invalid = bad || rej || rep;
      if (!en)        voted = 0;
      else if (castv) voted = single;
      prev = sw;
    endfunction

    // Setup load (the design takes it only while voting is disabled).
    function void configure(int voters, int n_parties);
      limit   = voters;
      parties = n_parties;
    endfunction

    // n quiet edges: switches unchanged and holding a valid or empty code.
    function void advance(int n);
      invalid = 0;
      if (left > 0) begin
        if (n >= left) begin
          left = 0;
          led  = 0;
          n_timeout++;
        end else begin
          left -= n;
        end
      end
    endfunction

    function int total();
      int s;
      s = 0;
      foreach (cnt[i]) s += cnt[i];
      return s;
    endfunction

    // Index of the party (0..3) with the most votes, -1 if none or a tie.
    function int winner();
      int best, bi, nb;
      best = -1; bi = 0; nb = 0;
      for (int i = 0; i < 4; i++) if (cnt[i] > best) begin best = cnt[i]; bi = i; end
      for (int i = 0; i < 4; i++) if (cnt[i] == best) nb++;
      return (best > 0 && nb == 1) ? bi : -1;
    endfunction

    function bit is_tie();
      int best, nb;
      best = -1; nb = 0;
      for (int i = 0; i < 4; i++) if (cnt[i] > best) best = cnt[i];
      for (int i = 0; i < 4; i++) if (cnt[i] == best) nb++;
      return best > 0 && nb > 1;
    endfunction
  endclass

endpackage
