// malfg_model_pkg: reference model of the generator for the testbenches.
//
// Keeps the last Q words in a plain integer array (hist[0] newest) and steps
// the recurrence Q_i = (Q_{i-P} + Q_{i-Q} + a) mod 2^M with
// a = parity(Q_{i-1} & c), written with integer arithmetic and a bit-count
// loop so that it shares nothing with the RTL. Also records which mechanisms
// a step used (seed load, feedback bit set, adder wrap).
package malfg_model_pkg;

  class malfg_model;
    int unsigned m, p, q;
    int unsigned hist[$];
    bit          last_a;
    bit          last_wrap;

    function new(int unsigned m_, int unsigned p_, int unsigned q_);
      m = m_; p = p_; q = q_;
      clear();
    endfunction

    function void clear();
      hist.delete();
      for (int j = 0; j < q; j++) hist.push_back(0);
      last_a = 0;
      last_wrap = 0;
    endfunction

    // Feedback bit formed from the newest word and control code c.
    function bit fb(int unsigned c);
      int n = 0;
      for (int k = 0; k < m; k++) if (((hist[0] >> k) & 1) && ((c >> k) & 1)) n++;
      return bit'(n % 2);
    endfunction

    // One enabled clock.
    function void step(bit load, int unsigned seed, int unsigned c);
      longint unsigned full;
      int unsigned nw;
      last_a = fb(c);
      full = longint'(hist[p-1]) + longint'(hist[q-1]) + longint'(last_a);
      last_wrap = (full >= (64'd1 << m));
      nw = load ? seed : int'(full % (64'd1 << m));
      void'(hist.pop_back());
      hist.push_front(nw);
    endfunction

    function int unsigned newest();
      return hist[0];
    endfunction

    // Whole state folded to a string-free comparable form.
    function bit same_state(const ref int unsigned other[$]);
      for (int j = 0; j < q; j++) if (hist[j] != other[j]) return 0;
      return 1;
    endfunction
  endclass

endpackage
