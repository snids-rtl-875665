// bitsplit_ac_pkg: test-side generator of bit-split Aho-Corasick state
// tables, plus a plain string-search reference model.
//
// bitsplit_ac::build() takes up to 16 strings (one rule module), builds the
// Aho-Corasick automaton over bytes (trie, failure links, full transition
// function delta and output sets), then splits it four ways: for tile k the
// states are sets of automaton states, starting from {root}, and the
// successor of a set for the 2-bit value v is the set of all delta(s, c)
// with s in the set and bits [2k+1:2k] of c equal to v. A set's PMV is the
// union of the outputs of its members. The tables come out in the row
// layout of snids_pkg::entry_t, ready for the load bus.
//
// partition() groups a sorted string list into rule modules of at most 16
// strings whose automaton stays within 256 states.
//
// ends_with() is the reference the testbenches compare against: it knows
// nothing of automata and just tests whether a byte history ends with a
// string.
package bitsplit_ac_pkg;
  import snids_pkg::*;

  localparam int MAXS = 256;

  class bitsplit_ac;
    string       strs[$];
    int          n_ac;
    int          go_to [MAXS][256];
    int          delta [MAXS][256];
    int          fail  [MAXS];
    pmv_t        out   [MAXS];
    entry_t      tbl   [TILES][MAXS];
    int          n_bs  [TILES];
    bit          ok;

    // number of automaton states the trie of these strings needs
    static function int count_states(string s[$]);
      string pre[$];
      int n;
      n = 1;
      for (int i = 0; i < s.size(); i++)
        for (int l = 1; l <= s[i].len(); l++) begin
          string p;
          bit found;
          p = s[i].substr(0, l - 1);
          found = 0;
          foreach (pre[j]) if (pre[j] == p) found = 1;
          if (!found) begin pre.push_back(p); n++; end
        end
      return n;
    endfunction

    function void build(string s[$]);
      int q[$];
      strs = s;
      ok = 1;
      for (int a = 0; a < MAXS; a++) begin
        out[a] = '0;
        fail[a] = 0;
        for (int c = 0; c < 256; c++) begin
          go_to[a][c] = -1;
          delta[a][c] = 0;
        end
      end
      n_ac = 1;
      // trie
      for (int i = 0; i < strs.size(); i++) begin
        int u;
        u = 0;
        for (int j = 0; j < strs[i].len(); j++) begin
          int c;
          c = int'(strs[i][j]);
          if (go_to[u][c] < 0) begin
            if (n_ac >= MAXS) begin ok = 0; return; end
            go_to[u][c] = n_ac;
            n_ac++;
          end
          u = go_to[u][c];
        end
        out[u][i] = 1'b1;
      end
      // failure links and full transition function, breadth first
      q.push_back(0);
      while (q.size() > 0) begin
        int u;
        u = q.pop_front();
        for (int c = 0; c < 256; c++) begin
          int v;
          v = go_to[u][c];
          if (v >= 0) begin
            fail[v] = (u == 0) ? 0 : delta[fail[u]][c];
            out[v] |= out[fail[v]];
            delta[u][c] = v;
            q.push_back(v);
          end else begin
            delta[u][c] = (u == 0) ? 0 : delta[fail[u]][c];
          end
        end
      end
      // four-way bit split
      for (int k = 0; k < TILES; k++) begin
        logic [MAXS-1:0] sets[$];
        int i;
        for (int a = 0; a < MAXS; a++) tbl[k][a] = '0;
        sets.push_back(MAXS'(1));
        i = 0;
        while (i < sets.size()) begin
          pmv_t pm;
          pm = '0;
          for (int s0 = 0; s0 < n_ac; s0++) if (sets[i][s0]) pm |= out[s0];
          tbl[k][i].pmv = pm;
          for (int v = 0; v < 4; v++) begin
            logic [MAXS-1:0] nx;
            int idx;
            nx = '0;
            for (int s0 = 0; s0 < n_ac; s0++)
              if (sets[i][s0])
                for (int c = 0; c < 256; c++)
                  if (((c >> (2 * k)) & 3) == v) nx[delta[s0][c]] = 1'b1;
            idx = -1;
            foreach (sets[j]) if (sets[j] == nx) idx = j;
            if (idx < 0) begin
              idx = sets.size();
              sets.push_back(nx);
            end
            if (idx >= int'(N_STATES)) begin ok = 0; return; end
            tbl[k][i].next[v] = state_t'(idx);
          end
          i++;
        end
        n_bs[k] = sets.size();
      end
    endfunction
  endclass

  // Group a lexicographically sorted list into rule modules: at most 16
  // strings and at most 256 automaton states each.
  function automatic void partition(input string s[$], output int first[$],
                                    output int count[$]);
    int n;
    n = 0;
    first.delete();
    count.delete();
    while (n < s.size()) begin
      string grp[$];
      int i;
      i = 0;
      grp.delete();
      while (n + i < s.size() && i < int'(PMV_W)) begin
        grp.push_back(s[n + i]);
        if (bitsplit_ac::count_states(grp) > int'(N_STATES)) begin
          void'(grp.pop_back());
          break;
        end
        i++;
      end
      first.push_back(n);
      count.push_back(i);
      n += i;
    end
  endfunction

  // Does the byte history h end with string s?
  function automatic bit ends_with(input byte h[$], input string s);
    if (s.len() == 0 || h.size() < s.len()) return 0;
    for (int j = 0; j < s.len(); j++)
      if (h[h.size() - s.len() + j] != s[j]) return 0;
    return 1;
  endfunction

  // Bubble sort, lexicographic.
  function automatic void sort_strings(ref string s[$]);
    for (int i = 0; i < s.size(); i++)
      for (int j = 0; j + 1 < s.size() - i; j++)
        if (s[j] > s[j + 1]) begin
          string t;
          t = s[j]; s[j] = s[j + 1]; s[j + 1] = t;
        end
  endfunction

endpackage
