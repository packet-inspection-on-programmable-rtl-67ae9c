// Testbench support: a software Aho-Corasick compiler and a reference matcher.
//
// ac_model.build() turns a list of strings into the tables a mt_fsm is loaded
// with: a character class map (each byte that occurs in some string gets a
// class of its own, numbered from 1 in order of first appearance; all other
// bytes share class 0) and a transition table entry per {state, class} that
// holds the next state of the complete (failure-resolved) automaton and the
// lowest-numbered string ending in that state, if any. States are numbered
// in the order the trie is built, the root being 0.
//
// ref_match() is an independent check that does not use the automaton: it
// scans the packet for every string directly and reports whether any string
// occurs, and which string ends first (lowest number on a tie), which is what
// the FSM is expected to report.
package tb_ac_pkg;

  class ac_model;
    int nstates;
    int ncls;
    int cmap [256];
    int go   [int];      // trie edges, key state*256 + class
    int fail [int];
    int outp [int];      // lowest string ending here, -1 if none
    int delta[int];      // complete transition function, key state*256+class

    function void build(string pats[$]);
      int q[$];
      nstates = 1;
      ncls    = 1;
      go.delete(); fail.delete(); outp.delete(); delta.delete();
      foreach (cmap[i]) cmap[i] = 0;
      outp[0] = -1;
      foreach (pats[p]) begin
        int s;
        s = 0;
        for (int k = 0; k < pats[p].len(); k++) begin
          int ch, c;
          ch = int'(pats[p][k]);
          if (cmap[ch] == 0) begin cmap[ch] = ncls; ncls++; end
          c = cmap[ch];
          if (!go.exists(s*256 + c)) begin
            go[s*256 + c] = nstates;
            outp[nstates] = -1;
            nstates++;
          end
          s = go[s*256 + c];
        end
        if (outp[s] == -1 || outp[s] > p) outp[s] = p;
      end
      // breadth-first failure links and complete transitions
      fail[0] = 0;
      for (int c = 0; c < ncls; c++) begin
        if (go.exists(c)) begin
          delta[c] = go[c];
          fail[go[c]] = 0;
          q.push_back(go[c]);
        end else begin
          delta[c] = 0;
        end
      end
      while (q.size() != 0) begin
        int s;
        s = q.pop_front();
        if (outp[fail[s]] != -1 && (outp[s] == -1 || outp[fail[s]] < outp[s]))
          outp[s] = outp[fail[s]];
        for (int c = 0; c < ncls; c++) begin
          if (go.exists(s*256 + c)) begin
            int t;
            t = go[s*256 + c];
            fail[t] = delta[fail[s]*256 + c];
            delta[s*256 + c] = t;
            q.push_back(t);
          end else begin
            delta[s*256 + c] = delta[fail[s]*256 + c];
          end
        end
      end
    endfunction

    // Table entry {next, match, pattern} for a state and class.
    function void entry(int s, int c, output int nxt, output bit m, output int pat);
      nxt = (c < ncls) ? delta[s*256 + c] : 0;
      m   = (outp[nxt] != -1);
      pat = m ? outp[nxt] : 0;
    endfunction
  endclass

  // Direct search: does any string occur, and which ends first.
  function automatic void ref_match(string pats[$], byte unsigned pkt[$],
                                    output bit hit, output int first_pat);
    hit = 0;
    first_pat = 0;
    for (int e = 0; e < pkt.size() && !hit; e++) begin
      foreach (pats[p]) begin
        int L;
        bit ok;
        L = pats[p].len();
        ok = (e + 1 >= L);
        for (int k = 0; k < L && ok; k++)
          if (pkt[e - L + 1 + k] != byte'(pats[p][k])) ok = 0;
        if (ok && !hit) begin
          hit = 1;
          first_pat = p;
        end
      end
    end
  endfunction

endpackage
