// Testbench for mt_fsm at its default size (20 threads, 1024 states, 64
// character classes).
//
// The FSM is loaded with the automaton for "SHE", "HERS" and "HIS". First one
// thread reads "HES" then "HERS" and the state after every byte is compared
// with the states of the textbook example (H -> 4, E -> 5, S -> failure to 1;
// H,E,R,S -> 4,5,6,7 with a match). Then all threads are fed random packets
// over the alphabet S,H,E,R,I,X at the same time, with random idle slots. For
// every byte the feedback M cycles later must show the thread, the state of
// the software automaton, and the running match flag; at every packet end
// the match flag and first string must also agree with a direct search of
// the packet. The M-cycle ring latency is checked on every byte.
module tb_mt_fsm;
  import tb_ac_pkg::*;

  localparam int M       = 20;
  localparam int STATE_W = 10;
  localparam int CLASS_W = 6;
  localparam int PAT_W   = 6;
  localparam int TID_W   = $clog2(M);
  localparam int ENT_W   = STATE_W + 1 + PAT_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0]                 in_byte = 0;
  logic [TID_W-1:0]           in_tid = 0;
  logic                       cmap_we = 0, tbl_we = 0;
  logic [7:0]                 cmap_addr = 0;
  logic [CLASS_W-1:0]         cmap_data = 0;
  logic [STATE_W+CLASS_W-1:0] tbl_addr = 0;
  logic [ENT_W-1:0]           tbl_data = 0;
  logic                       out_valid, out_done, out_hit;
  logic [TID_W-1:0]           out_tid;
  logic [STATE_W-1:0]         out_state;
  logic [PAT_W-1:0]           out_pat;

  mt_fsm dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // expected feedback per slot
  typedef struct { bit valid; bit last; int state; bit hit; int pat; int tid; } exp_t;
  exp_t exp_q [M];

  ac_model ac;
  string   pats[$] = '{"SHE", "HERS", "HIS"};

  // model state per thread
  int  st [M];
  bit  sh [M];
  int  sp [M];
  byte unsigned cur [M][$];     // packet being fed
  int  pos [M];
  byte unsigned sent [M][$];    // bytes fed so far in this packet

  task automatic load_tables();
    for (int b = 0; b < 256; b++) begin
      @(negedge clk);
      cmap_we = 1; cmap_addr = 8'(b); cmap_data = CLASS_W'(ac.cmap[b]);
    end
    @(negedge clk); cmap_we = 0;
    for (int a = 0; a < 2**(STATE_W+CLASS_W); a++) begin
      int s, c, n, p;
      bit m;
      s = a >> CLASS_W;
      c = a & ((1 << CLASS_W) - 1);
      if (s < ac.nstates) ac.entry(s, c, n, m, p);
      else begin n = 0; m = 0; p = 0; end
      tbl_we = 1; tbl_addr = (STATE_W+CLASS_W)'(a);
      tbl_data = {STATE_W'(n), m, PAT_W'(p)};
      @(negedge clk);
    end
    tbl_we = 0;
  endtask

  // One cycle: check the feedback of the slot, then drive it.
  task automatic step(int cyc, bit drive, bit first, bit last, byte unsigned b);
    int t;
    t = cyc % M;
    check(out_tid === TID_W'(t) || !exp_q[t].valid, "slot alignment");
    check(out_valid === exp_q[t].valid, "valid after M cycles");
    if (exp_q[t].valid) begin
      check(int'(out_state) === exp_q[t].state, $sformatf("state thread %0d", t));
      check(out_hit === exp_q[t].hit, "running match flag");
      if (exp_q[t].hit) check(int'(out_pat) === exp_q[t].pat, "first string");
      check(out_done === exp_q[t].last, "done flag");
    end
    in_tid   = TID_W'(t);
    in_valid = drive;
    in_first = first;
    in_last  = last;
    in_byte  = b;
    exp_q[t].valid = drive;
    if (drive) begin
      int n, p;
      bit m;
      if (first) begin st[t] = 0; sh[t] = 0; sp[t] = 0; end
      ac.entry(st[t], ac.cmap[b], n, m, p);
      st[t] = n;
      if (m && !sh[t]) sp[t] = p;
      sh[t] = sh[t] | m;
      exp_q[t].state = st[t];
      exp_q[t].hit   = sh[t];
      exp_q[t].pat   = sp[t];
      exp_q[t].last  = last;
      exp_q[t].tid   = t;
    end
  endtask

  int cyc = 0;
  int pkts_done = 0, pkts_hit = 0, max_live = 0;
  byte unsigned alpha[6] = '{"S", "H", "E", "R", "I", "X"};

  initial begin
    ac = new();
    ac.build(pats);
    foreach (exp_q[i]) exp_q[i].valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_tables();

    // directed: thread 0 reads "HES", then "HERS"
    begin
      string s1 = "HES", s2 = "HERS";
      int want1[3] = '{4, 5, 1};
      int want2[4] = '{4, 5, 6, 7};
      while (cyc % M != 0) begin step(cyc, 0, 0, 0, 0); @(negedge clk); cyc++; end
      for (int k = 0; k < 3 + 4; k++) begin
        // one byte every M cycles on thread 0
        for (int j = 0; j < M; j++) begin
          if (j == 0) begin
            if (k < 3) step(cyc, 1, k == 0, k == 2, byte'(s1[k]));
            else       step(cyc, 1, k == 3, k == 6, byte'(s2[k-3]));
          end else step(cyc, 0, 0, 0, 0);
          @(negedge clk); cyc++;
          if (j == M-1) begin
            // the byte just came back round the ring
            if (k < 3) check(int'(out_state) === want1[k], $sformatf("HES state %0d", k));
            else       check(int'(out_state) === want2[k-3], $sformatf("HERS state %0d", k-3));
          end
        end
      end
      check(out_hit && out_pat === 1, "HERS matched as string 1");
    end

    // random: all threads at once
    foreach (pos[t]) begin pos[t] = 0; cur[t].delete(); end
    for (int n = 0; n < 12000; n++) begin
      int t, live;
      bit drive, first, last;
      byte unsigned b;
      t = cyc % M;
      if (cur[t].size() == 0) begin
        int L;
        L = 1 + $urandom_range(0, 24);
        for (int k = 0; k < L; k++) cur[t].push_back(alpha[$urandom_range(0, 5)]);
        pos[t] = 0;
        sent[t].delete();
      end
      drive = ($urandom_range(0, 9) != 0);
      first = (pos[t] == 0);
      last  = (pos[t] == cur[t].size() - 1);
      b     = cur[t][pos[t]];
      step(cyc, drive, first, last, b);
      live = 0;
      foreach (pos[i]) if (pos[i] != 0) live++;
      if (live > max_live) max_live = live;
      if (drive) begin
        sent[t].push_back(b);
        pos[t]++;
        if (last) begin
          bit h;
          int fp;
          ref_match(pats, sent[t], h, fp);
          check(h === sh[t], "packet verdict vs direct search");
          if (h) check(fp === sp[t], "first string vs direct search");
          pkts_done++;
          if (h) pkts_hit++;
          cur[t].delete();
        end
      end
      @(negedge clk); cyc++;
    end
    for (int n = 0; n < M; n++) begin step(cyc, 0, 0, 0, 0); @(negedge clk); cyc++; end
    check(pkts_done > 500 && pkts_hit > 50 && pkts_hit < pkts_done, "enough mixed traffic");
    check(max_live >= M - 2, "many packets in the FSM at once");
    $display("packets %0d, with a match %0d, most threads busy %0d", pkts_done, pkts_hit, max_live);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
