// End-to-end testbench of the whole packet inspection system at its default
// size: 4 classifiers with 329 rule slots, 8 verifiers of 2 FSMs with 20
// threads each.
//
// Set-up: seven rules are written. Two are header-only (telnet to port 23,
// and anything from 192.168.66.0/24, placed in the last rule slot); five
// carry payload strings and send packets to verifier classes 0..4 by
// destination port, one of them by a destination prefix. Every class gets two
// FSMs, each loaded with four random strings of 3..5 letters over A..H, so
// that both clean and matching payloads occur. The FSM tables are written
// only for the states each automaton has; the others are never reached.
//
// Traffic: 700 packets of 1..64 letters with headers drawn so that all paths
// are used, sent back to back. For a long stretch the forwarder output is
// held not ready, which backs up the classifier buffers until the dispatcher
// has to skip busy classifiers; both outputs are otherwise ready at random.
//
// Checks: every packet leaves exactly once, at the right exit, with its id,
// header, length, cause and rule or string reference, all worked out here
// from the rules and a direct string search. The test also counts how often
// each mechanism happened (each kind of verdict, out-of-order verdicts,
// several threads of one FSM busy at once, two classifiers offering to the
// same verifier, the dispatcher skipping a classifier, output back-pressure)
// and counts a failure for any that never did. The counters of the forwarder
// and the discarder must agree with the packet counts.
module tb_pi_top;
  import pi_pkg::*;
  import tb_ac_pkg::*;

  localparam int M_CLS = 4, P = 8, M = 20, A = 2, NRULES = 329;
  localparam int STATE_W = 10, CLASS_W = 6, PAT_W = 6;
  localparam int RW = $clog2(NRULES);
  localparam int ENT_W = STATE_W + 1 + PAT_W;
  localparam int NPKT = 700;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                       in_valid = 0, in_ready, in_last = 0;
  logic [7:0]                 in_data = 0;
  hdr_t                       in_hdr = '0;
  logic                       rule_we = 0;
  logic [RW-1:0]              rule_idx = 0;
  rule_t                      rule_data = '0;
  logic [2:0]                 cfg_ver = 0;
  logic [0:0]                 cfg_fsm = 0;
  logic                       cmap_we = 0, tbl_we = 0;
  logic [7:0]                 cmap_addr = 0;
  logic [CLASS_W-1:0]         cmap_data = 0;
  logic [STATE_W+CLASS_W-1:0] tbl_addr = 0;
  logic [ENT_W-1:0]           tbl_data = 0;
  logic                       fwd_valid, fwd_ready = 0, dsc_valid, dsc_ready = 0;
  desc_t                      fwd_desc, dsc_desc;
  logic [31:0]                n_header_benign, n_verified_clean, n_header_rule, n_content_match;
  logic [REF_W-1:0]           last_drop_ref;
  logic [M-1:0]               thr_busy [P];

  pi_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- rules ----------------
  rule_t rules [int];

  function automatic rule_t mk_rule(logic [31:0] sip, int slen, logic [31:0] dip, int dlen,
                                    int dport, int proto, bit content, int cls);
    rule_t r;
    r.valid = 1; r.src_ip = sip; r.src_len = 6'(slen); r.dst_ip = dip; r.dst_len = 6'(dlen);
    r.sp_lo = 0; r.sp_hi = 16'hFFFF;
    r.dp_lo = (dport < 0) ? 16'd0 : 16'(dport);
    r.dp_hi = (dport < 0) ? 16'hFFFF : 16'(dport);
    r.proto = 8'(proto < 0 ? 0 : proto); r.proto_any = (proto < 0);
    r.has_content = content; r.cls = 3'(cls);
    return r;
  endfunction

  function automatic bit rmatch(rule_t r, hdr_t h);
    logic [31:0] ms, md;
    ms = (r.src_len >= 32) ? '1 : ~(32'hFFFF_FFFF >> r.src_len);
    md = (r.dst_len >= 32) ? '1 : ~(32'hFFFF_FFFF >> r.dst_len);
    return r.valid && ((h.src_ip & ms) == (r.src_ip & ms)) && ((h.dst_ip & md) == (r.dst_ip & md))
        && h.src_port >= r.sp_lo && h.src_port <= r.sp_hi
        && h.dst_port >= r.dp_lo && h.dst_port <= r.dp_hi
        && (r.proto_any || r.proto == h.proto);
  endfunction

  // ---------------- string sets ----------------
  string   sets [P][A][$];
  ac_model ac   [P][A];

  function automatic string rand_word(int L);
    string s;
    s = "";
    for (int k = 0; k < L; k++) s = {s, string'(byte'(8'h41 + $urandom_range(0, 7)))};
    return s;
  endfunction

  task automatic load_fsm(int v, int f);
    cfg_ver = 3'(v); cfg_fsm = 1'(f);
    for (int b = 0; b < 256; b++) begin
      cmap_we = 1; cmap_addr = 8'(b); cmap_data = CLASS_W'(ac[v][f].cmap[b]);
      @(negedge clk);
    end
    cmap_we = 0;
    for (int s = 0; s < ac[v][f].nstates; s++) begin
      for (int c = 0; c < 2**CLASS_W; c++) begin
        int n, p;
        bit h;
        ac[v][f].entry(s, c, n, h, p);
        tbl_we = 1; tbl_addr = {STATE_W'(s), CLASS_W'(c)}; tbl_data = {STATE_W'(n), h, PAT_W'(p)};
        @(negedge clk);
      end
    end
    tbl_we = 0;
  endtask

  // ---------------- packets and expected results ----------------
  hdr_t         hdrs [NPKT];
  byte unsigned pays [NPKT][$];
  desc_t        exp_d [NPKT];
  bit           exp_fwd [NPKT];
  bit           seen [NPKT];

  function automatic void expect_pkt(int id);
    int  mi, si;
    desc_t d;
    mi = -1; si = -1;
    for (int r = 0; r < NRULES; r++) if (rules.exists(r) && rmatch(rules[r], hdrs[id])) begin
      if (!rules[r].has_content && mi < 0) mi = r;
      if (rules[r].has_content && si < 0) si = r;
    end
    d.id = 16'(id); d.hdr = hdrs[id]; d.len = 16'(pays[id].size());
    if (mi >= 0) begin
      d.cause = WHY_HEADER_RULE; d.ref_id = 16'(mi); exp_fwd[id] = 0;
    end else if (si >= 0) begin
      int v;
      bit h [A];
      int fp [A];
      v = rules[si].cls;
      for (int f = 0; f < A; f++) ref_match(sets[v][f], pays[id], h[f], fp[f]);
      if (h[0] || h[1]) begin
        int f;
        f = h[0] ? 0 : 1;
        d.cause = WHY_CONTENT_MATCH; d.ref_id = {3'(v), 4'(f), 6'(fp[f])}; exp_fwd[id] = 0;
      end else begin
        d.cause = WHY_CONTENT_CLEAN; d.ref_id = '0; exp_fwd[id] = 1;
      end
    end else begin
      d.cause = WHY_NO_RULE; d.ref_id = '0; exp_fwd[id] = 1;
    end
    exp_d[id] = d;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_cause [4] = '{0, 0, 0, 0};
  int n_ooo = 0, last_sus_id = -1, max_thr = 0, n_contend = 0, n_skip = 0, n_wait = 0, n_bp = 0, n_out = 0;
  int cyc = 0;
  bit hold_fwd = 0;

  always @(posedge clk) cyc++;

  // exits
  always @(negedge clk) begin
    if (rst_n) begin
      fwd_ready = !hold_fwd && ($urandom_range(0, 4) != 0);
      dsc_ready = ($urandom_range(0, 4) != 0);
      #1;
      if ((fwd_valid && !fwd_ready) || (dsc_valid && !dsc_ready)) n_bp++;
      if (fwd_valid && fwd_ready) begin
        int id;
        id = int'(fwd_desc.id);
        check(id < NPKT && !seen[id] && exp_fwd[id] && fwd_desc === exp_d[id], $sformatf("forwarded packet %0d", id));
        if (id < NPKT) seen[id] = 1;
        n_cause[int'(fwd_desc.cause)]++;
        if (fwd_desc.cause == WHY_CONTENT_CLEAN) begin
          if (id < last_sus_id) n_ooo++;
          last_sus_id = id;
        end
        n_out++;
      end
      if (dsc_valid && dsc_ready) begin
        int id;
        id = int'(dsc_desc.id);
        check(id < NPKT && !seen[id] && !exp_fwd[id] && dsc_desc === exp_d[id], $sformatf("discarded packet %0d", id));
        if (id < NPKT) seen[id] = 1;
        n_cause[int'(dsc_desc.cause)]++;
        if (dsc_desc.cause == WHY_CONTENT_MATCH) begin
          if (id < last_sus_id) n_ooo++;
          last_sus_id = id;
        end
        n_out++;
      end
      for (int v = 0; v < P; v++) begin
        int nb, nc;
        nb = $countones(thr_busy[v]);
        if (nb > max_thr) max_thr = nb;
        nc = 0;
        for (int c = 0; c < M_CLS; c++) if (dut.sus_valid[c][v]) nc++;
        if (nc > 1) n_contend++;
      end
      if (!dut.u_disp.busy_q && !in_ready && in_valid) n_skip++;
      if (dut.u_disp.busy_q && !in_ready && in_valid) n_wait++;
    end
  end

  initial begin
    logic [31:0] hosts [4] = '{32'h0A00_0001, 32'h0A01_0203, 32'hC0A8_4207, 32'h5DB8_D822};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // rules
    rules[0]   = mk_rule('0, 0, '0, 0, 23, -1, 0, 0);                     // telnet
    rules[1]   = mk_rule('0, 0, '0, 0, 80, 6, 1, 0);                      // HTTP -> class 0
    rules[2]   = mk_rule('0, 0, 32'h0A00_0000, 8, 53, 17, 1, 1);          // DNS into 10/8 -> class 1
    rules[3]   = mk_rule('0, 0, '0, 0, 25, 6, 1, 2);                      // SMTP -> class 2
    rules[4]   = mk_rule('0, 0, '0, 0, 21, 6, 1, 3);                      // FTP -> class 3
    rules[5]   = mk_rule('0, 0, '0, 0, 445, -1, 1, 4);                    // SMB -> class 4
    rules[328] = mk_rule(32'hC0A8_4200, 24, '0, 0, -1, -1, 0, 0);         // bad source net
    foreach (rules[r]) begin
      rule_we = 1; rule_idx = RW'(r); rule_data = rules[r];
      @(negedge clk);
    end
    rule_we = 0;

    // string sets and tables
    for (int v = 0; v < P; v++)
      for (int f = 0; f < A; f++) begin
        for (int k = 0; k < 4; k++) sets[v][f].push_back(rand_word($urandom_range(3, 5)));
        ac[v][f] = new();
        ac[v][f].build(sets[v][f]);
        load_fsm(v, f);
      end

    // packets
    for (int id = 0; id < NPKT; id++) begin
      int kind, L;
      int dports [6] = '{23, 80, 53, 25, 21, 445};
      kind = $urandom_range(0, 9);
      hdrs[id].src_ip   = hosts[$urandom_range(0, 3)];
      hdrs[id].dst_ip   = hosts[$urandom_range(0, 3)];
      hdrs[id].src_port = 16'($urandom_range(1024, 65535));
      hdrs[id].proto    = $urandom_range(0, 3) == 0 ? 8'd17 : 8'd6;
      hdrs[id].dst_port = (kind < 7) ? 16'(dports[$urandom_range(0, 5)]) : 16'($urandom_range(1000, 2000));
      if (hdrs[id].dst_port == 53) hdrs[id].proto = 8'd17;
      L = $urandom_range(1, 64);
      pays[id] = {};
      for (int k = 0; k < L; k++) pays[id].push_back(8'h41 + 8'($urandom_range(0, 7)));
      seen[id] = 0;
      expect_pkt(id);
    end

    fork
      begin
        // hold the forwarder back while traffic starts
        hold_fwd = 1;
        repeat (25000) @(negedge clk);
        hold_fwd = 0;
      end
      begin
        for (int id = 0; id < NPKT; id++) begin
          for (int k = 0; k < pays[id].size(); k++) begin
            in_valid = 1; in_hdr = hdrs[id]; in_data = pays[id][k];
            in_last = (k == pays[id].size() - 1);
            #2;
            while (!in_ready) begin @(negedge clk); #2; end
            @(negedge clk);
          end
        end
        in_valid = 0;
      end
    join

    wait (n_out == NPKT);
    repeat (5) @(negedge clk);
    for (int id = 0; id < NPKT; id++) check(seen[id], "every packet left the system");
    check(n_header_benign === 32'(n_cause[0]) && n_verified_clean === 32'(n_cause[1]), "forwarder counters");
    check(n_header_rule === 32'(n_cause[2]) && n_content_match === 32'(n_cause[3]), "discarder counters");
    $display("benign %0d, cleared %0d, header rule %0d, string match %0d",
             n_cause[0], n_cause[1], n_cause[2], n_cause[3]);
    $display("out of order %0d, most threads busy in one FSM %0d, verifier contention %0d, dispatcher skips %0d, input held %0d, output stalls %0d",
             n_ooo, max_thr, n_contend, n_skip, n_wait, n_bp);
    check(n_cause[0] > 0, "mechanism: benign by header");
    check(n_cause[1] > 0, "mechanism: suspected, cleared by a verifier");
    check(n_cause[2] > 0, "mechanism: malicious by header");
    check(n_cause[3] > 0, "mechanism: suspected, string found");
    check(n_ooo > 0, "mechanism: out-of-order verdicts");
    check(max_thr > 1, "mechanism: several packets in one FSM at once");
    check(n_contend > 0, "mechanism: classifiers contending for a verifier");
    check(n_skip + n_wait > 0, "mechanism: dispatcher waits on or skips a busy classifier");
    check(n_bp > 0, "mechanism: output back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
