// Workload testbench: one mt_fsm at its default size, loaded in turn with
// string subsets of 20 and of 50 strings, the FSM sizes the partitioning is
// built around (50 being the preferred one).
//
// Strings are random, 4..16 characters over letters and digits (62 symbols),
// which stands in for text-like attack strings; the testbench reports the
// number of states and character classes each set needs and fails if they
// exceed the table (1024 states, 64 classes, 64 strings). Then 20 threads
// scan 400 packets of 20..200 bytes, a third of them with one of the strings
// planted at a random place, and every verdict and first-string report is
// compared with a direct search of the packet.
module tb_fsm_workload;
  import tb_ac_pkg::*;

  localparam int M = 20, STATE_W = 10, CLASS_W = 6, PAT_W = 6;
  localparam int TID_W = $clog2(M);
  localparam int ENT_W = STATE_W + 1 + PAT_W;

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

  // free-running slot counter: the scheduler must keep the slots turning
  int gcyc = 0;
  always @(posedge clk) gcyc++;
  always @(negedge clk) in_tid = TID_W'(gcyc % M);

  string symbols = "ABCDEFGHIJKLMNOPQRSTUVWXYZabcdefghijklmnopqrstuvwxyz0123456789";

  function automatic byte unsigned rsym();
    return byte'(symbols[$urandom_range(0, 61)]);
  endfunction

  task automatic load(ac_model ac);
    for (int b = 0; b < 256; b++) begin
      cmap_we = 1; cmap_addr = 8'(b); cmap_data = CLASS_W'(ac.cmap[b]);
      @(negedge clk);
    end
    cmap_we = 0;
    for (int s = 0; s < ac.nstates; s++)
      for (int c = 0; c < 2**CLASS_W; c++) begin
        int n, p;
        bit h;
        ac.entry(s, c, n, h, p);
        tbl_we = 1; tbl_addr = {STATE_W'(s), CLASS_W'(c)}; tbl_data = {STATE_W'(n), h, PAT_W'(p)};
        @(negedge clk);
      end
    tbl_we = 0;
  endtask

  task automatic run_size(int nstr);
    string        pats[$];
    ac_model      ac;
    byte unsigned pk [M][$];
    int           pos [M];
    int           left, hits;
    left = 400; hits = 0;
    for (int i = 0; i < nstr; i++) begin
      string s;
      int L;
      L = $urandom_range(4, 16);
      s = "";
      for (int k = 0; k < L; k++) s = {s, string'(rsym())};
      pats.push_back(s);
    end
    ac = new();
    ac.build(pats);
    $display("%0d strings: %0d states, %0d character classes", nstr, ac.nstates, ac.ncls);
    check(ac.nstates <= 2**STATE_W && ac.ncls <= 2**CLASS_W && nstr <= 2**PAT_W,
          $sformatf("%0d-string set fits the FSM tables", nstr));
    load(ac);
    foreach (pos[t]) begin pos[t] = 0; pk[t].delete(); end
    // 20 threads, one slot per cycle
    forever begin
      int t;
      #1;
      t = gcyc % M;
      // feedback of this slot
      if (out_done) begin
        bit h;
        int fp;
        ref_match(pats, pk[out_tid], h, fp);
        check(out_hit === h, "verdict");
        if (h) check(int'(out_pat) === fp, "first string");
        if (h) hits++;
        pk[out_tid].delete();
        pos[out_tid] = 0;
      end
      if (pk[t].size() == 0 && left > 0) begin
        int L;
        L = $urandom_range(20, 200);
        for (int k = 0; k < L; k++) pk[t].push_back(rsym());
        if ($urandom_range(0, 2) == 0) begin
          string s;
          int at;
          s  = pats[$urandom_range(0, nstr-1)];
          at = $urandom_range(0, L - s.len());
          for (int k = 0; k < s.len(); k++) pk[t][at + k] = byte'(s[k]);
        end
        left--;
      end
      in_valid = (pk[t].size() != 0 && pos[t] < pk[t].size());
      in_first = (pos[t] == 0);
      in_last  = in_valid && (pos[t] == pk[t].size() - 1);
      in_byte  = in_valid ? pk[t][pos[t]] : 8'h00;
      if (in_valid) pos[t]++;
      @(negedge clk);
      if (left == 0) begin
        bit busy;
        busy = 0;
        foreach (pk[i]) if (pk[i].size() != 0) busy = 1;
        if (!busy) break;
      end
    end
    in_valid = 0;
    repeat (M) @(negedge clk);
    check(hits > 100, $sformatf("%0d-string set: planted strings found", nstr));
    $display("%0d strings: %0d of 400 packets matched", nstr, hits);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_size(20);
    run_size(50);
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
