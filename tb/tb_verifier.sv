// Testbench for one verifier at its default size: four classifier inputs,
// two FSMs of 20 threads each.
//
// FSM 0 holds the strings "SHE", "HERS", "HIS"; FSM 1 holds "RISE", "EIRE",
// "SIS". Phase 1 sends a single packet alone and checks that it takes about
// M cycles per byte (each thread advances one byte per trip round the ring).
// Phase 2 sends 600 random packets over the letters of both sets from all four
// inputs at once. Every packet must produce exactly one verdict with its id,
// header and length; the cause must agree with a direct search of the packet
// for all six strings, and ref_id must name the lowest-numbered FSM that
// found a string and the string that ended first there. The test also counts
// verdicts that leave out of arrival order, records how many threads held
// packets at once, and checks that the verifier sustains close to one byte
// per cycle while it is kept busy.
module tb_verifier;
  import pi_pkg::*;
  import tb_ac_pkg::*;

  localparam int M_CLS = 4, M = 20, A = 2, VID = 5;
  localparam int STATE_W = 10, CLASS_W = 6, PAT_W = 6;
  localparam int ENT_W = STATE_W + 1 + PAT_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [M_CLS-1:0]           in_valid = '0, in_ready;
  beat_t                      in_beat [M_CLS];
  logic                       res_valid, res_ready = 1;
  desc_t                      res_desc;
  logic [0:0]                 cfg_fsm = 0;
  logic                       cmap_we = 0, tbl_we = 0;
  logic [7:0]                 cmap_addr = 0;
  logic [CLASS_W-1:0]         cmap_data = 0;
  logic [STATE_W+CLASS_W-1:0] tbl_addr = 0;
  logic [ENT_W-1:0]           tbl_data = 0;
  logic [M-1:0]               thr_busy;

  verifier #(.VID(VID)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  string  set0[$] = '{"SHE", "HERS", "HIS"};
  string  set1[$] = '{"RISE", "EIRE", "SIS"};
  ac_model ac [A];
  byte unsigned alpha[6] = '{"S", "H", "E", "R", "I", "X"};

  task automatic load(int f, ac_model m);
    cfg_fsm = 1'(f);
    for (int b = 0; b < 256; b++) begin
      cmap_we = 1; cmap_addr = 8'(b); cmap_data = CLASS_W'(m.cmap[b]);
      @(negedge clk);
    end
    cmap_we = 0;
    for (int a = 0; a < 2**(STATE_W+CLASS_W); a++) begin
      int s, c, n, p;
      bit h;
      s = a >> CLASS_W;
      c = a & ((1 << CLASS_W) - 1);
      if (s < m.nstates) m.entry(s, c, n, h, p); else begin n = 0; h = 0; p = 0; end
      tbl_we = 1; tbl_addr = (STATE_W+CLASS_W)'(a); tbl_data = {STATE_W'(n), h, PAT_W'(p)};
      @(negedge clk);
    end
    tbl_we = 0;
  endtask

  // expected verdict per packet id
  desc_t exp_res [int];
  byte unsigned pkts [int][$];
  int    src_pk  [M_CLS][$];        // packet ids per source, in order
  int    pos     [M_CLS];
  int    n_res = 0, n_ooo = 0, last_res_id = -1, max_busy = 0, n_hit = 0;
  int    first_acc = -1, cyc = 0;

  function automatic desc_t expect_of(int id, hdr_t h);
    desc_t d;
    bit hit [A];
    int fp  [A];
    ref_match(set0, pkts[id], hit[0], fp[0]);
    ref_match(set1, pkts[id], hit[1], fp[1]);
    d.id = 16'(id); d.hdr = h; d.len = 16'(pkts[id].size());
    d.cause = (hit[0] || hit[1]) ? WHY_CONTENT_MATCH : WHY_CONTENT_CLEAN;
    d.ref_id = '0;
    if (hit[0])      d.ref_id = {3'(VID), 4'd0, 6'(fp[0])};
    else if (hit[1]) d.ref_id = {3'(VID), 4'd1, 6'(fp[1])};
    return d;
  endfunction

  function automatic hdr_t hdr_of(int id);
    return '{src_ip: 32'(id * 7919), dst_ip: 32'hC0A8_0001, src_port: 16'(id), dst_port: 16'd80, proto: 8'd6};
  endfunction

  always @(posedge clk) cyc++;
  logic [M_CLS-1:0] took = '0;   // offers that the coming clock edge takes

  // sources: offer the current byte of their current packet, hold until taken
  always @(negedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < M_CLS; s++) begin
        if (took[s]) begin
          if (first_acc < 0) first_acc = cyc;
          pos[s]++;
          if (pos[s] == pkts[src_pk[s][0]].size()) begin
            void'(src_pk[s].pop_front());
            pos[s] = 0;
          end
        end
      end
      #1;
      for (int s = 0; s < M_CLS; s++) begin
        in_valid[s] = (src_pk[s].size() != 0);
        if (in_valid[s]) begin
          int id;
          id = src_pk[s][0];
          in_beat[s] = '{id: 16'(id), hdr: hdr_of(id), data: pkts[id][pos[s]],
                         last: (pos[s] == pkts[id].size() - 1)};
        end
      end
      #1;
      took = in_valid & in_ready;
      if (res_valid && res_ready) begin
        int id;
        id = int'(res_desc.id);
        check(exp_res.exists(id), "verdict for a packet that was sent");
        if (exp_res.exists(id)) begin
          check(res_desc === exp_res[id], $sformatf("verdict of packet %0d", id));
          exp_res.delete(id);
        end
        if (id < last_res_id) n_ooo++;
        last_res_id = id;
        if (res_desc.cause == WHY_CONTENT_MATCH) n_hit++;
        n_res++;
      end
      if ($countones(thr_busy) > max_busy) max_busy = $countones(thr_busy);
    end
  end

  task automatic add_packet(int id, int src, int L);
    pkts[id] = {};
    for (int k = 0; k < L; k++) pkts[id].push_back(alpha[$urandom_range(0, 5)]);
    exp_res[id] = expect_of(id, hdr_of(id));
    src_pk[src].push_back(id);
  endtask

  initial begin
    int t0, t1, bytes;
    for (int i = 0; i < A; i++) ac[i] = new();
    ac[0].build(set0);
    ac[1].build(set1);
    foreach (pos[s]) pos[s] = 0;
    for (int s = 0; s < M_CLS; s++) in_beat[s] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0, ac[0]);
    load(1, ac[1]);

    // phase 1: one packet of 30 bytes alone
    add_packet(0, 2, 30);
    wait (n_res == 1);
    t1 = cyc;
    check(t1 - first_acc >= 30 * M && t1 - first_acc <= 30 * M + M + 10,
          $sformatf("lone packet takes about M cycles per byte (%0d cycles)", t1 - first_acc));

    // phase 2: 600 packets from all sources
    bytes = 0;
    for (int id = 1; id <= 600; id++) begin
      int L;
      L = $urandom_range(4, 60);
      bytes += L;
      add_packet(id, $urandom_range(0, M_CLS-1), L);
    end
    t0 = cyc;
    wait (n_res == 601);
    t1 = cyc;
    repeat (5) @(negedge clk);
    check(exp_res.size() === 0, "every packet got a verdict");
    check(n_ooo > 50, "verdicts leave out of order");
    check(max_busy >= M - 1, "threads filled");
    check(n_hit > 50 && n_hit < 550, "both verdicts seen");
    check(real'(bytes) / real'(t1 - t0) > 0.8, "close to one byte per cycle");
    $display("bytes %0d in %0d cycles, %0d out of order, %0d threads busy at most, %0d matched",
             bytes, t1 - t0, n_ooo, max_busy, n_hit);
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
