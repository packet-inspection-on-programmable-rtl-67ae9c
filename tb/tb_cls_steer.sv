// Testbench for cls_steer with eight verifiers.
//
// Feeds 600 classified packets of 1..10 bytes (random category and class)
// while the forwarder, discarder and verifier sides are ready at random.
// Checks that every byte of a suspected packet reaches the verifier of its
// class, in order and nowhere else; that a benign or malicious packet
// produces exactly one descriptor on its own path with the right id, header,
// length, cause and rule; and that nothing else appears on any output.
module tb_cls_steer;
  import pi_pkg::*;
  localparam int P = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         in_valid = 0, in_ready;
  cbeat_t       in_beat = '0;
  logic         ben_valid, ben_ready = 0, mal_valid, mal_ready = 0;
  desc_t        ben_desc, mal_desc;
  logic [P-1:0] sus_valid, sus_ready = '0;
  beat_t        sus_beat;

  cls_steer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  beat_t exp_sus [P][$];
  desc_t exp_ben [$];
  desc_t exp_mal [$];
  int    n_sus = 0, n_ben = 0, n_mal = 0;

  // sinks: choose readiness, then check what transfers
  always @(negedge clk) begin
    if (rst_n) begin
      ben_ready = $urandom_range(0, 1);
      mal_ready = $urandom_range(0, 1);
      sus_ready = P'($urandom);
      #1;
      check($countones(sus_valid) <= 1, "one verifier at a time");
      for (int v = 0; v < P; v++) if (sus_valid[v] && sus_ready[v]) begin
        check(exp_sus[v].size() !== 0 && sus_beat === exp_sus[v][0], $sformatf("byte to verifier %0d", v));
        if (exp_sus[v].size() != 0) void'(exp_sus[v].pop_front());
      end
      if (ben_valid && ben_ready) begin
        check(exp_ben.size() !== 0 && ben_desc === exp_ben[0], "benign descriptor");
        if (exp_ben.size() != 0) void'(exp_ben.pop_front());
        n_ben++;
      end
      if (mal_valid && mal_ready) begin
        check(exp_mal.size() !== 0 && mal_desc === exp_mal[0], "malicious descriptor");
        if (exp_mal.size() != 0) void'(exp_mal.pop_front());
        n_mal++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 600; p++) begin
      int L, c, v, r;
      hdr_t h;
      L = $urandom_range(1, 10);
      c = $urandom_range(0, 2);
      v = $urandom_range(0, P-1);
      r = $urandom_range(0, 328);
      h = '{src_ip: 32'($urandom), dst_ip: 32'($urandom), src_port: 16'($urandom), dst_port: 16'(p), proto: 8'd17};
      if (c == 0) exp_ben.push_back('{id: 16'(p), hdr: h, len: 16'(L), cause: WHY_NO_RULE, ref_id: 16'(r)});
      if (c == 2) exp_mal.push_back('{id: 16'(p), hdr: h, len: 16'(L), cause: WHY_HEADER_RULE, ref_id: 16'(r)});
      if (c == 1) n_sus++;
      for (int k = 0; k < L; k++) begin
        in_beat.b   = '{id: 16'(p), hdr: h, data: 8'($urandom), last: (k == L-1)};
        in_beat.cat = cat_t'(c);
        in_beat.cls = 3'(v);
        in_beat.rule = 16'(r);
        if (c == 1) exp_sus[v].push_back(in_beat.b);
        in_valid = 1;
        #2;
        while (!in_ready) begin @(negedge clk); #2; end
        @(negedge clk);
        in_valid = 0;
      end
    end
    repeat (10) @(negedge clk);
    for (int v = 0; v < P; v++) check(exp_sus[v].size() === 0, "all suspected bytes delivered");
    check(exp_ben.size() === 0 && exp_mal.size() === 0, "all descriptors delivered");
    check(n_ben > 100 && n_mal > 100 && n_sus > 100, "all paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
