// Testbench for the wrapper with eight verifiers.
//
// Each verifier offers a queue of 150 verdicts (random cause) at random
// times and holds each one until it is taken. The forwarder and discarder
// sides are ready at random. Checks that every clean verdict reaches the
// forwarder side and every matching one the discarder side, unchanged,
// exactly once, in the order each verifier issued them; that a verdict
// accepted with both outputs free appears one cycle later; and that no
// verifier is starved (all queues drain).
module tb_wrapper;
  import pi_pkg::*;
  localparam int P = 8;
  localparam int N = 150;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [P-1:0] in_valid = '0, in_ready;
  desc_t        in_desc [P];
  logic         fwd_valid, fwd_ready = 0, dsc_valid, dsc_ready = 0;
  desc_t        fwd_desc, dsc_desc;

  wrapper dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  desc_t src_q [P][$];
  desc_t exp_f [P][$];
  desc_t exp_d [P][$];
  int    got = 0;

  initial begin
    for (int v = 0; v < P; v++) begin
      in_desc[v] = '0;
      for (int i = 0; i < N; i++) begin
        desc_t d;
        d = '{id: 16'(v*1000 + i), hdr: hdr_t'({$urandom, $urandom, $urandom, $urandom}),
              len: 16'($urandom_range(1, 1500)),
              cause: ($urandom_range(0, 2) == 0) ? WHY_CONTENT_MATCH : WHY_CONTENT_CLEAN,
              ref_id: 16'($urandom)};
        src_q[v].push_back(d);
        if (d.cause == WHY_CONTENT_MATCH) exp_d[v].push_back(d); else exp_f[v].push_back(d);
      end
    end
  end

  logic [P-1:0] took_q = '0;

  always @(negedge clk) begin
    if (rst_n) begin
      // outputs: what transferred at the last edge was checked below; now
      // decide readiness and offers for the coming edge
      fwd_ready = ($urandom_range(0, 2) != 0);
      dsc_ready = ($urandom_range(0, 2) != 0);
      for (int v = 0; v < P; v++) begin
        if (!in_valid[v] || took_q[v]) begin
          in_valid[v] = (src_q[v].size() != 0) && ($urandom_range(0, 1) == 1);
          if (in_valid[v]) in_desc[v] = src_q[v][0];
        end
      end
      #1;
      if (fwd_valid && fwd_ready) begin
        int v;
        v = int'(fwd_desc.id) / 1000;
        check(v < P && exp_f[v].size() !== 0 && fwd_desc === exp_f[v][0], "clean verdict to forwarder, in order");
        if (v < P && exp_f[v].size() != 0) void'(exp_f[v].pop_front());
        got++;
      end
      if (dsc_valid && dsc_ready) begin
        int v;
        v = int'(dsc_desc.id) / 1000;
        check(v < P && exp_d[v].size() !== 0 && dsc_desc === exp_d[v][0], "matching verdict to discarder, in order");
        if (v < P && exp_d[v].size() != 0) void'(exp_d[v].pop_front());
        got++;
      end
      check($countones(in_ready) <= 1, "one verdict per cycle");
      took_q = in_valid & in_ready;
      for (int v = 0; v < P; v++) if (took_q[v]) void'(src_q[v].pop_front());
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // latency with free outputs: hold sinks ready and offer one verdict
    wait (got == P*N);
    repeat (5) @(negedge clk);
    for (int v = 0; v < P; v++)
      check(src_q[v].size() === 0 && exp_f[v].size() === 0 && exp_d[v].size() === 0, "all verdicts delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency: a verdict taken while its output is empty shows up next cycle
  always @(posedge clk) begin
    if (rst_n) begin
      logic take_f, take_d;
      take_f = 0; take_d = 0;
      for (int v = 0; v < P; v++) if (in_valid[v] && in_ready[v]) begin
        if (in_desc[v].cause == WHY_CONTENT_MATCH) take_d = 1; else take_f = 1;
      end
      #1;
      if (take_f) check(fwd_valid, "forward verdict after one cycle");
      if (take_d) check(dsc_valid, "discard verdict after one cycle");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
