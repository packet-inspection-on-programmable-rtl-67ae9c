// Testbench for the forwarder with four classifier paths.
//
// Merges packets no header rule matched (from four classifier paths) and verdicts cleared by the verifiers. Each of the five sources offers 200 descriptors at random
// times and holds each until it is taken; the output is ready at random.
// Checks that every descriptor comes out unchanged, exactly once and in its
// source's order, that one accepted while the output is free appears one
// cycle later, that no source is starved, and that the two counters end at
// the number of descriptors of each kind.
module tb_forwarder;
  import pi_pkg::*;
  localparam int M_CLS = 4;
  localparam int N     = 200;
  localparam int S     = M_CLS + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [M_CLS-1:0] ben_valid = '0, ben_ready;
  desc_t            ben_desc [M_CLS];
  logic             ver_valid = 0, ver_ready;
  desc_t            ver_desc = '0;
  logic             out_valid, out_ready = 0;
  desc_t            out_desc;
  logic [31:0]      n_header_benign, n_verified_clean;

  forwarder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  desc_t  src_q [S][$];
  desc_t  exp_q [S][$];
  logic [S-1:0] valid_q = '0, took_q = '0;
  desc_t  offer [S];
  int     got = 0;
  desc_t  last_out;

  initial begin
    for (int s = 0; s < S; s++) begin
      for (int i = 0; i < N; i++) begin
        desc_t d;
        d = '{id: 16'(s*1000 + i), hdr: hdr_t'({$urandom, $urandom, $urandom, $urandom}),
              len: 16'($urandom_range(1, 1500)), cause: (s == M_CLS) ? WHY_CONTENT_CLEAN : WHY_NO_RULE,
              ref_id: 16'($urandom)};
        src_q[s].push_back(d);
        exp_q[s].push_back(d);
      end
      offer[s] = '0;
    end
    for (int c = 0; c < M_CLS; c++) ben_desc[c] = '0;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      out_ready = ($urandom_range(0, 3) != 0);
      for (int s = 0; s < S; s++) begin
        if (!valid_q[s] || took_q[s]) begin
          valid_q[s] = (src_q[s].size() != 0) && ($urandom_range(0, 1) == 1);
          if (valid_q[s]) offer[s] = src_q[s][0];
        end
      end
      ben_valid = valid_q[M_CLS-1:0];
      ver_valid = valid_q[M_CLS];
      for (int c = 0; c < M_CLS; c++) ben_desc[c] = offer[c];
      ver_desc = offer[M_CLS];
      #1;
      if (out_valid && out_ready) begin
        int s;
        s = int'(out_desc.id) / 1000;
        check(s < S && exp_q[s].size() !== 0 && out_desc === exp_q[s][0], "descriptor unchanged and in order");
        if (s < S && exp_q[s].size() != 0) void'(exp_q[s].pop_front());
        last_out = out_desc;
        got++;
      end
      took_q = valid_q & {ver_ready, ben_ready};
      check($countones(took_q) <= 1, "one descriptor per cycle");
      for (int s = 0; s < S; s++) if (took_q[s]) void'(src_q[s].pop_front());
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      logic take;
      take = |(valid_q & {ver_ready, ben_ready});
      #1;
      if (take) check(out_valid, "one-cycle latency");
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (got == S*N);
    repeat (3) @(negedge clk);
    for (int s = 0; s < S; s++) check(exp_q[s].size() === 0, "all descriptors delivered");
    check(n_header_benign === M_CLS*N, "classifier-path counter");
    check(n_verified_clean === N, "verifier-path counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
