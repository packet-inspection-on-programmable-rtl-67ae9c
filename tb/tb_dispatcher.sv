// Testbench for the dispatcher with four classifiers.
//
// Sends 400 packets of 1..8 bytes. Each classifier input is ready at random,
// and classifier 2 is held not ready for a long stretch. Checks that every
// packet arrives whole and in order at exactly one classifier, with
// consecutive sequence numbers and its header; that packets without a busy
// classifier in the way go round robin; that the stalled classifier is skipped
// while it is busy; and that the byte stream is not delayed (a byte offered to
// a ready classifier is taken in the same cycle).
module tb_dispatcher;
  import pi_pkg::*;
  localparam int M_CLS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 0, in_ready, in_last = 0;
  logic [7:0]       in_data = 0;
  hdr_t             in_hdr = '0;
  logic [M_CLS-1:0] out_valid, out_ready = '0;
  beat_t            out_beat;
  logic [1:0]       sel;

  dispatcher dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int cur_cls = -1, last_cls = -1, exp_id = 0, skips = 0, rr_ok = 0, stall = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 400; p++) begin
      int L;
      L = $urandom_range(1, 8);
      in_hdr = '{src_ip: 32'($urandom), dst_ip: 32'($urandom), src_port: 16'(p), dst_port: 16'd80, proto: 8'd6};
      for (int k = 0; k < L; k++) begin
        bit done;
        done = 0;
        in_valid = 1; in_data = 8'(p + k); in_last = (k == L-1);
        while (!done) begin
          int tgt;
          // classifier readiness for this cycle
          if (p >= 100 && p < 160) stall = 1; else stall = 0;
          out_ready = 4'($urandom_range(0, 15));
          if (stall) out_ready[2] = 1'b0;
          #1;
          tgt = -1;
          for (int c = 0; c < M_CLS; c++) if (out_valid[c]) begin
            check(tgt === -1, "one classifier at a time");
            tgt = c;
          end
          check(tgt === int'(sel), "valid on the selected classifier");
          check(in_ready === out_ready[sel], "no added latency");
          if (in_ready) begin
            check(out_beat.data === in_data && out_beat.last === in_last && out_beat.hdr === in_hdr,
                  "byte and header");
            check(int'(out_beat.id) === exp_id, "sequence number");
            if (k == 0) begin
              if (last_cls >= 0) begin
                if (tgt == (last_cls + 1) % M_CLS) rr_ok++;
                else skips++;
              end
              cur_cls = tgt;
            end else begin
              check(tgt === cur_cls, "packet stays on its classifier");
            end
            if (stall) check(!(k === 0 && tgt === 2), "busy classifier skipped");
            done = 1;
          end
          @(negedge clk);
        end
      end
      last_cls = cur_cls;
      exp_id++;
      in_valid = 0;
    end
    check(rr_ok > 100 && skips > 10, "round robin and skipping both seen");
    $display("in turn %0d, skipped %0d", rr_ok, skips);
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
