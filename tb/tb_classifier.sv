// Testbench for the classifier with its default 329 rules.
//
// Rules are random but drawn from a small pool of addresses, prefixes, port
// ranges and protocols, so that packets often match several rules at once,
// some header-only and some with payload strings. A software model in this
// file computes each packet's verdict (any header-only rule -> malicious with
// the lowest such rule; else the lowest content rule -> suspected with its
// class; else benign). Packets of 1..6 bytes are sent with random output
// stalls; every output byte must carry the packet's data in order and the
// model's verdict. One rule is rewritten in the middle of a packet to check
// that the verdict is kept for the rest of that packet. The one-cycle latency
// is checked on an unstalled byte.
module tb_classifier;
  import pi_pkg::*;

  localparam int NRULES = 329;
  localparam int RW     = $clog2(NRULES);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid = 0, in_ready, out_valid, out_ready = 0;
  beat_t         in_beat = '0;
  cbeat_t        out_beat;
  logic          rule_we = 0;
  logic [RW-1:0] rule_idx = 0;
  rule_t         rule_data = '0;

  classifier dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  rule_t rules [NRULES];
  logic [31:0] ips[4]   = '{32'h0A000001, 32'h0A000102, 32'hC0A80005, 32'h08080808};
  logic [15:0] ports[4] = '{16'd80, 16'd443, 16'd53, 16'd8080};

  function automatic rule_t rand_rule();
    rule_t r;
    r.valid       = ($urandom_range(0, 9) != 0);
    r.src_ip      = ips[$urandom_range(0, 3)];
    r.src_len     = 6'($urandom_range(0, 3) * 8 + ($urandom_range(0, 1) ? 8 : 0));
    r.dst_ip      = ips[$urandom_range(0, 3)];
    r.dst_len     = 6'($urandom_range(0, 4) * 8);
    r.sp_lo       = 0;
    r.sp_hi       = $urandom_range(0, 1) ? 16'hFFFF : 16'd1023;
    r.dp_lo       = ports[$urandom_range(0, 3)];
    r.dp_hi       = r.dp_lo + 16'($urandom_range(0, 1) ? 0 : 500);
    r.proto       = $urandom_range(0, 1) ? 8'd6 : 8'd17;
    r.proto_any   = ($urandom_range(0, 2) == 0);
    r.has_content = ($urandom_range(0, 9) < 7);
    r.cls         = 3'($urandom_range(0, 7));
    return r;
  endfunction

  function automatic bit rmatch(rule_t r, hdr_t h);
    logic [31:0] ms, md;
    ms = (r.src_len >= 32) ? 32'hFFFF_FFFF : ~(32'hFFFF_FFFF >> r.src_len);
    md = (r.dst_len >= 32) ? 32'hFFFF_FFFF : ~(32'hFFFF_FFFF >> r.dst_len);
    return r.valid && ((h.src_ip & ms) == (r.src_ip & ms)) && ((h.dst_ip & md) == (r.dst_ip & md))
        && h.src_port >= r.sp_lo && h.src_port <= r.sp_hi
        && h.dst_port >= r.dp_lo && h.dst_port <= r.dp_hi
        && (r.proto_any || r.proto == h.proto);
  endfunction

  task automatic model(hdr_t h, output cat_t c, output int cls, output int ri);
    c = CAT_BENIGN; cls = 0; ri = 0;
    for (int r = 0; r < NRULES; r++)
      if (rmatch(rules[r], h) && !rules[r].has_content) begin c = CAT_MALICIOUS; ri = r; return; end
    for (int r = 0; r < NRULES; r++)
      if (rmatch(rules[r], h) && rules[r].has_content) begin c = CAT_SUSPECT; cls = rules[r].cls; ri = r; return; end
  endtask

  task automatic write_rule(int i, rule_t r);
    rules[i] = r;
    rule_we = 1; rule_idx = RW'(i); rule_data = r;
    @(negedge clk);
    rule_we = 0;
  endtask

  // expected output bytes
  typedef struct { beat_t b; cat_t c; int cls; int ri; } exp_t;
  exp_t expq[$];
  int   n_cat[3] = '{0, 0, 0};
  bit   done_sending = 0;

  // output checker with random stalls
  always @(negedge clk) begin
    if (rst_n) begin
      out_ready = ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        exp_t e;
        check(expq.size() !== 0, "unexpected output byte");
        if (expq.size() != 0) begin
          e = expq.pop_front();
          check(out_beat.b === e.b, "byte passes unchanged");
          if (out_beat.b != e.b && failures < 3) $display("got id %0d data %h last %b exp id %0d data %h last %b", out_beat.b.id, out_beat.b.data, out_beat.b.last, e.b.id, e.b.data, e.b.last);
          check(out_beat.cat === e.c, "category");
          if (e.c !== CAT_BENIGN) check(int'(out_beat.rule) === e.ri, "rule index");
          if (e.c === CAT_SUSPECT) check(int'(out_beat.cls) === e.cls, "class");
        end
      end
    end
  end

  initial begin
    hdr_t h;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NRULES; i++) write_rule(i, rand_rule());

    // latency: one byte, output always ready
    force out_ready = 1'b1;
    h = '{src_ip: ips[0], dst_ip: ips[1], src_port: 16'd5, dst_port: 16'd80, proto: 8'd6};
    begin
      exp_t e;
      cat_t c; int cls, ri;
      model(h, c, cls, ri);
      e.b = '{id: 16'd1, hdr: h, data: 8'hAB, last: 1'b1}; e.c = c; e.cls = cls; e.ri = ri;
      expq.push_back(e);
      in_valid = 1; in_beat = e.b;
      @(negedge clk);
      in_valid = 0;
      @(negedge clk);
      check(expq.size() === 0, "one-cycle latency");
    end
    release out_ready;

    for (int p = 0; p < 1500; p++) begin
      int L;
      cat_t c; int cls, ri;
      h.src_ip   = ips[$urandom_range(0, 3)] ^ ($urandom_range(0, 3) == 0 ? 32'h0000_0100 : 32'h0);
      h.dst_ip   = ips[$urandom_range(0, 3)];
      h.src_port = $urandom_range(0, 1) ? 16'($urandom_range(0, 1023)) : 16'($urandom_range(1024, 65535));
      h.dst_port = ports[$urandom_range(0, 3)] + 16'($urandom_range(0, 1) ? 0 : $urandom_range(0, 600));
      h.proto    = $urandom_range(0, 1) ? 8'd6 : 8'd17;
      model(h, c, cls, ri);
      n_cat[int'(c)]++;
      L = $urandom_range(1, 6);
      for (int k = 0; k < L; k++) begin
        exp_t e;
        e.b = '{id: 16'(p), hdr: h, data: 8'($urandom), last: (k == L-1)};
        e.c = c; e.cls = cls; e.ri = ri;
        in_valid = 1; in_beat = e.b;
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        expq.push_back(e);
        @(negedge clk);
        in_valid = 0;
        // mid-packet rule rewrite must not change this packet's verdict
        if (k == 0 && L > 1 && p % 50 == 7) write_rule(ri, rand_rule());
      end
    end
    repeat (20) @(negedge clk);
    check(expq.size() === 0, "all bytes delivered");
    check(n_cat[0] > 50 && n_cat[1] > 50 && n_cat[2] > 50, "all three categories seen");
    $display("benign %0d suspected %0d malicious %0d", n_cat[0], n_cat[1], n_cat[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
