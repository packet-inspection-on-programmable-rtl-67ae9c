// Header classifier.
//
// Sorts each packet into one of three categories from its header fields:
// malicious (a rule that has header strings only matches), suspected (a rule
// that also has payload strings matches, so a verifier must scan the payload)
// or benign (no rule matches). A rule tests five of the six dimensions the
// document lists: source and destination address by prefix, source and
// destination port by range (an exact port is a one-value range), and the
// protocol exactly or as a wildcard. The sixth, the approximate content match,
// the document runs as software on a network processor and is not part of
// this block.
//
// All rules are compared in parallel. Any matching header-only rule makes the
// packet malicious; otherwise the lowest-numbered matching content rule makes
// it suspected and names the verifier class that holds its payload strings.
// The verdict is taken on the first byte of a packet and kept for the rest of
// it. Rule storage is a register array written one rule at a time through
// rule_we/rule_idx/rule_data, so the rule set can be updated in place.
//
// Timing: one register stage. A byte accepted in cycle t is offered at the
// output in cycle t+1 with the packet's verdict; in_ready is low only while
// the output holds a byte the next stage has not taken.
// The default of 329 rules is the number of unique header rules the document
// counts in Snort 2.4; the priority of header-only rules and the single class
// per packet are this design's choices.
module classifier
  import pi_pkg::*;
#(
  parameter int NRULES = 329,
  localparam int RW    = $clog2(NRULES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  beat_t         in_beat,
  output logic          out_valid,
  input  logic          out_ready,
  output cbeat_t        out_beat,
  input  logic          rule_we,
  input  logic [RW-1:0] rule_idx,
  input  rule_t         rule_data
);
  rule_t rules_q [NRULES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NRULES; r++) rules_q[r].valid <= 1'b0;
    end else if (rule_we) begin
      rules_q[rule_idx] <= rule_data;
    end
  end

  // Rule comparison, all rules at once.
  logic [NRULES-1:0] hit;
  always_comb begin
    for (int r = 0; r < NRULES; r++) begin
      hit[r] = rules_q[r].valid
        && (((in_beat.hdr.src_ip ^ rules_q[r].src_ip) & prefix_mask(rules_q[r].src_len)) == '0)
        && (((in_beat.hdr.dst_ip ^ rules_q[r].dst_ip) & prefix_mask(rules_q[r].dst_len)) == '0)
        && (in_beat.hdr.src_port >= rules_q[r].sp_lo) && (in_beat.hdr.src_port <= rules_q[r].sp_hi)
        && (in_beat.hdr.dst_port >= rules_q[r].dp_lo) && (in_beat.hdr.dst_port <= rules_q[r].dp_hi)
        && (rules_q[r].proto_any || in_beat.hdr.proto == rules_q[r].proto);
    end
  end

  // Priority: header-only rules first, then content rules, lowest index wins.
  cat_t             cat_d;
  logic [CLS_W-1:0] cls_d;
  logic [REF_W-1:0] rule_d;
  always_comb begin
    logic found_m, found_s;
    found_m = 1'b0;
    found_s = 1'b0;
    cat_d   = CAT_BENIGN;
    cls_d   = '0;
    rule_d  = '0;
    for (int r = NRULES-1; r >= 0; r--) begin
      if (hit[r] && !rules_q[r].has_content) begin
        found_m = 1'b1;
        rule_d  = REF_W'(r);
      end
    end
    if (found_m) begin
      cat_d = CAT_MALICIOUS;
    end else begin
      for (int r = NRULES-1; r >= 0; r--) begin
        if (hit[r] && rules_q[r].has_content) begin
          found_s = 1'b1;
          rule_d  = REF_W'(r);
          cls_d   = rules_q[r].cls;
        end
      end
      if (found_s) cat_d = CAT_SUSPECT;
    end
  end

  // Output register; the verdict of the first byte is held for the packet.
  logic             first_q;
  cat_t             cat_q;
  logic [CLS_W-1:0] cls_q;
  logic [REF_W-1:0] rule_q;
  logic             take;

  assign in_ready = !out_valid || out_ready;
  assign take     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_beat  <= '0;
      first_q   <= 1'b1;
      cat_q     <= CAT_BENIGN;
      cls_q     <= '0;
      rule_q    <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid     <= 1'b1;
        out_beat.b    <= in_beat;
        out_beat.cat  <= first_q ? cat_d  : cat_q;
        out_beat.cls  <= first_q ? cls_d  : cls_q;
        out_beat.rule <= first_q ? rule_d : rule_q;
        if (first_q) begin
          cat_q  <= cat_d;
          cls_q  <= cls_d;
          rule_q <= rule_d;
        end
        first_q <= in_beat.last;
      end
    end
  end
endmodule
