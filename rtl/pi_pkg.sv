// Shared types and constants of the packet inspection system.
//
// A packet travels as a byte stream (one byte per beat, `last` on the final
// byte). The IPv4/transport header fields that the classifier looks at travel
// beside the bytes and are held constant for the whole packet. Every packet
// gets a sequence number (`id`) from the dispatcher, so that verdicts that
// come back out of order from the verifiers can be matched to their packet.
// Downstream of the classifiers the forwarder and the discarder handle packet
// descriptors (id, header, length, cause); the bytes themselves stay in the
// line card's packet memory, which is outside this design.
//
// Field widths follow IPv4/TCP/UDP. The id, length and class widths are this
// design's own choice.
package pi_pkg;

  localparam int ID_W     = 16;  // packet sequence number
  localparam int LEN_W    = 16;  // packet length in bytes
  localparam int CLS_W    = 3;   // verifier class index (8 classes)
  localparam int REF_W    = 16;  // rule index or matched pattern reference

  // Header fields used by the 5-tuple part of the classifier.
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } hdr_t;

  // One byte of a packet, with the packet's id and header alongside.
  typedef struct packed {
    logic [ID_W-1:0] id;
    hdr_t            hdr;
    logic [7:0]      data;
    logic            last;
  } beat_t;

  // Classifier verdict.
  typedef enum logic [1:0] {
    CAT_BENIGN    = 2'd0,
    CAT_SUSPECT   = 2'd1,
    CAT_MALICIOUS = 2'd2
  } cat_t;

  // A beat leaving a classifier: the packet byte plus the packet's verdict.
  typedef struct packed {
    beat_t            b;
    cat_t             cat;
    logic [CLS_W-1:0] cls;    // verifier class, meaningful for CAT_SUSPECT
    logic [REF_W-1:0] rule;   // index of the rule that matched
  } cbeat_t;

  // Why a packet was forwarded or discarded.
  typedef enum logic [1:0] {
    WHY_NO_RULE       = 2'd0,  // no header rule matched: benign
    WHY_CONTENT_CLEAN = 2'd1,  // suspected, verifier found no pattern
    WHY_HEADER_RULE   = 2'd2,  // a header-only rule matched: malicious
    WHY_CONTENT_MATCH = 2'd3   // suspected, verifier found a pattern
  } cause_t;

  // Packet descriptor handed to the forwarder and the discarder.
  typedef struct packed {
    logic [ID_W-1:0]  id;
    hdr_t             hdr;
    logic [LEN_W-1:0] len;
    cause_t           cause;
    logic [REF_W-1:0] ref_id; // rule index, or {verifier, FSM, pattern}
  } desc_t;

  // One classifier rule (5-tuple part of a Snort rule).
  typedef struct packed {
    logic             valid;
    logic [31:0]      src_ip;
    logic [5:0]       src_len;    // prefix length 0..32
    logic [31:0]      dst_ip;
    logic [5:0]       dst_len;
    logic [15:0]      sp_lo, sp_hi;   // source port range, inclusive
    logic [15:0]      dp_lo, dp_hi;   // destination port range, inclusive
    logic [7:0]       proto;
    logic             proto_any;      // protocol wildcard
    logic             has_content;    // rule also carries payload strings
    logic [CLS_W-1:0] cls;            // verifier class of its payload strings
  } rule_t;

  // Mask with the upper `len` bits set (IPv4 prefix mask).
  function automatic logic [31:0] prefix_mask(input logic [5:0] len);
    return ~(32'hFFFF_FFFF >> len);
  endfunction

endpackage
