// Steering stage behind a classifier's buffer.
//
// Reads the classified bytes out of the buffer and sends each packet down one
// of the three paths that leave a classifier: a suspected packet is streamed,
// byte by byte, to the verifier of its class (path i(S)); for a benign or a
// malicious packet only a descriptor (id, header, length, cause, rule) is sent
// to the forwarder (path i(B)) or the discarder (path i(M)) when its last byte
// has been read, and its bytes are not sent anywhere else. The three paths and
// their destinations follow the system figure; sending descriptors rather
// than the bytes to the forwarder and the discarder is this design's choice.
//
// Interface: valid/ready everywhere. A suspected packet's bytes pass straight
// through (combinational); a descriptor is presented in the cycle the last
// byte is read and the byte is consumed only when the descriptor is taken.
module cls_steer
  import pi_pkg::*;
#(
  parameter int P = 8          // number of verifiers
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  cbeat_t        in_beat,
  output logic          ben_valid,
  input  logic          ben_ready,
  output desc_t         ben_desc,
  output logic          mal_valid,
  input  logic          mal_ready,
  output desc_t         mal_desc,
  output logic [P-1:0]  sus_valid,
  input  logic [P-1:0]  sus_ready,
  output beat_t         sus_beat
);
  logic [LEN_W-1:0] len_q;
  desc_t            d;
  logic             is_sus, is_ben, is_mal;
  logic [CLS_W-1:0] cls;

  assign cls    = in_beat.cls;
  assign is_sus = (in_beat.cat == CAT_SUSPECT);
  assign is_ben = (in_beat.cat == CAT_BENIGN);
  assign is_mal = (in_beat.cat == CAT_MALICIOUS);

  always_comb begin
    d.id     = in_beat.b.id;
    d.hdr    = in_beat.b.hdr;
    d.len    = len_q + 1'b1;
    d.cause  = is_mal ? WHY_HEADER_RULE : WHY_NO_RULE;
    d.ref_id = in_beat.rule;
  end

  assign ben_desc  = d;
  assign mal_desc  = d;
  assign ben_valid = in_valid && is_ben && in_beat.b.last;
  assign mal_valid = in_valid && is_mal && in_beat.b.last;
  assign sus_beat  = in_beat.b;

  always_comb begin
    sus_valid = '0;
    if (int'(cls) < P) sus_valid[cls] = in_valid && is_sus;
  end

  always_comb begin
    if (is_sus)               in_ready = (int'(cls) < P) ? sus_ready[cls] : 1'b1;
    else if (!in_beat.b.last) in_ready = 1'b1;
    else if (is_mal)          in_ready = mal_ready;
    else                      in_ready = ben_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    len_q <= '0;
    else if (in_valid && in_ready) len_q <= in_beat.b.last ? '0 : len_q + 1'b1;
  end
endmodule
