// hist_normalizer: two-stage L2-Hys normalisation of block histograms.
//
// Stage 1 normalises the 36-element block histogram by its L2 norm into
// Q0.12 and clips every element at 0.2; stage 2 normalises the clipped
// vector again and delivers the HOG feature in Q0.8 (saturated at 255/256).
// The two-stage L2-Hys structure and the Newton-based coefficient units follow
// the source description; the clip level 0.2 is the usual L2-Hys value and,
// like the formats, is this design's choice.
//
// Timing: each stage takes 78 cycles per block and the two stages overlap,
// so a new block can be accepted about every 80 cycles; latency about 160.
module hist_normalizer
  import hog_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  blk_hist_t  in_pkt,
  output logic       in_ready,
  output logic       out_valid,
  output feat_pkt_t  out_pkt,
  input  logic       out_ready
);
  localparam int unsigned CLIP1 = (2 * (1 << V1_W) + 5) / 10;   // 0.2 in Q0.12 = 819

  logic                          s1_valid, s1_ready;
  logic [BLK_DIM-1:0][V1_W-1:0]  s1_vec;
  logic [2*CRD_W-1:0]            s1_tag, s2_tag;

  l2_norm_stage #(.N(BLK_DIM), .IN_W(HIST_W), .OUT_W(V1_W), .OUT_FRAC(V1_W),
                  .CLIP(CLIP1), .S_W(40), .TAG_W(2 * CRD_W)) u_stage1 (
    .clk, .rst_n,
    .in_valid, .in_vec(in_pkt.h), .in_tag({in_pkt.bx, in_pkt.by}), .in_ready,
    .out_valid(s1_valid), .out_vec(s1_vec), .out_tag(s1_tag), .out_ready(s1_ready)
  );

  l2_norm_stage #(.N(BLK_DIM), .IN_W(V1_W), .OUT_W(FEAT_W), .OUT_FRAC(FEAT_W),
                  .CLIP(0), .S_W(32), .TAG_W(2 * CRD_W)) u_stage2 (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_vec(s1_vec), .in_tag(s1_tag), .in_ready(s1_ready),
    .out_valid, .out_vec(out_pkt.f), .out_tag(s2_tag), .out_ready
  );

  assign out_pkt.bx = s2_tag[2*CRD_W-1:CRD_W];
  assign out_pkt.by = s2_tag[CRD_W-1:0];
endmodule
