// Wearable object-recognition SoC: feature-level and object-level processing.
// A frame sequencer splits time into periods of PERIOD frames. In the first
// frame of a period the system works at feature level: the external feature
// matcher compares all features with the database (fm_enable) and attention
// tracking finds the object windows by Hough voting of the matched points. In
// the other PERIOD-1 frames it works at object level: CMS measures the camera
// motion, attention tracking shifts the windows by it, and the visual
// vocabulary processor turns the descriptors inside the selected window into a
// visual-word histogram and compares it with the reference histograms.
// OVP synthesizes viewpoint candidates of a region for the external SIFT units.
// The two levels, the 30-frame period and the HCD -> VVP connection follow the
// document. SIFT detection/description, the all-feature matcher and DRAM are
// outside this RTL and connect through ports (descriptors in, matched points
// in, fm_enable out, ROI pixels in, synthesized pixels out).
// Timing: frame_start pulses once per frame; the sequencer updates mode_detect
// in the next cycle and forwards the frame start to the engines then.
// frame_end in an object-level frame requests the VVP comparison.
module soc_top
  import vvp_pkg::*;
#(
  parameter int unsigned PERIOD   = 30,
  parameter int unsigned NUM_FEAT = 128,
  parameter int unsigned MV_W     = 10,
  parameter int unsigned NPROC    = 8,
  parameter int unsigned NOBJ     = 4,
  parameter int unsigned OFF_W    = 12,
  parameter int unsigned NVIEW    = 5,
  parameter int unsigned ROI_W    = 32,
  parameter int unsigned ROI_H    = 32,
  parameter int unsigned NUM_REF  = 64,
  parameter int unsigned OBJ_W    = (NOBJ > 1) ? $clog2(NOBJ) : 1,
  parameter int unsigned RX_W     = $clog2(ROI_W),
  parameter int unsigned RY_W     = $clog2(ROI_H),
  parameter int unsigned ID_W     = $clog2(NUM_REF),
  parameter int unsigned L1_W     = BIN_W + $clog2(WORDS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     frame_start,
  input  logic                     frame_end,
  output logic                     mode_detect,
  output logic                     fm_enable,
  output logic [4:0]               frame_idx,
  // feature motion vectors (feature tracking)
  input  logic                     fmv_valid,
  input  logic signed [MV_W-1:0]   fmv_x [NUM_FEAT],
  input  logic signed [MV_W-1:0]   fmv_y [NUM_FEAT],
  input  logic [NUM_FEAT-1:0]      fmv_ok,
  output logic                     cm_valid,
  output logic signed [MV_W-1:0]   cm_x,
  output logic signed [MV_W-1:0]   cm_y,
  // matched feature points (feature matching processor)
  input  logic [NPROC-1:0]         mfp_valid,
  input  logic [OBJ_W-1:0]         mfp_obj   [NPROC],
  input  pos_t                     mfp_pos   [NPROC],
  input  logic signed [OFF_W-1:0]  mfp_dx    [NPROC],
  input  logic signed [OFF_W-1:0]  mfp_dy    [NPROC],
  input  logic [7:0]               mfp_scale [NPROC],
  input  logic                     vote_end,
  output logic [NOBJ-1:0]          win_valid,
  output window_t                  win        [NOBJ],
  output logic                     at_done,
  // OVP
  input  logic                     roi_we,
  input  logic [RX_W-1:0]          roi_wx,
  input  logic [RY_W-1:0]          roi_wy,
  input  elem_t                    roi_wdata,
  input  logic                     ovp_start,
  input  logic signed [7:0]        theta,
  output logic signed [7:0]        view_theta [NVIEW],
  output logic                     syn_valid,
  output logic [RX_W-1:0]          syn_x,
  output logic [RY_W-1:0]          syn_y,
  output elem_t                    syn_pix    [NVIEW],
  output logic                     ovp_done,
  // VVP
  input  logic [OBJ_W-1:0]         obj_sel,
  input  logic                     desc_valid,
  input  seg_t                     desc_seg,
  input  pos_t                     desc_pos,
  input  logic                     voc_we,
  input  logic [2:0]               voc_stage,
  input  logic [WORD_W-1:0]        voc_word,
  input  logic [SEG_W-1:0]         voc_seg,
  input  seg_t                     voc_data,
  input  logic                     ref_we,
  input  logic [ID_W-1:0]          ref_addr,
  input  hist_t                    ref_data,
  input  logic [ID_W:0]            n_ref,
  output logic                     word_valid,
  output logic [WORD_W-1:0]        word,
  output logic                     obj_valid,
  output logic [ID_W-1:0]          obj_id,
  output logic [L1_W-1:0]          obj_dist
);
  // ---------------- frame sequencer ----------------
  logic fs_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_idx <= 5'(PERIOD - 1);
      fs_d      <= 1'b0;
    end else begin
      fs_d <= frame_start;
      if (frame_start)
        frame_idx <= (frame_idx == 5'(PERIOD - 1)) ? '0 : frame_idx + 1'b1;
    end
  end
  assign mode_detect = (frame_idx == '0);
  assign fm_enable   = mode_detect;

  // ---------------- human-centered design ----------------
  pos_t win_center [NOBJ];
  logic ovp_busy;
  hcd #(.NUM_FEAT(NUM_FEAT), .MV_W(MV_W), .NPROC(NPROC), .NOBJ(NOBJ), .OFF_W(OFF_W),
        .NVIEW(NVIEW), .ROI_W(ROI_W), .ROI_H(ROI_H), .OBJ_W(OBJ_W), .RX_W(RX_W), .RY_W(RY_W)) u_hcd (
    .clk, .rst_n, .mode_detect, .frame_start(fs_d),
    .fmv_valid, .fmv_x, .fmv_y, .fmv_ok, .cm_valid, .cm_x, .cm_y,
    .mfp_valid, .mfp_obj, .mfp_pos, .mfp_dx, .mfp_dy, .mfp_scale, .vote_end,
    .win_valid, .win_center, .win, .at_done,
    .roi_we, .roi_wx, .roi_wy, .roi_wdata, .ovp_start, .theta,
    .ovp_busy, .view_theta, .syn_valid, .syn_x, .syn_y, .syn_pix, .ovp_done
  );

  // ---------------- visual vocabulary processor ----------------
  hist_t       hist;
  logic [15:0] n_votes;
  vvp #(.NUM_REF(NUM_REF), .ID_W(ID_W), .L1_W(L1_W)) u_vvp (
    .clk, .rst_n,
    .frame_start(fs_d && !mode_detect),
    .frame_end(frame_end && !mode_detect),
    .desc_valid, .desc_seg, .desc_pos,
    .roi(win[obj_sel]),
    .voc_we, .voc_stage, .voc_word, .voc_seg, .voc_data,
    .ref_we, .ref_addr, .ref_data, .n_ref,
    .word_valid, .word, .hist, .n_votes,
    .obj_valid, .obj_id, .obj_dist
  );
endmodule
