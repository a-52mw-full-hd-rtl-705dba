// Human-centered design (HCD) pre-processing cluster.
// CMS estimates the global camera motion from the tracked features' motion
// vectors; attention tracking (AT) uses it to carry the object windows from
// frame to frame (and finds them by Hough voting in the first frame of a
// period); OVP synthesizes several viewpoints of the object region for SIFT
// feature extraction. The three engines and the CMS -> AT connection follow the
// document; the viewpoint estimate arrives on a port because the document does
// not say how it is derived.
// Interface and timing are those of cms, attention_tracking and ovp.
module hcd
  import vvp_pkg::*;
#(
  parameter int unsigned NUM_FEAT = 128,
  parameter int unsigned MV_W     = 10,
  parameter int unsigned NPROC    = 8,
  parameter int unsigned NOBJ     = 4,
  parameter int unsigned OFF_W    = 12,
  parameter int unsigned NVIEW    = 5,
  parameter int unsigned ROI_W    = 32,
  parameter int unsigned ROI_H    = 32,
  parameter int unsigned OBJ_W    = (NOBJ > 1) ? $clog2(NOBJ) : 1,
  parameter int unsigned RX_W     = $clog2(ROI_W),
  parameter int unsigned RY_W     = $clog2(ROI_H)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mode_detect,
  input  logic                     frame_start,
  // CMS
  input  logic                     fmv_valid,
  input  logic signed [MV_W-1:0]   fmv_x [NUM_FEAT],
  input  logic signed [MV_W-1:0]   fmv_y [NUM_FEAT],
  input  logic [NUM_FEAT-1:0]      fmv_ok,
  output logic                     cm_valid,
  output logic signed [MV_W-1:0]   cm_x,
  output logic signed [MV_W-1:0]   cm_y,
  // AT
  input  logic [NPROC-1:0]         mfp_valid,
  input  logic [OBJ_W-1:0]         mfp_obj   [NPROC],
  input  pos_t                     mfp_pos   [NPROC],
  input  logic signed [OFF_W-1:0]  mfp_dx    [NPROC],
  input  logic signed [OFF_W-1:0]  mfp_dy    [NPROC],
  input  logic [7:0]               mfp_scale [NPROC],
  input  logic                     vote_end,
  output logic [NOBJ-1:0]          win_valid,
  output pos_t                     win_center [NOBJ],
  output window_t                  win        [NOBJ],
  output logic                     at_done,
  // OVP
  input  logic                     roi_we,
  input  logic [RX_W-1:0]          roi_wx,
  input  logic [RY_W-1:0]          roi_wy,
  input  elem_t                    roi_wdata,
  input  logic                     ovp_start,
  input  logic signed [7:0]        theta,
  output logic                     ovp_busy,
  output logic signed [7:0]        view_theta [NVIEW],
  output logic                     syn_valid,
  output logic [RX_W-1:0]          syn_x,
  output logic [RY_W-1:0]          syn_y,
  output elem_t                    syn_pix    [NVIEW],
  output logic                     ovp_done
);
  cms #(.NUM_FEAT(NUM_FEAT), .MV_W(MV_W)) u_cms (
    .clk, .rst_n, .fmv_valid, .fmv_x, .fmv_y, .fmv_ok, .cm_valid, .cm_x, .cm_y
  );

  attention_tracking #(.NPROC(NPROC), .NOBJ(NOBJ), .MV_W(MV_W), .OFF_W(OFF_W), .OBJ_W(OBJ_W)) u_at (
    .clk, .rst_n, .mode_detect, .frame_start,
    .mfp_valid, .mfp_obj, .mfp_pos, .mfp_dx, .mfp_dy, .mfp_scale, .vote_end,
    .cm_valid, .cm_x, .cm_y,
    .win_valid, .win_center, .win, .done(at_done)
  );

  ovp #(.NVIEW(NVIEW), .ROI_W(ROI_W), .ROI_H(ROI_H), .RX_W(RX_W), .RY_W(RY_W)) u_ovp (
    .clk, .rst_n, .roi_we, .roi_wx, .roi_wy, .roi_wdata, .start(ovp_start), .theta,
    .busy(ovp_busy), .view_theta, .out_valid(syn_valid), .out_x(syn_x), .out_y(syn_y),
    .out_pix(syn_pix), .done(ovp_done)
  );
endmodule
