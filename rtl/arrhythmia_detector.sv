// ECG arrhythmia detector: the fault-affected wavelet feature extractor and its
// fault-protected SVM.
//
// Each 256-sample ECG sequence passes through the seven-stage wavelet transform. Its 256
// coefficients (34 bits, signed) are the feature vector. The vector reaches the classifier
// through a bank of stuck-at fault multiplexers. The classifier (a polynomial kernel is loaded
// by the trainer) labels the sequence arrhythmic (cls = 1) or normal. The transform of the next
// sequence waits while the classifier is busy, so the vector stays stable while it is read.
//
// Interface: in_valid/in_ready with 16-bit samples. in_ready is high while a sequence is being
// collected. cfg_* loads the wavelet taps, the model and the fault-control registers (map in
// ddhr_pkg). fv is the vector the classifier sees. done/cls/dval/mdist are the result.
// Timing: a result appears 1 + 1525 + nsv*(D+1) + 2 cycles after the 256th sample, at the
// defaults with the classifier idle.
// The sequence length, transform, feature count and the SVM come from the document. The stall
// rule and placing the fault multiplexers on the transform outputs are this design's choices.
module arrhythmia_detector
  import ddhr_pkg::*;
#(
  parameter int unsigned N      = 256,
  parameter int unsigned STAGES = 7,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned FEAT_W = 34,
  parameter int unsigned NSV    = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_data,
  input  logic                   cfg_we,
  input  logic [CFG_AW-1:0]      cfg_addr,
  input  logic [CFG_DW-1:0]      cfg_wdata,
  output logic [FEAT_W-1:0]      fv [N],
  output logic                   done,
  output logic                   cls,
  output logic signed [63:0]     dval,
  output logic signed [63:0]     mdist,
  output logic                   svm_busy
);

  logic [FEAT_W-1:0]   feat [N];
  logic                feat_valid;
  logic [N*FEAT_W-1:0] raw_bits, flt_bits;

  wire [3:0]  tgt = cfg_addr[19:16];
  wire [15:0] la  = cfg_addr[15:0];

  dwt_engine #(
    .N(N), .STAGES(STAGES), .IN_W(IN_W), .W(FEAT_W)
  ) u_dwt (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .run_en(!svm_busy),
    .coef_we(cfg_we && tgt == TGT_ECG_DWT), .coef_addr(la[3:0]), .coef_wdata(cfg_wdata[15:0]),
    .feat, .feat_valid
  );

  for (genvar i = 0; i < N; i++) begin : g_bits
    assign raw_bits[i*FEAT_W +: FEAT_W] = feat[i];
    assign fv[i] = flt_bits[i*FEAT_W +: FEAT_W];
  end

  fault_injector #(.N(N * FEAT_W)) u_faults (
    .clk, .rst_n, .node_in(raw_bits), .node_out(flt_bits),
    .cfg_we(cfg_we && tgt == TGT_ECG_FAULT), .cfg_addr(la), .cfg_wdata
  );

  svm_classifier #(
    .D(N), .FW(FEAT_W), .FEAT_SIGNED(1'b1), .NSV(NSV), .DV_W(64)
  ) u_svm (
    .clk, .rst_n,
    .start(feat_valid), .fv, .busy(svm_busy), .done, .dval, .cls, .mdist,
    .cfg_we(cfg_we && tgt == TGT_ECG_SVM), .cfg_addr(la), .cfg_wdata
  );

endmodule
