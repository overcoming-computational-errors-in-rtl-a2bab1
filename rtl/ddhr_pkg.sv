// Shared types and constants of the data-driven hardware resilience (DDHR) sensing platform.
//
// The platform has two sensor-classification systems. Each has a fault-affected feature
// extractor and a fault-protected SVM classifier whose model the trainer reloads. This package
// holds the SVM kernel encoding, the local register map of the classifier's model memory and
// the top-level configuration map. Configuration writes come from the general-purpose
// microcontroller, which is outside this RTL. The kernel types (RBF for the seizure detector,
// polynomial for the arrhythmia detector) follow the document. The register maps and
// encodings are this design's own choices.
package ddhr_pkg;

  // SVM kernel selection
  typedef enum logic [1:0] {
    KERN_LINEAR = 2'd0,
    KERN_POLY2  = 2'd1,
    KERN_RBF    = 2'd2
  } kernel_e;

  // Width of the configuration write bus
  localparam int unsigned CFG_AW = 20;   // [19:16] target, [15:0] local address
  localparam int unsigned CFG_DW = 64;

  // Configuration targets (cfg_addr[19:16])
  localparam logic [3:0] TGT_EEG_DECIM = 4'h0;  // decimation-filter taps, local addr = tap
  localparam logic [3:0] TGT_EEG_BPF   = 4'h1;  // band-pass taps, local addr = band*64 + tap
  localparam logic [3:0] TGT_EEG_SVM   = 4'h2;  // seizure classifier model
  localparam logic [3:0] TGT_EEG_FAULT = 4'h3;  // seizure fault-control registers
  localparam logic [3:0] TGT_ECG_DWT   = 4'h4;  // wavelet taps: 0..4 high-pass, 8..12 low-pass
  localparam logic [3:0] TGT_ECG_SVM   = 4'h5;  // arrhythmia classifier model
  localparam logic [3:0] TGT_ECG_FAULT = 4'h6;  // arrhythmia fault-control registers
  localparam logic [3:0] TGT_AL        = 4'h7;  // active-learning controls

  // Classifier model memory map (local address). Support vector j, feature i lives at
  // j*D + i, below SVM_REG_BASE.
  localparam logic [15:0] SVM_ALPHA_BASE = 16'hF000;  // + j : y_j*alpha_j
  localparam logic [15:0] SVM_REG_BIAS   = 16'hF100;
  localparam logic [15:0] SVM_REG_THRESH = 16'hF101;
  localparam logic [15:0] SVM_REG_KERNEL = 16'hF102;
  localparam logic [15:0] SVM_REG_KSHIFT = 16'hF103;
  localparam logic [15:0] SVM_REG_GAMMA  = 16'hF104;
  localparam logic [15:0] SVM_REG_POLYC  = 16'hF105;
  localparam logic [15:0] SVM_REG_NSV    = 16'hF106;

  // Active-learning controls (local address under TGT_AL)
  localparam logic [15:0] AL_REG_EEG_EN     = 16'h0000;
  localparam logic [15:0] AL_REG_EEG_MARGIN = 16'h0001;
  localparam logic [15:0] AL_REG_ECG_EN     = 16'h0002;
  localparam logic [15:0] AL_REG_ECG_MARGIN = 16'h0003;

  // Fault-control registers (local address under TGT_*_FAULT): word w holds bits
  // [64w+63:64w]; even words are faultCtrl, odd words faultVal, i.e. addr = 2w + {0,1}.

endpackage
