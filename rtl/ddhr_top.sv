// Data-driven hardware resilience (DDHR) sensing platform: two sensor classifiers whose
// fault-affected feature extractors are paired with fault-protected SVM kernels that learn
// the errors.
//
// The seizure detector (2 EEG channels, 42 features, RBF kernel) and the arrhythmia detector
// (256-sample ECG wavelet transform, 256 features, polynomial kernel) stand side by side. Each
// classifier starts with a model trained on error-free data. Every result is also offered to
// an active-learning buffer. That buffer keeps the vectors that fall within a programmable
// marginal distance of the decision boundary, together with the label that the error-free
// auxiliary labeling system gives for the same input. A general-purpose microcontroller runs
// the labeling system and the trainer. It sits outside this RTL and is reached through ports:
// the configuration bus (filter taps, models, fault-control registers, active-learning
// controls), the label inputs and the buffer read ports. After each training iteration it
// loads the new error-aware model and clears the buffer.
//
// Configuration address: cfg_addr[19:16] selects the target, cfg_addr[15:0] is the address
// inside it (see ddhr_pkg). Active-learning enables and margins are registers of this module.
// The architecture (fault-affected extractors, fault-protected classifiers and trainer,
// active-learning buffers of 2 kB) follows the document. The port-level split of the
// microcontroller's work and the register map are this design's choices.
module ddhr_top
  import ddhr_pkg::*;
#(
  parameter int unsigned EEG_NCH      = 2,
  parameter int unsigned EEG_DEC_TAPS = 143,
  parameter int unsigned EEG_BPF_TAPS = 47,
  parameter int unsigned EPOCH_LEN    = 150,
  parameter int unsigned EEG_NSV      = 16,
  parameter int unsigned ECG_N        = 256,
  parameter int unsigned ECG_STAGES   = 7,
  parameter int unsigned ECG_NSV      = 16,
  parameter int unsigned AL_BYTES     = 2048,
  localparam int unsigned EEG_FW      = 26,
  localparam int unsigned EEG_D       = EEG_NCH * 21,
  localparam int unsigned ECG_FW      = 34,
  localparam int unsigned EEG_DEPTH_R = (AL_BYTES * 8) / (EEG_D * EEG_FW + 1),
  localparam int unsigned EEG_DEPTH   = (EEG_DEPTH_R < 1) ? 1 : EEG_DEPTH_R,
  localparam int unsigned ECG_DEPTH_R = (AL_BYTES * 8) / (ECG_N * ECG_FW + 1),
  localparam int unsigned ECG_DEPTH   = (ECG_DEPTH_R < 1) ? 1 : ECG_DEPTH_R,
  localparam int unsigned EEG_EW      = (EEG_DEPTH < 2) ? 1 : $clog2(EEG_DEPTH),
  localparam int unsigned ECG_EW      = (ECG_DEPTH < 2) ? 1 : $clog2(ECG_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // EEG input, one sample per channel
  input  logic                      eeg_in_valid,
  output logic                      eeg_in_ready,
  input  logic signed [11:0]        eeg_in_data [EEG_NCH],
  // ECG input
  input  logic                      ecg_in_valid,
  output logic                      ecg_in_ready,
  input  logic signed [15:0]        ecg_in_data,
  // configuration bus from the microcontroller
  input  logic                      cfg_we,
  input  logic [CFG_AW-1:0]         cfg_addr,
  input  logic [CFG_DW-1:0]         cfg_wdata,
  // classification results
  output logic                      eeg_done,
  output logic                      eeg_cls,
  output logic signed [63:0]        eeg_dval,
  output logic [15:0]               eeg_epoch_count,
  output logic                      eeg_svm_busy,
  output logic                      ecg_done,
  output logic                      ecg_cls,
  output logic signed [63:0]        ecg_dval,
  output logic                      ecg_svm_busy,
  // labels from the auxiliary (error-free) labeling system, valid with *_done
  input  logic                      eeg_aux_label,
  input  logic                      ecg_aux_label,
  // training buffers, read by the trainer
  input  logic                      eeg_al_clear,
  output logic                      eeg_al_sel,
  output logic [$clog2(EEG_DEPTH+1)-1:0] eeg_al_count,
  output logic                      eeg_al_full,
  output logic [15:0]               eeg_al_dropped,
  input  logic [EEG_EW-1:0]         eeg_rd_entry,
  input  logic [$clog2(EEG_D)-1:0]  eeg_rd_feat,
  output logic [EEG_FW-1:0]         eeg_rd_data,
  output logic                      eeg_rd_label,
  input  logic                      ecg_al_clear,
  output logic                      ecg_al_sel,
  output logic [$clog2(ECG_DEPTH+1)-1:0] ecg_al_count,
  output logic                      ecg_al_full,
  output logic [15:0]               ecg_al_dropped,
  input  logic [ECG_EW-1:0]         ecg_rd_entry,
  input  logic [$clog2(ECG_N)-1:0]  ecg_rd_feat,
  output logic [ECG_FW-1:0]         ecg_rd_data,
  output logic                      ecg_rd_label
);

  logic [EEG_FW-1:0]  eeg_fv [EEG_D];
  logic [ECG_FW-1:0]  ecg_fv [ECG_N];
  logic signed [63:0] eeg_mdist, ecg_mdist;

  // active-learning control registers
  logic               eeg_al_en, ecg_al_en;
  logic [63:0]        eeg_margin, ecg_margin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eeg_al_en  <= 1'b0;
      ecg_al_en  <= 1'b0;
      eeg_margin <= '0;
      ecg_margin <= '0;
    end else if (cfg_we && cfg_addr[19:16] == TGT_AL) begin
      case (cfg_addr[15:0])
        AL_REG_EEG_EN:     eeg_al_en  <= cfg_wdata[0];
        AL_REG_EEG_MARGIN: eeg_margin <= cfg_wdata;
        AL_REG_ECG_EN:     ecg_al_en  <= cfg_wdata[0];
        AL_REG_ECG_MARGIN: ecg_margin <= cfg_wdata;
        default: ;
      endcase
    end
  end

  seizure_detector #(
    .NCH(EEG_NCH), .DEC_TAPS(EEG_DEC_TAPS), .BPF_TAPS(EEG_BPF_TAPS),
    .EPOCH_LEN(EPOCH_LEN), .NSV(EEG_NSV)
  ) u_eeg (
    .clk, .rst_n,
    .in_valid(eeg_in_valid), .in_ready(eeg_in_ready), .in_data(eeg_in_data),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .fv(eeg_fv), .done(eeg_done), .cls(eeg_cls), .dval(eeg_dval), .mdist(eeg_mdist),
    .epoch_count(eeg_epoch_count), .svm_busy(eeg_svm_busy)
  );

  al_buffer #(.D(EEG_D), .FW(EEG_FW), .BYTES(AL_BYTES)) u_eeg_al (
    .clk, .rst_n,
    .en(eeg_al_en), .margin(eeg_margin), .cls_done(eeg_done), .mdist(eeg_mdist),
    .fv(eeg_fv), .aux_label(eeg_aux_label), .clear(eeg_al_clear),
    .sel(eeg_al_sel), .count(eeg_al_count), .full(eeg_al_full), .dropped(eeg_al_dropped),
    .rd_entry(eeg_rd_entry), .rd_feat(eeg_rd_feat), .rd_data(eeg_rd_data),
    .rd_label(eeg_rd_label)
  );

  arrhythmia_detector #(
    .N(ECG_N), .STAGES(ECG_STAGES), .NSV(ECG_NSV)
  ) u_ecg (
    .clk, .rst_n,
    .in_valid(ecg_in_valid), .in_ready(ecg_in_ready), .in_data(ecg_in_data),
    .cfg_we, .cfg_addr, .cfg_wdata,
    .fv(ecg_fv), .done(ecg_done), .cls(ecg_cls), .dval(ecg_dval), .mdist(ecg_mdist),
    .svm_busy(ecg_svm_busy)
  );

  al_buffer #(.D(ECG_N), .FW(ECG_FW), .BYTES(AL_BYTES)) u_ecg_al (
    .clk, .rst_n,
    .en(ecg_al_en), .margin(ecg_margin), .cls_done(ecg_done), .mdist(ecg_mdist),
    .fv(ecg_fv), .aux_label(ecg_aux_label), .clear(ecg_al_clear),
    .sel(ecg_al_sel), .count(ecg_al_count), .full(ecg_al_full), .dropped(ecg_al_dropped),
    .rd_entry(ecg_rd_entry), .rd_feat(ecg_rd_feat), .rd_data(ecg_rd_data),
    .rd_label(ecg_rd_label)
  );

endmodule
