// EEG seizure detector: the fault-affected feature extractor and its fault-protected SVM.
//
// NCH = 2 EEG channels each produce 21 features per 2-s epoch: 7 band energies for the
// current and the two previous epochs. Together they form a 42-dimensional vector. One
// fault-protected epoch counter closes the epoch in all channels at once. The vector reaches the
// classifier through a bank of stuck-at fault multiplexers. With them, faults can be placed on
// the fault-affected outputs at run time. The classifier (RBF kernel by default) then labels
// the epoch seizure (cls = 1) or non-seizure.
//
// Interface: in_valid/in_ready with one 12-bit sample per channel, all channels sampled
// together. cfg_* is the configuration bus (map in ddhr_pkg). It loads filter taps, the
// classifier model and the fault-control registers. fv is the (fault-affected) vector the
// classifier sees. done/cls/dval/mdist are the classification result.
// Timing: a result appears 2 cycles after the closing band sample plus nsv*(D+1)+2 cycles of
// classification.
// Channel count, feature layout, the counter and the SVM come from the document. Feature order
// (channel, then epoch N, N-1, N-2, then band) and placing the fault multiplexers on the
// channel outputs are this design's choices.
module seizure_detector
  import ddhr_pkg::*;
#(
  parameter int unsigned NCH       = 2,
  parameter int unsigned IN_W      = 12,
  parameter int unsigned DEC_TAPS  = 143,
  parameter int unsigned BPF_TAPS  = 47,
  parameter int unsigned NB        = 7,
  parameter int unsigned NEPOCH    = 3,
  parameter int unsigned FEAT_W    = 26,
  parameter int unsigned EPOCH_LEN = 150,
  parameter int unsigned NSV       = 16,
  localparam int unsigned D        = NCH * NB * NEPOCH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_data [NCH],
  input  logic                   cfg_we,
  input  logic [CFG_AW-1:0]      cfg_addr,
  input  logic [CFG_DW-1:0]      cfg_wdata,
  output logic [FEAT_W-1:0]      fv [D],
  output logic                   done,
  output logic                   cls,
  output logic signed [63:0]     dval,
  output logic signed [63:0]     mdist,
  output logic [15:0]            epoch_count,
  output logic                   svm_busy
);

  localparam int unsigned CD = NB * NEPOCH;   // features per channel

  logic [NCH-1:0]    ch_ready, ch_tick, ch_fv_valid;
  logic [FEAT_W-1:0] ch_fv [NCH][CD];
  logic              epoch_end;
  logic [D*FEAT_W-1:0] raw_bits, flt_bits;

  wire [3:0]  tgt = cfg_addr[19:16];
  wire [15:0] la  = cfg_addr[15:0];

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    eeg_channel #(
      .IN_W(IN_W), .DEC_TAPS(DEC_TAPS), .BPF_TAPS(BPF_TAPS), .NB(NB),
      .FEAT_W(FEAT_W), .NEPOCH(NEPOCH)
    ) u_ch (
      .clk, .rst_n,
      .in_valid(in_valid && in_ready), .in_ready(ch_ready[c]), .in_data(in_data[c]),
      .band_tick(ch_tick[c]), .epoch_end,
      .fv(ch_fv[c]), .fv_valid(ch_fv_valid[c]),
      .decim_we(cfg_we && tgt == TGT_EEG_DECIM),
      .decim_addr(($clog2(DEC_TAPS))'(la)), .decim_wdata(cfg_wdata[11:0]),
      .bpf_we(cfg_we && tgt == TGT_EEG_BPF),
      .bpf_band(($clog2(NB))'(la[15:6])), .bpf_addr(($clog2(BPF_TAPS))'(la[5:0])),
      .bpf_wdata(cfg_wdata[7:0])
    );
    for (genvar i = 0; i < CD; i++) begin : g_pack
      assign raw_bits[(c*CD + i)*FEAT_W +: FEAT_W] = ch_fv[c][i];
    end
  end

  assign in_ready = &ch_ready;

  epoch_counter #(.EPOCH_LEN(EPOCH_LEN)) u_counter (
    .clk, .rst_n, .tick(ch_tick[0]), .epoch_end, .epoch_count
  );

  fault_injector #(.N(D * FEAT_W)) u_faults (
    .clk, .rst_n, .node_in(raw_bits), .node_out(flt_bits),
    .cfg_we(cfg_we && tgt == TGT_EEG_FAULT), .cfg_addr(la), .cfg_wdata
  );

  for (genvar i = 0; i < D; i++) begin : g_unpack
    assign fv[i] = flt_bits[i*FEAT_W +: FEAT_W];
  end

  svm_classifier #(
    .D(D), .FW(FEAT_W), .FEAT_SIGNED(1'b0), .NSV(NSV), .DV_W(64)
  ) u_svm (
    .clk, .rst_n,
    .start(ch_fv_valid[0]), .fv, .busy(svm_busy), .done, .dval, .cls, .mdist,
    .cfg_we(cfg_we && tgt == TGT_EEG_SVM), .cfg_addr(la), .cfg_wdata
  );

  // The classification of one epoch ends long before the next epoch closes.
  a_svm_free: assert property (@(posedge clk) disable iff (!rst_n) ch_fv_valid[0] |-> !svm_busy)
    else $error("feature vector arrived while the classifier was busy");

endmodule
