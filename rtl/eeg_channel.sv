// One EEG feature-extraction channel of the seizure detector (fault-affected hardware).
//
// The 12-bit EEG samples (600 Hz) go through a decimation FIR of order 142 that keeps one
// sample in 8 (75 Hz, 12 bits). Each decimated sample feeds seven order-46 band-pass FIRs
// (0, 4, 7, 10, 13, 16 and 19 Hz centres, 5 Hz bandwidth) with 26-bit outputs. An accumulator
// sums the absolute value of each band over the epoch that the shared counter marks. At the
// end of an epoch the seven energies enter the three-epoch buffer, which gives the 21-feature
// channel vector.
//
// Interface: in_valid/in_ready/in_data carry the samples. band_tick pulses when the seven
// band outputs are valid, and the shared epoch counter counts it. epoch_end closes the epoch
// and must coincide with band_tick. fv/fv_valid is the channel vector. Coefficient writes:
// decim_* for the decimation taps, bpf_* for the band-pass taps (band 0..6, tap 0..46).
// Timing: a decimated sample reaches the band filters 144 cycles after the 8th input. The band
// outputs follow 48 cycles later. The vector is valid 2 cycles after the closing band_tick.
// The filter orders, rates, widths and band list follow the document's figure. The filter
// coefficients are not printed there, so they are loaded at run time.
module eeg_channel #(
  parameter int unsigned IN_W       = 12,
  parameter int unsigned DEC_TAPS   = 143,
  parameter int unsigned DEC_FACTOR = 8,
  parameter int unsigned DEC_COEF_W = 12,
  parameter int unsigned BPF_TAPS   = 47,
  parameter int unsigned BPF_COEF_W = 8,
  parameter int unsigned NB         = 7,
  parameter int unsigned FEAT_W     = 26,
  parameter int unsigned NEPOCH     = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [IN_W-1:0]        in_data,
  output logic                          band_tick,
  input  logic                          epoch_end,
  output logic [FEAT_W-1:0]             fv [NB*NEPOCH],
  output logic                          fv_valid,
  input  logic                          decim_we,
  input  logic [$clog2(DEC_TAPS)-1:0]   decim_addr,
  input  logic signed [DEC_COEF_W-1:0]  decim_wdata,
  input  logic                          bpf_we,
  input  logic [$clog2(NB)-1:0]         bpf_band,
  input  logic [$clog2(BPF_TAPS)-1:0]   bpf_addr,
  input  logic signed [BPF_COEF_W-1:0]  bpf_wdata
);

  logic                     dec_valid;
  logic signed [IN_W-1:0]   dec_data;
  logic [NB-1:0]            bpf_ready;
  logic [NB-1:0]            bpf_valid;
  logic signed [FEAT_W-1:0] bpf_data [NB];
  logic [NB-1:0]            en_valid;
  logic [FEAT_W-1:0]        energy [NB];

  fir_mac #(
    .TAPS(DEC_TAPS), .DECIM(DEC_FACTOR), .IN_W(IN_W), .COEF_W(DEC_COEF_W),
    .OUT_W(IN_W), .SHIFT(DEC_COEF_W - 1)
  ) u_decim (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(dec_valid), .out_data(dec_data),
    .coef_we(decim_we), .coef_addr(decim_addr), .coef_wdata(decim_wdata)
  );

  for (genvar b = 0; b < NB; b++) begin : g_band
    fir_mac #(
      .TAPS(BPF_TAPS), .DECIM(1), .IN_W(IN_W), .COEF_W(BPF_COEF_W),
      .OUT_W(FEAT_W), .SHIFT(0)
    ) u_bpf (
      .clk, .rst_n,
      .in_valid(dec_valid), .in_ready(bpf_ready[b]), .in_data(dec_data),
      .out_valid(bpf_valid[b]), .out_data(bpf_data[b]),
      .coef_we(bpf_we && (bpf_band == ($clog2(NB))'(b))),
      .coef_addr(bpf_addr), .coef_wdata(bpf_wdata)
    );

    abs_accum #(.W(FEAT_W)) u_acc (
      .clk, .rst_n,
      .in_valid(bpf_valid[b]), .in_data(bpf_data[b]), .epoch_end,
      .energy(energy[b]), .energy_valid(en_valid[b])
    );
  end

  assign band_tick = bpf_valid[0];

  epoch_buffer #(.NB(NB), .DEPTH(NEPOCH), .W(FEAT_W)) u_epochs (
    .clk, .rst_n,
    .load(&en_valid), .energy, .fv, .fv_valid
  );

  // The band filters are never busy when a decimated sample arrives.
  a_bpf_ready: assert property (@(posedge clk) disable iff (!rst_n) dec_valid |-> &bpf_ready)
    else $error("band-pass filter overrun");

endmodule
