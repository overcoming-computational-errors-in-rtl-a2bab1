// Seven-stage discrete wavelet transform of the ECG arrhythmia detector (fault-affected
// hardware).
//
// It collects N = 256 ECG samples (16 bits, 360 Hz) and then runs STAGES = 7 analysis stages.
// Stage s splits its input of L = N/2^(s-1) values with a high-pass and a low-pass FIR, each
// of order 4 (5 taps). It keeps every second output:
//   hp[n] = sat(sum_k h[k]*x[2n+1-k] >>> CSHIFT),  lp[n] likewise with g[k],
//   n = 0 .. L/2-1, x[i] = 0 for i < 0.
// The low-pass half feeds the next stage. The 256 features are S1 HPF (128), S2 HPF (64), ...,
// S7 HPF (2), then S7 LPF (2), in that order. One pair of multiply-accumulate units serves every
// stage. It reads one delay-line sample per cycle, needs TAPS cycles per output pair and one
// cycle to store it. Two ping-pong buffers hold the running low-pass sequence (the first one
// also receives the input samples).
//
// Interface: in_valid/in_ready/in_data take samples. in_ready is high only while collecting.
// run_en lets the transform start once a full sequence is in, so a consumer can keep feat
// stable while it reads it. feat_valid pulses when all N features are written. Taps are
// written through coef_we/coef_addr/coef_wdata: addresses 0..TAPS-1 hold h, 8..8+TAPS-1 hold g.
// Timing: (N/2 + N/4 + ... + N/2^STAGES) * (TAPS+1) + 1 cycles from run_en to feat_valid,
// 1525 cycles at the defaults.
// The sequence length, stage count, filter order, decimation by two and the 16-bit input and
// 34-bit coefficient widths follow the document's figure. The wavelet taps are not printed,
// so they are programmable. The output phase, zero history, scaling by CSHIFT and saturation to
// 34 bits in every stage are this design's choices.
module dwt_engine #(
  parameter int unsigned N      = 256,
  parameter int unsigned STAGES = 7,
  parameter int unsigned IN_W   = 16,
  parameter int unsigned W      = 34,
  parameter int unsigned TAPS   = 5,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned CSHIFT = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [IN_W-1:0]   in_data,
  input  logic                     run_en,
  input  logic                     coef_we,
  input  logic [3:0]               coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata,
  output logic [W-1:0]             feat [N],
  output logic                     feat_valid
);

  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned ACC_W = W + COEF_W + $clog2(TAPS) + 1;
  localparam int unsigned KW    = $clog2(TAPS + 1);
  localparam int unsigned SW    = $clog2(STAGES + 1);

  typedef enum logic [1:0] {S_COLLECT, S_WAIT, S_MAC, S_STORE} state_e;

  logic signed [COEF_W-1:0] h [TAPS];
  logic signed [COEF_W-1:0] g [TAPS];
  logic signed [W-1:0]      buf_a [N];
  logic signed [W-1:0]      buf_b [N/2];

  state_e               state;
  logic [AW:0]          cnt;        // samples collected
  logic [SW-1:0]        stage;      // 1..STAGES
  logic [AW:0]          len;        // input length of this stage
  logic [AW-1:0]        n;          // output index
  logic [KW-1:0]        k;          // tap index
  logic [AW:0]          base;       // feature offset of this stage's HPF outputs
  logic signed [ACC_W-1:0] acc_h, acc_g;

  // sample x[2n+1-k] of the current stage's input
  logic signed [AW+2:0] xidx;
  logic signed [W-1:0]  xs;

  always_comb begin
    xidx = $signed({2'b00, n, 1'b1}) - $signed((AW+3)'(k));
    if (xidx < 0)           xs = '0;
    else if (stage[0])      xs = buf_a[AW'(xidx)];    // odd stages read buffer A
    else                    xs = buf_b[(AW-1)'(xidx)];
  end

  function automatic logic signed [W-1:0] sat(input logic signed [ACC_W-1:0] a);
    logic signed [ACC_W-1:0] s, hi;
    s  = a >>> CSHIFT;
    hi = ACC_W'((65'sd1 <<< (W - 1)) - 1);
    if (s > hi)           return W'(hi);
    else if (s < -hi - 1) return W'(-hi - 1);
    else                  return W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (coef_we) begin
      if (coef_addr < 4'(TAPS))                               h[KW'(coef_addr)]     <= coef_wdata;
      else if (coef_addr >= 4'd8 && coef_addr < 4'(8 + TAPS)) g[KW'(coef_addr - 8)] <= coef_wdata;
    end
  end

  assign in_ready = (state == S_COLLECT);

  logic signed [W-1:0] hp_out, lp_out;
  assign hp_out = sat(acc_h);
  assign lp_out = sat(acc_g);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_COLLECT;
      cnt        <= '0;
      stage      <= SW'(1);
      len        <= (AW+1)'(N);
      n          <= '0;
      k          <= '0;
      base       <= '0;
      acc_h      <= '0;
      acc_g      <= '0;
      feat_valid <= 1'b0;
      for (int i = 0; i < N; i++) feat[i] <= '0;
    end else begin
      feat_valid <= 1'b0;
      unique case (state)
        S_COLLECT: if (in_valid) begin
          buf_a[AW'(cnt)] <= W'(in_data);
          if (cnt == (AW+1)'(N - 1)) begin
            cnt   <= '0;
            state <= S_WAIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_WAIT: if (run_en) begin
          stage <= SW'(1);
          len   <= (AW+1)'(N);
          base  <= '0;
          n     <= '0;
          k     <= '0;
          acc_h <= '0;
          acc_g <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          acc_h <= acc_h + ACC_W'(h[k] * xs);
          acc_g <= acc_g + ACC_W'(g[k] * xs);
          if (k == KW'(TAPS - 1)) state <= S_STORE;
          else                    k <= k + 1'b1;
        end
        S_STORE: begin
          feat[AW'(base) + n] <= hp_out;
          if (stage[0]) buf_b[(AW-1)'(n)] <= lp_out;
          else          buf_a[n]          <= lp_out;
          if (stage == SW'(STAGES)) feat[AW'(base + (len >> 1)) + n] <= lp_out;
          k     <= '0;
          acc_h <= '0;
          acc_g <= '0;
          state <= S_MAC;
          if ((AW+1)'(n) == (len >> 1) - 1'b1) begin
            n <= '0;
            if (stage == SW'(STAGES)) begin
              feat_valid <= 1'b1;
              state      <= S_COLLECT;
            end else begin
              stage <= stage + 1'b1;
              base  <= base + (len >> 1);
              len   <= len >> 1;
            end
          end else begin
            n <= n + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
