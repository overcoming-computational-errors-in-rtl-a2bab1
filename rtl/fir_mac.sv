// Time-multiplexed FIR filter with decimation, built around one multiply-accumulate unit.
//
// The EEG processor uses it twice. As the decimation filter it has order 142 (143 taps) and
// keeps one output in 8. As each of the seven band-pass filters it has order 46 (47 taps) and
// no decimation. Samples enter a circular delay line. After every DECIM-th accepted sample the
// engine computes y = sum_k c[k]*x[n-k] over TAPS cycles, one tap per cycle. It then
// arithmetic-shifts the sum right by SHIFT, saturates it to OUT_W bits and pulses out_valid.
//
// Interface: in_valid/in_ready handshake on the input (in_ready is low while a sum is being
// computed). Output is a one-cycle out_valid pulse. Coefficients are written through
// coef_we/coef_addr/coef_wdata. The document prints no coefficient values, so they are run-time
// programmable here.
// Timing: out_valid rises TAPS+1 cycles after the sample that completes a decimation group.
// Taps, decimation factor and data widths come from the document's figure. Coefficient width,
// scaling and the handshake are this design's choices.
module fir_mac #(
  parameter int unsigned TAPS   = 143,
  parameter int unsigned DECIM  = 8,
  parameter int unsigned IN_W   = 12,
  parameter int unsigned COEF_W = 12,
  parameter int unsigned OUT_W  = 12,
  parameter int unsigned SHIFT  = 11,
  localparam int unsigned AW    = $clog2(TAPS),
  localparam int unsigned SUM_W = IN_W + COEF_W + $clog2(TAPS) + 1,
  localparam int unsigned ACC_W = (SUM_W > OUT_W) ? SUM_W : OUT_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [IN_W-1:0]   in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data,
  input  logic                     coef_we,
  input  logic [AW-1:0]            coef_addr,
  input  logic signed [COEF_W-1:0] coef_wdata
);

  logic signed [COEF_W-1:0] coef  [TAPS];
  logic signed [IN_W-1:0]   dline [TAPS];
  logic [AW-1:0]            wptr;       // next write position
  logic [AW-1:0]            rptr;       // sample used by the current tap
  logic [AW-1:0]            tap;
  logic [$clog2(DECIM+1)-1:0] phase;
  logic                     busy;
  logic signed [ACC_W-1:0]  acc;

  localparam logic [AW-1:0] LAST = AW'(TAPS - 1);

  function automatic logic [AW-1:0] dec_ptr(input logic [AW-1:0] p);
    return (p == '0) ? LAST : p - 1'b1;
  endfunction

  function automatic logic signed [OUT_W-1:0] sat_out(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] s;
    logic signed [ACC_W-1:0] hi, lo;
    s  = v >>> SHIFT;
    hi = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
    lo = -hi - 1;
    if (s > hi)      return OUT_W'(hi);
    else if (s < lo) return OUT_W'(lo);
    else             return OUT_W'(s);
  endfunction

  assign in_ready = !busy;

  always_ff @(posedge clk) begin
    if (coef_we) coef[coef_addr] <= coef_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dline[k] <= '0;
      wptr      <= '0;
      rptr      <= '0;
      tap       <= '0;
      phase     <= '0;
      busy      <= 1'b0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          dline[wptr] <= in_data;
          wptr <= (wptr == LAST) ? '0 : wptr + 1'b1;
          if (phase == ($clog2(DECIM+1))'(DECIM - 1)) begin
            phase <= '0;
            busy  <= 1'b1;
            rptr  <= wptr;   // newest sample
            tap   <= '0;
            acc   <= '0;
          end else begin
            phase <= phase + 1'b1;
          end
        end
      end else begin
        acc  <= acc + ACC_W'(coef[tap] * dline[rptr]);
        rptr <= dec_ptr(rptr);
        if (tap == LAST) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_data  <= sat_out(acc + ACC_W'(coef[tap] * dline[rptr]));
        end else begin
          tap <= tap + 1'b1;
        end
      end
    end
  end

endmodule
