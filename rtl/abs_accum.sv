// Epoch energy accumulator of one EEG band.
//
// Each valid band-pass output x adds |x| into a running sum. When epoch_end arrives with the
// last sample of an epoch, the sum including that sample moves to `energy`, energy_valid pulses
// and the running sum restarts from zero. The sum saturates at 2^W-1 instead of wrapping.
// Interface: in_valid/in_data (signed W bits) from the filter, and epoch_end from the shared
// epoch counter (only acted on together with in_valid). `energy` is W bits unsigned and holds
// its value between epochs.
// Timing: energy_valid rises one cycle after the closing sample.
// The absolute-value accumulation over a 2-s epoch and the 26-bit width follow the document's
// figure. Saturation is this design's choice.
module abs_accum #(
  parameter int unsigned W = 26
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_data,
  input  logic                epoch_end,
  output logic [W-1:0]        energy,
  output logic                energy_valid
);

  logic [W-1:0] sum;
  logic [W-1:0] mag;
  logic [W:0]   nxt;
  logic [W-1:0] nxt_sat;

  always_comb begin
    mag     = in_data[W-1] ? W'(-in_data) : W'(in_data);   // |-2^(W-1)| = 2^(W-1) fits unsigned
    nxt     = {1'b0, sum} + {1'b0, mag};
    nxt_sat = nxt[W] ? '1 : nxt[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum          <= '0;
      energy       <= '0;
      energy_valid <= 1'b0;
    end else begin
      energy_valid <= 1'b0;
      if (in_valid) begin
        if (epoch_end) begin
          energy       <= nxt_sat;
          energy_valid <= 1'b1;
          sum          <= '0;
        end else begin
          sum <= nxt_sat;
        end
      end
    end
  end

endmodule
