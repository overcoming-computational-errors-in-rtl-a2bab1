// Epoch counter shared by all EEG channels (the fault-protected "Counter" of the seizure
// processor).
//
// It counts decimated samples, one per tick. The tick is the valid strobe of the band-pass
// outputs, which arrive at 75 Hz after decimation of 600 Hz EEG by 8. On the tick that
// completes an epoch of EPOCH_LEN samples it raises epoch_end (combinational, in the same cycle
// as the tick) and wraps. A 2-s epoch at 75 Hz gives the default of 150. The accumulators close
// their sums on it, as the figure's "Accum. start" line does. epoch_count counts finished
// epochs, saturating at its maximum.
// The 2-s epoch, the sample rates and the counter's role follow the document. Deriving the
// epoch from a sample count is this design's choice.
module epoch_counter #(
  parameter int unsigned EPOCH_LEN = 150,
  parameter int unsigned CNT_W     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  output logic             epoch_end,
  output logic [CNT_W-1:0] epoch_count
);

  localparam int unsigned PW = $clog2(EPOCH_LEN + 1);
  logic [PW-1:0] pos;

  assign epoch_end = tick && (pos == PW'(EPOCH_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos         <= '0;
      epoch_count <= '0;
    end else if (tick) begin
      if (epoch_end) begin
        pos <= '0;
        if (epoch_count != '1) epoch_count <= epoch_count + 1'b1;
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end

endmodule
