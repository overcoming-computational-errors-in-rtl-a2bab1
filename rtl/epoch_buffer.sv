// Three-epoch feature buffer of one EEG channel ("Epoch N, N-1, N-2").
//
// On load, the NB energies of the epoch just finished enter slot N. Slot N moves to N-1, and
// N-1 to N-2. The channel feature vector is NB*DEPTH values: slot N first, then N-1, then N-2,
// band order inside each slot. fv_valid pulses one cycle after a load, once DEPTH epochs have
// entered, so that every slot holds real data.
// The concatenation of three epochs of seven features (21 per channel) follows the document.
// The ordering inside the vector and the warm-up rule are this design's choices.
module epoch_buffer #(
  parameter int unsigned NB    = 7,
  parameter int unsigned DEPTH = 3,
  parameter int unsigned W     = 26
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] energy [NB],
  output logic [W-1:0] fv     [NB*DEPTH],
  output logic         fv_valid
);

  logic [W-1:0] slot [DEPTH][NB];
  logic [$clog2(DEPTH+1)-1:0] filled;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < DEPTH; d++)
        for (int b = 0; b < NB; b++) slot[d][b] <= '0;
      filled   <= '0;
      fv_valid <= 1'b0;
    end else begin
      fv_valid <= 1'b0;
      if (load) begin
        for (int b = 0; b < NB; b++) slot[0][b] <= energy[b];
        for (int d = 1; d < DEPTH; d++)
          for (int b = 0; b < NB; b++) slot[d][b] <= slot[d-1][b];
        if (filled != ($clog2(DEPTH+1))'(DEPTH)) filled <= filled + 1'b1;
        fv_valid <= (filled >= ($clog2(DEPTH+1))'(DEPTH - 1));
      end
    end
  end

  always_comb begin
    for (int d = 0; d < DEPTH; d++)
      for (int b = 0; b < NB; b++) fv[d*NB + b] = slot[d][b];
  end

endmodule
