// Active-learning selection and the training buffers of one system.
//
// Training runs in iterations. While the classifier runs with its current model, every
// classified feature vector whose distance from the decision boundary is within `margin`
// (|mdist| <= margin) is selected. The selected vector goes into the training feature-vector
// buffer, and the label that the auxiliary labeling system gives for the same input goes into
// the training label buffer. The trainer reads both through rd_entry/rd_feat. It then loads a
// new model into the classifier and pulses clear to start the next iteration. A selected
// vector that finds the buffer full is not stored; `dropped` counts such vectors.
//
// Capacity: DEPTH = BYTES*8 / (D*FW + 1) entries, one vector plus one label bit each. With the
// 2 kB default this gives 14 vectors for the 42 x 26-bit seizure vectors and 1 vector for the
// 256 x 34-bit arrhythmia vectors.
// Interface: cls_done/mdist come from the classifier. fv must be stable when cls_done is high.
// aux_label comes with cls_done. sel pulses in the cycle after a vector is stored. rd_data and
// rd_label are combinational reads.
// Selection by marginal distance, the paired buffers and the 2 kB size follow the document.
// The read port, the clear control and dropping on a full buffer are this design's choices.
module al_buffer #(
  parameter int unsigned D     = 42,
  parameter int unsigned FW    = 26,
  parameter int unsigned BYTES = 2048,
  parameter int unsigned DV_W  = 64,
  localparam int unsigned DEPTH_RAW = (BYTES * 8) / (D * FW + 1),
  localparam int unsigned DEPTH     = (DEPTH_RAW < 1) ? 1 : DEPTH_RAW,
  localparam int unsigned EW        = (DEPTH < 2) ? 1 : $clog2(DEPTH),
  localparam int unsigned CW        = $clog2(DEPTH + 1),
  localparam int unsigned FIW       = (D < 2) ? 1 : $clog2(D)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [DV_W-1:0]        margin,
  input  logic                   cls_done,
  input  logic signed [DV_W-1:0] mdist,
  input  logic [FW-1:0]          fv [D],
  input  logic                   aux_label,
  input  logic                   clear,
  output logic                   sel,
  output logic [CW-1:0]          count,
  output logic                   full,
  output logic [15:0]            dropped,
  input  logic [EW-1:0]          rd_entry,
  input  logic [FIW-1:0]         rd_feat,
  output logic [FW-1:0]          rd_data,
  output logic                   rd_label
);

  logic [FW-1:0] fv_mem  [DEPTH][D];
  logic          lbl_mem [DEPTH];
  logic [DV_W-1:0] dist_abs;
  logic          near;

  always_comb begin
    dist_abs = mdist[DV_W-1] ? DV_W'(-mdist) : DV_W'(mdist);
    near     = en && cls_done && (dist_abs <= margin);
  end

  assign full     = (count == CW'(DEPTH));
  assign rd_data  = fv_mem[rd_entry][rd_feat];
  assign rd_label = lbl_mem[rd_entry];

  always_ff @(posedge clk) begin
    if (near && !full && !clear) begin
      for (int i = 0; i < D; i++) fv_mem[EW'(count)][i] <= fv[i];
      lbl_mem[EW'(count)] <= aux_label;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      dropped <= '0;
      sel     <= 1'b0;
    end else begin
      sel <= 1'b0;
      if (clear) begin
        count   <= '0;
        dropped <= '0;
      end else if (near) begin
        if (!full) begin
          count <= count + 1'b1;
          sel   <= 1'b1;
        end else if (dropped != '1) begin
          dropped <= dropped + 1'b1;
        end
      end
    end
  end

endmodule
