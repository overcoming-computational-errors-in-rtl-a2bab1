// Self-checking testbench of epoch_buffer at the default size (7 bands, 3 epochs).
//
// It loads six epochs of random energies. After each load it checks that slot N holds the
// newest epoch, N-1 the one before and N-2 the one before that, and that fv_valid pulses only
// from the third load on.
module tb_epoch_buffer;
  localparam int NB = 7, DEPTH = 3, W = 26;
  logic clk = 0, rst_n = 0, load = 0, fv_valid;
  logic [W-1:0] energy [NB];
  logic [W-1:0] fv [NB*DEPTH];
  int checks = 0, failures = 0;
  logic [W-1:0] hist [DEPTH][NB];   // hist[0] = newest epoch
  int nloaded = 0;

  epoch_buffer #(.NB(NB), .DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [W-1:0] e [NB];
    for (int b = 0; b < NB; b++) energy[b] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ep = 0; ep < 6; ep++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin e[b] = W'($urandom); energy[b] = e[b]; end
      for (int d = DEPTH - 1; d > 0; d--)
        for (int b = 0; b < NB; b++) hist[d][b] = hist[d-1][b];
      for (int b = 0; b < NB; b++) hist[0][b] = e[b];
      nloaded++;
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (fv_valid !== (ep >= DEPTH - 1)) begin failures++; $display("epoch %0d fv_valid=%0b", ep, fv_valid); end
      for (int d = 0; d < DEPTH; d++)
        for (int b = 0; b < NB; b++) begin
          logic [W-1:0] exp_v;
          exp_v = (d < nloaded) ? hist[d][b] : '0;
          checks++;
          if (fv[d*NB + b] !== exp_v) begin failures++; $display("epoch %0d slot %0d band %0d got %0h exp %0h", ep, d, b, fv[d*NB+b], exp_v); end
        end
      @(negedge clk);
      checks++;
      if (fv_valid) begin failures++; $display("fv_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
