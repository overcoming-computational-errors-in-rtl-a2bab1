// Self-checking testbench of abs_accum (W = 12 to reach saturation quickly).
//
// It feeds random signed samples with gaps and closes an epoch every 10 samples. Each reported
// energy is compared with sum |x| of that epoch computed here and clipped at 2^W-1. It also
// checks that energy_valid comes one cycle after the closing sample and that large inputs
// saturate the sum.
module tb_abs_accum;
  localparam int W = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, epoch_end = 0, energy_valid;
  logic signed [W-1:0] in_data = '0;
  logic [W-1:0] energy;
  int checks = 0, failures = 0, sats = 0;

  abs_accum #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    longint sum;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ep = 0; ep < 30; ep++) begin
      sum = 0;
      for (int i = 0; i < 10; i++) begin
        int v;
        v = (ep >= 20) ? int'($urandom_range(0, 4095)) - 2048 : int'($urandom_range(0, 255)) - 128;
        if (ep == 25 && i == 0) v = -2048;
        @(negedge clk);
        in_valid = 1; in_data = W'(v); epoch_end = (i == 9);
        sum += (v < 0) ? -v : v;
        @(negedge clk);
        in_valid = 0; epoch_end = 0;
        if (i == 9) begin
          checks++;
          if (!energy_valid) begin failures++; $display("energy_valid missing"); end
          if (sum > (1 << W) - 1) begin sum = (1 << W) - 1; sats++; end
          checks++;
          if (energy !== W'(sum)) begin failures++; $display("epoch %0d: got %0d exp %0d", ep, energy, sum); end
        end else begin
          checks++;
          if (energy_valid) begin failures++; $display("spurious energy_valid"); end
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    checks++;
    if (sats == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
