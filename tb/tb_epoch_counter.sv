// Self-checking testbench of epoch_counter at the default epoch of 150 ticks.
//
// Ticks arrive with random gaps. epoch_end must be high exactly on every 150th tick and never
// otherwise, and epoch_count must equal the number of epochs completed.
module tb_epoch_counter;
  logic clk = 0, rst_n = 0, tick = 0, epoch_end;
  logic [15:0] epoch_count;
  int checks = 0, failures = 0;

  epoch_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 1; t <= 150 * 5; t++) begin
      @(negedge clk);
      tick = 1;
      #1;
      checks++;
      if (epoch_end !== (t % 150 == 0)) begin failures++; $display("tick %0d: epoch_end=%0b", t, epoch_end); end
      @(negedge clk);
      tick = 0;
      #1;
      checks++;
      if (epoch_end) begin failures++; $display("epoch_end without tick"); end
      checks++;
      if (epoch_count !== 16'(t / 150)) begin failures++; $display("count %0d after %0d ticks", epoch_count, t); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
