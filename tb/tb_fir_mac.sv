// Self-checking testbench of fir_mac at a reduced size (9 taps, decimation by 3).
//
// It loads random signed taps, streams random samples through the valid/ready handshake and
// compares every output with a reference convolution computed here: y = sum_k c[k]*x[n-k] over
// the history (zero before the first sample), shifted right by SHIFT and saturated. It also
// checks that out_valid arrives exactly TAPS+1 cycles after the sample that completes a
// decimation group, and that large inputs saturate.
module tb_fir_mac;
  localparam int TAPS = 9, DECIM = 3, IN_W = 12, COEF_W = 8, OUT_W = 14, SHIFT = 3;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, coef_we = 0;
  logic signed [IN_W-1:0] in_data = '0;
  logic signed [OUT_W-1:0] out_data;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  logic signed [COEF_W-1:0] coef_wdata = '0;
  int checks = 0, failures = 0;

  fir_mac #(.TAPS(TAPS), .DECIM(DECIM), .IN_W(IN_W), .COEF_W(COEF_W), .OUT_W(OUT_W),
            .SHIFT(SHIFT)) dut (.*);

  always #5 clk = ~clk;

  int c [TAPS];
  int hist [$];
  int expq [$];
  int nacc = 0;
  longint last_group_cycle = -1;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_out();
    longint s = 0;
    for (int k = 0; k < TAPS; k++)
      if (hist.size() - 1 - k >= 0) s += longint'(c[k]) * hist[hist.size() - 1 - k];
    s = s >>> SHIFT;
    if (s > (1 <<< (OUT_W-1)) - 1) s = (1 <<< (OUT_W-1)) - 1;
    if (s < -(1 <<< (OUT_W-1)))    s = -(1 <<< (OUT_W-1));
    return int'(s);
  endfunction

  // output monitor
  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      e = expq.pop_front();
      if (out_data !== OUT_W'(e)) begin
        failures++; $display("output mismatch: got %0d exp %0d", out_data, e);
      end
    end
    checks++;
    if (cyc - last_group_cycle != TAPS + 1) begin
      failures++; $display("latency %0d, expected %0d", cyc - last_group_cycle, TAPS + 1);
    end
  end

  task automatic send(input int v);
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_data = IN_W'(v);
    @(posedge clk);
    hist.push_back(v);
    nacc++;
    if (nacc % DECIM == 0) begin expq.push_back(ref_out()); last_group_cycle = cyc; end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < TAPS; k++) begin
      c[k] = int'($urandom_range(0, 255)) - 128;
      @(negedge clk); coef_we = 1; coef_addr = k[$clog2(TAPS)-1:0]; coef_wdata = COEF_W'(c[k]);
    end
    @(negedge clk); coef_we = 0;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int v;
      v = (i < 240) ? int'($urandom_range(0, 4095)) - 2048 : ((i % 2) ? 2047 : -2048);
      send(v);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 4)) @(posedge clk);
    end
    repeat (TAPS + 5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d outputs missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
