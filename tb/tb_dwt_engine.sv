// Self-checking testbench of dwt_engine at the default size (256 samples, 7 stages).
//
// It loads random 5-tap high-pass and low-pass filters, sends three random ECG sequences and
// compares all 256 features with a reference transform computed here. Each stage gives
// hp[n] = sat34(sum_k h[k]*x[2n+1-k] >>> 14), likewise lp[n], with zero history. The features
// are laid out S1..S7 HPF, then S7 LPF. It holds run_en low for a while on one sequence and
// checks that nothing starts and that in_ready stays low. It checks the transform time of
// 1525 cycles from run_en to feat_valid, and runs one full-scale alternating sequence.
module tb_dwt_engine;
  localparam int N = 256, STAGES = 7, IN_W = 16, W = 34, TAPS = 5, CSHIFT = 14;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, run_en = 0, coef_we = 0, feat_valid;
  logic signed [IN_W-1:0] in_data = '0;
  logic [3:0] coef_addr = '0;
  logic signed [15:0] coef_wdata = '0;
  logic [W-1:0] feat [N];
  int checks = 0, failures = 0, stalls = 0, sats = 0;

  dwt_engine dut (.*);
  always #5 clk = ~clk;

  longint h [TAPS], g [TAPS];
  longint x [N], cur [N], nxt [N], ref_f [N];

  function automatic longint sat(input longint a);
    longint s = a >>> CSHIFT;
    longint hi = (64'sd1 <<< (W-1)) - 1;
    if (s > hi) begin sats++; return hi; end
    if (s < -hi - 1) begin sats++; return -hi - 1; end
    return s;
  endfunction

  task automatic reference();
    int len = N, base = 0;
    for (int i = 0; i < N; i++) cur[i] = x[i];
    for (int s = 1; s <= STAGES; s++) begin
      for (int n = 0; n < len / 2; n++) begin
        longint ah = 0, ag = 0;
        for (int k = 0; k < TAPS; k++) begin
          int idx = 2 * n + 1 - k;
          if (idx >= 0) begin ah += h[k] * cur[idx]; ag += g[k] * cur[idx]; end
        end
        ref_f[base + n] = sat(ah);
        nxt[n] = sat(ag);
        if (s == STAGES) ref_f[base + len / 2 + n] = nxt[n];
      end
      for (int n = 0; n < len / 2; n++) cur[n] = nxt[n];
      base += len / 2;
      len /= 2;
    end
  endtask

  initial begin
    int t0, lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < TAPS; k++) begin
      h[k] = longint'($urandom_range(0, 65535)) - 32768;
      g[k] = longint'($urandom_range(0, 65535)) - 32768;
      @(negedge clk); coef_we = 1; coef_addr = 4'(k); coef_wdata = 16'(h[k]);
      @(negedge clk); coef_addr = 4'(8 + k); coef_wdata = 16'(g[k]);
    end
    @(negedge clk); coef_we = 0;
    for (int sq = 0; sq < 3; sq++) begin
      for (int i = 0; i < N; i++) begin
        x[i] = (sq == 2) ? ((i % 2) ? 32767 : -32768) : longint'($urandom_range(0, 65535)) - 32768;
        @(negedge clk);
        checks++;
        if (!in_ready) begin failures++; $display("in_ready low while collecting"); end
        in_valid = 1; in_data = 16'(x[i]);
        @(negedge clk); in_valid = 0;
      end
      reference();
      // hold the transform back for a while
      repeat (20) begin
        @(negedge clk);
        checks++;
        if (in_ready || feat_valid) begin failures++; $display("transform ran without run_en"); end
      end
      stalls++;
      @(negedge clk); run_en = 1;
      @(posedge clk); t0 = $time;
      @(negedge clk);
      while (!feat_valid) @(negedge clk);
      lat = (int'($time) - t0 + 5) / 10;
      run_en = 0;
      checks++;
      if (lat != 1525) begin failures++; $display("transform took %0d cycles", lat); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (feat[i] !== W'(ref_f[i])) begin
          failures++;
          if (failures < 10) $display("seq %0d feature %0d: got %0h exp %0h", sq, i, feat[i], W'(ref_f[i]));
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("run_en stall never exercised"); end
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
