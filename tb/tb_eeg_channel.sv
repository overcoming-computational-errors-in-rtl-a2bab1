// Self-checking testbench of eeg_channel at a reduced size: a 9-tap decimation filter (still
// decimating by 8), 5-tap band-pass filters, 4 decimated samples per epoch.
//
// It loads random taps, streams random EEG samples through the handshake and closes an epoch
// every 4 band outputs, as the shared counter would. A reference chain written here follows
// the samples: decimating FIR with 12-bit saturation, seven band FIRs, absolute-value epoch
// sums and the three-epoch concatenation. Every channel vector is compared with it. It also
// checks that the vector is valid 2 cycles after the band output that closes the epoch.
module tb_eeg_channel;
  localparam int DT = 9, DF = 8, BT = 5, NB = 7, NE = 3, FW = 26, EL = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, band_tick, epoch_end, fv_valid;
  logic signed [11:0] in_data = '0;
  logic [FW-1:0] fv [NB*NE];
  logic decim_we = 0, bpf_we = 0;
  logic [3:0] decim_addr = '0;
  logic signed [11:0] decim_wdata = '0;
  logic [2:0] bpf_band = '0, bpf_addr = '0;
  logic signed [7:0] bpf_wdata = '0;
  int checks = 0, failures = 0, vectors = 0;

  eeg_channel #(.DEC_TAPS(DT), .DEC_FACTOR(DF), .BPF_TAPS(BT)) dut (.*);
  always #5 clk = ~clk;

  // epoch closing, as the shared counter does it
  int ticks = 0;
  assign epoch_end = band_tick && (ticks % EL == EL - 1);
  longint close_cycle = -100, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (band_tick) ticks <= ticks + 1;
    if (epoch_end) close_cycle <= cyc;
  end

  longint dc [DT], bc [NB][BT];
  longint xs [$], ds [$];
  longint esum [NB];
  longint ehist [NE][NB];
  int nep = 0, nd = 0;
  longint expq [$];   // flattened expected vectors

  function automatic longint fir(input longint c [], input longint h [$], input int taps);
    longint s = 0;
    for (int k = 0; k < taps; k++) if (h.size() - 1 - k >= 0) s += c[k] * h[h.size() - 1 - k];
    return s;
  endfunction

  task automatic model_sample(input longint v);
    longint s, y;
    longint c9 [], c5 [];
    xs.push_back(v);
    if (xs.size() % DF != 0) return;
    c9 = new[DT];
    for (int k = 0; k < DT; k++) c9[k] = dc[k];
    s = fir(c9, xs, DT) >>> 11;
    if (s > 2047) s = 2047;
    if (s < -2048) s = -2048;
    ds.push_back(s);
    c5 = new[BT];
    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < BT; k++) c5[k] = bc[b][k];
      y = fir(c5, ds, BT);
      esum[b] += (y < 0) ? -y : y;
      if (esum[b] > (1 << FW) - 1) esum[b] = (1 << FW) - 1;
    end
    nd++;
    if (nd % EL == 0) begin
      for (int d = NE - 1; d > 0; d--)
        for (int b = 0; b < NB; b++) ehist[d][b] = ehist[d-1][b];
      for (int b = 0; b < NB; b++) begin ehist[0][b] = esum[b]; esum[b] = 0; end
      nep++;
      if (nep >= NE)
        for (int d = 0; d < NE; d++)
          for (int b = 0; b < NB; b++) expq.push_back(ehist[d][b]);
    end
  endtask

  always @(posedge clk) if (rst_n && fv_valid) begin
    vectors++;
    checks++;
    if (cyc - close_cycle != 2) begin failures++; $display("vector %0d cycles after epoch close", cyc - close_cycle); end
    for (int i = 0; i < NB * NE; i++) begin
      longint e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected vector"); break; end
      e = expq.pop_front();
      if (fv[i] !== FW'(e)) begin failures++; if (failures < 10) $display("feature %0d: got %0d exp %0d", i, fv[i], e); end
    end
  end

  initial begin
    for (int b = 0; b < NB; b++) esum[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < DT; k++) begin
      dc[k] = longint'($urandom_range(0, 4095)) - 2048;
      @(negedge clk); decim_we = 1; decim_addr = 4'(k); decim_wdata = 12'(dc[k]);
    end
    @(negedge clk); decim_we = 0;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < BT; k++) begin
        bc[b][k] = longint'($urandom_range(0, 255)) - 128;
        @(negedge clk); bpf_we = 1; bpf_band = 3'(b); bpf_addr = 3'(k); bpf_wdata = 8'(bc[b][k]);
      end
    @(negedge clk); bpf_we = 0;
    for (int i = 0; i < DF * EL * 6; i++) begin
      longint v;
      v = longint'($urandom_range(0, 4095)) - 2048;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_data = 12'(v);
      @(posedge clk);
      model_sample(v);
      @(negedge clk); in_valid = 0;
    end
    repeat (DT + BT + 10) @(negedge clk);
    checks++;
    if (vectors != 4 || expq.size() != 0) begin failures++; $display("%0d vectors, %0d values left", vectors, expq.size()); end
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
