// Self-checking testbench of arrhythmia_detector at its default size (256-sample sequences,
// 7 stages, 16 support vectors, polynomial kernel).
//
// The wavelet taps, the model and, for the last sequence, stuck-at faults are loaded through
// the configuration bus. Four random ECG sequences are sent back to back, so the transform of
// a sequence has to wait for the classifier to finish the previous one. The testbench predicts
// each feature vector with the reference transform of ddhr_ref_pkg and applies the stuck-at
// rule. It predicts dval and cls with the reference decision function, and it checks that
// the stall happened and that the faults changed a vector.
module tb_arrhythmia_detector;
  import ddhr_pkg::*;
  import ddhr_ref_pkg::*;
  localparam int N = 256, FW = 34, NSV = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, done, cls, svm_busy, cfg_we = 0;
  logic signed [15:0] in_data = '0;
  logic [19:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0;
  logic [FW-1:0] fv [N];
  logic signed [63:0] dval, mdist;
  int checks = 0, failures = 0, results = 0, faulted = 0, stalls = 0, n_pos = 0;

  arrhythmia_detector dut (.*);
  always #5 clk = ~clk;

  dwt_model dwt;
  svm_model svm;
  logic [N*FW-1:0] fctrl = '0, fval = '0;
  longint expv [$][$];

  task automatic wr(input logic [3:0] tgt, input int a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = {tgt, 16'(a)}; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic longint sx34(input logic [FW-1:0] v);
    return longint'($signed(v));
  endfunction

  always @(posedge clk) if (rst_n && done) begin
    longint e [$];
    longint dv;
    results++;
    if (expv.size() == 0) begin checks++; failures++; $display("unexpected result"); end
    else begin
      e = expv.pop_front();
      for (int i = 0; i < N; i++) begin
        checks++;
        if (fv[i] !== FW'(e[i])) begin failures++; if (failures < 10) $display("fv[%0d] got %0h exp %0h", i, fv[i], FW'(e[i])); end
      end
      dv = svm.dval(e);
      if (dv >= svm.thresh) n_pos++;
      checks++;
      if (dval !== dv || cls !== (dv >= svm.thresh)) begin failures++; $display("dval %0d exp %0d", dval, dv); end
    end
  end

  initial begin
    longint x [$];
    longint f [256];
    logic [N*FW-1:0] bits, fb;
    longint e [$];
    dwt = new();
    svm = new();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5; k++) begin
      dwt.h[k] = longint'($urandom_range(0, 65535)) - 32768;
      dwt.g[k] = longint'($urandom_range(0, 65535)) - 32768;
      wr(TGT_ECG_DWT, k, 64'(dwt.h[k]));
      wr(TGT_ECG_DWT, 8 + k, 64'(dwt.g[k]));
    end
    svm.d = N; svm.nsv = NSV; svm.kern = 1; svm.kshift = 44;
    svm.gamma = 0; svm.polyc = 100; svm.bias = 0; svm.thresh = 0;
    for (int j = 0; j < NSV; j++) begin
      longint row [$];
      row.delete();
      for (int i = 0; i < N; i++) begin
        longint t;
        t = longint'($urandom_range(0, 2000000)) - 1000000;
        row.push_back(t);
        wr(TGT_ECG_SVM, j * N + i, 64'(t));
      end
      svm.sv.push_back(row);
      svm.alpha.push_back(longint'($urandom_range(0, 65535)) - 32768);
      wr(TGT_ECG_SVM, int'(SVM_ALPHA_BASE) + j, 64'(svm.alpha[j]));
    end
    wr(TGT_ECG_SVM, int'(SVM_REG_KERNEL), 64'(KERN_POLY2));
    wr(TGT_ECG_SVM, int'(SVM_REG_KSHIFT), 64'(svm.kshift));
    wr(TGT_ECG_SVM, int'(SVM_REG_POLYC), 64'(svm.polyc));
    wr(TGT_ECG_SVM, int'(SVM_REG_NSV), 64'(NSV));
    for (int sq = 0; sq < 4; sq++) begin
      if (sq == 3) begin
        while (results < 3 || svm_busy) @(negedge clk);
        for (int w = 0; w < 4; w++) begin
          fctrl[w*64*8 +: 64] = {$urandom, $urandom} & {$urandom, $urandom};
          fval[w*64*8 +: 64]  = {$urandom, $urandom};
          wr(TGT_ECG_FAULT, 2 * (w * 8), fctrl[w*64*8 +: 64]);
          wr(TGT_ECG_FAULT, 2 * (w * 8) + 1, fval[w*64*8 +: 64]);
        end
      end
      x.delete();
      for (int i = 0; i < N; i++) begin
        longint v;
        v = longint'($urandom_range(0, 65535)) - 32768;
        x.push_back(v);
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1; in_data = 16'(v);
        @(negedge clk); in_valid = 0;
      end
      if (svm_busy) stalls++;     // a full sequence waits for the busy classifier
      dwt.run(x, f);
      for (int k = 0; k < N; k++) bits[k*FW +: FW] = FW'(f[k]);
      fb = (bits & ~fctrl) | (fval & fctrl);
      if (fb != bits) faulted++;
      e.delete();
      for (int k = 0; k < N; k++) e.push_back(sx34(fb[k*FW +: FW]));
      expv.push_back(e);
    end
    while (results < 4) @(negedge clk);
    checks++;
    if (stalls == 0) begin failures++; $display("transform never waited for the classifier"); end
    checks++;
    if (faulted == 0) begin failures++; $display("faults never changed a vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
