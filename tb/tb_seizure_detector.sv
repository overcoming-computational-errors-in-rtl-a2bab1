// Self-checking testbench of seizure_detector at a reduced size: 9-tap decimation filters,
// 5-tap band filters, 4 decimated samples per epoch, 3 support vectors. Both channels and the
// 42-feature vector are kept.
//
// All taps, the RBF model and later the fault-control registers are loaded through the
// configuration bus. Two independent random EEG streams are sent. A reference chain per
// channel (ddhr_ref_pkg) predicts every 42-feature vector. Once faults are programmed, the
// stuck-at rule is applied to the predicted bits. The classifier result is predicted from
// the faulted vector. The testbench checks fv, dval, cls, the epoch count and that faults
// really changed the vector.
module tb_seizure_detector;
  import ddhr_pkg::*;
  import ddhr_ref_pkg::*;
  localparam int DT = 9, BT = 5, EL = 4, NSV = 3, D = 42, FW = 26;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, done, cls, svm_busy, cfg_we = 0;
  logic signed [11:0] in_data [2];
  logic [19:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0;
  logic [FW-1:0] fv [D];
  logic signed [63:0] dval, mdist;
  logic [15:0] epoch_count;
  int checks = 0, failures = 0, results = 0, faulted = 0;

  seizure_detector #(.DEC_TAPS(DT), .BPF_TAPS(BT), .EPOCH_LEN(EL), .NSV(NSV)) dut (.*);
  always #5 clk = ~clk;

  eeg_chan_model ch [2];
  svm_model svm;
  logic [D*FW-1:0] fctrl = '0, fval = '0;
  longint expv [$][$];

  task automatic wr(input logic [3:0] tgt, input int a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = {tgt, 16'(a)}; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  always @(posedge clk) if (rst_n && done) begin
    longint e [$];
    longint dv;
    results++;
    if (expv.size() == 0) begin checks++; failures++; $display("unexpected result"); end
    else begin
      e = expv.pop_front();
      for (int i = 0; i < D; i++) begin
        checks++;
        if (fv[i] !== FW'(e[i])) begin failures++; if (failures < 10) $display("fv[%0d] got %0h exp %0h", i, fv[i], FW'(e[i])); end
      end
      dv = svm.dval(e);
      checks++;
      if (dval !== dv || cls !== (dv >= svm.thresh)) begin failures++; $display("dval %0d exp %0d", dval, dv); end
    end
  end

  initial begin
    longint v0 [21], v1 [21];
    bit r0, r1;
    ch[0] = new(8, EL, BT); ch[1] = new(8, EL, BT);
    svm = new();
    in_data[0] = '0; in_data[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2; c++) begin
      ch[c].dc.delete();
      ch[c].bcf.delete();
    end
    for (int k = 0; k < DT; k++) begin
      longint t;
      t = longint'($urandom_range(0, 4095)) - 2048;
      ch[0].dc.push_back(t); ch[1].dc.push_back(t);
      wr(TGT_EEG_DECIM, k, 64'(t));
    end
    for (int b = 0; b < 7; b++)
      for (int k = 0; k < BT; k++) begin
        longint t;
        t = longint'($urandom_range(0, 255)) - 128;
        ch[0].bcf.push_back(t); ch[1].bcf.push_back(t);
        wr(TGT_EEG_BPF, b * 64 + k, 64'(t));
      end
    svm.d = D; svm.nsv = NSV; svm.kern = 2; svm.kshift = 36;
    svm.gamma = 3000; svm.polyc = 0; svm.bias = -20000; svm.thresh = 5;
    for (int j = 0; j < NSV; j++) begin
      longint row [$];
      row.delete();
      for (int i = 0; i < D; i++) begin
        longint t;
        t = longint'($urandom_range(0, 3000000));
        row.push_back(t);
        wr(TGT_EEG_SVM, j * D + i, 64'(t));
      end
      svm.sv.push_back(row);
      svm.alpha.push_back(longint'($urandom_range(0, 65535)) - 32768);
      wr(TGT_EEG_SVM, int'(SVM_ALPHA_BASE) + j, 64'(svm.alpha[j]));
    end
    wr(TGT_EEG_SVM, int'(SVM_REG_BIAS), 64'(svm.bias));
    wr(TGT_EEG_SVM, int'(SVM_REG_THRESH), 64'(svm.thresh));
    wr(TGT_EEG_SVM, int'(SVM_REG_KERNEL), 64'(KERN_RBF));
    wr(TGT_EEG_SVM, int'(SVM_REG_KSHIFT), 64'(svm.kshift));
    wr(TGT_EEG_SVM, int'(SVM_REG_GAMMA), 64'(svm.gamma));
    wr(TGT_EEG_SVM, int'(SVM_REG_NSV), 64'(NSV));
    for (int i = 0; i < 8 * EL * 7; i++) begin
      longint x0, x1;
      if (i == 8 * EL * 4) begin
        // static faults from here on: word 0 and word 3 of the 1092 node bits; they are set
        // while no classification is reading the vector
        while (results < 2 || svm_busy) @(negedge clk);
        fctrl[63:0] = {$urandom, $urandom}; fval[63:0] = {$urandom, $urandom};
        fctrl[255:192] = {$urandom, $urandom} & {$urandom, $urandom}; fval[255:192] = {$urandom, $urandom};
        wr(TGT_EEG_FAULT, 0, fctrl[63:0]); wr(TGT_EEG_FAULT, 1, fval[63:0]);
        wr(TGT_EEG_FAULT, 6, fctrl[255:192]); wr(TGT_EEG_FAULT, 7, fval[255:192]);
      end
      x0 = longint'($urandom_range(0, 4095)) - 2048;
      x1 = longint'($urandom_range(0, 4095)) - 2048;
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 1; in_data[0] = 12'(x0); in_data[1] = 12'(x1);
      @(posedge clk);
      r0 = ch[0].push(x0, v0);
      r1 = ch[1].push(x1, v1);
      if (r0 != r1) begin checks++; failures++; $display("channel models out of step"); end
      if (r0) begin
        logic [D*FW-1:0] bits, fb;
        longint e [$];
        for (int k = 0; k < 21; k++) begin bits[k*FW +: FW] = FW'(v0[k]); bits[(21+k)*FW +: FW] = FW'(v1[k]); end
        fb = (bits & ~fctrl) | (fval & fctrl);
        if (fb != bits) faulted++;
        e.delete();
        for (int k = 0; k < D; k++) e.push_back(longint'(fb[k*FW +: FW]));
        expv.push_back(e);
      end
      @(negedge clk); in_valid = 0;
      repeat (5) @(negedge clk);   // EEG samples are far apart compared with a classification
    end
    repeat (NSV * (D + 1) + DT + BT + 20) @(negedge clk);
    checks++;
    if (results != 5 || expv.size() != 0) begin failures++; $display("%0d results, %0d pending", results, expv.size()); end
    checks++;
    if (epoch_count != 7) begin failures++; $display("epoch_count %0d", epoch_count); end
    checks++;
    if (faulted == 0) begin failures++; $display("faults never changed a vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
