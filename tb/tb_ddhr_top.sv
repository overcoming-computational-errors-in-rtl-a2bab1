// End-to-end testbench of ddhr_top with every parameter at its default: 2 EEG channels with
// 143-tap decimation and 47-tap band filters, 150-sample epochs, 256-sample ECG sequences
// through 7 wavelet stages, 16 support vectors per classifier, 2 kB training buffers.
//
// The testbench plays the microcontroller. It loads all taps, an initial RBF model for the
// seizure classifier and a polynomial model for the arrhythmia classifier. It turns on active
// learning with a wide margin and supplies auxiliary labels. It streams random EEG (both
// channels) and ECG data at the same time. Reference models (ddhr_ref_pkg) predict every
// feature vector and decision value, and so which vectors active learning must select. When
// a buffer has filled and overflowed, the trainer reads every stored vector and label back,
// loads a new model and clears the buffer. Stuck-at faults are switched on part way through.
// Each mechanism (epoch close, classification, fault injection, selection, buffer overflow,
// buffer read-back, model reload, clear, transform stall) is counted, and one that never
// happens counts as a failure.
module tb_ddhr_top;
  import ddhr_pkg::*;
  import ddhr_ref_pkg::*;
  localparam int ED = 42, EFW = 26, CN = 256, CFW = 34, NSV = 16;
  localparam int EDEPTH = 14, CDEPTH = 1;

  logic clk = 0, rst_n = 0;
  logic eeg_in_valid = 0, eeg_in_ready, ecg_in_valid = 0, ecg_in_ready;
  logic signed [11:0] eeg_in_data [2];
  logic signed [15:0] ecg_in_data = '0;
  logic cfg_we = 0;
  logic [19:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0;
  logic eeg_done, eeg_cls, ecg_done, ecg_cls, eeg_svm_busy, ecg_svm_busy;
  logic signed [63:0] eeg_dval, ecg_dval;
  logic [15:0] eeg_epoch_count;
  logic eeg_aux_label, ecg_aux_label;
  logic eeg_al_clear = 0, ecg_al_clear = 0;
  logic eeg_al_sel, eeg_al_full, ecg_al_sel, ecg_al_full;
  logic [3:0] eeg_al_count;
  logic [0:0] ecg_al_count;
  logic [15:0] eeg_al_dropped, ecg_al_dropped;
  logic [3:0] eeg_rd_entry = '0;
  logic [5:0] eeg_rd_feat = '0;
  logic [EFW-1:0] eeg_rd_data;
  logic eeg_rd_label;
  logic [0:0] ecg_rd_entry = '0;
  logic [7:0] ecg_rd_feat = '0;
  logic [CFW-1:0] ecg_rd_data;
  logic ecg_rd_label;

  ddhr_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_epoch = 0, m_eeg_cls = 0, m_ecg_cls = 0, m_fault = 0, m_eeg_sel = 0, m_ecg_sel = 0;
  int m_eeg_drop = 0, m_ecg_drop = 0, m_readback = 0, m_reload = 0, m_clear = 0, m_stall = 0;

  eeg_chan_model ch [2];
  dwt_model dwt;
  svm_model esvm, csvm;
  logic [ED*EFW-1:0] efctrl = '0, efval = '0;
  logic [CN*CFW-1:0] cfctrl = '0, cfval = '0;
  longint eexp [$][$], cexp [$][$];
  longint emargin = 0, cmargin = 0;
  int eres = 0, cres = 0;
  // model of the buffers' contents
  longint ebuf [$][$], cbuf [$][$];
  bit     elbl [$], clbl [$];
  int     edrop = 0, cdrop = 0;
  bit     eeg_busy_trainer = 0, ecg_busy_trainer = 0;
  bit     done_sending = 0;

  assign eeg_aux_label = eres[0];
  assign ecg_aux_label = ~cres[0];

  task automatic wr(input logic [3:0] tgt, input int a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = {tgt, 16'(a)}; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  // model the classifier results and the active-learning selection
  always @(posedge clk) if (rst_n) begin
    if (eeg_done) begin
      longint e [$];
      longint dv, md;
      m_eeg_cls++;
      if (eexp.size() == 0) begin checks++; failures++; $display("unexpected EEG result"); end
      else begin
        e = eexp.pop_front();
        dv = esvm.dval(e);
        checks++;
        if (eeg_dval !== dv || eeg_cls !== (dv >= esvm.thresh)) begin failures++; $display("EEG dval %0d exp %0d", eeg_dval, dv); end
        md = dv - esvm.thresh;
        if ((md < 0 ? -md : md) <= emargin) begin
          if (ebuf.size() < EDEPTH) begin ebuf.push_back(e); elbl.push_back(eres[0]); m_eeg_sel++; end
          else begin edrop++; m_eeg_drop++; end
        end
      end
      eres <= eres + 1;
    end
    if (ecg_done) begin
      longint e [$];
      longint dv, md;
      m_ecg_cls++;
      if (cexp.size() == 0) begin checks++; failures++; $display("unexpected ECG result"); end
      else begin
        e = cexp.pop_front();
        dv = csvm.dval(e);
        checks++;
        if (ecg_dval !== dv || ecg_cls !== (dv >= csvm.thresh)) begin failures++; $display("ECG dval %0d exp %0d", ecg_dval, dv); end
        md = dv - csvm.thresh;
        if ((md < 0 ? -md : md) <= cmargin) begin
          if (cbuf.size() < CDEPTH) begin cbuf.push_back(e); clbl.push_back(~cres[0]); m_ecg_sel++; end
          else begin cdrop++; m_ecg_drop++; end
        end
      end
      cres <= cres + 1;
    end
  end

  always @(negedge clk) if (rst_n) begin
    #1;
    checks++;
    if (eeg_al_count !== 4'(ebuf.size()) || eeg_al_dropped !== 16'(edrop) ||
        ecg_al_count !== 1'(cbuf.size()) || ecg_al_dropped !== 16'(cdrop)) begin
      failures++;
      if (failures < 10) $display("buffer state: eeg %0d/%0d drop %0d/%0d, ecg %0d/%0d drop %0d/%0d",
        eeg_al_count, ebuf.size(), eeg_al_dropped, edrop, ecg_al_count, cbuf.size(), ecg_al_dropped, cdrop);
    end
  end

  task automatic load_svm(input logic [3:0] tgt, svm_model m, input bit full);
    if (full)
      for (int j = 0; j < m.nsv; j++)
        for (int i = 0; i < m.d; i++) wr(tgt, j * m.d + i, 64'(m.sv[j][i]));
    for (int j = 0; j < m.nsv; j++) wr(tgt, int'(SVM_ALPHA_BASE) + j, 64'(m.alpha[j]));
    wr(tgt, int'(SVM_REG_BIAS), 64'(m.bias));
    wr(tgt, int'(SVM_REG_THRESH), 64'(m.thresh));
    wr(tgt, int'(SVM_REG_KERNEL), 64'(m.kern));
    wr(tgt, int'(SVM_REG_KSHIFT), 64'(m.kshift));
    wr(tgt, int'(SVM_REG_GAMMA), 64'(m.gamma));
    wr(tgt, int'(SVM_REG_POLYC), 64'(m.polyc));
    wr(tgt, int'(SVM_REG_NSV), 64'(m.nsv));
  endtask

  task automatic make_svm(svm_model m, input int d, input int kern, input int kshift,
                          input longint lo, input longint hi);
    m.d = d; m.nsv = NSV; m.kern = kern; m.kshift = kshift;
    m.gamma = 16; m.polyc = 100; m.bias = 1000; m.thresh = 0;
    m.sv.delete(); m.alpha.delete();
    for (int j = 0; j < NSV; j++) begin
      longint row [$];
      row.delete();
      for (int i = 0; i < d; i++) row.push_back(lo + longint'($urandom_range(0, 32'(hi - lo))));
      m.sv.push_back(row);
      m.alpha.push_back(longint'($urandom_range(0, 65535)) - 32768);
    end
  endtask

  // trainer: read back, "train" (new weights), reload, clear
  task automatic eeg_train();
    for (int e = 0; e < ebuf.size(); e++) begin
      eeg_rd_entry = 4'(e);
      for (int i = 0; i < ED; i++) begin
        eeg_rd_feat = 6'(i);
        #1;
        checks++;
        if (eeg_rd_data !== EFW'(ebuf[e][i])) begin failures++; $display("EEG buffer entry %0d feature %0d", e, i); end
      end
      checks++;
      if (eeg_rd_label !== elbl[e]) begin failures++; $display("EEG buffer label %0d", e); end
    end
    m_readback++;
    while (eeg_svm_busy) @(negedge clk);
    for (int j = 0; j < NSV; j++) esvm.alpha[j] = longint'($urandom_range(0, 65535)) - 32768;
    esvm.bias = longint'($urandom_range(0, 100000)) - 50000;
    load_svm(TGT_EEG_SVM, esvm, 0);
    m_reload++;
    @(negedge clk); eeg_al_clear = 1;
    @(negedge clk); eeg_al_clear = 0;
    ebuf.delete(); elbl.delete(); edrop = 0;
    m_clear++;
  endtask

  task automatic ecg_train();
    for (int i = 0; i < CN; i++) begin
      ecg_rd_feat = 8'(i);
      #1;
      checks++;
      if (ecg_rd_data !== CFW'(cbuf[0][i])) begin failures++; $display("ECG buffer feature %0d", i); end
    end
    checks++;
    if (ecg_rd_label !== clbl[0]) begin failures++; $display("ECG buffer label"); end
    m_readback++;
    while (ecg_svm_busy) @(negedge clk);
    for (int j = 0; j < NSV; j++) csvm.alpha[j] = longint'($urandom_range(0, 65535)) - 32768;
    load_svm(TGT_ECG_SVM, csvm, 0);
    m_reload++;
    @(negedge clk); ecg_al_clear = 1;
    @(negedge clk); ecg_al_clear = 0;
    cbuf.delete(); clbl.delete(); cdrop = 0;
    m_clear++;
  endtask

  initial begin
    longint v0 [21], v1 [21];
    ch[0] = new(8, 150, 47); ch[1] = new(8, 150, 47);
    dwt = new(); esvm = new(); csvm = new();
    eeg_in_data[0] = '0; eeg_in_data[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- configuration by the microcontroller ----
    for (int k = 0; k < 143; k++) begin
      longint t;
      t = longint'($urandom_range(0, 255)) - 128;
      ch[0].dc.push_back(t); ch[1].dc.push_back(t);
      wr(TGT_EEG_DECIM, k, 64'(t));
    end
    for (int b = 0; b < 7; b++)
      for (int k = 0; k < 47; k++) begin
        longint t;
        t = longint'($urandom_range(0, 31)) - 16;
        ch[0].bcf.push_back(t); ch[1].bcf.push_back(t);
        wr(TGT_EEG_BPF, b * 64 + k, 64'(t));
      end
    for (int k = 0; k < 5; k++) begin
      dwt.h[k] = longint'($urandom_range(0, 65535)) - 32768;
      dwt.g[k] = longint'($urandom_range(0, 65535)) - 32768;
      wr(TGT_ECG_DWT, k, 64'(dwt.h[k]));
      wr(TGT_ECG_DWT, 8 + k, 64'(dwt.g[k]));
    end
    make_svm(esvm, ED, 2, 36, 0, 4000000);
    make_svm(csvm, CN, 1, 44, -1000000, 1000000);
    load_svm(TGT_EEG_SVM, esvm, 1);
    load_svm(TGT_ECG_SVM, csvm, 1);
    emargin = 64'sh3FFF_FFFF_FFFF_FFFF;   // first iteration: every vector is a candidate
    cmargin = 64'sh3FFF_FFFF_FFFF_FFFF;
    wr(TGT_AL, int'(AL_REG_EEG_MARGIN), 64'(emargin));
    wr(TGT_AL, int'(AL_REG_ECG_MARGIN), 64'(cmargin));
    wr(TGT_AL, int'(AL_REG_EEG_EN), 64'd1);
    wr(TGT_AL, int'(AL_REG_ECG_EN), 64'd1);

    fork
      // ---- EEG stream: 20 epochs, 18 classified vectors ----
      begin
        for (int i = 0; i < 8 * 150 * 20; i++) begin
          longint x0, x1;
          bit r0, r1;
          if (i == 8 * 150 * 10) begin
            // faults on the seizure feature outputs from the 8th vector on
            while (eres < 8 || eeg_svm_busy) @(negedge clk);
            efctrl[63:0] = {$urandom, $urandom} & {$urandom, $urandom};
            efval[63:0]  = {$urandom, $urandom};
            wr(TGT_EEG_FAULT, 0, efctrl[63:0]); wr(TGT_EEG_FAULT, 1, efval[63:0]);
          end
          if (i == 8 * 150 * 19) begin
            while (eres < 17 || eeg_svm_busy) @(negedge clk);
            eeg_train();
          end
          x0 = longint'($urandom_range(0, 4095)) - 2048;
          x1 = longint'($urandom_range(0, 4095)) - 2048;
          @(negedge clk);
          while (!eeg_in_ready) @(negedge clk);
          eeg_in_valid = 1; eeg_in_data[0] = 12'(x0); eeg_in_data[1] = 12'(x1);
          @(posedge clk);
          r0 = ch[0].push(x0, v0);
          r1 = ch[1].push(x1, v1);
          if (r0) begin
            logic [ED*EFW-1:0] bits, fb;
            longint e [$];
            m_epoch++;
            for (int k = 0; k < 21; k++) begin bits[k*EFW +: EFW] = EFW'(v0[k]); bits[(21+k)*EFW +: EFW] = EFW'(v1[k]); end
            fb = (bits & ~efctrl) | (efval & efctrl);
            if (fb != bits) m_fault++;
            e.delete();
            for (int k = 0; k < ED; k++) e.push_back(longint'(fb[k*EFW +: EFW]));
            eexp.push_back(e);
          end
          @(negedge clk); eeg_in_valid = 0;
        end
      end
      // ---- ECG stream: sequences back to back ----
      begin
        for (int sq = 0; sq < 12; sq++) begin
          longint x [$];
          longint f [256];
          logic [CN*CFW-1:0] bits, fb;
          longint e [$];
          if (sq == 4) begin
            while (cres < 4 || ecg_svm_busy) @(negedge clk);
            cfctrl[63:0] = {$urandom, $urandom} & {$urandom, $urandom};
            cfval[63:0]  = {$urandom, $urandom};
            wr(TGT_ECG_FAULT, 0, cfctrl[63:0]); wr(TGT_ECG_FAULT, 1, cfval[63:0]);
          end
          if (sq == 8) begin
            while (cres < 8 || ecg_svm_busy) @(negedge clk);
            ecg_train();
            cmargin = 0;      // second iteration: only vectors on the boundary
            wr(TGT_AL, int'(AL_REG_ECG_MARGIN), 64'(cmargin));
          end
          x.delete();
          for (int i = 0; i < CN; i++) begin
            longint v;
            v = longint'($urandom_range(0, 65535)) - 32768;
            x.push_back(v);
            @(negedge clk);
            while (!ecg_in_ready) @(negedge clk);
            ecg_in_valid = 1; ecg_in_data = 16'(v);
            @(negedge clk); ecg_in_valid = 0;
          end
          if (ecg_svm_busy) m_stall++;
          dwt.run(x, f);
          for (int k = 0; k < CN; k++) bits[k*CFW +: CFW] = CFW'(f[k]);
          fb = (bits & ~cfctrl) | (cfval & cfctrl);
          if (fb != bits) m_fault++;
          e.delete();
          for (int k = 0; k < CN; k++) e.push_back(longint'($signed(fb[k*CFW +: CFW])));
          cexp.push_back(e);
        end
      end
    join
    while (eres < 18 || cres < 12) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (eexp.size() != 0 || cexp.size() != 0) begin failures++; $display("results missing"); end
    checks++;
    if (eeg_epoch_count != 16'd20) begin failures++; $display("epoch count %0d", eeg_epoch_count); end
    $display("mechanisms: epochs %0d eeg_cls %0d ecg_cls %0d faulted %0d eeg_sel %0d ecg_sel %0d eeg_drop %0d ecg_drop %0d readback %0d reload %0d clear %0d stall %0d",
      m_epoch, m_eeg_cls, m_ecg_cls, m_fault, m_eeg_sel, m_ecg_sel, m_eeg_drop, m_ecg_drop, m_readback, m_reload, m_clear, m_stall);
    checks++; if (m_epoch == 0)    begin failures++; $display("no epoch closed"); end
    checks++; if (m_eeg_cls == 0)  begin failures++; $display("no EEG classification"); end
    checks++; if (m_ecg_cls == 0)  begin failures++; $display("no ECG classification"); end
    checks++; if (m_fault == 0)    begin failures++; $display("no fault took effect"); end
    checks++; if (m_eeg_sel == 0 || m_ecg_sel == 0)   begin failures++; $display("no selection"); end
    checks++; if (m_eeg_drop == 0 || m_ecg_drop == 0) begin failures++; $display("no overflow"); end
    checks++; if (m_readback < 2)  begin failures++; $display("no read-back"); end
    checks++; if (m_reload < 2)    begin failures++; $display("no model reload"); end
    checks++; if (m_clear < 2)     begin failures++; $display("no clear"); end
    checks++; if (m_stall == 0)    begin failures++; $display("transform never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
