// Self-checking testbench of svm_classifier at a reduced size (D = 6 features of 12 bits,
// up to 5 support vectors, signed features).
//
// For each of the linear, degree-2 polynomial and RBF kernels it loads random models (support
// vectors, y*alpha, bias, threshold, kernel constants, active count), classifies random
// vectors and compares dval, cls and mdist with a reference written here from the decision
// function. It also checks the schedule: done must rise nsv*(D+1)+2 cycles after start. Both
// classes must occur.
module tb_svm_classifier;
  import ddhr_pkg::*;
  localparam int D = 6, FW = 12, NSV = 5;
  logic clk = 0, rst_n = 0, start = 0, busy, done, cls, cfg_we = 0;
  logic [FW-1:0] fv [D];
  logic signed [63:0] dval, mdist;
  logic [15:0] cfg_addr = '0;
  logic [63:0] cfg_wdata = '0;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  int kern_seen [3];

  svm_classifier #(.D(D), .FW(FW), .FEAT_SIGNED(1'b1), .NSV(NSV)) dut (.*);
  always #5 clk = ~clk;

  longint sv [NSV][D];
  longint alpha [NSV];
  longint bias, thresh, gamma, polyc;
  int kshift, nsv, kern;

  task automatic wr(input int a, input longint d);
    @(negedge clk); cfg_we = 1; cfg_addr = 16'(a); cfg_wdata = 64'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  function automatic longint sx(input longint v);   // FW-bit two's complement value
    return (v >= (64'sd1 <<< (FW-1))) ? v - (64'sd1 <<< FW) : v;
  endfunction

  function automatic longint kval(input int j, input longint x [D]);
    longint s = 0, z, t, v, n, f;
    for (int i = 0; i < D; i++)
      s += (kern == 2) ? (x[i] - sv[j][i]) * (x[i] - sv[j][i]) : x[i] * sv[j][i];
    z = s >>> kshift;
    if (kern == 0) begin
      if (z > 64'sh0_FFFF_FFFF) z = 64'sh0_FFFF_FFFF;
      if (z < -64'sh1_0000_0000) z = -64'sh1_0000_0000;
      return z;
    end else if (kern == 1) begin
      t = (z > 32767) ? 32767 : (z < -32768) ? -32768 : z;
      t = t + polyc;
      return t * t;
    end else begin
      if (z > 64'hFF_FFFF) z = 64'hFF_FFFF;
      v = z * gamma;
      n = v >>> 16;
      f = v & 64'hFFFF;
      return (n > 16) ? 0 : ((65536 - (f >>> 1)) >>> n);
    end
  endfunction

  initial begin
    longint x [D];
    longint dv;
    int t0, lat;
    for (int i = 0; i < D; i++) fv[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 24; m++) begin
      kern   = m % 3;
      nsv    = (m == 3) ? 0 : int'($urandom_range(1, NSV));
      kshift = (kern == 0) ? int'($urandom_range(0, 4)) : (kern == 1) ? int'($urandom_range(8, 12)) : int'($urandom_range(4, 8));
      gamma  = longint'($urandom_range(0, 65535)) >> $urandom_range(0, 8);
      polyc  = longint'($urandom_range(0, 4095)) - 2048;
      bias   = longint'($urandom_range(0, 2000000)) - 1000000;
      thresh = longint'($urandom_range(0, 200000)) - 100000;
      for (int j = 0; j < NSV; j++) begin
        alpha[j] = longint'($urandom_range(0, 65535)) - 32768;
        for (int i = 0; i < D; i++) begin
          sv[j][i] = sx(longint'($urandom_range(0, 4095)));
          wr(j * D + i, sv[j][i]);
        end
        wr(int'(SVM_ALPHA_BASE) + j, alpha[j]);
      end
      wr(int'(SVM_REG_BIAS), bias);
      wr(int'(SVM_REG_THRESH), thresh);
      wr(int'(SVM_REG_KERNEL), kern);
      wr(int'(SVM_REG_KSHIFT), kshift);
      wr(int'(SVM_REG_GAMMA), gamma);
      wr(int'(SVM_REG_POLYC), polyc);
      wr(int'(SVM_REG_NSV), nsv);
      kern_seen[kern]++;
      for (int r = 0; r < 6; r++) begin
        for (int i = 0; i < D; i++) begin
          // vectors near a support vector make RBF kernels large
          x[i] = (r % 2 && nsv > 0) ? sx((sv[0][i] + $urandom_range(0, 15)) & 12'hFFF) : sx(longint'($urandom_range(0, 4095)));
          fv[i] = FW'(x[i]);
        end
        dv = bias;
        for (int j = 0; j < nsv; j++) dv += alpha[j] * kval(j, x);
        @(negedge clk); start = 1;
        @(posedge clk); t0 = $time;
        @(negedge clk); start = 0;
        while (!done) @(negedge clk);
        lat = (int'($time) - t0 + 5) / 10;
        checks++;
        if (lat != nsv * (D + 1) + 2) begin failures++; $display("latency %0d exp %0d", lat, nsv * (D + 1) + 2); end
        checks++;
        if (dval !== dv) begin failures++; $display("model %0d kern %0d: dval %0d exp %0d", m, kern, dval, dv); end
        checks++;
        if (cls !== (dv >= thresh)) begin failures++; $display("cls wrong"); end
        checks++;
        if (mdist !== dv - thresh) begin failures++; $display("mdist wrong"); end
        if (dv >= thresh) n_pos++; else n_neg++;
      end
    end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin failures++; $display("one class never produced"); end
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
