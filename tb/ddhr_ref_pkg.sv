// Reference models for the detector and platform testbenches.
//
// They are written from the behaviour the RTL documents (filter equations, epoch rules,
// decision function, wavelet equations), without reuse of RTL code:
//   eeg_chan_model : decimating FIR (>>> 11, saturated to 12 bits), band FIRs, absolute-value
//                    epoch sums saturated to 26 bits, three-epoch vector (newest first)
//   dwt_model      : seven-stage wavelet split with zero history and >>> 14, 34-bit saturation
//   svm_model      : dval = sum_j alpha_j*K(sv_j, x) + b for the three kernels
package ddhr_ref_pkg;

  function automatic longint fir_last(input longint c [$], input longint h [$]);
    longint s = 0;
    for (int k = 0; k < c.size(); k++)
      if (h.size() - 1 - k >= 0) s += c[k] * h[h.size() - 1 - k];
    return s;
  endfunction

  class eeg_chan_model;
    int dec_factor, nb, ne, fw, epoch_len;
    longint dc [$];
    longint bcf [$];     // band taps, band-major: bcf[b*bt + k]
    int bt;
    longint xs [$], ds [$];
    longint esum [7];
    longint ehist [3][7];
    int nd, nep, nx;

    function new(int dec_factor_i, int epoch_len_i, int bt_i);
      dec_factor = dec_factor_i; epoch_len = epoch_len_i; bt = bt_i;
      nb = 7; ne = 3; fw = 26; nd = 0; nep = 0; nx = 0;
      for (int b = 0; b < 7; b++) esum[b] = 0;
    endfunction

    // Push one input sample. Returns 1 when an epoch closed and a full vector is ready in v.
    function automatic bit push(input longint x, output longint v [21]);
      longint s, y;
      longint cq [$];
      bit ready = 0;
      xs.push_back(x);
      nx++;
      if (xs.size() > dc.size()) void'(xs.pop_front());   // keep only the delay line
      if (nx % dec_factor != 0) return 0;
      s = fir_last(dc, xs) >>> 11;
      if (s > 2047) s = 2047;
      if (s < -2048) s = -2048;
      ds.push_back(s);
      if (ds.size() > bt) void'(ds.pop_front());
      for (int b = 0; b < nb; b++) begin
        cq.delete();
        for (int k = 0; k < bt; k++) cq.push_back(bcf[b*bt + k]);
        y = fir_last(cq, ds);
        esum[b] += (y < 0) ? -y : y;
        if (esum[b] > (64'sd1 <<< fw) - 1) esum[b] = (64'sd1 <<< fw) - 1;
      end
      nd++;
      if (nd % epoch_len == 0) begin
        for (int d = ne - 1; d > 0; d--)
          for (int b = 0; b < nb; b++) ehist[d][b] = ehist[d-1][b];
        for (int b = 0; b < nb; b++) begin ehist[0][b] = esum[b]; esum[b] = 0; end
        nep++;
        if (nep >= ne) begin
          ready = 1;
          for (int d = 0; d < ne; d++)
            for (int b = 0; b < nb; b++) v[d*nb + b] = ehist[d][b];
        end
      end
      return ready;
    endfunction
  endclass

  class dwt_model;
    longint h [5], g [5];
    function automatic longint sat(input longint a);
      longint s = a >>> 14;
      longint hi = (64'sd1 <<< 33) - 1;
      if (s > hi) return hi;
      if (s < -hi - 1) return -hi - 1;
      return s;
    endfunction
    function automatic void run(input longint x [$], output longint f [256]);
      longint cur [256], nxt [256];
      int len = 256, base = 0;
      for (int i = 0; i < 256; i++) cur[i] = x[i];
      for (int s = 1; s <= 7; s++) begin
        for (int n = 0; n < len / 2; n++) begin
          longint ah = 0, ag = 0;
          for (int k = 0; k < 5; k++) begin
            int idx = 2 * n + 1 - k;
            if (idx >= 0) begin ah += h[k] * cur[idx]; ag += g[k] * cur[idx]; end
          end
          f[base + n] = sat(ah);
          nxt[n] = sat(ag);
          if (s == 7) f[base + len / 2 + n] = nxt[n];
        end
        for (int n = 0; n < len / 2; n++) cur[n] = nxt[n];
        base += len / 2;
        len /= 2;
      end
    endfunction
  endclass

  // Feature values are passed as signed longint. Sums are kept in 128 bits because the
  // products of 34-bit features exceed 64 bits.
  class svm_model;
    int d, nsv, kern, kshift;
    longint sv [$][$];
    longint alpha [$];
    longint bias, thresh, gamma, polyc;

    function automatic longint kval(int j, longint x [$]);
      logic signed [127:0] s = 0, z;
      longint t, v, n, f;
      for (int i = 0; i < d; i++) begin
        logic signed [127:0] a = 128'(x[i]), b = 128'(sv[j][i]);
        s += (kern == 2) ? (a - b) * (a - b) : a * b;
      end
      z = s >>> kshift;
      if (kern == 0) begin
        if (z > 128'sh0_FFFF_FFFF) return 64'sh0_FFFF_FFFF;
        if (z < -128'sh1_0000_0000) return -64'sh1_0000_0000;
        return longint'(z);
      end else if (kern == 1) begin
        t = (z > 32767) ? 32767 : (z < -32768) ? -32768 : longint'(z);
        t = t + polyc;
        return t * t;
      end else begin
        if (z > 128'hFF_FFFF) z = 128'hFF_FFFF;
        v = longint'(z) * gamma;
        n = v >>> 16;
        f = v & 64'hFFFF;
        return (n > 16) ? 0 : ((65536 - (f >>> 1)) >>> n);
      end
    endfunction

    function automatic longint dval(longint x [$]);
      longint acc = bias;
      for (int j = 0; j < nsv; j++) acc += alpha[j] * kval(j, x);
      return acc;
    endfunction
  endclass

endpackage
