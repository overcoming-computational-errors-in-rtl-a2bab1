// Fault-protected SVM classifier (the "ML kernel").
//
// It evaluates the decision value dval = sum_j (y_j*alpha_j)*K(sv_j, x) + b over the loaded
// support vectors. It declares class 1 when dval >= thresh. The decision value is the marginal
// distance that active learning uses to pick training vectors. The trainer reloads the model
// (support vectors, y_j*alpha_j, b, threshold, kernel and its constants) at run time through
// the cfg_* write port. Its register map is in ddhr_pkg.
//
// Arithmetic. One multiply-accumulate per cycle runs over the D features of a support vector.
// It forms the dot product x.sv (linear and polynomial kernels) or the squared distance
// |x - sv|^2 (RBF kernel) in full precision. That sum s is scaled as z = s >>> kshift, and
// then:
//   linear : K = z                               (saturated to 33 bits)
//   poly2  : K = (sat16(z) + poly_c)^2           (degree 2)
//   rbf    : K = 2^16 * 2^-(sat24(z)*gamma/2^16)  = 2^16 * exp(-|x-sv|^2 / (2 sigma^2))
// The RBF exponential is 2^-v with v split into integer part n and fraction f. 2^-f is taken
// as the chord 1 - f/2, which is exact at f = 0 and 1 and at most 6.1 % high in between.
// Choose gamma = 2^(16+kshift) * log2(e) / (2 sigma^2).
//
// Interface: a start pulse begins a classification of fv. fv must stay stable while busy.
// done pulses with dval, cls and mdist = dval - thresh valid (the signed distance from the
// decision boundary), and all three hold until the next result.
// Timing: done rises nsv*(D+1)+2 cycles after start, where nsv is the number of loaded
// support vectors: D multiply-accumulate cycles plus one kernel cycle per support vector, and
// one cycle for the bias and threshold.
// The decision function, the kernel types and the threshold comparison follow the document.
// The polynomial degree, the fixed-point formats, the exponential approximation and the
// sequential schedule are this design's choices.
module svm_classifier
  import ddhr_pkg::*;
#(
  parameter int unsigned D           = 42,
  parameter int unsigned FW          = 26,
  parameter bit          FEAT_SIGNED = 1'b0,
  parameter int unsigned NSV         = 16,
  parameter int unsigned ALPHA_W     = 16,
  parameter int unsigned DV_W        = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [FW-1:0]          fv [D],
  output logic                   busy,
  output logic                   done,
  output logic signed [DV_W-1:0] dval,
  output logic                   cls,
  output logic signed [DV_W-1:0] mdist,
  input  logic                   cfg_we,
  input  logic [15:0]            cfg_addr,
  input  logic [CFG_DW-1:0]      cfg_wdata
);

  localparam int unsigned XW    = FW + 1;                   // feature as signed value
  localparam int unsigned PW    = 2 * (XW + 1);             // product / squared difference
  localparam int unsigned ACC_W = PW + $clog2(D) + 1;
  localparam int unsigned KV_W  = 33;                       // kernel value, signed
  localparam int unsigned ZW    = (ACC_W > 40) ? ACC_W : 40;  // scaled sum, room for limits
  localparam int unsigned MW    = $clog2(NSV * D);
  localparam int unsigned IW    = $clog2(D);
  localparam int unsigned JW    = $clog2(NSV + 1);
  localparam int unsigned SW    = $clog2(NSV);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_KERN, S_FIN} state_e;

  // model memory
  logic [FW-1:0]             svmem [NSV*D];
  logic signed [ALPHA_W-1:0] alpha [NSV];
  logic signed [DV_W-1:0]    bias, thresh;
  kernel_e                   kern;
  logic [7:0]                kshift;
  logic [15:0]               gamma;
  logic signed [15:0]        poly_c;
  logic [JW-1:0]             nsv;

  state_e                    state;
  logic [IW-1:0]             fi;        // feature index
  logic [JW-1:0]             sj;        // support-vector index
  logic [MW-1:0]             mptr;      // sj*D + fi
  logic signed [ACC_W-1:0]   acc;
  logic signed [DV_W-1:0]    dacc;

  function automatic logic signed [XW-1:0] ext(input logic [FW-1:0] v);
    if (FEAT_SIGNED) return {v[FW-1], v};
    else             return {1'b0, v};
  endfunction

  // ---------------- configuration writes ----------------
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_addr < 16'(NSV * D)) svmem[MW'(cfg_addr)] <= cfg_wdata[FW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NSV; j++) alpha[j] <= '0;
      bias   <= '0;
      thresh <= '0;
      kern   <= KERN_RBF;
      kshift <= '0;
      gamma  <= '0;
      poly_c <= '0;
      nsv    <= '0;
    end else if (cfg_we) begin
      if (cfg_addr >= SVM_ALPHA_BASE && cfg_addr < SVM_ALPHA_BASE + 16'(NSV))
        alpha[SW'(cfg_addr - SVM_ALPHA_BASE)] <= cfg_wdata[ALPHA_W-1:0];
      case (cfg_addr)
        SVM_REG_BIAS:   bias   <= cfg_wdata[DV_W-1:0];
        SVM_REG_THRESH: thresh <= cfg_wdata[DV_W-1:0];
        SVM_REG_KERNEL: kern   <= kernel_e'(cfg_wdata[1:0]);
        SVM_REG_KSHIFT: kshift <= cfg_wdata[7:0];
        SVM_REG_GAMMA:  gamma  <= cfg_wdata[15:0];
        SVM_REG_POLYC:  poly_c <= cfg_wdata[15:0];
        SVM_REG_NSV:    nsv    <= (cfg_wdata > 64'(NSV)) ? JW'(NSV) : JW'(cfg_wdata);
        default: ;
      endcase
    end
  end

  // ---------------- datapath ----------------
  logic signed [XW-1:0]    xa, sb;
  logic signed [XW:0]      diff;
  logic signed [PW-1:0]    prod;
  logic signed [ZW-1:0]    z;
  logic signed [KV_W-1:0]  kval;
  logic signed [16:0]      pt;
  logic [23:0]             zr;
  logic [39:0]             v;
  logic [16:0]             mant;
  logic signed [ALPHA_W+KV_W-1:0] term;

  always_comb begin
    xa   = ext(fv[fi]);
    sb   = ext(svmem[mptr]);
    diff = (XW+1)'(xa) - (XW+1)'(sb);
    if (kern == KERN_RBF) prod = PW'(diff * diff);
    else                  prod = PW'(xa * sb);

    z    = ZW'(acc >>> kshift);
    pt   = '0;
    zr   = '0;
    v    = '0;
    mant = '0;
    unique case (kern)
      KERN_POLY2: begin
        if (z > ZW'(32767))          pt = 17'sd32767;
        else if (z < -ZW'(32768))    pt = -17'sd32768;
        else                         pt = 17'(z);
        pt   = pt + 17'(poly_c);
        kval = KV_W'(pt * pt);      // at most 2^32, fits 33-bit signed
      end
      KERN_RBF: begin
        zr   = (z > ZW'(24'hFF_FFFF)) ? 24'hFF_FFFF : 24'(z);   // z >= 0 here
        v    = 40'(zr) * 40'(gamma);
        mant = 17'h10000 - 17'(v[15:1]);                  // 2^16 * (1 - f/2), v[0] below resolution
        kval = (v[39:16] > 24'd16) ? '0 : KV_W'(mant >> v[20:16]);
      end
      default: begin
        if (z > ZW'(64'sh0_FFFF_FFFF))          kval = 33'sh0_FFFF_FFFF;
        else if (z < -ZW'(64'sh1_0000_0000))    kval = -33'sh1_0000_0000;
        else                                    kval = KV_W'(z);
      end
    endcase
    term = alpha[SW'(sj)] * kval;   // sj < nsv <= NSV here
  end

  // ---------------- control ----------------
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      fi    <= '0;
      sj    <= '0;
      mptr  <= '0;
      acc   <= '0;
      dacc  <= '0;
      done  <= 1'b0;
      dval  <= '0;
      cls   <= 1'b0;
      mdist <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          fi    <= '0;
          sj    <= '0;
          mptr  <= '0;
          acc   <= '0;
          dacc  <= '0;
          state <= (nsv == '0) ? S_FIN : S_MAC;
        end
        S_MAC: begin
          acc  <= acc + ACC_W'(prod);
          mptr <= mptr + 1'b1;
          if (fi == IW'(D - 1)) begin
            fi    <= '0;
            state <= S_KERN;
          end else begin
            fi <= fi + 1'b1;
          end
        end
        S_KERN: begin
          dacc <= dacc + DV_W'(term);
          acc  <= '0;
          sj   <= sj + 1'b1;
          state <= (sj + 1'b1 == nsv) ? S_FIN : S_MAC;
        end
        S_FIN: begin
          dval  <= dacc + bias;
          cls   <= (dacc + bias) >= thresh;
          mdist <= dacc + bias - thresh;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

endmodule
