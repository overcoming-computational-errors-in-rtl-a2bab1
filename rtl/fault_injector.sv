// Stuck-at fault emulation on a bundle of N circuit nodes, with its fault-control registers.
//
// Each node i passes through a 2:1 multiplexer. While faultCtrl[i] is 0 the node keeps its
// value (mux input 0). While faultCtrl[i] is 1 the node is forced to faultVal[i] (mux input
// 1), a stuck-at-0 or stuck-at-1 fault. The fault-control module sets both vectors through
// cfg_we/cfg_addr/cfg_wdata, 64 bits per word. Even addresses 2w write faultCtrl bits
// [64w+63:64w], odd addresses 2w+1 write faultVal bits. Both clear at reset, so that no fault is
// active. The mux is purely combinational and adds no latency.
// The mux arrangement, the signal names faultCtrl/faultVal and static faults set by
// configuration follow the document. Where the nodes sit and the register map are this
// design's choices.
module fault_injector
  import ddhr_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      node_in,
  output logic [N-1:0]      node_out,
  input  logic              cfg_we,
  input  logic [15:0]       cfg_addr,
  input  logic [CFG_DW-1:0] cfg_wdata
);

  localparam int unsigned NW = (N + CFG_DW - 1) / CFG_DW;

  logic [NW*CFG_DW-1:0] ctrl_q, val_q;
  logic [N-1:0]         faultCtrl, faultVal;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NW; w++) begin
        ctrl_q[w*CFG_DW +: CFG_DW] <= '0;
        val_q[w*CFG_DW +: CFG_DW]  <= '0;
      end
    end else if (cfg_we) begin
      for (int w = 0; w < NW; w++) begin
        if (cfg_addr == 16'(2 * w))     ctrl_q[w*CFG_DW +: CFG_DW] <= cfg_wdata;
        if (cfg_addr == 16'(2 * w + 1)) val_q[w*CFG_DW +: CFG_DW]  <= cfg_wdata;
      end
    end
  end

  assign faultCtrl = ctrl_q[N-1:0];
  assign faultVal  = val_q[N-1:0];

  for (genvar i = 0; i < N; i++) begin : g_mux
    assign node_out[i] = faultCtrl[i] ? faultVal[i] : node_in[i];
  end

endmodule
