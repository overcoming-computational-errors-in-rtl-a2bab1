// Self-checking testbench of fault_injector with N = 100 nodes (two control words).
//
// With no fault configured the nodes must pass unchanged. It then programs random faultCtrl
// and faultVal words and checks every node against the stuck-at rule
// out = faultCtrl ? faultVal : in, for random node values, before and after reset.
module tb_fault_injector;
  import ddhr_pkg::*;
  localparam int N = 100;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [N-1:0] node_in = '0, node_out;
  logic [15:0] cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_wdata = '0;
  int checks = 0, failures = 0, stuck0 = 0, stuck1 = 0;
  logic [127:0] ctrl = '0, val = '0;

  fault_injector #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic wr(input int a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = 16'(a); cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic check_nodes(input int rounds);
    for (int r = 0; r < rounds; r++) begin
      node_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int i = 0; i < N; i++) begin
        logic e = ctrl[i] ? val[i] : node_in[i];
        checks++;
        if (node_out[i] !== e) begin failures++; $display("node %0d: got %0b exp %0b", i, node_out[i], e); end
        if (ctrl[i] && !val[i] && node_in[i]) stuck0++;
        if (ctrl[i] && val[i] && !node_in[i]) stuck1++;
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_nodes(5);
    for (int it = 0; it < 4; it++) begin
      ctrl = {$urandom, $urandom, $urandom, $urandom} & {$urandom, $urandom, $urandom, $urandom};
      val  = {$urandom, $urandom, $urandom, $urandom};
      wr(0, ctrl[63:0]); wr(1, val[63:0]); wr(2, ctrl[127:64]); wr(3, val[127:64]);
      check_nodes(10);
    end
    rst_n = 0; #1; rst_n = 1; ctrl = '0; val = '0;
    check_nodes(5);
    checks++;
    if (stuck0 == 0 || stuck1 == 0) begin failures++; $display("stuck-at-0/1 not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
