// Self-checking testbench of al_buffer at a reduced size (4 features of 8 bits, 16 bytes,
// hence 3 entries).
//
// It offers random classification results with random signed distances from the boundary.
// A model of the buffer kept here decides which must be stored: enabled, |mdist| <= margin,
// room left. The testbench checks sel, count, full and dropped after every offer, and it reads
// back every stored vector and label. It also clears the buffer between iterations and checks
// that the enable gates selection. Selection, overflow and clear must each happen.
module tb_al_buffer;
  localparam int D = 4, FW = 8, BYTES = 16, DEPTH = 3;
  logic clk = 0, rst_n = 0, en = 0, cls_done = 0, aux_label = 0, clear = 0;
  logic [63:0] margin = '0;
  logic signed [63:0] mdist = '0;
  logic [FW-1:0] fv [D];
  logic sel, full, rd_label;
  logic [1:0] count;
  logic [15:0] dropped;
  logic [1:0] rd_entry = '0;
  logic [1:0] rd_feat = '0;
  logic [FW-1:0] rd_data;
  int checks = 0, failures = 0, n_sel = 0, n_drop = 0, n_clear = 0;

  al_buffer #(.D(D), .FW(FW), .BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  logic [FW-1:0] mfv [DEPTH][D];
  logic          mlbl [DEPTH];
  int mcount = 0, mdrop = 0;

  initial begin
    logic exp_sel;
    longint dd;
    for (int i = 0; i < D; i++) fv[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 12; it++) begin
      @(negedge clk);
      en = (it != 5);
      margin = 64'($urandom_range(50, 500));
      for (int r = 0; r < 10; r++) begin
        @(negedge clk);
        dd = longint'($urandom_range(0, 2000)) - 1000;
        mdist = dd;
        for (int i = 0; i < D; i++) fv[i] = FW'($urandom);
        aux_label = 1'($urandom);
        cls_done = 1;
        exp_sel = en && ((dd < 0 ? -dd : dd) <= longint'(margin));
        if (exp_sel) begin
          if (mcount < DEPTH) begin
            for (int i = 0; i < D; i++) mfv[mcount][i] = fv[i];
            mlbl[mcount] = aux_label;
            mcount++;
            n_sel++;
          end else begin
            mdrop++;
            n_drop++;
            exp_sel = 0;
          end
        end
        @(negedge clk);
        cls_done = 0;
        checks++;
        if (sel !== exp_sel) begin failures++; $display("sel %0b exp %0b", sel, exp_sel); end
        checks++;
        if (count !== 2'(mcount) || full !== (mcount == DEPTH) || dropped !== 16'(mdrop)) begin
          failures++; $display("count %0d/%0d full %0b dropped %0d/%0d", count, mcount, full, dropped, mdrop);
        end
      end
      // trainer reads the buffer
      for (int e = 0; e < mcount; e++) begin
        rd_entry = 2'(e);
        for (int i = 0; i < D; i++) begin
          rd_feat = 2'(i);
          #1;
          checks++;
          if (rd_data !== mfv[e][i]) begin failures++; $display("entry %0d feat %0d wrong", e, i); end
        end
        checks++;
        if (rd_label !== mlbl[e]) begin failures++; $display("entry %0d label wrong", e); end
      end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      mcount = 0; mdrop = 0; n_clear++;
      checks++;
      if (count !== 0 || dropped !== 0) begin failures++; $display("clear failed"); end
    end
    checks++;
    if (n_sel == 0 || n_drop == 0 || n_clear == 0) begin
      failures++; $display("mechanism missing: sel %0d drop %0d clear %0d", n_sel, n_drop, n_clear);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
