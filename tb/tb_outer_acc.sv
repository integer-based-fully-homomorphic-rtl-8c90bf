// tb_outer_acc: self-checking test of the outer accumulator at N = 1024.
//
// Feeds Z coefficient vectors (all 12288, then random residues) as the
// partial products of chunks 0..Z-1, then a flush, and compares the Z + 1
// emitted chunks with sum_k sum_i c_(k,i) * 2^(4i + 4096k) built in a wide
// vector by the testbench. Checks the one-cycle output timing, y_last on the
// flush only, and that clear drops a pending carry.
module tb_outer_acc;
  import wntt_pkg::*;

  localparam int unsigned N  = NPTS;
  localparam int unsigned NC = 4*N;
  localparam int unsigned Z  = 3;
  localparam int unsigned TW = (Z + 2) * NC;

  logic clk = 0, rst_n = 0, clear = 0, acc_en = 0, flush = 0;
  coef_t [N-1:0] coef;
  logic y_valid, y_last;
  logic [NC-1:0] y_chunk;
  int checks = 0, failures = 0;

  outer_acc #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_product(input bit all_max);
    logic [TW-1:0] total;
    total = '0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int k = 0; k < Z; k++) begin
      for (int i = 0; i < N; i++) begin
        coef[i] = all_max ? coef_t'(P - 1) : coef_t'($urandom_range(P - 1));
        total = total + (TW'(coef[i]) << (4*i + NC*k));
      end
      acc_en = 1;
      @(negedge clk); acc_en = 0;
      chk(y_valid && !y_last, "chunk valid");
      chk(y_chunk == total[NC*k +: NC], $sformatf("chunk %0d", k));
    end
    flush = 1;
    @(negedge clk); flush = 0;
    chk(y_valid && y_last, "last chunk flagged");
    chk(y_chunk == total[NC*Z +: NC], "final carry chunk");
    chk(total[TW-1:NC*(Z+1)] == '0, "reference fits");
    @(negedge clk);
    chk(!y_valid, "valid is one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_product(1'b1);
    run_product(1'b0);
    run_product(1'b0);
    // a carry left pending is dropped by clear
    for (int i = 0; i < N; i++) coef[i] = coef_t'(P - 1);
    @(negedge clk); acc_en = 1;
    @(negedge clk); acc_en = 0; clear = 1;
    @(negedge clk); clear = 0; flush = 1;
    @(negedge clk); flush = 0;
    chk(y_last && y_chunk == '0, "clear drops carry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
