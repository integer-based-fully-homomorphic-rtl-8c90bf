// tb_wntt_mult: self-checking test of the Weighted-NTT multiplier.
//
// Runs the multiplier at a reduced length (NT points; phi is 7^(2048/(2*NT)),
// a primitive 2*NT-th root of unity mod 12289) on random, all-maximum, single
// digit and zero operands, and compares every output coefficient with a
// direct O(N^2) negacyclic convolution mod p. It also checks that done comes
// 12*log2(NT) + 23 edges after start and that start is taken back to back.
module tb_wntt_mult;
  import wntt_pkg::*;

  localparam int unsigned NT   = 64;
  localparam int unsigned LOGT = $clog2(NT);

  function automatic int unsigned powm(int unsigned g, int unsigned e);
    longint unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = (r * g) % P;
    return int'(r);
  endfunction
  localparam int unsigned PHI_T = powm(PHI, 2048 / (2*NT));

  logic clk = 0, rst_n = 0, start = 0;
  logic [NT-1:0][3:0] a, b;
  logic busy, done;
  coef_t [NT-1:0] c;
  int checks = 0, failures = 0;

  wntt_mult #(.N(NT), .PHI_G(PHI_T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [NT-1:0][3:0] av, input logic [NT-1:0][3:0] bv);
    longint ref_c [NT];
    int cycles;
    for (int k = 0; k < NT; k++) ref_c[k] = 0;
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < NT; j++)
        if (i + j < NT) ref_c[i+j]      += longint'(av[i]) * longint'(bv[j]);
        else            ref_c[i+j-NT]   -= longint'(av[i]) * longint'(bv[j]);
    a = av; b = bv;
    @(negedge clk); start = 1;
    @(posedge clk); #1 start = 0;
    cycles = 0;
    while (!done) begin @(posedge clk); #1 cycles++; end
    checks++;
    if (cycles != 12*LOGT + 23) begin
      failures++; $display("latency %0d, expected %0d", cycles, 12*LOGT + 23);
    end
    for (int k = 0; k < NT; k++) begin
      longint e;
      e = ref_c[k] % longint'(P); if (e < 0) e += longint'(P);
      checks++;
      if (longint'(c[k]) != e) begin
        failures++;
        if (failures < 10) $display("run %0d coef %0d: got %0d expected %0d", checks, k, c[k], e);
      end
    end
  endtask

  initial begin
    logic [NT-1:0][3:0] av, bv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // all digits at their maximum
    for (int i = 0; i < NT; i++) begin av[i] = 4'hf; bv[i] = 4'hf; end
    run_one(av, bv);
    // single digits: a pure negacyclic shift
    av = '0; bv = '0; av[3] = 4'd5; bv[NT-2] = 4'd7;
    run_one(av, bv);
    av = '0;
    run_one(av, bv);
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < NT; i++) begin av[i] = 4'($urandom); bv[i] = 4'($urandom); end
      run_one(av, bv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
