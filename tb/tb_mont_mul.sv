// tb_mont_mul: self-checking test of the modified Montgomery multiplier.
//
// Feeds a new operand pair every cycle (corner values 0, 1, p-1 first, then
// random residues) and checks each result four edges later, the pipeline
// latency to the combinational output, against z*2^14 == a*b (mod 12289) and
// z < 12289.
module tb_mont_mul;
  import wntt_pkg::*;

  logic  clk = 0;
  coef_t a, b, z;
  int checks = 0, failures = 0;

  mont_mul dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NV = 3000;
  coef_t av [NV], bv [NV];

  initial begin
    longint unsigned pl, lhs, rhs;
    pl = longint'(P);
    av[0] = 0;        bv[0] = 5;
    av[1] = 1;        bv[1] = 1;
    av[2] = P - 1;    bv[2] = P - 1;
    av[3] = P - 1;    bv[3] = 1;
    av[4] = 12288;    bv[4] = 12287;
    for (int i = 5; i < NV; i++) begin
      av[i] = coef_t'($urandom_range(P - 1));
      bv[i] = coef_t'($urandom_range(P - 1));
    end
    for (int i = 0; i < NV + 4; i++) begin
      @(negedge clk);
      if (i >= 4) begin
        checks++;
        lhs = (longint'(z) << 14) % pl;
        rhs = (longint'(av[i-4]) * longint'(bv[i-4])) % pl;
        if (lhs != rhs || longint'(z) >= pl) begin
          failures++;
          if (failures < 10) $display("a=%0d b=%0d z=%0d", av[i-4], bv[i-4], z);
        end
      end
      if (i < NV) begin a = av[i]; b = bv[i]; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
