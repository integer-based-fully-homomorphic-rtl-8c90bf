// tb_twiddle_lut: self-checking test of the shared power table.
//
// Reads every phi exponent e in [0, 2N) through several ports and compares
// the registered output with phi^e * 2^14 mod 12289, the reference power
// being built by repeated multiplication by 7 in the testbench. It also
// checks that en low holds the output and that the alpha and inverse
// relations used by the multiplier hold: T(2k) is alpha^k*R and
// T(e)*T(2N-e) is R^2 mod p.
module tb_twiddle_lut;
  import wntt_pkg::*;

  localparam int unsigned N  = NPTS;
  localparam int unsigned NP = 4;
  localparam int unsigned EW = $clog2(N) + 1;

  logic clk = 0, en = 0;
  logic [NP-1:0][EW-1:0] addr;
  coef_t [NP-1:0] q;
  int checks = 0, failures = 0;

  twiddle_lut #(.N(N), .NPORTS(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned pw [2*N];     // 7^e * R mod p
  longint unsigned aw [N];       // 49^k * R mod p

  task automatic chk(input longint unsigned got, input longint unsigned exp, input string what, input int e);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s e=%0d got %0d expected %0d", what, e, got, exp);
    end
  endtask

  initial begin
    longint unsigned pl, x, y;
    coef_t held;
    pl = longint'(P);
    x = 1;
    for (int e = 0; e < 2*N; e++) begin
      pw[e] = (x * 16384) % pl;
      x = (x * 7) % pl;
    end
    y = 1;
    for (int k = 0; k < N; k++) begin
      aw[k] = (y * 16384) % pl;
      y = (y * 49) % pl;
    end
    for (int e = 0; e < 2*N; e += NP) begin
      @(negedge clk);
      en = 1;
      for (int p = 0; p < NP; p++) addr[p] = EW'(e + p);
      @(negedge clk);
      en = 0;
      for (int p = 0; p < NP; p++) begin
        chk(longint'(q[p]), pw[e+p], "power", e + p);
        if ((e + p) % 2 == 0 && (e + p) / 2 < N) chk(longint'(q[p]), aw[(e+p)/2], "alpha", e + p);
      end
    end
    // inverse relation through two ports
    for (int e = 1; e < N; e += 37) begin
      @(negedge clk);
      en = 1; addr[0] = EW'(e); addr[1] = EW'(2*N - e);
      @(negedge clk);
      en = 0;
      chk((longint'(q[0]) * longint'(q[1])) % pl, (16384 * 16384) % pl, "inverse", e);
    end
    // en low holds the output
    held = q[0];
    addr[0] = EW'(5);
    @(negedge clk); @(negedge clk);
    chk(longint'(q[0]), longint'(held), "hold", 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
