// tb_fhe_mult_top: end-to-end test of the FHE multiplication block at a
// reduced multiplier (NT = 64 points, 256-bit chunks).
//
// For each product, b_i and Z chunks of x_i are drawn, every result chunk is
// compared with a reference built from a direct negacyclic convolution mod
// 12289 of each chunk with b_i, assembled as sum c_i * 2^(4i) at bit
// 256*k. Products whose digits are small enough that no residue wraps and no
// term crosses the negacyclic boundary are also checked against the plain
// integer product x_i * b_i. The test counts the mechanisms of the block and
// fails if one never happened: input stalls (x_valid low while the block
// waits), carries handed from one chunk to the next, flushes of the last
// carry, exact integer products and a product of Z = 0. Without stalls the
// product must take Z*(12*log2(NT) + 24) + 1 cycles.
module tb_fhe_mult_top;
  import wntt_pkg::*;

  localparam int unsigned NT   = 64;
  localparam int unsigned LOGT = $clog2(NT);
  localparam int unsigned NC   = 4*NT;
  localparam int unsigned ZMAX = 6;
  localparam int unsigned TW   = (ZMAX + 2) * NC;

  function automatic int unsigned powm(int unsigned g, int unsigned e);
    longint unsigned r = 1;
    for (int unsigned i = 0; i < e; i++) r = (r * g) % P;
    return int'(r);
  endfunction
  localparam int unsigned PHI_T = powm(PHI, 2048 / (2*NT));

  logic clk = 0, rst_n = 0, start = 0, x_valid = 0;
  logic [15:0] z_count;
  logic [NT-1:0][3:0] b_op, x_chunk;
  logic x_ready, y_valid, y_last, busy, done;
  logic [NC-1:0] y_chunk;
  int checks = 0, failures = 0;
  int n_stall = 0, n_carry = 0, n_flush = 0, n_exact = 0, n_zero = 0;

  fhe_mult_top #(.N(NT), .PHI_G(PHI_T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // residue-level reference of one chunk's partial product
  function automatic logic [NC+15:0] pp_ref(input logic [NT-1:0][3:0] x, input logic [NT-1:0][3:0] b);
    logic [NC+15:0] v;
    longint s;
    v = '0;
    for (int k = 0; k < NT; k++) begin
      s = 0;
      for (int i = 0; i < NT; i++) begin
        if (i <= k) s += longint'(x[i]) * longint'(b[k-i]);
        else        s -= longint'(x[i]) * longint'(b[k-i+NT]);
      end
      s = s % longint'(P); if (s < 0) s += longint'(P);
      v = v + ((NC+16)'(s) << (4*k));
    end
    return v;
  endfunction

  // one product; digits of x and b limited to dmax, nonzero only below dlen
  task automatic run_product(input int z, input int dmax, input int dlen, input bit stalls);
    logic [NT-1:0][3:0] xs [ZMAX];
    logic [NT-1:0][3:0] bv;
    logic [TW-1:0] total, exact, xint;
    logic [NC+15:0] pp;
    int got, cycles, t0;
    bit last_seen;
    bv = '0;
    for (int i = 0; i < dlen; i++) bv[i] = 4'($urandom_range(dmax));
    total = '0; xint = '0;
    for (int k = 0; k < z; k++) begin
      xs[k] = '0;
      for (int i = 0; i < dlen; i++) xs[k][i] = 4'($urandom_range(dmax));
      xint = xint | (TW'(xs[k]) << (NC*k));
      pp = pp_ref(xs[k], bv);
      if (pp[NC +: 16] != 0) n_carry++;
      total = total + (TW'(pp) << (NC*k));
    end
    exact = xint * TW'(bv);
    @(negedge clk);
    b_op = bv; z_count = 16'(z); start = 1;
    @(negedge clk); start = 0;
    got = 0; cycles = 0; t0 = -1; last_seen = 0;
    for (int k = 0; k < z; k++) begin
      x_chunk = xs[k];
      if (stalls) begin
        repeat ($urandom_range(3, 1)) begin
          x_valid = 0;
          @(negedge clk); cycles++;
          if (x_ready) n_stall++;
          if (y_valid) begin
            chk(y_chunk == total[NC*got +: NC], $sformatf("chunk %0d", got)); got++;
          end
        end
      end
      x_valid = 1;
      while (!x_ready) begin
        @(negedge clk); cycles++;
        if (y_valid) begin
          chk(y_chunk == total[NC*got +: NC], $sformatf("chunk %0d", got)); got++;
        end
      end
      if (t0 < 0) t0 = cycles;
      @(negedge clk); cycles++;
      x_valid = 0;
      if (y_valid) begin
        chk(y_chunk == total[NC*got +: NC], $sformatf("chunk %0d", got)); got++;
      end
    end
    while (!last_seen) begin
      @(negedge clk); cycles++;
      if (y_valid) begin
        chk(y_chunk == total[NC*got +: NC], $sformatf("chunk %0d", got));
        got++;
        if (y_last) begin last_seen = 1; n_flush++; chk(done, "done with last chunk"); end
      end
    end
    chk(got == z + 1, $sformatf("%0d chunks for Z=%0d", got, z));
    if (!stalls && z > 0)
      chk(cycles - t0 - 1 == z*(12*LOGT + 24) + 1, $sformatf("cycles %0d for Z=%0d", cycles - t0 - 1, z));
    if (z == 0) n_zero++;
    if (total == exact) begin
      n_exact++;
      chk(1'b1, "exact");
    end
    chk(!(dmax <= 3 && 2*dlen <= NT) || total == exact, "small operands give the integer product");
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run_product(1, 15, NT, 0);
    run_product(4, 15, NT, 0);
    run_product(3, 15, NT, 1);
    run_product(5, 3, NT/2, 0);      // exact integer product
    run_product(2, 2, NT/2, 1);
    run_product(0, 15, NT, 0);
    run_product(ZMAX, 15, NT, 1);
    $display("stalls=%0d carries=%0d flushes=%0d exact=%0d zero=%0d", n_stall, n_carry, n_flush, n_exact, n_zero);
    chk(n_stall > 0, "a stall happened");
    chk(n_carry > 0, "a carry crossed chunks");
    chk(n_flush == 7, "every product flushed");
    chk(n_exact > 0, "an exact integer product");
    chk(n_zero > 0, "an empty product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
