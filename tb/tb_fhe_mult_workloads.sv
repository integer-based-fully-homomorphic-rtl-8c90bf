// tb_fhe_mult_workloads: the Small, Medium and Large multiplication-block
// instances on the full-size design (1024-point, 4096-bit multiplier).
//
//   instance  x_i bits    b_i bits  Z     cycles Z*144+1
//   Small       830,000   1,476      203   29,233
//   Medium    4,200,000   2,016    1,026  147,745
//   Large    19,000,000   2,556    4,639  668,017
//
// Small runs with dense random x_i chunks, checked against a direct
// negacyclic convolution mod 12289 per chunk. Medium and Large use sparse
// chunks (one random nonzero digit per chunk, at a random place), whose
// partial product is a scaled negacyclic shift of b_i and can be checked in
// O(N) per chunk; this keeps the reference cheap while every chunk still
// passes through the whole multiplier. Every result chunk and the cycle
// count of each product are checked.
module tb_fhe_mult_workloads;
  import wntt_pkg::*;

  localparam int unsigned NT = NPTS;
  localparam int unsigned NC = 4*NT;

  logic clk = 0, rst_n = 0, start = 0, x_valid = 0;
  logic [15:0] z_count;
  logic [NT-1:0][3:0] b_op, x_chunk;
  logic x_ready, y_valid, y_last, busy, done;
  logic [NC-1:0] y_chunk;
  int checks = 0, failures = 0;

  fhe_mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (900000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NT-1:0][3:0] bv;

  // residues of the negacyclic convolution of x with b, as an integer
  function automatic logic [NC+15:0] to_int(input longint cs [NT]);
    logic [NC+15:0] v;
    longint s;
    v = '0;
    for (int k = 0; k < NT; k++) begin
      s = cs[k] % longint'(P); if (s < 0) s += longint'(P);
      v = v + ((NC+16)'(s) << (4*k));
    end
    return v;
  endfunction

  function automatic logic [NC+15:0] pp_dense(input logic [NT-1:0][3:0] x);
    longint cs [NT];
    for (int k = 0; k < NT; k++) begin
      cs[k] = 0;
      for (int i = 0; i < NT; i++)
        if (i <= k) cs[k] += longint'(x[i]) * longint'(bv[k-i]);
        else        cs[k] -= longint'(x[i]) * longint'(bv[k-i+NT]);
    end
    return to_int(cs);
  endfunction

  // x has the single digit d at position pos
  function automatic logic [NC+15:0] pp_sparse(input int pos, input int d);
    longint cs [NT];
    for (int k = 0; k < NT; k++)
      cs[k] = (k >= pos) ? longint'(d) * longint'(bv[k-pos]) : -longint'(d) * longint'(bv[k-pos+NT]);
    return to_int(cs);
  endfunction

  task automatic run_instance(input string name, input int xbits, input int bbits, input bit dense);
    int z, sent, got, cycles;
    int pos, dig;
    logic [NC+16:0] carry, sum;
    logic [NC+15:0] pp_next;
    bit last_seen;
    z = (xbits + NC - 1) / NC;
    bv = '0;
    for (int i = 0; i < bbits/4; i++) bv[i] = 4'($urandom);
    @(negedge clk);
    b_op = bv; z_count = 16'(z); start = 1;
    @(negedge clk); start = 0;
    sent = 0; got = 0; cycles = -1; last_seen = 0; carry = '0;
    // partial products are kept in a queue in chunk order
    begin
      logic [NC+15:0] ppq [$];
      // prepare chunk 0
      x_chunk = '0;
      if (dense) begin
        for (int i = 0; i < NT; i++) x_chunk[i] = (4*i < xbits) ? 4'($urandom) : 4'h0;
        ppq.push_back(pp_dense(x_chunk));
      end else begin
        pos = $urandom_range(NT - 1); dig = $urandom_range(15, 1);
        x_chunk[pos] = 4'(dig);
        ppq.push_back(pp_sparse(pos, dig));
      end
      x_valid = 1;
      while (!last_seen) begin
        @(posedge clk);
        if (x_valid && x_ready) begin
          sent++;
          if (cycles < 0) cycles = 0;
        end
        @(negedge clk);
        if (cycles >= 0) cycles++;
        if (sent < z && sent == got + ppq.size()) begin
          // previous chunk was taken: prepare the next one
          x_chunk = '0;
          if (dense) begin
            for (int i = 0; i < NT; i++) x_chunk[i] = (sent*NC + 4*i < xbits) ? 4'($urandom) : 4'h0;
            ppq.push_back(pp_dense(x_chunk));
          end else begin
            pos = $urandom_range(NT - 1); dig = $urandom_range(15, 1);
            x_chunk[pos] = 4'(dig);
            ppq.push_back(pp_sparse(pos, dig));
          end
        end
        x_valid = (sent < z);
        if (y_valid) begin
          checks++;
          if (!y_last) begin
            sum   = (NC+17)'(ppq.pop_front()) + carry;
            carry = sum >> NC;
            if (y_chunk != sum[NC-1:0]) begin
              failures++;
              if (failures < 5) $display("%s: chunk %0d differs", name, got);
            end
          end else begin
            if (y_chunk != NC'(carry)) begin failures++; $display("%s: last chunk differs", name); end
            last_seen = 1;
          end
          got++;
        end
      end
    end
    checks++;
    if (got != z + 1) begin failures++; $display("%s: %0d chunks", name, got); end
    checks++;
    // cycles counts the accepting edge itself
    if (cycles - 1 != z*144 + 1) begin failures++; $display("%s: cycles %0d, expected %0d", name, cycles - 1, z*144 + 1); end
    $display("%s: Z=%0d, %0d result chunks in %0d cycles", name, z, got, cycles - 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_instance("Small",   830000,   1476, 1'b1);
    run_instance("Medium", 4200000,   2016, 1'b0);
    run_instance("Large", 19000000,   2556, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
