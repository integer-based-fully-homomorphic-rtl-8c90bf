// tb_fhe_mult_full: one complete multiplication block run of the Toy
// instance at full size: the default 1024-point, 4096-bit multiplier and
// x_i of 150,000 bits, i.e. Z = ceil(150000/4096) = 37 chunks.
//
// x_i (random, top chunk trimmed to 150,000 bits) and b_i (random, 936 bits)
// are multiplied; each of the 38 result chunks is compared with a reference
// built from direct negacyclic convolutions mod 12289 of each chunk with b_i,
// and the run must take 37*144 + 1 = 5329 cycles from the first chunk
// accepted to the last result chunk.
module tb_fhe_mult_full;
  import wntt_pkg::*;

  localparam int unsigned NT   = NPTS;
  localparam int unsigned NC   = 4*NT;
  localparam int unsigned XB   = 150000;
  localparam int unsigned BB   = 936;
  localparam int unsigned Z    = (XB + NC - 1) / NC;

  logic clk = 0, rst_n = 0, start = 0, x_valid = 0;
  logic [15:0] z_count;
  logic [NT-1:0][3:0] b_op, x_chunk;
  logic x_ready, y_valid, y_last, busy, done;
  logic [NC-1:0] y_chunk;
  int checks = 0, failures = 0;

  fhe_mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NT-1:0][3:0] xs [Z];
  logic [NC+15:0]     pps [Z];

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

  initial begin
    logic [NT-1:0][3:0] bv;
    logic [NC+16:0] carry, sum;
    int got, cycles, sent;
    bit last_seen;
    bv = '0;
    for (int i = 0; i < BB/4; i++) bv[i] = 4'($urandom);
    for (int k = 0; k < Z; k++) begin
      for (int i = 0; i < NT; i++)
        xs[k][i] = (k*NC + 4*i < XB) ? 4'($urandom) : 4'h0;
      pps[k] = pp_ref(xs[k], bv);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    b_op = bv; z_count = 16'(Z); start = 1;
    @(negedge clk); start = 0;
    carry = '0; got = 0; cycles = -1; last_seen = 0; sent = 0;
    x_valid = 1; x_chunk = xs[0];
    while (!last_seen) begin
      @(posedge clk);
      if (x_valid && x_ready) begin
        sent++;
        if (cycles < 0) cycles = 0;
      end
      @(negedge clk);
      if (cycles >= 0) cycles++;
      x_valid = (sent < Z);
      x_chunk = (sent < Z) ? xs[sent] : '0;
      if (y_valid) begin
        if (!y_last) begin
          sum   = (NC+17)'(pps[got]) + carry;
          carry = sum >> NC;
          checks++;
          if (y_chunk != sum[NC-1:0]) begin failures++; $display("chunk %0d differs", got); end
        end else begin
          checks++;
          if (y_chunk != NC'(carry)) begin failures++; $display("last chunk differs"); end
          last_seen = 1;
        end
        got++;
      end
    end
    checks++;
    if (got != Z + 1) begin failures++; $display("%0d chunks", got); end
    checks++;
    // cycles counts the accepting edge itself
    if (cycles - 1 != Z*144 + 1) begin failures++; $display("cycles %0d, expected %0d", cycles - 1, Z*144 + 1); end
    $display("Toy product: %0d chunks in %0d cycles", got, cycles - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
