// twiddle_lut: the one pre-computed table of the Weighted-NTT, shared by the
// weight factor phi, the NTT kernel alpha = phi^2 and both their inverses.
//
// The table holds N entries, entry i = phi^i * R mod p: the powers of the
// weight factor, pre-reduced mod p and stored in Montgomery form so that one
// Montgomery multiplication by an entry multiplies by the plain power phi^i.
// Because phi has order 2N and phi^N = -1, every power of phi, alpha and their
// inverses is an entry or its negation:
//   phi^e          e in [0, 2N):  e < N ? T[e] : p - T[e - N]
//   alpha^k        = phi^(2k mod 2N)
//   phi^-i         = phi^(2N - i)
//   alpha^-k       = phi^(2N - 2k)
// so each read port takes a phi exponent e of log2(N)+1 bits. N entries
// replace the 3N of a table per constant. The entries are computed at
// elaboration (square and multiply), not read from a file.
//
// Timing: NPORTS independent read ports, one cycle: q[k] is registered on the
// rising edge when en is high.
module twiddle_lut
  import wntt_pkg::*;
#(
  parameter int unsigned N      = NPTS,   // table entries = transform length
  parameter int unsigned PHI_G  = PHI,    // weight factor, order 2N mod p
  parameter int unsigned NPORTS = NPTS    // parallel read ports
) (
  input  logic                        clk,
  input  logic                        en,
  input  logic [NPORTS-1:0][$clog2(N):0] addr,   // phi exponent, [0, 2N)
  output coef_t [NPORTS-1:0]          q
);

  localparam int unsigned LOGN = $clog2(N);

  localparam longint unsigned PL = longint'(P);

  // g^e mod p by square and multiply
  function automatic longint unsigned pow_mod(longint unsigned g, longint unsigned e);
    longint unsigned r, bs, x;
    r = 1; bs = g % PL; x = e;
    for (int s = 0; s < 32; s++) begin
      if (x[0]) r = (r * bs) % PL;
      bs = (bs * bs) % PL;
      x = x >> 1;
    end
    return r;
  endfunction

  coef_t rom [N];

  for (genvar i = 0; i < N; i++) begin : g_rom
    localparam longint unsigned V = (pow_mod(longint'(PHI_G), longint'(i)) * longint'(RMODP)) % PL;
    assign rom[i] = coef_t'(V);
  end

  for (genvar k = 0; k < NPORTS; k++) begin : g_port
    coef_t v;
    always_comb v = rom[addr[k][LOGN-1:0]];
    always_ff @(posedge clk)
      if (en) q[k] <= addr[k][LOGN] ? coef_t'(P - int'(v)) : v;
  end

endmodule
