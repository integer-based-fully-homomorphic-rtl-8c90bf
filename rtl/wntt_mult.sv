// wntt_mult: Weighted-NTT multiplier for two N-digit operands (N = 1024 digits
// of 4 bits, a 4096-bit multiplier), all arithmetic mod p = 12289.
//
// It returns the negacyclic convolution of the digit vectors,
//   c_k = sum_{i+j=k} a_i*b_j - sum_{i+j=k+N} a_i*b_j  (mod p),
// which a weighted NTT gets from a plain cyclic NTT of length N without zero
// padding:
//   1. weight      a_i*phi^i, b_i*phi^i                 (one step)
//   2. forward     cyclic NTT with kernel alpha = phi^2  (log2 N stages, both operands)
//   3. pointwise   A_i*B_i                              (one step)
//   4. inverse     cyclic NTT with alpha^-1              (log2 N stages)
//   5. de-factor   multiply by phi^-i                    (one step)
//   6. conversion  multiply by N^-1*R^2, leaving the Montgomery domain
// Every multiplication is a mont_mul (a*b*R^-1). Table entries are phi^e*R, so
// steps 1, 2, 4 and 5 multiply by plain powers; step 3 leaves a factor R^-1
// and step 4 a factor N, both removed by the constant of step 6.
//
// Organisation: two coefficient banks A and B of N residues, each with N
// Montgomery units; all units of a step work in parallel, so a butterfly
// stage of N/2 butterflies takes one step. The forward transform is
// decimation in frequency (natural order in, bit-reversed out) and the
// inverse decimation in time (bit-reversed in, natural out), so no
// reordering is needed. One twiddle_lut with N read ports serves all
// steps. Unit k of a stage is butterfly k; bank B's units work only in
// steps 1 and 2, bank A's in all.
//
// Interface: start (one cycle, while not busy) captures a and b. done pulses
// 12*log2(N) + 23 edges later (143 at N = 1024); c then holds the result
// until the next start. The step order and costs follow the document; the
// bank and unit organisation, the butterfly forms, the folding of N^-1 into
// the conversion constant and the handshake are this design's choices.
module wntt_mult
  import wntt_pkg::*;
#(
  parameter int unsigned N     = NPTS,     // transform length, power of 2
  parameter int unsigned PHI_G = PHI,      // weight factor, order 2N mod p
  parameter int unsigned DW    = DIGIT_W   // bits per digit
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [N-1:0][DW-1:0]   a,
  input  logic [N-1:0][DW-1:0]   b,
  output logic                   busy,
  output logic                   done,
  output coef_t [N-1:0]          c
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned EW   = LOGN + 1;          // phi exponent width
  localparam int unsigned SW   = $clog2(LOGN);

  // N^-1 * R^2 mod p, the conversion constant of step 6
  function automatic longint unsigned conv_const();
    longint unsigned ninv, r2;
    ninv = 1;
    for (int i = 0; i < 32; i++) if (i < LOGN) ninv = (ninv * 6145) % longint'(P);  // 6145 = 2^-1 mod p
    r2 = (longint'(RMODP) * longint'(RMODP)) % longint'(P);
    return (ninv * r2) % longint'(P);
  endfunction
  localparam coef_t KCONV = coef_t'(conv_const());

  // upper and lower index of butterfly j when the butterfly span is 2^hl
  function automatic int unsigned idx_u(int unsigned j, int unsigned hl);
    return ((j >> hl) << (hl + 1)) | (j & ((1 << hl) - 1));
  endfunction

  // ---------------------------------------------------------------- control
  logic   load, lut_en, wb_en;
  phase_e phase;
  logic [SW-1:0] stage;

  wntt_ctrl #(.LOGN(LOGN)) u_ctrl (
    .clk, .rst_n, .start, .load, .busy, .done,
    .phase, .stage, .cyc(), .lut_en, .wb_en
  );

  // ---------------------------------------------------------- twiddle table
  logic [N-1:0][EW-1:0] tw_addr;
  coef_t [N-1:0]        tw;

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned off, hl;
      off = 0; hl = 0;
      tw_addr[k] = '0;
      unique case (phase)
        PH_WEIGHT: tw_addr[k] = EW'(k);
        PH_FWD: begin                        // alpha^(off * N/(2h)), h = 2^hl
          hl  = LOGN - 1 - int'(stage);
          off = k & ((1 << hl) - 1);
          if (k < N/2) tw_addr[k] = EW'(off << (int'(stage) + 1));
        end
        PH_INV: begin                        // alpha^-(off * N/(2h)), h = 2^stage
          off = k & ((1 << int'(stage)) - 1);
          if (k < N/2 && off != 0) tw_addr[k] = EW'(2*N - (off << (LOGN - int'(stage))));
        end
        PH_DEFAC: tw_addr[k] = (k == 0) ? '0 : EW'(2*N - k);
        default:  tw_addr[k] = '0;
      endcase
    end
  end

  twiddle_lut #(.N(N), .PHI_G(PHI_G), .NPORTS(N)) u_lut (
    .clk, .en(lut_en), .addr(tw_addr), .q(tw)
  );

  // ------------------------------------------------------- coefficient banks
  coef_t [N-1:0] bank_a, bank_b;

  // ------------------------------------------------------ Montgomery units
  coef_t [N-1:0] ma_x, ma_y, ma_z;   // bank A units: inputs, result
  coef_t [N-1:0] mb_x, mb_y, mb_z;   // bank B units

  always_comb begin
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned iu, iv, hl;
      ma_x[k] = '0; ma_y[k] = '0;
      mb_x[k] = '0; mb_y[k] = '0;
      hl = (phase == PH_FWD) ? LOGN - 1 - int'(stage) : int'(stage);
      iu = idx_u(k, hl);
      iv = iu + (1 << hl);
      unique case (phase)
        PH_WEIGHT: begin
          ma_x[k] = bank_a[k]; ma_y[k] = tw[k];
          mb_x[k] = bank_b[k]; mb_y[k] = tw[k];
        end
        PH_FWD: if (k < N/2) begin             // (u - v) * w
          ma_x[k] = mod_sub(bank_a[iu], bank_a[iv]); ma_y[k] = tw[k];
          mb_x[k] = mod_sub(bank_b[iu], bank_b[iv]); mb_y[k] = tw[k];
        end
        PH_PWM:   begin ma_x[k] = bank_a[k]; ma_y[k] = bank_b[k]; end
        PH_INV:   if (k < N/2) begin ma_x[k] = bank_a[iv]; ma_y[k] = tw[k]; end  // v * w
        PH_DEFAC: begin ma_x[k] = bank_a[k]; ma_y[k] = tw[k]; end
        PH_CONV:  begin ma_x[k] = bank_a[k]; ma_y[k] = KCONV; end
        default: ;
      endcase
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_unit
    mont_mul u_ma (.clk, .a(ma_x[k]), .b(ma_y[k]), .z(ma_z[k]));
    mont_mul u_mb (.clk, .a(mb_x[k]), .b(mb_y[k]), .z(mb_z[k]));
  end

  // --------------------------------------------------------------- write back
  always_ff @(posedge clk) begin
    if (load) begin
      for (int unsigned k = 0; k < N; k++) begin
        bank_a[k] <= coef_t'(a[k]);
        bank_b[k] <= coef_t'(b[k]);
      end
    end else if (wb_en) begin
      unique case (phase)
        PH_WEIGHT:
          for (int unsigned k = 0; k < N; k++) begin
            bank_a[k] <= ma_z[k];
            bank_b[k] <= mb_z[k];
          end
        PH_FWD:                                  // DIF: (u + v, (u - v) w)
          for (int unsigned j = 0; j < N/2; j++) begin
            int unsigned iu, iv, hl;
            hl = LOGN - 1 - int'(stage);
            iu = idx_u(j, hl);
            iv = iu + (1 << hl);
            bank_a[iu] <= mod_add(bank_a[iu], bank_a[iv]);
            bank_a[iv] <= ma_z[j];
            bank_b[iu] <= mod_add(bank_b[iu], bank_b[iv]);
            bank_b[iv] <= mb_z[j];
          end
        PH_INV:                                  // DIT: (u + v w, u - v w)
          for (int unsigned j = 0; j < N/2; j++) begin
            int unsigned iu, iv, hl;
            hl = int'(stage);
            iu = idx_u(j, hl);
            iv = iu + (1 << hl);
            bank_a[iu] <= mod_add(bank_a[iu], ma_z[j]);
            bank_a[iv] <= mod_sub(bank_a[iu], ma_z[j]);
          end
        PH_PWM, PH_DEFAC, PH_CONV:
          for (int unsigned k = 0; k < N; k++) bank_a[k] <= ma_z[k];
        default: ;
      endcase
    end
  end

  assign c = bank_a;

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("wntt_mult: start while busy is ignored");

endmodule
