// fhe_mult_top: the multiplication block of integer-based FHE encryption,
// x_i * b_i with x_i far longer than the multiplier.
//
// b_i (at most NC = N*DW = 4096 bits) is held for the whole product and is
// one operand of the Weighted-NTT multiplier. x_i arrives as Z chunks of NC
// bits, least significant first. Each chunk is multiplied by b_i on the
// multiplier (inner multiplication, 12*log2(N) + 23 cycles) and the partial
// product is added in by the outer accumulator (one cycle), which emits one
// finished NC-bit result chunk per partial product and a last chunk holding
// the final carry. With x chunks always ready the product takes
//   Z*(12*log2(N) + 23) + Z + 1   cycles,
// Z*144 + 1 at N = 1024, from the first chunk accepted to the last result
// chunk. The multiplier computes each partial product as a negacyclic
// convolution with coefficients mod 12289: the result equals the integer
// product only where every convolution sum stays below 12289 and chunk*b_i
// fits in NC bits (see the README); otherwise it is the value those residues
// represent.
//
// Interface: start (while not busy) latches b_op and z_count. Chunks are
// taken on x_valid && x_ready; x_ready is high only when the multiplier can
// start, so a late x_valid stalls the product. y_valid/y_chunk give the result
// chunks in order, Z + 1 in all, the last with y_last; done pulses with it.
// The chunk stream, the handshake and the cycle accounting around the two
// document steps are this design's choices; x_i and b_i come from a key
// store outside this block.
module fhe_mult_top
  import wntt_pkg::*;
#(
  parameter int unsigned N     = NPTS,
  parameter int unsigned PHI_G = PHI,
  parameter int unsigned DW    = DIGIT_W,
  parameter int unsigned ZW    = 16          // chunk count width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [ZW-1:0]        z_count,
  input  logic [N-1:0][DW-1:0] b_op,
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic [N-1:0][DW-1:0] x_chunk,
  output logic                 y_valid,
  output logic                 y_last,
  output logic [N*DW-1:0]      y_chunk,
  output logic                 busy,
  output logic                 done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_e;

  state_e                state;
  logic [N-1:0][DW-1:0]  b_reg;
  logic [ZW-1:0]         zc, issued, finished;
  logic                  m_start, m_busy, m_done;
  coef_t [N-1:0]         m_c;
  logic                  acc_clear, acc_flush;

  // ------------------------------------------------ inner multiplication
  always_comb begin
    x_ready   = (state == S_RUN) && !m_busy && (issued < zc);
    m_start   = x_valid && x_ready;
    acc_clear = (state == S_IDLE) && start;
    acc_flush = (state == S_FLUSH);
    busy      = (state != S_IDLE);
  end

  wntt_mult #(.N(N), .PHI_G(PHI_G), .DW(DW)) u_mult (
    .clk, .rst_n, .start(m_start), .a(x_chunk), .b(b_reg),
    .busy(m_busy), .done(m_done), .c(m_c)
  );

  // ------------------------------------------------ outer accumulation
  outer_acc #(.N(N), .DW(DW)) u_acc (
    .clk, .rst_n, .clear(acc_clear), .acc_en(m_done), .flush(acc_flush),
    .coef(m_c), .y_valid, .y_last, .y_chunk
  );

  assign done = y_last;

  // ------------------------------------------------ chunk sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      zc       <= '0;
      issued   <= '0;
      finished <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          zc       <= z_count;
          issued   <= '0;
          finished <= '0;
          state    <= (z_count == '0) ? S_FLUSH : S_RUN;
        end
        S_RUN: begin
          if (m_start) issued <= issued + 1'b1;
          if (m_done) begin
            finished <= finished + 1'b1;
            if (finished + 1'b1 == zc) state <= S_FLUSH;
          end
        end
        S_FLUSH: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (state == S_IDLE && start) b_reg <= b_op;

endmodule
