// outer_acc: outer accumulation of a chunked multiplication, a shifter and an
// adder.
//
// An operand x longer than the 4096-bit multiplier is cut into Z chunks of
// NC = N*DW bits; chunk k times b gives a partial product that belongs at bit
// k*NC. Each partial product arrives as the N coefficients c_i of the
// multiplier, each weighing 2^(DW*i). The block turns them into an integer,
// sum c_i*2^(DW*i), by adding G = ceil(CW/DW) vectors in which the
// coefficients do not overlap, adds the carry left by the previous chunk, emits
// the low NC bits as the finished result chunk k and keeps the rest, shifted
// down by NC, as the carry into chunk k+1. A flush emits the final carry as the
// last chunk. So only one chunk and a short carry are held, whatever Z is, and
// Z partial products take Z + 1 cycles, one per product and one for the
// flush.
//
// Interface: clear zeroes the carry before a new product; acc_en adds the
// coefficient vector coef; flush emits the carry. y_valid, y_chunk and y_last
// are registered: the result chunk appears the cycle after acc_en or flush.
// The streaming window is this design's choice; the document names only a
// shifter and an adder and their cost of Z + 1 cycles.
module outer_acc
  import wntt_pkg::*;
#(
  parameter int unsigned N  = NPTS,
  parameter int unsigned DW = DIGIT_W
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            acc_en,
  input  logic            flush,
  input  coef_t [N-1:0]   coef,
  output logic            y_valid,
  output logic            y_last,
  output logic [N*DW-1:0] y_chunk
);

  localparam int unsigned NC  = N*DW;                 // chunk width
  localparam int unsigned PPW = DW*(N-1) + CW;        // partial product width
  localparam int unsigned SWD = PPW + 1;              // with the carry added
  localparam int unsigned CYW = SWD - NC;             // carry width
  localparam int unsigned G   = (CW + DW - 1) / DW;   // non-overlapping groups

  logic [PPW-1:0] pp;
  logic [SWD-1:0] sum;
  logic [CYW-1:0] carry;

  // partial product: sum over groups of non-overlapping coefficient vectors
  always_comb begin
    pp = '0;
    for (int g = 0; g < G; g++) begin
      logic [PPW-1:0] v;
      v = '0;
      for (int i = g; i < N; i += G) v[DW*i +: CW] = coef[i];
      pp = pp + v;
    end
    sum = SWD'(pp) + SWD'(carry);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry   <= '0;
      y_valid <= 1'b0;
      y_last  <= 1'b0;
      y_chunk <= '0;
    end else begin
      y_valid <= acc_en || flush;
      y_last  <= flush;
      if (clear) begin
        carry <= '0;
      end else if (acc_en) begin
        y_chunk <= sum[NC-1:0];
        carry   <= sum[SWD-1:NC];
      end else if (flush) begin
        y_chunk <= NC'(carry);
        carry   <= '0;
      end
    end
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(acc_en && flush));

endmodule
