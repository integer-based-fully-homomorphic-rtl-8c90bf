// wntt_ctrl: step sequencer of one Weighted-NTT multiplication.
//
// It walks the steps in the order and with the cycle costs of the timing
// budget the design is built to: weight factor (6 cycles), log2(N) forward
// butterfly stages (6 each), pointwise products (5), log2(N) inverse stages
// (6 each), de-factoring by phi^-i (6) and Montgomery conversion (6), in all
// 12*log2(N) + 23 cycles. A 6-cycle step is one table read followed by the
// five cycles of the Montgomery multiplier; the pointwise step needs no table
// read. The controller only counts: the datapath acts on its strobes.
//
// Interface: start (one cycle, ignored while busy) begins a multiplication;
// load is start as accepted (operands are captured then). During a step,
// phase/stage name it, cyc counts its cycles, lut_en marks its first cycle
// (table read) and wb_en its last (results written). done pulses for one cycle
// right after the last write, 12*log2(N)+23 edges after the edge that
// accepted start.
module wntt_ctrl
  import wntt_pkg::*;
#(
  parameter int unsigned LOGN = $clog2(NPTS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    load,
  output logic                    busy,
  output logic                    done,
  output phase_e                  phase,
  output logic [$clog2(LOGN)-1:0] stage,
  output logic [2:0]              cyc,
  output logic                    lut_en,
  output logic                    wb_en
);

  localparam logic [2:0] LEN_LUT = 3'd6;   // table read + 5 Montgomery cycles
  localparam logic [2:0] LEN_PWM = 3'd5;   // 5 Montgomery cycles
  localparam int unsigned SW = $clog2(LOGN);

  logic [2:0] len;
  logic       last_stage;

  always_comb begin
    len        = (phase == PH_PWM) ? LEN_PWM : LEN_LUT;
    busy       = (phase != PH_IDLE);
    load       = start && !busy;
    lut_en     = busy && (cyc == 3'd0) && (phase != PH_PWM);
    wb_en      = busy && (cyc == len - 3'd1);
    last_stage = (stage == SW'(LOGN - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      stage <= '0;
      cyc   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        phase <= PH_WEIGHT;
        stage <= '0;
        cyc   <= '0;
      end else if (busy) begin
        if (!wb_en) begin
          cyc <= cyc + 3'd1;
        end else begin
          cyc <= '0;
          unique case (phase)
            PH_WEIGHT: phase <= PH_FWD;
            PH_FWD:    if (last_stage) begin phase <= PH_PWM; stage <= '0; end
                       else stage <= stage + 1'b1;
            PH_PWM:    phase <= PH_INV;
            PH_INV:    if (last_stage) begin phase <= PH_DEFAC; stage <= '0; end
                       else stage <= stage + 1'b1;
            PH_DEFAC:  phase <= PH_CONV;
            PH_CONV:   begin phase <= PH_IDLE; done <= 1'b1; end
            default:   phase <= PH_IDLE;
          endcase
        end
      end
    end
  end

  // a step never outruns its length
  a_cyc_in_step: assert property (@(posedge clk) disable iff (!rst_n) busy |-> cyc < len);

endmodule
