// tb_wntt_ctrl: self-checking test of the Weighted-NTT step sequencer.
//
// With log2(N) = 10 it follows the phase of every cycle and checks the step
// order (weight, 10 forward stages, pointwise, 10 inverse stages, de-factor,
// conversion), each step's length (5 cycles for pointwise, 6 otherwise, with
// the table strobe on the first cycle and the write strobe on the last), and
// that done comes 12*10 + 23 = 143 edges after start. A start while busy must
// be ignored; a second run checks that the controller restarts cleanly.
module tb_wntt_ctrl;
  import wntt_pkg::*;

  localparam int unsigned LOGN = 10;

  logic clk = 0, rst_n = 0, start = 0;
  logic load, busy, done, lut_en, wb_en;
  phase_e phase;
  logic [$clog2(LOGN)-1:0] stage;
  logic [2:0] cyc;
  int checks = 0, failures = 0;

  wntt_ctrl #(.LOGN(LOGN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_one(input bit poke_start);
    phase_e exp_ph [24];
    int     exp_st [24];
    int     n, step, len, cycles;
    n = 0;
    exp_ph[n] = PH_WEIGHT; exp_st[n++] = 0;
    for (int s = 0; s < LOGN; s++) begin exp_ph[n] = PH_FWD; exp_st[n++] = s; end
    exp_ph[n] = PH_PWM; exp_st[n++] = 0;
    for (int s = 0; s < LOGN; s++) begin exp_ph[n] = PH_INV; exp_st[n++] = s; end
    exp_ph[n] = PH_DEFAC; exp_st[n++] = 0;
    exp_ph[n] = PH_CONV;  exp_st[n++] = 0;

    @(negedge clk); start = 1;
    #1 chk(load, "load with start");
    @(posedge clk); #1 start = 0;
    cycles = 0;
    for (step = 0; step < n; step++) begin
      len = (exp_ph[step] == PH_PWM) ? 5 : 6;
      for (int c = 0; c < len; c++) begin
        if (poke_start && step == 3 && c == 2) start = 1;
        #1;
        chk(phase == exp_ph[step] && int'(stage) == exp_st[step], $sformatf("step %0d phase %0d stage %0d", step, phase, stage));
        chk(lut_en == (c == 0 && exp_ph[step] != PH_PWM), $sformatf("lut_en step %0d cyc %0d", step, c));
        chk(wb_en == (c == len - 1), $sformatf("wb_en step %0d cyc %0d", step, c));
        chk(!done, "early done");
        if (poke_start && step == 3 && c == 2) chk(!load, "load while busy");
        @(posedge clk); #1 start = 0;
        cycles++;
      end
    end
    chk(done && !busy, "done after last step");
    chk(cycles == 12*LOGN + 23, $sformatf("latency %0d", cycles));
    @(posedge clk); #1;
    chk(!done, "done is one pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    chk(!busy && !done && phase == PH_IDLE, "idle after reset");
    run_one(1'b1);
    repeat (3) @(posedge clk);
    run_one(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
