// tb_interrupter_controller: self-checking test of the clockless interrupter
// controller.
//
// The controller has no clock: its outputs settle in the same time step as
// the input change.  The testbench changes inputs every 10 ns and compares
// the outputs 1 ns later with a reference model written here in a different
// style, as a five-phase machine (idle, passing, absorbed, answering,
// released) plus "request pending" and "served" flags.
//
// Part 1 walks named scenarios: pass-through, absorb (ENID before DS0, DTACK
// with DS0), level mismatch, one acknowledge per request, DS0 before IACKIN,
// IACKIN ending before DS0, the next cycle's DS0 seen before this cycle's
// IACKIN ends, the request/acknowledge tie (passed on) and the
// request that wins the race.  Part 2 is a random walk of single input
// changes, with occasional ties (IRQP and IACKIN rising together) and resets.
module tb_interrupter_controller;

  typedef enum logic [2:0] {R_IDLE, R_PASS, R_ABS, R_ANS, R_REL} ref_phase_e;

  logic rst_n;
  logic irqp, iack_in, ds0, m;
  logic irqc, iack_out, enid, dtack;

  ref_phase_e ph;
  logic       ref_req, ref_served;

  int checks   = 0;
  int failures = 0;
  int ties     = 0;

  interrupter_controller dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: advance on the new input values.
  function automatic void ref_step();
    logic absorbing;
    if (!rst_n) begin
      ph = R_IDLE; ref_req = 1'b0; ref_served = 1'b0;
      return;
    end
    unique case (ph)
      R_IDLE:  if (iack_in) ph = (ref_req && m) ? (ds0 ? R_ANS : R_ABS) : R_PASS;
      R_PASS:  if (!iack_in) ph = R_IDLE;
      R_ABS:   if (ds0) ph = R_ANS; else if (!iack_in) ph = R_IDLE;
      R_ANS:   if (!ds0) ph = iack_in ? R_REL : R_IDLE;
      R_REL:   if (!iack_in) ph = R_IDLE;
      default: ph = R_IDLE;
    endcase
    if (ph == R_ANS) ref_served = 1'b1;
    absorbing = (ph == R_ABS) || (ph == R_ANS) || (ph == R_REL);
    if (absorbing) ref_req = 1'b0;
    else           ref_req = irqp && (ref_req || (!ref_served && !iack_in));
    if (!irqp && !absorbing) ref_served = 1'b0;
  endfunction

  task automatic settle_and_check(string tag);
    logic [3:0] exp;
    ref_step();
    #1;
    exp = {ref_req, ph == R_PASS, ph == R_ABS || ph == R_ANS, ph == R_ANS};
    checks++;
    if ({irqc, iack_out, enid, dtack} !== exp) begin
      failures++;
      $display("FAIL %s: in irqp=%0b iack=%0b ds0=%0b m=%0b -> out %b, expected %b",
               tag, irqp, iack_in, ds0, m, {irqc, iack_out, enid, dtack}, exp);
    end
    #9;
  endtask

  // Directed step with a hand-written expectation as well.
  task automatic step(logic i_irqp, logic i_iack, logic i_ds0, logic i_m,
                      logic [3:0] hand, string tag);
    irqp = i_irqp; iack_in = i_iack; ds0 = i_ds0; m = i_m;
    settle_and_check(tag);
    checks++;
    if ({irqc, iack_out, enid, dtack} !== hand) begin
      failures++;
      $display("FAIL %s: out %b, hand-worked %b", tag, {irqc, iack_out, enid, dtack}, hand);
    end
  endtask

  initial begin
    rst_n = 1'b0; irqp = 1'b0; iack_in = 1'b0; ds0 = 1'b0; m = 1'b0;
    settle_and_check("reset");
    rst_n = 1'b1;
    //    irqp iack ds0 m   irqc/pass/enid/dtack
    step(0, 0, 0, 0, 4'b0000, "idle");
    step(0, 1, 0, 1, 4'b0100, "no request: passed on");
    step(0, 1, 1, 1, 4'b0100, "no request: DS0 ignored");
    step(0, 0, 1, 1, 4'b0000, "pass released with IACKIN");
    step(0, 0, 0, 0, 4'b0000, "idle");
    step(1, 0, 0, 0, 4'b1000, "request: IRQC");
    step(1, 1, 0, 1, 4'b0010, "absorb: IRQC released, byte enabled");
    step(1, 1, 1, 1, 4'b0011, "absorb: DTACK with DS0");
    step(1, 1, 0, 1, 4'b0000, "absorb: released at DS0 end");
    step(1, 0, 0, 0, 4'b0000, "absorb: cycle over, served");
    step(1, 1, 0, 1, 4'b0100, "served: next acknowledge passed");
    step(1, 0, 0, 0, 4'b0000, "served: no IRQC while IRQP stays");
    step(0, 0, 0, 0, 4'b0000, "serviced: IRQP low");
    step(1, 0, 0, 0, 4'b1000, "new request");
    step(1, 1, 1, 0, 4'b1100, "mismatch: passed on, IRQC kept");
    step(1, 0, 0, 0, 4'b1000, "mismatch: cycle over");
    step(1, 0, 1, 1, 4'b1000, "DS0 before IACKIN");
    step(1, 1, 1, 1, 4'b0011, "DS0 first: answered at once");
    step(1, 0, 1, 1, 4'b0011, "IACKIN ends first: DTACK held");
    step(1, 0, 0, 1, 4'b0000, "DS0 ends: released");
    step(0, 0, 0, 0, 4'b0000, "serviced");
    step(1, 0, 0, 0, 4'b1000, "request");
    step(1, 1, 1, 1, 4'b0011, "answered");
    step(1, 1, 0, 1, 4'b0000, "DS0 ends, IACKIN not yet");
    step(1, 1, 1, 0, 4'b0000, "next cycle's DS0 early: not answered");
    step(1, 0, 1, 0, 4'b0000, "IACKIN ends: absorbed state left");
    step(1, 0, 0, 0, 4'b0000, "served");
    step(0, 0, 0, 0, 4'b0000, "serviced");
    step(1, 1, 0, 1, 4'b0100, "tie: passed on");
    step(1, 1, 1, 1, 4'b0100, "tie: decision kept");
    step(1, 0, 0, 0, 4'b1000, "tie: request raised after the cycle");
    step(1, 1, 0, 1, 4'b0010, "tie: next acknowledge absorbed");
    step(1, 0, 0, 0, 4'b1000, "absorbed without DS0: request raised again");
    #10;
    step(1, 0, 0, 0, 4'b1000, "unanswered request stays pending");

    // Random walk.
    for (int n = 0; n < 20000; n++) begin
      int r;
      r = int'($urandom_range(0, 99));
      if (r < 2) begin
        rst_n = 1'b0;
        settle_and_check("random reset");
        rst_n = 1'b1;
      end else if (r < 8 && !irqp && !iack_in) begin
        irqp = 1'b1; iack_in = 1'b1;       // tie
        ties++;
      end else if (r < 30) irqp    = ~irqp;
      else if (r < 55)     iack_in = ~iack_in;
      else if (r < 80)     ds0     = ~ds0;
      else                 m       = ~m;
      settle_and_check($sformatf("random step %0d", n));
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no tie in the random walk"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
