// tb_interrupter: self-checking test of one interrupter (request flip-flop,
// data path and controller) through its bus pins.
//
// The unit is jumpered to level 3 with status/ID switch 5 (byte 0x45).  The
// bus pins are changed every 10 ns and the outputs checked 1 ns later.  The
// test covers the IRQ3* pull, an acknowledge for another level that is
// passed on, a matching one that is absorbed (byte on D0..D7, DTACK* only
// once DS0* is low), the release at the end of the cycle, a second
// acknowledge while the peripheral still holds its request (passed on), and
// the clear by the service routine.  It then repeats absorb/pass decisions
// for every jumper level against every acknowledged level.
module tb_interrupter;

  import vme_irq_pkg::*;

  logic        rst_n;
  irq_level_t  level_sel;
  id_sel_t     id_sel;
  logic        req_set, req_clr, irqp;
  logic [3:1]  addr;
  logic        ds0_n, iackin_n, iackout_n;
  logic [7:1]  irq_pull;
  status_id_t  d_out;
  logic        d_oe, dtack_pull;

  int checks   = 0;
  int failures = 0;

  interrupter dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic settle();
    #1;
  endtask

  task automatic next();
    #9;
  endtask

  task automatic pulse_set();
    req_set = 1'b1; #5; req_set = 1'b0; #5;
  endtask

  task automatic pulse_clr();
    req_clr = 1'b1; #5; req_clr = 1'b0; #5;
  endtask

  // Whole acknowledge cycle for level lv; returns whether it was absorbed.
  task automatic ack(logic [3:1] lv, output logic absorbed);
    addr = lv; iackin_n = 1'b0; settle();
    absorbed = d_oe;
    check(d_oe != !iackout_n, "either absorbed or passed on");
    next(); ds0_n = 1'b0; settle();
    check(dtack_pull == absorbed, "DTACK* only when absorbed");
    next(); ds0_n = 1'b1; iackin_n = 1'b1; settle();
    check(!d_oe && !dtack_pull && iackout_n, "cycle released");
    next();
  endtask

  initial begin
    logic a;
    rst_n = 1'b0; level_sel = 3'd3; id_sel = 3'd5;
    req_set = 1'b0; req_clr = 1'b0;
    addr = 3'd0; ds0_n = 1'b1; iackin_n = 1'b1;
    #10;
    rst_n = 1'b1;
    #10;
    check(irq_pull == '0 && iackout_n && !d_oe && !dtack_pull && !irqp, "quiet after reset");

    pulse_set();
    check(irqp, "request flip-flop set");
    check(irq_pull == 7'b0000100, "only IRQ3* pulled");

    // Acknowledge for level 2: passed on, request kept.
    addr = 3'd2; iackin_n = 1'b0; ds0_n = 1'b0; settle();
    check(!iackout_n, "mismatch: IACKOUT* follows IACKIN*");
    check(!d_oe && !dtack_pull && irq_pull[3], "mismatch: not answered, request kept");
    next(); iackin_n = 1'b1; ds0_n = 1'b1; settle();
    check(iackout_n, "mismatch: IACKOUT* released");
    next();

    // Acknowledge for level 3, IACKIN* before DS0*: absorbed.
    addr = 3'd3; iackin_n = 1'b0; settle();
    check(iackout_n, "absorbed: not passed on");
    check(d_oe && d_out == 8'h45, $sformatf("byte %02h enabled, expected 45", d_out));
    check(irq_pull == '0, "IRQ3* released on acknowledge");
    check(!dtack_pull, "no DTACK* before DS0*");
    next(); ds0_n = 1'b0; settle();
    check(dtack_pull && d_oe, "DTACK* with DS0*");
    next(); ds0_n = 1'b1; settle();
    check(!dtack_pull && !d_oe, "released at the end of DS0*");
    next(); iackin_n = 1'b1; settle();
    check(iackout_n && irq_pull == '0, "served: no new request while IRQP stays");
    next();

    // Peripheral not yet serviced: a second level-3 acknowledge passes.
    ack(3'd3, a);
    check(!a, "served request does not answer twice");

    // Service routine clears the request.
    pulse_clr();
    check(!irqp && irq_pull == '0, "request cleared");

    // Every jumper level against every acknowledged level.
    for (int lv = 1; lv <= 7; lv++)
      for (int al = 1; al <= 7; al++) begin
        level_sel = irq_level_t'(lv);
        pulse_set();
        check(irq_pull == 7'(1 << (lv - 1)), $sformatf("level %0d: IRQ line", lv));
        ack(3'(al), a);
        check(a == (lv == al), $sformatf("level %0d, acknowledged %0d: decision", lv, al));
        pulse_clr();
        #10;
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
