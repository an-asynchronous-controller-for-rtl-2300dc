// tb_vme_interrupt_system: end-to-end test of the daisy-chained interrupt
// system with seven interrupters, every parameter at its default.
//
// The testbench plays the interrupt handler.  It watches IRQ1*..IRQ7*, picks
// the highest asserted level, runs an acknowledge cycle (A1..A3 = level,
// IACK* and DS0* low, read D0..D7 once DTACK* is low, release), identifies
// the unit from its status/ID byte and clears that unit's request flip-flop,
// as the service routine would.  DS0* is lowered before, with or after IACK*
// and released before, with or after it.  Bus signals change on a 10 ns
// grid and are sampled 1 ns after a change; the system is clockless, so each
// answer is already there.  A scoreboard kept here, independently of the
// design, predicts the answering unit: the first unit in chain order among
// those with a pending request on the acknowledged level.  Only one data
// driver may be enabled at any time.
//
// Slots are jumpered as levels 2,2,5,1,2,7,3 with status/ID switch = slot,
// so units 0, 1 and 4 share level 2 and are ranked by position.
//
// Mechanisms counted (each must occur at least once): acknowledge absorbed,
// passed by an idle unit, passed on a level mismatch, passed by a unit whose
// request was already served, higher level served before an earlier slot,
// same level ranked by position, request/acknowledge tie passed on, request
// that wins the race by a few nanoseconds, DS0 present when the acknowledge
// is absorbed, IACKIN absorbed before DS0, IACK* ending before DS0*, and the
// next cycle's DS0* reaching the answering unit before this cycle's IACKIN*
// has ended there (emulated by the handler starting DS0* early).
module tb_vme_interrupt_system;

  import vme_irq_pkg::*;

  localparam int unsigned N = 7;

  logic                rst_n;
  irq_level_t [N-1:0]  level_sel;
  id_sel_t    [N-1:0]  id_sel;
  logic       [N-1:0]  req_set, req_clr, irqp;
  logic                iack_n, ds0_n;
  logic [3:1]          addr;
  logic [7:1]          irq_n;
  logic                dtack_n;
  status_id_t          d;
  logic                d_valid, iackout_n;

  vme_interrupt_system dut (.*);

  int checks   = 0;
  int failures = 0;

  localparam int unsigned LEVEL_OF [N] = '{2, 2, 5, 1, 2, 7, 3};

  // Scoreboard: requests raised and not yet acknowledged.
  logic [N-1:0] pending;

  typedef enum int {
    EV_ABSORB, EV_PASS_IDLE, EV_PASS_MISMATCH, EV_PASS_SERVED, EV_LEVEL_RANK,
    EV_POSITION_RANK, EV_TIE, EV_REQ_WINS, EV_DS0_FIRST, EV_IACK_FIRST,
    EV_IACK_ENDS_FIRST, EV_EARLY_DS0, EV_COUNT
  } event_e;
  int    ev      [EV_COUNT];
  string ev_name [EV_COUNT] = '{"absorb", "pass idle", "pass mismatch",
    "pass served", "level rank", "position rank", "tie", "request wins",
    "DS0 first", "IACKIN first", "IACK ends first", "early next DS0"};

  initial begin : watchdog
    #50_000_000;
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

  // Observe each controller's decisions, 1 ns after they are taken.
  for (genvar i = 0; i < N; i++) begin : g_obs
    time t_irqp_rise = 0;
    always @(posedge irqp[i]) t_irqp_rise = $time;
    always @(posedge dut.g_slot[i].u_int.u_ctrl.iack_out) begin
      automatic time t0 = $time;
      #1;
      if (dut.g_slot[i].u_int.u_ctrl.state.req) ev[EV_PASS_MISMATCH]++;
      else if (dut.g_slot[i].u_int.u_ctrl.state.done && dut.g_slot[i].u_int.u_ctrl.m)
        ev[EV_PASS_SERVED]++;
      else if (irqp[i] && t_irqp_rise == t0 && dut.g_slot[i].u_int.u_ctrl.m)
        ev[EV_TIE]++;
      else ev[EV_PASS_IDLE]++;
    end
    always @(posedge dut.g_slot[i].u_int.u_ctrl.state.absorb) begin
      automatic time t0 = $time;
      #1;
      ev[EV_ABSORB]++;
      if (dut.g_slot[i].u_int.u_ctrl.ds0) ev[EV_DS0_FIRST]++;
      else ev[EV_IACK_FIRST]++;
      if (t0 - t_irqp_rise < 10) ev[EV_REQ_WINS]++;
    end
    always @(posedge dut.g_slot[i].u_int.u_ctrl.ds0) begin
      #1;
      if (dut.g_slot[i].u_int.u_ctrl.state.released) ev[EV_EARLY_DS0]++;
    end
  end

  // Only one status/ID driver, sampled between changes.
  always begin
    #1;
    checks++;
    if (!$onehot0(dut.d_oe)) begin
      failures++;
      $display("FAIL several data drivers %b (t=%0t)", dut.d_oe, $time);
    end
    #9;
  end

  task automatic request(int u);
    req_set[u] = 1'b1; #5; req_set[u] = 1'b0; #5;
  endtask

  function automatic int expected_unit(int lv);
    for (int i = 0; i < N; i++) if (pending[i] && LEVEL_OF[i] == lv) return i;
    return -1;
  endfunction

  function automatic int highest_irq();
    for (int l = 7; l >= 1; l--) if (!irq_n[l]) return l;
    return 0;
  endfunction

  // One acknowledge cycle on level lv.  ds_on: 0 with IACK*, 1 before, 2
  // after.  ds_off: 0 with IACK*, 1 before, 2 after.  Returns the unit
  // identified from the status/ID byte.
  task automatic ack_cycle(int lv, int ds_on, int ds_off, output int unit);
    int exp_u;
    logic ok;
    exp_u = expected_unit(lv);
    addr = 3'(lv);
    if (ds_on == 1) begin ds0_n = 1'b0; #10; end
    iack_n = 1'b0;
    if (ds_on == 0) ds0_n = 1'b0;
    #1;
    if (ds_on == 2) begin
      check(dtack_n, "no DTACK* before DS0*");
      check(d_valid == (exp_u >= 0), "status/ID enabled when IACKIN* arrives");
      #9; ds0_n = 1'b0; #1;
    end
    ok = !dtack_n && d_valid;
    check(ok, $sformatf("level %0d acknowledge answered", lv));
    unit = ok ? int'(d) - 'h40 : -1;
    check(unit == exp_u,
          $sformatf("level %0d answered by unit %0d, expected %0d", lv, unit, exp_u));
    check(iackout_n, "acknowledge not passed beyond the chain");
    for (int i = 0; i < N; i++) if (pending[i] && i != unit) begin
      if (LEVEL_OF[i] == lv && i > unit) ev[EV_POSITION_RANK]++;
      if (LEVEL_OF[i] < lv && i < unit) ev[EV_LEVEL_RANK]++;
    end
    if (unit >= 0 && unit < N) pending[unit] = 1'b0;
    #9;
    case (ds_off)
      1: begin ds0_n = 1'b1; #1; check(dtack_n && !d_valid, "released at DS0* end"); #9; end
      2: begin
           iack_n = 1'b1; ev[EV_IACK_ENDS_FIRST]++;
           #1; check(!dtack_n && d_valid, "DTACK* held until DS0* ends"); #9;
         end
      default: ;
    endcase
    iack_n = 1'b1; ds0_n = 1'b1;
    #1;
    check(dtack_n && !d_valid && iackout_n, "bus released after the cycle");
    #9;
  endtask

  task automatic service(int unit);
    if (unit < 0 || unit >= N) return;
    req_clr[unit] = 1'b1; #5; req_clr[unit] = 1'b0; #5;
  endtask

  // Handler loop: serve until no line is asserted.
  task automatic serve_all();
    int lv, u, guard;
    guard = 0;
    lv = highest_irq();
    while (lv != 0 && guard < 50) begin
      ack_cycle(lv, int'($urandom_range(0, 2)), int'($urandom_range(0, 2)), u);
      service(u);
      lv = highest_irq();
      guard++;
    end
    check(pending == '0, $sformatf("all requests served (left %b)", pending));
  endtask

  initial begin
    int u;
    rst_n = 1'b0;
    foreach (level_sel[i]) begin
      level_sel[i] = irq_level_t'(LEVEL_OF[i]);
      id_sel[i]    = id_sel_t'(i);
    end
    req_set = '0; req_clr = '0; pending = '0;
    iack_n = 1'b1; ds0_n = 1'b1; addr = '0;
    #20;
    rst_n = 1'b1;
    #10;
    check(irq_n == 7'h7f && dtack_n && iackout_n && irqp == '0, "bus quiet after reset");

    // Same level, ranked by position: units 4 and 1 on level 2.
    request(4); pending[4] = 1'b1;
    request(1); pending[1] = 1'b1;
    check(irq_n == 7'b1111101, "only IRQ2* asserted");
    serve_all();

    // Different levels: unit 3 (level 1) is earlier in the chain than
    // unit 5 (level 7), which is served first.
    request(3); pending[3] = 1'b1;
    request(5); pending[5] = 1'b1;
    request(2); pending[2] = 1'b1;
    request(6); pending[6] = 1'b1;
    serve_all();

    // Tie: unit 0 (level 2) requests in the same instant as the acknowledge
    // for unit 4 (level 2) arrives, and passes it on to unit 4.
    request(4); pending[4] = 1'b1;
    addr = 3'd2;
    req_set[0] = 1'b1; iack_n = 1'b0; ds0_n = 1'b0;
    #1;
    check(!dtack_n && d == 8'h44, "tie: acknowledge passed on to unit 4");
    check(dut.g_slot[0].u_int.u_ctrl.iack_out && irqp[0] && irq_n[2] == 1'b1,
          "tie: unit 0 passes, its request waits in the flip-flop");
    #4; req_set[0] = 1'b0; #5;
    iack_n = 1'b1; ds0_n = 1'b1; pending[4] = 1'b0;
    #1;
    check(dut.g_slot[0].u_int.u_ctrl.irqc, "tie: unit 0 requests after the cycle");
    #9;
    service(4);
    pending[0] = 1'b1;
    serve_all();

    // Request wins by 5 ns: unit 0 absorbs, unit 4 keeps waiting.
    request(4); pending[4] = 1'b1;
    addr = 3'd2;
    req_set[0] = 1'b1; pending[0] = 1'b1;
    #5;
    req_set[0] = 1'b0;
    ack_cycle(2, 0, 0, u);
    check(u == 0, "request 5 ns ahead wins the race");
    // Unit 0 served but not yet cleared: the next level-2 acknowledge passes it.
    ack_cycle(2, 0, 0, u);
    check(u == 4, "served unit does not answer twice");
    service(0);
    service(4);
    check(pending == '0, "race scenario served");

    // The next cycle's DS0* seen by unit 6 before its IACKIN* of the current
    // cycle has ended: it must not be answered again.
    request(6); pending[6] = 1'b1;
    request(1); pending[1] = 1'b1;
    addr = 3'd3; iack_n = 1'b0; ds0_n = 1'b0;
    #1; check(!dtack_n && d == 8'h46, "early DS0: unit 6 answers");
    #9; ds0_n = 1'b1;
    #1; check(dtack_n && !d_valid, "early DS0: released at DS0* end");
    #9; addr = 3'd2; ds0_n = 1'b0;
    #1; check(dtack_n && !d_valid, "early DS0: next DS0* not answered by unit 6");
    #9; iack_n = 1'b1; pending[6] = 1'b0;
    #1; check(dtack_n && !d_valid && iackout_n, "early DS0: unit 6 left the cycle");
    #9; iack_n = 1'b0;
    #1; check(!dtack_n && d == 8'h41, "early DS0: next cycle answered by unit 1");
    pending[1] = 1'b0;
    #9; iack_n = 1'b1; ds0_n = 1'b1;
    #10;
    service(6);
    service(1);
    check(irq_n == 7'h7f, "early DS0 scenario served");

    // Random traffic: requests appear while the handler is idle.
    for (int round = 0; round < 200; round++) begin
      int k;
      k = int'($urandom_range(1, 5));
      repeat (k) begin
        int r;
        r = int'($urandom_range(0, N - 1));
        if (!pending[r] && !irqp[r]) begin
          request(r);
          pending[r] = 1'b1;
        end
      end
      serve_all();
    end

    #2;
    foreach (ev[e]) begin
      $display("mechanism %-16s %0d", ev_name[e], ev[e]);
      check(ev[e] > 0, $sformatf("mechanism '%s' happened", ev_name[e]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
