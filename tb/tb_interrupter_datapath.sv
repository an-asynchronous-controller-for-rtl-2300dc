// tb_interrupter_datapath: exhaustive self-checking test of the interrupter
// data path.  Every jumper level (including the open jumper 0), every
// status/ID switch setting, every acknowledged level on A1..A3 and every
// combination of the controller outputs is applied; IRQ routing, the match
// signal M, the status/ID byte, DTACK and the active-low conversions are
// compared with values computed here from the definitions (the default
// byte for switch setting s is 0x40 + s).
module tb_interrupter_datapath;

  import vme_irq_pkg::*;

  irq_level_t  level_sel;
  id_sel_t     id_sel;
  logic [3:1]  addr;
  logic        ds0_n, iackin_n, iackout_n;
  logic [7:1]  irq_pull;
  status_id_t  d_out;
  logic        d_oe, dtack_pull;
  logic        irqc, iack_out, enid, dtack;
  logic        m, ds0, iack_in;

  int checks   = 0;
  int failures = 0;

  interrupter_datapath dut (.*);

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
      $display("FAIL %s: level=%0d id=%0d addr=%0d ctrl=%b", what, level_sel,
               id_sel, addr, {irqc, iack_out, enid, dtack});
    end
  endtask

  initial begin
    for (int lv = 0; lv < 8; lv++)
      for (int s = 0; s < 8; s++)
        for (int a = 0; a < 8; a++)
          for (int c = 0; c < 64; c++) begin
            logic [7:1] exp_pull;
            level_sel = irq_level_t'(lv);
            id_sel    = id_sel_t'(s);
            addr      = 3'(a);
            {irqc, iack_out, enid, dtack, ds0_n, iackin_n} = 6'(c);
            #1;
            exp_pull = '0;
            if (irqc && lv != 0) exp_pull[lv] = 1'b1;
            check(irq_pull == exp_pull, "IRQ routing");
            check(m == (lv != 0 && a == lv), "level match M");
            check(d_oe == enid, "data enable");
            check(d_out == (enid ? 8'(8'h40 + s) : 8'h00), "status/ID byte");
            check(dtack_pull == dtack, "DTACK");
            check(ds0 == !ds0_n && iack_in == !iackin_n && iackout_n == !iack_out,
                  "signal polarity");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
