// tb_irq_request_ff: self-checking test of the clockless request flip-flop.
// Random J/K levels are applied every 10 ns and the output is compared 1 ns
// later with a reference that follows the intended truth table: J alone
// sets, K alone clears, neither holds, both clear.  Reset is checked too.
module tb_irq_request_ff;

  logic rst_n, j, k, q;
  logic ref_q;

  int checks   = 0;
  int failures = 0;

  irq_request_ff dut (.rst_n, .j, .k, .q);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag);
    #1;
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: j=%0b k=%0b q=%0b expected %0b", tag, j, k, q, ref_q);
    end
    #9;
  endtask

  initial begin
    rst_n = 1'b0; j = 1'b1; k = 1'b0; ref_q = 1'b0;
    check("held clear by reset");
    rst_n = 1'b1; j = 1'b0;
    check("after reset");
    for (int n = 0; n < 500; n++) begin
      j = 1'($urandom_range(0, 1));
      k = 1'($urandom_range(0, 1));
      case ({j, k})
        2'b00: ref_q = ref_q;
        2'b01: ref_q = 1'b0;
        2'b10: ref_q = 1'b1;
        2'b11: ref_q = 1'b0;
      endcase
      check($sformatf("step %0d", n));
      // Release J and K: the state must be held.
      j = 1'b0; k = 1'b0;
      check($sformatf("hold %0d", n));
    end
    j = 1'b1; k = 1'b0; ref_q = 1'b1;
    check("set");
    j = 1'b0; rst_n = 1'b0; ref_q = 1'b0;
    check("reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
