// irq_request_ff: the request flip-flop of a peripheral unit, which produces
// the request signal IRQP read by the interrupter controller.
//
// Like the controller it is a clockless circuit: a flip-flop held by its own
// feedback.  J is the peripheral's request event (an end switch of the solar
// panel, or a push button) and sets the flip-flop; K is the clear given by
// the interrupt service routine and resets it.  The request therefore stays
// up from the event until the unit is serviced.  Next-state equation:
//     Q = ~K & (J | Q)
// A clockless flip-flop cannot toggle, so J = K = 1 is taken as a clear
// (the service routine wins).  The J/K sources and this rule are this
// design's choices; the defining design only says that the request comes from
// such a flip-flop built in two spare cells of the controller's device.
// rst_n (active low) clears it, like the device's asynchronous reset term.
//
// The feedback through q is intended: it is the storage of the flip-flop,
// and tools report it as a combinational loop.
module irq_request_ff (
  input  logic rst_n,
  input  logic j,     // set: peripheral requests service
  input  logic k,     // clear: peripheral has been serviced
  output logic q      // IRQP
);

  logic q_next;

  always_comb q_next = rst_n & ~k & (j | q);
  assign q = q_next;

endmodule
