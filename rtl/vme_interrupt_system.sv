// vme_interrupt_system: the daisy-chained VME bus interrupt system seen from
// the interrupt handler: NUM_UNITS identical interrupters in consecutive
// slots, each personalised by its level jumper and status/ID switches.
//
// Priority.  Requests on different levels are ranked by level: the handler
// acknowledges the highest pending level and puts it on A1..A3.  Requests on
// the same level are ranked by position: the acknowledge enters slot 0 and
// ripples down the IACKIN*/IACKOUT* daisy chain, and the first interrupter
// with a pending request on the acknowledged level absorbs it and answers
// with its status/ID byte and DTACK*.  The others pass it on.  The chain's
// last IACKOUT* is brought out (iackout_n) so that an acknowledge nobody
// absorbs is visible.
//
// Bus model.  The open-collector lines IRQ1*..IRQ7* and DTACK* are wired-OR
// of the interrupters' pull enables.  D0..D7 is the byte of the interrupter
// whose driver is enabled (d_valid high), 0 otherwise; the daisy chain makes
// sure at most one driver is enabled (the system testbench checks it).  IACK* from the handler drives slot 0's
// IACKIN* directly, i.e. the bus's daisy-chain driver is taken as part of the
// handler.  The handler itself (an M68000 processor board) is not part of
// this design.
//
// The default of seven interrupters is the number in use in the system this
// design follows.  The whole system is clockless: every output follows the
// inputs after gate delays only (zero time in RTL simulation), so the
// acknowledge ripples through the chain in the same instant it is issued.
module vme_interrupt_system
  import vme_irq_pkg::*;
#(
  parameter int unsigned   NUM_UNITS   = 7,
  parameter status_table_t STATUS_ID   = DEFAULT_STATUS_ID
) (
  input  logic                      rst_n,
  // personalisation of each slot
  input  irq_level_t [NUM_UNITS-1:0] level_sel,
  input  id_sel_t    [NUM_UNITS-1:0] id_sel,
  // peripheral units
  input  logic       [NUM_UNITS-1:0] req_set,
  input  logic       [NUM_UNITS-1:0] req_clr,
  output logic       [NUM_UNITS-1:0] irqp,
  // bus, handler side
  input  logic                      iack_n,
  input  logic                      ds0_n,
  input  logic [3:1]                addr,
  output logic [7:1]                irq_n,
  output logic                      dtack_n,
  output status_id_t                d,
  output logic                      d_valid,
  output logic                      iackout_n
);

  logic       [NUM_UNITS:0]   chain_n;      // chain_n[i] = IACKIN* of slot i
  logic       [7:1]           irq_pull [NUM_UNITS];
  status_id_t                 d_out    [NUM_UNITS];
  logic       [NUM_UNITS-1:0] d_oe;
  logic       [NUM_UNITS-1:0] dtack_pull;

  assign chain_n[0] = iack_n;

  for (genvar i = 0; i < int'(NUM_UNITS); i++) begin : g_slot
    interrupter #(.STATUS_ID(STATUS_ID)) u_int (
      .rst_n,
      .level_sel (level_sel[i]),
      .id_sel    (id_sel[i]),
      .req_set   (req_set[i]),
      .req_clr   (req_clr[i]),
      .irqp      (irqp[i]),
      .addr,
      .ds0_n,
      .iackin_n  (chain_n[i]),
      .iackout_n (chain_n[i+1]),
      .irq_pull  (irq_pull[i]),
      .d_out     (d_out[i]),
      .d_oe      (d_oe[i]),
      .dtack_pull(dtack_pull[i])
    );
  end

  assign iackout_n = chain_n[NUM_UNITS];

  // Wired-OR bus lines.
  always_comb begin
    logic [7:1] any_pull;
    any_pull = '0;
    d        = '0;
    for (int i = 0; i < int'(NUM_UNITS); i++) begin
      any_pull |= irq_pull[i];
      if (d_oe[i]) d |= d_out[i];
    end
    irq_n   = ~any_pull;
    d_valid = |d_oe;
    dtack_n = ~|dtack_pull;
  end


endmodule
