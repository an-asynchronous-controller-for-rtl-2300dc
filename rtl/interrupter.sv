// interrupter: one complete VME bus interrupter as plugged into a slot of the
// daisy chain, together with the request flip-flop of its peripheral unit.
//
// Structure, following the defining design's split into data path and
// controller:
//   irq_request_ff          J = req_set, K = req_clr  ->  IRQP
//   interrupter_datapath    bus pins, level jumper, status/ID switches, M
//   interrupter_controller  absorb/pass decision, IRQC, ENID, DTACK
// Everything is clockless: the controller and the request flip-flop are
// asynchronous sequential circuits and the data path is combinational, so
// the interrupter reacts to bus edges after gate delays only (zero time in
// RTL simulation).  The request flip-flop sits in the peripheral unit in the
// original system; it is kept here because it shares the controller's
// device.  Tools report combinational loops through irqp and inside the
// controller: they are the intended feedback of these two clockless
// sequential circuits.
module interrupter
  import vme_irq_pkg::*;
#(
  parameter status_table_t STATUS_ID = DEFAULT_STATUS_ID
) (
  input  logic        rst_n,
  // personalisation
  input  irq_level_t  level_sel,
  input  id_sel_t     id_sel,
  // peripheral unit
  input  logic        req_set,
  input  logic        req_clr,
  output logic        irqp,
  // bus
  input  logic [3:1]  addr,
  input  logic        ds0_n,
  input  logic        iackin_n,
  output logic        iackout_n,
  output logic [7:1]  irq_pull,
  output status_id_t  d_out,
  output logic        d_oe,
  output logic        dtack_pull
);

  logic irqc, iack_out, enid, dtack;
  logic m, ds0, iack_in;

  irq_request_ff u_req (
    .rst_n, .j(req_set), .k(req_clr), .q(irqp)
  );

  interrupter_datapath #(.STATUS_ID(STATUS_ID)) u_dp (
    .level_sel, .id_sel,
    .addr, .ds0_n, .iackin_n, .iackout_n,
    .irq_pull, .d_out, .d_oe, .dtack_pull,
    .irqc, .iack_out, .enid, .dtack,
    .m, .ds0, .iack_in
  );

  interrupter_controller u_ctrl (
    .rst_n,
    .irqp, .iack_in, .ds0, .m,
    .irqc, .iack_out, .enid, .dtack
  );

endmodule
