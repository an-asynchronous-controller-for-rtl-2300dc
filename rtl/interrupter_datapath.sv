// interrupter_datapath: the bus side of one VME bus interrupter.  It is the
// only part of the interrupter that touches the bus, and it carries all of
// the interrupter's personalisation, so that every controller is the same.
//
// Function (all combinational):
//   * IRQ routing: the jumper level_sel (1..7) connects the controller's
//     request IRQC to one of the bus lines IRQ1..IRQ7.  irq_pull[l] high means
//     "pull IRQl* low"; the lines are open-collector, so the system wires the
//     pulls of all interrupters together (wired OR).  level_sel = 0 is an
//     open jumper: no line is driven.
//   * Level compare: M = 1 when the acknowledged level on A1..A3 equals the
//     jumpered level.  An open jumper never matches.
//   * Status/ID choice: three switches (id_sel) pick one of the eight
//     predefined bytes of STATUS_ID.  The byte is put on D0..D7 (d_oe high)
//     while the controller asserts ENID; otherwise d_out is 0.
//   * Polarity: the bus and daisy-chain signals are active low (DS0*,
//     IACKIN*, IACKOUT*, DTACK*); the controller side is active high.
//     d_oe and dtack_pull are the controller's ENID and DTACK handed on to
//     the bus drivers unchanged.
// The routing, compare and byte choice follow the defining design; the
// default byte values and the pull-enable style of the open-collector and
// three-state drivers are this design's own.
module interrupter_datapath
  import vme_irq_pkg::*;
#(
  parameter status_table_t STATUS_ID = DEFAULT_STATUS_ID
) (
  // personalisation
  input  irq_level_t  level_sel,   // jumper: IRQ line 1..7, 0 = none
  input  id_sel_t     id_sel,      // switches: status/ID byte 0..7
  // bus side (active low where named _n)
  input  logic [3:1]  addr,        // A1..A3: acknowledged level
  input  logic        ds0_n,
  input  logic        iackin_n,
  output logic        iackout_n,
  output logic [7:1]  irq_pull,    // 1 = pull IRQl* low
  output status_id_t  d_out,
  output logic        d_oe,
  output logic        dtack_pull,  // 1 = pull DTACK* low
  // controller side (active high)
  input  logic        irqc,
  input  logic        iack_out,
  input  logic        enid,
  input  logic        dtack,
  output logic        m,
  output logic        ds0,
  output logic        iack_in
);

  always_comb begin
    for (int l = 1; l <= int'(NUM_LEVELS); l++)
      irq_pull[l] = irqc && (level_sel == irq_level_t'(l));
  end

  assign m          = (level_sel != '0) && (addr == level_sel);
  assign d_out      = enid ? STATUS_ID[id_sel] : '0;
  assign d_oe       = enid;
  assign dtack_pull = dtack;
  assign ds0        = ~ds0_n;
  assign iack_in    = ~iackin_n;
  assign iackout_n  = ~iack_out;

endmodule
