// vme_irq_pkg: types and constants shared by the blocks of the daisy-chained
// VME bus interrupt system.
//
// The VME bus has seven interrupt request lines IRQ1..IRQ7; an interrupter is
// personalised by a jumper that picks one of them (its level) and by three
// switches that pick one of eight predefined status/ID bytes.  The level code
// 0 stands for "jumper removed": such an interrupter never requests and never
// matches an acknowledge.  The default status/ID bytes are this design's own
// choice (M68000 user vector numbers 0x40..0x47); the defining text only says
// that eight bytes are defined in advance.
package vme_irq_pkg;

  localparam int unsigned NUM_LEVELS = 7;   // IRQ1..IRQ7
  localparam int unsigned NUM_IDS    = 8;   // selectable status/ID bytes

  typedef logic [2:0] irq_level_t;          // 1..7, 0 = no jumper
  typedef logic [2:0] id_sel_t;             // status/ID switch setting
  typedef logic [7:0] status_id_t;          // byte returned on D0..D7

  typedef status_id_t [NUM_IDS-1:0] status_table_t;

  localparam status_table_t DEFAULT_STATUS_ID = {
    8'h47, 8'h46, 8'h45, 8'h44, 8'h43, 8'h42, 8'h41, 8'h40
  };

  // Feedback state of the clockless interrupter controller (see
  // interrupter_controller.sv).  One bit per state variable.
  typedef struct packed {
    logic req;     // R: request pending, not yet acknowledged (drives IRQC)
    logic pass;    // P: acknowledge passed on (drives IACKOUT)
    logic absorb;  // A: acknowledge absorbed, cycle not yet ended
    logic done;    // X: during A, DS0 has been answered; outside A, the
                   //    request was served and IRQP has not yet fallen
    logic released;// Y: during A, DS0 has ended after being answered
  } ctrl_state_t;

endpackage
