// interrupter_controller: the control part of one VME bus interrupter, as a
// clockless (asynchronous) sequential circuit.  All interrupters carry the
// same controller; level and status/ID byte are set in the data path.
//
// Job.  The controller turns the peripheral's request IRQP into the bus
// request IRQC, and for every acknowledge that arrives on the daisy chain
// (IACKIN) makes one irrevocable decision: absorb it, or pass it on to the
// next interrupter (IACKOUT).  It absorbs only if it holds a pending request
// and the data path reports that the acknowledged level on A1..A3 matches its
// own (M).  An absorbed acknowledge enables the status/ID byte (ENID) at once
// and asserts DTACK while DS0 is asserted; ENID and DTACK are withdrawn when
// DS0 ends, and are not given again in the same acknowledge.
//
// DS0 reaches every interrupter directly while IACKIN ripples down the chain,
// so a controller may see their edges in any order: DS0 before or after
// IACKIN at the start, IACKIN ending before or after DS0 at the end, and even
// the next cycle's DS0 before this cycle's IACKIN has ended.  The controller
// leaves the absorbed state when IACKIN has ended and DS0 is no longer being
// answered, and it ignores a DS0 that starts again after it has answered.
//
// State.  Five state variables, held by feedback of the next-state logic
// (struct ctrl_state_t):
//   R  request pending      set  IRQP & ~X & ~IACKIN & ~A   reset ~IRQP | A
//   P  passing on           set  IACKIN & ~A & ~(R & M)     reset ~IACKIN
//   A  absorbed             set  IACKIN & R & M & ~P        reset ~IACKIN & ~(DS0 & ~Y)
//   X  answered / served    set  A & DS0                    reset ~IRQP & ~A
//   Y  answer released      set  A & X & ~DS0               reset ~A
// P and A each block the other's set term, so the absorb/pass decision is
// taken once per acknowledge and kept until IACKIN ends.  R is released as
// soon as A is set (release on acknowledge).  X remembers that the request
// was served, so a request that the peripheral keeps up (it is withdrawn only
// by the service routine) is acknowledged once: a new request needs IRQP to
// fall and rise again.  Y marks that DS0 has ended after being answered, so
// that a DS0 belonging to the next cycle is neither answered nor keeps A set.
//
// Race between a new request and an acknowledge.  R can only be set while
// IACKIN is absent.  A request that is registered before IACKIN arrives wins
// and (on a level match) the acknowledge is absorbed; if IACKIN arrives first
// or at the same instant (a tie), the acknowledge is passed on, and R is set
// when IACKIN ends, so the request is acknowledged in a later cycle.  The
// tie rule (pass on) follows the defining design.
//
// Outputs, combinational in the state and inputs:
//   IRQC = R,  IACKOUT = P,
//   ENID = A & ~Y & ~(X & ~DS0),  DTACK = A & ~Y & X & DS0.
//
// Hazards.  Every next-state function is unate in each variable and is
// written as the sum of all its prime implicants, so a two-level realisation
// has no static logic hazards.  The state variables and their equations were
// derived here from the required behaviour; the defining design's own flow
// table (ten reduced states, extended to thirteen for a race-free assignment
// in four state variables) is not reproduced.  In zero-delay simulation the
// feedback settles from the previous state; simultaneous changes are safe for
// IRQP rising with IACKIN (the tie above) and for DS0 with IACKIN, but IRQP
// falling in the same instant as IACKIN arrives is a race, as it is in
// hardware; the bus protocol never produces it, since a request is withdrawn
// only by its service routine.
//
// The handshake rules (DTACK only with the byte enabled, never both passing
// and absorbing, no IRQC while absorbed) hold by construction; with no clock
// to sample them on and values that settle through feedback, they are
// checked by the testbenches after each change rather than by assertions
// here.
//
// The feedback through `state` is intended: it is the controller's memory,
// and tools report it as a combinational loop.  rst_n (active low) clears all
// five variables, like the device's asynchronous reset term.
//
// Ports (all active high): irqp request flip-flop output; iack_in daisy-chain
// acknowledge in; ds0 data strobe 0; m level match; irqc request to the data
// path; iack_out acknowledge passed on; enid status/ID byte enable; dtack
// data transfer acknowledge.
module interrupter_controller
  import vme_irq_pkg::*;
(
  input  logic rst_n,
  input  logic irqp,
  input  logic iack_in,
  input  logic ds0,
  input  logic m,
  output logic irqc,
  output logic iack_out,
  output logic enid,
  output logic dtack
);

  ctrl_state_t state, state_next;

  always_comb begin
    // Complete sums of products; rst_n gates every term.
    state_next.req    = rst_n & ( (irqp & ~state.absorb & ~state.done & ~iack_in)
                                | (irqp & ~state.absorb & state.req) );
    state_next.pass   = rst_n & ( (iack_in & ~state.absorb & state.pass)
                                | (iack_in & ~state.absorb & ~state.req)
                                | (iack_in & ~state.absorb & ~m) );
    state_next.absorb = rst_n & ( (iack_in & state.req & m & ~state.pass)
                                | (state.absorb & iack_in)
                                | (state.absorb & ds0 & ~state.released) );
    state_next.done   = rst_n & ( (state.absorb & ds0)
                                | (state.done & irqp)
                                | (state.done & state.absorb) );
    state_next.released = rst_n & ( (state.absorb & state.done & ~ds0)
                                  | (state.released & state.absorb) );
  end

  assign state = state_next;

  assign irqc     = state.req;
  assign iack_out = state.pass;
  assign enid     = state.absorb & ~state.released & ~(state.done & ~ds0);
  assign dtack    = state.absorb & ~state.released & state.done & ds0;

endmodule
