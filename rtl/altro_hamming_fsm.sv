// altro_hamming_fsm: single-event-upset protected bus transaction machine.
//
// The three states idle, wait and done are held in a 6-bit register with
// Hamming-coded values 000000, 000111 and 011001, which are at least three
// bit flips apart. Every value one flip away from a coding state is a
// derived state of it: it drives the same outputs, and the next-state
// logic, which works on the decoded state, moves the machine on to the
// proper coding state at the next edge (back to the same one when no
// transition is due). Any other value is an invalid state, reached by a
// double flip: it cannot be attributed, so the machine aborts to idle.
// err_single / err_double flag a derived / invalid state in the current
// cycle, for the status register. seu_flip XORs bits into the state
// register at the clock edge and exists to inject upsets in tests; tie it to
// zero in use.
//
// Transitions: idle -> wait on cstb, wait -> done on ready, done -> idle
// when cstb is released. The codes, the state names, the two labelled
// transitions and the recovery rules follow the chip; the done -> idle
// condition is this design's choice.
module altro_hamming_fsm
  import altro_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cstb,
  input  logic       ready,
  input  logic [5:0] seu_flip,
  output logic       st_idle,
  output logic       st_wait,
  output logic       st_done,
  output logic       err_single,
  output logic       err_double,
  output logic [5:0] code
);

  typedef enum logic [1:0] {L_IDLE, L_WAIT, L_DONE, L_INVALID} lstate_e;

  function automatic int unsigned hdist(input logic [5:0] a, input logic [5:0] b);
    return $countones(a ^ b);
  endfunction

  lstate_e ls;
  always_comb begin
    err_single = 1'b0;
    err_double = 1'b0;
    if (hdist(code, HS_IDLE) <= 1)      ls = L_IDLE;
    else if (hdist(code, HS_WAIT) <= 1) ls = L_WAIT;
    else if (hdist(code, HS_DONE) <= 1) ls = L_DONE;
    else                               ls = L_INVALID;
    if (ls == L_INVALID) err_double = 1'b1;
    else if (code != HS_IDLE && code != HS_WAIT && code != HS_DONE) err_single = 1'b1;
  end

  logic [5:0] nxt;
  always_comb
    case (ls)
      L_IDLE:  nxt = cstb  ? HS_WAIT : HS_IDLE;
      L_WAIT:  nxt = ready ? HS_DONE : HS_WAIT;
      L_DONE:  nxt = cstb  ? HS_DONE : HS_IDLE;
      default: nxt = HS_IDLE;                 // abort
    endcase

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) code <= HS_IDLE;
    else        code <= nxt ^ seu_flip;

  assign st_idle = (ls == L_IDLE);
  assign st_wait = (ls == L_WAIT);
  assign st_done = (ls == L_DONE);

endmodule
