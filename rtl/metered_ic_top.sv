// metered_ic_top - a chip protected by active hardware metering with a
// hierarchical FSM (HFSM) lock.
//
// Every chip made from the same masks powers up locked in the same state
// S_R, but the way out depends on that chip's PUF: the PUF response picks
// one of four paths in each of the N lock layers, and the design house,
// given the response that the foundry reads out, returns the 2N key bits
// and the 2N(m-2) input bits that walk exactly that path. Only then does the
// chip reach S_0, the reset state of its original FSM, and start to work.
//
// Contents:
//   u_puf   - PUF (behavioural model; CHIP_ID plays the chip's process
//             variation), challenged with puf_challenge
//   u_lock  - the N-layer HFSM lock, fed by the PUF response, key and
//             the transitional input in_bits
// The original FSM is not part of this RTL: it is connected through the
// orig_fsm_* ports. It is held in reset (its state S_0) until the lock
// reaches S_0, and sees its input only from then on.
//
// Interface:
//   puf_challenge -> puf_response  PUF readout for the unlocking request
//   key, in_bits                   unlock key (2N bits, held) and the
//                                  per-clock transitional input {b1..bm}
//   unlocked, lock_state,          lock status; lock_step marks a taken
//   lock_step, lock_b12            step, lock_b12 the path-select bits
//   orig_fsm_rst_n, orig_fsm_in    to the original FSM
// Timing: one lock step per clock; with correct inputs `unlocked` and
// orig_fsm_rst_n rise 2N clocks after reset is released.
//
// The lock's place in front of the original FSM, the fixed power-up state
// and the PUF readout follow the scheme; the port set, the reset hand-over
// and the input gating toward the original FSM are this design's choices.
module metered_ic_top
  import hfsm_pkg::*;
#(
  parameter int unsigned N       = N_LAYERS_DEFAULT,      // HFSM layers
  parameter int unsigned M       = M_BITS_DEFAULT,        // input length m
  parameter int unsigned CW      = 64,                    // PUF challenge bits
  parameter logic [63:0] SECRET  = DESIGN_SECRET_DEFAULT, // design house's secret
  parameter logic [63:0] CHIP_ID = CHIP_ID_DEFAULT        // this chip's PUF identity
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [CW-1:0]  puf_challenge,
  output logic [4*N-1:0] puf_response,
  input  logic [2*N-1:0] key,
  input  logic [M-1:0]   in_bits,
  output logic           unlocked,
  output lock_state_t    lock_state,
  output logic           lock_step,    // a lock step was taken this clock
  output logic [1:0]     lock_b12,     // {b1 b2} formed from PUF (and key)
  output logic           orig_fsm_rst_n,
  output logic [M-1:0]   orig_fsm_in
);

  logic [4*N-1:0] resp;

  puf_model #(
    .CW     (CW),
    .RW     (4 * N),
    .CHIP_ID(CHIP_ID)
  ) u_puf (
    .challenge(puf_challenge),
    .response (resp)
  );

  hfsm_lock #(
    .N     (N),
    .M     (M),
    .SECRET(SECRET)
  ) u_lock (
    .clk      (clk),
    .rst_n    (rst_n),
    .puf_resp (resp),
    .key      (key),
    .in_bits  (in_bits),
    .unlocked (unlocked),
    .state    (lock_state),
    .step_fire(lock_step),
    .b12      (lock_b12)
  );

  assign puf_response   = resp;
  assign orig_fsm_rst_n = unlocked;
  assign orig_fsm_in    = unlocked ? in_bits : '0;

endmodule
