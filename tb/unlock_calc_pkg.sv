// unlock_calc_pkg - model of the design house's side of the unlocking
// protocol, for testbenches.
//
// Given the 4N PUF bits read out of one chip, the design house (which
// alone knows the lock's edge labels) works out, layer by layer, the path
// the chip's PUF has chosen, the 2-bit key that turns the second PUF pair
// into that path's step-2 code, and the (m-2)-bit inputs of both steps.
// A chip is then unlocked by holding the key and applying, one per clock,
// the 2N inputs {b1 b2 b3 .. bm} with {b3 .. bm} taken from the plan
// ({b1 b2} of the applied input is ignored while locked).
//
// The search for the path is written here as a plain scan of the four
// step-1 codes; the codes themselves are the lock's design constants from
// hfsm_pkg.
package unlock_calc_pkg;
  import hfsm_pkg::*;

  typedef struct packed {
    logic [1:0]  path;   // middle state chosen by the PUF (S1..S4 -> 0..3)
    logic [1:0]  key;    // 2-bit key of the layer
    logic [63:0] rest1;  // {b3 .. bm} for step 1 (low m-2 bits used)
    logic [63:0] rest2;  // {b3 .. bm} for step 2
  } layer_plan_t;

  function automatic layer_plan_t plan_layer(input int unsigned layer,
                                             input logic [3:0] puf4,
                                             input logic [63:0] secret);
    layer_plan_t p;
    p.path = 2'd0;
    for (int j = 0; j < 4; j++)
      if (edge_code(layer, 1'b0, 2'(j), secret) == puf4[3:2]) p.path = 2'(j);
    p.key   = puf4[1:0] ^ edge_code(layer, 1'b1, p.path, secret);
    p.rest1 = rest_code(layer, 1'b0, p.path, secret);
    p.rest2 = rest_code(layer, 1'b1, p.path, secret);
    return p;
  endfunction

endpackage
