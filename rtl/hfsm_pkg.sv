// hfsm_pkg - shared types, constants and design-time functions of the
// hierarchical-FSM (HFSM) chip lock.
//
// The lock is a chain of N layers of five states each. In every transition
// step the m-bit transitional input is split into two path-select bits
// {b1 b2} and m-2 remaining bits {b3 .. bm}. Each layer has two steps with
// four edges each; an edge is labelled with a 2-bit code (four different
// codes per step) and with an (m-2)-bit value that only the design house
// knows.
//
// Those labels are constants of the synthesized netlist. Here they are
// produced by pure functions from a per-design secret (DESIGN_SECRET), so
// that any N and m give a complete, reproducible table without storing one.
// Layer 1 uses the edge codes printed in the one-layer example of the
// scheme (step 1: S1=11, S2=01, S3=10, S4=00; step 2: S1=01, S2=10,
// S3=11, S4=00). Codes of later layers and all (m-2)-bit values are this
// design's own choice: a bijective rotate-and-XOR of the four codes and a
// 64-bit mixing hash, both keyed by the secret.
package hfsm_pkg;

  // Paper-level defaults: up to 10 layers were evaluated; m = 9 is the input
  // length of the first benchmark (styr) in the evaluation.
  parameter int unsigned N_LAYERS_DEFAULT = 10;
  parameter int unsigned M_BITS_DEFAULT   = 9;
  parameter logic [63:0] DESIGN_SECRET_DEFAULT = 64'h5EC2_E7D0_A1B3_C4F9;
  parameter logic [63:0] CHIP_ID_DEFAULT       = 64'h0000_0000_0000_0001;

  // Position inside a layer: at its top state, or at one of its four
  // middle states after step 1.
  typedef enum logic [1:0] {
    PH_TOP      = 2'd0,
    PH_MID      = 2'd1,
    PH_UNLOCKED = 2'd2
  } phase_e;

  typedef struct packed {
    logic [7:0] layer;  // current layer, 0 .. N-1
    phase_e     phase;  // top state / middle state / unlocked (S_0)
    logic [1:0] path;   // which middle state (S1..S4 -> 0..3) in PH_MID
  } lock_state_t;

  // SplitMix64 finaliser: a bijective 64-bit mixing function.
  function automatic logic [63:0] mix64(input logic [63:0] x);
    logic [63:0] z;
    z = x + 64'h9E37_79B9_7F4A_7C15;
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    return z ^ (z >> 31);
  endfunction

  // Two-bit code {b1 b2} on edge `path` (0..3) of step `step2`
  // (0: top -> middle, 1: middle -> next top) in layer `layer` (0-based).
  function automatic logic [1:0] edge_code(input int unsigned layer,
                                           input logic step2,
                                           input logic [1:0] path,
                                           input logic [63:0] secret);
    logic [3:0] h;
    logic [1:0] r;
    if (layer == 0) begin
      if (!step2) begin
        case (path)
          2'd0: return 2'b11;
          2'd1: return 2'b01;
          2'd2: return 2'b10;
          default: return 2'b00;
        endcase
      end else begin
        case (path)
          2'd0: return 2'b01;
          2'd1: return 2'b10;
          2'd2: return 2'b11;
          default: return 2'b00;
        endcase
      end
    end
    h = 4'(mix64(secret ^ {32'hC0DE_0000 ^ 32'(layer), 31'd0, step2}));
    // (path + rot) mod 4, then XOR: a permutation of the four codes.
    r = path + h[1:0];
    return r ^ h[3:2];
  endfunction

  // Secret value of the remaining m-2 input bits on that edge (low bits
  // of the returned word are used; m-2 <= 64).
  function automatic logic [63:0] rest_code(input int unsigned layer,
                                            input logic step2,
                                            input logic [1:0] path,
                                            input logic [63:0] secret);
    return mix64(mix64(secret) ^ {32'hBEEF_0000 ^ 32'(layer), 15'd0, step2, path, 14'd0});
  endfunction

  // All four edges of one step, indexed by path.
  function automatic logic [3:0][1:0] step_codes(input int unsigned layer,
                                                 input logic step2,
                                                 input logic [63:0] secret);
    logic [3:0][1:0] c;
    for (int j = 0; j < 4; j++) c[j] = edge_code(layer, step2, 2'(j), secret);
    return c;
  endfunction

  function automatic logic [3:0][63:0] step_rests(input int unsigned layer,
                                                  input logic step2,
                                                  input logic [63:0] secret);
    logic [3:0][63:0] r;
    for (int j = 0; j < 4; j++) r[j] = rest_code(layer, step2, 2'(j), secret);
    return r;
  endfunction

endpackage
