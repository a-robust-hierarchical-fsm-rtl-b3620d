// hfsm_layer - transition logic of one layer of the hierarchical FSM lock.
//
// A layer has five states: a top state and four middle states S1..S4
// (path 0..3). It is crossed in two transition steps:
//   step 1 (top -> middle):  the path-select bits {b1 b2} are taken from the
//     first PUF pair. The four step-1 edges carry four different codes, so
//     exactly one edge is selected. The edge is taken only when the
//     remaining m-2 input bits {b3 .. bm} equal that edge's secret value.
//   step 2 (middle -> next top): {b1 b2} is the second PUF pair XOR the
//     layer's 2-bit key. The single edge leaving the current middle state is
//     taken only when {b1 b2} equals its code and {b3 .. bm} equals its
//     secret value.
// A step whose condition fails leaves the state unchanged (the caller holds
// its state register).
//
// The split of the input, the PUF-driven path choice, the XOR with the key
// and the five-state shape follow the scheme. That a failed step simply
// holds the state, the bit order on the ports and the way edge labels are
// generated (see hfsm_pkg) are this design's choices.
//
// Interface (purely combinational, no clock):
//   at_top, at_mid, mid_path - where the enclosing FSM stands in this layer
//   puf_pair                 - the layer's four PUF bits: [3:2] select the
//                              step-1 path ({b1 b2}, b1 = bit 3), [1:0] are
//                              XORed with `key` in step 2
//   key                      - the layer's 2-bit unlock key
//   rest                     - input bits {b3 .. bm}, b3 = MSB
//   step1_go, step1_path     - step 1 fires, into middle state step1_path
//   step2_go                 - step 2 fires, into the next layer's top
//   b12                      - the {b1 b2} value formed for the active step
module hfsm_layer
  import hfsm_pkg::*;
#(
  parameter int unsigned M      = M_BITS_DEFAULT,  // transitional input length m
  parameter int unsigned LAYER  = 0,               // 0-based layer index
  parameter logic [63:0] SECRET = DESIGN_SECRET_DEFAULT
) (
  input  logic         at_top,
  input  logic         at_mid,
  input  logic [1:0]   mid_path,
  input  logic [3:0]   puf_pair,
  input  logic [1:0]   key,
  input  logic [M-3:0] rest,
  output logic         step1_go,
  output logic [1:0]   step1_path,
  output logic         step2_go,
  output logic [1:0]   b12
);

  localparam logic [3:0][1:0]  CODE1 = step_codes(LAYER, 1'b0, SECRET);
  localparam logic [3:0][1:0]  CODE2 = step_codes(LAYER, 1'b1, SECRET);
  localparam logic [3:0][63:0] REST1 = step_rests(LAYER, 1'b0, SECRET);
  localparam logic [3:0][63:0] REST2 = step_rests(LAYER, 1'b1, SECRET);

  logic [1:0] sel1;   // {b1 b2} of step 1
  logic [1:0] sel2;   // {b1 b2} of step 2
  logic [1:0] path1;  // edge whose code equals sel1

  assign sel1 = puf_pair[3:2];
  assign sel2 = puf_pair[1:0] ^ key;

  always_comb begin
    path1 = 2'd0;
    for (int j = 0; j < 4; j++)
      if (CODE1[j] == sel1) path1 = 2'(j);
  end

  assign step1_path = path1;
  assign step1_go   = at_top && (rest == REST1[path1][M-3:0]);
  assign step2_go   = at_mid && (sel2 == CODE2[mid_path])
                             && (rest == REST2[mid_path][M-3:0]);
  assign b12        = at_mid ? sel2 : sel1;

endmodule
