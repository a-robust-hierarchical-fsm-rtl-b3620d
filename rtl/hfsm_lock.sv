// hfsm_lock - N-layer hierarchical FSM (HFSM) that locks a chip until it is
// walked, with chip-specific inputs, from its power-up state to the
// original FSM's reset state.
//
// State space: the top state of layer 0 is the fixed power-up state S_R;
// each layer adds four middle states; the top state of layer i+1 is the
// state that all four middle states of layer i lead to; after the last
// layer's second step the FSM reaches S_0, the original design's reset
// state, and reports `unlocked`. That is 2N transition steps, one per clock
// when the inputs are right. A wrong input holds the current state, and the
// lock is re-entered only through reset (power-up).
//
// The path through each layer is chosen by that chip's PUF bits, so both
// the 2N key bits and the 2N(m-2) input bits that open it are unique to the
// chip. Layer i uses PUF bits puf_resp[4i+3 : 4i] (bits 4i+3:4i+2 select
// the step-1 path, bits 4i+1:4i are XORed with key[2i+1 : 2i] in step 2).
// Of the m-bit input in_bits (b1 = MSB) only {b3 .. bm} = in_bits[M-3:0] is
// used while locked; {b1 b2} is formed from the PUF and key, so the two top
// bits of in_bits are deliberately left unread here.
//
// Timing: in_bits and key are sampled at each rising clk edge; `unlocked`
// rises 2N clocks after reset when every step is given its right input.
// Reset is asynchronous, active low.
//
// Layer structure, the PUF/key/input split and the 4N PUF bits and 2N key
// bits follow the scheme. State encoding, reset style, the hold-on-wrong-
// input behaviour and the PUF/key bit numbering are this design's choices.
module hfsm_lock
  import hfsm_pkg::*;
#(
  parameter int unsigned N      = N_LAYERS_DEFAULT,  // number of HFSM layers
  parameter int unsigned M      = M_BITS_DEFAULT,    // transitional input length m
  parameter logic [63:0] SECRET = DESIGN_SECRET_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [4*N-1:0] puf_resp,   // chip's PUF response, 4 bits per layer
  input  logic [2*N-1:0] key,        // unlock key, 2 bits per layer
  input  logic [M-1:0]   in_bits,    // transitional input {b1 .. bm}
  output logic           unlocked,   // in S_0: original FSM may run
  output lock_state_t    state,      // current lock state
  output logic           step_fire,  // a transition step is taken this cycle
  output logic [1:0]     b12         // {b1 b2} formed for the current step
);

  initial begin
    if (N < 1 || N > 255) $error("hfsm_lock: N must be 1..255");
    if (M < 3 || M > 66)  $error("hfsm_lock: M must be 3..66");
  end

  lock_state_t st_q, st_d;

  logic [N-1:0]      s1_go, s2_go;
  logic [N-1:0][1:0] s1_path, b12_v;

  for (genvar i = 0; i < N; i++) begin : g_layer
    logic here;
    assign here = (st_q.layer == 8'(i)) && (st_q.phase != PH_UNLOCKED);
    hfsm_layer #(
      .M     (M),
      .LAYER (i),
      .SECRET(SECRET)
    ) u_layer (
      .at_top    (here && st_q.phase == PH_TOP),
      .at_mid    (here && st_q.phase == PH_MID),
      .mid_path  (st_q.path),
      .puf_pair  (puf_resp[4*i +: 4]),
      .key       (key[2*i +: 2]),
      .rest      (in_bits[M-3:0]),
      .step1_go  (s1_go[i]),
      .step1_path(s1_path[i]),
      .step2_go  (s2_go[i]),
      .b12       (b12_v[i])
    );
  end

  // Only the layer the FSM stands in can fire, so the per-layer strobes
  // are simply ORed; path and {b1 b2} are taken from that layer.
  logic       go1, go2;
  logic [1:0] path_sel, b12_sel;

  always_comb begin
    go1      = |s1_go;
    go2      = |s2_go;
    path_sel = 2'd0;
    b12_sel  = 2'd0;
    for (int i = 0; i < N; i++) begin
      if (st_q.layer == 8'(i)) begin
        path_sel = s1_path[i];
        b12_sel  = b12_v[i];
      end
    end
  end

  always_comb begin
    st_d = st_q;
    unique case (st_q.phase)
      PH_TOP: if (go1) begin
        st_d.phase = PH_MID;
        st_d.path  = path_sel;
      end
      PH_MID: if (go2) begin
        st_d.path = 2'd0;
        if (st_q.layer == 8'(N - 1)) begin
          st_d.phase = PH_UNLOCKED;
        end else begin
          st_d.phase = PH_TOP;
          st_d.layer = st_q.layer + 8'd1;
        end
      end
      default: st_d = st_q;  // PH_UNLOCKED: S_0, stays until reset
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_q <= '{layer: 8'd0, phase: PH_TOP, path: 2'd0};
    else        st_q <= st_d;
  end

  assign unlocked  = (st_q.phase == PH_UNLOCKED);
  assign state     = st_q;
  assign step_fire = go1 | go2;
  assign b12       = b12_sel;

  // The lock never skips a layer and never leaves S_0 without reset.
  a_layer_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    st_q.layer < 8'(N));
  a_unlocked_sticks: assert property (@(posedge clk) disable iff (!rst_n)
    unlocked |=> unlocked);
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
    !(go1 && go2));

endmodule
