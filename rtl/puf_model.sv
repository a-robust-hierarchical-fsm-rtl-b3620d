// puf_model - BEHAVIOURAL MODEL of a physically unclonable function (PUF),
// not a circuit to be built. A real PUF derives its responses from random
// manufacturing variation of the silicon; that cannot be written as RTL.
//
// The model stands in for it: each chip is given a CHIP_ID (its "process
// variation"), and the response to a challenge is a fixed pseudo-random
// function of (CHIP_ID, challenge), so the same chip always answers the
// same challenge with the same bits (the lock assumes a stable PUF) and two
// chips almost never agree. Response bits are produced 64 at a time by a
// mixing hash over (CHIP_ID, challenge, word index).
//
// Interface: `challenge` (the PUF inputs handed to each chip) in,
// `response` (RW bits, 4 per HFSM layer) out. Combinational and settled
// at once; a real PUF's evaluation time is not modelled.
//
// The challenge/response interface and the 4N response bits follow the
// scheme; the challenge width and the response function are this model's
// own choices.
module puf_model
  import hfsm_pkg::*;
#(
  parameter int unsigned CW      = 64,                    // challenge bits
  parameter int unsigned RW      = 4 * N_LAYERS_DEFAULT,  // response bits
  parameter logic [63:0] CHIP_ID = CHIP_ID_DEFAULT
) (
  input  logic [CW-1:0] challenge,
  output logic [RW-1:0] response
);

  localparam int unsigned NW = (RW + 63) / 64;   // 64-bit response words
  localparam int unsigned NC = (CW + 63) / 64;   // 64-bit challenge words

  logic [NW*64-1:0] resp_words;

  always_comb begin
    logic [NC*64-1:0] ch;
    logic [63:0]      acc;
    ch  = '0;
    ch[CW-1:0] = challenge;
    acc = mix64(CHIP_ID);
    for (int c = 0; c < NC; c++) acc = mix64(acc ^ ch[64*c +: 64]);
    for (int w = 0; w < NW; w++) resp_words[64*w +: 64] = mix64(acc + 64'(w));
  end

  assign response = resp_words[RW-1:0];

endmodule
