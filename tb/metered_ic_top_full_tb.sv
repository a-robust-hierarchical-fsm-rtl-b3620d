// metered_ic_top_full_tb - one complete unlocking of the metered chip at its
// default size (N = 10 layers, m = 9 input bits), parameters untouched.
//
// The chip's PUF is challenged and its 4N-bit response read out; the key
// and the 2N inputs are computed from it as the design house would
// (unlock_calc_pkg); the key is applied and the inputs are clocked in one
// per cycle. Checked: the chip is locked after power-up and until the last
// step, the original FSM is held in reset with its input gated, the lock
// follows the PUF's path, and after exactly 2N clocks the chip is unlocked
// and the original FSM released and fed.
module metered_ic_top_full_tb;
  import hfsm_pkg::*;
  import unlock_calc_pkg::*;

  localparam int unsigned N = N_LAYERS_DEFAULT;
  localparam int unsigned M = M_BITS_DEFAULT;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic           rst_n;
  logic [63:0]    chal;
  logic [4*N-1:0] resp;
  logic [2*N-1:0] key;
  logic [M-1:0]   in_bits, oin;
  logic           unl, step, orst;
  lock_state_t    lst;
  logic [1:0]     b12;

  metered_ic_top dut (
    .clk, .rst_n, .puf_challenge(chal), .puf_response(resp), .key,
    .in_bits, .unlocked(unl), .lock_state(lst), .lock_step(step),
    .lock_b12(b12), .orig_fsm_rst_n(orst), .orig_fsm_in(oin));

  initial begin
    layer_plan_t p [N];
    logic [4*N-1:0] r;
    int cyc;
    rst_n = 1'b0; chal = 64'hFEED_5EED_0000_1234; key = '0; in_bits = '0;
    repeat (3) @(negedge clk);
    check("locked at power-up", !unl && !orst && lst.phase == PH_TOP && lst.layer == 0);
    r = resp;
    for (int i = 0; i < N; i++) p[i] = plan_layer(i, r[4*i +: 4], DESIGN_SECRET_DEFAULT);
    for (int i = 0; i < N; i++) key[2*i +: 2] = p[i].key;
    rst_n = 1'b1;
    cyc = 0;
    for (int i = 0; i < N; i++) begin
      in_bits = {2'($urandom), p[i].rest1[M-3:0]};
      #1 check("step 1 enabled", step && b12 == r[4*i+2 +: 2]);
      check("original FSM held, input gated", !orst && oin == '0);
      @(negedge clk); cyc++;
      check("middle state of the PUF's path",
            lst.layer == 8'(i) && lst.phase == PH_MID && lst.path == p[i].path);
      in_bits = {2'($urandom), p[i].rest2[M-3:0]};
      #1 check("step 2 enabled", step && b12 == (r[4*i +: 2] ^ p[i].key));
      @(negedge clk); cyc++;
      if (i < N - 1) check("next layer top", lst.layer == 8'(i + 1) && lst.phase == PH_TOP && !unl);
    end
    check("unlocked after 2N clocks", unl && cyc == 2 * N);
    check("original FSM released", orst);
    in_bits = 9'h1A5;
    #1 check("original FSM fed", oin == 9'h1A5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
