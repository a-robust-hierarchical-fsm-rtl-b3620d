// metered_ic_top_tb - end-to-end test of the metered chip: the whole
// unlocking protocol on two chips made from the same design.
//
// For each chip: challenge its PUF and read the response out (the
// foundry's side); compute the key and the 2N inputs from the response
// (the design house's side, unlock_calc_pkg); apply them, one input per
// clock, with wrong inputs mixed in; check that the chip reaches S_0 and
// hands over to the original FSM. Then the key computed for one chip is
// tried on the other, which must stay locked, and reset must lock a chip
// again.
//
// Every mechanism is counted and must occur at least once: step-1 and
// step-2 transitions, a hold on wrong {b3..bm}, a hold on a wrong key,
// an unlock, a rejected foreign key, a relock by reset, the original
// FSM's input gated while locked and passed once unlocked.
module metered_ic_top_tb;
  import hfsm_pkg::*;
  import unlock_calc_pkg::*;

  localparam int unsigned N  = N_LAYERS_DEFAULT;
  localparam int unsigned M  = M_BITS_DEFAULT;
  localparam int unsigned CW = 64;
  localparam logic [63:0] SECRET = DESIGN_SECRET_DEFAULT;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Two chips of the same design; chip 1 has its own process variation.
  logic [1:0]          rst_n;
  logic [CW-1:0]       chal   [2];
  logic [4*N-1:0]      resp   [2];
  logic [2*N-1:0]      key    [2];
  logic [M-1:0]        in_b   [2];
  logic [1:0]          unl, step, orst;
  lock_state_t         lst    [2];
  logic [1:0]          b12    [2];
  logic [M-1:0]        oin    [2];

  metered_ic_top chip0 (
    .clk, .rst_n(rst_n[0]), .puf_challenge(chal[0]), .puf_response(resp[0]),
    .key(key[0]), .in_bits(in_b[0]), .unlocked(unl[0]), .lock_state(lst[0]),
    .lock_step(step[0]), .lock_b12(b12[0]), .orig_fsm_rst_n(orst[0]),
    .orig_fsm_in(oin[0]));

  metered_ic_top #(.CHIP_ID(64'h0BAD_C0FF_EE00_0002)) chip1 (
    .clk, .rst_n(rst_n[1]), .puf_challenge(chal[1]), .puf_response(resp[1]),
    .key(key[1]), .in_bits(in_b[1]), .unlocked(unl[1]), .lock_state(lst[1]),
    .lock_step(step[1]), .lock_b12(b12[1]), .orig_fsm_rst_n(orst[1]),
    .orig_fsm_in(oin[1]));

  int n_step1 = 0, n_step2 = 0, n_hold_rest = 0, n_hold_key = 0;
  int n_unlock = 0, n_foreign = 0, n_relock = 0, n_gated = 0, n_passed = 0;

  // Count transitions taken by either chip.
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++)
      if (rst_n[c] && step[c] && !unl[c]) begin
        if (lst[c].phase == PH_TOP) n_step1++;
        else                        n_step2++;
      end
  end

  task automatic reset_chip(input int c);
    @(negedge clk) rst_n[c] = 1'b0;
    @(negedge clk);
    check("power-up state is S_R",
          lst[c].layer == 0 && lst[c].phase == PH_TOP && !unl[c] && !orst[c]);
    rst_n[c] = 1'b1;
  endtask

  // Unlock chip c with the plan computed from response r; with `errors`
  // one wrong input and, in step 2, one wrong key are applied first.
  task automatic unlock(input int c, input logic [4*N-1:0] r, input bit errors,
                        input bit own, output int cycles);
    layer_plan_t p [N];
    for (int i = 0; i < N; i++) p[i] = plan_layer(i, r[4*i +: 4], SECRET);
    for (int i = 0; i < N; i++) key[c][2*i +: 2] = p[i].key;
    reset_chip(c);
    cycles = 0;
    for (int i = 0; i < N; i++) begin
      if (errors) begin
        in_b[c] = {2'b11, ~p[i].rest1[M-3:0]};
        @(negedge clk); cycles++;
        check("wrong input holds top", lst[c].phase == PH_TOP && lst[c].layer == 8'(i));
        n_hold_rest++;
      end
      in_b[c] = {2'($urandom), p[i].rest1[M-3:0]};
      #1;
      check("original FSM held and gated while locked", oin[c] == '0 && !orst[c]);
      n_gated++;
      @(negedge clk); cycles++;
      if (own)
        check("in middle state of the PUF's path",
              lst[c].phase == PH_MID && lst[c].path == p[i].path && lst[c].layer == 8'(i));
      if (errors) begin
        key[c][2*i +: 2] = ~p[i].key;
        in_b[c] = {2'($urandom), p[i].rest2[M-3:0]};
        @(negedge clk); cycles++;
        check("wrong key holds middle", lst[c].phase == PH_MID);
        n_hold_key++;
        key[c][2*i +: 2] = p[i].key;
      end
      in_b[c] = {2'($urandom), p[i].rest2[M-3:0]};
      @(negedge clk); cycles++;
    end
  endtask

  initial begin
    int cyc;
    logic [4*N-1:0] r0, r1;
    rst_n = 2'b00;
    for (int c = 0; c < 2; c++) begin
      chal[c] = 64'h0123_4567_89AB_CDEF;   // same PUF inputs for both chips
      key[c]  = '0;
      in_b[c] = '0;
    end
    repeat (2) @(negedge clk);

    // Foundry: read out both chips' PUF responses.
    r0 = resp[0];
    r1 = resp[1];
    check("two chips give different PUF responses", r0 != r1);

    // Clean unlock of chip 0: exactly 2N clocks.
    unlock(0, r0, 1'b0, 1'b1, cyc);
    check("chip 0 unlocks in 2N clocks", unl[0] && cyc == 2 * N);
    check("original FSM released", orst[0]);
    if (unl[0]) n_unlock++;
    in_b[0] = M'($urandom);
    #1 check("original FSM sees the input once unlocked", oin[0] == in_b[0]);
    n_passed++;

    // Unlock of chip 1 with errors mixed in.
    unlock(1, r1, 1'b1, 1'b1, cyc);
    check("chip 1 unlocks despite wrong tries", unl[1] && orst[1]);
    check("wrong tries cost extra clocks", cyc == 4 * N);
    if (unl[1]) n_unlock++;

    // Chip 1 reset: locked again.
    reset_chip(1);
    @(negedge clk);
    check("chip 1 relocked by reset", !unl[1] && !orst[1]);
    n_relock++;

    // Chip 0's key and inputs on chip 1: it must stay locked.
    unlock(1, r0, 1'b0, 1'b0, cyc);
    check("chip 0's key does not open chip 1", !unl[1]);
    n_foreign++;

    // Second challenge, new responses, both still unlock.
    for (int c = 0; c < 2; c++) chal[c] = {$urandom, $urandom};
    #1;
    unlock(0, resp[0], 1'b0, 1'b1, cyc);
    check("chip 0 unlocks under a second challenge", unl[0]);
    if (unl[0]) n_unlock++;
    unlock(1, resp[1], 1'b0, 1'b1, cyc);
    check("chip 1 unlocks under a second challenge", unl[1]);
    if (unl[1]) n_unlock++;

    // Every mechanism happened.
    check("step-1 transitions", n_step1 >= 4 * N);
    check("step-2 transitions", n_step2 >= 4 * N);
    check("holds on wrong input", n_hold_rest > 0);
    check("holds on wrong key", n_hold_key > 0);
    check("unlocks", n_unlock == 4);
    check("foreign key rejected", n_foreign > 0);
    check("relock", n_relock > 0);
    check("gating", n_gated > 0 && n_passed > 0);
    $display("mechanisms: step1=%0d step2=%0d hold_input=%0d hold_key=%0d unlock=%0d foreign=%0d relock=%0d",
             n_step1, n_step2, n_hold_rest, n_hold_key, n_unlock, n_foreign, n_relock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
