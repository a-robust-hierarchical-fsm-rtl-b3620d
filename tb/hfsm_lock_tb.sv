// hfsm_lock_tb - self-checking test of the N-layer HFSM lock.
//
// dut (N = 10, m = 9, the default size) is unlocked for many random PUF
// responses with the key and inputs a design house would compute for each
// (unlock_calc_pkg). Checked on every clock: the lock state (layer, top or
// middle state, path) against the expected walk; that a correct walk takes
// exactly 2N clocks from reset to S_0; that a wrong {b3..bm} or a wrong key
// holds the state; that {b1 b2} of the applied input is ignored; that S_0
// holds whatever the inputs; and that reset locks the chip again. A key
// computed for another chip's PUF response is also tried.
//
// dut_bf (N = 1, m = 3) is attacked by brute force: all 2^(2m-2) = 16
// combinations of the 2 key bits and the two 1-bit inputs are tried, and
// exactly one of them must open the lock.
module hfsm_lock_tb;
  import hfsm_pkg::*;
  import unlock_calc_pkg::*;

  localparam int unsigned N = 10;
  localparam int unsigned M = 9;
  localparam logic [63:0] SECRET = DESIGN_SECRET_DEFAULT;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- full-size lock ----------------
  logic           rst_n;
  logic [4*N-1:0] puf;
  logic [2*N-1:0] key;
  logic [M-1:0]   in_bits;
  logic           unlocked, fire;
  lock_state_t    st;
  logic [1:0]     b12;

  hfsm_lock #(.N(N), .M(M), .SECRET(SECRET)) dut (
    .clk, .rst_n, .puf_resp(puf), .key, .in_bits,
    .unlocked, .state(st), .step_fire(fire), .b12);

  // ---------------- brute-force target ----------------
  logic       rst_bf_n;
  logic [3:0] puf_bf;
  logic [1:0] key_bf;
  logic [2:0] in_bf;
  logic       unl_bf, fire_bf;
  lock_state_t st_bf;
  logic [1:0] b12_bf;

  hfsm_lock #(.N(1), .M(3), .SECRET(SECRET)) dut_bf (
    .clk, .rst_n(rst_bf_n), .puf_resp(puf_bf), .key(key_bf), .in_bits(in_bf),
    .unlocked(unl_bf), .state(st_bf), .step_fire(fire_bf), .b12(b12_bf));

  layer_plan_t plan [N];
  int n_hold_rest = 0, n_hold_key = 0, n_unlock = 0, n_wrong_chip = 0;

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check("reset: at S_R layer", 64'(st.layer), 64'd0);
    check("reset: at S_R phase", 64'(st.phase), 64'(PH_TOP));
    check("reset: locked", 64'(unlocked), 64'd0);
    rst_n = 1'b1;
  endtask

  // Walk the lock of the chip whose response is `puf`. With `errors`,
  // wrong inputs and keys are mixed in before correct ones.
  task automatic walk(input bit errors, output int cycles);
    logic [M-3:0] r;
    cycles = 0;
    for (int i = 0; i < N; i++) plan[i] = plan_layer(i, puf[4*i +: 4], SECRET);
    for (int i = 0; i < N; i++) key[2*i +: 2] = plan[i].key;
    do_reset();
    for (int i = 0; i < N; i++) begin
      // ---- step 1 ----
      if (errors) begin
        repeat ($urandom_range(1, 2)) begin
          r = plan[i].rest1[M-3:0] ^ (M-2)'(1 << $urandom_range(0, M-3));
          in_bits = {2'($urandom), r};
          @(negedge clk); cycles++;
          check("wrong rest holds top", 64'(st), 64'({8'(i), PH_TOP, 2'd0}));
          n_hold_rest++;
        end
      end
      in_bits = {2'($urandom), plan[i].rest1[M-3:0]};
      #1 check("step1 b12 = PUF pair", 64'(b12), 64'(puf[4*i+2 +: 2]));
      check("step1 fire", 64'(fire), 64'd1);
      @(negedge clk); cycles++;
      check("step1 state", 64'(st), 64'({8'(i), PH_MID, plan[i].path}));
      // ---- step 2 ----
      if (errors) begin
        key[2*i +: 2] = plan[i].key ^ 2'($urandom_range(1, 3));
        in_bits = {2'($urandom), plan[i].rest2[M-3:0]};
        @(negedge clk); cycles++;
        check("wrong key holds middle", 64'(st), 64'({8'(i), PH_MID, plan[i].path}));
        n_hold_key++;
        key[2*i +: 2] = plan[i].key;
        r = plan[i].rest2[M-3:0] ^ (M-2)'(1 << $urandom_range(0, M-3));
        in_bits = {2'($urandom), r};
        @(negedge clk); cycles++;
        check("wrong rest holds middle", 64'(st), 64'({8'(i), PH_MID, plan[i].path}));
        n_hold_rest++;
      end
      in_bits = {2'($urandom), plan[i].rest2[M-3:0]};
      @(negedge clk); cycles++;
      if (i < N - 1) begin
        check("step2 state", 64'(st), 64'({8'(i + 1), PH_TOP, 2'd0}));
        check("step2 locked", 64'(unlocked), 64'd0);
      end else begin
        check("unlocked after last step", 64'(unlocked), 64'd1);
      end
    end
  endtask

  initial begin
    int cyc;
    rst_n = 1'b0; rst_bf_n = 1'b0;
    puf = '0; key = '0; in_bits = '0;
    puf_bf = '0; key_bf = '0; in_bf = '0;

    // Clean unlocks: exactly 2N clocks.
    for (int c = 0; c < 20; c++) begin
      puf = (4*N)'({$urandom, $urandom});
      walk(1'b0, cyc);
      check("unlock takes 2N clocks", 64'(cyc), 64'(2 * N));
      if (unlocked) n_unlock++;
      // S_0 holds for any input.
      repeat (5) begin
        in_bits = M'($urandom); key = (2*N)'({$urandom, $urandom});
        @(negedge clk);
        check("S_0 holds", 64'(unlocked), 64'd1);
      end
    end

    // Unlocks with wrong inputs mixed in.
    for (int c = 0; c < 20; c++) begin
      puf = (4*N)'({$urandom, $urandom});
      walk(1'b1, cyc);
      if (unlocked) n_unlock++;
    end
    check("unlocked before reset", 64'(unlocked), 64'd1);
    do_reset();
    @(negedge clk);
    check("relocked after reset", 64'(unlocked), 64'd0);

    // Key and inputs of chip A given to chip B: B must not unlock.
    for (int c = 0; c < 10; c++) begin
      logic [4*N-1:0] puf_a;
      logic [2*N-1:0] key_a;
      layer_plan_t    pa [N];
      puf_a = (4*N)'({$urandom, $urandom});
      for (int i = 0; i < N; i++) pa[i] = plan_layer(i, puf_a[4*i +: 4], SECRET);
      for (int i = 0; i < N; i++) key_a[2*i +: 2] = pa[i].key;
      puf = (4*N)'({$urandom, $urandom});
      key = key_a;
      do_reset();
      for (int i = 0; i < N; i++) begin
        in_bits = {2'b00, pa[i].rest1[M-3:0]};
        @(negedge clk);
        in_bits = {2'b00, pa[i].rest2[M-3:0]};
        @(negedge clk);
      end
      check("other chip's key does not unlock", 64'(unlocked), 64'd0);
      n_wrong_chip++;
    end

    // Brute force on a 1-layer, m = 3 lock: 16 guesses, one opens it.
    for (int c = 0; c < 8; c++) begin
      int opens;
      opens = 0;
      puf_bf = 4'($urandom);
      for (int g = 0; g < 16; g++) begin
        @(negedge clk); rst_bf_n = 1'b0;
        @(negedge clk); rst_bf_n = 1'b1;
        key_bf = 2'(g >> 2);
        in_bf  = {2'($urandom), 1'(g >> 1)};
        @(negedge clk);
        in_bf  = {2'($urandom), 1'(g)};
        @(negedge clk);
        if (unl_bf) opens++;
      end
      check("exactly one of 2^(2m-2) guesses opens", 64'(opens), 64'd1);
    end

    check("unlocks happened", 64'(n_unlock), 64'd40);
    check("held on wrong rest", 64'(n_hold_rest > 0), 64'd1);
    check("held on wrong key", 64'(n_hold_key > 0), 64'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
