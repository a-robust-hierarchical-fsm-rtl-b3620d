// hfsm_workload_run - runs one lock configuration (N layers, m input bits)
// for hfsm_workloads_tb and reports its counts.
//
// It instantiates an hfsm_lock of that size and
//   1. unlocks it for TRIALS random PUF responses with the computed key and
//      inputs, checking that each unlock takes exactly 2N clocks;
//   2. for one PUF response, flips each secret bit alone - each of the 2N
//      key bits and each of the 2N(m-2) checked input bits - and checks that
//      the lock then stays closed. The number of secret bits, N(2m-2), is
//      the exponent of the lock's brute-force security level and is
//      reported in `secret_bits`.
module hfsm_workload_run
  import hfsm_pkg::*;
  import unlock_calc_pkg::*;
#(
  parameter int unsigned N      = 1,
  parameter int unsigned M      = 3,
  parameter int unsigned TRIALS = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   secret_bits
);
  localparam logic [63:0] SECRET = DESIGN_SECRET_DEFAULT;

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

  // Secret of one chip: key bits, then the 2N inputs {b3..bm}.
  logic [2*N-1:0]           s_key;
  logic [2*N-1:0][M-3:0]    s_in;

  task automatic make_secret();
    layer_plan_t p;
    for (int i = 0; i < N; i++) begin
      p = plan_layer(i, puf[4*i +: 4], SECRET);
      s_key[2*i +: 2] = p.key;
      s_in[2*i]       = p.rest1[M-3:0];
      s_in[2*i+1]     = p.rest2[M-3:0];
    end
  endtask

  task automatic apply(output int cycles);
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    key = s_key;
    cycles = 0;
    for (int s = 0; s < 2 * N; s++) begin
      in_bits = {2'($urandom), s_in[s]};
      @(negedge clk); cycles++;
    end
  endtask

  initial begin
    int cyc;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; puf = '0; key = '0; in_bits = '0;
    secret_bits = 0;
    for (int t = 0; t < int'(TRIALS); t++) begin
      for (int w = 0; w < 4 * int'(N); w++) puf[w] = 1'($urandom);
      make_secret();
      apply(cyc);
      checks++;
      if (!(unlocked && cyc == 2 * int'(N))) begin
        failures++;
        $display("FAIL N=%0d m=%0d: unlock took %0d clocks, unlocked=%0b", N, M, cyc, unlocked);
      end
    end
    // Flip each secret bit alone.
    for (int b = 0; b < int'(2 * N); b++) begin
      s_key[b] = ~s_key[b];
      apply(cyc);
      checks++; secret_bits++;
      if (unlocked) begin
        failures++;
        $display("FAIL N=%0d m=%0d: key bit %0d not checked", N, M, b);
      end
      s_key[b] = ~s_key[b];
    end
    for (int s = 0; s < int'(2 * N); s++)
      for (int b = 0; b < int'(M) - 2; b++) begin
        s_in[s][b] = ~s_in[s][b];
        apply(cyc);
        checks++; secret_bits++;
        if (unlocked) begin
          failures++;
          $display("FAIL N=%0d m=%0d: input bit %0d of step %0d not checked", N, M, b, s);
        end
        s_in[s][b] = ~s_in[s][b];
      end
    done = 1'b1;
  end
endmodule
