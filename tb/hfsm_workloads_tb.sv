// hfsm_workloads_tb - the lock configurations of the evaluation: the
// transitional-input lengths m of the eight benchmark FSMs (styr 9,
// s1494 8, sand 11, planet 7, s510 19, s298 3, s1488 8, s832 18), each
// with N = 1, 5 and 10 layers.
//
// Every configuration is unlocked with computed keys in exactly 2N clocks,
// and every one of its N(2m-2) secret bits is shown to be checked by the
// lock (flipping it alone keeps the chip locked). The count of secret bits
// is compared with N times the per-layer exponent of the brute-force
// security level, 2m-2, listed for each benchmark (16, 14, 20, 12, 36, 4,
// 14, 34).
module hfsm_workloads_tb;
  localparam int NB = 8;
  localparam int NN = 3;
  localparam int unsigned MS  [NB] = '{9, 8, 11, 7, 19, 3, 8, 18};
  localparam int unsigned EXP [NB] = '{16, 14, 20, 12, 36, 4, 14, 34};
  localparam int unsigned NS  [NN] = '{1, 5, 10};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NB*NN-1:0] done;
  int c_v [NB*NN], f_v [NB*NN], s_v [NB*NN];

  for (genvar b = 0; b < NB; b++) begin : g_bench
    for (genvar n = 0; n < NN; n++) begin : g_n
      hfsm_workload_run #(.N(NS[n]), .M(MS[b]), .TRIALS(4)) u_run (
        .clk, .done(done[b*NN+n]), .checks(c_v[b*NN+n]),
        .failures(f_v[b*NN+n]), .secret_bits(s_v[b*NN+n]));
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (&done);
    for (int b = 0; b < NB; b++)
      for (int n = 0; n < NN; n++) begin
        int k;
        k = b * NN + n;
        checks   += c_v[k] + 1;
        failures += f_v[k];
        if (s_v[k] != int'(NS[n] * EXP[b])) begin
          failures++;
          $display("FAIL m=%0d N=%0d: %0d secret bits, expected %0d",
                   MS[b], NS[n], s_v[k], NS[n] * EXP[b]);
        end
        $display("m=%0d N=%0d: security level 2^%0d", MS[b], NS[n], s_v[k]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
