// puf_model_tb - checks the properties the lock relies on in the PUF model.
//
// Three chips (different CHIP_ID) are given the same random challenges.
// Checked: a chip answers a repeated challenge with the same response
// (stability); two chips answer the same challenge differently, with an
// average Hamming distance near half the response width (uniqueness); the
// responses of one chip to different challenges differ; ones and zeros are
// balanced over many responses. A wide instance (70-bit challenge, 100-bit
// response) checks that every challenge bit and every response word
// matters.
module puf_model_tb;
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

  localparam int unsigned RW = 40;
  logic [63:0] ch;
  logic [RW-1:0] ra, rb, rc;
  puf_model #(.CW(64), .RW(RW), .CHIP_ID(64'h1)) chip_a (.challenge(ch), .response(ra));
  puf_model #(.CW(64), .RW(RW), .CHIP_ID(64'h2)) chip_b (.challenge(ch), .response(rb));
  puf_model #(.CW(64), .RW(RW), .CHIP_ID(64'hDEAD_BEEF_0123_4567)) chip_c (.challenge(ch), .response(rc));

  logic [69:0]  chw;
  logic [99:0]  rw;
  puf_model #(.CW(70), .RW(100), .CHIP_ID(64'h77)) chip_w (.challenge(chw), .response(rw));

  initial begin
    int hd_sum, ones, n;
    logic [RW-1:0] first_a, prev_a;
    logic [99:0]   base_w;
    prev_a = '0;
    hd_sum = 0; ones = 0; n = 0;
    for (int t = 0; t < 500; t++) begin
      ch = {$urandom, $urandom};
      #1;
      first_a = ra;
      check("chips a and b differ", ra != rb);
      check("chips a and c differ", ra != rc);
      check("chips b and c differ", rb != rc);
      check("different challenges differ", t == 0 || ra != prev_a);
      hd_sum += $countones(ra ^ rb);
      ones   += $countones(ra);
      n++;
      prev_a = ra;
      // Repeat the challenge after another one: same answer.
      ch = ~ch; #1;
      ch = ~ch; #1;
      check("stable response", ra == first_a);
    end
    // Average Hamming distance between chips within 40..60 % of RW.
    check("inter-chip distance near 50%",
          hd_sum * 10 > n * RW * 4 && hd_sum * 10 < n * RW * 6);
    check("ones balanced", ones * 10 > n * RW * 4 && ones * 10 < n * RW * 6);

    // Wide instance: flipping any challenge bit changes every 64-bit
    // response word (checked on the two words).
    chw = {6'($urandom), $urandom, $urandom};
    #1 base_w = rw;
    for (int b = 0; b < 70; b++) begin
      chw[b] = ~chw[b];
      #1;
      check("flip changes word 0", rw[63:0] != base_w[63:0]);
      check("flip changes word 1", rw[99:64] != base_w[99:64]);
      chw[b] = ~chw[b];
      #1;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
