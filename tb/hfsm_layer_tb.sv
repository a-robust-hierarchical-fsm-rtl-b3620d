// hfsm_layer_tb - self-checking test of one HFSM layer's transition logic.
//
// Two layers are tested: layer 0, whose edge codes are the fixed example
// codes (step 1: S1=11 S2=01 S3=10 S4=00; step 2: S1=01 S2=10 S3=11
// S4=00), and layer 3, whose codes come from the design secret. Checks:
//   - the worked example: PUF pairs 01 and 10 with key 00 take the lock
//     from the top into S2 and on out of S2;
//   - the four step-1 codes and the four step-2 codes of each layer are all
//     different, so every PUF value selects exactly one path;
//   - random stimulus against a reference model written from the rules:
//     step 1 fires only at the top and only with the right {b3..bm};
//     step 2 fires only in a middle state, only when PUF XOR key equals
//     that state's code and {b3..bm} is right.
module hfsm_layer_tb;
  import hfsm_pkg::*;

  localparam int unsigned M = 9;
  localparam logic [63:0] SECRET = DESIGN_SECRET_DEFAULT;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shared stimulus for both layers.
  logic         at_top, at_mid;
  logic [1:0]   mid_path, key;
  logic [3:0]   puf_pair;
  logic [M-3:0] rest;

  logic       go1_a, go2_a, go1_b, go2_b;
  logic [1:0] path_a, path_b, b12_a, b12_b;

  hfsm_layer #(.M(M), .LAYER(0), .SECRET(SECRET)) dut_a (
    .at_top, .at_mid, .mid_path, .puf_pair, .key, .rest,
    .step1_go(go1_a), .step1_path(path_a), .step2_go(go2_a), .b12(b12_a));

  hfsm_layer #(.M(M), .LAYER(3), .SECRET(SECRET)) dut_b (
    .at_top, .at_mid, .mid_path, .puf_pair, .key, .rest,
    .step1_go(go1_b), .step1_path(path_b), .step2_go(go2_b), .b12(b12_b));

  // Example codes of layer 0, written out independently of the package.
  localparam logic [1:0] EX1 [4] = '{2'b11, 2'b01, 2'b10, 2'b00};
  localparam logic [1:0] EX2 [4] = '{2'b01, 2'b10, 2'b11, 2'b00};

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [1:0] code(input int layer, input logic s2, input int j);
    if (layer == 0) return s2 ? EX2[j] : EX1[j];
    return edge_code(layer, s2, 2'(j), SECRET);
  endfunction

  function automatic logic [M-3:0] rst_val(input int layer, input logic s2, input int j);
    logic [63:0] r;
    r = rest_code(layer, s2, 2'(j), SECRET);
    return r[M-3:0];
  endfunction

  // Reference model of one layer.
  task automatic ref_layer(input int layer, output logic go1, output logic [1:0] p1,
                           output logic go2, output logic [1:0] b12);
    logic [1:0] s1, s2;
    s1 = puf_pair[3:2];
    s2 = puf_pair[1:0] ^ key;
    p1 = 2'd0;
    for (int j = 0; j < 4; j++) if (code(layer, 1'b0, j) == s1) p1 = 2'(j);
    go1 = at_top && (rest == rst_val(layer, 1'b0, int'(p1)));
    go2 = at_mid && (s2 == code(layer, 1'b1, int'(mid_path)))
                 && (rest == rst_val(layer, 1'b1, int'(mid_path)));
    b12 = at_mid ? s2 : s1;
  endtask

  logic       e_go1, e_go2;
  logic [1:0] e_p1, e_b12;
  int         n_go1 = 0, n_go2 = 0;

  initial begin
    // Codes of each step are four different values.
    for (int l = 0; l < 4; l += 3)
      for (int s = 0; s < 2; s++) begin
        logic [3:0] seen;
        seen = '0;
        for (int j = 0; j < 4; j++) seen[code(l, 1'(s), j)] = 1'b1;
        check($sformatf("codes distinct l=%0d s=%0d", l, s), 64'(seen), 64'hF);
      end
    // Package codes of layer 0 are the example codes.
    for (int j = 0; j < 4; j++) begin
      check("pkg step1 code", 64'(edge_code(0, 1'b0, 2'(j), SECRET)), 64'(EX1[j]));
      check("pkg step2 code", 64'(edge_code(0, 1'b1, 2'(j), SECRET)), 64'(EX2[j]));
    end

    // Worked example: PUF 01 selects S2 (path 1); PUF 10 XOR key 00 = 10
    // is S2's step-2 code.
    at_top = 1'b1; at_mid = 1'b0; mid_path = 2'd0;
    puf_pair = 4'b01_10; key = 2'b00; rest = rst_val(0, 1'b0, 1);
    #1;
    check("ex step1 go", 64'(go1_a), 64'd1);
    check("ex step1 path", 64'(path_a), 64'd1);
    check("ex step1 b12", 64'(b12_a), 64'b01);
    rest = ~rest;
    #1;
    check("ex step1 wrong rest", 64'(go1_a), 64'd0);
    at_top = 1'b0; at_mid = 1'b1; mid_path = 2'd1; rest = rst_val(0, 1'b1, 1);
    #1;
    check("ex step2 go", 64'(go2_a), 64'd1);
    check("ex step2 b12", 64'(b12_a), 64'b10);
    key = 2'b01;
    #1;
    check("ex step2 wrong key", 64'(go2_a), 64'd0);
    key = 2'b00; mid_path = 2'd0;
    #1;
    check("ex step2 other state", 64'(go2_a), 64'd0);

    // Random stimulus; half of the draws use the right {b3..bm} so that
    // transitions actually fire.
    for (int t = 0; t < 4000; t++) begin
      int l;
      l = (t % 2 == 0) ? 0 : 3;
      {at_top, at_mid} = 2'($urandom_range(0, 2));
      mid_path = 2'($urandom);
      puf_pair = 4'($urandom);
      key      = 2'($urandom);
      rest     = (M-2)'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        logic [1:0] s1, p;
        s1 = puf_pair[3:2];
        p  = 2'd0;
        for (int j = 0; j < 4; j++) if (code(l, 1'b0, j) == s1) p = 2'(j);
        rest = at_mid ? rst_val(l, 1'b1, int'(mid_path)) : rst_val(l, 1'b0, int'(p));
        if (at_mid && $urandom_range(0, 1) == 1)
          key = puf_pair[1:0] ^ code(l, 1'b1, int'(mid_path));
      end
      #1;
      ref_layer(l, e_go1, e_p1, e_go2, e_b12);
      if (l == 0) begin
        check("go1 a", 64'(go1_a), 64'(e_go1));
        check("go2 a", 64'(go2_a), 64'(e_go2));
        check("b12 a", 64'(b12_a), 64'(e_b12));
        if (at_top) check("path a", 64'(path_a), 64'(e_p1));
        n_go1 += int'(go1_a); n_go2 += int'(go2_a);
      end else begin
        check("go1 b", 64'(go1_b), 64'(e_go1));
        check("go2 b", 64'(go2_b), 64'(e_go2));
        check("b12 b", 64'(b12_b), 64'(e_b12));
        if (at_top) check("path b", 64'(path_b), 64'(e_p1));
        n_go1 += int'(go1_b); n_go2 += int'(go2_b);
      end
    end
    check("some step1 fired", 64'(n_go1 > 50), 64'd1);
    check("some step2 fired", 64'(n_go2 > 50), 64'd1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
