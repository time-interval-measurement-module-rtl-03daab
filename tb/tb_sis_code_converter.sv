// Testbench for sis_code_converter: random delay line words with up to six
// pattern edges at least five taps apart, random polarity and isolated
// bubble errors. The expected edge word and 4-bit group codes are computed
// here from the edge positions alone (not from the line word), so bubbles
// must be removed for the checks to pass. Illegal groups must give code 15.
module tb_sis_code_converter;
  timeunit 1ps; timeprecision 1fs;

  localparam int TAPS = 256;
  localparam int PAIR_A [6] = '{0, 0, 0, 1, 1, 2};
  localparam int PAIR_B [6] = '{5, 6, 7, 6, 7, 7};

  logic [TAPS-1:0]   taps, edges;
  logic [TAPS/2-1:0] code;

  sis_code_converter #(.TAPS(TAPS)) dut (.taps, .code, .edges);

  int checks = 0, failures = 0, n_bubbles = 0, n_pairs = 0, n_err = 0;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_code(input int pos[$], input int g);
    int in_g[$];
    foreach (pos[k]) if (pos[k] / 8 == g) in_g.push_back(pos[k] % 8);
    if (in_g.size() == 0) return 4'd0;
    if (in_g.size() == 1) return 4'(in_g[0] + 1);
    if (in_g.size() == 2)
      for (int j = 0; j < 6; j++)
        if (in_g[0] == PAIR_A[j] && in_g[1] == PAIR_B[j]) return 4'(9 + j);
    return 4'd15;
  endfunction

  task automatic apply(input int pos[$], input bit pol, input bit bubbles, input int min_gap);
    logic [TAPS-1:0] exp_edges;
    logic [TAPS-1:0] w;
    int lvl;
    exp_edges = '0;
    foreach (pos[k]) exp_edges[pos[k]] = 1'b1;
    lvl = pol;
    for (int i = 0; i < TAPS; i++) begin
      if (exp_edges[i]) lvl ^= 1;
      w[i] = 1'(lvl);
    end
    if (bubbles) begin
      int last_b = -10;
      for (int i = 2; i < TAPS - 2; i++) begin
        bit near = 0;
        foreach (pos[k]) if (i >= pos[k] - 2 && i <= pos[k] + 1) near = 1;
        if (!near && i - last_b >= 3 && $urandom_range(0, 15) == 0) begin
          w[i] = ~w[i]; last_b = i; n_bubbles++;
        end
      end
    end
    taps = w;
    #10;
    checks++;
    if (edges !== exp_edges) begin
      failures++; $display("FAIL edges %h expected %h", edges, exp_edges);
    end
    for (int g = 0; g < TAPS / 8; g++) begin
      logic [3:0] e;
      e = ref_code(pos, g);
      if (e >= 9 && e <= 14) n_pairs++;
      if (e == 15) n_err++;
      checks++;
      if (code[4*g +: 4] !== e) begin
        failures++;
        $display("FAIL group %0d code %0d expected %0d (gap %0d)", g, code[4*g +: 4], e, min_gap);
      end
    end
  endtask

  initial begin
    int pos[$];
    // all-zero line (reset state)
    pos = {};
    apply(pos, 0, 0, 5);
    // legal random patterns
    for (int t = 0; t < 300; t++) begin
      int p, n;
      pos = {};
      n = $urandom_range(0, 6);
      p = $urandom_range(1, 40);
      for (int k = 0; k < n && p < TAPS; k++) begin
        pos.push_back(p);
        p += $urandom_range(5, 45);
      end
      apply(pos, 1'($urandom), 1'(t % 2), 5);
    end
    // every legal pair inside one group
    for (int j = 0; j < 6; j++) begin
      pos = {};
      pos.push_back(64 + PAIR_A[j]);
      pos.push_back(64 + PAIR_B[j]);
      apply(pos, 0, 0, 5);
    end
    // illegal: edges three or four taps apart in one group
    pos = {};
    pos.push_back(81); pos.push_back(85);
    apply(pos, 0, 0, 4);
    pos = {};
    pos.push_back(160); pos.push_back(163); pos.push_back(167); // gaps of 3 and 4 taps
    apply(pos, 1, 0, 3);
    checks++;
    if (n_bubbles == 0 || n_pairs == 0 || n_err == 0) begin
      failures++; $display("FAIL coverage bubbles=%0d pairs=%0d errors=%0d", n_bubbles, n_pairs, n_err);
    end
    $display("bubbles=%0d pair groups=%0d error groups=%0d", n_bubbles, n_pairs, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
