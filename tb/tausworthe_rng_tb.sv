// tausworthe_rng_tb: checks the parallel generator against a bit-serial model of the
// recurrence a[k] = a[k-127] xor a[k-126], one output word (16 new bits) per step.
// Also checks the one-number-per-cycle rate and that the output holds without `step`.
module tausworthe_rng_tb;
  localparam int unsigned P = 127, Q = 1, L = 16;
  localparam logic [P-1:0] SEED = 127'h1234_5678_9abc_def0_0fed_cba9_8765_4321;

  logic clk = 0, rst_n = 0, step = 0;
  logic [L-1:0] rnd;
  int checks = 0, failures = 0;

  tausworthe_rng #(.P(P), .Q(Q), .L(L), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  // Bit-serial reference: hist[k] is sequence bit k; bits 0..P-1 come from the seed,
  // oldest first (seed bit P-1 is the oldest).
  bit hist[$];
  function automatic logic [L-1:0] ref_word(int unsigned n);
    logic [L-1:0] w;
    // output after n steps: bit j is sequence bit (P + n*L - 1 - j)
    for (int j = 0; j < L; j++) w[j] = hist[P + n*L - 1 - j];
    return w;
  endfunction

  initial begin
    for (int i = P-1; i >= 0; i--) hist.push_back(SEED[i]);
    for (int k = P; k < P + 2000*L; k++) hist.push_back(hist[k-P] ^ hist[k-P+Q]);
  end

  initial begin
    int unsigned ones = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (rnd !== SEED[L-1:0]) begin failures++; $display("FAIL seed word"); end
    for (int n = 1; n <= 1500; n++) begin
      step = 1;
      @(negedge clk);        // one clock per number
      checks++;
      if (rnd !== ref_word(n)) begin
        failures++;
        if (failures < 5) $display("FAIL step %0d got %h exp %h", n, rnd, ref_word(n));
      end
      ones += $countones(rnd);
    end
    step = 0;
    begin
      logic [L-1:0] held;
      held = rnd;
      repeat (3) @(negedge clk);
      checks++; if (rnd !== held) begin failures++; $display("FAIL output moved without step"); end
    end
    // crude sanity of the bit balance (a sparse trinomial mixes slowly from its seed)
    checks++;
    if (ones < 1500*L*35/100 || ones > 1500*L*65/100) begin failures++; $display("FAIL bias %0d", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
