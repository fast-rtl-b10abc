// wrr_selector_tb: drives random EMPTY/ZERO/ABR patterns of different densities and
// compares every decision with a sequential model of the weighted round-robin rule
// (token from the element after the last sender, first round with credit, then ABR,
// then second round without credit), including the number of clocks it takes:
// one per group of four elements visited, 16 at most.
module wrr_selector_tb;
  localparam int unsigned NQ = 32, GROUP = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [NQ-1:0] empty, zero;
  logic abr_empty;
  logic busy, done, found, sel_abr, sel_round2;
  logic [4:0] sel_q;
  int checks = 0, failures = 0;
  int n_r1 = 0, n_abr = 0, n_r2 = 0, n_none = 0, n_16 = 0;

  wrr_selector #(.NQ(NQ), .GROUP(GROUP)) dut (.*);
  always #5 clk = ~clk;

  int unsigned last = NQ - 1;

  initial begin
    empty = '1; zero = '0; abr_empty = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int unsigned pe, pz, cyc, e_cyc;
      bit e_found, e_abr, e_r2;
      int unsigned e_q;
      pe = $urandom_range(0, 4); pz = $urandom_range(0, 4);
      for (int i = 0; i < NQ; i++) begin
        // density 0: all empty, 4: nearly all full
        empty[i] = ($urandom_range(0, 3) >= pe);
        zero[i]  = ($urandom_range(0, 3) <  pz);
      end
      abr_empty = $urandom_range(0, 1);
      // model
      e_found = 0; e_abr = 0; e_r2 = 0; e_q = 0; e_cyc = 0;
      for (int o = 0; o < NQ && !e_found; o++) begin
        int unsigned q;
        q = (last + 1 + o) % NQ;
        if (!empty[q] && !zero[q]) begin e_found = 1; e_q = q; e_cyc = o / GROUP + 1; end
      end
      if (!e_found && !abr_empty) begin e_found = 1; e_abr = 1; e_cyc = NQ / GROUP; end
      for (int o = 0; o < NQ && !e_found; o++) begin
        int unsigned q;
        q = (last + 1 + o) % NQ;
        if (!empty[q]) begin e_found = 1; e_r2 = 1; e_q = q; e_cyc = NQ / GROUP + o / GROUP + 1; end
      end
      if (!e_found) e_cyc = 2 * NQ / GROUP;
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (found !== e_found || (e_found && (sel_abr !== e_abr || sel_round2 !== e_r2 ||
          (!e_abr && sel_q !== 5'(e_q))))) begin
        failures++;
        if (failures < 8) $display("FAIL t=%0d got f=%0d abr=%0d r2=%0d q=%0d exp f=%0d abr=%0d r2=%0d q=%0d",
                                   t, found, sel_abr, sel_round2, sel_q, e_found, e_abr, e_r2, e_q);
      end
      checks++;
      if (cyc != e_cyc) begin
        failures++; if (failures < 8) $display("FAIL t=%0d took %0d clocks exp %0d", t, cyc, e_cyc);
      end
      checks++;
      if (cyc > 2 * NQ / GROUP) failures++;
      if (e_found && !e_abr) last = e_q;
      if (!e_found) n_none++; else if (e_abr) n_abr++; else if (e_r2) n_r2++; else n_r1++;
      if (cyc == 16) n_16++;
      if (t % 5 == 0) @(negedge clk);
    end
    $display("first-round %0d abr %0d second-round %0d none %0d (16-clock %0d)", n_r1, n_abr, n_r2, n_none, n_16);
    checks++; if (n_r1 == 0 || n_abr == 0 || n_r2 == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
