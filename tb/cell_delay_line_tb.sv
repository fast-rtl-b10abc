// cell_delay_line_tb: pushes a random cell stream through the delay line for several
// delays (0, 1, 7, DEPTH-1) and checks that every output equals the input exactly D
// cell-times earlier, and that nothing valid comes out before the first D cell-times.
module cell_delay_line_tb;
  import fast_pkg::*;
  localparam int unsigned DEPTH = 64, AW = 6;
  logic clk = 0, rst_n = 0, load = 0, advance = 0;
  logic [AW-1:0] delay = '0;
  cell_t in_cell, out_cell;
  int checks = 0, failures = 0;

  cell_delay_line #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic run(input int unsigned d, input int unsigned n);
    cell_t hist[$];
    delay = AW'(d); load = 1; @(negedge clk); load = 0;
    for (int t = 0; t < n; t++) begin
      cell_t exp_c;
      in_cell = cell_t'($urandom);
      hist.push_back(in_cell);
      advance = 1; @(negedge clk); advance = 0;
      // gaps between cell-times must not matter
      if (t % 3 == 0) @(negedge clk);
      exp_c = (t >= int'(d)) ? hist[t - d] : '0;
      checks++;
      if (out_cell !== exp_c) begin
        failures++;
        if (failures < 6) $display("FAIL d=%0d t=%0d got %h exp %h", d, t, out_cell, exp_c);
      end
    end
  endtask

  initial begin
    in_cell = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    run(0, 50);
    run(1, 100);
    run(7, 200);
    run(DEPTH-1, 300);
    run(3, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
