// cell_clock_ctrl_tb: three stand-in modules answer each cell_start with a done pulse
// after a random number of clocks. Checks that a new cell-time never starts before
// every module has answered, that `now` counts cell-times, that the limit stops the
// run, that a master waits for `ext_done` from slave boards, and that a slave board
// starts only on `ext_start`.
module cell_clock_ctrl_tb;
  import fast_pkg::*;
  localparam int unsigned N = 3;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] done_in = '0;
  logic cell_start, running, sync_start, board_done;
  logic [TIME_W-1:0] now;
  logic ext_start = 0, ext_done = 1;
  logic host_we = 0;
  logic [1:0] host_addr = '0;
  logic [15:0] host_wdata = '0;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;
  int unsigned starts = 0, pending = 0, slave_hold = 0;
  bit hold_ext = 0;

  cell_clock_ctrl #(.N_DONE(N)) dut (.*);
  always #5 clk = ~clk;

  // responders
  int unsigned cnt [N];
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      done_in[i] <= 1'b0;
      if (cell_start) cnt[i] <= $urandom_range(1, 20);
      else if (cnt[i] == 1) begin done_in[i] <= 1'b1; cnt[i] <= 0; end
      else if (cnt[i] > 1) cnt[i] <= cnt[i] - 1;
    end
    if (cell_start) begin
      starts++;
      checks++;
      if (pending != 0) begin failures++; $display("FAIL start before all modules done"); end
      pending = N;
    end
    for (int i = 0; i < N; i++) if (done_in[i]) pending--;
    // slave boards answer 60 clocks after the start
    if (hold_ext) begin
      if (cell_start) begin ext_done <= 0; slave_hold = 60; end
      else if (slave_hold > 0) begin slave_hold--; if (slave_hold == 0) ext_done <= 1; end
    end
  end

  task automatic hw(input logic [1:0] a, input logic [15:0] d);
    host_we = 1; host_addr = a; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) cnt[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    hw(2'd1, 16'd50); hw(2'd2, 16'd0);
    hw(2'd0, 16'b11);                  // master, run, stops at 50 cell-times
    repeat (3000) @(negedge clk);
    checks++; if (now != 50 || starts != 50) begin failures++; $display("FAIL limit: now=%0d starts=%0d", now, starts); end
    checks++; if (running) failures++;
    // master waiting for slave boards
    hold_ext = 1;
    hw(2'd1, 16'd100);
    begin
      int unsigned t0, t1;
      t0 = starts;
      repeat (400) @(negedge clk);
      t1 = starts;
      // each cell-time now lasts more than 60 clocks
      checks++; if (t1 - t0 > 400 / 60 + 1 || t1 == t0) begin failures++; $display("FAIL ext_done not awaited (%0d)", t1 - t0); end
    end
    repeat (4000) @(negedge clk);
    checks++; if (now != 100) begin failures++; $display("FAIL now=%0d", now); end
    hold_ext = 0; ext_done = 1;
    // slave mode: starts only on ext_start
    hw(2'd0, 16'b01);                  // slave (master bit 0)
    hw(2'd1, 16'd0);
    begin
      int unsigned s0;
      s0 = starts;
      repeat (100) @(negedge clk);
      checks++; if (starts != s0) begin failures++; $display("FAIL slave started by itself"); end
      for (int k = 0; k < 5; k++) begin
        while (!board_done) @(negedge clk);
        ext_start = 1; @(negedge clk); ext_start = 0;
        checks++; if (board_done) begin failures++; $display("FAIL board_done during cell-time"); end
        checks++; if (sync_start) failures++;
      end
      while (!board_done) @(negedge clk);
      checks++; if (starts != s0 + 5 || now != 105) begin failures++; $display("FAIL slave count %0d now %0d", starts - s0, now); end
    end
    host_addr = 2'd1; #1; checks++; if (host_rdata != 105) failures++;
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
