// wrr_stats_tb: records random delays from random queues and compares every counter
// (count, delay sum, maximum, histogram bins, per-queue counts) with values kept by
// the testbench; then checks that `clear` zeroes them.
module wrr_stats_tb;
  localparam int unsigned TS_W = 16, NQ = 33;
  logic clk = 0, rst_n = 0, clear = 0, ev = 0;
  logic [TS_W-1:0] delay = '0;
  logic [5:0] q = '0;
  logic [7:0] rd_addr = '0;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;

  wrr_stats #(.TS_W(TS_W), .NQ(NQ)) dut (.*);
  always #5 clk = ~clk;

  longint unsigned sum = 0;
  int unsigned n = 0, mx = 0, hist [17], perq [33];

  task automatic chk(input logic [7:0] a, input longint unsigned e, input string w);
    rd_addr = a; #1; checks++;
    if (rd_data != 32'(e)) begin failures++; $display("FAIL %s @%h got %0d exp %0d", w, a, rd_data, e); end
  endtask

  initial begin
    for (int i = 0; i < 17; i++) hist[i] = 0;
    for (int i = 0; i < 33; i++) perq[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int unsigned d, b;
      case ($urandom_range(0, 3))
        0: d = 0;
        1: d = $urandom_range(1, 15);
        2: d = $urandom_range(0, 65535);
        default: d = 1 << $urandom_range(0, 15);
      endcase
      delay = TS_W'(d); q = 6'($urandom_range(0, 32));
      ev = ($urandom_range(0, 4) != 0);
      if (ev) begin
        n++; sum += d; if (d > mx) mx = d;
        b = 0; for (int i = 0; i < 16; i++) if (d >= (1 << i)) b = i + 1;
        hist[b]++; perq[q]++;
      end
      @(negedge clk);
    end
    ev = 0;
    chk(8'h00, n, "sent");
    chk(8'h01, sum & 32'hffff_ffff, "sum lo");
    chk(8'h02, sum >> 32, "sum hi");
    chk(8'h03, mx, "max");
    for (int b = 0; b < 17; b++) chk(8'h10 + 8'(b), hist[b], "hist");
    for (int i = 0; i < 33; i++) chk(8'h40 + 8'(i), perq[i], "per queue");
    clear = 1; @(negedge clk); clear = 0;
    chk(8'h00, 0, "cleared");
    chk(8'h41, 0, "cleared queue");
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
