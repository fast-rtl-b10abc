// input_module_tb: fills the VC table with random entries (some disabled), sends random
// cells and checks that each appears on exactly the path its table entry names (or on
// none), the two-cycle forwarding latency, and the received/dropped/forwarded counters.
module input_module_tb;
  import fast_pkg::*;
  logic clk = 0, rst_n = 0, cell_start = 0, done;
  cell_t tg_cell;
  path_t out_path [N_PORTS];
  logic host_we = 0;
  logic [HADDR_W-1:0] host_addr = '0;
  logic [HDATA_W-1:0] host_wdata = '0;
  logic [HRD_W-1:0] host_rdata;
  int checks = 0, failures = 0;

  input_module dut (.*);
  always #5 clk = ~clk;

  logic [2:0] tbl [256];
  int unsigned rx = 0, dr = 0, fw [4] = '{0, 0, 0, 0};

  task automatic hw(input logic [15:0] a, input logic [15:0] d);
    host_we = 1; host_addr = a; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  task automatic rd_check(input logic [15:0] a, input int unsigned e, input string what);
    host_addr = a; #1; checks++;
    if (host_rdata != e) begin failures++; $display("FAIL %s %0d exp %0d", what, host_rdata, e); end
  endtask

  initial begin
    tg_cell = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      tbl[v] = 3'($urandom);
      if (v % 5 == 0) tbl[v][2] = 1'b0; else tbl[v][2] = 1'b1;
      hw(16'(v), 16'(tbl[v]));
    end
    for (int t = 0; t < 2000; t++) begin
      cell_t c;
      int unsigned cyc;
      cyc = 0;
      c = cell_t'($urandom);
      tg_cell = c;
      cell_start = 1; @(negedge clk); cell_start = 0;
      tg_cell = cell_t'($urandom);  // input may change after it is captured
      while (!done) begin @(negedge clk); cyc++; end
      checks++; if (cyc != 1) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int p = 0; p < 4; p++) begin
        cell_t e, g;
        e = (c.valid && tbl[c.vci][2] && tbl[c.vci][1:0] == 2'(p)) ? c : '0;
        g = path_to_cell(out_path[p]);
        checks++;
        if (g !== e || out_path[p].sig[0] !== e.valid) begin
          failures++; if (failures < 6) $display("FAIL t=%0d port %0d got %h exp %h", t, p, g, e);
        end
      end
      if (c.valid) begin
        rx++;
        if (!tbl[c.vci][2]) dr++; else fw[tbl[c.vci][1:0]]++;
      end
      if (t % 7 == 0) @(negedge clk);
    end
    rd_check(16'h2000, rx, "received");
    rd_check(16'h2001, dr, "dropped");
    for (int p = 0; p < 4; p++) rd_check(16'h2002 + 16'(p), fw[p], "forwarded");
    rd_check(16'h0003, 32'(tbl[3]), "table readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
