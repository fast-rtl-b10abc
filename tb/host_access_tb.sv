// host_access_tb: checks write steering to each of the 13 modules, the registered read
// mux, refusal of module writes while a run is in progress (controller writes still
// pass) and the refused-write counter.
module host_access_tb;
  import fast_pkg::*;
  localparam int unsigned NT = 13;
  logic clk = 0, rst_n = 0, running = 0, host_we = 0, host_err;
  logic [19:0] host_addr = '0;
  logic [15:0] host_wdata = '0, refused_count;
  logic [31:0] host_rdata;
  logic [NT-1:0] t_we;
  logic [15:0] t_addr, t_wdata;
  logic [31:0] t_rdata [NT];
  int checks = 0, failures = 0;

  host_access #(.N_TARGET(NT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int unsigned refused = 0;
    for (int i = 0; i < NT; i++) t_rdata[i] = 32'hA000_0000 + 32'(i * 17);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int unsigned s;
      bit ok;
      s = $urandom_range(0, 15);
      running = $urandom_range(0, 1);
      host_addr = {4'(s), 16'($urandom)};
      host_wdata = 16'($urandom);
      host_we = $urandom_range(0, 1);
      ok = !running || s == NT - 1;
      #1;
      checks++;
      if (t_we !== ((host_we && ok && s < NT) ? (NT)'(1) << s : '0) || t_addr !== host_addr[15:0] || t_wdata !== host_wdata) begin
        failures++; if (failures < 5) $display("FAIL steer sel=%0d we=%b", s, t_we);
      end
      @(negedge clk);
      checks++;
      if (host_rdata !== ((s < NT) ? t_rdata[s] : 32'h0)) begin failures++; $display("FAIL read sel=%0d", s); end
      checks++;
      if (host_err !== (host_we && !ok)) begin failures++; $display("FAIL err"); end
      if (host_we && !ok) refused++;
    end
    host_we = 0; @(negedge clk);
    checks++; if (refused_count != 16'(refused)) begin failures++; $display("FAIL refused %0d exp %0d", refused_count, refused); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
