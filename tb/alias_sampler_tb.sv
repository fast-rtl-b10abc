// alias_sampler_tb: loads random cutoff/alias tables, then checks each lookup against
// the alias rule computed in the testbench (including U == F, U just above F, F = 0
// and F = 0xFFFF), the two-cycle latency, back-to-back requests, and host read-back.
module alias_sampler_tb;
  localparam int unsigned IDX_W = 9, N = 1 << IDX_W;
  logic clk = 0, rst_n = 0, req = 0;
  logic [15:0] u;
  logic [IDX_W-1:0] idx, val;
  logic val_valid;
  logic host_we = 0;
  logic [IDX_W:0] host_addr = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  alias_sampler #(.IDX_W(IDX_W)) dut (.*);
  always #5 clk = ~clk;

  logic [15:0] F [N];
  logic [15:0] A [N];

  task automatic hw(input logic [IDX_W:0] a, input logic [15:0] d);
    host_we = 1; host_addr = a; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  // expected results in request order
  logic [IDX_W-1:0] expq[$];

  always @(posedge clk) if (rst_n && val_valid) begin
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
    else begin
      logic [IDX_W-1:0] e;
      e = expq.pop_front();
      if (val !== e) begin failures++; if (failures < 6) $display("FAIL got %0d exp %0d", val, e); end
    end
  end

  initial begin
    u = 0; idx = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin
      F[i] = (i % 7 == 0) ? 16'h0000 : (i % 11 == 0) ? 16'hFFFF : 16'($urandom);
      A[i] = 16'($urandom_range(0, N-1));
      hw({1'b0, IDX_W'(i)}, F[i]);
      hw({1'b1, IDX_W'(i)}, A[i]);
    end
    // read back
    for (int i = 0; i < N; i += 37) begin
      host_addr = {1'b0, IDX_W'(i)}; #1; checks++; if (host_rdata !== F[i]) failures++;
      host_addr = {1'b1, IDX_W'(i)}; #1; checks++; if (host_rdata !== A[i]) failures++;
    end
    @(negedge clk);
    // latency check with a single request
    req = 1; idx = 5; u = F[5]; expq.push_back(5);
    @(negedge clk); req = 0;
    checks++; if (val_valid) failures++;
    @(negedge clk);
    checks++; if (!val_valid) begin failures++; $display("FAIL latency"); end
    @(negedge clk);
    // back-to-back random requests
    for (int n = 0; n < 3000; n++) begin
      int unsigned i;
      i = $urandom_range(0, N-1);
      idx = IDX_W'(i);
      case (n % 4)
        0: u = F[i];
        1: u = (F[i] == 16'hFFFF) ? F[i] : F[i] + 16'd1;
        default: u = 16'($urandom);
      endcase
      req = 1;
      expq.push_back((u <= F[i]) ? IDX_W'(i) : A[i][IDX_W-1:0]);
      @(negedge clk);
    end
    req = 0;
    repeat (4) @(negedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
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
