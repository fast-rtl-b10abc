// traffic_generator_tb: loads random alias tables, runs cell-times and predicts every
// generated cell with an independent bit-serial model of the x^127+x+1 sequence and
// the alias rule. Checks the six-cycle generation time, the enable bit, the link
// delay (0 and 5 cell-times), the generated-cell counter, and external mode, where
// cells received over the REQ/ACK connector are forwarded one per cell-time, and
// ON-OFF mode with constant tables (a fixed ON 10 / OFF 5 / burst 4 pattern), and
// Markov mode with a chain that steps through all 16 states (even states send).
module traffic_generator_tb;
  import fast_pkg::*;
  localparam logic [126:0] SEED = 127'h0123_4567_89ab_cdef_fedc_ba98_7654_3210;
  localparam int unsigned N = 512;

  logic clk = 0, rst_n = 0, cell_start = 0, done;
  cell_t cell_out;
  logic host_we = 0;
  logic [HADDR_W-1:0] host_addr = '0;
  logic [HDATA_W-1:0] host_wdata = '0;
  logic [HRD_W-1:0] host_rdata;
  logic [15:0] ext_data = '0;
  logic ext_req = 0, ext_ack;
  int checks = 0, failures = 0;

  traffic_generator #(.SEED(SEED), .DELAY_DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  bit hist[$];
  int unsigned nwords = 0;
  function automatic logic [15:0] word(int unsigned n);
    logic [15:0] w;
    for (int j = 0; j < 16; j++) w[j] = hist[127 + n*16 - 1 - j];
    return w;
  endfunction

  logic [15:0] F [N];
  logic [15:0] A [N];

  task automatic hw(input logic [15:0] a, input logic [15:0] d);
    host_we = 1; host_addr = a; host_wdata = d; @(negedge clk); host_we = 0;
  endtask

  task automatic ext_send(input logic [15:0] w);
    ext_data = w; @(negedge clk);
    ext_req = 1;
    while (!ext_ack) @(negedge clk);
    ext_req = 0;
    while (ext_ack) @(negedge clk);
  endtask

  function automatic cell_t model_cell(int unsigned k);
    logic [15:0] u, i;
    u = word(2*k); i = word(2*k + 1);
    return cell_t'((u <= F[i[8:0]]) ? i[8:0] : A[i[8:0]][8:0]);
  endfunction

  int unsigned k = 0;          // generated cells so far
  cell_t gen[$];               // model of what entered the delay line
  int unsigned valid_out = 0;

  task automatic cell_time(input bit en, input int unsigned d);
    int unsigned cyc = 0;
    cell_t e;
    cell_start = 1; @(negedge clk); cell_start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 5) begin failures++; $display("FAIL generation took %0d cycles", cyc + 1); end
    gen.push_back(en ? model_cell(k) : cell_t'('0));
    k++;
    e = (gen.size() > d) ? gen[gen.size() - 1 - d] : '0;
    checks++;
    if (cell_out !== e) begin
      failures++;
      if (failures < 6) $display("FAIL cell %0d got %h exp %h", k, cell_out, e);
    end
    if (cell_out.valid) valid_out++;
  endtask

  initial begin
    for (int i = 126; i >= 0; i--) hist.push_back(SEED[i]);
    for (int n = 127; n < 127 + 5000*16; n++) hist.push_back(hist[n-127] ^ hist[n-126]);
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin
      F[i] = 16'($urandom); A[i] = 16'($urandom_range(0, N-1));
      hw(16'(i), F[i]); hw(16'h0200 | 16'(i), A[i]);
    end
    // disabled: no cells
    for (int t = 0; t < 10; t++) cell_time(0, 0);
    hw(16'h1001, 16'h1);
    gen.delete();
    for (int t = 0; t < 200; t++) cell_time(1, 0);
    hw(16'h1000, 16'd5);           // link delay of 5 cell-times, pipeline restarts empty
    gen.delete();
    for (int t = 0; t < 200; t++) cell_time(1, 5);
    host_addr = 16'h2000; #1;
    checks++;
    if (host_rdata != valid_out) begin failures++; $display("FAIL count %0d exp %0d", host_rdata, valid_out); end
    // external mode: cells come from the connector, one per cell-time, in order
    hw(16'h1000, 16'd0);
    hw(16'h1001, 16'h3);
    for (int i = 0; i < 6; i++) ext_send(16'h0100 | 16'(i * 7));
    host_addr = 16'h2001; #1;
    checks++; if (host_rdata != 6) begin failures++; $display("FAIL ext level %0d", host_rdata); end
    for (int i = 0; i < 8; i++) begin
      cell_start = 1; @(negedge clk); cell_start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cell_out !== ((i < 6) ? cell_t'(9'h100 | 9'(i * 7)) : cell_t'('0))) begin
        failures++; $display("FAIL external cell %0d got %h", i, cell_out);
      end
    end
    // ON-OFF mode: constant tables (ON 10, OFF 5, burst 4) give a fixed pattern
    for (int i = 0; i < N; i++) begin
      hw(16'h3000 | 16'(i), 16'h0); hw(16'h3200 | 16'(i), 16'd10);
      hw(16'h3400 | 16'(i), 16'h0); hw(16'h3600 | 16'(i), 16'd5);
      hw(16'h3800 | 16'(i), 16'h0); hw(16'h3a00 | 16'(i), 16'd4);
    end
    hw(16'h1002, 16'h5c);
    hw(16'h1001, 16'h5);
    host_addr = 16'h3a07; #1;
    checks++; if (host_rdata != 4) begin failures++; $display("FAIL onoff table readback"); end
    begin
      bit m_on;
      int unsigned tl, bl, ncell;
      cell_t e;
      m_on = 0; tl = 0; bl = 0; ncell = 0;
      for (int t = 0; t < 150; t++) begin
        e = (m_on && bl != 0 && tl != 0) ? cell_t'({1'b1, 8'h5c}) : cell_t'('0);
        if (e.valid) begin bl--; ncell++; end
        if (tl > 1) tl--;
        else begin
          if (!m_on) begin tl = 10; bl = 4; end else begin tl = 5; bl = 0; end
          m_on = !m_on;
        end
        cell_start = 1; @(negedge clk); cell_start = 0;
        while (!done) @(negedge clk);
        checks++;
        if (cell_out !== e) begin
          failures++; if (failures < 10) $display("FAIL onoff cell %0d got %h exp %h", t, cell_out, e);
        end
      end
      $display("onoff mode: %0d cells in 150 cell-times", ncell);
      checks++; if (ncell < 30) begin failures++; $display("FAIL onoff too few cells"); end
    end
    // Markov mode: every state moves to the next one (alias 0 -> L = s+1), even states
    // send at full rate, odd states not at all, hold 2 cell-times
    for (int i = 0; i < 256; i++) begin
      hw(16'h4000 | 16'(i), 16'h0);
      hw(16'h4100 | 16'(i), 16'(((i >> 4) + 1) % 16));
    end
    for (int st = 0; st < 16; st++) hw(16'h4400 | 16'(st), (st % 2 == 0) ? 16'hffff : 16'h0);
    hw(16'h4410, 16'd2);
    hw(16'h1002, 16'h77);
    hw(16'h1001, 16'h9);
    begin
      int unsigned ms, mcnt, ncell;
      cell_t e;
      // first cell-time: the initial state is drawn, no cell
      cell_start = 1; @(negedge clk); cell_start = 0;
      while (!done) @(negedge clk);
      checks++; if (cell_out !== '0) begin failures++; $display("FAIL Markov first cell"); end
      host_addr = 16'h4800; #1; ms = host_rdata; mcnt = 2; ncell = 0;
      host_addr = 16'h1001; #1;
      checks++; if (host_rdata[8:5] != 4'(ms)) begin failures++; $display("FAIL Markov state in mode register"); end
      @(negedge clk);
      for (int t = 0; t < 64; t++) begin
        e = (ms % 2 == 0) ? cell_t'({1'b1, 8'h77}) : cell_t'('0);
        if (mcnt > 1) mcnt--; else begin mcnt = 2; ms = (ms + 1) % 16; end
        cell_start = 1; @(negedge clk); cell_start = 0;
        while (!done) @(negedge clk);
        checks++;
        if (cell_out !== e) begin
          failures++; if (failures < 12) $display("FAIL Markov cell %0d got %h exp %h", t, cell_out, e);
        end
        if (cell_out.valid) ncell++;
      end
      checks++; if (ncell != 32) begin failures++; $display("FAIL Markov cells %0d exp 32", ncell); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
