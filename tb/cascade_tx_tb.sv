// cascade_tx_tb: a receiver model with random response times takes the words the
// sender offers over the REQ/ACK handshake. With widely spaced cells every word must
// arrive in order; with a burst into a slow receiver the FIFO overflows, and then the
// words received must be an in-order subsequence, with received + dropped = sent.
module cascade_tx_tb;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, lnk_ack = 0, idle;
  logic [15:0] in_word = '0, lnk_data, overflow;
  logic [3:0] lnk_ctrl_out;
  int checks = 0, failures = 0;

  cascade_tx #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  logic [15:0] sent[$], got[$];
  int unsigned slow = 0;

  // receiver on a different phase of time: respond after a random delay
  initial begin
    forever begin
      @(posedge clk);
      if (lnk_ctrl_out[0] && !lnk_ack) begin
        repeat ($urandom_range(0, 3) + slow) @(posedge clk);
        got.push_back(lnk_data);
        checks++; if (!lnk_ctrl_out[0]) begin failures++; $display("FAIL REQ dropped before ACK"); end
        lnk_ack <= 1'b1;
        while (lnk_ctrl_out[0]) @(posedge clk);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        lnk_ack <= 1'b0;
      end
    end
  end

  task automatic send(input logic [15:0] w);
    in_valid = 1; in_word = w; sent.push_back(w); @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (lnk_ctrl_out !== 4'b0000) failures++;
    for (int i = 0; i < 100; i++) begin
      send(16'($urandom));
      repeat (25) @(negedge clk);
    end
    while (!idle) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("FAIL got %0d of %0d", got.size(), sent.size()); end
    foreach (got[i]) begin checks++; if (got[i] !== sent[i]) failures++; end
    checks++; if (overflow != 0) failures++;
    // burst into a slow receiver
    sent.delete(); got.delete(); slow = 10;
    for (int i = 0; i < 60; i++) send(16'(i + 1000));
    while (!idle) @(negedge clk);
    repeat (30) @(negedge clk);
    checks++;
    if (got.size() + overflow != 60 || overflow == 0) begin failures++; $display("FAIL burst got %0d dropped %0d", got.size(), overflow); end
    begin
      int j = 0;
      foreach (got[i]) begin
        while (j < sent.size() && sent[j] != got[i]) j++;
        checks++; if (j == sent.size()) begin failures++; $display("FAIL out of order"); end
      end
    end
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
