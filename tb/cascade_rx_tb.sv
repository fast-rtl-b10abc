// cascade_rx_tb: a sender model drives words over the REQ/ACK handshake with random
// spacing while the testbench pops at random; every word must come out once and in
// order. Then words are sent with no pops until the FIFO is full: the extra words must
// be dropped and counted, and the FIFO must hold exactly the first DEPTH of them.
module cascade_rx_tb;
  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0, lnk_req = 0, lnk_ack, pop = 0, out_valid;
  logic [15:0] lnk_data = '0, out_word, overflow;
  logic [4:0] level;
  int checks = 0, failures = 0;

  cascade_rx #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  logic [15:0] sent[$];
  int unsigned popped = 0;

  task automatic send(input logic [15:0] w);
    @(posedge clk);
    lnk_data <= w; sent.push_back(w);
    @(posedge clk);
    lnk_req <= 1'b1;
    while (!lnk_ack) @(posedge clk);
    repeat ($urandom_range(0, 2)) @(posedge clk);
    lnk_req <= 1'b0;
    while (lnk_ack) @(posedge clk);
  endtask

  bit popping = 1;
  always @(negedge clk) begin
    pop <= 1'b0;
    if (popping && out_valid && $urandom_range(0, 2) == 0) begin
      checks++;
      if (sent.size() == 0 || out_word !== sent[popped]) begin
        failures++; $display("FAIL word %0d", popped);
      end
      popped++;
      pop <= 1'b1;
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      send(16'($urandom));
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    while (out_valid) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++; if (popped != 200) begin failures++; $display("FAIL popped %0d", popped); end
    popping = 0;
    sent.delete(); popped = 0;
    for (int i = 0; i < DEPTH + 5; i++) send(16'(i + 500));
    repeat (3) @(negedge clk);
    checks++; if (level != 5'(DEPTH) || overflow != 5) begin failures++; $display("FAIL level %0d overflow %0d", level, overflow); end
    checks++; if (out_word !== 16'd500) failures++;
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
