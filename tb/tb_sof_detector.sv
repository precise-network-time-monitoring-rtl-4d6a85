// tb_sof_detector: random frames with /S/ in lane 0 or lane 1, /T/ in
// either lane, back-to-back /T/ /S/ in one word, a stray /S/ code-group
// inside a frame (ignored) and a link drop. Checks the start-of-frame
// pulse count, its one-edge latency and the reported lane.
`timescale 1ns/1ps
module tb_sof_detector;
  logic clk = 0, rst_n = 0, rx_valid = 1;
  logic [15:0] rx_data = 16'hBC50;
  logic [1:0] rx_k = 2'b10;
  logic sof, sof_lane;
  int checks = 0, failures = 0;
  int exp_q[$];      // expected lane per start, in order
  int seen = 0, expected = 0;
  int pend = -1;     // lane expected on the next edge

  sof_detector dut (.clk_b(clk), .rst_n, .rx_valid, .rx_data, .rx_k, .sof, .sof_lane);
  always #8 clk = ~clk;

  // one-edge latency: the word sampled at edge e gives sof after edge e
  always @(posedge clk) if (rst_n) begin
    if (sof) begin
      seen++;
      checks++;
      if (pend < 0 || sof_lane != pend[0]) begin
        failures++;
        $display("FAIL unexpected sof (lane %0d, expected %0d)", sof_lane, pend);
      end
    end else if (pend >= 0) begin
      checks++; failures++;
      $display("FAIL missing sof");
    end
    pend = -1;
  end

  task automatic word(input logic [15:0] d, input logic [1:0] k, input int start_lane = -1);
    @(negedge clk);
    rx_data = d; rx_k = k;
    @(posedge clk);
    #1 pend = start_lane;
    if (start_lane >= 0) expected++;
  endtask

  task automatic payload(input int n);
    for (int i = 0; i < n; i++) word(16'($urandom), 2'b00);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      word(16'hBC50, 2'b10);
      if ($urandom % 2) word(16'hFB55, 2'b10, 0);
      else              word(16'hF7FB, 2'b11, 1);
      payload(4 + int'($urandom % 20));
      if (f % 5 == 0) word(16'h55FB, 2'b01);        // stray /S/ inside the frame
      payload(3);
      if ($urandom % 2) word(16'hFDF7, 2'b11);      // /T/ in lane 0
      else              word(16'h33FD, 2'b01);      // /T/ in lane 1
    end
    // /T/ in lane 0 and /S/ in lane 1 of the same word
    word(16'hFB55, 2'b10, 0);
    payload(5);
    word(16'hFDFB, 2'b11, 1);
    payload(5);
    // link drop inside a frame closes it
    @(negedge clk) rx_valid = 0;
    @(negedge clk) rx_valid = 1;
    word(16'hFB55, 2'b10, 0);
    payload(3);
    word(16'hFDF7, 2'b11);
    word(16'hBC50, 2'b10);
    repeat (2) @(posedge clk);
    checks++;
    if (seen != expected) begin failures++; $display("FAIL %0d starts seen, %0d expected", seen, expected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
