// tb_flit_counter: self-checking test of the output-port flit counter.
// Packets of several lengths (0, 1, 3, 7 payload flits, and the largest,
// 255) pass with random stalls (tx without ack, idle cycles); close must be
// high exactly in the cycle of the last flit's transfer, counter_flit must
// hold the length after the length flit and count down by one per payload
// flit sent.
module tb_flit_counter;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned cycle = 0, checks = 0, failures = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  logic       tx = 1'b0, ack_tx = 1'b0, close;
  logic [7:0] data_out = '0, counter_flit;

  flit_counter dut (.clk, .rst_n, .tx, .ack_tx, .data_out, .counter_flit, .close);

  int unsigned n_close = 0;
  always @(posedge clk) if (rst_n && close) n_close++;

  // Send one flit: optional stall cycles, then a transfer cycle.
  task automatic flit(input logic [7:0] d, input bit last);
    tx = 1'b1; data_out = d; ack_tx = 1'b0;
    while ($urandom % 3 == 0) begin
      #1 check(!close, "no close without a transfer");
      @(negedge clk);
    end
    ack_tx = 1'b1;
    #1 check(close == last, last ? "close with the last flit" : "no close before the last flit");
    @(negedge clk);
    tx = 1'b0; ack_tx = 1'b0;
    if ($urandom % 2 == 0) @(negedge clk);
  endtask

  task automatic packet(input int unsigned n);
    automatic int unsigned c0 = n_close;
    flit(8'h11, 1'b0);
    flit(8'(n), n == 0);
    check(counter_flit == 8'(n), "counter loaded with the length");
    for (int j = 0; j < n; j++) begin
      flit(8'($urandom), j == n - 1);
      check(counter_flit == 8'(n - 1 - j), "counter counts down");
    end
    check(n_close == c0 + 1, "exactly one close per packet");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    packet(7);
    packet(0);
    packet(1);
    packet(3);
    packet(255);
    packet(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
