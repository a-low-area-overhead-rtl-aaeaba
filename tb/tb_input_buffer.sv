// tb_input_buffer: self-checking test of the input buffer (8 flits of 8 bits).
// It checks the link handshake (ack one cycle after the flit is offered, two
// cycles per flit), the routing request h with the header visible and nothing
// offered before ack_h, back-pressure when all eight places are full, the
// order of the flits given out with data_av/data_ack, the return to a new
// request after close, and that flits received meanwhile are kept.
module tb_input_buffer;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned cycle = 0, checks = 0, failures = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  logic       rx = 1'b0, ack_rx, h, ack_h = 1'b0, data_av, data_ack = 1'b0, close = 1'b0;
  logic [7:0] data_in = '0, data;

  input_buffer dut (.clk, .rst_n, .rx, .data_in, .ack_rx, .h, .ack_h,
                    .data_av, .data, .data_ack, .close);

  int unsigned ack_cyc [$];
  always @(posedge clk) if (ack_rx) ack_cyc.push_back(cycle);

  task automatic send(input logic [7:0] d);
    rx = 1'b1; data_in = d;
    do @(negedge clk); while (!ack_rx);
    rx = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] flits [9] = '{8'h11, 8'h05, 8'hA0, 8'hA1, 8'hA2, 8'hA3, 8'hA4, 8'h22, 8'h01};
    automatic bit blocked = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!h && !data_av && !ack_rx, "idle after reset");

    // Header: ack in the next cycle, then h with the header visible.
    rx = 1'b1; data_in = flits[0];
    @(negedge clk);
    check(ack_rx, "ack_rx one cycle after rx");
    rx = 1'b0;
    @(negedge clk);
    check(h && data == 8'h11 && !data_av, "h raised, header visible, nothing offered");

    // Seven more flits back to back fill the buffer.
    for (int i = 1; i < 8; i++) begin
      rx = 1'b1; data_in = flits[i];
      do @(negedge clk); while (!ack_rx);
    end
    rx = 1'b0;
    for (int i = 1; i < 7; i++)
      check(ack_cyc[i+1] - ack_cyc[i] == 2, "two cycles per flit");
    check(dut.full, "full after eight flits");

    // Ninth flit: refused while full.
    rx = 1'b1; data_in = flits[8];
    fork begin
      do @(negedge clk); while (!ack_rx);
      rx = 1'b0;
    end join_none
    repeat (6) begin
      @(negedge clk);
      if (ack_rx) blocked = 1'b0;
    end
    check(blocked, "no ack while the buffer is full");
    check(h && !data_av, "still waiting for the connection");

    // Connection granted.
    ack_h = 1'b1;
    @(negedge clk);
    ack_h = 1'b0;
    check(!h, "h dropped after ack_h");
    // Drain the seven flits of the first packet; close with the last one.
    for (int i = 0; i < 7; i++) begin
      check(data_av && data == flits[i], $sformatf("flit %0d offered", i));
      @(negedge clk);
      check(data_av && data == flits[i], $sformatf("flit %0d held until taken", i));
      data_ack = 1'b1;
      close = (i == 6);
      @(negedge clk);
      data_ack = 1'b0;
      close = 1'b0;
    end
    check(!rx, "ninth flit accepted once room was made");
    // Next packet: header 22 requested, not offered.
    @(negedge clk);
    check(h && !data_av && data == 8'h22, "new request for the next header");
    check(dut.count == 4'd2, "two flits of the next packet kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
