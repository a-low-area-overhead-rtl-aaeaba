// tb_routing_logic: self-checking test of XY routing and the switching table
// for a switch at address 11 of a 3x3 mesh.
// - every target of the 3x3 mesh goes to the expected port (worked out here
//   from the coordinates), with ack_rot four cycles after req_rot and the
//   table entries written; the connection is then closed by close_out;
// - the three simultaneous connections W->N, N->S, L->E give the table
//   free = 0 1 0 0 1, in = (-, 2, 3, -, 0), out = (4, -, 1, 2, -);
// - a request for a busy output is refused and leaves the table unchanged.
module tb_routing_logic;
  import hermes_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned cycle = 0, checks = 0, failures = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  logic              req_rot = 1'b0, ack_rot, rot_ok;
  logic [PORT_W-1:0] incoming = '0;
  logic [7:0]        header = '0;
  logic [NPORTS-1:0] close_out = '0, free, in_busy;
  logic [NPORTS-1:0][PORT_W-1:0] in_sel, out_sel;

  routing_logic #(.X_ADDR(4'd1), .Y_ADDR(4'd1)) dut (
    .clk, .rst_n, .req_rot, .incoming, .header, .ack_rot, .rot_ok,
    .close_out, .free, .in_busy, .in_sel, .out_sel);

  // Request a route; returns rot_ok and the number of cycles to ack_rot.
  task automatic request(input logic [7:0] hdr, input int unsigned src,
                         output bit ok, output int unsigned lat);
    automatic int unsigned t0;
    @(negedge clk);
    req_rot = 1'b1; header = hdr; incoming = PORT_W'(src);
    t0 = cycle;
    do @(negedge clk); while (!ack_rot);
    lat = cycle - t0;
    ok = rot_ok;
    req_rot = 1'b0;
    @(negedge clk);
  endtask

  task automatic close(input int unsigned o);
    close_out[o] = 1'b1;
    @(negedge clk);
    close_out[o] = 1'b0;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bit ok;
    automatic int unsigned lat;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(free == 5'b11111 && in_busy == '0, "table empty after reset");

    // Every target of a 3x3 mesh, from every input.
    for (int t = 0; t < 9; t++) begin
      automatic int unsigned x = t % 3, y = t / 3;
      automatic int unsigned src = t % NPORTS;
      automatic int unsigned exp;
      if (x == 1 && y == 1) exp = 4;        // here: Local
      else if (x > 1)       exp = 0;        // East
      else if (x < 1)       exp = 1;        // West
      else if (y > 1)       exp = 3;        // South (Y grows southwards)
      else                  exp = 2;        // North
      request(8'((x << 4) | y), src, ok, lat);
      check(ok, $sformatf("target %0d%0d routed", x, y));
      check(lat == 4, $sformatf("ack_rot after %0d cycles, want 4", lat));
      check(!free[exp] && out_sel[exp] == PORT_W'(src) && in_sel[src] == PORT_W'(exp) &&
            in_busy[src], $sformatf("target %0d%0d: table for port %0d", x, y, exp));
      check($countones(~free) == 1, "only one output busy");
      close(exp);
      check(free == 5'b11111 && in_busy == '0, "closed");
    end

    // Three simultaneous connections: W->N, N->S, L->E.
    request(8'h10, WEST, ok, lat);  check(ok, "W->N");
    request(8'h12, NORTH, ok, lat); check(ok, "N->S");
    request(8'h21, LOCAL, ok, lat); check(ok, "L->E");
    check(free == 5'b10010, $sformatf("free %b, want E0 W1 N0 S0 L1", free));
    check(in_sel[WEST] == 3'd2 && in_sel[NORTH] == 3'd3 && in_sel[LOCAL] == 3'd0, "in vector");
    check(out_sel[EAST] == 3'd4 && out_sel[NORTH] == 3'd1 && out_sel[SOUTH] == 3'd2, "out vector");
    check(in_busy == 5'b10110, "busy inputs W N L");

    // East is busy: a request from South for 21 is refused.
    request(8'h21, SOUTH, ok, lat);
    check(!ok, "busy East refused");
    check(free == 5'b10010 && in_busy == 5'b10110 && out_sel[EAST] == 3'd4, "table unchanged");
    // Close East, retry: now granted.
    close(EAST);
    check(free == 5'b10011 && !in_busy[LOCAL], "East freed, Local input released");
    request(8'h21, SOUTH, ok, lat);
    check(ok && out_sel[EAST] == 3'd3 && in_sel[SOUTH] == 3'd0, "retry granted");
    // Two closes in the same cycle.
    close_out = 5'b01101;
    @(negedge clk);
    close_out = '0;
    check(free == 5'b11111 && in_busy == '0, "all closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
