// tb_arbiter: self-checking test of the rotating-priority arbiter. A small
// model of the routing logic answers each req_rot after four cycles with
// ack_rot and a success flag taken from a list; a model of the buffers drops
// h[i] when ack_h[i] comes. Checked: the order of service against a reference
// rotating-priority model (East first after reset, since Local counts as last
// served), the req_rot and ack_h timing, no ack_h for a refused request, and a
// refused port going to the back of the order.
module tb_arbiter;
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

  logic [NPORTS-1:0] h = '0, ack_h;
  logic              req_rot, ack_rot = 1'b0, rot_ok = 1'b0;
  logic [PORT_W-1:0] incoming;

  arbiter dut (.clk, .rst_n, .h, .ack_h, .req_rot, .incoming, .ack_rot, .rot_ok);

  // Routing-logic model.
  bit          ok_q [$];
  int unsigned req_cnt = 0;
  int unsigned served [$];
  int unsigned req_rise = 0, ackrot_cyc = 0;
  bit          req_q = 0;
  always @(posedge clk) begin
    if (req_rot && !req_q) req_rise = cycle;
    req_q = req_rot;
    ack_rot <= 1'b0;
    if (req_rot && !ack_rot) begin
      req_cnt++;
      if (req_cnt == 4) begin
        req_cnt = 0;
        ack_rot <= 1'b1;
        rot_ok  <= (ok_q.size() > 0) ? ok_q.pop_front() : 1'b1;
        served.push_back(incoming);
        ackrot_cyc = cycle + 1;
      end
    end
  end

  // Buffer model; ack_h timing and validity.
  always @(posedge clk) begin
    for (int i = 0; i < NPORTS; i++) if (rst_n && ack_h[i]) begin
      check(h[i], "ack_h only to a requesting port");
      check(cycle == ackrot_cyc + 1, "ack_h one cycle after ack_rot");
      h[i] <= 1'b0;
    end
  end

  // Reference rotating priority.
  int unsigned ref_last = NPORTS - 1;
  function automatic int unsigned ref_pick(input logic [NPORTS-1:0] req);
    for (int k = 1; k <= NPORTS; k++)
      if (req[(ref_last + k) % NPORTS]) return (ref_last + k) % NPORTS;
    return NPORTS;
  endfunction

  // Run one round: raise `req`, give the routing answers `oks`, expect the
  // services in reference order until no request is left.
  task automatic round(input logic [NPORTS-1:0] req, input bit oks [$]);
    automatic logic [NPORTS-1:0] pend = req;
    automatic int unsigned h_rise;
    ok_q = oks;
    served.delete();
    @(negedge clk);
    h = req;
    h_rise = cycle + 1;
    wait (req_rot);
    @(posedge clk);
    #1 check(req_rise == h_rise + 2, $sformatf("req_rot %0d cycles after h", req_rise - h_rise));
    while (pend != '0) begin
      automatic int unsigned exp = ref_pick(pend);
      automatic bit ok = (ok_q.size() > 0) ? ok_q[0] : 1'b1;
      wait (served.size() > 0);
      check(served[0] == exp, $sformatf("served %0d, expected %0d", served[0], exp));
      served.pop_front();
      ref_last = exp;
      if (ok) pend[exp] = 1'b0;
      repeat (3) @(negedge clk);
      check(h[exp] == !ok, $sformatf("port %0d ok=%0d h=%b", exp, ok, h));
    end
    repeat (4) @(negedge clk);
    check(h == '0 && !req_rot, "all requests served");
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    round(5'b11111, '{1, 1, 1, 1, 1});       // E W N S L
    round(5'b01100, '{1, 1});                // N S
    round(5'b10011, '{0, 1, 1, 1});          // E refused, W, L, then E again
    round(5'b00101, '{1, 0, 0, 1});          // E, N refused twice, then N
    for (int r = 0; r < 10; r++) begin
      automatic logic [NPORTS-1:0] req = 5'($urandom);
      automatic bit oks [$];
      for (int k = 0; k < 12; k++) oks.push_back(($urandom % 3) != 0);
      if (req != '0) round(req, oks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
