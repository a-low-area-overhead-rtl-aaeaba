// tb_hermes_noc: end-to-end test of the mesh at its default size (2x2,
// 8-bit flits, 8-flit buffers).
//
// Phase 1 sends one packet of P = 9 flits (header 11, length 7, seven
// payload flits) from the core at 00 to the core at 11 through an idle
// network, with always-ready receivers. It checks the flits, the busy state
// of the outputs on the path (00 East, 10 South, 11 Local) and the minimal
// latency sum(R_i) + 2P with R_i = 10 for each of the n = 3 switches on the
// path: from the first cycle the header is offered by the source core to
// the cycle after the last flit is acknowledged at the target core.
// Phase 2 lets all four cores send NPKT random packets to random targets
// (themselves included) while the receiving cores stall at random. Every
// packet must arrive intact at its target, in order per source, and the run
// must show: multi-hop routes, local-to-local delivery, a refused routing
// request (output busy), a full input buffer, a switch with two or more
// connections at once, and backpressure reaching a source core.
module tb_hermes_noc;
  import hermes_pkg::*;

  localparam int unsigned NX = 2, NY = 2, N = NX * NY;
  localparam int unsigned NPKT = 60;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned cycle = 0;
  int unsigned checks = 0, failures = 0;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  logic [N-1:0]       local_rx, local_ack_rx, local_tx, local_ack_tx;
  logic [N-1:0][7:0]  local_data_in, local_data_out;

  hermes_noc dut (
    .clk, .rst_n,
    .local_rx, .local_data_in, .local_ack_rx,
    .local_tx, .local_data_out, .local_ack_tx
  );

  // Phase select: 1 = directed packet driven by this bench, 0 = random cores.
  logic              phase1 = 1'b1;
  logic              go = 1'b0;
  logic [N-1:0]      d_rx = '0, d_ack = '0;
  logic [N-1:0][7:0] d_data = '0;
  logic [N-1:0]      s_rx, s_ack, s_done;
  logic [N-1:0][7:0] s_data;
  int unsigned       sent [N][N];
  int unsigned       rcv  [N][N];
  int unsigned       k_checks [N], k_err [N], k_busy [N];

  assign local_rx      = phase1 ? d_rx   : s_rx;
  assign local_data_in = phase1 ? d_data : s_data;
  assign local_ack_tx  = phase1 ? d_ack  : s_ack;

  for (genvar c = 0; c < N; c++) begin : g_core
    tb_link_source #(.SRC_ID(c), .NX(NX), .NY(NY), .NPKT(NPKT), .MAXLEN(16)) u_src (
      .clk, .rst_n, .enable(go), .tx(s_rx[c]), .data_out(s_data[c]),
      .ack(local_ack_rx[c] && !phase1), .done(s_done[c]), .sent_to(sent[c]));
    tb_link_sink #(.NSRC(N), .MODE(0), .MY_X(c % NX), .MY_Y(c / NX)) u_snk (
      .clk, .rst_n, .ready_pct(50), .tx(local_tx[c] && !phase1), .data_in(local_data_out[c]),
      .ack(s_ack[c]), .rcv(rcv[c]), .checks(k_checks[c]), .errors(k_err[c]),
      .busy_cycles(k_busy[c]));
  end

  // Always-ready receivers for phase 1.
  always_ff @(posedge clk) begin
    if (!rst_n) d_ack <= '0;
    else        d_ack <= local_tx & ~d_ack;
  end

  // Observation of every switch.
  logic [N-1:0][NPORTS-1:0] sw_free, sw_full;
  logic [N-1:0]             sw_refuse;
  for (genvar y = 0; y < NY; y++) begin : g_oy
    for (genvar x = 0; x < NX; x++) begin : g_ox
      assign sw_free[y*NX+x]   = dut.g_y[y].g_x[x].u_sw.free;
      assign sw_refuse[y*NX+x] = dut.g_y[y].g_x[x].u_sw.ack_rot && !dut.g_y[y].g_x[x].u_sw.rot_ok;
      for (genvar p = 0; p < NPORTS; p++) begin : g_op
        if ((p == EAST  && x + 1 < NX) || (p == WEST  && x > 0) ||
            (p == NORTH && y > 0)      || (p == SOUTH && y + 1 < NY) || p == LOCAL) begin : g_on
          assign sw_full[y*NX+x][p] = dut.g_y[y].g_x[x].u_sw.g_port[p].g_on.u_buf.full;
        end else begin : g_off
          assign sw_full[y*NX+x][p] = 1'b0;
        end
      end
    end
  end

  int unsigned n_refused = 0, n_full = 0, n_multi = 0, n_backpressure = 0;
  always @(posedge clk) if (rst_n && !phase1) begin
    for (int c = 0; c < N; c++) begin
      if (sw_refuse[c]) n_refused++;
      if ($countones(~sw_free[c]) >= 2) n_multi++;
      if (sw_full[c] != '0) n_full++;
      if (s_rx[c] && sw_full[c][LOCAL]) n_backpressure++;
    end
  end

  // Phase 1 monitors.
  logic [7:0]  got [$];
  int unsigned first_rx = 0, last_ack = 0;
  bit          rx_seen = 0;
  bit          busy_00e = 0, busy_10s = 0, busy_11l = 0;
  always @(posedge clk) if (phase1 && rst_n) begin
    if (local_rx[0] && !rx_seen) begin rx_seen = 1; first_rx = cycle; end
    if (local_tx[3] && d_ack[3]) begin got.push_back(local_data_out[3]); last_ack = cycle; end
    if (!sw_free[0][EAST])  busy_00e = 1;
    if (!sw_free[1][SOUTH]) busy_10s = 1;
    if (!sw_free[3][LOCAL]) busy_11l = 1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] pkt [$] = '{8'h11, 8'h07, 8'h00, 8'h01, 8'h00, 8'h12, 8'h34, 8'h56, 8'h78};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- Phase 1
    foreach (pkt[i]) begin
      d_rx[0] = 1'b1; d_data[0] = pkt[i];
      do @(negedge clk); while (!local_ack_rx[0]);
    end
    d_rx[0] = 1'b0;
    wait (got.size() == pkt.size());
    repeat (4) @(negedge clk);
    foreach (pkt[i]) check(got[i] == pkt[i], $sformatf("flit %0d at core 11", i));
    check(busy_00e && busy_10s && busy_11l, "path 00 E -> 10 S -> 11 L was held");
    check(sw_free == '1, "all connections closed");
    check(last_ack + 1 - first_rx == 3 * 10 + 2 * pkt.size(),
          $sformatf("latency %0d, want %0d", last_ack + 1 - first_rx, 3 * 10 + 2 * pkt.size()));
    check(local_tx == '0, "no other core received anything");

    // ---- Phase 2
    phase1 = 1'b0;
    @(negedge clk);
    go = 1'b1;
    wait (&s_done);
    repeat (1000) @(posedge clk);
    check(local_tx == '0 && sw_free == '1, "network idle after traffic");
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(sent[s][d] == rcv[d][s],
              $sformatf("%0d -> %0d: sent %0d received %0d", s, d, sent[s][d], rcv[d][s]));
    for (int c = 0; c < N; c++) begin
      checks += k_checks[c];
      failures += k_err[c];
    end
    check(sent[0][3] > 0 && sent[3][0] > 0, "two-hop routes used");
    begin
      automatic int unsigned self_pkts = 0;
      for (int c = 0; c < N; c++) self_pkts += sent[c][c];
      check(self_pkts > 0, "local-to-local delivery used");
    end
    check(n_refused > 0, "a routing request was refused (output busy)");
    check(n_full > 0, "an input buffer was full");
    check(n_multi > 0, "a switch held two or more connections at once");
    check(n_backpressure > 0, "backpressure reached a source core");
    $display("refused=%0d full=%0d multi=%0d backpressure=%0d",
             n_refused, n_full, n_multi, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
