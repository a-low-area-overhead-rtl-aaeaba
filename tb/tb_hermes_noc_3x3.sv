// tb_hermes_noc_3x3: the mesh at 3x3 (the nine-switch network with switch
// addresses 00..22), 8-bit flits and 8-flit buffers.
// Phase 1 sends two packets through an idle network with always-ready
// receivers: 9 flits from 00 to 11 (n = 3 switches: 00, 10, 11) and 9 flits
// from 00 to 22 (n = 5 switches: 00, 10, 20, 21, 22), and checks the flits
// and the minimal latency 10*n + 2P for each. Phase 2 lets all nine cores
// send random packets to random targets with random receiver stalls; every
// packet must arrive intact and in order per source, and refused routing
// requests, full buffers, switches with several connections and backpressure
// at a core must each occur.
module tb_hermes_noc_3x3;
  import hermes_pkg::*;

  localparam int unsigned NX = 3, NY = 3, N = NX * NY;
  localparam int unsigned NPKT = 30;

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

  hermes_noc #(.X_SIZE(NX), .Y_SIZE(NY)) dut (
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
  int unsigned first_rx = 0, last_ack = 0, tgt = 4;
  bit          rx_seen = 0;
  always @(posedge clk) if (phase1 && rst_n) begin
    if (local_rx[0] && !rx_seen) begin rx_seen = 1; first_rx = cycle; end
    if (local_tx[tgt] && d_ack[tgt]) begin got.push_back(local_data_out[tgt]); last_ack = cycle; end
  end

  task automatic directed(input logic [7:0] hdr, input int unsigned t, input int unsigned nsw);
    automatic logic [7:0] pkt [$] = '{hdr, 8'h07, 8'h00, 8'h01, 8'h00, 8'h12, 8'h34, 8'h56, 8'h78};
    got.delete();
    rx_seen = 0;
    tgt = t;
    @(negedge clk);
    foreach (pkt[i]) begin
      d_rx[0] = 1'b1; d_data[0] = pkt[i];
      do @(negedge clk); while (!local_ack_rx[0]);
    end
    d_rx[0] = 1'b0;
    wait (got.size() == pkt.size());
    repeat (4) @(negedge clk);
    foreach (pkt[i]) check(got[i] == pkt[i], $sformatf("flit %0d at core %0d", i, t));
    check(sw_free == '1, "all connections closed");
    check(last_ack + 1 - first_rx == 10 * nsw + 2 * pkt.size(),
          $sformatf("latency %0d, want %0d", last_ack + 1 - first_rx, 10 * nsw + 2 * pkt.size()));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- Phase 1
    directed(8'h11, 4, 3);
    directed(8'h22, 8, 5);

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
    check(sent[0][8] > 0 && sent[8][0] > 0, "four-hop routes used");
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
