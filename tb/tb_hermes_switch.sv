// tb_hermes_switch: self-checking test of one five-port switch.
//
// A: the local-to-east connection of a switch at address 00 carrying the
//    packet 11 07 00 01 00 12 34 56 78 (header 11, seven payload flits):
//    the flits come out on East unchanged, the header 10 cycles after it was
//    offered, the others at one per two cycles; free(0) goes busy and returns
//    to free after the last flit; the counter loads 07 then counts down.
// B: three simultaneous connections at a switch at 11 (West->North,
//    North->South, Local->East) and the exact switching table they give.
// C: random traffic into all five inputs of a switch at 11 (targets in a
//    3x3 mesh) with randomly stalling outputs; every packet must leave by its
//    XY port intact, none may be lost, and header contention (a refused
//    routing request), a full input buffer and several simultaneous
//    connections must each happen.
module tb_hermes_switch;
  import hermes_pkg::*;

  localparam int unsigned NPKT = 40;

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

  // ---------------------------------------------------------------- A and B
  logic [NPORTS-1:0]            rx0, ack_rx0, tx0, ack_tx0, rx1, ack_rx1, tx1, ack_tx1;
  logic [NPORTS-1:0][7:0]       din0, dout0, din1, dout1;

  hermes_switch #(.X_ADDR(4'd0), .Y_ADDR(4'd0)) u0 (
    .clk, .rst_n, .rx(rx0), .data_in(din0), .ack_rx(ack_rx0),
    .tx(tx0), .data_out(dout0), .ack_tx(ack_tx0));
  hermes_switch #(.X_ADDR(4'd1), .Y_ADDR(4'd1)) u1 (
    .clk, .rst_n, .rx(rx1), .data_in(din1), .ack_rx(ack_rx1),
    .tx(tx1), .data_out(dout1), .ack_tx(ack_tx1));

  // Always-ready receivers on every output of u0 and u1.
  always_ff @(posedge clk) begin
    if (!rst_n) begin ack_tx0 <= '0; ack_tx1 <= '0; end
    else begin
      ack_tx0 <= tx0 & ~ack_tx0;
      ack_tx1 <= tx1 & ~ack_tx1;
    end
  end

  // East output of u0: log every completed flit transfer and its cycle.
  logic [7:0]  east_flit [$];
  int unsigned east_cyc [$];
  int unsigned east_first_tx = 0;
  bit          east_seen = 0;
  int unsigned local_first_rx = 0;
  bit          local_seen = 0;
  always @(posedge clk) begin
    if (rx0[LOCAL] && !local_seen) begin local_seen = 1; local_first_rx = cycle; end
    if (tx0[EAST] && !east_seen) begin east_seen = 1; east_first_tx = cycle; end
    if (tx0[EAST] && ack_tx0[EAST]) begin
      east_flit.push_back(dout0[EAST]);
      east_cyc.push_back(cycle);
    end
  end

  task automatic send0(input int p, input logic [7:0] f [$]);
    foreach (f[i]) begin
      rx0[p] = 1'b1; din0[p] = f[i];
      do @(negedge clk); while (!ack_rx0[p]);
    end
    rx0[p] = 1'b0;
  endtask

  task automatic send1(input int p, input logic [7:0] f [$]);
    foreach (f[i]) begin
      rx1[p] = 1'b1; din1[p] = f[i];
      do @(negedge clk); while (!ack_rx1[p]);
    end
    rx1[p] = 1'b0;
  endtask

  // ---------------------------------------------------------------- C
  logic [NPORTS-1:0]       rx2, ack_rx2, tx2, ack_tx2, src_done;
  logic [NPORTS-1:0][7:0]  din2, dout2;
  logic                    go = 1'b0;
  int unsigned sent [NPORTS][9];
  int unsigned rcv  [NPORTS][NPORTS];
  int unsigned s_checks [NPORTS], s_err [NPORTS], s_busy [NPORTS];

  hermes_switch #(.X_ADDR(4'd1), .Y_ADDR(4'd1)) u2 (
    .clk, .rst_n, .rx(rx2), .data_in(din2), .ack_rx(ack_rx2),
    .tx(tx2), .data_out(dout2), .ack_tx(ack_tx2));

  for (genvar p = 0; p < NPORTS; p++) begin : g_tr
    tb_link_source #(.SRC_ID(p), .NX(3), .NY(3), .NPKT(NPKT), .MAXLEN(12)) u_src (
      .clk, .rst_n, .enable(go), .tx(rx2[p]), .data_out(din2[p]), .ack(ack_rx2[p]),
      .done(src_done[p]), .sent_to(sent[p]));
    tb_link_sink #(.NSRC(NPORTS), .MODE(1), .SW_X(1), .SW_Y(1), .PORT(p)) u_snk (
      .clk, .rst_n, .ready_pct(40), .tx(tx2[p]), .data_in(dout2[p]), .ack(ack_tx2[p]), .rcv(rcv[p]),
      .checks(s_checks[p]), .errors(s_err[p]), .busy_cycles(s_busy[p]));
  end

  logic [NPORTS-1:0] buf_full;
  for (genvar p = 0; p < NPORTS; p++) begin : g_full
    assign buf_full[p] = u2.g_port[p].g_on.u_buf.full;
  end

  int unsigned n_refused = 0, n_full = 0, n_multi = 0;
  always @(posedge clk) if (rst_n && go) begin
    if (u2.ack_rot && !u2.rot_ok) n_refused++;
    if ($countones(~u2.free) >= 3) n_multi++;
    for (int p = 0; p < NPORTS; p++)
      if (rx2[p] && !ack_rx2[p] && buf_full[p]) n_full++;
  end

  // Watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] pkt [$];
    rx0 = '0; din0 = '0; rx1 = '0; din1 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- A: local -> east, packet of the switch simulation
    pkt = '{8'h11, 8'h07, 8'h00, 8'h01, 8'h00, 8'h12, 8'h34, 8'h56, 8'h78};
    check(u0.free == 5'b11111, "all outputs free after reset");
    fork send0(LOCAL, pkt); join_none
    @(posedge clk); #1;
    check(ack_rx0[LOCAL], "ack_rx one cycle after rx");
    wait (u0.g_port[LOCAL].g_on.u_buf.h);
    check(u0.free[EAST], "east still free while routing is requested");
    wait (east_seen);
    check(east_first_tx - local_first_rx == 10, $sformatf("header latency %0d, want 10", east_first_tx - local_first_rx));
    check(!u0.free[EAST] && u0.in_sel[LOCAL] == EAST && u0.out_sel[EAST] == LOCAL,
          "table: local drives east");
    wait (east_flit.size() == 3);
    #1 check(u0.counter_flit[EAST] == 8'h06, "counter 07 -> 06 after first payload flit");
    wait (east_flit.size() == pkt.size());
    #1;
    foreach (pkt[i]) check(east_flit[i] == pkt[i], $sformatf("east flit %0d", i));
    for (int i = 1; i < pkt.size(); i++)
      check(east_cyc[i] - east_cyc[i-1] == 2, $sformatf("flit %0d two cycles after previous", i));
    check(u0.free[EAST] && !u0.in_busy[LOCAL], "connection closed after the last flit");
    check(tx0 == '0, "nothing else sent");

    // ---- B: three simultaneous connections at switch 11
    begin
      automatic logic [7:0] pw [$], pn [$], pl [$];
      pw = '{8'h10, 8'd20}; pn = '{8'h12, 8'd20}; pl = '{8'h21, 8'd20};
      for (int i = 0; i < 20; i++) begin pw.push_back(8'(i)); pn.push_back(8'(i)); pl.push_back(8'(i)); end
      fork
        send1(WEST, pw);
        send1(NORTH, pn);
        send1(LOCAL, pl);
      join_none
      fork
        wait (u1.free == 5'b10010);
        begin repeat (200) @(posedge clk); end
      join_any
      disable fork;
      #1;
      check(u1.free == 5'b10010, "free = 0 1 0 0 1 (E W N S L)");
      check(u1.in_sel[WEST] == NORTH && u1.in_sel[NORTH] == SOUTH && u1.in_sel[LOCAL] == EAST,
            "in vector: W->N(2), N->S(3), L->E(0)");
      check(u1.out_sel[EAST] == LOCAL && u1.out_sel[NORTH] == WEST && u1.out_sel[SOUTH] == NORTH,
            "out vector: E<-L(4), N<-W(1), S<-N(2)");
      check(tx1[NORTH] || tx1[SOUTH] || tx1[EAST], "flits flowing");
      wait (u1.free == 5'b11111);
      check(1'b1, "all three connections closed");
    end

    // ---- C: random traffic
    @(negedge clk);
    go = 1'b1;
    wait (&src_done);
    repeat (400) @(posedge clk);
    check(tx2 == '0 && u2.free == 5'b11111, "switch idle after traffic");
    for (int s = 0; s < NPORTS; s++) begin
      automatic int unsigned tot_s = 0, tot_r = 0;
      for (int t = 0; t < 9; t++) tot_s += sent[s][t];
      for (int p = 0; p < NPORTS; p++) tot_r += rcv[p][s];
      check(tot_s == NPKT && tot_r == NPKT, $sformatf("source %0d: sent %0d received %0d", s, tot_s, tot_r));
    end
    // Per output: the packets for the targets that route there.
    begin
      automatic int unsigned want [NPORTS] = '{default: 0};
      automatic int unsigned got  [NPORTS] = '{default: 0};
      for (int s = 0; s < NPORTS; s++)
        for (int t = 0; t < 9; t++) begin
          automatic int unsigned x = t % 3, y = t / 3;
          automatic int unsigned p = (x > 1) ? 0 : (x < 1) ? 1 : (y < 1) ? 2 : (y > 1) ? 3 : 4;
          want[p] += sent[s][t];
        end
      for (int p = 0; p < NPORTS; p++) begin
        for (int s = 0; s < NPORTS; s++) got[p] += rcv[p][s];
        check(want[p] == got[p], $sformatf("output %0d: %0d packets, want %0d", p, got[p], want[p]));
        checks += s_checks[p];
        failures += s_err[p];
      end
    end
    check(n_refused > 0, "a routing request was refused (busy output)");
    check(n_full > 0, "an input buffer was full");
    check(n_multi > 0, "three or more connections at once");
    $display("refused=%0d full=%0d multi=%0d", n_refused, n_full, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
