// tb_link_sink: testbench receiver for one link output. It acknowledges
// flits with the link handshake (capture in a cycle with tx high, ack not
// yet given and the sink ready; ack high the next cycle), becoming ready at
// random with ready_pct percent per cycle. It checks every packet built by
// tb_link_source:
//   MODE 0: the header must equal this sink's own address (MY_X, MY_Y);
//   MODE 1: the header, routed by XY from a switch at (SW_X, SW_Y), must
//           leave by port PORT (0 E, 1 W, 2 N, 3 S, 4 L);
// the length, source, rising sequence number per source and every payload
// flit. rcv[s] counts complete packets from source s.
module tb_link_sink #(
  parameter int unsigned NSRC      = 4,
  parameter int unsigned MODE      = 0,
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned SW_X      = 0,
  parameter int unsigned SW_Y      = 0,
  parameter int unsigned PORT      = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  int unsigned ready_pct,
  input  logic        tx,
  input  logic [7:0]  data_in,
  output logic        ack,
  output int unsigned rcv [NSRC],
  output int unsigned checks,
  output int unsigned errors,
  output int unsigned busy_cycles
);

  logic        ready;
  int unsigned state, n, j, src, seq;
  int          last_seq [NSRC];

  function automatic int unsigned exp_port(int unsigned hx, int unsigned hy);
    if (hx > SW_X) return 0;
    if (hx < SW_X) return 1;
    if (hy < SW_Y) return 2;
    if (hy > SW_Y) return 3;
    return 4;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      errors++;
      $display("sink(mode %0d port %0d at %0d,%0d): bad %s, flit %02h",
               MODE, PORT, MY_X, MY_Y, what, data_in);
    end
  endtask

  initial begin
    ack = 1'b0; ready = 1'b0; checks = 0; errors = 0; busy_cycles = 0;
    state = 0; n = 0; j = 0; src = 0; seq = 0;
    for (int s = 0; s < NSRC; s++) begin rcv[s] = 0; last_seq[s] = -1; end
  end

  always @(negedge clk) ready <= (($urandom % 100) < ready_pct);

  always @(posedge clk) begin
    if (!rst_n) begin
      ack <= 1'b0;
    end else begin
      if (tx && ack) busy_cycles++;
      ack <= tx && !ack && ready;
      if (tx && !ack && ready) begin
        case (state)
          0: begin
            if (MODE == 0) check(data_in == 8'((MY_X << 4) | MY_Y), "header");
            else check(exp_port(data_in[7:4], data_in[3:0]) == PORT, "route");
            state = 1;
          end
          1: begin
            n = data_in; j = 0;
            check(n >= 2, "length");
            state = 2;
          end
          default: begin
            if (j == 0) begin
              src = data_in;
              check(src < NSRC, "source");
            end else if (j == 1) begin
              seq = data_in;
              if (src < NSRC) begin
                check(int'(seq) > last_seq[src], "sequence");
                last_seq[src] = seq;
              end
            end else begin
              check(data_in == 8'(src*37 + seq*11 + j), "payload");
            end
            j++;
            if (j == n) begin
              if (src < NSRC) rcv[src]++;
              state = 0;
            end
          end
        endcase
      end
    end
  end

endmodule
