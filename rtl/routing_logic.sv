// routing_logic: XY routing and the switching table of one switch.
//
// The switching table has three vectors, one entry per port:
//   free[o]    - output o is free (1) or busy (0)
//   out_sel[o] - the input that drives output o (valid while free[o] = 0)
//   in_sel[i]  - the output that input i drives (valid while in_busy[i] = 1)
// The table is redundant on purpose, so that both the output multiplexers and
// the acknowledge multiplexers read their select directly.
//
// A request (req_rot, with the header flit and the requesting input on
// `incoming`) runs through four states: ROUTE latches the header and
// computes the XY direction, CHECK looks at free[] of that output, WRITE
// enters the connection in the table if the output was free, and ACK raises
// ack_rot for one cycle with rot_ok telling whether the connection was made.
// A busy output refuses the request; the header then waits in its buffer.
// close_out[o], from the flit counter of output o, frees output o and its
// input in the same clock edge.
//
// The target address is the header flit: X in the upper half, Y in the lower
// half. The XY algorithm, the three table vectors and closing by counter
// follow the switch description; the four-state sequence and the bit split of
// the address are this design's choices.
module routing_logic
  import hermes_pkg::*;
#(
  parameter int unsigned        FLIT_W = 8,
  parameter logic [FLIT_W/2-1:0] X_ADDR = '0,
  parameter logic [FLIT_W/2-1:0] Y_ADDR = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_rot,
  input  logic [PORT_W-1:0] incoming,
  input  logic [FLIT_W-1:0] header,
  output logic              ack_rot,
  output logic              rot_ok,
  input  logic [NPORTS-1:0] close_out,
  output logic [NPORTS-1:0] free,
  output logic [NPORTS-1:0] in_busy,
  output logic [NPORTS-1:0][PORT_W-1:0] in_sel,
  output logic [NPORTS-1:0][PORT_W-1:0] out_sel
);

  localparam int unsigned AW = FLIT_W / 2;

  typedef enum logic [2:0] {R_IDLE, R_ROUTE, R_CHECK, R_WRITE, R_ACK} state_e;
  state_e state;

  logic [PORT_W-1:0] src;
  port_e             dir;
  logic              ok;

  assign ack_rot = (state == R_ACK);
  assign rot_ok  = ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= R_IDLE;
      src     <= '0;
      dir     <= LOCAL;
      ok      <= 1'b0;
      free    <= '1;
      in_busy <= '0;
      in_sel  <= '0;
      out_sel <= '0;
    end else begin
      // Connections end when their flit counters say so.
      for (int o = 0; o < NPORTS; o++) begin
        if (close_out[o] && !free[o]) begin
          free[o]             <= 1'b1;
          in_busy[out_sel[o]] <= 1'b0;
        end
      end
      unique case (state)
        R_IDLE: if (req_rot) state <= R_ROUTE;
        R_ROUTE: begin
          src   <= incoming;
          dir   <= xy_route(16'(X_ADDR), 16'(Y_ADDR),
                            16'(header[FLIT_W-1:AW]), 16'(header[AW-1:0]));
          state <= R_CHECK;
        end
        R_CHECK: begin
          ok    <= free[dir];
          state <= R_WRITE;
        end
        R_WRITE: begin
          if (ok) begin
            free[dir]    <= 1'b0;
            out_sel[dir] <= src;
            in_sel[src]  <= dir;
            in_busy[src] <= 1'b1;
          end
          state <= R_ACK;
        end
        R_ACK:   state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

  // Each busy output is driven by exactly one busy input that points back.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_table: assert property (@(posedge clk) disable iff (!rst_n)
      !free[o] |-> (in_busy[out_sel[o]] && in_sel[out_sel[o]] == PORT_W'(o)));
  end

endmodule
