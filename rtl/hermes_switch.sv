// hermes_switch: five-port wormhole packet switch for a 2-D mesh.
//
// Ports East(0), West(1), North(2), South(3) lead to neighbour switches and
// Local(4) to the IP core. Every port is a pair of unidirectional links with
// the tx/ack_tx/data_out (output) and rx/ack_rx/data_in (input) handshake:
// data is held with tx high until ack comes back; one flit per two cycles.
//
// Each input has an input_buffer (circular FIFO). A packet is a header flit
// (target address, X in the upper half, Y in the lower half), a length flit
// N, and N payload flits. When a header reaches the head of its FIFO, the
// buffer requests routing (h); the arbiter serves requests one at a time
// with rotating priority and hands the header to routing_logic, which
// runs the XY algorithm and, if the chosen output is free, records the
// connection in its switching table (free / in / out vectors). The crossbar
// then connects the input to that output and the following flits flow
// without further routing (wormhole). A flit_counter per output loads N from
// the length flit, counts payload flits out, and closes the connection with
// the last one. A header whose output is busy waits in its buffer, and the
// request is retried.
//
// PORTS_EN removes the buffer and counter of ports that lead nowhere (a
// corner switch of a mesh lacks two neighbour ports, an edge switch one); a
// packet routed to an absent port is never acknowledged there and stalls. counter_flit is kept as an internal
// signal for observation only and drives no port.
//
// Timing with no contention: from the cycle a header is offered on rx to the
// cycle it is offered on the chosen output's tx, 10 cycles; later flits follow
// at one per two cycles. The structure, the algorithm, the table and the
// counters follow the switch description; the state sequences that give these
// cycle counts are this design's choices.
module hermes_switch
  import hermes_pkg::*;
#(
  parameter int unsigned         FLIT_W    = 8,
  parameter int unsigned         BUF_DEPTH = 8,
  parameter logic [FLIT_W/2-1:0] X_ADDR    = '0,
  parameter logic [FLIT_W/2-1:0] Y_ADDR    = '0,
  // Ports present (bit p = port p). A switch on the edge of a mesh leaves
  // out the ports that lead nowhere.
  parameter logic [4:0]          PORTS_EN  = 5'b11111
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // input ports
  input  logic [NPORTS-1:0]             rx,
  input  logic [NPORTS-1:0][FLIT_W-1:0] data_in,
  output logic [NPORTS-1:0]             ack_rx,
  // output ports
  output logic [NPORTS-1:0]             tx,
  output logic [NPORTS-1:0][FLIT_W-1:0] data_out,
  input  logic [NPORTS-1:0]             ack_tx
);

  logic [NPORTS-1:0]             h, ack_h, data_av, data_ack, close_in, close_out;
  logic [NPORTS-1:0][FLIT_W-1:0] data;
  logic [NPORTS-1:0][FLIT_W-1:0] counter_flit;
  logic [NPORTS-1:0]             free, in_busy;
  logic [NPORTS-1:0][PORT_W-1:0] in_sel, out_sel;
  logic                          req_rot, ack_rot, rot_ok;
  logic [PORT_W-1:0]             incoming;
  logic [FLIT_W-1:0]             header;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    if (PORTS_EN[p]) begin : g_on
      input_buffer #(.FLIT_W(FLIT_W), .BUF_DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n,
        .rx(rx[p]), .data_in(data_in[p]), .ack_rx(ack_rx[p]),
        .h(h[p]), .ack_h(ack_h[p]),
        .data_av(data_av[p]), .data(data[p]), .data_ack(data_ack[p]),
        .close(close_in[p])
      );
      flit_counter #(.FLIT_W(FLIT_W)) u_cnt (
        .clk, .rst_n,
        .tx(tx[p]), .ack_tx(ack_tx[p]), .data_out(data_out[p]),
        .counter_flit(counter_flit[p]), .close(close_out[p])
      );
    end else begin : g_off
      // Absent port: never requests, never offers a flit, never closes.
      // Its link inputs are left unread.
      assign ack_rx[p]       = 1'b0;
      assign h[p]            = 1'b0;
      assign data_av[p]      = 1'b0;
      assign data[p]         = '0;
      assign close_out[p]    = 1'b0;
      assign counter_flit[p] = '0;
    end
  end

  arbiter u_arb (
    .clk, .rst_n, .h, .ack_h, .req_rot, .incoming, .ack_rot, .rot_ok
  );

  // Header multiplexer: the head flit of the port the arbiter selected.
  assign header = data[incoming];

  routing_logic #(.FLIT_W(FLIT_W), .X_ADDR(X_ADDR), .Y_ADDR(Y_ADDR)) u_route (
    .clk, .rst_n, .req_rot, .incoming, .header, .ack_rot, .rot_ok,
    .close_out, .free, .in_busy, .in_sel, .out_sel
  );

  crossbar #(.FLIT_W(FLIT_W)) u_xbar (
    .free, .in_busy, .in_sel, .out_sel,
    .data_av, .data, .data_ack, .close_in,
    .tx, .data_out, .ack_tx, .close_out
  );

endmodule
