// hermes_noc: a 2-D mesh of hermes_switch instances.
//
// Switch (x, y) has address X = x, Y = y; x grows towards East and y towards
// South. Its East port links to the West port of (x+1, y) and its South port
// to the North port of (x, y+1), both directions of each link. Ports on the
// edge of the mesh lead nowhere: their link inputs are held idle and their
// outputs are left open (XY routing never selects them for a target inside
// the mesh).
// Each switch has only the ports its position needs: edge switches are built
// without the buffers and counters of the missing directions (a corner switch
// has three ports, an edge switch four, an inner switch five).
// Each switch's Local port is brought out, flattened by core index
// c = y*X_SIZE + x, for the IP core attached there; the link protocol is the
// same tx/ack handshake as between switches.
//
// The default 2x2 size, the 8-bit flits and the 8-flit buffers are the sizes
// of the prototype the design was built for; the mesh wiring follows the 3x3
// drawing of the same network. Target addresses must lie inside the mesh.
module hermes_noc
  import hermes_pkg::*;
#(
  parameter int unsigned X_SIZE    = 2,
  parameter int unsigned Y_SIZE    = 2,
  parameter int unsigned FLIT_W    = 8,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // Local ports, one per core c = y*X_SIZE + x. Core -> network:
  input  logic [X_SIZE*Y_SIZE-1:0]             local_rx,
  input  logic [X_SIZE*Y_SIZE-1:0][FLIT_W-1:0] local_data_in,
  output logic [X_SIZE*Y_SIZE-1:0]             local_ack_rx,
  // Network -> core:
  output logic [X_SIZE*Y_SIZE-1:0]             local_tx,
  output logic [X_SIZE*Y_SIZE-1:0][FLIT_W-1:0] local_data_out,
  input  logic [X_SIZE*Y_SIZE-1:0]             local_ack_tx
);

  localparam int unsigned N = X_SIZE * Y_SIZE;

  logic [N-1:0][NPORTS-1:0]             rx, ack_rx, tx, ack_tx;
  logic [N-1:0][NPORTS-1:0][FLIT_W-1:0] data_in, data_out;

  for (genvar y = 0; y < Y_SIZE; y++) begin : g_y
    for (genvar x = 0; x < X_SIZE; x++) begin : g_x
      localparam int unsigned C = y * X_SIZE + x;
      // Ports present at this position: E W N S L.
      localparam logic [4:0] EN = {1'b1, (y + 1 < Y_SIZE), (y > 0), (x > 0), (x + 1 < X_SIZE)};

      hermes_switch #(
        .FLIT_W(FLIT_W), .BUF_DEPTH(BUF_DEPTH),
        .X_ADDR((FLIT_W/2)'(x)), .Y_ADDR((FLIT_W/2)'(y)), .PORTS_EN(EN)
      ) u_sw (
        .clk, .rst_n,
        .rx(rx[C]), .data_in(data_in[C]), .ack_rx(ack_rx[C]),
        .tx(tx[C]), .data_out(data_out[C]), .ack_tx(ack_tx[C])
      );

      // Local port
      assign rx[C][LOCAL]      = local_rx[C];
      assign data_in[C][LOCAL] = local_data_in[C];
      assign local_ack_rx[C]   = ack_rx[C][LOCAL];
      assign local_tx[C]       = tx[C][LOCAL];
      assign local_data_out[C] = data_out[C][LOCAL];
      assign ack_tx[C][LOCAL]  = local_ack_tx[C];

      // East side: to (x+1, y) West, or the mesh edge.
      if (x + 1 < X_SIZE) begin : g_e
        assign rx[C][EAST]      = tx[C+1][WEST];
        assign data_in[C][EAST] = data_out[C+1][WEST];
        assign ack_tx[C][EAST]  = ack_rx[C+1][WEST];
      end else begin : g_e_edge
        assign rx[C][EAST]      = 1'b0;
        assign data_in[C][EAST] = '0;
        assign ack_tx[C][EAST]  = 1'b0;
      end
      // West side: to (x-1, y) East, or the mesh edge.
      if (x > 0) begin : g_w
        assign rx[C][WEST]      = tx[C-1][EAST];
        assign data_in[C][WEST] = data_out[C-1][EAST];
        assign ack_tx[C][WEST]  = ack_rx[C-1][EAST];
      end else begin : g_w_edge
        assign rx[C][WEST]      = 1'b0;
        assign data_in[C][WEST] = '0;
        assign ack_tx[C][WEST]  = 1'b0;
      end
      // South side: to (x, y+1) North, or the mesh edge.
      if (y + 1 < Y_SIZE) begin : g_s
        assign rx[C][SOUTH]      = tx[C+X_SIZE][NORTH];
        assign data_in[C][SOUTH] = data_out[C+X_SIZE][NORTH];
        assign ack_tx[C][SOUTH]  = ack_rx[C+X_SIZE][NORTH];
      end else begin : g_s_edge
        assign rx[C][SOUTH]      = 1'b0;
        assign data_in[C][SOUTH] = '0;
        assign ack_tx[C][SOUTH]  = 1'b0;
      end
      // North side: to (x, y-1) South, or the mesh edge.
      if (y > 0) begin : g_n
        assign rx[C][NORTH]      = tx[C-X_SIZE][SOUTH];
        assign data_in[C][NORTH] = data_out[C-X_SIZE][SOUTH];
        assign ack_tx[C][NORTH]  = ack_rx[C-X_SIZE][SOUTH];
      end else begin : g_n_edge
        assign rx[C][NORTH]      = 1'b0;
        assign data_in[C][NORTH] = '0;
        assign ack_tx[C][NORTH]  = 1'b0;
      end
    end
  end

endmodule
