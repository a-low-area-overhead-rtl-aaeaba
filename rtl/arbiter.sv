// arbiter: grants one routing request at a time among the five input ports.
//
// Each input buffer raises h[i] while its header flit waits for a
// connection. The arbiter picks one requester with a rotating priority: the
// port after the last one served has the highest priority, and the order
// continues East, West, North, South, Local (indices 0..4) and wraps. So after
// Local (4) was served, East (0) comes first. The chosen index goes out on
// `incoming` together with req_rot to the routing logic, and the arbiter
// waits for ack_rot. If the routing logic reports success (rot_ok), ack_h[i]
// is pulsed for one cycle to tell the buffer its connection is open. Whether
// the request succeeded or failed, the served port becomes the last one
// served and so gets the lowest priority next time; a refused port keeps h
// high and is retried in a later round.
//
// Timing: h seen in cycle t -> winner latched (GRANT) in t+1 -> req_rot from
// t+2 until ack_rot (four cycles with the routing logic of this design) ->
// ack_h one cycle after ack_rot. The rotating priority, the lowest priority
// for a refused port and the four-cycle wait follow the switch description;
// the GRANT state and the one-cycle ack_h pulse are this design's choices.
module arbiter
  import hermes_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] h,
  output logic [NPORTS-1:0] ack_h,
  output logic              req_rot,
  output logic [PORT_W-1:0] incoming,
  input  logic              ack_rot,
  input  logic              rot_ok
);

  typedef enum logic [1:0] {A_IDLE, A_GRANT, A_REQ, A_ACK} state_e;
  state_e state;

  logic [PORT_W-1:0] last;     // last port whose request was served
  logic [PORT_W-1:0] winner;
  logic              any_req;

  // Rotating-priority pick: search from last+1 upwards, wrapping at NPORTS.
  always_comb begin
    winner  = last;
    any_req = 1'b0;
    for (int k = NPORTS; k >= 1; k--) begin
      logic [PORT_W-1:0] idx;
      idx = PORT_W'((int'(last) + k) % NPORTS);
      if (h[idx]) begin
        winner  = idx;
        any_req = 1'b1;
      end
    end
  end

  assign req_rot = (state == A_REQ);

  always_comb begin
    ack_h = '0;
    if (state == A_ACK) ack_h[incoming] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      last     <= PORT_W'(NPORTS - 1);
      incoming <= '0;
    end else begin
      unique case (state)
        A_IDLE:  if (any_req) state <= A_GRANT;
        A_GRANT: begin
          incoming <= winner;
          state    <= A_REQ;
        end
        A_REQ: if (ack_rot) begin
          last  <= incoming;
          state <= rot_ok ? A_ACK : A_IDLE;
        end
        A_ACK:   state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  a_onehot_ack: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack_h));
  a_req_held:   assert property (@(posedge clk) disable iff (!rst_n)
    (req_rot && !ack_rot) |=> (req_rot && $stable(incoming)));

endmodule
