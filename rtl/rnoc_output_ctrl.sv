// rnoc_output_ctrl: output controller on an R-NoC lane.
//
// An elastic buffer followed by the output logic and a demux with two exits:
// the router output port MY_PORT (through the output port block) and the next
// stage of the lane. For each header flit the output logic decides:
//   - the header's output port is not MY_PORT: go on along the lane;
//   - it is MY_PORT and the port arbiter grants the port: leave the router;
//   - it is MY_PORT but the port is busy (not granted): if WAIT_IF_BUSY is 0
//     the packet is deflected along the lane to find the port again on a
//     secondary lane; if WAIT_IF_BUSY is 1 it stays and waits for the port.
// The decision is re-evaluated every cycle until the header flit actually
// moves; from then on body flits follow the same exit until the tail passes.
// The port request never depends on the lane's ready, and the lane valid
// depends only on the port grant, so no combinational loop runs through a
// lane merge.
//
// Following the document: EB + output logic + demux, the list of cases
// (free port: exit; busy non-local port on a primary lane: deflect; busy local
// port: wait, except on lane 1 where it deflects; any port on a secondary lane:
// wait), path reserved by the header for the rest of the packet. The router
// chooses WAIT_IF_BUSY per instance to realise those cases. "Busy" meaning "the
// arbiter does not grant the port this cycle" is this design's reading.
//
// Interface: lane in valid_i/ready_o/flit_i; lane out lane_valid_o/
// lane_ready_i/lane_flit_o; port side port_req_o (= flit valid for the port),
// port_gnt_i from the arbiter, port_ready_i (granted and receiver ready),
// port_flit_o. deflect_o pulses when a header is deflected.
module rnoc_output_ctrl
  import rnoc_pkg::*;
#(
  parameter logic [3:0] MY_PORT      = 4'(PORT_N),
  parameter bit          WAIT_IF_BUSY = 1'b0
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  valid_i,
  output logic  ready_o,
  input  flit_t flit_i,
  output logic  lane_valid_o,
  input  logic  lane_ready_i,
  output flit_t lane_flit_o,
  output logic  port_req_o,
  input  logic  port_gnt_i,
  input  logic  port_ready_i,
  output flit_t port_flit_o,
  output logic  deflect_o
);

  logic  q_valid, q_ready;
  flit_t q;
  logic  locked, locked_port;
  logic  match, go_port, go_lane;

  rnoc_eb #(.T(flit_t)) u_eb (
    .clk, .rst,
    .valid_i, .ready_o, .data_i(flit_i),
    .valid_o(q_valid), .ready_i(q_ready), .data_o(q)
  );

  assign match = q.head && (hdr_outport(q.data) == MY_PORT);

  always_comb begin
    if (locked) begin
      port_req_o = q_valid && locked_port;
      go_port    = locked_port;
    end else begin
      port_req_o = q_valid && match;
      go_port    = match && (port_gnt_i || WAIT_IF_BUSY);
    end
    go_lane      = !go_port;
    lane_valid_o = q_valid && go_lane;
    q_ready      = go_port ? port_ready_i : lane_ready_i;
  end

  assign lane_flit_o = q;
  assign port_flit_o = q;
  assign deflect_o   = q_valid && !locked && match && go_lane && lane_ready_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      locked      <= 1'b0;
      locked_port <= 1'b0;
    end else if (q_valid && q_ready) begin
      if (q.tail) begin
        locked <= 1'b0;
      end else if (q.head) begin
        locked      <= 1'b1;
        locked_port <= go_port;
      end
    end
  end

  a_port_ready_granted: assert property (@(posedge clk) disable iff (rst)
                                         port_ready_i |-> port_gnt_i);

endmodule
