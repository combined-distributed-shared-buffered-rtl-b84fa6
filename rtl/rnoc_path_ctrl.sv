// rnoc_path_ctrl: path controller on a primary R-NoC lane.
//
// An elastic buffer followed by lane logic with two exits: the next segment of
// the same (primary) lane, and a switch link onto a secondary lane. A path
// controller sits just ahead of a point where an input port joins the lane.
// For each header flit the lane logic first offers the flit to the primary
// lane; if the primary lane does not accept it in this cycle (another packet
// holds the joining point, or the lane is stalled) the header is offered to
// the secondary lane instead. Whichever side takes the header carries the rest
// of the packet. If neither side can take it, the flit waits in the buffer.
//
// The primary valid does not depend on any ready, and the secondary valid
// depends only on the primary ready, so the two lane merges downstream never
// form a combinational loop through this block.
//
// With SEC_ONLY_EN set, a header whose output port is SEC_ONLY_PORT is never
// offered to the primary lane: it always takes the switch link. The router uses
// this for packets that have already passed their port's controller on the
// primary lane and can only find it again on the secondary lane.
//
// Following the document: the path controller forwards a packet along the lane
// if its path on the primary lane is not blocked and otherwise switches it to a
// secondary lane; it moves towards the secondary lane only when that lane has
// room. This design's own choice: "blocked" means "not accepted by the primary
// lane in this cycle"; the primary lane is tried first; the forced switch for
// SEC_ONLY_PORT.
//
// Interface: lane in valid_i/ready_o/flit_i; primary out pri_valid_o/
// pri_ready_i/pri_flit_o; switch link sec_valid_o/sec_ready_i/sec_flit_o.
// switch_o pulses when a header takes the switch link.
module rnoc_path_ctrl
  import rnoc_pkg::*;
#(
  parameter bit         SEC_ONLY_EN   = 1'b0,
  parameter logic [3:0] SEC_ONLY_PORT = 4'(PORT_N)
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  valid_i,
  output logic  ready_o,
  input  flit_t flit_i,
  output logic  pri_valid_o,
  input  logic  pri_ready_i,
  output flit_t pri_flit_o,
  output logic  sec_valid_o,
  input  logic  sec_ready_i,
  output flit_t sec_flit_o,
  output logic  switch_o
);

  logic  q_valid, q_ready;
  flit_t q;
  logic  locked, locked_sec;
  logic  take_pri, take_sec;
  logic  sec_only;

  rnoc_eb #(.T(flit_t)) u_eb (
    .clk, .rst,
    .valid_i, .ready_o, .data_i(flit_i),
    .valid_o(q_valid), .ready_i(q_ready), .data_o(q)
  );

  assign sec_only = SEC_ONLY_EN && q.head && (hdr_outport(q.data) == SEC_ONLY_PORT);

  always_comb begin
    if (locked) begin
      pri_valid_o = q_valid && !locked_sec;
      sec_valid_o = q_valid && locked_sec;
      take_pri    = !locked_sec && pri_ready_i;
      take_sec    = locked_sec && sec_ready_i;
    end else if (sec_only) begin
      pri_valid_o = 1'b0;
      sec_valid_o = q_valid;
      take_pri    = 1'b0;
      take_sec    = sec_ready_i;
    end else begin
      pri_valid_o = q_valid;
      sec_valid_o = q_valid && !pri_ready_i;
      take_pri    = pri_ready_i;
      take_sec    = !pri_ready_i && sec_ready_i;
    end
    q_ready = take_pri || take_sec;
  end

  assign pri_flit_o = q;
  assign sec_flit_o = q;
  assign switch_o   = q_valid && !locked && take_sec;

  a_sec_only: assert property (@(posedge clk) disable iff (rst)
                               q_valid && !locked && sec_only |-> !pri_valid_o);

  always_ff @(posedge clk) begin
    if (rst) begin
      locked     <= 1'b0;
      locked_sec <= 1'b0;
    end else if (q_valid && q_ready) begin
      if (q.tail) begin
        locked <= 1'b0;
      end else if (q.head) begin
        locked     <= 1'b1;
        locked_sec <= take_sec;
      end
    end
  end

endmodule
