// rnoc_lane_merge: joins two packet streams onto one lane segment.
//
// Used where an input controller or a switch link joins a lane. A FCFS/RR
// arbiter (rnoc_fcfs_rr_arb) picks the stream that may drive the lane; the
// grant selects the flit (mux), only the granted stream's valid goes on
// (encoder), and the downstream ready is returned only to the granted stream
// (decoder). The block has no storage besides the arbiter state: the flit is
// registered by the next controller on the lane. The grant is held for a whole
// packet so that flits of two packets never interleave on a lane.
//
// Following the document: a two-request FCFS/RR arbiter with encoder and
// decoder where the local input joins lane 0. This design's own choice: the
// same block is used wherever two streams share a lane segment, including the
// entry of a switch link onto a secondary lane.
//
// Interface: stream a (a_valid_i/a_ready_o/a_flit_i) and stream b (likewise),
// merged output valid_o/ready_i/flit_o. Purely combinational from input to
// output.
module rnoc_lane_merge
  import rnoc_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  a_valid_i,
  output logic  a_ready_o,
  input  flit_t a_flit_i,
  input  logic  b_valid_i,
  output logic  b_ready_o,
  input  flit_t b_flit_i,
  output logic  valid_o,
  input  logic  ready_i,
  output flit_t flit_o
);

  logic [1:0] gnt;

  rnoc_fcfs_rr_arb u_arb (
    .clk, .rst,
    .req_i       ({b_valid_i, a_valid_i}),
    .gnt_o       (gnt),
    .xfer_i      (valid_o && ready_i),
    .xfer_tail_i (flit_o.tail)
  );

  assign flit_o    = gnt[1] ? b_flit_i : a_flit_i;
  assign valid_o   = (gnt[0] && a_valid_i) || (gnt[1] && b_valid_i);
  assign a_ready_o = gnt[0] && ready_i;
  assign b_ready_o = gnt[1] && ready_i;

endmodule
