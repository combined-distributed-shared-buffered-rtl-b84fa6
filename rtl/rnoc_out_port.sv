// rnoc_out_port: output port block of an R-NoC router.
//
// Collects the output controllers of one router output, one per lane (lanes 0
// and 1 primary, lanes 2 and 3 secondary), and connects the winner to the link
// towards the neighbouring router. The static-priority arbiter (rnoc_port_arb)
// grants one requester; the grant selects that controller's flit (mux), the
// valid-out encoder forwards only the granted controller's valid, and the
// ready-in decoder returns the receiver's ready only to the granted
// controller. An unused lane position has its request tied to 0.
//
// Following the document: mux, arbiter, valid encoder and ready decoder, four
// output controllers per port (lanes 0 to 3), granted controller only sees the
// receiver's ready. This design's own choice: flit data is muxed straight onto
// the link without a further register, so the only register between two
// routers is the input controller of the receiving router.
//
// Interface: per lane req_i/flit_i, gnt_o/ready_o; link valid_o/ready_i/flit_o.
module rnoc_out_port
  import rnoc_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] req_i,
  input  flit_t      flit_i [4],
  output logic [3:0] gnt_o,
  output logic [3:0] ready_o,
  output logic       valid_o,
  input  logic       ready_i,
  output flit_t      flit_o
);

  rnoc_port_arb u_arb (
    .clk, .rst,
    .req_i,
    .gnt_o,
    .xfer_i      (valid_o && ready_i),
    .xfer_tail_i (flit_o.tail)
  );

  always_comb begin
    flit_o = flit_i[0];
    for (int i = 1; i < 4; i++)
      if (gnt_o[i]) flit_o = flit_i[i];
  end

  assign valid_o = |(gnt_o & req_i);
  assign ready_o = gnt_o & {4{ready_i}};

endmodule
