// rnoc_input_ctrl: input controller of an R-NoC router port.
//
// A flit arriving at the router input first passes the path computation (PC)
// logic and is then registered in an elastic buffer, whose output starts a
// primary lane. For a header flit the PC decodes the destination coordinates,
// computes the output port of this router with XY (dimension-order) routing and
// writes the port number into the header (data[31:28]); the output
// controllers along the lane match against that field. Body and tail flits
// pass unchanged and follow the path the header reserved.
//
// Following the document: EB plus PC, route computed from the header and
// encoded into it, one cycle of latency, XY routing for the mesh router. This
// design's own choice: the PC sits in front of the register so that the
// stored header already holds its output port; the router's own coordinates
// are inputs (wired by the mesh) rather than parameters.
//
// Interface: router port side valid_i/ready_o/flit_i; lane side
// valid_o/ready_i/flit_o; my_x/my_y are this router's coordinates.
module rnoc_input_ctrl
  import rnoc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic               valid_i,
  output logic               ready_o,
  input  flit_t              flit_i,
  output logic               valid_o,
  input  logic               ready_i,
  output flit_t              flit_o
);

  flit_t routed;

  always_comb begin
    routed = flit_i;
    if (flit_i.head)
      routed.data[OUTP_LSB +: 4] = xy_route(my_x, my_y, hdr_dst_x(flit_i.data), hdr_dst_y(flit_i.data));
  end

  rnoc_eb #(.T(flit_t)) u_eb (
    .clk, .rst,
    .valid_i, .ready_o, .data_i(routed),
    .valid_o, .ready_i, .data_o(flit_o)
  );

endmodule
