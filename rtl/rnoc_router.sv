// rnoc_router: 4-lane R-NoC (Roundabout NoC) router for a 2D mesh.
//
// Instead of one FIFO per input port, the router's buffers sit on four lanes
// that run round the router like the lanes of a traffic roundabout and are
// shared by several ports. Lanes 0 and 1 are primary lanes, which input ports
// join; lanes 2 and 3 are secondary lanes, which packets only reach by
// switching off a primary lane. Every output port has an output controller on
// each lane that can carry packets for it. All control is local: each
// controller decides with a ready/valid handshake and a small arbiter where the
// packet at its head goes next; there is no central crossbar or allocator.
//
// Lane layout (in lane order, each controller being one register stage):
//   lane 0 (West, Local inputs):
//     IN_W > OUT_L(wait) > PATH_L > [join IN_L] > OUT_S > OUT_E > OUT_N > OUT_W > lane 2
//   lane 2 (secondary of lane 0):
//     > OUT_L > [join switch from PATH_L] > OUT_S > OUT_E > OUT_N > OUT_W (end)
//   lane 1 (South, East, North inputs):
//     IN_S > PATH_E > [join IN_E] > OUT_N > PATH_N > [join IN_N] > OUT_W(wait) > OUT_L(wait) > OUT_S(wait) (end)
//   lane 3 (secondary of lane 1):
//     [switch from PATH_E] > [join switch from PATH_N] > OUT_N > OUT_W > OUT_L > OUT_S (end)
// A packet leaves at the first controller of its output port that wins the
// port. On a primary lane, a packet that finds its port busy is deflected on
// along the lane and reaches the port again on the secondary lane. Secondary
// lanes are the last resort: packets wait there for their port. A path
// controller sends a packet onto the secondary lane when the joining point
// ahead of it is taken by a packet from the joining input port; PATH_N also
// sends every packet deflected at OUT_N of lane 1 to lane 3. Each output port
// block arbitrates between the lanes with priority to the secondary lanes.
//
// Deadlock: with 10-flit wormhole packets a waiting packet fills several lane
// stages, so everything queued behind it on the same lane depends on its port.
// The South input (north-bound traffic) and the North input (south-bound
// traffic) share lane 1. If south-bound packets could sit behind packets
// waiting for the North output while north-bound packets sit behind packets
// waiting for the South output, two neighbouring routers in a column could
// block each other for ever (this happened in simulation with lane 1 running
// into lane 3). Here the part of lane 1 after the North input join ends at the
// lane's own West, Local and South controllers, which wait for their port
// instead of deflecting, and no packet there ever moves on to lane 3. So
// south-bound packets only ever wait for the South, West and Local outputs,
// never for North, and the channel dependencies of the mesh have no cycle
// (west-bound and south-bound channels never depend on north-bound or
// east-bound ones in a way that closes a loop under XY routing).
//
// Timing: every controller is one cycle. A header from West to North passes
// IN_W, OUT_L, PATH_L, OUT_S, OUT_E and OUT_N: six cycles at zero load, the
// longest primary path of lane 0. The link between two routers is not
// registered on the sending side: the receiving input controller is the next
// register.
//
// Following the document: two primary and two secondary lanes; West and Local
// inputs on lane 0, East, South and North on lane 1; lane 2 shared only by the
// packets of lane 0 and lane 3 only by those of lane 1; the lane 0 order from
// the West input to the West output controller and the Local path controller
// ahead of the Local input join; switch links from the end of lane 0 to the
// start of lane 2 and at the points of contention; the output controller cases
// on lanes 0, 2 and 3 (deflect on a busy port on the primary lane, wait for the
// Local port on lane 0, wait on secondary lanes); four output controllers per
// port feeding a static-priority arbiter; XY routing. This design's own
// choices: the order of controllers on lanes 1, 2 and 3 and the exact places of
// their switch links (chosen so that every output allowed by XY routing is
// reachable on the lane a packet is on or on its secondary lane); the waiting
// tail of lane 1 described above, which departs from the document's rule that
// the Local controller of lane 1 deflects; the East output has controllers on lanes 0 and 2 only,
// since no input of lane 1 may turn East under XY routing; the optional extra
// lane buffers are not instantiated.
//
// Lint: the flit outputs at the ends of lanes 1, 2 and 3 (l1_end, l2_end,
// l3_end) are reported as unused. They are left unconnected on purpose: no
// packet ever reaches a lane end, which the a_l*_end assertions check on the
// valid bits.
//
// Interface: per port p (rnoc_pkg::port_e order N, E, S, W, L) an input link
// in_valid[p]/in_ready[p]/in_flit[p] and an output link out_valid[p]/
// out_ready[p]/out_flit[p]; my_x/my_y are the router's mesh coordinates;
// events reports per-cycle flags (rnoc_pkg::rnoc_events_t).
module rnoc_router
  import rnoc_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [4:0]         in_valid,
  output logic [4:0]         in_ready,
  input  flit_t              in_flit  [5],
  output logic [4:0]         out_valid,
  input  logic [4:0]         out_ready,
  output flit_t              out_flit [5],
  output rnoc_events_t       events
);

  // A stream is valid/ready/flit.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } fwd_t;

  // Output controller port-side signals, indexed [port][lane].
  logic  [3:0] oc_req [5];
  flit_t       oc_flit[5][4];
  logic  [3:0] oc_gnt [5];
  logic  [3:0] oc_rdy [5];
  logic  [4:0] defl_l0, defl_l1, defl_l2, defl_l3;

  // Input controller outputs.
  fwd_t ic_w, ic_l, ic_s, ic_e, ic_n;
  logic ic_w_r, ic_l_r, ic_s_r, ic_e_r, ic_n_r;

  fwd_t       ic_o [5];
  logic [4:0] ic_r;

  for (genvar p = 0; p < 5; p++) begin : g_ic
    rnoc_input_ctrl u_ic (
      .clk, .rst, .my_x, .my_y,
      .valid_i (in_valid[p]), .ready_o (in_ready[p]), .flit_i (in_flit[p]),
      .valid_o (ic_o[p].valid), .ready_i (ic_r[p]), .flit_o (ic_o[p].flit)
    );
  end

  assign ic_n = ic_o[PN];  assign ic_r[PN] = ic_n_r;
  assign ic_e = ic_o[PE];  assign ic_r[PE] = ic_e_r;
  assign ic_s = ic_o[PS];  assign ic_r[PS] = ic_s_r;
  assign ic_w = ic_o[PW];  assign ic_r[PW] = ic_w_r;
  assign ic_l = ic_o[PL];  assign ic_r[PL] = ic_l_r;

  // ---------------------------------------------------------------- lane 0
  fwd_t l0_a, l0_b, l0_c, l0_d, l0_e, l0_f, l0_g, l0_end;
  logic l0_a_r, l0_b_r, l0_c_r, l0_d_r, l0_e_r, l0_f_r, l0_g_r, l0_end_r;
  fwd_t sw_l;                       // switch link PATH_L -> lane 2
  logic sw_l_r;
  logic sw_l_evt, sw_e_evt, sw_n_evt;

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_L)), .WAIT_IF_BUSY(1'b1)) u_l0_out_l (
    .clk, .rst,
    .valid_i (ic_w.valid), .ready_o (ic_w_r), .flit_i (ic_w.flit),
    .lane_valid_o (l0_a.valid), .lane_ready_i (l0_a_r), .lane_flit_o (l0_a.flit),
    .port_req_o (oc_req[PL][0]), .port_gnt_i (oc_gnt[PL][0]),
    .port_ready_i (oc_rdy[PL][0]), .port_flit_o (oc_flit[PL][0]),
    .deflect_o (defl_l0[PL])
  );

  rnoc_path_ctrl u_l0_path_l (
    .clk, .rst,
    .valid_i (l0_a.valid), .ready_o (l0_a_r), .flit_i (l0_a.flit),
    .pri_valid_o (l0_b.valid), .pri_ready_i (l0_b_r), .pri_flit_o (l0_b.flit),
    .sec_valid_o (sw_l.valid), .sec_ready_i (sw_l_r), .sec_flit_o (sw_l.flit),
    .switch_o (sw_l_evt)
  );

  rnoc_lane_merge u_l0_join_l (
    .clk, .rst,
    .a_valid_i (l0_b.valid), .a_ready_o (l0_b_r), .a_flit_i (l0_b.flit),
    .b_valid_i (ic_l.valid), .b_ready_o (ic_l_r), .b_flit_i (ic_l.flit),
    .valid_o (l0_c.valid), .ready_i (l0_c_r), .flit_o (l0_c.flit)
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_S))) u_l0_out_s (
    .clk, .rst,
    .valid_i (l0_c.valid), .ready_o (l0_c_r), .flit_i (l0_c.flit),
    .lane_valid_o (l0_d.valid), .lane_ready_i (l0_d_r), .lane_flit_o (l0_d.flit),
    .port_req_o (oc_req[PS][0]), .port_gnt_i (oc_gnt[PS][0]),
    .port_ready_i (oc_rdy[PS][0]), .port_flit_o (oc_flit[PS][0]),
    .deflect_o (defl_l0[PS])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_E))) u_l0_out_e (
    .clk, .rst,
    .valid_i (l0_d.valid), .ready_o (l0_d_r), .flit_i (l0_d.flit),
    .lane_valid_o (l0_e.valid), .lane_ready_i (l0_e_r), .lane_flit_o (l0_e.flit),
    .port_req_o (oc_req[PE][0]), .port_gnt_i (oc_gnt[PE][0]),
    .port_ready_i (oc_rdy[PE][0]), .port_flit_o (oc_flit[PE][0]),
    .deflect_o (defl_l0[PE])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_N))) u_l0_out_n (
    .clk, .rst,
    .valid_i (l0_e.valid), .ready_o (l0_e_r), .flit_i (l0_e.flit),
    .lane_valid_o (l0_f.valid), .lane_ready_i (l0_f_r), .lane_flit_o (l0_f.flit),
    .port_req_o (oc_req[PN][0]), .port_gnt_i (oc_gnt[PN][0]),
    .port_ready_i (oc_rdy[PN][0]), .port_flit_o (oc_flit[PN][0]),
    .deflect_o (defl_l0[PN])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_W))) u_l0_out_w (
    .clk, .rst,
    .valid_i (l0_f.valid), .ready_o (l0_f_r), .flit_i (l0_f.flit),
    .lane_valid_o (l0_end.valid), .lane_ready_i (l0_end_r), .lane_flit_o (l0_end.flit),
    .port_req_o (oc_req[PW][0]), .port_gnt_i (oc_gnt[PW][0]),
    .port_ready_i (oc_rdy[PW][0]), .port_flit_o (oc_flit[PW][0]),
    .deflect_o (defl_l0[PW])
  );

  // ---------------------------------------------------------------- lane 2
  rnoc_output_ctrl #(.MY_PORT(4'(PORT_L)), .WAIT_IF_BUSY(1'b1)) u_l2_out_l (
    .clk, .rst,
    .valid_i (l0_end.valid), .ready_o (l0_end_r), .flit_i (l0_end.flit),
    .lane_valid_o (l0_g.valid), .lane_ready_i (l0_g_r), .lane_flit_o (l0_g.flit),
    .port_req_o (oc_req[PL][2]), .port_gnt_i (oc_gnt[PL][2]),
    .port_ready_i (oc_rdy[PL][2]), .port_flit_o (oc_flit[PL][2]),
    .deflect_o (defl_l2[PL])
  );

  fwd_t l2_a, l2_b, l2_c, l2_d, l2_end;
  logic l2_a_r, l2_b_r, l2_c_r, l2_d_r, l2_end_r;

  rnoc_lane_merge u_l2_join_l (
    .clk, .rst,
    .a_valid_i (l0_g.valid), .a_ready_o (l0_g_r), .a_flit_i (l0_g.flit),
    .b_valid_i (sw_l.valid), .b_ready_o (sw_l_r), .b_flit_i (sw_l.flit),
    .valid_o (l2_a.valid), .ready_i (l2_a_r), .flit_o (l2_a.flit)
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_S)), .WAIT_IF_BUSY(1'b1)) u_l2_out_s (
    .clk, .rst,
    .valid_i (l2_a.valid), .ready_o (l2_a_r), .flit_i (l2_a.flit),
    .lane_valid_o (l2_b.valid), .lane_ready_i (l2_b_r), .lane_flit_o (l2_b.flit),
    .port_req_o (oc_req[PS][2]), .port_gnt_i (oc_gnt[PS][2]),
    .port_ready_i (oc_rdy[PS][2]), .port_flit_o (oc_flit[PS][2]),
    .deflect_o (defl_l2[PS])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_E)), .WAIT_IF_BUSY(1'b1)) u_l2_out_e (
    .clk, .rst,
    .valid_i (l2_b.valid), .ready_o (l2_b_r), .flit_i (l2_b.flit),
    .lane_valid_o (l2_c.valid), .lane_ready_i (l2_c_r), .lane_flit_o (l2_c.flit),
    .port_req_o (oc_req[PE][2]), .port_gnt_i (oc_gnt[PE][2]),
    .port_ready_i (oc_rdy[PE][2]), .port_flit_o (oc_flit[PE][2]),
    .deflect_o (defl_l2[PE])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_N)), .WAIT_IF_BUSY(1'b1)) u_l2_out_n (
    .clk, .rst,
    .valid_i (l2_c.valid), .ready_o (l2_c_r), .flit_i (l2_c.flit),
    .lane_valid_o (l2_d.valid), .lane_ready_i (l2_d_r), .lane_flit_o (l2_d.flit),
    .port_req_o (oc_req[PN][2]), .port_gnt_i (oc_gnt[PN][2]),
    .port_ready_i (oc_rdy[PN][2]), .port_flit_o (oc_flit[PN][2]),
    .deflect_o (defl_l2[PN])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_W)), .WAIT_IF_BUSY(1'b1)) u_l2_out_w (
    .clk, .rst,
    .valid_i (l2_d.valid), .ready_o (l2_d_r), .flit_i (l2_d.flit),
    .lane_valid_o (l2_end.valid), .lane_ready_i (l2_end_r), .lane_flit_o (l2_end.flit),
    .port_req_o (oc_req[PW][2]), .port_gnt_i (oc_gnt[PW][2]),
    .port_ready_i (oc_rdy[PW][2]), .port_flit_o (oc_flit[PW][2]),
    .deflect_o (defl_l2[PW])
  );

  assign l2_end_r = 1'b0;  // end of a secondary lane: every packet has left before it

  // ---------------------------------------------------------------- lane 1
  fwd_t l1_a, l1_b, l1_c, l1_d, l1_e, l1_f, l1_end;
  logic l1_a_r, l1_b_r, l1_c_r, l1_d_r, l1_e_r, l1_f_r, l1_end_r;
  fwd_t sw_e, sw_n;                 // switch links PATH_E / PATH_N -> lane 3
  logic sw_e_r, sw_n_r;

  rnoc_path_ctrl u_l1_path_e (
    .clk, .rst,
    .valid_i (ic_s.valid), .ready_o (ic_s_r), .flit_i (ic_s.flit),
    .pri_valid_o (l1_a.valid), .pri_ready_i (l1_a_r), .pri_flit_o (l1_a.flit),
    .sec_valid_o (sw_e.valid), .sec_ready_i (sw_e_r), .sec_flit_o (sw_e.flit),
    .switch_o (sw_e_evt)
  );

  rnoc_lane_merge u_l1_join_e (
    .clk, .rst,
    .a_valid_i (l1_a.valid), .a_ready_o (l1_a_r), .a_flit_i (l1_a.flit),
    .b_valid_i (ic_e.valid), .b_ready_o (ic_e_r), .b_flit_i (ic_e.flit),
    .valid_o (l1_b.valid), .ready_i (l1_b_r), .flit_o (l1_b.flit)
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_N))) u_l1_out_n (
    .clk, .rst,
    .valid_i (l1_b.valid), .ready_o (l1_b_r), .flit_i (l1_b.flit),
    .lane_valid_o (l1_c.valid), .lane_ready_i (l1_c_r), .lane_flit_o (l1_c.flit),
    .port_req_o (oc_req[PN][1]), .port_gnt_i (oc_gnt[PN][1]),
    .port_ready_i (oc_rdy[PN][1]), .port_flit_o (oc_flit[PN][1]),
    .deflect_o (defl_l1[PN])
  );

  // A packet for North that reaches PATH_N was deflected at OUT_N: it must go
  // to lane 3, since lane 1 has no North controller further on.
  rnoc_path_ctrl #(.SEC_ONLY_EN(1'b1), .SEC_ONLY_PORT(4'(PORT_N))) u_l1_path_n (
    .clk, .rst,
    .valid_i (l1_c.valid), .ready_o (l1_c_r), .flit_i (l1_c.flit),
    .pri_valid_o (l1_d.valid), .pri_ready_i (l1_d_r), .pri_flit_o (l1_d.flit),
    .sec_valid_o (sw_n.valid), .sec_ready_i (sw_n_r), .sec_flit_o (sw_n.flit),
    .switch_o (sw_n_evt)
  );

  rnoc_lane_merge u_l1_join_n (
    .clk, .rst,
    .a_valid_i (l1_d.valid), .a_ready_o (l1_d_r), .a_flit_i (l1_d.flit),
    .b_valid_i (ic_n.valid), .b_ready_o (ic_n_r), .b_flit_i (ic_n.flit),
    .valid_o (l1_e.valid), .ready_i (l1_e_r), .flit_o (l1_e.flit)
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_W)), .WAIT_IF_BUSY(1'b1)) u_l1_out_w (
    .clk, .rst,
    .valid_i (l1_e.valid), .ready_o (l1_e_r), .flit_i (l1_e.flit),
    .lane_valid_o (l1_f.valid), .lane_ready_i (l1_f_r), .lane_flit_o (l1_f.flit),
    .port_req_o (oc_req[PW][1]), .port_gnt_i (oc_gnt[PW][1]),
    .port_ready_i (oc_rdy[PW][1]), .port_flit_o (oc_flit[PW][1]),
    .deflect_o (defl_l1[PW])
  );

  fwd_t l1_g;
  logic l1_g_r;

  // Past the North input join nothing leaves lane 1 for lane 3 (see header).
  rnoc_output_ctrl #(.MY_PORT(4'(PORT_L)), .WAIT_IF_BUSY(1'b1)) u_l1_out_l (
    .clk, .rst,
    .valid_i (l1_f.valid), .ready_o (l1_f_r), .flit_i (l1_f.flit),
    .lane_valid_o (l1_g.valid), .lane_ready_i (l1_g_r), .lane_flit_o (l1_g.flit),
    .port_req_o (oc_req[PL][1]), .port_gnt_i (oc_gnt[PL][1]),
    .port_ready_i (oc_rdy[PL][1]), .port_flit_o (oc_flit[PL][1]),
    .deflect_o (defl_l1[PL])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_S)), .WAIT_IF_BUSY(1'b1)) u_l1_out_s (
    .clk, .rst,
    .valid_i (l1_g.valid), .ready_o (l1_g_r), .flit_i (l1_g.flit),
    .lane_valid_o (l1_end.valid), .lane_ready_i (l1_end_r), .lane_flit_o (l1_end.flit),
    .port_req_o (oc_req[PS][1]), .port_gnt_i (oc_gnt[PS][1]),
    .port_ready_i (oc_rdy[PS][1]), .port_flit_o (oc_flit[PS][1]),
    .deflect_o (defl_l1[PS])
  );

  // ---------------------------------------------------------------- lane 3
  fwd_t l3_a, l3_b, l3_c, l3_d, l3_e, l3_end;
  logic l3_a_r, l3_b_r, l3_c_r, l3_d_r, l3_e_r, l3_end_r;

  assign l1_end_r = 1'b0;  // end of lane 1: every packet has left before it

  // Lane 3 starts with the switch link from PATH_E.
  assign l3_a   = sw_e;
  assign sw_e_r = l3_a_r;

  rnoc_lane_merge u_l3_join_n (
    .clk, .rst,
    .a_valid_i (l3_a.valid), .a_ready_o (l3_a_r), .a_flit_i (l3_a.flit),
    .b_valid_i (sw_n.valid), .b_ready_o (sw_n_r), .b_flit_i (sw_n.flit),
    .valid_o (l3_b.valid), .ready_i (l3_b_r), .flit_o (l3_b.flit)
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_N)), .WAIT_IF_BUSY(1'b1)) u_l3_out_n (
    .clk, .rst,
    .valid_i (l3_b.valid), .ready_o (l3_b_r), .flit_i (l3_b.flit),
    .lane_valid_o (l3_c.valid), .lane_ready_i (l3_c_r), .lane_flit_o (l3_c.flit),
    .port_req_o (oc_req[PN][3]), .port_gnt_i (oc_gnt[PN][3]),
    .port_ready_i (oc_rdy[PN][3]), .port_flit_o (oc_flit[PN][3]),
    .deflect_o (defl_l3[PN])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_W)), .WAIT_IF_BUSY(1'b1)) u_l3_out_w (
    .clk, .rst,
    .valid_i (l3_c.valid), .ready_o (l3_c_r), .flit_i (l3_c.flit),
    .lane_valid_o (l3_d.valid), .lane_ready_i (l3_d_r), .lane_flit_o (l3_d.flit),
    .port_req_o (oc_req[PW][3]), .port_gnt_i (oc_gnt[PW][3]),
    .port_ready_i (oc_rdy[PW][3]), .port_flit_o (oc_flit[PW][3]),
    .deflect_o (defl_l3[PW])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_L)), .WAIT_IF_BUSY(1'b1)) u_l3_out_l (
    .clk, .rst,
    .valid_i (l3_d.valid), .ready_o (l3_d_r), .flit_i (l3_d.flit),
    .lane_valid_o (l3_e.valid), .lane_ready_i (l3_e_r), .lane_flit_o (l3_e.flit),
    .port_req_o (oc_req[PL][3]), .port_gnt_i (oc_gnt[PL][3]),
    .port_ready_i (oc_rdy[PL][3]), .port_flit_o (oc_flit[PL][3]),
    .deflect_o (defl_l3[PL])
  );

  rnoc_output_ctrl #(.MY_PORT(4'(PORT_S)), .WAIT_IF_BUSY(1'b1)) u_l3_out_s (
    .clk, .rst,
    .valid_i (l3_e.valid), .ready_o (l3_e_r), .flit_i (l3_e.flit),
    .lane_valid_o (l3_end.valid), .lane_ready_i (l3_end_r), .lane_flit_o (l3_end.flit),
    .port_req_o (oc_req[PS][3]), .port_gnt_i (oc_gnt[PS][3]),
    .port_ready_i (oc_rdy[PS][3]), .port_flit_o (oc_flit[PS][3]),
    .deflect_o (defl_l3[PS])
  );

  assign l3_end_r = 1'b0;  // end of a secondary lane

  // East has controllers on lanes 0 and 2 only.
  assign oc_req[PE][1]  = 1'b0;
  assign oc_req[PE][3]  = 1'b0;
  assign oc_flit[PE][1] = '0;
  assign oc_flit[PE][3] = '0;
  assign defl_l1[PE]    = 1'b0;
  assign defl_l3[PE]    = 1'b0;

  // ---------------------------------------------------------- output ports
  for (genvar p = 0; p < 5; p++) begin : g_op
    rnoc_out_port u_op (
      .clk, .rst,
      .req_i   (oc_req[p]),
      .flit_i  (oc_flit[p]),
      .gnt_o   (oc_gnt[p]),
      .ready_o (oc_rdy[p]),
      .valid_o (out_valid[p]),
      .ready_i (out_ready[p]),
      .flit_o  (out_flit[p])
    );
  end

  // ---------------------------------------------------------------- events
  logic sec_exit;
  always_comb begin
    sec_exit = 1'b0;
    for (int p = 0; p < 5; p++)
      if (out_valid[p] && out_ready[p] && out_flit[p].head && (oc_gnt[p][2] || oc_gnt[p][3]))
        sec_exit = 1'b1;
  end

  assign events.deflect  = |{defl_l0, defl_l1, defl_l2, defl_l3};
  assign events.lane_sw  = sw_l_evt || sw_e_evt || sw_n_evt;
  assign events.sec_exit = sec_exit;
  assign events.in_stall = |(in_valid & ~in_ready);

  // A packet must never run off the end of a secondary lane.
  a_l1_end: assert property (@(posedge clk) disable iff (rst) !l1_end.valid);
  a_l2_end: assert property (@(posedge clk) disable iff (rst) !l2_end.valid);
  a_l3_end: assert property (@(posedge clk) disable iff (rst) !l3_end.valid);

endmodule
