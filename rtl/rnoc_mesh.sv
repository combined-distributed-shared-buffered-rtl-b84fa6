// rnoc_mesh: a MESH_X x MESH_Y two-dimensional mesh of 4-lane R-NoC routers.
//
// Router (x, y) has node index n = y*MESH_X + x. Its East output drives the
// West input of router (x+1, y) and its North output the South input of
// router (x, y+1), and the other way round; every link is a ready/valid flit
// channel whose only register is the input controller of the receiving router.
// Packets are routed XY (x first, then y) with wormhole flow control, so no
// packet is ever sent out of the mesh boundary: boundary inputs are tied idle
// and boundary outputs are tied ready, with an assertion that they stay unused.
// The local port of each router is brought out: local_in_* injects packets
// into node n, local_out_* ejects the packets addressed to node n. events[n]
// reports the per-cycle flags of router n (deflection, lane switch, exit from a
// secondary lane, input stall).
//
// Following the document: a 4x4 mesh (the size used for the performance
// study), XY routing, 32-bit flits, wormhole flow control. This design's own
// choice: coordinates are given to each router as constant inputs.
module rnoc_mesh
  import rnoc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  localparam int unsigned NODES = MESH_X * MESH_Y
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [NODES-1:0]     local_in_valid,
  output logic [NODES-1:0]     local_in_ready,
  input  flit_t                local_in_flit  [NODES],
  output logic [NODES-1:0]     local_out_valid,
  input  logic [NODES-1:0]     local_out_ready,
  output flit_t                local_out_flit [NODES],
  output rnoc_events_t         events         [NODES]
);

  logic [4:0] in_v  [NODES];
  logic [4:0] in_r  [NODES];
  flit_t      in_f  [NODES][5];
  logic [4:0] out_v [NODES];
  logic [4:0] out_r [NODES];
  flit_t      out_f [NODES][5];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      rnoc_router u_router (
        .clk, .rst,
        .my_x      (COORD_W'(x)),
        .my_y      (COORD_W'(y)),
        .in_valid  (in_v[N]),
        .in_ready  (in_r[N]),
        .in_flit   (in_f[N]),
        .out_valid (out_v[N]),
        .out_ready (out_r[N]),
        .out_flit  (out_f[N]),
        .events    (events[N])
      );

      // Local port.
      assign in_v[N][PL]        = local_in_valid[N];
      assign in_f[N][PL]        = local_in_flit[N];
      assign local_in_ready[N]  = in_r[N][PL];
      assign local_out_valid[N] = out_v[N][PL];
      assign local_out_flit[N]  = out_f[N][PL];
      assign out_r[N][PL]       = local_out_ready[N];

      // West input / West output ready, from the router to the west.
      if (x > 0) begin : g_w
        assign in_v[N][PW]  = out_v[N-1][PE];
        assign in_f[N][PW]  = out_f[N-1][PE];
        assign out_r[N][PW] = in_r[N-1][PE];
      end else begin : g_w_edge
        assign in_v[N][PW]  = 1'b0;
        assign in_f[N][PW]  = '0;
        assign out_r[N][PW] = 1'b1;
        a_no_exit_w: assert property (@(posedge clk) disable iff (rst) !out_v[N][PW]);
      end

      // East input / East output ready, from the router to the east.
      if (x < MESH_X - 1) begin : g_e
        assign in_v[N][PE]  = out_v[N+1][PW];
        assign in_f[N][PE]  = out_f[N+1][PW];
        assign out_r[N][PE] = in_r[N+1][PW];
      end else begin : g_e_edge
        assign in_v[N][PE]  = 1'b0;
        assign in_f[N][PE]  = '0;
        assign out_r[N][PE] = 1'b1;
        a_no_exit_e: assert property (@(posedge clk) disable iff (rst) !out_v[N][PE]);
      end

      // South input / South output ready, from the router below.
      if (y > 0) begin : g_s
        assign in_v[N][PS]  = out_v[N-MESH_X][PN];
        assign in_f[N][PS]  = out_f[N-MESH_X][PN];
        assign out_r[N][PS] = in_r[N-MESH_X][PN];
      end else begin : g_s_edge
        assign in_v[N][PS]  = 1'b0;
        assign in_f[N][PS]  = '0;
        assign out_r[N][PS] = 1'b1;
        a_no_exit_s: assert property (@(posedge clk) disable iff (rst) !out_v[N][PS]);
      end

      // North input / North output ready, from the router above.
      if (y < MESH_Y - 1) begin : g_n
        assign in_v[N][PN]  = out_v[N+MESH_X][PS];
        assign in_f[N][PN]  = out_f[N+MESH_X][PS];
        assign out_r[N][PN] = in_r[N+MESH_X][PS];
      end else begin : g_n_edge
        assign in_v[N][PN]  = 1'b0;
        assign in_f[N][PN]  = '0;
        assign out_r[N][PN] = 1'b1;
        a_no_exit_n: assert property (@(posedge clk) disable iff (rst) !out_v[N][PN]);
      end
    end
  end

endmodule
