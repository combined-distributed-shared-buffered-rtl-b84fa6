// rnoc_port_arb: static-priority arbiter guarding one router output port.
//
// Requests 0 and 1 come from output controllers on the two primary lanes,
// requests 2 and 3 from output controllers on the two secondary lanes. A
// FCFS/RR arbiter (rnoc_fcfs_rr_arb) resolves each pair; a static-priority
// stage then grants the secondary pair whenever it has a winner, because a
// packet on a secondary lane cannot be deflected any further and must leave
// through this port. The whole output is combinational in the requests (Mealy),
// so a request is granted in the cycle it appears.
//
// Once a packet has started through the port, the group holding it keeps the
// grant until its tail flit passes: a secondary request arriving in the middle
// of a primary-lane packet waits for that packet's tail.
//
// Following the document: two FCFS/RR arbiters, one per lane pair, feeding a
// static-priority arbiter that favours the secondary lanes. This design's own
// choice: the packet lock of the priority stage, synchronous active-high reset.
//
// Interface: req_i[3:0], gnt_o[3:0] (one-hot or zero, same cycle); xfer_i
// pulses for each flit leaving through the port, xfer_tail_i is its tail bit.
module rnoc_port_arb (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] req_i,
  output logic [3:0] gnt_o,
  input  logic       xfer_i,
  input  logic       xfer_tail_i
);

  logic [1:0] gnt_pri, gnt_sec;
  logic       locked, lock_sec, sel_sec;

  always_comb begin
    if (locked) sel_sec = lock_sec;
    else        sel_sec = |gnt_sec;
  end

  assign gnt_o = sel_sec ? {gnt_sec, 2'b00} : {2'b00, gnt_pri};

  rnoc_fcfs_rr_arb u_arb_pri (
    .clk, .rst,
    .req_i       (req_i[1:0]),
    .gnt_o       (gnt_pri),
    .xfer_i      (xfer_i && !sel_sec),
    .xfer_tail_i (xfer_tail_i)
  );

  rnoc_fcfs_rr_arb u_arb_sec (
    .clk, .rst,
    .req_i       (req_i[3:2]),
    .gnt_o       (gnt_sec),
    .xfer_i      (xfer_i && sel_sec),
    .xfer_tail_i (xfer_tail_i)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      locked   <= 1'b0;
      lock_sec <= 1'b0;
    end else if (xfer_i) begin
      locked   <= !xfer_tail_i;
      lock_sec <= sel_sec;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt_o));

endmodule
