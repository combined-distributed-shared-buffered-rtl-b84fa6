// rnoc_eb: one-stage elastic buffer with a ghost register.
//
// Every controller of an R-NoC lane is built around one of these. It is a
// register stage with a ready/valid handshake on both sides. The main register
// (the "synchronous island") holds the flit presented downstream. When the
// downstream side stalls while a new flit is already on its way in, that flit
// is caught in the ghost register, so ready_o can be a registered signal
// (ready_o = ghost register empty) without losing data. The ghost register
// adds no latency: a flit taken in cycle t is presented at valid_o in cycle t+1
// and a full stream passes at one flit per cycle.
//
// Following the document: elastic buffering around a register, ghost storage
// used only on back-pressure, one cycle of latency. This design's own choice:
// the ghost storage is an edge-triggered register rather than a latch, so the
// whole block is ordinary synchronous logic; reset is synchronous and active
// high and clears only the valid bits.
//
// Interface: upstream valid_i/ready_o/data_i, downstream valid_o/ready_i/data_o.
// A transfer happens on a rising clock edge where valid and ready are both 1.
module rnoc_eb #(
  parameter type T = rnoc_pkg::flit_t
) (
  input  logic clk,
  input  logic rst,
  input  logic valid_i,
  output logic ready_o,
  input  T     data_i,
  output logic valid_o,
  input  logic ready_i,
  output T     data_o
);

  logic main_v, ghost_v;
  T     main_d, ghost_d;

  assign ready_o = !ghost_v;
  assign valid_o = main_v;
  assign data_o  = main_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      main_v  <= 1'b0;
      ghost_v <= 1'b0;
    end else if (ready_i || !main_v) begin
      // The main register is free or being emptied this cycle.
      if (ghost_v) begin
        main_v  <= 1'b1;
        main_d  <= ghost_d;
        ghost_v <= 1'b0;
      end else begin
        main_v <= valid_i;
        if (valid_i) main_d <= data_i;
      end
    end else if (valid_i && !ghost_v) begin
      // Downstream stalls: park the incoming flit in the ghost register.
      ghost_v <= 1'b1;
      ghost_d <= data_i;
    end
  end

  // Handshake rule: a valid flit held back by the receiver must not change.
  logic stalled_q;
  T     held_q;
  always_ff @(posedge clk) begin
    stalled_q <= !rst && valid_o && !ready_i;
    held_q    <= data_o;
  end
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           stalled_q |-> (valid_o && data_o == held_q));

endmodule
