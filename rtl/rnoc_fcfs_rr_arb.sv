// rnoc_fcfs_rr_arb: two-request arbiter, first-come-first-serve for requests
// that arrive one after the other and round-robin for requests that arrive in
// the same cycle. The grant is held for a whole wormhole packet.
//
// How it works. The grant is a combinational function of the requests and a
// little state (a Mealy machine), so a lone request is granted in the cycle it
// appears, without waiting for a clock edge. When both requests are present,
// the one that was already present in the previous cycle wins (first come).
// If both appeared together, or a flit has just been served while both were
// requesting, the input that was not served last wins (round-robin); the
// choice then stays fixed while both keep requesting and nothing moves, so a
// stalled grant never switches.
// Once a head flit without its tail has been transferred through the granted
// input (xfer_i=1, xfer_tail_i=0) the arbiter locks onto that input until the
// tail flit passes, so packets are never interleaved.
//
// Following the document: two request inputs, FCFS for sequential and RR for
// simultaneous requests, Mealy output. This design's own choices: how the
// arrival order is remembered (the previous cycle's requests), the packet
// lock, and synchronous active-high reset.
//
// Interface: req_i[1:0] requests; gnt_o[1:0] one-hot or zero grant, valid in the
// same cycle; xfer_i pulses for every flit that passes through the granted
// input, xfer_tail_i is that flit's tail bit.
module rnoc_fcfs_rr_arb (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] req_i,
  output logic [1:0] gnt_o,
  input  logic       xfer_i,
  input  logic       xfer_tail_i
);

  logic [1:0] prev_req;     // requests seen in the previous cycle
  logic       both_pick;    // choice made while both were requesting
  logic       last_served;  // input that moved the last flit
  logic       locked;       // a packet owns the grant
  logic       owner;        // which input owns it
  logic       pick;         // input chosen when both request
  logic       moved;        // a flit passed in the previous cycle

  always_comb begin
    unique case (prev_req)
      2'b01:   pick = 1'b0;          // input 0 came first
      2'b10:   pick = 1'b1;          // input 1 came first
      2'b11:   pick = moved ? !last_served : both_pick;  // RR after a flit, else keep
      default: pick = !last_served;  // simultaneous arrival: round-robin
    endcase
  end

  always_comb begin
    if (locked)            gnt_o = owner ? 2'b10 : 2'b01;
    else if (&req_i)       gnt_o = pick  ? 2'b10 : 2'b01;
    else                   gnt_o = req_i;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev_req    <= 2'b00;
      moved       <= 1'b0;
      both_pick   <= 1'b0;
      last_served <= 1'b1;
      locked      <= 1'b0;
      owner       <= 1'b0;
    end else begin
      prev_req <= req_i;
      moved    <= xfer_i;
      if (&req_i && !locked) both_pick <= pick;
      if (xfer_i) begin
        last_served <= gnt_o[1];
        if (xfer_tail_i) begin
          locked <= 1'b0;
        end else begin
          locked <= 1'b1;
          owner  <= gnt_o[1];
        end
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt_o));
  a_xfer_granted: assert property (@(posedge clk) disable iff (rst) xfer_i |-> |gnt_o);

endmodule
