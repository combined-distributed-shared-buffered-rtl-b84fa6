// tb_rnoc_mesh: end-to-end testbench of the 4x4 R-NoC mesh at its default size.
//
// Every node has a traffic source on its local input and a sink on its local
// output, as the processing blocks of a network benchmark would. The test runs
// five phases, each starting from an empty network:
//   1. zero load: one single-flit packet from node (0,0) to node (1,0); the
//      head must reach the sink 5 cycles after it entered the source router
//      (input controller, output controllers South and East of lane 0 in the
//      first router, input controller West and output controller Local in the
//      second one);
//   2. uniform random traffic: every node sends 10-flit packets to random
//      other nodes;
//   3. transpose traffic: node (x,y) sends to node (y,x);
//   4. hotspot traffic: every node sends to node (2,2);
//   5. uniform random traffic again, with every source injecting whenever it
//      can and every sink always ready, which saturates the network (a
//      deadlock would show here as an expired watchdog).
// Sinks accept flits with random back-pressure. The checker works from the
// packet list alone: each packet must arrive at its destination node exactly
// once, with its flits in order and not interleaved with another packet, and
// nothing may arrive anywhere else. It also counts the router mechanisms
// (deflection on a busy port, lane switch, exit from a secondary lane, input
// back-pressure) over the whole run and fails if one never happened.
module tb_rnoc_mesh;
  import rnoc_pkg::*;

  localparam int MX = 4, MY = 4, NODES = MX * MY;
  localparam int NPKT = 40;       // packets per node in each loaded phase
  localparam int PLEN = 10;       // packet length used in the document's study
  localparam int HOT  = 2 * MX + 2;
  localparam int WATCHDOG = 400000;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [NODES-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t            in_flit  [NODES];
  flit_t            out_flit [NODES];
  rnoc_events_t     events   [NODES];

  rnoc_mesh dut (
    .clk, .rst,
    .local_in_valid  (in_valid),
    .local_in_ready  (in_ready),
    .local_in_flit   (in_flit),
    .local_out_valid (out_valid),
    .local_out_ready (out_ready),
    .local_out_flit  (out_flit),
    .events
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ------------------------------------------------------------ packets
  int pkt_dst [NODES][NPKT];
  int pkt_len [NODES][NPKT];
  bit pkt_got [NODES][NPKT];
  int npkt_phase;
  bit gen_en;
  int inj_pct, rdy_pct;

  function automatic flit_t mk_flit(int s, int k, int i);
    flit_t f;
    if (i == 0) begin
      f = make_head(8'(pkt_dst[s][k] % MX), 8'(pkt_dst[s][k] / MX),
                    {4'(s), 8'(k)}, pkt_len[s][k] == 1);
    end else begin
      f.head = 1'b0;
      f.tail = (i == pkt_len[s][k] - 1);
      f.data = {4'hC, 4'(s), 8'(k), 4'(i), 12'h3C3};
    end
    return f;
  endfunction

  // ------------------------------------------------------------ sources
  int gen_k [NODES], gen_i [NODES];
  int last_in_cycle [NODES];

  always @(posedge clk) begin
    if (rst) begin
      in_valid <= '0;
      for (int s = 0; s < NODES; s++) begin gen_k[s] = 0; gen_i[s] = 0; end
    end else begin
      for (int s = 0; s < NODES; s++) begin
        if (in_valid[s] && in_ready[s]) begin
          if (gen_i[s] == 0) last_in_cycle[s] = cycle;
          gen_i[s]++;
          if (gen_i[s] == pkt_len[s][gen_k[s]]) begin gen_i[s] = 0; gen_k[s]++; end
        end
        if (in_valid[s] && !in_ready[s]) begin
          // hold the flit
        end else if (gen_en && gen_k[s] < npkt_phase && pkt_dst[s][gen_k[s]] >= 0 &&
                     (int'($urandom % 100) < inj_pct)) begin
          in_valid[s] <= 1'b1;
          in_flit[s]  <= mk_flit(s, gen_k[s], gen_i[s]);
        end else begin
          in_valid[s] <= 1'b0;
          if (gen_k[s] < npkt_phase && pkt_dst[s][gen_k[s]] < 0) gen_k[s]++;  // no packet
        end
      end
    end
  end

  // ------------------------------------------------------------ sinks
  bit busy [NODES];
  int cur_s [NODES], cur_k [NODES], cur_i [NODES];
  int received, expected;
  int n_deflect, n_lane_sw, n_sec_exit, n_stall;
  int last_head_cycle [NODES];

  always @(posedge clk) begin
    if (rst) begin
      out_ready <= '0;
      for (int d = 0; d < NODES; d++) busy[d] = 1'b0;
    end else begin
      for (int n = 0; n < NODES; n++) begin
        if (events[n].deflect)  n_deflect++;
        if (events[n].lane_sw)  n_lane_sw++;
        if (events[n].sec_exit) n_sec_exit++;
        if (events[n].in_stall) n_stall++;
      end
      for (int d = 0; d < NODES; d++) begin
        if (out_valid[d] && out_ready[d]) begin
          flit_t f;
          f = out_flit[d];
          checks++;
          if (f.head) begin
            int s, k;
            s = int'(f.data[27:24]);
            k = int'(f.data[23:16]);
            last_head_cycle[d] = cycle;
            if (busy[d]) fail($sformatf("node %0d: head inside a packet", d));
            if (k >= npkt_phase) begin
              fail($sformatf("node %0d: bad tag %0d/%0d", d, s, k));
            end else begin
              if (pkt_dst[s][k] != d) fail($sformatf("packet %0d/%0d arrived at node %0d", s, k, d));
              if (pkt_got[s][k]) fail($sformatf("packet %0d/%0d arrived twice", s, k));
              pkt_got[s][k] = 1'b1;
              cur_s[d] = s; cur_k[d] = k; cur_i[d] = 1;
              busy[d] = !f.tail;
              if (f.tail) received++;
            end
          end else if (!busy[d]) begin
            fail($sformatf("node %0d: body flit without head", d));
          end else begin
            if (f != mk_flit(cur_s[d], cur_k[d], cur_i[d]))
              fail($sformatf("node %0d: flit %0d of packet %0d/%0d wrong", d, cur_i[d], cur_s[d], cur_k[d]));
            cur_i[d]++;
            if (f.tail) begin busy[d] = 1'b0; received++; end
          end
        end
        out_ready[d] <= (int'($urandom % 100) < rdy_pct);
      end
    end
  end

  // ------------------------------------------------------------ phases
  task automatic start_phase(input int pattern, input int npkt);
    rst <= 1'b1;
    gen_en = 1'b0;
    repeat (2) @(posedge clk);
    expected = 0;
    received = 0;
    for (int s = 0; s < NODES; s++) begin
      for (int k = 0; k < NPKT; k++) begin
        int d;
        case (pattern)
          0: d = int'($urandom % NODES);                 // uniform
          1: d = (s % MX) * MX + (s / MX);               // transpose
          default: d = HOT;                              // hotspot
        endcase
        if (pattern == 0) while (d == s) d = int'($urandom % NODES);
        if (d == s || k >= npkt) d = -1;                 // a node does not send to itself
        pkt_dst[s][k] = d;
        pkt_len[s][k] = PLEN;
        pkt_got[s][k] = 1'b0;
        if (d >= 0) expected++;
      end
    end
    npkt_phase = npkt;
    @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    gen_en = 1'b1;
  endtask

  task automatic finish_phase(input string name);
    wait (received == expected);
    repeat (30) @(posedge clk);
    checks++;
    for (int s = 0; s < NODES; s++)
      for (int k = 0; k < npkt_phase; k++)
        if (pkt_dst[s][k] >= 0 && !pkt_got[s][k]) fail($sformatf("%s: packet %0d/%0d lost", name, s, k));
    $display("%s: %0d packets delivered by cycle %0d", name, received, cycle);
  endtask

  initial begin
    rst = 1'b1;
    gen_en = 1'b0;
    inj_pct = 100; rdy_pct = 100;
    n_deflect = 0; n_lane_sw = 0; n_sec_exit = 0; n_stall = 0;
    npkt_phase = 0;

    // Phase 1: zero-load latency of one hop, (0,0) -> (1,0).
    start_phase(0, 0);
    gen_en = 1'b0;
    pkt_dst[0][0] = 1; pkt_len[0][0] = 1; pkt_got[0][0] = 1'b0;
    expected = 1;
    npkt_phase = 1;
    gen_en = 1'b1;
    wait (received == 1);
    gen_en = 1'b0;
    checks++;
    if (last_head_cycle[1] - last_in_cycle[0] != 5)
      fail($sformatf("one-hop zero-load latency %0d, expected 5", last_head_cycle[1] - last_in_cycle[0]));
    else
      $display("one-hop zero-load latency: 5 cycles");

    inj_pct = 30; rdy_pct = 80;
    start_phase(0, NPKT);  finish_phase("uniform");
    start_phase(1, NPKT);  finish_phase("transpose");
    inj_pct = 20; rdy_pct = 60;
    start_phase(2, NPKT / 2); finish_phase("hotspot");
    inj_pct = 100; rdy_pct = 100;
    start_phase(0, NPKT);  finish_phase("uniform, saturated");

    $display("mechanisms: deflect=%0d lane_switch=%0d secondary_exit=%0d input_stall=%0d",
             n_deflect, n_lane_sw, n_sec_exit, n_stall);
    checks += 4;
    if (n_deflect == 0)  fail("no deflection on a busy output");
    if (n_lane_sw == 0)  fail("no switch onto a secondary lane");
    if (n_sec_exit == 0) fail("no exit from a secondary lane");
    if (n_stall == 0)    fail("no input back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d of %0d packets delivered", received, expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
